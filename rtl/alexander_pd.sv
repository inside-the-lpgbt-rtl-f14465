// alexander_pd: bang-bang (Alexander) phase detector of the clock and data
// recovery loop.
//
// The data are sampled three times: S1 at a rising clock edge, S2 at the
// following falling edge and S3 at the next rising edge. In lock the
// falling edge sits on the data transitions and S1/S3 at the eye centres.
//   no transition (S1 = S3)           : hold
//   transition, S1 = S2 (clock early) : dn = (S1^S3) & ~(S1^S2)
//   transition, S1 != S2 (clock late) : up = (S1^S3) &  (S1^S2)
// These equations follow the LpGBT description; registering up/dn for one
// clock is this design's choice.
//
// Interface: up/dn are valid for one clock after the rising edge that took
// S3; data is the retimed bit (S3) of the same edge.
module alexander_pd (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic up,
  output logic dn,
  output logic data
);
  logic s1, s2;

  always_ff @(negedge clk) s2 <= din;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1   <= 1'b0;
      up   <= 1'b0;
      dn   <= 1'b0;
      data <= 1'b0;
    end else begin
      s1   <= din;                              // becomes S1 of the next decision
      data <= din;
      up   <= (s1 ^ din) &  (s1 ^ s2);
      dn   <= (s1 ^ din) & ~(s1 ^ s2);
    end
  end
endmodule
