// downlink_decoder: recovers the 36 user bits of an aligned 64-bit LpGBT
// down-link frame.
//
// The frame is {header[3:0], data[35:0], fec[23:0]}, first bit in the MSB.
// The 60 protected bits go through fec_decoder (four interleaved RS(5,3)
// codes over GF(8), one 3-bit symbol corrected per code), then the 36
// corrected bits through the down-link descrambler
// (D_i = S_i xnor S_(i-25) xnor S_(i-36)). Decoding comes before
// descrambling so that channel errors are removed before the descrambler
// could multiply them. The field order inside the frame is this design's
// choice.
//
// Interface: frame is sampled when en is high; data, valid (a one-cycle
// pulse) and the per-code flags follow one clock later.
module downlink_decoder
  import lpgbt_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [DL_FRAME-1:0] frame,
  output logic [DL_DATA-1:0]  data,
  output logic                valid,
  output logic [3:0]          corrected,
  output logic [3:0]          uncorrectable
);
  logic [DL_DATA-1:0] dcor;
  logic [3:0]         corr_c, unc_c;

  fec_decoder #(.M(3), .I(4), .D(DL_DATA)) u_fec (
    .data_in      (frame[DL_FEC +: DL_DATA]),
    .fec_in       (frame[0 +: DL_FEC]),
    .data_out     (dcor),
    .corrected    (corr_c),
    .uncorrectable(unc_c)
  );

  descrambler #(.WIDTH(DL_DATA), .TAP1(25), .TAP2(36)) u_dscr (
    .clk, .rst, .en, .din(dcor), .dout(data));

  always_ff @(posedge clk) begin
    if (rst) begin
      valid         <= 1'b0;
      corrected     <= '0;
      uncorrectable <= '0;
    end else begin
      valid <= en;
      if (en) begin
        corrected     <= corr_c;
        uncorrectable <= unc_c;
      end
    end
  end
endmodule
