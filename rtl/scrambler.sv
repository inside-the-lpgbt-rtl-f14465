// scrambler: parallel self-synchronizing (multiplicative) scrambler.
//
// Each word of WIDTH bits is scrambled in one clock with the recursion
//   S_i = D_i xnor S_(i-TAP1) xnor S_(i-TAP2)
// applied bit by bit, where S is the scrambled stream. Bit 0 of a word is
// the earliest bit; bits that lie before the word come from the previous
// scrambled word, kept in a register, so TAP2 (the scrambler order) must not
// exceed WIDTH. The LpGBT uses WIDTH/TAP1/TAP2 = 36/25/36 on the down link
// and 58/39/58 (FEC5) or 51/40/49 (FEC12) on the up link; these come from
// the link tables. Bit order and reset-to-zero state are this design's
// choice.
//
// Interface: when en is high, din is scrambled; dout is registered and
// valid from the clock edge that samples en (one cycle of latency).
module scrambler #(
  parameter int WIDTH = 36,
  parameter int TAP1  = 25,
  parameter int TAP2  = 36
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  initial assert (TAP1 < TAP2 && TAP2 <= WIDTH);

  logic [WIDTH-1:0] s_next;

  always_comb begin
    logic a, b;
    s_next = '0;
    for (int i = 0; i < WIDTH; i++) begin
      a = (i >= TAP1) ? s_next[(i-TAP1) % WIDTH] : dout[(WIDTH+i-TAP1) % WIDTH];
      b = (i >= TAP2) ? s_next[(i-TAP2) % WIDTH] : dout[(WIDTH+i-TAP2) % WIDTH];
      s_next[i] = ~(~(din[i] ^ a) ^ b);
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (en) dout <= s_next;
  end
endmodule
