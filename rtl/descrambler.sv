// descrambler: parallel self-synchronizing descrambler, the inverse of
// scrambler.
//
// For each received word, D_i = S_i xnor S_(i-TAP1) xnor S_(i-TAP2), where S
// is the received (scrambled) stream. Bits that lie before the current word
// come from the previous received word, held in a register. Because only
// received bits enter the recursion, the descrambler needs no
// synchronisation: after one word its output is correct whatever its state
// was. A single channel error is multiplied into three output errors, which
// is why the FEC decoder runs before it. Parameters as for scrambler.
//
// Interface: when en is high, din is descrambled; dout is registered (one
// cycle of latency).
module descrambler #(
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

  logic [WIDTH-1:0] prev;
  logic [WIDTH-1:0] d_next;

  always_comb begin
    logic a, b;
    d_next = '0;
    for (int i = 0; i < WIDTH; i++) begin
      a = (i >= TAP1) ? din[(i-TAP1) % WIDTH] : prev[(WIDTH+i-TAP1) % WIDTH];
      b = (i >= TAP2) ? din[(i-TAP2) % WIDTH] : prev[(WIDTH+i-TAP2) % WIDTH];
      d_next[i] = ~(~(din[i] ^ a) ^ b);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= '0;
      dout <= '0;
    end else if (en) begin
      prev <= din;
      dout <= d_next;
    end
  end
endmodule
