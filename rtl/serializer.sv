// serializer: multi-level (tree) serializer of the up-link transmitter.
//
// Instead of one 256-bit shift register clocked at 10.24 GHz, the frame
// passes through a tree of 2:1 levels: level 0 holds the whole frame and is
// loaded at 40 MHz; each following level holds half as many bits as the one
// before and is updated twice as often, taking first the upper (earlier)
// half and then the lower half of its predecessor. Only the last levels run
// fast, and the power per level stays constant. As in the LpGBT, the output
// is not re-sampled: the last 2:1 multiplexer is driven directly by the
// fast clock phase (a double-data-rate stage at 5.12 GHz in the chip). For
// 5.12 Gb/s the last select is held, so the stream is half rate; here each
// bit of the 128-bit frame is entered twice into the tree.
//
// Modelling choice: all levels run from one bit-rate clock with clock
// enables derived from a free-running counter. With LEVELS = 8 a 256-bit
// frame is sent in 256 clocks. The frame size gives 8 levels of 2:1
// between 40 MHz and 10.24 GHz; the "ten levels" of the LpGBT description
// could not be reconciled with a 256-bit frame and are not followed.
//
// Interface: frame is sampled in the cycle where load is high (once per
// 2**LEVELS clocks) and appears on sout MSB first, its first bit
// 2**LEVELS - 1 clocks (255) after the load cycle. rate10g selects 10.24
// (1) or 5.12 (0) Gb/s; at 5.12 Gb/s only frame[FW/2-1:0] is sent.
module serializer #(
  parameter int LEVELS = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rate10g,
  input  logic [2**LEVELS-1:0] frame,
  output logic                 load,
  output logic                 sout
);
  localparam int FW = 2 ** LEVELS;

  logic [LEVELS-1:0] cnt;
  logic [FW-1:0]     lvl [LEVELS];     // level l uses bits [FW>>l - 1 : 0]
  logic [FW-1:0]     fin;

  assign load = (cnt == '1);

  // 5.12 Gb/s: every bit of the 128-bit frame twice.
  always_comb begin
    if (rate10g) fin = frame;
    else for (int i = 0; i < FW / 2; i++) fin[2*i +: 2] = {2{frame[i]}};
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)       lvl[0] <= '0;
    else if (load) lvl[0] <= fin;
  end

  for (genvar l = 1; l < LEVELS; l++) begin : g_lvl
    localparam int W = FW >> l;             // bits held by this level
    // Level l has a period of W clocks and loads at its end: the upper
    // half of level l-1 in the first half of level l-1's period, the lower
    // half in the second.
    always_ff @(posedge clk) begin
      if (rst) lvl[l] <= '0;
      else if ((cnt & LEVELS'(W - 1)) == LEVELS'(W - 1)) begin
        if (!cnt[LEVELS - l]) lvl[l] <= FW'(lvl[l-1][W +: W]);
        else                  lvl[l] <= FW'(lvl[l-1][0 +: W]);
      end
    end
  end

  // Last 2:1 stage, not re-sampled; select held at 5.12 Gb/s.
  assign sout = (rate10g && cnt[0]) ? lvl[LEVELS-1][0] : lvl[LEVELS-1][1];
endmodule
