// etx_control: digital control of one e-link transmitter (eTx) output stage.
//
// The eTx output stage is pseudo-differential: a P half drives the data and
// an M half drives its complement, each built from unit cells of weight
// 1x, 1x, 2x and 4x (0.5 mA per 1x). A cell drives high with UP_n = 0,
// DOWN = 0, drives low with UP_n = 1, DOWN = 1, and is disabled with
// UP_n = 1, DOWN = 0. The first 1x cell is always on and drive[2:0]
// switches in the 1x, 2x and 4x cells, so the current is
// 0.5 mA x (1 + drive): 1 mA at drive = 1, 2 mA at 3, 4 mA at 7, which is
// the 1 to 4 mA range in 0.5 mA steps of the LpGBT eTx. A second set of
// cells with the same weights, set by pe_drive, adds the pre-emphasis
// current: in clock-timed mode it is switched on for the first half of
// every bit that follows a transition, in the direction of the new bit,
// and disabled otherwise. The cell weights, the 0.5 mA unit, the disable
// code and the Tbit/2 clock-timed pulse follow the eTx description; which
// cell each drive bit switches is this design's reading of the drive
// strength table. The self-timed (120 ps to 960 ps) and externally timed
// pulse widths are set by analog delays and are not part of this block.
//
// Interface and timing: clk runs at twice the bit rate (one clock per half
// bit). din is taken on the clock where bit_start is high, every second
// clock. The cell controls are decoded from registers loaded on that clock
// (and from the static drive settings), so the bit appears on the line one
// clock later and lasts two clocks; a pre-emphasis pulse covers the first
// of the two.
module etx_control (
  input  logic       clk,
  input  logic       rst,
  input  logic       din,
  input  logic [2:0] drive,      // main current 0.5 mA x (1 + drive)
  input  logic [2:0] pe_drive,   // pre-emphasis current 0.5 mA x (1 + pe_drive)
  input  logic       pe_en,      // clock-timed pre-emphasis on
  output logic       bit_start,  // din is taken in this clock
  output logic [3:0] up_n_p,     // main cells, P half
  output logic [3:0] dn_p,
  output logic [3:0] up_n_m,     // main cells, M half
  output logic [3:0] dn_m,
  output logic [3:0] pe_up_n_p,  // pre-emphasis cells, P half
  output logic [3:0] pe_dn_p,
  output logic [3:0] pe_up_n_m,  // pre-emphasis cells, M half
  output logic [3:0] pe_dn_m
);
  logic half;      // 0: first half of a bit is next
  logic bit_q;     // bit being sent
  logic pulse;     // pre-emphasis pulse for the half bit being sent

  assign bit_start = ~half;

  // cell enables from a drive code: cell 0 always, cells 1..3 = 1x, 2x, 4x
  function automatic logic [3:0] cells(input logic [2:0] code);
    return {code, 1'b1};
  endfunction

  // per-cell controls: enabled cells drive v, disabled cells float
  function automatic logic [7:0] ctl(input logic [3:0] en, input logic v);
    logic [3:0] up_n, dn;
    for (int c = 0; c < 4; c++) begin
      up_n[c] = en[c] ? ~v : 1'b1;
      dn[c]   = en[c] ? ~v : 1'b0;
    end
    return {up_n, dn};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      half  <= 1'b0;
      bit_q <= 1'b0;
      pulse <= 1'b0;
    end else begin
      half <= ~half;
      if (!half) begin
        pulse <= pe_en && (din != bit_q);
        bit_q <= din;
      end else begin
        pulse <= 1'b0;
      end
    end
  end

  // outputs registered from the state above
  logic [3:0] en_main, en_pe;
  assign en_main = cells(drive);
  assign en_pe   = pulse ? cells(pe_drive) : 4'b0000;

  always_comb begin
    {up_n_p, dn_p}       = ctl(en_main, bit_q);
    {up_n_m, dn_m}       = ctl(en_main, ~bit_q);
    {pe_up_n_p, pe_dn_p} = ctl(en_pe, bit_q);
    {pe_up_n_m, pe_dn_m} = ctl(en_pe, ~bit_q);
  end
endmodule
