// lpgbt_top: digital core of the LpGBT transceiver.
//
// Down link (2.56 Gb/s, recovered bit clock clk_dl): the line is sampled by
// the Alexander phase detector of the clock and data recovery loop, whose
// up/dn outputs go to the analog charge pump and whose retimed bit feeds
// the deserializer. The frame pre-scaler and the frame aligner slip the
// 64-bit frame boundary one bit at a time until the header is found; the
// aligned frames are corrected (four interleaved RS(5,3) codes) and
// descrambled into 36 user bits per frame.
//
// Up link (5.12 / 10.24 Gb/s, bit clock clk_ul): once per frame the
// serializer asks for a frame (ul_frame_req); the user data sampled then
// are scrambled, FEC-protected and framed, and sent on the next frame
// period through the tree serializer. Both rates keep a 40 MHz frame.
//
// E-link inputs (clk_elink): one phase_aligner per input picks the best of
// the 15 delay-line taps (the delay line itself is analog and outside).
//
// E-link transmitters (clk_etx, twice the e-link bit rate): etx_control
// turns each bit into the unit-cell controls of the analog output stage,
// with programmable current and clock-timed pre-emphasis. The number of
// transmitters (N_ETX, one by default) and the source of their data are
// left open; their bits come in on etx_din.
//
// Eye-opening monitor (clk_eom) and VCO calibration (clk_vco, ref_clk):
// the counting and search logic; comparator, phase interpolator, VCO and
// capacitor bank are analog and connect through the ports.
//
// Each clock domain has its own synchronous reset; no signal crosses
// domains inside this module except ref_clk, which vco_calibration
// synchronises. Latencies: down-link user data one bit clock after the
// frame is captured; up-link data go out starting one frame plus 255 bit
// clocks after the request.
module lpgbt_top
  import lpgbt_pkg::*;
#(
  parameter int N_ELINK = 28,
  parameter int NPH     = 15,
  parameter int N_ETX   = 1
) (
  // ---- down link ----
  input  logic                   clk_dl,
  input  logic                   rst_dl,
  input  logic                   dl_line,
  output logic [DL_DATA-1:0]     dl_data,
  output logic                   dl_valid,
  output logic                   dl_locked,
  output logic [3:0]             dl_corrected,
  output logic [3:0]             dl_uncorrectable,
  output logic [15:0]            dl_slips,
  output logic                   cdr_up,
  output logic                   cdr_dn,
  // ---- up link ----
  input  logic                   clk_ul,
  input  logic                   rst_ul,
  input  ul_mode_e               ul_mode,
  input  logic [UL_DATA_MAX-1:0] ul_data,
  output logic                   ul_frame_req,
  output logic                   ul_sout,
  // ---- e-link phase aligners ----
  input  logic                   clk_elink,
  input  logic                   rst_elink,
  input  pa_mode_e               pa_mode,
  input  logic [3:0]             pa_static_phase [N_ELINK],
  input  logic [NPH-1:0]         elink_taps      [N_ELINK],
  output logic [N_ELINK-1:0]     elink_data,
  output logic [N_ELINK-1:0]     elink_locked,
  output logic [3:0]             elink_phase     [N_ELINK],
  output logic [NPH-1:0]         elink_tap_en    [N_ELINK],
  output logic [NPH-1:0]         elink_dummy_en  [N_ELINK],
  output logic [NPH-2:0]         elink_cell_en   [N_ELINK],
  // ---- e-link transmitters ----
  input  logic                   clk_etx,
  input  logic                   rst_etx,
  input  logic [N_ETX-1:0]       etx_din,
  input  logic [2:0]             etx_drive,
  input  logic [2:0]             etx_pe_drive,
  input  logic                   etx_pe_en,
  output logic [N_ETX-1:0]       etx_bit_start,
  output etx_cells_t             etx_cells       [N_ETX],
  // ---- eye-opening monitor ----
  input  logic                   clk_eom,
  input  logic                   rst_eom,
  input  logic                   eom_start,
  input  logic [5:0]             eom_phase_in,
  input  logic [4:0]             eom_vref_in,
  input  logic [3:0]             eom_win_sel,
  input  logic                   eom_cmp,
  output logic [5:0]             eom_phase_sel,
  output logic [4:0]             eom_vref_sel,
  output logic                   eom_busy,
  output logic                   eom_done,
  output logic [15:0]            eom_count,
  // ---- VCO calibration ----
  input  logic                   clk_vco,
  input  logic                   rst_vco,
  input  logic                   ref_clk,
  input  logic                   vco_cal_start,
  output logic [3:0]             vco_cap_code,
  output logic                   vco_vctrl_hold,
  output logic                   vco_cal_busy,
  output logic                   vco_cal_done,
  output logic [15:0]            vco_best_err
);
  // ================= down link =================
  logic                dl_bit;
  logic                ps_ce, ps_ready, slip_req;
  logic [DL_FRAME-1:0] dl_frame;
  logic                dl_fvalid;

  alexander_pd u_cdr_pd (
    .clk(clk_dl), .rst(rst_dl), .din(dl_line), .up(cdr_up), .dn(cdr_dn), .data(dl_bit));

  frame_prescaler u_prescaler (
    .clk(clk_dl), .rst(rst_dl), .req(slip_req), .ce(ps_ce), .ready(ps_ready));

  dl_deserializer #(.FRAME(DL_FRAME)) u_deser (
    .clk(clk_dl), .rst(rst_dl), .sdin(dl_bit), .ce(ps_ce), .frame(dl_frame), .valid(dl_fvalid));

  dl_frame_aligner u_aligner (
    .clk(clk_dl), .rst(rst_dl), .valid(dl_fvalid), .header(dl_frame[DL_FRAME-1 -: DL_HDR]),
    .slip_ready(ps_ready), .slip_req(slip_req), .locked(dl_locked), .slips(dl_slips));

  downlink_decoder u_dl_dec (
    .clk(clk_dl), .rst(rst_dl), .en(dl_fvalid && dl_locked), .frame(dl_frame),
    .data(dl_data), .valid(dl_valid), .corrected(dl_corrected), .uncorrectable(dl_uncorrectable));

  // ================= up link =================
  logic [UL_FRAME_10G-1:0] ul_frame;
  logic                    ul_load;

  uplink_encoder u_ul_enc (
    .clk(clk_ul), .rst(rst_ul), .en(ul_load), .mode(ul_mode), .data(ul_data), .frame(ul_frame));

  serializer #(.LEVELS(8)) u_ser (
    .clk(clk_ul), .rst(rst_ul),
    .rate10g(ul_mode == UL_10G_FEC5 || ul_mode == UL_10G_FEC12),
    .frame(ul_frame), .load(ul_load), .sout(ul_sout));

  assign ul_frame_req = ul_load;

  // ================= e-link phase aligners =================
  for (genvar e = 0; e < N_ELINK; e++) begin : g_elink
    phase_aligner #(.NPH(NPH)) u_pa (
      .clk(clk_elink), .rst(rst_elink), .mode(pa_mode), .static_phase(pa_static_phase[e]),
      .taps(elink_taps[e]), .phase(elink_phase[e]), .dout(elink_data[e]),
      .locked(elink_locked[e]), .tap_en(elink_tap_en[e]), .dummy_en(elink_dummy_en[e]),
      .cell_en(elink_cell_en[e]));
  end

  // ================= e-link transmitters =================
  for (genvar t = 0; t < N_ETX; t++) begin : g_etx
    etx_control u_etx (
      .clk(clk_etx), .rst(rst_etx), .din(etx_din[t]), .drive(etx_drive),
      .pe_drive(etx_pe_drive), .pe_en(etx_pe_en), .bit_start(etx_bit_start[t]),
      .up_n_p(etx_cells[t].up_n_p), .dn_p(etx_cells[t].dn_p),
      .up_n_m(etx_cells[t].up_n_m), .dn_m(etx_cells[t].dn_m),
      .pe_up_n_p(etx_cells[t].pe_up_n_p), .pe_dn_p(etx_cells[t].pe_dn_p),
      .pe_up_n_m(etx_cells[t].pe_up_n_m), .pe_dn_m(etx_cells[t].pe_dn_m));
  end

  // ================= eye-opening monitor =================
  eom_counter u_eom (
    .clk(clk_eom), .rst(rst_eom), .start(eom_start), .phase_in(eom_phase_in),
    .vref_in(eom_vref_in), .win_sel(eom_win_sel), .cmp(eom_cmp),
    .phase_sel(eom_phase_sel), .vref_sel(eom_vref_sel), .busy(eom_busy),
    .done(eom_done), .count(eom_count));

  // ================= VCO calibration =================
  vco_calibration #(.CW(4), .RATIO(128), .NREF(4)) u_vco_cal (
    .clk_vco(clk_vco), .rst(rst_vco), .ref_clk(ref_clk), .start(vco_cal_start),
    .cap_code(vco_cap_code), .vctrl_hold(vco_vctrl_hold), .busy(vco_cal_busy),
    .done(vco_cal_done), .best_err(vco_best_err));
endmodule
