// uplink_encoder: builds the LpGBT up-link frame once per 40 MHz frame.
//
// The user data field is scrambled first, then protected by the FEC
// computed over the scrambled bits, and finally the 2-bit header is put in
// front: frame = {header, scrambled data, FEC}, sent MSB first. Scrambling
// before coding lets the receiver correct errors before descrambling, where
// each channel error would be multiplied by three.
//
// Four modes (lpgbt_pkg::ul_mode_e), from the link table:
//   5.12 Gb/s  FEC5 : 116 data bits, 2 scramblers 58/39/58, 1 x RS GF(32), 10 FEC bits
//   5.12 Gb/s  FEC12: 102 data bits, 2 scramblers 51/40/49, 3 x RS GF(16), 24 FEC bits
//   10.24 Gb/s FEC5 : 232 data bits, 4 scramblers 58/39/58, 2 x RS GF(32), 20 FEC bits
//   10.24 Gb/s FEC12: 204 data bits, 4 scramblers 51/40/49, 6 x RS GF(16), 48 FEC bits
// Scrambler k takes data bits [k*W +: W]. The Reed-Solomon codes and the
// header value are this design's own reading of the table (see fec_encoder).
//
// At 10.24 Gb/s the table's fields add up to 254 of the 256 frame bits;
// the two spare bits follow the header and are sent as zero.
//
// Interface: data and mode are sampled when en is high; the scramblers
// update on that edge and the frame register on the next, so frame is
// valid two clocks after en and holds until the one after the next en.
// A 5.12 Gb/s frame (128 bits) is in frame[127:0] with frame[255:128] zero.
module uplink_encoder
  import lpgbt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  ul_mode_e               mode,
  input  logic [UL_DATA_MAX-1:0] data,
  output logic [UL_FRAME_10G-1:0] frame
);
  ul_mode_e mode_q;
  logic     is_10g, is_fec12;
  assign is_10g   = (mode == UL_10G_FEC5) || (mode == UL_10G_FEC12);
  assign is_fec12 = (mode == UL_5G_FEC12) || (mode == UL_10G_FEC12);

  always_ff @(posedge clk) begin
    if (rst)     mode_q <= UL_5G_FEC5;
    else if (en) mode_q <= mode;
  end

  // ---------------- scrambler banks ----------------
  logic [57:0]     s58_k [4];
  logic [50:0]     s51_k [4];
  logic [4*58-1:0] s58;
  logic [4*51-1:0] s51;
  assign s58 = {s58_k[3], s58_k[2], s58_k[1], s58_k[0]};
  assign s51 = {s51_k[3], s51_k[2], s51_k[1], s51_k[0]};
  for (genvar k = 0; k < 4; k++) begin : g_scr
    logic en_k;
    assign en_k = en && (k < 2 || is_10g);
    scrambler #(.WIDTH(58), .TAP1(39), .TAP2(58)) u_s58 (
      .clk, .rst, .en(en_k && !is_fec12), .din(data[k*58 +: 58]), .dout(s58_k[k]));
    scrambler #(.WIDTH(51), .TAP1(40), .TAP2(49)) u_s51 (
      .clk, .rst, .en(en_k && is_fec12), .din(data[k*51 +: 51]), .dout(s51_k[k]));
  end

  // ---------------- FEC over the scrambled field ----------------
  logic [9:0]  f5_5g;
  logic [23:0] f12_5g;
  logic [19:0] f5_10g;
  logic [47:0] f12_10g;
  fec_encoder #(.M(5), .I(1), .D(116)) u_f5_5g   (.data(s58[115:0]), .fec(f5_5g));
  fec_encoder #(.M(4), .I(3), .D(102)) u_f12_5g  (.data(s51[101:0]), .fec(f12_5g));
  fec_encoder #(.M(5), .I(2), .D(232)) u_f5_10g  (.data(s58),        .fec(f5_10g));
  fec_encoder #(.M(4), .I(6), .D(204)) u_f12_10g (.data(s51),        .fec(f12_10g));

  // Frame register, loaded the cycle after the scramblers.
  logic en_q;
  always_ff @(posedge clk) begin
    if (rst) en_q <= 1'b0;
    else     en_q <= en;
  end

  always_ff @(posedge clk) begin
    if (rst) frame <= '0;
    else if (en_q) case (mode_q)
      UL_5G_FEC5:   frame <= {128'b0, UL_HEADER, s58[115:0], f5_5g};
      UL_5G_FEC12:  frame <= {128'b0, UL_HEADER, s51[101:0], f12_5g};
      UL_10G_FEC5:  frame <= {UL_HEADER, 2'b00, s58, f5_10g};
      default:      frame <= {UL_HEADER, 2'b00, s51, f12_10g};
    endcase
  end
endmodule
