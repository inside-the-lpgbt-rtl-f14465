// lpgbt_pkg: constants, types and Galois-field helpers shared by the LpGBT
// digital core.
//
// Frame sizes follow the link table of the transceiver: the down-link frame
// is 64 bits (4 header, 36 data, 24 FEC), the up-link frame is 128 bits at
// 5.12 Gb/s and 256 bits at 10.24 Gb/s with a 2-bit header and either FEC5
// or FEC12. The header patterns and the Galois-field polynomials are this
// design's own choice; the link table does not fix them.
package lpgbt_pkg;

  // ---------------- down link (2.56 Gb/s, FEC12) ----------------
  localparam int DL_FRAME = 64;
  localparam int DL_HDR   = 4;
  localparam int DL_DATA  = 36;
  localparam int DL_FEC   = 24;
  localparam logic [DL_HDR-1:0] DL_HEADER = 4'b1001;

  // ---------------- up link (5.12 / 10.24 Gb/s) ----------------
  localparam int UL_FRAME_10G = 256;
  localparam int UL_FRAME_5G  = 128;
  localparam int UL_HDR       = 2;
  localparam int UL_DATA_MAX  = 232;
  localparam logic [UL_HDR-1:0] UL_HEADER = 2'b01;

  typedef enum logic [1:0] {
    UL_5G_FEC5   = 2'd0,
    UL_5G_FEC12  = 2'd1,
    UL_10G_FEC5  = 2'd2,
    UL_10G_FEC12 = 2'd3
  } ul_mode_e;

  // Data bits carried in each up-link mode (link table).
  function automatic int ul_data_bits(ul_mode_e m);
    case (m)
      UL_5G_FEC5:   return 116;
      UL_5G_FEC12:  return 102;
      UL_10G_FEC5:  return 232;
      default:      return 204;
    endcase
  endfunction

  // ---------------- e-link phase aligner ----------------
  typedef enum logic [1:0] {
    PA_AUTO   = 2'd0,   // automatic phase tracking
    PA_TRAIN  = 2'd1,   // training, then learned static phase
    PA_STATIC = 2'd2    // phase given by the user
  } pa_mode_e;

  // ---------------- e-link transmitter ----------------
  // UP_n / DOWN controls of the 1x, 1x, 2x, 4x unit cells of one eTx
  typedef struct packed {
    logic [3:0] up_n_p, dn_p, up_n_m, dn_m;           // main cells, P and M halves
    logic [3:0] pe_up_n_p, pe_dn_p, pe_up_n_m, pe_dn_m; // pre-emphasis cells
  } etx_cells_t;

  // ---------------- GF(2^m) arithmetic ----------------
  localparam int GF_MAXM = 8;
  typedef logic [GF_MAXM-1:0] gf_t;

  // Primitive polynomials (with the x^m term) for m = 3, 4, 5.
  function automatic logic [GF_MAXM:0] gf_poly(int m);
    case (m)
      3:       return 9'b000001011;   // x^3 + x + 1
      4:       return 9'b000010011;   // x^4 + x + 1
      5:       return 9'b000100101;   // x^5 + x^2 + 1
      default: return 9'b100011101;   // x^8 + x^4 + x^3 + x^2 + 1
    endcase
  endfunction

  // Shift-and-add multiply with reduction modulo the primitive polynomial.
  function automatic gf_t gf_mul(gf_t a, gf_t b, int m);
    logic [GF_MAXM:0] acc;
    logic [GF_MAXM:0] aa;
    logic [GF_MAXM:0] p;
    p   = gf_poly(m);
    acc = '0;
    aa  = {1'b0, a};
    for (int i = 0; i < GF_MAXM; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ aa;
        aa = aa << 1;
        if (aa[m]) aa = aa ^ p;
      end
    end
    return acc[GF_MAXM-1:0];
  endfunction

  // alpha^e, alpha being the root of the primitive polynomial (alpha = x).
  function automatic gf_t gf_alpha_pow(int e, int m);
    gf_t r;
    r = gf_t'(1);
    for (int i = 0; i < 255; i++)
      if (i < e) r = gf_mul(r, gf_t'(2), m);
    return r;
  endfunction

  // Table of alpha^e for e = 0..254, used as a constant by the codecs.
  typedef gf_t gf_tbl_t [256];
  function automatic gf_tbl_t gf_alpha_table(int m);
    gf_tbl_t t;
    gf_t r;
    r = gf_t'(1);
    for (int i = 0; i < 256; i++) begin
      t[i] = r;
      r = gf_mul(r, gf_t'(2), m);
    end
    return t;
  endfunction

endpackage
