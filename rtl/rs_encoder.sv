// rs_encoder: systematic Reed-Solomon encoder with two parity symbols
// (corrects one symbol), over GF(2^M), shortened to K data symbols.
//
// The code word has N = K+2 symbols: data symbol k sits at degree k+2,
// parity[M +: M] at degree 1 and parity[0 +: M] at degree 0. The parity is
// the remainder of d(x)*x^2 divided by the generator
//   g(x) = (x + a)(x + a^2) = x^2 + (a + a^2) x + a^3,
// computed by the usual division LFSR unrolled over the K symbols. With
// M=3, K=3 this is the down-link RS(5,3), a shortened RS(7,5): the two
// unused data symbols are zero. The generator roots and field polynomials
// (lpgbt_pkg::gf_poly) are this design's choice.
//
// Interface: purely combinational.
module rs_encoder
  import lpgbt_pkg::*;
#(
  parameter int M = 3,
  parameter int K = 3
) (
  input  logic [K*M-1:0] data,
  output logic [2*M-1:0] parity
);
  initial assert (K + 2 <= (1 << M) - 1);

  localparam gf_t A1 = gf_alpha_pow(1, M);
  localparam gf_t A2 = gf_alpha_pow(2, M);
  localparam gf_t G1 = A1 ^ A2;
  localparam gf_t G0 = gf_alpha_pow(3, M);

  always_comb begin
    gf_t r0, r1, fb, d;
    r0 = '0;
    r1 = '0;
    for (int k = K - 1; k >= 0; k--) begin
      d  = gf_t'(data[k*M +: M]);
      fb = d ^ r1;
      r1 = r0 ^ gf_mul(fb, G1, M);
      r0 = gf_mul(fb, G0, M);
    end
    parity = {r1[M-1:0], r0[M-1:0]};
  end
endmodule
