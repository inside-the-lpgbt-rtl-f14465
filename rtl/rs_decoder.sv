// rs_decoder: single-symbol-error decoder for the rs_encoder code.
//
// Computes the syndromes S1 = c(a) and S2 = c(a^2) of the received N = K+2
// symbol word. No error: both are zero. A single error of value e at degree
// j gives S1 = e*a^j and S2 = e*a^(2j), so the decoder compares S1*a^j with
// S2 for every position j of the shortened word, and at the match XORs
// e = S1*a^(-j) into that symbol. Any other syndrome is flagged
// uncorrectable and the data are passed on unchanged. Positions outside the
// shortened word (the zero symbols) are not candidates.
//
// Interface: purely combinational; data_out is the corrected data field,
// corrected/uncorrectable describe this word.
module rs_decoder
  import lpgbt_pkg::*;
#(
  parameter int M = 3,
  parameter int K = 3
) (
  input  logic [K*M-1:0] data_in,
  input  logic [2*M-1:0] parity_in,
  output logic [K*M-1:0] data_out,
  output logic           corrected,
  output logic           uncorrectable
);
  localparam int N  = K + 2;
  localparam int NF = (1 << M) - 1;   // multiplicative group order
  initial assert (N <= NF);

  // alpha powers needed: a^j, a^2j and a^-j for j < N.
  localparam gf_tbl_t AP = gf_alpha_table(M);
  function automatic gf_t apow(int e);
    return AP[e % NF];
  endfunction

  logic [N*M-1:0] cw;
  assign cw = {data_in, parity_in};   // symbol j = cw[j*M +: M], degree j

  always_comb begin
    gf_t s1, s2, sym, e;
    logic found;
    s1 = '0;
    s2 = '0;
    for (int j = 0; j < N; j++) begin
      sym = gf_t'(cw[j*M +: M]);
      s1 = s1 ^ gf_mul(sym, apow(j), M);
      s2 = s2 ^ gf_mul(sym, apow(2*j), M);
    end
    data_out      = data_in;
    e             = '0;
    found         = 1'b0;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (s1 != '0 && s2 != '0) begin
      for (int j = 0; j < N; j++) begin
        if (!found && gf_mul(s1, apow(j), M) == s2) begin
          found = 1'b1;
          e = gf_mul(s1, apow(NF - j), M);
          if (j >= 2) data_out[(j-2)*M +: M] = data_in[(j-2)*M +: M] ^ M'(e);
        end
      end
      corrected     = found;
      uncorrectable = !found;
    end else if (s1 != '0 || s2 != '0) begin
      uncorrectable = 1'b1;
    end
  end
endmodule
