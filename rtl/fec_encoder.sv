// fec_encoder: FEC field of a frame built from I interleaved Reed-Solomon
// codes (rs_encoder, two parity symbols each) over GF(2^M).
//
// The data field is cut into M-bit symbols; symbol p = data[p*M +: M] goes
// to code p % I as its data symbol p / I. Consecutive symbols thus belong to
// different codes, so a burst that touches at most I neighbouring symbols
// costs each code one symbol and is corrected. The FEC field holds symbol
// q = fec[q*M +: M] = parity symbol q / I of code q % I. When D is not a
// multiple of I*M, the missing bits are zero and are not transmitted.
// Down link: M=3, I=4, D=36 (four RS(5,3) codes, 24 FEC bits). Up link,
// this design's reading of the link table: FEC5 M=5 with I=1 (D=116) or
// I=2 (D=232); FEC12 M=4 with I=3 (D=102) or I=6 (D=204).
//
// Interface: purely combinational.
module fec_encoder #(
  parameter int M = 3,
  parameter int I = 4,
  parameter int D = 36
) (
  input  logic [D-1:0]     data,
  output logic [2*I*M-1:0] fec
);
  localparam int K  = (D + I*M - 1) / (I*M);   // data symbols per code
  localparam int DP = K * I * M;               // padded data width

  logic [DP-1:0] dpad;
  assign dpad = DP'(data);

  for (genvar c = 0; c < I; c++) begin : g_code
    logic [K*M-1:0] cdata;
    logic [2*M-1:0] cpar;
    for (genvar k = 0; k < K; k++) begin : g_sym
      assign cdata[k*M +: M] = dpad[(k*I + c)*M +: M];
    end
    rs_encoder #(.M(M), .K(K)) u_rs (.data(cdata), .parity(cpar));
    assign fec[c*M +: M]     = cpar[0 +: M];
    assign fec[(I+c)*M +: M] = cpar[M +: M];
  end
endmodule
