// fec_decoder: corrects a frame protected by I interleaved Reed-Solomon
// codes, the inverse of fec_encoder (same symbol interleaving, same zero
// padding of bits that are not transmitted).
//
// Each code is handed to an rs_decoder, which corrects one symbol; the
// corrected symbols are put back in place. With the down-link setting
// (M=3, I=4) any error confined to one symbol per code is corrected, which
// covers every burst of up to 10 bits and 12-bit bursts aligned to four
// symbols.
//
// Interface: purely combinational; corrected[c] / uncorrectable[c] report
// code c.
module fec_decoder #(
  parameter int M = 3,
  parameter int I = 4,
  parameter int D = 36
) (
  input  logic [D-1:0]     data_in,
  input  logic [2*I*M-1:0] fec_in,
  output logic [D-1:0]     data_out,
  output logic [I-1:0]     corrected,
  output logic [I-1:0]     uncorrectable
);
  localparam int K  = (D + I*M - 1) / (I*M);
  localparam int DP = K * I * M;

  logic [DP-1:0] dpad, dcor;
  assign dpad     = DP'(data_in);
  assign data_out = dcor[D-1:0];

  for (genvar c = 0; c < I; c++) begin : g_code
    logic [K*M-1:0] cdata, cout;
    for (genvar k = 0; k < K; k++) begin : g_sym
      assign cdata[k*M +: M]              = dpad[(k*I + c)*M +: M];
      assign dcor[(k*I + c)*M +: M]       = cout[k*M +: M];
    end
    rs_decoder #(.M(M), .K(K)) u_rs (
      .data_in      (cdata),
      .parity_in    ({fec_in[(I+c)*M +: M], fec_in[c*M +: M]}),
      .data_out     (cout),
      .corrected    (corrected[c]),
      .uncorrectable(uncorrectable[c])
    );
  end
endmodule
