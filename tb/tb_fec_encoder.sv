// tb_fec_encoder: checks the interleaved FEC field for the down-link
// setting (GF(8), 4 codes, 36 data bits) and the up-link FEC12 10.24 Gb/s
// setting (GF(16), 6 codes, 204 data bits): each code, gathered from the
// frame by the testbench's own de-interleaving (symbol p -> code p mod I),
// must vanish at a and a^2.
module tb_fec_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [35:0]  dd; logic [23:0] fd;
  logic [203:0] du; logic [47:0] fu;
  fec_encoder #(.M(3), .I(4), .D(36))  ud (.data(dd), .fec(fd));
  fec_encoder #(.M(4), .I(6), .D(204)) uu (.data(du), .fec(fu));

  task automatic check(input logic [239:0] d, input logic [63:0] f, input int m, input int ni, input int k);
    for (int c = 0; c < ni; c++) begin
      int sym[$];
      sym.push_back(int'(f[c*m +: 8]) & ((1 << m) - 1));
      sym.push_back(int'(f[(ni+c)*m +: 8]) & ((1 << m) - 1));
      for (int s = 0; s < k; s++) sym.push_back(int'(d[(s*ni+c)*m +: 8]) & ((1 << m) - 1));
      checks++;
      if (geval(sym, 1, m) != 0 || geval(sym, 2, m) != 0) begin
        failures++; $display("m=%0d code %0d is not a code word", m, c);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      dd = 36'({$urandom, $urandom});
      du = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      check(240'(dd), 64'(fd), 3, 4, 3);
      check(240'(du), 64'(fu), 4, 6, 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
