// tb_rs_encoder: checks that every word produced by rs_encoder is a code
// word, i.e. that it vanishes at a and a^2, evaluated with the testbench's
// own GF arithmetic, for the down-link code RS(5,3) over GF(8) and the two
// up-link codes (GF(16), 9 data symbols; GF(32), 24 data symbols), plus
// that the data part is unchanged (systematic code).
module tb_rs_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [8:0]   d3;  logic [5:0] p3;
  logic [35:0]  d4;  logic [7:0] p4;
  logic [119:0] d5;  logic [9:0] p5;
  rs_encoder #(.M(3), .K(3))  u3 (.data(d3), .parity(p3));
  rs_encoder #(.M(4), .K(9))  u4 (.data(d4), .parity(p4));
  rs_encoder #(.M(5), .K(24)) u5 (.data(d5), .parity(p5));

  task automatic check_cw(input logic [255:0] d, input logic [15:0] p, input int m, input int k);
    int sym[$];
    sym.push_back(int'(p[0 +: 8]) & ((1 << m) - 1));
    sym.push_back(int'(p[m +: 8]) & ((1 << m) - 1));
    for (int i = 0; i < k; i++) sym.push_back(int'(d[i*m +: 8]) & ((1 << m) - 1));
    checks++;
    if (geval(sym, 1, m) != 0 || geval(sym, 2, m) != 0) begin
      failures++;
      $display("m=%0d not a code word: parity %h", m, p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      d3 = 9'($urandom);
      d4 = 36'({$urandom, $urandom});
      d5 = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) begin d3 = '0; d4 = '0; d5 = '0; end
      #1;
      check_cw(256'(d3), 16'(p3), 3, 3);
      check_cw(256'(d4), 16'(p4), 4, 9);
      check_cw(256'(d5), 16'(p5), 5, 24);
      if (t == 0) begin
        checks++;
        if (p3 != 0 || p4 != 0 || p5 != 0) failures++;
      end
    end
    // a non-zero single data symbol must give non-zero parity
    d3 = 9'b000_000_001; #1;
    checks++;
    if (p3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
