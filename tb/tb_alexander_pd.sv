// tb_alexander_pd: drives random NRZ data at one bit per clock whose
// transitions fall either just after the rising edge (clock late: the
// falling-edge sample already sees the new bit, expect up) or just after
// the falling edge (clock early, expect dn). The testbench counts the
// transitions itself and checks up/dn for every bit, and the retimed data.
module tb_alexander_pd;
  logic clk = 0, rst = 1, din = 0;
  always #5 clk = ~clk;           // rising edges at 10, 20, ...; falling at 5, 15, ...
  int checks = 0, failures = 0;
  logic up, dn, data;
  alexander_pd dut (.clk, .rst, .din, .up, .dn, .data);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit late, prev, cur;
    int nup = 0, ndn = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    prev = 0;
    for (int n = 0; n < 2000; n++) begin
      late = (n < 1000);
      cur  = 1'($urandom);
      // bit n changes at 2 ns (late) or 7 ns (early) after a rising edge
      @(posedge clk);
      #(late ? 2 : 7) din = cur;
      // decision made at the rising edge after the next one
      @(posedge clk); @(negedge clk);   // up/dn registered at the second edge
      #1;
      checks++;
      if (cur != prev) begin
        if (late  && !(up && !dn)) begin failures++; $display("n%0d expected up", n); end
        if (!late && !(dn && !up)) begin failures++; $display("n%0d expected dn", n); end
        if (late) nup++; else ndn++;
      end else if (up || dn) begin
        failures++; $display("n%0d no transition but up=%b dn=%b", n, up, dn);
      end
      checks++;
      if (data !== cur) begin failures++; $display("n%0d data", n); end
      prev = cur;
    end
    checks++;
    if (nup < 100 || ndn < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
