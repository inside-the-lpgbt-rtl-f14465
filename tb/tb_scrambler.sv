// tb_scrambler: checks the parallel scrambler, in its three LpGBT settings
// (36/25/36, 58/39/58, 51/40/49), against a bit-serial model of the
// recursion S_i = D_i xnor S_(i-T1) xnor S_(i-T2), word after word on random
// data. Also checks the one-cycle latency.
module tb_scrambler;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [35:0] d0, q0;
  logic [57:0] d1, q1;
  logic [50:0] d2, q2;
  scrambler #(.WIDTH(36), .TAP1(25), .TAP2(36)) u0 (.clk, .rst, .en, .din(d0), .dout(q0));
  scrambler #(.WIDTH(58), .TAP1(39), .TAP2(58)) u1 (.clk, .rst, .en, .din(d1), .dout(q1));
  scrambler #(.WIDTH(51), .TAP1(40), .TAP2(49)) u2 (.clk, .rst, .en, .din(d2), .dout(q2));

  bit h0[$], h1[$], h2[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] e0; logic [57:0] e1; logic [50:0] e2;
    for (int i = 0; i < 64; i++) begin h0.push_back(0); h1.push_back(0); h2.push_back(0); end
    d0 = '0; d1 = '0; d2 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      d0 = 36'({$urandom, $urandom}); d1 = 58'({$urandom, $urandom}); d2 = 51'({$urandom, $urandom});
      if (w % 7 == 3) begin d0 = '0; d1 = '1; d2 = '0; end
      for (int i = 0; i < 36; i++) e0[i] = scr_bit(d0[i], h0, 25, 36);
      for (int i = 0; i < 58; i++) e1[i] = scr_bit(d1[i], h1, 39, 58);
      for (int i = 0; i < 51; i++) e2[i] = scr_bit(d2[i], h2, 40, 49);
      en = 1;
      @(posedge clk); #1;
      en = 0;
      checks += 3;
      if (q0 !== e0) begin failures++; $display("w%0d 36-bit mismatch %h %h", w, q0, e0); end
      if (q1 !== e1) begin failures++; $display("w%0d 58-bit mismatch", w); end
      if (q2 !== e2) begin failures++; $display("w%0d 51-bit mismatch", w); end
      // holds when en is low
      @(posedge clk); #1;
      checks++;
      if (q0 !== e0) begin failures++; $display("w%0d not held", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
