// tb_descrambler: feeds the descrambler with words scrambled by a bit-serial
// reference model (all three LpGBT settings) starting from a state the
// descrambler does not know, and checks that from the second word on it
// returns the original data (self-synchronisation), and that one flipped
// channel bit gives exactly three output errors.
module tb_descrambler;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [35:0] s0, q0;
  logic [57:0] s1, q1;
  logic [50:0] s2, q2;
  descrambler #(.WIDTH(36), .TAP1(25), .TAP2(36)) u0 (.clk, .rst, .en, .din(s0), .dout(q0));
  descrambler #(.WIDTH(58), .TAP1(39), .TAP2(58)) u1 (.clk, .rst, .en, .din(s1), .dout(q1));
  descrambler #(.WIDTH(51), .TAP1(40), .TAP2(49)) u2 (.clk, .rst, .en, .din(s2), .dout(q2));

  bit h0[$], h1[$], h2[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] d0; logic [57:0] d1; logic [50:0] d2;
    for (int i = 0; i < 64; i++) begin
      h0.push_back(1'($urandom)); h1.push_back(1'($urandom)); h2.push_back(1'($urandom));
    end
    s0 = '0; s1 = '0; s2 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      d0 = 36'({$urandom, $urandom}); d1 = 58'({$urandom, $urandom}); d2 = 51'({$urandom, $urandom});
      for (int i = 0; i < 36; i++) s0[i] = scr_bit(d0[i], h0, 25, 36);
      for (int i = 0; i < 58; i++) s1[i] = scr_bit(d1[i], h1, 39, 58);
      for (int i = 0; i < 51; i++) s2[i] = scr_bit(d2[i], h2, 40, 49);
      if (w == 100) s0[3] = ~s0[3];     // single channel error
      en = 1;
      @(posedge clk); #1;
      en = 0;
      if (w > 0 && w != 100 && w != 101) begin
        checks += 3;
        if (q0 !== d0) begin failures++; $display("w%0d 36-bit mismatch", w); end
        if (q1 !== d1) begin failures++; $display("w%0d 58-bit mismatch", w); end
        if (q2 !== d2) begin failures++; $display("w%0d 51-bit mismatch", w); end
      end
      if (w == 100) begin
        checks++;
        if ($countones(q0 ^ d0) != 2) begin failures++; $display("error spread %b", q0 ^ d0); end
      end
      if (w == 101) begin
        checks++;
        if ($countones(q0 ^ d0) != 1) begin failures++; $display("error spread2 %b", q0 ^ d0); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
