// tb_eom_counter: feeds a comparator output that is one with a known
// pattern and checks the count over windows of 32 << win_sel clocks, the
// window length itself (busy cycles), the held phase/voltage settings and
// the clamp of the voltage index to the 31 levels.
module tb_eom_counter;
  logic clk = 0, rst = 1, start = 0, cmp = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] phase_in = 0, phase_sel;
  logic [4:0] vref_in = 0, vref_sel;
  logic [3:0] win_sel = 0;
  logic busy, done;
  logic [15:0] count;
  eom_counter dut (.clk, .rst, .start, .phase_in, .vref_in, .win_sel, .cmp,
                   .phase_sel, .vref_sel, .busy, .done, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, bcyc, win;
    bit seq[$];
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      win_sel  = 4'(t % 6);
      win      = 32 << win_sel;
      phase_in = 6'($urandom);
      vref_in  = (t == 3) ? 5'd31 : 5'($urandom_range(0, 30));
      start = 1;
      @(posedge clk); #1;
      start = 0;
      ones = 0; bcyc = 0;
      seq.delete();
      while (!done) begin
        cmp = ($urandom_range(0, 99) < 30);
        seq.push_back(cmp);
        if (busy) bcyc++;
        @(posedge clk); #1;
      end
      // the counter counts the samples taken in the window's clocks
      for (int i = 0; i < win && i < seq.size(); i++) ones += seq[i];
      checks += 4;
      if (count != 16'(ones)) begin failures++; $display("t%0d count %0d expected %0d", t, count, ones); end
      if (bcyc != win) begin failures++; $display("t%0d window %0d expected %0d", t, bcyc, win); end
      if (phase_sel != phase_in) begin failures++; $display("phase not held"); end
      if (vref_sel != ((vref_in > 30) ? 5'd30 : vref_in)) begin failures++; $display("vref %0d", vref_sel); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
