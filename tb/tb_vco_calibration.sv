// tb_vco_calibration: a behavioural VCO whose period depends on the
// capacitor code (base + 5 ps per code step; with a base of 170 ps code 5
// gives 195 ps, closest to 25 ns / 128 = 195.3 ps) and a 40 MHz reference.
// The calibration is run for several bases, as process corners would
// shift the VCO, each time from a fresh reset. Checks that
// the calibration ends with the code closest to 5.12 GHz (worked out here
// from the model), that the control voltage is held while it runs, that
// every code was tried and that the remaining count error is small.
`timescale 1ns/1ps
module tb_vco_calibration;
  logic clk_vco = 0, ref_clk = 0, rst = 1, start = 0;
  int checks = 0, failures = 0;
  logic [3:0] cap_code;
  logic vctrl_hold, busy, done;
  logic [15:0] best_err;
  vco_calibration #(.CW(4), .RATIO(128), .NREF(4)) dut (
    .clk_vco, .rst, .ref_clk, .start, .cap_code, .vctrl_hold, .busy, .done, .best_err);

  always #12.5 ref_clk = ~ref_clk;
  int base = 170;   // VCO period at code 0, ps
  always begin
    #((base + 5 * cap_code) / 2.0 * 0.001);
    clk_vco = ~clk_vco;
  end

  bit tried[16];
  int corner[6] = '{170, 150, 160, 180, 190, 120};
  always @(posedge clk_vco) if (busy) tried[cap_code] = 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real best_d, d;
    int exp_code, ntried;
    foreach (corner[k]) begin
      base = corner[k];
      best_d = 1e9; exp_code = 0;
      for (int c = 0; c < 16; c++) begin
        d = (25.0 / ((base + 5 * c) * 0.001)) - 128.0;
        if (d < 0) d = -d;
        if (d < best_d) begin best_d = d; exp_code = c; end
      end
      foreach (tried[i]) tried[i] = 0;
      rst = 1;
      repeat (5) @(posedge clk_vco);
      rst = 0;
      @(posedge clk_vco); #0.01 start = 1;
      @(posedge clk_vco); #0.01 start = 0;
      checks++;
      if (!vctrl_hold) begin failures++; $display("control voltage not held"); end
      wait (done);
      #1;
      checks++;
      if (cap_code != 4'(exp_code)) begin failures++; $display("base %0d ps: code %0d expected %0d", base, cap_code, exp_code); end
      ntried = 0;
      foreach (tried[i]) ntried += tried[i];
      checks++;
      if (ntried != 16) begin failures++; $display("tried %0d codes", ntried); end
      checks++;
      if (best_err > 4 && best_d < 0.5) begin failures++; $display("best error %0d", best_err); end
      checks++;
      if (vctrl_hold) begin failures++; $display("hold not released"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
