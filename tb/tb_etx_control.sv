// tb_etx_control: drives random bits and drive settings into etx_control
// and, every half bit, checks the cell controls against the output current
// worked out here. A cell counts +weight (pushing current out of its half)
// when driving high, -weight when driving low, nothing when disabled; a
// cell in any other state (UP_n = 0 with DOWN = 1, a short) is a failure.
// Expected: P half = +(1 + drive) units for a 1 and -(1 + drive) for a 0,
// M half the opposite, and the pre-emphasis cells add (1 + pe_drive) units
// in the same direction during the first half of a bit after a transition
// only when pre-emphasis is on. Also checks the one-clock latency from
// bit_start to the line and that bits last two clocks.
module tb_etx_control;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic din = 0, pe_en = 0, bit_start;
  logic [2:0] drive = 3'd1, pe_drive = 3'd0;
  logic [3:0] up_n_p, dn_p, up_n_m, dn_m, pe_up_n_p, pe_dn_p, pe_up_n_m, pe_dn_m;
  etx_control dut (.*);

  // signed current of a half in 0.5 mA units; sets bad on a shorted cell
  function automatic int current(input logic [3:0] up_n, input logic [3:0] dn, ref bit bad);
    int w[4] = '{1, 1, 2, 4};
    int i = 0;
    for (int c = 0; c < 4; c++) begin
      if (!up_n[c] && !dn[c]) i += w[c];
      else if (up_n[c] && dn[c]) i -= w[c];
      else if (!up_n[c] && dn[c]) bad = 1;
    end
    return i;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pulse = 0;
  initial begin
    logic prev, cur;
    logic [2:0] drv, pdrv;
    logic pe;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (bit_start); #1;
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic bit bad = 0;
      automatic int ip, im, pp, pm, exp_main, exp_pe;
      // new settings now and then, a new bit every time
      if (n % 200 == 0) begin
        drive = 3'($urandom); pe_drive = 3'($urandom); pe_en = (n / 200) % 3 != 0;
      end
      din = 1'($urandom);
      checks++;
      if (!bit_start) begin failures++; $display("bit_start lost at bit %0d", n); end
      cur = din; drv = drive; pdrv = pe_drive; pe = pe_en;
      // two halves of this bit
      for (int h = 0; h < 2; h++) begin
        @(posedge clk); #1;
        ip = current(up_n_p, dn_p, bad);
        im = current(up_n_m, dn_m, bad);
        pp = current(pe_up_n_p, pe_dn_p, bad);
        pm = current(pe_up_n_m, pe_dn_m, bad);
        exp_main = (1 + int'(drv)) * (cur ? 1 : -1);
        exp_pe   = (pe && h == 0 && cur != prev) ? (1 + int'(pdrv)) * (cur ? 1 : -1) : 0;
        if (exp_pe != 0 && pp == exp_pe) n_pulse++;
        checks++;
        if (bad || ip != exp_main || im != -exp_main || pp != exp_pe || pm != -exp_pe) begin
          failures++;
          $display("bit %0d half %0d: main %0d/%0d pe %0d/%0d expected %0d/%0d bad=%0d",
                   n, h, ip, im, pp, pm, exp_main, exp_pe, bad);
        end
      end
      prev = cur;
    end
    checks++;
    if (n_pulse < 100) begin failures++; $display("only %0d pre-emphasis pulses", n_pulse); end
    $display("pre-emphasis pulses seen: %0d", n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
