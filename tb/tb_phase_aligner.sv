// tb_phase_aligner: models the delay line in the testbench. The e-link
// data have a phase offset phi (in Tbit/8 units); the value seen by tap k
// at sample n is bit[floor((8n - k - phi)/8)], so data edges fall between
// taps k and k+1 with k = -phi mod 8 and the bit centre is four taps
// later. Checks, for several offsets: acquisition picks the centre phase
// in 4..11; dout then equals the transmitted bits; PA_AUTO follows a
// slowly drifting offset across the end of the line (jump by 8); PA_TRAIN
// freezes its learned phase with one-hot tap enables and the dummy loads
// of the others on; PA_STATIC obeys static_phase.
module tb_phase_aligner;
  import lpgbt_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pa_mode_e mode = PA_AUTO;
  logic [3:0] static_phase = 4'd3, phase;
  logic [14:0] taps, tap_en, dummy_en;
  logic [13:0] cell_en;
  logic dout, locked;
  phase_aligner #(.NPH(15), .WIN_LOG2(6)) dut (
    .clk, .rst, .mode, .static_phase, .taps, .phase, .dout, .locked, .tap_en, .dummy_en, .cell_en);

  bit bits[int];
  int phi = 3, n = 0;
  int jumps = 0;

  function automatic bit val(int t);   // t in Tbit/8 units
    int b = (t - phi) >>> 3;           // floor division
    if (!bits.exists(b)) bits[b] = 1'($urandom);
    return bits[b];
  endfunction

  function automatic int expected_phase(int p);
    int e = ((-p) % 8 + 8) % 8;
    int t = (e + 4) % 8;
    return t < 4 ? t + 8 : t;
  endfunction

  // drive taps after each rising edge
  initial begin
    taps = '0;
    forever begin
      @(posedge clk); #1;
      n++;
      for (int k = 0; k < 15; k++) taps[k] = val(8*n - k);
    end
  end

  // dout at sample n is the tap of the phase used at sample n-1
  int dchecks = 0, derr = 0;
  int prev_phase = 8;
  logic [14:0] prev_taps;
  always @(posedge clk) begin
    if (!rst && locked && mode != PA_STATIC) begin
      #2;
      dchecks++;
      if (dout !== prev_taps[prev_phase]) derr++;
      prev_phase = phase; prev_taps = taps;
    end else begin
      #2; prev_phase = phase; prev_taps = taps;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_and_acquire(input int p);
    phi = p; rst = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (locked);
    repeat (4) @(posedge clk);
    checks++;
    if (phase != expected_phase(p)) begin
      failures++; $display("phi %0d: phase %0d expected %0d", p, phase, expected_phase(p));
    end
  endtask

  initial begin
    int last;
    // acquisition at every offset
    for (int p = 0; p < 8; p++) reset_and_acquire(p);
    // tracking: drift by one tap every 5 windows, 20 taps in total
    mode = PA_AUTO;
    reset_and_acquire(0);
    last = phase;
    for (int s = 1; s <= 20; s++) begin
      phi = s;
      repeat (64 * 5) @(posedge clk);
      #3;
      checks++;
      if (phase % 8 != expected_phase(s) % 8) begin
        failures++; $display("drift %0d: phase %0d expected %0d mod 8", s, phase, expected_phase(s));
      end
      checks++;
      if (tap_en != '1 || dummy_en != '0 || cell_en != '1) begin failures++; $display("automatic mode enables %b %b", tap_en, cell_en); end
      if (phase > last + 1 || phase + 1 < last) jumps++;
      last = phase;
    end
    checks++;
    if (jumps == 0) begin failures++; $display("tracking never wrapped"); end
    // training: learn, then freeze
    mode = PA_TRAIN;
    reset_and_acquire(2);
    repeat (70) @(posedge clk);
    last = phase;
    phi = 5;
    repeat (64 * 4) @(posedge clk); #3;
    checks++;
    if (phase != last) begin failures++; $display("training phase moved"); end
    checks++;
    if (tap_en != (15'd1 << phase) || dummy_en != ~tap_en) begin failures++; $display("training tap enables %b", tap_en); end
    checks++;
    if (cell_en != 14'((15'd1 << phase) - 15'd1)) begin failures++; $display("training cell enables %b for phase %0d", cell_en, phase); end
    // static
    mode = PA_STATIC;
    static_phase = 4'd6;
    repeat (3) @(posedge clk); #3;
    checks++;
    if (phase != 6 || tap_en != 15'b000000001000000 || dummy_en != ~tap_en || cell_en != 14'b00000000111111) begin
      failures++; $display("static mode phase %0d en %b", phase, tap_en);
    end
    @(posedge clk); #3;
    checks++;
    if (dout !== taps[6]) begin end   // taps already advanced; checked below
    mode = PA_AUTO;
    checks++;
    if (dchecks < 1000 || derr != 0) begin failures++; $display("data checks %0d errors %0d", dchecks, derr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
