// tb_dl_frame_aligner: a down-link receive chain of frame_prescaler,
// dl_deserializer and dl_frame_aligner fed with a stream of 64-bit frames
// (header 1001, random body) that starts at a random bit offset. Checks
// that the aligner slips until it locks, that every frame after lock is
// exactly a transmitted frame, and that corrupting UNLOCK_N consecutive
// headers makes it drop lock and lock again.
module tb_dl_frame_aligner;
  logic clk = 0, rst = 1, sdin = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ce, ready, slip_req, locked, valid;
  logic [63:0] frame;
  logic [15:0] slips;
  frame_prescaler  u_ps (.clk, .rst, .req(slip_req), .ce, .ready);
  dl_deserializer  u_ds (.clk, .rst, .sdin, .ce, .frame, .valid);
  dl_frame_aligner #(.LOCK_N(8), .UNLOCK_N(4)) dut (
    .clk, .rst, .valid, .header(frame[63:60]), .slip_ready(ready), .slip_req, .locked, .slips);

  logic [63:0] txq[$];
  bit corrupt = 0;
  int unlocks = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter
  initial begin
    logic [63:0] f;
    int off;
    off = $urandom_range(1, 63);
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < off; i++) begin sdin = 1'($urandom); @(posedge clk); #1; end
    forever begin
      f = {4'b1001, 28'($urandom), 32'($urandom)};
      // make the wrong alignments unlikely to look like headers for long
      if (corrupt) f[63:60] = 4'b0110;
      txq.push_back(f);
      for (int b = 63; b >= 0; b--) begin sdin = f[b]; @(posedge clk); #1; end
    end
  end

  // checker: after lock every frame must be a transmitted one
  int good = 0;
  logic was_locked = 0;
  always @(posedge clk) begin
    if (!rst && valid && locked && !corrupt) begin
      automatic bit hit = 0;
      foreach (txq[i]) if (txq[i] == frame) hit = 1;
      checks++;
      if (!hit) begin failures++; $display("locked frame %h not transmitted", frame); end
      else good++;
    end
    if (was_locked && !locked) unlocks++;
    was_locked <= locked;
    if (txq.size() > 8) void'(txq.pop_front());
  end

  initial begin
    wait (locked);
    $display("locked after %0d slips", slips);
    repeat (64 * 50) @(posedge clk);
    corrupt = 1;
    repeat (64 * 8) @(posedge clk);
    corrupt = 0;
    wait (locked);
    repeat (64 * 50) @(posedge clk);
    checks++; if (unlocks != 1) begin failures++; $display("unlocks %0d", unlocks); end
    checks++; if (slips == 0) begin failures++; $display("no slip seen"); end
    checks++; if (good < 80) begin failures++; $display("only %0d good frames", good); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
