// tb_dl_deserializer: sends a known random bit stream and divided-clock
// pulses made by the testbench (period 2, with occasional 3-cycle periods),
// and checks every captured frame against the 64 bits the testbench sent up
// to and including the capture cycle; also checks that captures are 64 bit
// clocks apart, or 65 across a 3-cycle period.
module tb_dl_deserializer;
  logic clk = 0, rst = 1, sdin = 0, ce = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] frame;
  logic valid;
  dl_deserializer #(.FRAME(64)) dut (.clk, .rst, .sdin, .ce, .frame, .valid);

  bit sent[$];
  int cap_at[$];   // index in sent of the last bit of each expected capture

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: change inputs just after each rising edge
  initial begin
    int ph = 0, plen = 2, pulses = 0, nper = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int c = 0; c < 20000; c++) begin
      sdin = 1'($urandom);
      ce = (ph == 0);
      if (ce) begin
        if (pulses % 32 == 31) cap_at.push_back(sent.size());
        pulses++;
      end
      sent.push_back(sdin);
      @(posedge clk); #1;
      ph++;
      if (ph == plen) begin
        ph = 0; nper++;
        plen = (nper % 37 == 5) ? 3 : 2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nf = 0;
  always @(posedge clk) if (!rst && valid) begin
    logic [63:0] exp;
    int e;
    e = cap_at[nf];
    for (int i = 0; i < 64; i++) exp[i] = sent[e - i];
    checks++;
    if (frame !== exp) begin failures++; $display("frame %0d: %h exp %h", nf, frame, exp); end
    if (nf > 0) begin
      checks++;
      if (!(cap_at[nf] - cap_at[nf-1] inside {64, 65})) begin failures++; $display("spacing"); end
    end
    nf++;
  end
endmodule
