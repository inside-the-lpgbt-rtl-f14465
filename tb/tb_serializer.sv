// tb_serializer: loads random 256-bit frames at every load pulse and
// records the serial output. At 10.24 Gb/s each frame must appear MSB first
// as 256 consecutive bits, 255 clocks after its load cycle (tree delay),
// frames back to back (one frame per 256 clocks = 40 MHz). At 5.12 Gb/s
// the low 128 bits of each frame must appear with every bit lasting two
// clocks.
module tb_serializer;
  logic clk = 0, rst = 1, rate10g = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [255:0] frame;
  logic load, sout;
  serializer #(.LEVELS(8)) dut (.clk, .rst, .rate10g, .frame, .load, .sout);

  bit stream[$];
  logic [255:0] fr[$];
  int           fr_at[$];
  bit           fr_rate[$];
  int cyc = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    stream.push_back(sout);
    if (load) begin fr.push_back(frame); fr_at.push_back(cyc); fr_rate.push_back(rate10g); end
    cyc++;
  end

  initial begin
    frame = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 120; n++) begin
      if (n == 60) rate10g = 0;
      frame = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      while (!load) begin @(posedge clk); #1; end
      @(posedge clk); #1;   // hold through the load cycle
    end
    for (int i = 0; i + 1 < fr.size(); i++) begin
      automatic int st = fr_at[i] + 255;
      if (i == 0 || (i >= 58 && i <= 60)) continue;    // reset / rate switch
      if (st + 256 > stream.size()) break;
      checks++;
      if (fr_rate[i]) begin
        for (int b = 0; b < 256; b++)
          if (stream[st + b] !== fr[i][255 - b]) begin
            failures++; $display("frame %0d bit %0d wrong (10G)", i, b); break;
          end
      end else begin
        for (int b = 0; b < 256; b++)
          if (stream[st + b] !== fr[i][127 - b/2]) begin
            failures++; $display("frame %0d bit %0d wrong (5G)", i, b); break;
          end
      end
      checks++;
      if (fr_at[i+1] - fr_at[i] != 256) begin failures++; $display("load spacing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
