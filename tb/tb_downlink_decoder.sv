// tb_downlink_decoder: builds down-link frames in the testbench (bit-serial
// 36/25/36 scrambler model, FEC from fec_encoder, header 1001), corrupts
// every other frame with a burst of up to 10 bits inside the protected 60
// bits, and checks that the decoder returns the original user data one
// clock after the frame, with the correction flags set as expected.
module tb_downlink_decoder;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] frame;
  logic [35:0] data, scr;
  logic [23:0] fec;
  logic valid;
  logic [3:0] corr, unc;
  fec_encoder #(.M(3), .I(4), .D(36)) enc (.data(scr), .fec(fec));
  downlink_decoder dut (.clk, .rst, .en, .frame, .data, .valid, .corrected(corr), .uncorrectable(unc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist[$];
    logic [35:0] user;
    logic [59:0] w;
    int len, st;
    for (int i = 0; i < 64; i++) hist.push_back(0);
    frame = '0; scr = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      user = 36'({$urandom, $urandom});
      for (int i = 0; i < 36; i++) scr[i] = scr_bit(user[i], hist, 25, 36);
      #1;
      w = {scr, fec};
      if (f % 2 == 1) begin
        len = $urandom_range(1, 10); st = $urandom_range(0, 60 - len);
        w[st] ^= 1'b1;
        for (int b = 1; b < len; b++) w[st + b] ^= 1'($urandom);
      end
      frame = {4'b1001, w};
      en = 1;
      @(posedge clk); #1;
      en = 0;
      checks += 3;
      if (!valid) begin failures++; $display("f%0d valid missing", f); end
      if (data !== user) begin failures++; $display("f%0d data %h exp %h", f, data, user); end
      if (unc != 0 || ((corr != 0) != (f % 2 == 1))) begin failures++; $display("f%0d flags c%b u%b", f, corr, unc); end
      @(posedge clk); #1;
      checks++;
      if (valid) begin failures++; $display("valid not a pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
