// tb_fec_decoder: down-link setting (four interleaved RS(5,3) codes on 36
// data + 24 FEC bits). Encodes random data, then corrupts the 60-bit
// protected field with (a) random single-bit errors, (b) bursts of up to
// 10 consecutive bits anywhere, (c) 12-bit bursts aligned to four symbols,
// and checks that the data always come back intact; then checks that clean
// frames report no correction.
module tb_fec_decoder;
  int checks = 0, failures = 0;
  logic [35:0] d, dr, dout;
  logic [23:0] f, fr;
  logic [3:0]  corr, unc;
  fec_encoder #(.M(3), .I(4), .D(36)) enc (.data(d), .fec(f));
  fec_decoder #(.M(3), .I(4), .D(36)) dut (.data_in(dr), .fec_in(fr), .data_out(dout),
                                           .corrected(corr), .uncorrectable(unc));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [59:0] w;
    int len, st;
    for (int t = 0; t < 600; t++) begin
      d = 36'({$urandom, $urandom});
      #1;
      w = {d, f};
      case (t % 4)
        0: ;
        1: w[$urandom_range(0, 59)] ^= 1'b1;
        2: begin
          len = $urandom_range(1, 10); st = $urandom_range(0, 60 - len);
          for (int b = 0; b < len; b++) w[st + b] ^= 1'($urandom) | (b == 0) | (b == len - 1);
        end
        default: begin
          st = 3 * $urandom_range(0, 16);
          for (int b = 0; b < 12; b++) w[st + b] ^= 1'($urandom);
        end
      endcase
      {dr, fr} = w;
      #1;
      checks++;
      if (dout !== d || unc != 0) begin
        failures++; $display("t%0d data %h exp %h unc %b", t, dout, d, unc);
      end
      if (t % 4 == 0) begin
        checks++;
        if (corr != 0) begin failures++; $display("t%0d clean frame flagged", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
