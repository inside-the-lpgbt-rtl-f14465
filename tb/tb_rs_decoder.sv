// tb_rs_decoder: encodes random data (rs_encoder), corrupts one symbol with
// a random non-zero error at a random position (data or parity) and checks
// that rs_decoder returns the original data with corrected set; clean words
// must pass unflagged; two symbol errors must not be reported as clean.
// Run for RS(5,3) over GF(8) and the GF(32) shortened code.
module tb_rs_decoder;
  int checks = 0, failures = 0;

  logic [8:0]   d3, r3, o3;  logic [5:0] p3, q3;  logic c3, u3;
  logic [119:0] d5, r5, o5;  logic [9:0] p5, q5;  logic c5, u5;
  rs_encoder #(.M(3), .K(3))  e3 (.data(d3), .parity(p3));
  rs_decoder #(.M(3), .K(3))  x3 (.data_in(r3), .parity_in(q3), .data_out(o3), .corrected(c3), .uncorrectable(u3));
  rs_encoder #(.M(5), .K(24)) e5 (.data(d5), .parity(p5));
  rs_decoder #(.M(5), .K(24)) x5 (.data_in(r5), .parity_in(q5), .data_out(o5), .corrected(c5), .uncorrectable(u5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, err, pos2;
    logic [14:0] cw3;
    logic [129:0] cw5;
    for (int t = 0; t < 400; t++) begin
      d3 = 9'($urandom);
      d5 = {$urandom, $urandom, $urandom, $urandom};
      #1;
      cw3 = {d3, p3};
      cw5 = {d5, p5};
      case (t % 3)
        0: ;                                              // clean
        1: begin                                          // one symbol error
          pos = $urandom_range(0, 4);  err = $urandom_range(1, 7);
          cw3[pos*3 +: 3] ^= 3'(err);
          pos = $urandom_range(0, 25); err = $urandom_range(1, 31);
          cw5[pos*5 +: 5] ^= 5'(err);
        end
        default: begin                                    // two symbol errors
          pos = $urandom_range(0, 4);  pos2 = (pos + $urandom_range(1, 4)) % 5;
          cw3[pos*3 +: 3] ^= 3'($urandom_range(1, 7));
          cw3[pos2*3 +: 3] ^= 3'($urandom_range(1, 7));
          pos = $urandom_range(0, 25); pos2 = (pos + $urandom_range(1, 25)) % 26;
          cw5[pos*5 +: 5] ^= 5'($urandom_range(1, 31));
          cw5[pos2*5 +: 5] ^= 5'($urandom_range(1, 31));
        end
      endcase
      {r3, q3} = cw3;
      {r5, q5} = cw5;
      #1;
      if (t % 3 != 2) begin
        checks += 4;
        if (o3 !== d3) begin failures++; $display("t%0d gf8 data %h exp %h", t, o3, d3); end
        if (o5 !== d5) begin failures++; $display("t%0d gf32 data wrong", t); end
        if (c3 !== (t % 3 == 1) || u3) begin failures++; $display("t%0d gf8 flags", t); end
        if (c5 !== (t % 3 == 1) || u5) begin failures++; $display("t%0d gf32 flags", t); end
      end else begin
        checks += 2;
        if (!(c3 || u3)) begin failures++; $display("t%0d gf8 double error unflagged", t); end
        if (!(c5 || u5)) begin failures++; $display("t%0d gf32 double error unflagged", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
