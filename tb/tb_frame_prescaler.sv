// tb_frame_prescaler: measures the spacing of the divided-clock pulses.
// Without requests every period is 2 bit clocks; a request gives exactly
// one 3-cycle period even when held for many periods; a second request is
// honoured only after the first was released. Then single-event upsets are
// injected by forcing one state replica of the triplicated pre-scaler to a
// wrong value for a clock: its pulse spacing must stay intact, while the
// same upsets in a second, non-triplicated instance must disturb it.
module tb_frame_prescaler;
  logic clk = 0, rst = 1, req = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ce, ready, ce1, ready1;
  frame_prescaler dut (.clk, .rst, .req, .ce, .ready);
  frame_prescaler #(.TMR(1'b0)) dut1 (.clk, .rst, .req, .ce(ce1), .ready(ready1));

  int last_ce = -1, cyc = 0, n3 = 0, n2 = 0, nbad = 0;
  int last_ce1 = -1, nbad1 = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && ce) begin
      if (last_ce >= 0) begin
        if (cyc - last_ce == 3) n3++;
        else if (cyc - last_ce == 2) n2++;
        else nbad++;
      end
      last_ce = cyc;
    end
    if (!rst && ce1) begin
      if (last_ce1 >= 0 && cyc - last_ce1 != 2) nbad1++;
      last_ce1 = cyc;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_seu = 0;
  logic [4:0] seu_v, seu_v1;   // upset values, held while forced
  initial begin
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (40) @(posedge clk); #1;
    checks++; if (n3 != 0 || nbad != 0 || n2 < 15) begin failures++; $display("idle periods n2=%0d n3=%0d bad=%0d", n2, n3, nbad); end
    // a long request: exactly one slip
    req = 1;
    repeat (40) @(posedge clk); #1;
    checks++; if (n3 != 1) begin failures++; $display("held request gave %0d slips", n3); end
    checks++; if (ready) begin failures++; $display("ready while request held"); end
    req = 0;
    repeat (2) @(posedge clk); #1;
    checks++; if (!ready) begin failures++; $display("not ready after release"); end
    // short requests, each released: one slip each
    for (int i = 0; i < 5; i++) begin
      req = 1;
      wait (!ready); #1;
      @(posedge clk); #1;
      req = 0;
      repeat (10) @(posedge clk); #1;
    end
    checks++; if (n3 != 6) begin failures++; $display("expected 6 slips, got %0d", n3); end
    checks++; if (nbad != 0) begin failures++; $display("bad periods %0d", nbad); end

    // single-event upsets: one replica (0, 1 or 2 in turn) flipped for one
    // clock, every 7..13 clocks, on top of idle running
    for (int i = 0; i < 300; i++) begin
      automatic logic [4:0] flip = 5'($urandom_range(1, 31));
      repeat ($urandom_range(7, 13)) @(posedge clk);
      #2;
      case (i % 3)
        0: begin seu_v = dut.q[0] ^ flip; force dut.q[0] = seu_v; end
        1: begin seu_v = dut.q[1] ^ flip; force dut.q[1] = seu_v; end
        default: begin seu_v = dut.q[2] ^ flip; force dut.q[2] = seu_v; end
      endcase
      seu_v1 = dut1.q[0] ^ flip;
      force dut1.q[0] = seu_v1;
      @(posedge clk); #2;
      release dut.q[0]; release dut.q[1]; release dut.q[2];
      release dut1.q[0];
      n_seu++;
    end
    repeat (10) @(posedge clk); #1;
    checks++; if (nbad != 0 || n3 != 6) begin failures++; $display("triplicated pre-scaler disturbed by upsets: bad=%0d slips=%0d", nbad, n3); end
    checks++; if (nbad1 == 0) begin failures++; $display("upsets never disturbed the single pre-scaler"); end
    $display("upsets injected=%0d, periods broken: TMR=%0d plain=%0d", n_seu, nbad, nbad1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
