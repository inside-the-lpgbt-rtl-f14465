// tb_uplink_encoder: runs each of the four up-link modes from reset with
// random data and checks every frame against the testbench's own model:
// header and spare bits, the data field scrambled bit-serially
// (58/39/58 or 51/40/49, one model per scrambler), the zero upper half at
// 5.12 Gb/s, and that each interleaved Reed-Solomon code of the FEC field
// vanishes at a and a^2. Also checks the two-clock latency.
module tb_uplink_encoder;
  import lpgbt_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  ul_mode_e mode;
  logic [231:0] data;
  logic [255:0] frame;
  uplink_encoder dut (.clk, .rst, .en, .mode, .data, .frame);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [4][$];
    int w, t1, t2, nd, nscr, m, ni, k, nfec, fl;
    logic [255:0] exp_hi;
    logic [231:0] scr;
    logic [63:0]  fec;
    for (int mi = 0; mi < 4; mi++) begin
      mode = ul_mode_e'(mi);
      fl   = (mi >= 2) ? 256 : 128;
      nd   = (mi == 0) ? 116 : (mi == 1) ? 102 : (mi == 2) ? 232 : 204;
      w    = (mi % 2 == 0) ? 58 : 51;
      t1   = (mi % 2 == 0) ? 39 : 40;
      t2   = (mi % 2 == 0) ? 58 : 49;
      m    = (mi % 2 == 0) ? 5 : 4;
      ni   = (mi == 0) ? 1 : (mi == 1) ? 3 : (mi == 2) ? 2 : 6;
      nfec = 2 * ni * m;
      k    = (nd + ni*m - 1) / (ni*m);
      nscr = nd / w;
      for (int s = 0; s < 4; s++) begin
        hist[s].delete();
        for (int i = 0; i < 64; i++) hist[s].push_back(0);
      end
      rst = 1; en = 0;
      repeat (2) @(posedge clk); #1;
      rst = 0;
      for (int f = 0; f < 40; f++) begin
        data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        scr = '0;
        for (int s = 0; s < nscr; s++)
          for (int i = 0; i < w; i++) scr[s*w + i] = scr_bit(data[s*w + i], hist[s], t1, t2);
        en = 1;
        @(posedge clk); #1;
        en = 0;
        @(posedge clk); #1;
        // header, spare bits and upper half
        checks++;
        if (frame[fl-1 -: 2] !== 2'b01) begin failures++; $display("m%0d f%0d header %b", mi, f, frame[fl-1 -: 2]); end
        checks++;
        if (fl == 256 && frame[253:252] !== 2'b00) begin failures++; $display("spare bits"); end
        if (fl == 128) begin
          checks++;
          if (frame[255:128] !== '0) begin failures++; $display("upper half not zero"); end
        end
        // data field
        checks++;
        for (int i = 0; i < nd; i++)
          if (frame[nfec + i] !== scr[i]) begin
            failures++; $display("m%0d f%0d data bit %0d", mi, f, i); break;
          end
        // FEC codes
        for (int b = 0; b < 64; b++) fec[b] = (b < nfec) ? frame[b] : 1'b0;
        for (int c = 0; c < ni; c++) begin
          automatic int sym[$];
          sym.push_back(int'(fec[c*m +: 8]) & ((1 << m) - 1));
          sym.push_back(int'(fec[(ni+c)*m +: 8]) & ((1 << m) - 1));
          for (int s = 0; s < k; s++) begin
            automatic int v = 0;
            for (int b = 0; b < m; b++) begin
              automatic int bi = (s*ni + c)*m + b;
              if (bi < nd && scr[bi]) v |= (1 << b);
            end
            sym.push_back(v);
          end
          checks++;
          if (geval(sym, 1, m) != 0 || geval(sym, 2, m) != 0) begin
            failures++; $display("m%0d f%0d code %0d not a code word", mi, f, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
