// tb_lpgbt_top: end-to-end test of the LpGBT digital core at its default
// size (28 e-link phase aligners).
//
// Down link: the testbench transmits 64-bit frames (header 1001, user data
// scrambled by a bit-serial model, FEC from fec_encoder) starting at a
// random bit offset. The line changes 2 ns after the recovered clock edge
// in the first half of the test (clock late) and 7 ns after it in the
// second (clock early). Checks that the core slips to the frame boundary,
// locks, corrects injected bursts, flags double-symbol errors, drops and
// regains lock when headers are corrupted, returns the user data at the
// same latency for every frame of a lock, and
// that the phase detector signals both up and down.
// Up link: all four modes in turn; the line is cut into frames at the
// known latency, descrambled and checked by the testbench's own models
// (header, data, each Reed-Solomon code), at one frame per 256 bit clocks.
// E-links: each input gets its own phase offset; every aligner must lock
// on the centre tap and pass the data; training mode must then freeze
// the phases with one tap output and only the cells before it enabled. EOM: one measurement window is
// counted. eTx: bits and pre-emphasis pulses reach the output cells.
// VCO: a behavioural oscillator is calibrated to the code
// nearest 5.12 GHz.
// Every mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_lpgbt_top;
  import lpgbt_pkg::*;
  import tb_ref_pkg::*;

  localparam int NE = 28;
  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  logic clk_dl = 0, clk_ul = 0, clk_elink = 0, clk_eom = 0, clk_vco = 0, ref_clk = 0;
  always #5    clk_dl    = ~clk_dl;
  always #2    clk_ul    = ~clk_ul;
  always #5    clk_elink = ~clk_elink;
  always #5    clk_eom   = ~clk_eom;
  always #12.5 ref_clk   = ~ref_clk;
  logic rst_dl = 1, rst_ul = 1, rst_elink = 1, rst_eom = 1, rst_vco = 1;

  // ---------------- DUT ----------------
  logic dl_line = 0;
  logic [35:0] dl_data;
  logic dl_valid, dl_locked, cdr_up, cdr_dn;
  logic [3:0] dl_corrected, dl_uncorrectable;
  logic [15:0] dl_slips;
  ul_mode_e ul_mode = UL_10G_FEC5;
  logic [231:0] ul_data = '0;
  logic ul_frame_req, ul_sout;
  pa_mode_e pa_mode = PA_AUTO;
  logic [3:0]  pa_static_phase [NE];
  logic [14:0] elink_taps [NE];
  logic [NE-1:0] elink_data, elink_locked;
  logic [3:0]  elink_phase [NE];
  logic [14:0] elink_tap_en [NE], elink_dummy_en [NE];
  logic [13:0] elink_cell_en [NE];
  logic eom_start = 0, eom_cmp = 0;
  logic [5:0] eom_phase_in = 6'd17, eom_phase_sel;
  logic [4:0] eom_vref_in = 5'd9, eom_vref_sel;
  logic [3:0] eom_win_sel = 4'd1;
  logic eom_busy, eom_done;
  logic [15:0] eom_count;
  logic vco_cal_start = 0;
  logic [3:0] vco_cap_code;
  logic vco_vctrl_hold, vco_cal_busy, vco_cal_done;
  logic [15:0] vco_best_err;

  lpgbt_top dut (.*);

  initial for (int e = 0; e < NE; e++) pa_static_phase[e] = 4'd0;

  // ---------------- mechanism counters ----------------
  int n_slip = 0, n_lock = 0, n_unlock = 0, n_corr = 0, n_double_flag = 0, n_up = 0, n_dn = 0;
  int n_dl_ok = 0, n_dl_bad = 0;
  int n_ul_mode [4] = '{0, 0, 0, 0};
  int n_pa_ok = 0, n_pa_train = 0, n_eom = 0, n_vco = 0;

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // =====================================================================
  // down link
  // =====================================================================
  logic [35:0] tx_scr;
  logic [23:0] tx_fec;
  fec_encoder #(.M(3), .I(4), .D(36)) tb_enc (.data(tx_scr), .fec(tx_fec));

  logic [35:0] sent_user [$];
  int          sent_end  [$];      // clock count at which the frame's last bit is on the line
  int          dl_cyc = 0;
  int          lock_lat = -1, n_lat_ok = 0, n_lat_bad = 0;
  bit corrupt_hdr = 0, late_clock = 1;
  int inject = 0;          // 1: burst, 2: double symbol error in code 0
  int allow_bad = 0;
  bit dl_done = 0;

  initial begin
    bit hist[$];
    logic [35:0] user;
    logic [63:0] f;
    logic [59:0] w;
    int off, len, st;
    for (int i = 0; i < 64; i++) hist.push_back(0);
    tx_scr = '0;
    repeat (3) @(posedge clk_dl);
    rst_dl = 0;
    off = $urandom_range(5, 60);
    for (int i = 0; i < off; i++) begin
      @(posedge clk_dl); #(late_clock ? 2 : 7) dl_line = 1'($urandom);
    end
    for (int fr = 0; fr < 700; fr++) begin
      late_clock = (fr < 350);
      user = 36'({$urandom, $urandom});
      for (int i = 0; i < 36; i++) tx_scr[i] = scr_bit(user[i], hist, 25, 36);
      #0.1;
      w = {tx_scr, tx_fec};
      inject = 0;
      if (dl_locked && fr % 5 == 2) begin
        inject = 1;
        len = $urandom_range(1, 10); st = $urandom_range(0, 60 - len);
        w[st] ^= 1'b1;
        for (int b = 1; b < len; b++) w[st + b] ^= 1'($urandom);
      end else if (dl_locked && fr % 97 == 50) begin
        inject = 2;                        // data symbols 0 and 4 both belong to code 0
        w[24 + 0*3 +: 3] ^= 3'b101;
        w[24 + 4*3 +: 3] ^= 3'b011;
        allow_bad += 2;                    // this frame and the next descramble wrongly
      end
      f = {corrupt_hdr ? 4'b0110 : 4'b1001, w};
      sent_user.push_back(user);
      sent_end.push_back(dl_cyc + 64);
      if (sent_user.size() > 6) begin void'(sent_user.pop_front()); void'(sent_end.pop_front()); end
      for (int b = 63; b >= 0; b--) begin
        @(posedge clk_dl); #(late_clock ? 2 : 7) dl_line = f[b];
      end
    end
    dl_done = 1;
  end

  // header corruption once, after a stable lock
  initial begin
    wait (dl_locked);
    repeat (64 * 120) @(posedge clk_dl);
    corrupt_hdr = 1;
    repeat (64 * 6) @(posedge clk_dl);
    corrupt_hdr = 0;
  end

  logic was_locked = 0;
  always @(posedge clk_dl) dl_cyc <= dl_cyc + 1;
  always @(posedge clk_dl) begin
    if (!rst_dl) begin
      if (dl_locked && !was_locked) begin n_lock++; allow_bad++; lock_lat = -1; end
      if (!dl_locked && was_locked) n_unlock++;
      was_locked <= dl_locked;
      if (cdr_up) n_up++;
      if (cdr_dn) n_dn++;
      if (dl_valid) begin
        automatic bit hit = 0;
        automatic int lat = 0;
        foreach (sent_user[i]) if (sent_user[i] == dl_data) begin hit = 1; lat = dl_cyc - sent_end[i]; end
        if (hit) n_dl_ok++; else n_dl_bad++;
        // fixed latency: within one lock every frame takes the same time
        if (hit && lock_lat < 0) lock_lat = lat;
        else if (hit && lat == lock_lat) n_lat_ok++;
        else if (hit) begin n_lat_bad++; $display("down-link latency %0d, %0d before", lat, lock_lat); end
        if (dl_corrected != 0) n_corr++;
        if (dl_uncorrectable != 0) n_double_flag++;
      end
    end
  end

  // =====================================================================
  // up link
  // =====================================================================
  bit ul_stream[$];
  int ul_cyc = 0;
  typedef struct { int at; logic [231:0] data; ul_mode_e mode; bit skip; } ul_rec_t;
  ul_rec_t ul_q[$];
  bit ul_done = 0;

  event ul_req_seen;
  always @(posedge clk_ul) if (!rst_ul) begin
    ul_stream.push_back(ul_sout);
    if (ul_frame_req) begin
      ul_rec_t r;
      r.at = ul_cyc; r.data = ul_data; r.mode = ul_mode; r.skip = 0;
      ul_q.push_back(r);
      -> ul_req_seen;
    end
    ul_cyc++;
  end

  initial begin
    ul_mode_e seq [4] = '{UL_10G_FEC5, UL_10G_FEC12, UL_5G_FEC5, UL_5G_FEC12};
    repeat (3) @(posedge clk_ul);
    rst_ul = 0;
    for (int m = 0; m < 4; m++) begin
      for (int k = 0; k < 30; k++) begin
        @(ul_req_seen);
        ul_q[ul_q.size() - 1].skip = (k < 2) || (k >= 27);
        #0.5;
        ul_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        if (k == 29 && m < 3) ul_mode = seq[m + 1];
      end
    end
    repeat (600) @(posedge clk_ul);
    ul_done = 1;
  end

  // checker run at the end on the recorded line
  task automatic check_uplink();
    bit prev_scr [4][$];
    for (int q = 0; q + 1 < ul_q.size(); q++) begin
      int st, fl, nd, w, t1, t2, m, ni, k, nfec, nscr, mi;
      logic [255:0] fr;
      logic [231:0] scr, dd;
      mi   = int'(ul_q[q].mode);
      st   = ul_q[q + 1].at + 255;          // sent in the next period, after the tree delay
      fl   = (mi >= 2) ? 256 : 128;
      nd   = ul_data_bits(ul_q[q].mode);
      w    = (mi % 2 == 0) ? 58 : 51;
      t1   = (mi % 2 == 0) ? 39 : 40;
      t2   = (mi % 2 == 0) ? 58 : 49;
      m    = (mi % 2 == 0) ? 5 : 4;
      ni   = (mi == 0) ? 1 : (mi == 1) ? 3 : (mi == 2) ? 2 : 6;
      nfec = 2 * ni * m;
      k    = (nd + ni*m - 1) / (ni*m);
      nscr = nd / w;
      if (st + 256 > ul_stream.size()) break;
      fr = '0;
      for (int b = 0; b < fl; b++) fr[fl - 1 - b] = ul_stream[st + ((fl == 256) ? b : 2*b)];
      for (int b = 0; b < nd; b++) scr[b] = fr[nfec + b];
      if (ul_q[q].skip) begin
        for (int s = 0; s < 4; s++) prev_scr[s].delete();
        continue;
      end
      checks++;
      if (fr[fl-1 -: 2] != 2'b01) begin failures++; $display("uplink frame %0d header %b", q, fr[fl-1 -: 2]); continue; end
      // FEC codes
      for (int c = 0; c < ni; c++) begin
        automatic int sym[$];
        sym.push_back(int'(fr[c*m +: 8]) & ((1 << m) - 1));
        sym.push_back(int'(fr[(ni+c)*m +: 8]) & ((1 << m) - 1));
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
          failures++; $display("uplink frame %0d code %0d not a code word", q, c);
        end
      end
      // descramble with the previous frame's scrambled bits
      if (prev_scr[0].size() != 0) begin
        for (int s = 0; s < nscr; s++)
          for (int i = 0; i < w; i++) begin
            bit a, b2;
            a  = (i >= t1) ? scr[s*w + i - t1] : prev_scr[s][w + i - t1];
            b2 = (i >= t2) ? scr[s*w + i - t2] : prev_scr[s][w + i - t2];
            dd[s*w + i] = ~(~(scr[s*w + i] ^ a) ^ b2);
          end
        checks++;
        if (((dd ^ ul_q[q].data) & ((232'(1) << nd) - 232'(1))) != '0) begin
          failures++; $display("uplink frame %0d mode %0d data mismatch", q, mi);
        end else n_ul_mode[mi]++;
      end
      for (int s = 0; s < 4; s++) begin
        prev_scr[s].delete();
        for (int i = 0; i < w; i++) prev_scr[s].push_back((s < nscr) ? scr[s*w + i] : 1'b0);
      end
    end
    // frame rate: one request every 256 bit clocks
    for (int q = 1; q < ul_q.size(); q++) begin
      checks++;
      if (ul_q[q].at - ul_q[q-1].at != 256) begin failures++; $display("uplink frame period"); break; end
    end
  endtask

  // =====================================================================
  // e-link phase aligners: tap model as in the phase_aligner testbench
  // =====================================================================
  bit ebits [NE][int];
  int en_n = 0;
  function automatic bit eval_tap(int e, int t);
    int b = (t - (e % 8)) >>> 3;
    if (!ebits[e].exists(b)) ebits[e][b] = 1'($urandom);
    return ebits[e][b];
  endfunction
  initial begin
    for (int e = 0; e < NE; e++) elink_taps[e] = '0;
    forever begin
      @(posedge clk_elink); #1;
      en_n++;
      for (int e = 0; e < NE; e++)
        for (int k = 0; k < 15; k++) elink_taps[e][k] = eval_tap(e, 8*en_n - k);
    end
  end
  initial begin
    logic [14:0] pt [NE];
    int dok;
    repeat (3) @(posedge clk_elink);
    rst_elink = 0;
    repeat (64 * 3) @(posedge clk_elink);
    #2;
    for (int e = 0; e < NE; e++) begin
      automatic int ee = (8 - (e % 8)) % 8;
      automatic int t = (ee + 4) % 8;
      if (t < 4) t += 8;
      checks++;
      if (!elink_locked[e] || elink_phase[e] != 4'(t)) begin
        failures++; $display("elink %0d phase %0d expected %0d", e, elink_phase[e], t);
      end else n_pa_ok++;
    end
    dok = 0;
    for (int c = 0; c < 50; c++) begin
      for (int e = 0; e < NE; e++) pt[e] = elink_taps[e];
      @(posedge clk_elink); #2;
      for (int e = 0; e < NE; e++) if (elink_data[e] === pt[e][elink_phase[e]]) dok++;
    end
    checks++;
    if (dok != 50 * NE) begin failures++; $display("elink data %0d of %0d", dok, 50 * NE); end
    // training: the learned phases freeze and the unused taps and cells stop
    pa_mode = PA_TRAIN;
    repeat (64 * 2 + 2) @(posedge clk_elink);
    #2;
    for (int e = 0; e < NE; e++) begin
      checks++;
      if (elink_tap_en[e] != 15'd1 << elink_phase[e] || elink_dummy_en[e] != ~elink_tap_en[e] ||
          elink_cell_en[e] != 14'((15'd1 << elink_phase[e]) - 15'd1)) begin
        failures++; $display("elink %0d training: phase %0d taps %b cells %b", e, elink_phase[e], elink_tap_en[e], elink_cell_en[e]);
      end else n_pa_train++;
    end
  end

  // =====================================================================
  // e-link transmitter: random bits, pre-emphasis on; the P-half main
  // cells must follow each bit one clock after it is taken and the
  // pre-emphasis cells must fire on the first half of each changed bit
  // =====================================================================
  logic clk_etx = 0, rst_etx = 1;
  always #4 clk_etx = ~clk_etx;
  logic [0:0] etx_din = '0, etx_bit_start;
  logic [2:0] etx_drive = 3'd3, etx_pe_drive = 3'd7;
  logic       etx_pe_en = 1'b1;
  etx_cells_t etx_cells [1];
  int n_etx_bits = 0, n_etx_pe = 0;
  initial begin
    logic prev = 0;
    repeat (3) @(posedge clk_etx);
    #1 rst_etx = 0;
    wait (etx_bit_start[0]); #1;
    for (int n = 0; n < 200; n++) begin
      etx_din[0] = 1'($urandom);
      @(posedge clk_etx); #1;
      checks++;
      // drive 3: cells 0, 1 and 2 on, driving the bit (UP_n = DOWN = ~bit)
      if (etx_cells[0].up_n_p != {1'b1, {3{~etx_din[0]}}} || etx_cells[0].dn_p != {1'b0, {3{~etx_din[0]}}}) begin
        failures++; $display("etx bit %0d: cells %b %b", n, etx_cells[0].up_n_p, etx_cells[0].dn_p);
      end else n_etx_bits++;
      checks++;
      if ((etx_cells[0].pe_dn_p != 4'b0000 || etx_cells[0].pe_up_n_p != 4'b1111) != (etx_din[0] != prev)) begin
        failures++; $display("etx bit %0d: pre-emphasis %b %b", n, etx_cells[0].pe_up_n_p, etx_cells[0].pe_dn_p);
      end else if (etx_din[0] != prev) n_etx_pe++;
      prev = etx_din[0];
      @(posedge clk_etx); #1;
      checks++;
      if (etx_cells[0].pe_dn_p != 4'b0000 || etx_cells[0].pe_up_n_p != 4'b1111) begin
        failures++; $display("etx bit %0d: pre-emphasis in the second half", n);
      end
    end
  end

  // =====================================================================
  // eye-opening monitor
  // =====================================================================
  initial begin
    int ones;
    repeat (3) @(posedge clk_eom); #1;
    rst_eom = 0;
    @(posedge clk_eom); #1;
    eom_start = 1;
    @(posedge clk_eom); #1;
    eom_start = 0;
    ones = 0;
    while (!eom_done) begin
      eom_cmp = ($urandom_range(0, 9) < 4);
      if (eom_busy) ones += eom_cmp;
      @(posedge clk_eom); #1;
    end
    checks++;
    if (eom_count != 16'(ones) || eom_phase_sel != 6'd17 || eom_vref_sel != 5'd9) begin
      failures++; $display("eom count %0d expected %0d", eom_count, ones);
    end else n_eom++;
  end

  // =====================================================================
  // VCO calibration with a behavioural oscillator
  // =====================================================================
  always begin
    #((170 + 5 * vco_cap_code) / 2.0 * 0.001);
    clk_vco = ~clk_vco;
  end
  initial begin
    repeat (5) @(posedge clk_vco);
    rst_vco = 0;
    @(posedge clk_vco); #0.01 vco_cal_start = 1;
    @(posedge clk_vco); #0.01 vco_cal_start = 0;
    wait (vco_cal_done);
    #1;
    checks++;
    if (vco_cap_code != 4'd5) begin failures++; $display("vco code %0d", vco_cap_code); end
    else n_vco++;
  end

  // =====================================================================
  // end of test
  // =====================================================================
  initial begin
    wait (dl_done && ul_done);
    #100;
    check_uplink();
    n_slip = dl_slips;
    checks++;
    if (n_dl_bad > allow_bad) begin failures++; $display("down-link data: %0d bad, %0d allowed", n_dl_bad, allow_bad); end
    checks++;
    if (n_dl_ok < 350) begin failures++; $display("down-link frames ok: %0d", n_dl_ok); end
    $display("mechanisms: slips=%0d locks=%0d unlocks=%0d corrected=%0d double-flagged=%0d up=%0d dn=%0d",
             n_slip, n_lock, n_unlock, n_corr, n_double_flag, n_up, n_dn);
    $display("            down-link frames at fixed latency=%0d (last %0d clocks after the frame's last bit)", n_lat_ok, lock_lat);
    $display("            ul frames per mode=%0d/%0d/%0d/%0d elinks locked=%0d trained=%0d eom=%0d vco=%0d",
             n_ul_mode[0], n_ul_mode[1], n_ul_mode[2], n_ul_mode[3], n_pa_ok, n_pa_train, n_eom, n_vco);
    $display("            etx bits=%0d pre-emphasis pulses=%0d", n_etx_bits, n_etx_pe);
    foreach (n_ul_mode[i]) begin checks++; if (n_ul_mode[i] == 0) begin failures++; $display("uplink mode %0d never checked", i); end end
    checks++; if (n_slip == 0)   begin failures++; $display("no frame slip"); end
    checks++; if (n_lock < 2)    begin failures++; $display("no relock"); end
    checks++; if (n_unlock == 0) begin failures++; $display("no unlock"); end
    checks++; if (n_corr == 0)   begin failures++; $display("no FEC correction"); end
    checks++; if (n_lat_bad != 0 || n_lat_ok < 350) begin failures++; $display("down-link latency: %0d steady, %0d changed", n_lat_ok, n_lat_bad); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("phase detector up/dn missing"); end
    checks++; if (n_pa_ok == 0)  begin failures++; $display("no e-link lock"); end
    checks++; if (n_pa_train == 0) begin failures++; $display("no e-link training"); end
    checks++; if (n_etx_bits == 0 || n_etx_pe == 0) begin failures++; $display("no e-link transmission or pre-emphasis"); end
    checks++; if (n_eom == 0)    begin failures++; $display("no eye-monitor count"); end
    checks++; if (n_vco == 0)    begin failures++; $display("no VCO calibration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
