// tb_cic_top: end-to-end test of the concentrator core at its default size.
//
// Models of 8 FE chips drive all 40 trigger lines and 8 L1 lines through an
// oversampling model (4 samples per bit, a random data-edge position per
// line), and a control-system model drives the fast command line. The run:
//   1. reset, idle fast commands until lock; trigger lines repeat the
//      alignment word with align_en set until every line is phase-locked and
//      word-aligned; a fast reset then clears what the L1 inputs picked up
//      while their phases were still moving;
//   2. BC0 and a calibration pulse, then random stub words per chip and BX,
//      sparse and dense blocks (more than 40 stubs, and more than fit in one
//      output frame); every
//      output packet is decoded and compared with a reference selection of
//      the 8 BX it covers (found once, then every following packet must be the
//      next 8 BX with the next block number);
//   3. the output mode is switched to 5 lines without bend half-way;
//   4. L1-accepts are sent; each chip answers with an L1 frame after its own
//      delay; every L1 output frame is decoded and compared with clusters
//      found here, including an event with more than 127 clusters;
//   5. a fast reset: block numbering must restart at 0;
//   6. chip 7 stays silent while chips 0..6 send 18 more frames: their FIFOs
//      must fill and drop frames; then chip 7 catches up and the events drain.
// Each mechanism is counted and a mechanism that never happened is a failure.
// All parameters are at their defaults; the run takes about 43,000 cycles.
module tb_cic_top;
  import cic_pkg::*;
  localparam int OVS = 4, NTL = N_FE * TRIG_LINES, W = L1_ENTRY_W, H = L1_ENTRY_W - 11;
  localparam int NBX = 3600;

  logic clk = 0, reset_in = 1, fast_control_in = 0;
  logic [OVS-1:0] trig_samples [NTL];
  logic [OVS-1:0] l1_samples [N_FE];
  logic align_en = 1, six_lines = 1, no_bend = 0;
  logic [OUT_LINES_MAX-1:0] trig_out;
  logic l1_out, fc_locked, trig_phy_locked, l1_phy_locked, words_aligned, cal_pulse, ce20;
  logic [15:0] l1a_cnt, l1_events_cnt;
  logic [N_FE-1:0] l1_fifo_full, l1_dropped;
  logic l1_busy, trig_frame_start;

  cic_top dut (.*);

  int checks = 0, failures = 0;
  int n_cal = 0;
  always @(posedge clk) if (cal_pulse && t > 20) n_cal++;  // outputs settle after reset
  int t = 0;   // stimulus cycle, advanced at each negative edge

  always #5 clk = ~clk;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, t);
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  int          d0;                 // word delay of all trigger lines
  int          pl [NTL + N_FE];    // data-edge sample position per line
  logic        prevb [NTL + N_FE];
  bit          send_align = 1;
  int          data_start_bx = -1; // first BX index carrying stub words
  logic [39:0] words [N_FE][NBX];
  logic [7:0]  fcq [$];            // fast command frames to send
  logic [7:0]  fc_frame = 8'b110_0000_1;
  logic        l1_bit [N_FE];

  function automatic logic trig_bit(input int c, input int l, input int tt);
    int k, b;
    if (tt < d0) return 1'b0;
    k = (tt - d0) / 8;
    b = (tt - d0) % 8;
    if (send_align || data_start_bx < 0 || k < data_start_bx || k >= NBX)
      return ALIGN_WORD[7 - b];
    return words[c][k][39 - 8*l - b];
  endfunction

  always @(negedge clk) begin
    // fast command line
    if (t % 8 == 0) fc_frame = (fcq.size() > 0) ? fcq.pop_front() : 8'b110_0000_1;
    fast_control_in = fc_frame[7 - t % 8];
    // trigger and L1 lines through the sampler model
    for (int i = 0; i < NTL + N_FE; i++) begin
      logic cur;
      cur = (i < NTL) ? trig_bit(i / TRIG_LINES, i % TRIG_LINES, t) : l1_bit[i - NTL];
      for (int k = 0; k < OVS; k++) begin
        if (i < NTL) trig_samples[i][k] = (k < pl[i]) ? prevb[i] : cur;
        else         l1_samples[i - NTL][k] = (k < pl[i]) ? prevb[i] : cur;
      end
      prevb[i] = cur;
    end
    t++;
  end

  // Random stub word; a slot holds a stub with probability 1/keep_div.
  function automatic logic [39:0] rnd_word(input int keep_div);
    logic [39:0] w;
    for (int s = 0; s < 3; s++) begin
      logic [7:0] a;
      a = 8'(1 + $urandom % 255);
      if (($urandom % keep_div) != 0) a = 0;
      w[39 - 12*s -: 12] = {a, 4'($urandom)};
    end
    w[3:0] = {3'b000, 1'(($urandom % 32) == 0)};
    return w;
  endfunction

  // ---------------------------------------------------------------- trigger reference
  int n_sel_trunc = 0, n_frame_trunc = 0, n_frames_ok = 0, n_mode5 = 0, n_restart = 0;
  int base_bx = -1, last_id = -1;
  bit expect_restart = 0;
  int search_until = 0;
  int ignore_until = 0;   // frames cut by a fast reset are not checked

  function automatic logic [383:0] ref_frame(input int k0, input int id, input bit six,
                                             input bit nb, output bit sel_tr, output bit fr_tr);
    sel_stub_t all [$], sel [$];
    logic [7:0] err = '0;
    int w = nb ? 19 : 23, bits = six ? 384 : 320, kfit, ns, pos;
    logic [383:0] f = '0;
    trig_hdr_t h;
    for (int b = 0; b < 8; b++)
      for (int c = 0; c < N_FE; c++) begin
        logic [39:0] wd;
        wd = words[c][k0 + b];
        err[c] |= wd[0];
        for (int s = 0; s < 3; s++)
          if (wd[39 - 12*s -: 8] != 0)
            all.push_back('{chip: 3'(c), bx: 3'(b), addr: wd[39 - 12*s -: 8],
                            bend: wd[31 - 12*s -: 4], aux: 5'd0});
      end
    for (int a = 0; a <= 8; a++)
      foreach (all[i]) if (bend_abs(all[i].bend) == 4'(a) && sel.size() < NMAX_STUBS)
        sel.push_back(all[i]);
    kfit = (bits - HDR_W) / w;
    ns = (sel.size() < kfit) ? sel.size() : kfit;
    sel_tr = all.size() > NMAX_STUBS;
    fr_tr  = sel.size() > kfit;
    h = '{fe_err: err, ovf: sel_tr | fr_tr, block_id: 12'(id), nstubs: 6'(ns)};
    pos = 383;
    for (int b = HDR_W - 1; b >= 0; b--) f[pos--] = h[b];
    for (int i = 0; i < ns; i++) begin
      logic [22:0] v;
      v = nb ? {4'b0, sel[i].chip, sel[i].bx, sel[i].addr, sel[i].aux} : sel[i];
      for (int b = w - 1; b >= 0; b--) f[pos--] = v[b];
    end
    return f;
  endfunction

  // Decode every trigger frame.
  initial begin
    forever begin
      logic [383:0] got, exp_f;
      bit six, nb, st, ft;
      int f0;
      trig_hdr_t h;
      @(posedge clk); #1;
      if (trig_frame_start) begin
        six = six_lines; nb = no_bend;
        f0 = t;
        got = '0;
        for (int c = 0; c < 64; c++) begin
          for (int l = 0; l < (six ? 6 : 5); l++) got[383 - (c * (six ? 6 : 5) + l)] = trig_out[l];
          if (!six) chk(trig_out[5] == 1'b0, "line 5 idle in 5-line mode");
          if (c < 63) begin @(posedge clk); #1; end
        end
        h = got[383 -: HDR_W];
        if (got != '0 && data_start_bx >= 0 && f0 > ignore_until) begin
          if (expect_restart) begin
            // First packet after a fast reset: numbering restarts at 0. The
            // block it covers began at the reset, so only the header is
            // checked and the block position is searched again afterwards.
            chk(h.block_id == 0, "block numbering restarts after fast reset");
            expect_restart = 0;
            n_restart++;
            base_bx = -1;
            search_until = t + 8 * 64;
          end else if (base_bx < 0) begin
            // Find the 8 BX this packet covers. Packets still holding
            // alignment words are skipped; a match must come soon.
            // The block ended at most 3 packets ago: search the last 40 BX.
            for (int k0 = (f0 - d0) / 8 - 40; k0 + 8 < NBX && k0 < (f0 - d0) / 8 && base_bx < 0; k0++)
              if (k0 >= data_start_bx)
                if (ref_frame(k0, int'(h.block_id), six, nb, st, ft) == got) base_bx = k0;
            if (base_bx >= 0 || t > search_until)
              chk(base_bx >= 0, "trigger packet matches some 8 BX");
            last_id = int'(h.block_id);
          end else begin
            int id;
            id = last_id + 1;
            base_bx += 8;
            if (base_bx + 8 < NBX) begin
              exp_f = ref_frame(base_bx, id, six, nb, st, ft);
              chk(got == exp_f, "trigger packet content");
              if (got != exp_f && failures < 4) $display("got %h\nexp %h", got, exp_f);
              if (got == exp_f) n_frames_ok++;
              if (st) n_sel_trunc++;
              if (ft) n_frame_trunc++;
              if (!six && nb) n_mode5++;
            end
            last_id = id;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- L1 model and reference
  typedef struct { logic [35:0] hdr; cluster_t cl [$]; } l1exp_t;
  l1exp_t l1q [$];
  int n_l1_ok = 0, n_l1_trunc = 0, l1_check_on = 1, n_l1_seen = 0;
  logic [8:0] l1id = 0;
  int ndone;

  task automatic send_l1_frame(input int c, input logic [W-1:0] e);
    l1_bit[c] = 1; @(negedge clk); @(negedge clk);
    for (int b = W - 1; b >= 0; b--) begin
      l1_bit[c] = e[b];
      @(negedge clk);
    end
    l1_bit[c] = 0;
    @(negedge clk);
  endtask

  // One L1 event: build 8 frames and the expected output.
  task automatic l1_event(input int nruns, input bit record);
    logic [H-1:0] hits [N_FE];
    logic [W-1:0] e [N_FE];
    logic [15:0]  errs;
    l1exp_t x;
    int nfound;
    for (int c = 0; c < N_FE; c++) hits[c] = '0;
    for (int r = 0; r < nruns; r++) begin
      int c, p, wd;
      c = $urandom % N_FE; p = $urandom % H; wd = 1 + $urandom % 10;
      for (int k = 0; k < wd && p + k < H; k++) hits[c][p + k] = 1'b1;
    end
    x.cl = {};
    for (int c = 0; c < N_FE; c++) begin
      int i;
      i = 0;
      while (i < H) begin
        if (hits[c][i]) begin
          int wd;
          wd = 0;
          while (wd < 8 && i + wd < H && hits[c][i + wd]) wd++;
          x.cl.push_back('{chip: 3'(c), addr: 10'(i), width: 3'(wd - 1)});
          i += wd;
        end else i++;
      end
    end
    nfound = x.cl.size();
    while (x.cl.size() > MAX_CLUSTERS) void'(x.cl.pop_back());
    for (int c = 0; c < N_FE; c++) begin
      errs[2*c +: 2] = 2'($urandom % 8 == 0 ? $urandom : 0);
      e[c] = {errs[2*c +: 2], l1id, hits[c]};
    end
    x.hdr = {2'b11, errs, l1id, 1'b0, nfound > MAX_CLUSTERS, 7'(x.cl.size())};
    if (nfound > MAX_CLUSTERS) n_l1_trunc++;
    if (record) l1q.push_back(x);
    l1id++;
    // L1-accept on the fast command line, then every chip answers.
    fcq.push_back(8'b110_0100_1);
    ndone = 0;
    for (int c = 0; c < N_FE; c++) begin
      fork
        automatic int cc = c;
        automatic logic [W-1:0] ec = e[c];
        begin
          repeat (20 + 9 * cc) @(negedge clk);
          send_l1_frame(cc, ec);
          ndone++;
        end
      join_none
    end
    wait (ndone == N_FE);
  endtask

  // Decode every L1 output frame.
  initial begin
    forever begin
      logic [35:0] h;
      cluster_t g;
      @(posedge clk); #1;
      if (l1_out) begin
        h[35] = 1'b1;
        for (int b = 34; b >= 0; b--) begin
          @(posedge clk); #1;
          h[b] = l1_out;
        end
        n_l1_seen++;
        if (l1_check_on && l1q.size() > 0) begin
          l1exp_t x;
          bit ok;
          x = l1q.pop_front();
          ok = (h == x.hdr);
          chk(h == x.hdr, "L1 header");
          if (h != x.hdr) $display("L1 hdr got %b exp %b", h, x.hdr);
          for (int i = 0; i < int'(h[6:0]); i++) begin
            for (int b = 15; b >= 0; b--) begin
              @(posedge clk); #1;
              g[b] = l1_out;
            end
            if (i < x.cl.size()) begin
              chk(g == x.cl[i], "L1 cluster");
              if (g != x.cl[i]) ok = 0;
            end
          end
          if (ok) n_l1_ok++;
        end else begin
          repeat (16 * int'(h[6:0])) @(posedge clk);
          #1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    int n_fast_reset = 0;
    d0 = $urandom % 6;
    for (int i = 0; i < NTL + N_FE; i++) begin
      pl[i] = $urandom % OVS;
      prevb[i] = 0;
    end
    for (int c = 0; c < N_FE; c++) l1_bit[c] = 0;
    for (int c = 0; c < N_FE; c++)
      for (int k = 0; k < NBX; k++) words[c][k] = rnd_word((k / 8) % 3 == 0 ? 1 : (k / 8) % 3 == 1 ? 5 : 16);
    // L1 lines need transitions for phase alignment: a short training pattern.
    repeat (5) @(negedge clk);
    reset_in = 0;
    fork
      repeat (40) begin
        for (int c = 0; c < N_FE; c++) l1_bit[c] = 1'b0;
        @(negedge clk);
        for (int c = 0; c < N_FE; c++) l1_bit[c] = 1'b1;
        @(negedge clk);
        for (int c = 0; c < N_FE; c++) l1_bit[c] = 1'b0;
        repeat (2) @(negedge clk);
      end
    join
    // Three cycles apart, never two 1s in a row: no frame start is seen.
    wait (fc_locked && trig_phy_locked && l1_phy_locked && words_aligned);
    chk(1, "lock and alignment reached");
    $display("locked at cycle %0d", t);
    align_en = 0;
    // A fast reset clears whatever the L1 inputs captured while locking.
    fcq.push_back(8'b110_1000_1);
    repeat (100) @(negedge clk);
    send_align = 0;
    data_start_bx = (t - d0) / 8 + 4;
    search_until = (data_start_bx + 40) * 8;
    fcq.push_back(8'b110_0001_1);   // BC0
    fcq.push_back(8'b110_0010_1);   // calibration pulse
    // Stub data runs on its own; L1 events meanwhile.
    for (int ev = 0; ev < 8; ev++) l1_event(ev == 5 ? 500 : 1 + $urandom % 30, 1);
    // Mode switch right after a frame start.
    @(posedge trig_frame_start);
    @(negedge clk);
    six_lines = 0; no_bend = 1;
    for (int ev = 0; ev < 4; ev++) l1_event(1 + $urandom % 30, 1);
    // Let the last L1 frame (up to 36 + 127 * 16 bits) finish.
    wait (l1q.size() == 0);
    repeat (2200) @(negedge clk);
    // Fast reset.
    @(posedge trig_frame_start);
    fcq.push_back(8'b110_1000_1);
    expect_restart = 1;
    ignore_until = t + 100;
    n_fast_reset++;
    repeat (400) @(negedge clk);
    // FIFO overflow: chip 7 silent, chips 0..6 send 18 frames.
    l1_check_on = 0;
    begin
      int seen0;
      seen0 = n_l1_seen;
      for (int f = 0; f < 18; f++) begin
        ndone = 0;
        for (int c = 0; c < N_FE - 1; c++) begin
          fork
            automatic int cc = c;
            automatic int ff = f;
            begin
              send_l1_frame(cc, {2'b00, 9'(ff), H'(1) << ff});
              ndone++;
            end
          join_none
        end
        wait (ndone == N_FE - 1);
      end
      repeat (50) @(negedge clk);
      chk(l1_dropped == 8'h7F, "chips 0..6 dropped frames, chip 7 none");
      chk(l1_fifo_full == 8'h7F, "FIFOs of chips 0..6 full");
      for (int f = 0; f < 16; f++) send_l1_frame(7, {2'b00, 9'(f), H'(1) << f});
      repeat (2000) @(negedge clk);
      chk(n_l1_seen - seen0 == 16, "16 stored events drained after the overflow");
    end
    // Summary of mechanisms.
    chk(int'(l1a_cnt) == 12, "L1-accepts counted");
    chk(n_frames_ok > 20, "trigger packets checked");
    chk(n_sel_trunc > 0, "stub register overflow (more than 40 stubs) seen");
    chk(n_frame_trunc > 0, "output frame truncation seen");
    chk(n_mode5 > 0, "5-line, no-bend mode seen");
    chk(n_restart == 1, "fast reset seen");
    chk(n_l1_ok == 12, "L1 events checked");
    chk(n_l1_trunc > 0, "L1 cluster truncation seen");
    chk(n_cal == 1, "one calibration pulse");
    $display("trigger packets ok %0d (register overflow %0d, frame cut %0d, 5-line %0d), L1 events ok %0d (truncated %0d), fast resets %0d, calibration pulses %0d",
             n_frames_ok, n_sel_trunc, n_frame_trunc, n_mode5, n_l1_ok, n_l1_trunc, n_restart, n_cal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
