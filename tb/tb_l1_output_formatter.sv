// tb_l1_output_formatter: self-checking test of L1 event merging and
// sparsification.
//
// Eight FIFO models hold L1 events for the 8 chips. Each event has random hit
// runs of width 1..12 (runs wider than 8 must be split) on random channels,
// from a few hits to dense events with more than 127 clusters (truncation),
// random error bits and, for some events, one chip with a different L1 ID.
// The serial output is decoded (header "11", 16 error bits, L1 ID, mismatch,
// trunc, 7-bit count, then 16-bit clusters) and compared with clusters found
// here by scanning chips 0..7 and channels upward. The FIFO read pulse must
// pop all 8 FIFOs together, and the first output bit must come n + 8 cycles
// after the read pulse for an event with n clusters found.
module tb_l1_output_formatter;
  import cic_pkg::*;
  localparam int W = L1_ENTRY_W, H = L1_ENTRY_W - 11;
  logic clk = 0, rst = 1;
  logic [N_FE-1:0] fifo_empty, fifo_rd;
  logic [W-1:0] fifo_rdata [N_FE];
  logic l1_out, busy;
  logic [15:0] events_cnt;
  int checks = 0, failures = 0, cyc = 0, n_trunc = 0, n_mm = 0, n_split = 0;

  l1_output_formatter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // FIFO models.
  logic [W-1:0] q [N_FE][$];
  always_comb
    for (int c = 0; c < N_FE; c++) begin
      fifo_empty[c] = (q[c].size() == 0);
      fifo_rdata[c] = (q[c].size() > 0) ? q[c][0] : '0;
    end
  int pop_cyc = -1;
  always @(posedge clk) if (!rst && fifo_rd != '0) begin
    checks++;
    if (fifo_rd != '1) failures++;
    pop_cyc <= cyc;
    for (int c = 0; c < N_FE; c++) if (q[c].size() > 0) void'(q[c].pop_front());
  end

  // Expected output of each event.
  typedef struct { logic [35:0] hdr; cluster_t cl [$]; int nfound; } exp_t;
  exp_t expq [$];

  task automatic make_event(input int nruns);
    logic [H-1:0] hits [N_FE];
    logic [W-1:0] e;
    logic [8:0]   id = 9'($urandom);
    logic [15:0]  errs;
    bit           mm = ($urandom % 4) == 0;
    exp_t         x;
    int           mmchip = 1 + $urandom % 7;
    for (int c = 0; c < N_FE; c++) hits[c] = '0;
    for (int r = 0; r < nruns; r++) begin
      int c = $urandom % N_FE, p = $urandom % H, w = 1 + $urandom % 12;
      for (int k = 0; k < w && p + k < H; k++) hits[c][p + k] = 1'b1;
    end
    // Reference cluster finder.
    x.cl = {};
    for (int c = 0; c < N_FE; c++) begin
      int i = 0;
      while (i < H) begin
        if (hits[c][i]) begin
          int w = 0;
          while (w < 8 && i + w < H && hits[c][i + w]) w++;
          if (w == 8 && i + 8 < H && hits[c][i + 8]) n_split++;
          x.cl.push_back('{chip: 3'(c), addr: 10'(i), width: 3'(w - 1)});
          i += w;
        end else begin
          i++;
        end
      end
    end
    x.nfound = x.cl.size();
    for (int c = 0; c < N_FE; c++) begin
      logic [1:0] er = 2'($urandom);
      errs[2*c +: 2] = er;
      e = {er, (mm && c == mmchip) ? 9'(id + 1) : id, hits[c]};
      q[c].push_back(e);
    end
    if (x.cl.size() > MAX_CLUSTERS) begin
      n_trunc++;
      while (x.cl.size() > MAX_CLUSTERS) void'(x.cl.pop_back());
    end
    if (mm) n_mm++;
    x.hdr = {2'b11, errs, id, mm, x.nfound > MAX_CLUSTERS, 7'(x.cl.size())};
    expq.push_back(x);
  endtask

  initial begin
    int nev = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int ev = 0; ev < 30; ev++) begin
      exp_t x;
      logic [35:0] h;
      int start;
      make_event(ev % 5 == 4 ? 400 : 1 + $urandom % 40);
      x = expq.pop_front();
      // Wait for the start of the frame.
      while (l1_out !== 1'b1) begin
        @(posedge clk); #1;
      end
      start = cyc;
      chk(start - pop_cyc == x.nfound + 8, "latency n + 8 after the read pulse");
      for (int b = 35; b >= 0; b--) begin
        h[b] = l1_out;
        @(posedge clk); #1;
      end
      chk(h == x.hdr, "header");
      if (h != x.hdr && failures < 4) $display("hdr %h exp %h", h, x.hdr);
      foreach (x.cl[i]) begin
        cluster_t g;
        for (int b = 15; b >= 0; b--) begin
          g[b] = l1_out;
          @(posedge clk); #1;
        end
        chk(g == x.cl[i], "cluster");
      end
      chk(l1_out == 1'b0, "idle bit after the frame");
      @(posedge clk); #1;
      chk(!busy, "formatter idle after the frame");
      nev++;
    end
    chk(int'(events_cnt) == nev, "events counted");
    chk(n_trunc > 0 && n_mm > 0 && n_split > 0, "truncation, L1 ID mismatch and split seen");
    $display("events %0d, truncated %0d, id mismatch %0d, split runs %0d", nev, n_trunc, n_mm, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
