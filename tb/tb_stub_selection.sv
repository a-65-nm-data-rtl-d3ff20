// tb_stub_selection: self-checking test of the stub register and selection.
//
// Blocks of 8 BX with random stubs are fed in, one BX row of 8 chips x 3
// slots per in_valid (every 8 cycles). Occupancy varies from sparse blocks
// that fit the 40-entry register to full blocks of 192 stubs. A reference
// model lists the valid stubs in arrival order, sorts them stably by |bend|
// and keeps the first 40; the packet must hold exactly these entries, a
// header with their count, the overflow flag when stubs were dropped, the OR
// of the FE error flags and the block number, and must appear 10 cycles after
// the in_valid of BX 7. A BC0 in the middle of a block restarts the numbering.
module tb_stub_selection;
  import cic_pkg::*;
  localparam int NMAX = NMAX_STUBS;
  logic clk = 0, rst = 1, bc0 = 0, in_valid = 0;
  fe_stub_t stubs [N_FE][STUBS_PER_FE];
  logic [N_FE-1:0] fe_err = '0;
  logic pkt_valid;
  logic [HDR_W + SEL_STUB_W*NMAX - 1:0] packet;
  int checks = 0, failures = 0;
  int cyc = 0, ovf_blocks = 0, fit_blocks = 0;

  stub_selection dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
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

  sel_stub_t exp_list [$];
  sel_stub_t all_list [$];
  logic [N_FE-1:0] exp_err;
  int exp_ovf, exp_id, t_last;

  // One block; occ = percent of occupied slots.
  task automatic send_block(input int occ, input int id);
    all_list.delete();
    exp_err = '0;
    for (int bx = 0; bx < BX_PER_BLOCK; bx++) begin
      for (int c = 0; c < N_FE; c++) begin
        for (int s = 0; s < STUBS_PER_FE; s++) begin
          stubs[c][s].valid = ($urandom % 100) < occ;
          stubs[c][s].addr  = 8'($urandom);
          stubs[c][s].bend  = 4'($urandom);
          stubs[c][s].aux   = 5'($urandom);
          if (stubs[c][s].valid)
            all_list.push_back('{chip: 3'(c), bx: 3'(bx), addr: stubs[c][s].addr,
                                 bend: stubs[c][s].bend, aux: stubs[c][s].aux});
        end
        fe_err[c] = ($urandom % 16) == 0;
      end
      exp_err |= fe_err;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      if (bx == BX_PER_BLOCK - 1) t_last = cyc - 1;
      repeat (7) @(posedge clk);
      #1;
    end
    // Reference: stable sort by |bend|, truncate.
    exp_list.delete();
    for (int b = 0; b <= 8; b++)
      foreach (all_list[i])
        if (bend_abs(all_list[i].bend) == 4'(b) && exp_list.size() < NMAX)
          exp_list.push_back(all_list[i]);
    exp_ovf = all_list.size() > NMAX;
    exp_id  = id;
  endtask

  // Checker: runs concurrently with the next block.
  task automatic check_packet(input sel_stub_t exp_list [$], input logic [N_FE-1:0] exp_err,
                              input int exp_ovf, input int exp_id, input int t_last);
    trig_hdr_t h;
    while (!pkt_valid) begin
      @(posedge clk); #1;
    end
    chk(cyc - 1 - t_last == 10, "latency of 10 cycles");
    h = packet[HDR_W + SEL_STUB_W*NMAX - 1 -: HDR_W];
    chk(int'(h.nstubs) == exp_list.size(), "stub count");
    chk(h.ovf == 1'(exp_ovf), "overflow flag");
    chk(h.fe_err == exp_err, "error flags");
    chk(int'(h.block_id) == exp_id, "block id");
    if (exp_ovf) ovf_blocks++; else fit_blocks++;
    for (int i = 0; i < NMAX; i++) begin
      automatic sel_stub_t e = packet[SEL_STUB_W*(NMAX - i) - 1 -: SEL_STUB_W];
      if (i < exp_list.size()) chk(e == exp_list[i], "entry");
      else                     chk(e == '0, "unused entry zero");
    end
  endtask

  initial begin
    for (int c = 0; c < N_FE; c++) for (int s = 0; s < 3; s++) stubs[c][s] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 12; n++) begin
      send_block((n % 4 == 0) ? 100 : (n % 4 == 1) ? 10 : (n % 4 == 2) ? 20 : 60, n);
      begin
        // Copies taken now: the next block overwrites the shared variables.
        automatic sel_stub_t       l  [$] = exp_list;
        automatic logic [N_FE-1:0] e      = exp_err;
        automatic int              o      = exp_ovf, i = exp_id, tl = t_last;
        fork check_packet(l, e, o, i, tl); join_none
      end
    end
    // BC0 after 3 BX of a block: that partial block is dropped.
    for (int bx = 0; bx < 3; bx++) begin
      in_valid = 1; @(posedge clk); #1; in_valid = 0; repeat (7) @(posedge clk); #1;
    end
    bc0 = 1; @(posedge clk); #1; bc0 = 0;
    send_block(50, 0);
    check_packet(exp_list, exp_err, exp_ovf, exp_id, t_last);
    repeat (20) @(posedge clk);
    chk(ovf_blocks > 0 && fit_blocks > 0, "both full and sparse blocks seen");
    $display("blocks that fit: %0d, blocks truncated: %0d", fit_blocks, ovf_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
