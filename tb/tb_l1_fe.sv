// tb_l1_fe: self-checking test of one L1 FE block.
//
// A model FE chip sends L1 frames ("11" then 797 random bits) separated by
// random idle gaps. Phase 1: 20 frames with no reads; the first 16 must be
// stored, the FIFO must report full, and the other 4 dropped and counted.
// The first entry must be readable two cycles after its last bit. Phase 2:
// the FIFO is read out completely while more frames arrive; every entry read
// must equal the next frame accepted, in order, and frames_cnt must count
// all frames.
module tb_l1_fe;
  import cic_pkg::*;
  localparam int W = L1_ENTRY_W;
  logic clk = 0, rst = 1, l1_in = 0, rd_en = 0;
  logic [W-1:0] rdata;
  logic empty, full;
  logic [7:0] frames_cnt, dropped_cnt;
  logic [$clog2(L1_FIFO_DEPTH):0] level;
  int checks = 0, failures = 0, cyc = 0;

  l1_fe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000;
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

  logic [W-1:0] accepted [$];
  int sent = 0;

  task automatic send_frame(input bit will_store, input bit check_timing);
    logic [W-1:0] f;
    for (int i = 0; i < W; i += 32) f[i +: 32] = $urandom;
    if (will_store) accepted.push_back(f);
    sent++;
    l1_in = 1; @(posedge clk); #1;
    l1_in = 1; @(posedge clk); #1;
    for (int b = W - 1; b >= 0; b--) begin
      l1_in = f[b];
      @(posedge clk); #1;
    end
    l1_in = 0;
    if (check_timing) begin
      chk(empty, "entry not yet stored one cycle after last bit");
      @(posedge clk); #1;
      chk(!empty && rdata == f, "entry stored two cycles after last bit");
    end
    repeat (1 + $urandom % 5) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    #1;
    for (int n = 0; n < 20; n++) send_frame(n < L1_FIFO_DEPTH, n == 0);
    chk(full && int'(level) == L1_FIFO_DEPTH, "FIFO full after 16 frames");
    chk(dropped_cnt == 8'd4, "4 frames dropped");
    // Phase 2: read while sending.
    fork
      begin
        for (int n = 0; n < 10; n++) send_frame(1, 0);
      end
      begin
        int nread = 0;
        while (nread < L1_FIFO_DEPTH + 10) begin
          if (!empty) begin
            chk(accepted.size() > 0 && rdata == accepted[0], "entry content and order");
            void'(accepted.pop_front());
            rd_en = 1; @(posedge clk); #1; rd_en = 0;
            nread++;
            repeat ($urandom % 200) @(posedge clk);
            #1;
          end else begin
            @(posedge clk); #1;
          end
        end
      end
    join
    chk(empty, "FIFO empty at the end");
    chk(int'(frames_cnt) == sent, "frames counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
