// tb_clk_enable_gen: self-checking test of the clock-enable dividers.
//
// With the fast command decoder reported locked and frame_end pulsing every 8
// cycles at a random phase, ce40 must be high exactly in the frame_end cycles,
// ce160 every second cycle, and ce20 on every second ce40 only. The frame
// phase is then moved by a few cycles: ce40 must follow at once. With the lock
// flag low, frame_end is ignored and ce40 keeps its period of 8.
module tb_clk_enable_gen;
  logic clk = 0, rst = 1, fc_locked = 0, frame_end = 0;
  logic ce40, ce160, ce20;
  int checks = 0, failures = 0;

  clk_enable_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int n40, n20, last40, t;

  // Run with frame_end at cycle phase ph (mod 8); check over n cycles.
  task automatic run(input int ph, input int n, input bit lk, input bit check);
    int ce40_seen = 0, ce20_seen = 0;
    for (int i = 0; i < n; i++) begin
      fc_locked = lk;
      frame_end = ((t % 8) == ph);
      #1;
      if (check) begin
        if (lk) chk(ce40 == frame_end, "ce40 with frame_end");
        if (ce40) begin
          if (last40 >= 0) chk(t - last40 == 8, "ce40 period 8");
          last40 = t;
          ce40_seen++;
          if (ce20) ce20_seen++;
        end else begin
          chk(!ce20, "ce20 only with ce40");
        end
      end
      @(posedge clk);
      #1;
      t++;
    end
    if (check) chk(ce20_seen * 2 == ce40_seen || ce20_seen * 2 == ce40_seen + 1 ||
                   ce20_seen * 2 + 1 == ce40_seen, "ce20 on every second ce40");
  endtask

  // ce160 alternates, except where the frame phase was just moved.
  logic last160;
  bit   check160 = 1;
  always @(posedge clk) if (!rst) begin
    if (check160) begin
      checks++;
      if (ce160 == last160) begin
        failures++;
        $display("FAIL ce160 does not alternate at %0t", $time);
      end
    end
    last160 <= ce160;
  end

  initial begin
    t = 0; last40 = -1; last160 = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(3, 2, 1, 0);      // first frame_end aligns
    last40 = -1;
    run(3, 200, 1, 1);
    check160 = 0;
    run(6, 8, 1, 0);      // phase moves
    check160 = 1;
    last40 = -1;
    run(6, 200, 1, 1);
    last40 = -1;
    run(1, 200, 0, 1);    // not locked: frame_end ignored
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
