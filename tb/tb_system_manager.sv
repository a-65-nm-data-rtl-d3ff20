// tb_system_manager: self-checking test of reset, timing and fast commands.
//
// RESET_IN is pulsed; the internal reset must release two clocks later. The
// fast command line then carries idle frames at a random bit phase until lock,
// followed by frames with random commands. Every decoded command must arrive
// with ce40, one per frame, in order and with the flags sent; ce40 must keep a
// period of 8 and ce20 must come with every second ce40.
module tb_system_manager;
  import cic_pkg::*;
  logic clk = 0, reset_in = 1, fc_in = 0;
  logic rst, fc_locked, ce40, ce160, ce20, cmd_valid;
  fcmd_t cmd;
  int checks = 0, failures = 0;

  system_manager dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  fcmd_t sent [$];
  bit    started = 0;
  int    ncmd = 0, n40 = 0, n20 = 0, last40 = -1, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!started) last40 = -1;
    if (rst) started = 0;
    else if (fc_locked && cmd_valid) started = 1;
    if (!rst && started) begin
      if (cmd_valid) begin
        chk(ce40, "command with ce40");
        if (sent.size() > 0) begin
          chk(cmd == sent.pop_front(), "command flags");
          ncmd++;
        end
      end
      if (ce40) begin
        if (last40 >= 0) chk(cyc - last40 == 8, "ce40 period");
        last40 = cyc;
        n40++;
        if (ce20) n20++;
        chk(cmd_valid, "every ce40 carries a frame once locked");
      end else begin
        chk(!ce20, "ce20 only with ce40");
      end
    end
  end

  task automatic send(input logic [7:0] f);
    for (int b = 7; b >= 0; b--) begin
      fc_in = f[b];
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #3 reset_in = 0;
    @(posedge clk); #1 chk(rst, "reset held after first edge");
    @(posedge clk); #1 chk(!rst, "reset released after second edge");
    repeat ($urandom % 8) @(posedge clk);
    while (!fc_locked) send(8'b110_0000_1);
    // The frame that completes now is the first decoded one.
    for (int i = 0; i < 100; i++) begin
      automatic logic [3:0] c = 4'($urandom);
      sent.push_back(fcmd_t'(c));
      send({3'b110, c, 1'b1});
    end
    @(posedge clk); #1;
    chk(ncmd >= 99, "commands decoded");
    chk(n20 * 2 >= n40 - 1 && n20 * 2 <= n40 + 1, "ce20 every second ce40");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
