// tb_phy_port: self-checking test of a PHY port (all lines of one data path).
//
// Each of the 40 lines carries its own random bit stream with its own edge
// position (line l: sample l mod 4), so every line must settle on its own
// phase, (p + 2) mod 4, and deliver its own bits. Line 0 is held constant for
// the first windows: all_locked must stay low until it too has toggled.
module tb_phy_port;
  localparam int LINES = 40, OVS = 4, WINDOW = 64;
  logic clk = 0, rst = 1;
  logic [OVS-1:0] samples [LINES];
  logic [LINES-1:0] data_out;
  logic [1:0] phase_sel [LINES];
  logic all_locked;
  int checks = 0, failures = 0;

  phy_port #(.LINES(LINES), .OVS(OVS), .WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_bit [LINES], cur_bit [LINES], exp_bit [LINES];

  task automatic cycle(input bit hold0, input bit check);
    for (int l = 0; l < LINES; l++) begin
      int p = l % OVS;
      prev_bit[l] = cur_bit[l];
      cur_bit[l]  = (hold0 && l == 0) ? 1'b0 : 1'($urandom);
      for (int k = 0; k < OVS; k++) samples[l][k] = (k < p) ? prev_bit[l] : cur_bit[l];
      exp_bit[l] = (int'(phase_sel[l]) >= p) ? cur_bit[l] : prev_bit[l];
    end
    @(posedge clk);
    #1;
    if (check) begin
      for (int l = 0; l < LINES; l++) begin
        checks++;
        if (data_out[l] != exp_bit[l] || phase_sel[l] != 2'((l % OVS + 2) % OVS)) begin
          failures++;
          if (failures < 5) $display("line %0d: data %b/%b phase %0d", l, data_out[l],
                                     exp_bit[l], phase_sel[l]);
        end
      end
      checks++;
      if (!all_locked) failures++;
    end
  endtask

  initial begin
    for (int l = 0; l < LINES; l++) begin
      samples[l] = '0; cur_bit[l] = 0; prev_bit[l] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3 * WINDOW) cycle(1, 0);
    checks++;
    if (all_locked) begin
      failures++;
      $display("all_locked high while line 0 never toggled");
    end
    repeat (2 * WINDOW) cycle(0, 0);
    repeat (4 * WINDOW) cycle(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
