// tb_word_alignment_controller: self-checking test of trigger word alignment.
//
// Each of the 40 lines repeats the alignment word with its own random delay d
// (0..7 cycles) relative to the ce40 pulses. With ce40 at cycles T = 0 mod 8
// the word's last bit lies o = (-d) mod 8 cycles before the ce40 cycle's bit,
// which is the offset each line must report, with aligned set, after at most
// LOCK_N + 1 BX. With align_en low, new delays must not change the offsets;
// with align_en high again they must be found anew. Random data (no alignment
// word) must not set aligned after a reset.
module tb_word_alignment_controller;
  import cic_pkg::*;
  localparam int LINES = N_FE * TRIG_LINES;
  logic clk = 0, rst = 1, ce40 = 0, align_en = 0;
  logic [LINES-1:0] lines = '0, aligned;
  logic [2:0] offset [LINES];
  logic all_aligned;
  int checks = 0, failures = 0;
  int d [LINES];
  int t = 0;
  bit random_data = 0;

  word_alignment_controller dut (.*);

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
      if (failures < 8) $display("FAIL %s at cycle %0d", what, t);
    end
  endtask

  task automatic step(input int n);
    repeat (n) begin
      ce40 = (t % 8 == 0);
      for (int l = 0; l < LINES; l++)
        lines[l] = random_data ? 1'($urandom) : ALIGN_WORD[7 - ((t - d[l] + 64) % 8)];
      @(posedge clk); #1;
      t++;
    end
  endtask

  task automatic check_offsets(input string what);
    for (int l = 0; l < LINES; l++)
      chk(aligned[l] && offset[l] == 3'((8 - d[l]) % 8), what);
    chk(all_aligned, "all_aligned");
  endtask

  initial begin
    for (int l = 0; l < LINES; l++) d[l] = $urandom % 8;
    random_data = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    align_en = 1;
    step(8 * 20);
    chk(aligned == '0, "no alignment on random data");
    random_data = 0;
    step(8 * 6);
    check_offsets("first alignment");
    align_en = 0;
    for (int l = 0; l < LINES; l++) d[l] = (d[l] + 3) % 8;
    step(8 * 8);
    for (int l = 0; l < LINES; l++) chk(offset[l] == 3'((8 - (d[l] + 5) % 8) % 8), "held");
    align_en = 1;
    step(8 * 6);
    check_offsets("second alignment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
