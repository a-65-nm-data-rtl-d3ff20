// tb_phase_aligner: self-checking test of the input phase aligner.
//
// A random bit stream is turned into 4 samples per bit with the data edge at
// a chosen sample position p (samples before p still show the previous bit);
// one cycle in eight the edge comes one sample late (jitter). After each
// transition-count window the selected phase must be (p + 2) mod 4, the sample
// half a bit away from the edge, and the output bit must equal the bit that
// sample carries. The edge position is then moved and the aligner must follow
// within two windows.
module tb_phase_aligner;
  localparam int OVS = 4, WINDOW = 64;
  logic clk = 0, rst = 1;
  logic [OVS-1:0] samples;
  logic data_out, locked;
  logic [1:0] phase_sel;
  int checks = 0, failures = 0;

  phase_aligner #(.OVS(OVS), .WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_bit = 0, cur_bit = 0;
  logic exp_q;   // expected data_out after the coming edge

  task automatic run(input int p, input int cycles, input bit check);
    for (int t = 0; t < cycles; t++) begin
      int pe;
      prev_bit = cur_bit;
      cur_bit  = 1'($urandom);
      pe = p;
      if (p < OVS - 1 && ($urandom % 8) == 0) pe = p + 1;
      for (int k = 0; k < OVS; k++) samples[k] = (k < pe) ? prev_bit : cur_bit;
      // Sample picked at this edge, seen on data_out right after it.
      exp_q = (int'(phase_sel) >= pe) ? cur_bit : prev_bit;
      @(posedge clk);
      #1;
      if (check) begin
        checks++;
        if (phase_sel != 2'((p + 2) % OVS) || !locked) begin
          failures++;
          if (failures < 5) $display("phase %0d expected %0d", phase_sel, (p + 2) % OVS);
        end
        checks++;
        if (data_out != exp_q) begin
          failures++;
          if (failures < 5) $display("data mismatch at t=%0d", t);
        end
      end
    end
  endtask

  initial begin
    samples = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(1, 2 * WINDOW, 0);
    run(1, 4 * WINDOW, 1);
    run(3, 2 * WINDOW + 2, 0);
    run(3, 4 * WINDOW, 1);
    run(0, 2 * WINDOW + 2, 0);
    run(0, 4 * WINDOW, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
