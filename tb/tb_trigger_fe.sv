// tb_trigger_fe: self-checking test of one trigger FE block.
//
// A model FE chip sends one 40-bit word per BX over 5 lines (line l carries
// bits 39-8l..32-8l, first bit = MSB) with a delay of d cycles relative to the
// ce40 pulses at cycles 0 mod 8; the block gets the offsets the word aligner
// would find, (-d) mod 8. Each word holds three stubs with random addresses
// (one in four slots empty, address 0), random bends and a random error flag.
// After every ce40 the block must present, on out_valid, the word that ended
// last before that ce40: its stubs (valid = address non-zero, aux zero) and
// its error flag. Repeated for all eight delays.
module tb_trigger_fe;
  import cic_pkg::*;
  logic clk = 0, rst = 1, ce40 = 0;
  logic [TRIG_LINES-1:0] lines = '0;
  logic [2:0] offset [TRIG_LINES];
  logic out_valid, fe_err;
  fe_stub_t stubs [STUBS_PER_FE];
  int checks = 0, failures = 0;

  trigger_fe dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  logic [39:0] words [0:199];

  function automatic logic [39:0] rnd_word();
    logic [39:0] w;
    for (int s = 0; s < 3; s++) begin
      logic [7:0] a = 8'($urandom);
      if ($urandom % 4 == 0) a = 0;
      w[39 - 12*s -: 12] = {a, 4'($urandom)};
    end
    w[3:0] = {3'b000, 1'($urandom)};
    return w;
  endfunction

  initial begin
    for (int d = 0; d < 8; d++) begin
      int exp_k;
      for (int k = 0; k < 200; k++) words[k] = rnd_word();
      for (int l = 0; l < TRIG_LINES; l++) offset[l] = 3'((8 - d) % 8);
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      exp_k = -1;
      for (int t = 0; t < 8 * 190; t++) begin
        automatic int k = (t - d) / 8, b = (t - d) % 8;
        ce40 = (t % 8 == 0);
        for (int l = 0; l < TRIG_LINES; l++)
          lines[l] = (t >= d) ? words[k][39 - 8*l - b] : 1'b0;
        // Word whose last bit was driven in cycle t-1-offset.
        if (ce40) begin
          automatic int tl = t - 1 - (8 - d) % 8;
          exp_k = (tl - d - 7 >= 0) ? (tl - d - 7) / 8 : -1;
        end
        @(posedge clk); #1;
        if (ce40) begin
          chk(out_valid, "out_valid after ce40");
          if (exp_k >= 2) begin
            for (int s = 0; s < 3; s++) begin
              automatic logic [7:0] a = words[exp_k][39 - 12*s -: 8];
              automatic logic [3:0] bb = words[exp_k][31 - 12*s -: 4];
              chk(stubs[s].valid == (a != 0) && stubs[s].addr == a &&
                  stubs[s].bend == bb && stubs[s].aux == 0, "stub");
            end
            chk(fe_err == words[exp_k][0], "error flag");
          end
        end else begin
          chk(!out_valid, "out_valid only after ce40");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
