// tb_reset_sync: self-checking test of the reset stabiliser.
//
// reset_in is raised between clock edges: reset_int must follow at once,
// without a clock edge. After reset_in falls (again between edges),
// reset_int must stay high for exactly two clock edges and then fall.
// Repeated with several pulse lengths and positions.
module tb_reset_sync;
  logic clk = 0, reset_in = 0, reset_int;
  int checks = 0, failures = 0;

  reset_sync dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_val(input logic v, input string what);
    checks++;
    if (reset_int !== v) begin
      failures++;
      $display("%s: reset_int=%b expected %b at %0t", what, reset_int, v, $time);
    end
  endtask

  initial begin
    reset_in = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      #(2 + $urandom % 3);
      reset_in = 0;
      for (int e = 1; e <= 3; e++) begin
        @(posedge clk); #1;
        expect_val(e >= 2 ? 1'b0 : 1'b1, "release");
      end
      repeat ($urandom % 4) @(posedge clk);
      #(2 + $urandom % 2);
      reset_in = 1;
      #1;
      expect_val(1'b1, "async assert");
      repeat (1 + $urandom % 3) @(posedge clk);
      expect_val(1'b1, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
