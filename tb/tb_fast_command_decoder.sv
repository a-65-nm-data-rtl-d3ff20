// tb_fast_command_decoder: self-checking test of fast command frame recovery.
//
// Random junk bits are followed by idle frames "110 0000 1"; lock must be
// reached within six of them (four if the junk left no false candidate).
// Then frames "110 FR L1A CAL BC0 1" with random command flags follow;
// frame_end must be high exactly in the cycle after each frame's last bit,
// with the frame's commands, bit_phase must be 7 there, and never elsewhere.
// Four broken frames must then drop the lock, and the decoder must lock again
// on a new, shifted frame phase.
module tb_fast_command_decoder;
  import cic_pkg::*;
  logic clk = 0, rst = 1, fc_in = 0;
  logic locked, frame_end;
  logic [2:0] bit_phase;
  fcmd_t cmd;
  int checks = 0, failures = 0;

  fast_command_decoder dut (.*);

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

  // Send one frame; decoded = frame expected on the output.
  task automatic send_frame(input logic [7:0] f, input bit decoded);
    for (int b = 7; b >= 0; b--) begin
      fc_in = f[b];
      @(posedge clk); #1;
      if (decoded && b == 0) begin
        chk(frame_end && bit_phase == 3'd7, "frame_end at frame end");
        chk(cmd == fcmd_t'(f[4:1]), "command value");
      end else if (decoded) begin
        chk(!frame_end, "no frame_end inside a frame");
      end
    end
  endtask

  localparam logic [7:0] IDLE = 8'b110_0000_1;

  function automatic logic [7:0] rnd_frame();
    return {3'b110, 4'($urandom), 1'b1};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3 + $urandom % 8) begin
      fc_in = 1'($urandom);
      @(posedge clk); #1;
    end
    for (int i = 0; i < 6; i++) send_frame(IDLE, 0);
    chk(locked, "locked after idle frames");
    for (int i = 0; i < 40; i++) send_frame(rnd_frame(), 1);
    for (int i = 0; i < 4; i++) send_frame(8'h00, 0);
    chk(!locked, "lock lost after four bad frames");
    // shifted phase
    repeat (3) begin
      fc_in = 0;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 4; i++) send_frame(IDLE, 0);
    chk(locked, "locked again");
    for (int i = 0; i < 40; i++) send_frame(rnd_frame(), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
