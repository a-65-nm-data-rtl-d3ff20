// clk_enable_gen: clock dividers of the system manager, as clock enables.
//
// The core runs on the 320 MHz clock. The slower clocks of the chip (40 MHz
// core/BX clock, 160 MHz PHY clock, 20 MHz) are produced here as one-cycle
// enable pulses of the 320 MHz clock instead of separate gated clocks, which
// keeps the RTL in one clock domain (this design's choice). A 4-bit counter
// counts 320 MHz cycles; while the fast command decoder is locked, every frame
// end forces the counter phase so that ce40 coincides with it, which is how
// the 40 MHz reference follows the fast command sync pattern. Without lock the
// counter keeps running with its last phase.
//
// Timing: ce40 is high one cycle in 8, in the same cycle as frame_end once
// aligned; ce160 every second cycle; ce20 one cycle in 16, on every second
// ce40 pulse.
module clk_enable_gen (
  input  logic clk,
  input  logic rst,
  input  logic fc_locked,
  input  logic frame_end,
  output logic ce40,
  output logic ce160,
  output logic ce20
);
  logic [3:0] cnt;
  logic [3:0] cnt_now;

  // Counter value of this cycle, forced to the frame phase when locked.
  always_comb begin
    cnt_now = cnt;
    if (fc_locked && frame_end) cnt_now = {cnt[3], 3'd7};
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt_now + 4'd1;
  end

  assign ce40  = (cnt_now[2:0] == 3'd7);
  assign ce160 = cnt_now[0];
  assign ce20  = (cnt_now == 4'd15);
endmodule
