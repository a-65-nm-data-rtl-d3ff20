// fast_command_decoder: frame recovery and decoding of the fast command line.
//
// The fast command input runs at 320 Mbps, so one 8-bit frame arrives per BX.
// The 40 MHz reference of the chip is recovered from this line by finding a
// fixed sync pattern, as the design description states; the pattern and the
// command encoding are this design's choice:
//
//   frame (first bit on the line first) = 1 1 0 FR L1A CAL BC0 1
//
// i.e. 3 header bits, four command flags (fast reset, L1-accept, calibration
// pulse, bunch-counter zero) and a closing 1. While hunting without a
// candidate phase, a cycle whose last 8 bits match the pattern sets the frame
// phase; LOCK_N matches in a row at 8-cycle spacing declare lock, a miss drops
// the candidate. Once locked, UNLOCK_N bad frames in a row drop the lock and
// the hunt starts again. Lock is acquired on idle frames (no command flag
// set): no rotation of a stream of idle frames matches the pattern, so the
// hunt cannot settle on a wrong phase. A stream that repeats one command
// frame with a 4-bit period (e.g. FR, L1A and CAL all set) could be aliased,
// so commands should only be sent once lock is reported.
//
// Timing: frame_end is high in the cycle the last bit of a frame is shifted
// in (registered, one cycle after that bit is on the input); cmd is valid
// with it, only while locked and only for well-formed frames. bit_phase counts
// 0..7 inside the frame and is 7 with frame_end.
module fast_command_decoder
  import cic_pkg::*;
#(
  parameter int unsigned LOCK_N   = 4,
  parameter int unsigned UNLOCK_N = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       fc_in,
  output logic       locked,
  output logic       frame_end,
  output logic [2:0] bit_phase,
  output fcmd_t      cmd
);
  logic [7:0] sr;
  logic [2:0] cnt;
  logic [$clog2(LOCK_N + 1)-1:0]   good;
  logic [$clog2(UNLOCK_N + 1)-1:0] bad;

  wire [7:0] sr_next = {sr[6:0], fc_in};
  wire       match   = (sr_next[7:5] == 3'b110) && sr_next[0];
  wire       at_end  = (cnt == 3'd6);   // cnt becomes 7 with this bit

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      cnt       <= '0;
      good      <= '0;
      bad       <= '0;
      locked    <= 1'b0;
      frame_end <= 1'b0;
      cmd       <= '0;
    end else begin
      sr        <= sr_next;
      cnt       <= cnt + 3'd1;
      frame_end <= 1'b0;
      cmd       <= '0;
      if (!locked) begin
        if (match && !at_end && good == '0) begin
          cnt  <= 3'd7;         // this bit ends a frame
          good <= 1;
        end else if (match && at_end) begin
          if (good == $bits(good)'(LOCK_N - 1)) begin
            locked <= 1'b1;
            bad    <= '0;
          end else begin
            good <= good + 1'b1;
          end
        end else if (at_end) begin
          good <= '0;
        end
      end else if (at_end) begin
        frame_end <= 1'b1;
        if (match) begin
          bad <= '0;
          cmd <= '{fast_reset: sr_next[4], l1a: sr_next[3],
                   cal_pulse:  sr_next[2], bc0: sr_next[1]};
        end else if (bad == $bits(bad)'(UNLOCK_N - 1)) begin
          locked <= 1'b0;
          good   <= '0;
        end else begin
          bad <= bad + 1'b1;
        end
      end
    end
  end

  assign bit_phase = cnt;
endmodule
