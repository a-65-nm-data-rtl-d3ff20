// system_manager: reset, clock timing and fast command decoding of the chip.
//
// It holds the reset stabiliser (reset_sync), the fast command decoder and the
// clock dividers (clk_enable_gen). The internal reset is the synchronised
// RESET_IN; a decoded fast-reset command additionally produces a one-cycle
// datapath reset (fc_reset). Decoded commands are delivered with ce40.
//
// The divide-by-two and clock multiplexer on the clock input (used when the
// chip is clocked at 640 MHz) are not modelled: this core is written for the
// 320 MHz clock only.
//
// Timing: cmd_valid and cmd are high for one cycle, with ce40, in the cycle
// after the last bit of a fast command frame was on fc_in.
module system_manager
  import cic_pkg::*;
(
  input  logic  clk,        // 320 MHz core clock
  input  logic  reset_in,   // asynchronous, active high
  input  logic  fc_in,      // fast command line, 320 Mbps
  output logic  rst,        // internal synchronous reset
  output logic  fc_locked,
  output logic  ce40,
  output logic  ce160,
  output logic  ce20,
  output logic  cmd_valid,
  output fcmd_t cmd
);
  logic       frame_end;
  logic [2:0] bit_phase;
  fcmd_t      cmd_dec;

  reset_sync u_rst (.clk, .reset_in, .reset_int(rst));

  fast_command_decoder u_fcd (
    .clk, .rst, .fc_in,
    .locked(fc_locked), .frame_end, .bit_phase, .cmd(cmd_dec)
  );

  clk_enable_gen u_ceg (
    .clk, .rst, .fc_locked, .frame_end, .ce40, .ce160, .ce20
  );

  assign cmd_valid = frame_end && fc_locked;
  assign cmd       = cmd_valid ? cmd_dec : '0;
endmodule
