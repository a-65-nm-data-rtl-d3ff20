// phy_port: phase alignment of all bitlines of one input data path.
//
// One PHY port serves the trigger inputs (8 chips x 5 lines) and a second one
// the L1 inputs (8 chips x 1 line). Each line has its own phase_aligner, so
// every line is re-timed to the core clock independently; the port reports the
// chosen phase of each line and a lock flag that is high once all lines have
// seen transitions and picked a phase.
//
// Interface: samples[l] holds the OVS samples of line l taken during one core
// clock period; data_out[l] is the re-timed bit, one clock later.
module phy_port #(
  parameter int unsigned LINES  = 40,
  parameter int unsigned OVS    = 4,
  parameter int unsigned WINDOW = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [OVS-1:0]         samples  [LINES],
  output logic [LINES-1:0]       data_out,
  output logic [$clog2(OVS)-1:0] phase_sel [LINES],
  output logic                   all_locked
);
  logic [LINES-1:0] locked;

  for (genvar l = 0; l < LINES; l++) begin : g_line
    phase_aligner #(.OVS(OVS), .WINDOW(WINDOW)) u_pa (
      .clk, .rst,
      .samples  (samples[l]),
      .data_out (data_out[l]),
      .phase_sel(phase_sel[l]),
      .locked   (locked[l])
    );
  end

  assign all_locked = &locked;
endmodule
