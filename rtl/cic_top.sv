// cic_top: digital core of the data concentrator (CIC) of a tracker module.
//
// Eight FE chips feed the concentrator over two independent paths, each with
// its own output:
//   trigger path: 5 lines per chip -> phase alignment -> word alignment ->
//     8 trigger FE blocks (3 stubs per chip and BX) -> stub selection (8-BX
//     block, sort by |bend|, keep up to 40) -> output formatter -> 5 or 6
//     lines, one packet per 8 BX;
//   L1 path: 1 line per chip -> phase alignment -> 8 L1 FE blocks (frame
//     detection, 16-event FIFOs) -> L1 output formatter (merge the 8 chips'
//     frames of one event, find clusters) -> 1 line.
// The system manager synchronises the reset, recovers the 40 MHz BX timing
// from the fast command line and decodes its commands (fast reset, L1-accept,
// calibration pulse, BC0). A fast reset clears the data paths (buffers, FIFOs,
// block counter) but keeps the fast command lock, the input phases and the
// word alignment; BC0 restarts the trigger block counter.
//
// All logic runs on the 320 MHz core clock; slower clocks are clock enables.
// Every 320 Mbps line moves one bit per clock. Input lines arrive as OVS
// samples per clock from the multi-phase input sampler. The sLVS receivers and
// drivers, the pads and the I2C slave with its registers are not part of this
// RTL: the configuration that the registers would hold (align_en, six_lines,
// no_bend) comes in on ports.
//
// From the chip description: the two paths and their blocks, 8 chips with 5 trigger
// and 1 L1 line each, 8-BX trigger blocks with up to 40 of 192 stubs kept by
// smallest bend, 5 or 6 output lines, the no-bend mode, 16-event L1 FIFOs of
// 797-bit entries, L1 sparsification into at most 127 clusters, and the
// 40 MHz timing taken from the fast command sync pattern. This design's own:
// every line format and field layout, the alignment and lock rules, and the
// fast reset behaviour above. Only the strip-module (2S) configuration at
// 320 Mbps is built.
//
// Timing: after reset the fast command decoder locks within a few frames, the
// input phases within two 64-cycle windows, and the word alignment four BX
// after the FE chips start sending the alignment word. A trigger packet is
// ready 10 cycles after the last BX of its block reaches the stub selection
// and goes out in the next output frame; an L1 frame goes out as soon as all
// 8 chips' frames of the event are stored. Per-line sample phases,
// per-line alignment flags and the FIFO fill levels stay internal.
module cic_top
  import cic_pkg::*;
#(
  parameter int unsigned OVS = 4
) (
  input  logic           clk,              // 320 MHz core clock
  input  logic           reset_in,         // asynchronous, active high
  input  logic           fast_control_in,  // fast command line, 320 Mbps
  input  logic [OVS-1:0] trig_samples [N_FE*TRIG_LINES],
  input  logic [OVS-1:0] l1_samples   [N_FE],
  // configuration (slow-control registers)
  input  logic           align_en,         // run trigger word alignment
  input  logic           six_lines,        // 6 (1) or 5 (0) trigger output lines
  input  logic           no_bend,          // send stubs without bend
  // outputs
  output logic [OUT_LINES_MAX-1:0] trig_out,
  output logic           l1_out,
  // status
  output logic           fc_locked,
  output logic           trig_phy_locked,
  output logic           l1_phy_locked,
  output logic           words_aligned,
  output logic           cal_pulse,
  output logic           ce20,             // 20 MHz enable for the slow-control block
  output logic [15:0]    l1a_cnt,          // L1-accepts received
  output logic [15:0]    l1_events_cnt,    // L1 frames sent
  output logic [N_FE-1:0] l1_fifo_full,
  output logic [N_FE-1:0] l1_dropped,      // a chip lost a frame to a full FIFO
  output logic           l1_busy,          // L1 formatter is merging or sending
  output logic           trig_frame_start  // first bits of a trigger packet on trig_out
);
  localparam int unsigned NTL = N_FE * TRIG_LINES;

  // ---------------- system manager ----------------
  logic  rst, ce40, ce160, cmd_valid, dp_rst;
  fcmd_t cmd;

  system_manager u_sys (
    .clk, .reset_in, .fc_in(fast_control_in),
    .rst, .fc_locked, .ce40, .ce160, .ce20, .cmd_valid, .cmd
  );

  // Data-path reset: chip reset or fast-reset command.
  always_ff @(posedge clk) begin
    if (rst) begin
      dp_rst    <= 1'b1;
      cal_pulse <= 1'b0;
      l1a_cnt   <= '0;
    end else begin
      dp_rst    <= cmd_valid && cmd.fast_reset;
      cal_pulse <= cmd_valid && cmd.cal_pulse;
      if (cmd_valid && cmd.l1a) l1a_cnt <= l1a_cnt + 16'd1;
    end
  end

  // ---------------- PHY ports ----------------
  logic [NTL-1:0]         trig_bits;
  logic [N_FE-1:0]        l1_bits;
  logic [$clog2(OVS)-1:0] trig_phase [NTL];
  logic [$clog2(OVS)-1:0] l1_phase   [N_FE];

  phy_port #(.LINES(NTL), .OVS(OVS)) u_phy_trig (
    .clk, .rst, .samples(trig_samples), .data_out(trig_bits),
    .phase_sel(trig_phase), .all_locked(trig_phy_locked)
  );

  phy_port #(.LINES(N_FE), .OVS(OVS)) u_phy_l1 (
    .clk, .rst, .samples(l1_samples), .data_out(l1_bits),
    .phase_sel(l1_phase), .all_locked(l1_phy_locked)
  );

  // ---------------- trigger path ----------------
  logic [2:0]     offset [NTL];
  logic [NTL-1:0] aligned;

  word_alignment_controller #(.LINES(NTL)) u_wa (
    .clk, .rst, .ce40, .align_en, .lines(trig_bits),
    .offset, .aligned, .all_aligned(words_aligned)
  );

  fe_stub_t        stubs [N_FE][STUBS_PER_FE];
  logic [N_FE-1:0] fe_valid;
  logic [N_FE-1:0] fe_err;

  for (genvar c = 0; c < N_FE; c++) begin : g_tfe
    logic [2:0] off_c [TRIG_LINES];
    for (genvar l = 0; l < TRIG_LINES; l++) begin : g_off
      assign off_c[l] = offset[c*TRIG_LINES + l];
    end
    trigger_fe u_tfe (
      .clk, .rst(dp_rst), .ce40,
      .lines(trig_bits[c*TRIG_LINES +: TRIG_LINES]), .offset(off_c),
      .out_valid(fe_valid[c]), .stubs(stubs[c]), .fe_err(fe_err[c])
    );
  end

  logic bc0_q;
  always_ff @(posedge clk) begin
    if (rst) bc0_q <= 1'b0;
    else     bc0_q <= cmd_valid && cmd.bc0;
  end

  logic                                      pkt_valid;
  logic [HDR_W + SEL_STUB_W*NMAX_STUBS - 1:0] packet;

  stub_selection u_sel (
    .clk, .rst(dp_rst), .bc0(bc0_q), .in_valid(fe_valid[0]),
    .stubs, .fe_err, .pkt_valid, .packet
  );

  stub_output_formatter u_sof (
    .clk, .rst(dp_rst), .ce40, .six_lines, .no_bend,
    .pkt_valid, .packet, .trig_out, .frame_start(trig_frame_start)
  );

  // ---------------- L1 path ----------------
  logic [L1_ENTRY_W-1:0] l1_rdata [N_FE];
  logic [N_FE-1:0]       l1_empty, l1_rd;

  for (genvar c = 0; c < N_FE; c++) begin : g_l1fe
    logic [7:0] frames_cnt, dropped_cnt;
    logic [$clog2(L1_FIFO_DEPTH):0] level;
    l1_fe u_l1fe (
      .clk, .rst(dp_rst), .l1_in(l1_bits[c]), .rd_en(l1_rd[c]),
      .rdata(l1_rdata[c]), .empty(l1_empty[c]), .full(l1_fifo_full[c]),
      .frames_cnt, .dropped_cnt, .level
    );
    assign l1_dropped[c] = (dropped_cnt != 8'd0);
  end

  l1_output_formatter u_l1of (
    .clk, .rst(dp_rst), .fifo_empty(l1_empty), .fifo_rdata(l1_rdata),
    .fifo_rd(l1_rd), .l1_out, .busy(l1_busy), .events_cnt(l1_events_cnt)
  );
endmodule
