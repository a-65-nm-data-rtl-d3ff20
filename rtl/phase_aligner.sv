// phase_aligner: picks the sampling phase of one 320 Mbps input bitline.
//
// The line is sampled OVS times per core clock period by a multi-phase sampler
// in front of this block (analog, not part of this RTL); samples[0] is the
// earliest phase and samples[OVS-1] the latest. The block counts, over a window
// of WINDOW clock cycles, how often a data transition falls on each of the OVS
// boundaries between neighbouring samples (boundary k lies between samples[k]
// and samples[k+1], boundary OVS-1 between samples[OVS-1] and the next cycle's
// samples[0]). At the end of every window it selects the sample half an eye
// away from the busiest boundary, i.e. index (k + 1 + OVS/2) mod OVS, and
// "locked" rises. Phases only change at window ends, and only when the busiest
// boundary moved, so a stable line gets a stable phase.
//
// The chip description only says that the bitlines are re-synchronised to
// the internal clock with a simplified phase aligner; the oversampling
// factor, the transition-count window and the selection rule are this
// design's choices.
//
// Timing: data_out is registered; it carries samples[phase_sel], one clock
// after the sample. A window with no transition leaves the phase unchanged.
module phase_aligner #(
  parameter int unsigned OVS    = 4,   // samples per bit
  parameter int unsigned WINDOW = 64   // cycles per transition-count window
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [OVS-1:0]         samples,
  output logic                   data_out,
  output logic [$clog2(OVS)-1:0] phase_sel,
  output logic                   locked
);
  localparam int unsigned SW = $clog2(OVS);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic          last_sample;          // samples[OVS-1] of the previous cycle
  logic [CW-1:0] cnt [OVS];
  logic [$clog2(WINDOW)-1:0] win;
  logic [OVS-1:0] edge_at;

  always_comb begin
    for (int k = 0; k < OVS - 1; k++) edge_at[k] = samples[k] ^ samples[k+1];
    edge_at[OVS-1] = last_sample ^ samples[0];
  end

  // Busiest boundary of the window that ends now (counts include this cycle).
  logic [SW-1:0] busiest;
  logic [CW-1:0] best;
  always_comb begin
    busiest = '0;
    best    = '0;
    for (int k = 0; k < OVS; k++) begin
      if (CW'(cnt[k] + CW'(edge_at[k])) > best) begin
        best    = CW'(cnt[k] + CW'(edge_at[k]));
        busiest = SW'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_sample <= 1'b0;
      win         <= '0;
      phase_sel   <= '0;
      locked      <= 1'b0;
      data_out    <= 1'b0;
      for (int k = 0; k < OVS; k++) cnt[k] <= '0;
    end else begin
      last_sample <= samples[OVS-1];
      data_out    <= samples[phase_sel];
      win         <= win + 1'b1;
      if (win == $clog2(WINDOW)'(WINDOW - 1)) begin
        win <= '0;
        for (int k = 0; k < OVS; k++) cnt[k] <= '0;
        // A window without any transition leaves the phase as it is.
        if (best != '0) begin
          phase_sel <= SW'((int'(busiest) + 1 + OVS / 2) % OVS);
          locked    <= 1'b1;
        end
      end else begin
        for (int k = 0; k < OVS; k++) cnt[k] <= cnt[k] + CW'(edge_at[k]);
      end
    end
  end
endmodule
