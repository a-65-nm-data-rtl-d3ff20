// word_alignment_controller: finds the word boundary of every trigger bitline.
//
// Each trigger line carries 8 bits per BX, but after phase alignment the
// position of the BX word inside the bit stream is unknown. While align_en is
// high the FE chips repeat the 8-bit ALIGN_WORD on every trigger line (word and
// procedure are this design's choice; the design description only requires
// that the payload be aligned to the 40 MHz clock). On every ce40 pulse the
// controller looks at the last 15 bits of each line and tests the 8 possible
// windows; offset o means the word ended o cycles before the ce40 cycle. An
// offset found LOCK_N times in a row on the same line is stored for that line
// and its aligned flag set. A word never matches a rotation of itself, so at
// most one offset matches. When align_en is low the stored offsets are held.
//
// Interface: lines[l] is the phase-aligned bit of line l; offset[l] and
// aligned[l] go to the trigger FE blocks. Stored results change only on ce40.
module word_alignment_controller
  import cic_pkg::*;
#(
  parameter int unsigned LINES  = N_FE * TRIG_LINES,
  parameter int unsigned LOCK_N = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce40,
  input  logic             align_en,
  input  logic [LINES-1:0] lines,
  output logic [2:0]       offset  [LINES],
  output logic [LINES-1:0] aligned,
  output logic             all_aligned
);
  localparam int unsigned CW = $clog2(LOCK_N + 1);

  logic [14:0]   hist [LINES];
  logic [2:0]    cand [LINES];
  logic [CW-1:0] hits [LINES];

  for (genvar l = 0; l < LINES; l++) begin : g_line
    // Window offset that holds ALIGN_WORD in this cycle, if any.
    logic [2:0] found_off;
    logic       found;
    always_comb begin
      found_off = '0;
      found     = 1'b0;
      for (int o = 0; o < 8; o++) begin
        if (hist[l][o +: 8] == ALIGN_WORD) begin
          found_off = 3'(o);
          found     = 1'b1;
        end
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        hist[l]    <= '0;
        cand[l]    <= '0;
        hits[l]    <= '0;
        offset[l]  <= '0;
        aligned[l] <= 1'b0;
      end else begin
        hist[l] <= {hist[l][13:0], lines[l]};
        if (ce40 && align_en) begin
          if (!found) begin
            hits[l] <= '0;
          end else if (found_off != cand[l] || hits[l] == '0) begin
            cand[l] <= found_off;
            hits[l] <= CW'(1);
            if (LOCK_N == 1) begin
              offset[l]  <= found_off;
              aligned[l] <= 1'b1;
            end
          end else if (hits[l] < CW'(LOCK_N)) begin
            hits[l] <= hits[l] + 1'b1;
            if (hits[l] == CW'(LOCK_N - 1)) begin
              offset[l]  <= found_off;
              aligned[l] <= 1'b1;
            end
          end
        end
      end
    end
  end

  assign all_aligned = &aligned;
endmodule
