// l1_output_formatter: merges the 8 L1 FIFOs into one sparsified event frame.
//
// When every L1 FE FIFO holds at least one event, the oldest entry of each is
// taken (they belong to the same L1-accept) and merged into one output frame.
// Strip-type FE chips send every hit bit, so the formatter sparsifies: it finds
// clusters of adjacent hit bits and sends only their position and width. The
// output frame size therefore depends on the number of hits, up to
// MAX_CLUSTERS (127) clusters per event; further clusters are dropped and the
// trunc bit is set.
//
// Entry layout (this design's choice, within the 797-bit entry):
//   {err[1:0], l1id[8:0], hits[785:0]}, hits[i] = hit on channel i
// Output frame, sent MSB first on l1_out, line idle at 0:
//   header 36 bits = {2'b11, err of chips 7..0 (2 bits each), l1id of chip 0,
//                     l1id mismatch, trunc, nclusters[6:0]}
//   then nclusters x 16-bit cluster_t = {chip, first channel, width - 1}
// A cluster is at most 8 channels wide; a longer run of hits becomes several
// clusters.
//
// How: the 8 entries are copied into hit registers in one cycle and the FIFOs
// popped. Then one cluster is found per cycle (lowest set hit bit of the
// current chip, its run length, bits cleared), a chip without hits left costs
// one cycle, and clusters are stored in a 127-entry buffer. Then the header and
// clusters are shifted out, one bit per cycle, followed by one idle 0.
//
// Timing: the entries are taken in the first cycle in which no FIFO is empty;
// fifo_rd pulses in the next cycle, and for an event with n clusters the
// first header bit is on l1_out n + 8 cycles after that pulse. The frame then
// takes 36 + 16*n cycles, plus one idle cycle before the next event.
module l1_output_formatter
  import cic_pkg::*;
#(
  parameter int unsigned ENTRY_W = L1_ENTRY_W,
  parameter int unsigned MAXC    = MAX_CLUSTERS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_FE-1:0]    fifo_empty,
  input  logic [ENTRY_W-1:0] fifo_rdata [N_FE],
  output logic [N_FE-1:0]    fifo_rd,
  output logic               l1_out,
  output logic               busy,
  output logic [15:0]        events_cnt   // events sent (wraps)
);
  localparam int unsigned HITS  = ENTRY_W - 11;
  localparam int unsigned AW    = $clog2(HITS);
  localparam int unsigned HDR_L = 36;
  localparam int unsigned CW    = $clog2(MAXC + 1);

  typedef enum logic [1:0] {S_IDLE, S_FIND, S_EMIT} state_t;

  state_t            state;
  logic [HITS-1:0]   hits [N_FE];
  logic [2:0]        chip;
  logic [15:0]       errs;
  logic [8:0]        l1id;
  logic              mismatch;
  logic              trunc;
  cluster_t          cbuf [MAXC];
  logic [CW-1:0]     ncl;
  logic [CW:0]       emit_idx;    // 0 = header, k = cluster k-1, ncl+1 = idle bit
  logic [HDR_L-1:0]  osr;
  logic [5:0]        obits;

  // Lowest hit of the current chip, its run length and the bits it covers.
  logic              found;
  logic [AW-1:0]     first;
  logic [2:0]        wm1;
  logic [HITS-1:0]   covered;
  always_comb begin
    found   = 1'b0;
    first   = '0;
    for (int i = HITS - 1; i >= 0; i--)
      if (hits[chip][i]) begin
        found = 1'b1;
        first = AW'(i);
      end
    wm1     = '0;
    covered = '0;
    if (found) begin
      automatic logic run = 1'b1;
      covered[first] = 1'b1;
      for (int k = 1; k < 8; k++) begin
        if (run && int'(first) + k < HITS && hits[chip][int'(first) + k]) begin
          wm1 = 3'(k);
          covered[int'(first) + k] = 1'b1;
        end else begin
          run = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      chip       <= '0;
      errs       <= '0;
      l1id       <= '0;
      mismatch   <= 1'b0;
      trunc      <= 1'b0;
      ncl        <= '0;
      emit_idx   <= '0;
      osr        <= '0;
      obits      <= '0;
      fifo_rd    <= '0;
      events_cnt <= '0;
      for (int c = 0; c < N_FE; c++) hits[c] <= '0;
      for (int i = 0; i < MAXC; i++) cbuf[i] <= '0;
    end else begin
      fifo_rd <= '0;
      case (state)
        S_IDLE: begin
          if (fifo_empty == '0) begin
            automatic logic mm = 1'b0;
            for (int c = 0; c < N_FE; c++) begin
              hits[c]          <= fifo_rdata[c][HITS-1:0];
              errs[2*c +: 2]   <= fifo_rdata[c][ENTRY_W-1 -: 2];
              if (fifo_rdata[c][ENTRY_W-3 -: 9] != fifo_rdata[0][ENTRY_W-3 -: 9]) mm = 1'b1;
            end
            l1id     <= fifo_rdata[0][ENTRY_W-3 -: 9];
            mismatch <= mm;
            fifo_rd  <= '1;
            chip     <= '0;
            ncl      <= '0;
            trunc    <= 1'b0;
            state    <= S_FIND;
          end
        end
        S_FIND: begin
          if (found) begin
            hits[chip] <= hits[chip] & ~covered;
            if (ncl < CW'(MAXC)) begin
              cbuf[ncl] <= '{chip: chip, addr: 10'(first), width: wm1};
              ncl       <= ncl + 1'b1;
            end else begin
              trunc <= 1'b1;
            end
          end else if (chip == 3'(N_FE - 1)) begin
            state    <= S_EMIT;
            osr      <= {2'b11, errs, l1id, mismatch, trunc, 7'(ncl)};
            obits    <= 6'(HDR_L);
            emit_idx <= '0;
          end else begin
            chip <= chip + 3'd1;
          end
        end
        default: begin  // S_EMIT
          osr   <= osr << 1;
          obits <= obits - 6'd1;
          if (obits == 6'd1) begin
            if (emit_idx < $bits(emit_idx)'(ncl)) begin
              osr      <= {cbuf[emit_idx[CW-1:0]], 20'd0};
              obits    <= 6'(CLUSTER_W);
              emit_idx <= emit_idx + 1'b1;
            end else if (emit_idx == $bits(emit_idx)'(ncl)) begin
              osr      <= '0;          // one idle bit closes the frame
              obits    <= 6'd1;
              emit_idx <= emit_idx + 1'b1;
            end else begin
              state      <= S_IDLE;
              events_cnt <= events_cnt + 16'd1;
            end
          end
        end
      endcase
    end
  end

  assign l1_out = (state == S_EMIT) ? osr[HDR_L-1] : 1'b0;
  assign busy   = (state != S_IDLE);
endmodule
