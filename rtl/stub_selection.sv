// stub_selection: stub register of the trigger path.
//
// Collects the stubs that the 8 trigger FE blocks deliver every BX over one
// 8-BX block (8 chips x 3 stubs x 8 BX = 192 potential stubs), then sorts them
// by the size of their bend and keeps at most NMAX_STUBS. Stubs with smaller
// |bend| come first, so when the block holds more stubs than the register the
// ones with the largest bends are dropped, as the design description requires.
// Within one |bend| value the order is arrival order (BX, chip, slot).
//
// How: a fill buffer of 192 slots takes one BX row per in_valid and a
// histogram counts the stubs of each |bend| value 0..8. When the row of BX 7
// arrives, buffer and histogram are copied to the processing side and the next
// block can fill at once. The sort is a counting sort: one cycle turns the
// histogram into a start position per |bend| value (prefix sums), then one
// row of 24 slots per cycle (8 cycles) is written, each stub to the next free
// position of its |bend| value. Positions at or beyond NMAX_STUBS are not
// written, which drops exactly the stubs with the largest bends. The
// register, with a 27-bit header, is presented as one flat packet of
// HDR_W + SEL_STUB_W * NMAX_STUBS bits (the 23 x NMAX_STUBS + 27 bus between
// stub selection and output formatter).
//
// packet = {header, entry 0, entry 1, ..., entry NMAX_STUBS-1}; unused
// entries are zero. header.nstubs counts the entries, header.ovf is set when
// stubs were dropped, header.fe_err ORs the FE error flags over the block and
// header.block_id counts blocks since the last BC0 (or reset).
//
// Timing: pkt_valid pulses 10 clock cycles after the in_valid of BX 7, and the
// packet stays until the next pulse. bc0 (a fast command) restarts the block:
// the partly filled buffer is dropped and the next in_valid is BX 0 of block 0.
module stub_selection
  import cic_pkg::*;
#(
  parameter int unsigned NMAX = NMAX_STUBS
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     bc0,
  input  logic     in_valid,
  input  fe_stub_t stubs  [N_FE][STUBS_PER_FE],
  input  logic [N_FE-1:0] fe_err,
  output logic     pkt_valid,
  output logic [HDR_W + SEL_STUB_W*NMAX - 1:0] packet
);
  localparam int unsigned ROW   = N_FE * STUBS_PER_FE;   // 24 slots per BX
  localparam int unsigned SLOTS = ROW * BX_PER_BLOCK;    // 192 slots per block
  localparam int unsigned NCLS  = 9;                     // |bend| = 0..8
  localparam int unsigned PW    = 8;                     // position / count width

  // Fill side.
  sel_stub_t        fill      [SLOTS];
  logic [SLOTS-1:0] fill_v;
  logic [PW-1:0]    fill_hist [NCLS];
  logic [2:0]       bx;
  logic [N_FE-1:0]  fill_err;
  logic [11:0]      block_id;

  // Incoming row as register entries, and its |bend| histogram.
  sel_stub_t        row_s    [ROW];
  logic [ROW-1:0]   row_v;
  logic [PW-1:0]    row_hist [NCLS];
  always_comb begin
    for (int k = 0; k < NCLS; k++) row_hist[k] = '0;
    for (int c = 0; c < N_FE; c++)
      for (int s = 0; s < STUBS_PER_FE; s++) begin
        row_s[c*STUBS_PER_FE + s] = '{chip: 3'(c), bx: bx, addr: stubs[c][s].addr,
                                      bend: stubs[c][s].bend, aux: stubs[c][s].aux};
        row_v[c*STUBS_PER_FE + s] = stubs[c][s].valid;
        if (stubs[c][s].valid)
          row_hist[bend_abs(stubs[c][s].bend)] = row_hist[bend_abs(stubs[c][s].bend)] + 1'b1;
      end
  end

  // Processing side.
  typedef enum logic [1:0] {P_IDLE, P_PREP, P_ROWS, P_DONE} pstate_t;
  pstate_t          pst;
  sel_stub_t        proc_s    [SLOTS];
  logic [SLOTS-1:0] proc_v;
  logic [PW-1:0]    proc_hist [NCLS];
  logic [N_FE-1:0]  proc_err;
  logic [11:0]      proc_id;
  logic [2:0]       prow;              // row written this cycle
  logic [PW-1:0]    ptr       [NCLS];  // next position per |bend| value
  logic [PW-1:0]    total;
  sel_stub_t        reg_s     [NMAX];
  sel_stub_t        out_s     [NMAX];  // register as presented on packet
  trig_hdr_t        hdr;

  // Target position of each slot of the row being written.
  sel_stub_t        cur_s    [ROW];
  logic [ROW-1:0]   cur_v;
  logic [PW-1:0]    tgt      [ROW];
  logic [PW-1:0]    ptr_next [NCLS];
  always_comb begin
    for (int k = 0; k < NCLS; k++) ptr_next[k] = ptr[k];
    for (int i = 0; i < ROW; i++) begin
      cur_s[i] = proc_s[int'(prow)*ROW + i];
      cur_v[i] = proc_v[int'(prow)*ROW + i];
      tgt[i]   = ptr_next[bend_abs(cur_s[i].bend)];
      if (cur_v[i])
        ptr_next[bend_abs(cur_s[i].bend)] = ptr_next[bend_abs(cur_s[i].bend)] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fill_v    <= '0;
      bx        <= '0;
      fill_err  <= '0;
      block_id  <= '0;
      pst       <= P_IDLE;
      proc_v    <= '0;
      proc_err  <= '0;
      proc_id   <= '0;
      prow      <= '0;
      total     <= '0;
      pkt_valid <= 1'b0;
      hdr       <= '0;
      for (int k = 0; k < NCLS; k++) begin
        fill_hist[k] <= '0;
        proc_hist[k] <= '0;
        ptr[k]       <= '0;
      end
      for (int i = 0; i < SLOTS; i++) begin
        fill[i]   <= '0;
        proc_s[i] <= '0;
      end
      for (int i = 0; i < NMAX; i++) begin
        reg_s[i] <= '0;
        out_s[i] <= '0;
      end
    end else begin
      pkt_valid <= 1'b0;

      // ---- fill ----
      if (bc0) begin
        fill_v   <= '0;
        fill_err <= '0;
        bx       <= '0;
        block_id <= '0;
        for (int k = 0; k < NCLS; k++) fill_hist[k] <= '0;
      end else if (in_valid) begin
        for (int i = 0; i < ROW; i++) begin
          fill[int'(bx)*ROW + i]   <= row_s[i];
          fill_v[int'(bx)*ROW + i] <= row_v[i];
        end
        for (int k = 0; k < NCLS; k++) fill_hist[k] <= fill_hist[k] + row_hist[k];
        fill_err <= fill_err | fe_err;
        bx       <= bx + 3'd1;
        if (bx == 3'(BX_PER_BLOCK - 1)) begin
          // Block complete: hand it, with this last row, to the processing side.
          for (int i = 0; i < SLOTS - ROW; i++) begin
            proc_s[i] <= fill[i];
            proc_v[i] <= fill_v[i];
          end
          for (int i = 0; i < ROW; i++) begin
            proc_s[SLOTS - ROW + i] <= row_s[i];
            proc_v[SLOTS - ROW + i] <= row_v[i];
          end
          for (int k = 0; k < NCLS; k++) begin
            proc_hist[k] <= fill_hist[k] + row_hist[k];
            fill_hist[k] <= '0;
          end
          proc_err <= fill_err | fe_err;
          proc_id  <= block_id;
          block_id <= block_id + 12'd1;
          fill_err <= '0;
          pst      <= P_PREP;
        end
      end

      // ---- counting sort ----
      case (pst)
        P_PREP: begin
          automatic logic [PW-1:0] acc = '0;
          for (int k = 0; k < NCLS; k++) begin
            ptr[k] <= acc;
            acc    = acc + proc_hist[k];
          end
          total <= acc;
          prow  <= '0;
          pst   <= P_ROWS;
        end
        P_ROWS: begin
          for (int j = 0; j < NMAX; j++)
            for (int i = 0; i < ROW; i++)
              if (cur_v[i] && tgt[i] == PW'(j)) reg_s[j] <= cur_s[i];
          for (int k = 0; k < NCLS; k++) ptr[k] <= ptr_next[k];
          prow <= prow + 3'd1;
          if (prow == 3'(BX_PER_BLOCK - 1)) pst <= P_DONE;
        end
        P_DONE: begin
          for (int i = 0; i < NMAX; i++) out_s[i] <= reg_s[i];
          hdr <= '{fe_err: proc_err, ovf: (total > PW'(NMAX)), block_id: proc_id,
                   nstubs: (total > PW'(NMAX)) ? 6'(NMAX) : 6'(total)};
          pkt_valid <= 1'b1;
          pst       <= P_IDLE;
        end
        default: ;
      endcase
    end
  end

  // Flat packet; entries beyond nstubs read as zero.
  always_comb begin
    packet = '0;
    packet[HDR_W + SEL_STUB_W*NMAX - 1 -: HDR_W] = hdr;
    for (int i = 0; i < NMAX; i++)
      if (i < int'(hdr.nstubs))
        packet[SEL_STUB_W*(NMAX - i) - 1 -: SEL_STUB_W] = out_s[i];
  end
endmodule
