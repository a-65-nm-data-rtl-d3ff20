// cic_pkg: constants and packed types shared by the concentrator (CIC) core.
//
// The concentrator gathers data from 8 front-end (FE) chips on two independent
// paths: the trigger path (5 bitlines per chip, stubs) and the L1 path (1 bitline
// per chip, full event frames after an L1-accept). All lines run at 320 Mbps,
// i.e. one bit per core clock cycle, and 8 bits per 40 MHz bunch crossing (BX).
//
// Numbers taken from the design description: 8 FE chips, 5 trigger lines and
// 1 L1 line per chip, 6 trigger output lines (5 selectable), 3 stubs of 18 bits
// per chip and BX out of each trigger FE block, 8-BX trigger blocks, up to 40
// stubs forwarded out of 192, a 23-bit stub entry and a 27-bit header in the
// stub register, 797-bit L1 FIFO entries, 16 events per FIFO and 127 clusters
// per L1 event. The field layouts inside those widths are this design's own.
package cic_pkg;

  localparam int unsigned N_FE          = 8;   // FE chips per concentrator
  localparam int unsigned TRIG_LINES    = 5;   // trigger bitlines per FE chip
  localparam int unsigned BITS_PER_BX   = 8;   // 320 Mbps / 40 MHz
  localparam int unsigned BX_PER_BLOCK  = 8;   // trigger block length in BX
  localparam int unsigned STUBS_PER_FE  = 3;   // stubs per chip and BX
  localparam int unsigned OUT_LINES_MAX = 6;   // trigger output bitlines
  localparam int unsigned NMAX_STUBS    = 40;  // stub register size
  localparam int unsigned L1_ENTRY_W    = 797; // L1 FIFO entry / FE frame width
  localparam int unsigned L1_FIFO_DEPTH = 16;  // L1 events per FIFO
  localparam int unsigned MAX_CLUSTERS  = 127; // clusters per L1 event
  localparam int unsigned L1_HITS       = L1_ENTRY_W - 11; // hit bits per FE frame

  // Alignment word each trigger line repeats while word alignment runs.
  localparam logic [7:0] ALIGN_WORD = 8'hEA;

  // Stub as produced by a trigger FE block (18 bits).
  typedef struct packed {
    logic       valid;
    logic [7:0] addr;   // strip / pixel-column address (0 = no stub on the line)
    logic [3:0] bend;   // two's complement bend
    logic [4:0] aux;    // extra position bits, zero for strip modules
  } fe_stub_t;

  // Stub entry of the stub register (23 bits).
  typedef struct packed {
    logic [2:0] chip;   // FE chip index
    logic [2:0] bx;     // BX offset inside the 8-BX block
    logic [7:0] addr;
    logic [3:0] bend;
    logic [4:0] aux;
  } sel_stub_t;

  // Trigger packet header (27 bits).
  typedef struct packed {
    logic [7:0]  fe_err;   // per-chip error flag seen during the block
    logic        ovf;      // stubs were dropped (register or frame full)
    logic [11:0] block_id; // 8-BX block counter, cleared by BC0
    logic [5:0]  nstubs;   // stubs that follow in this packet
  } trig_hdr_t;

  // Decoded fast commands of one BX.
  typedef struct packed {
    logic fast_reset;
    logic l1a;
    logic cal_pulse;
    logic bc0;
  } fcmd_t;

  // One cluster of the sparsified L1 output (16 bits).
  typedef struct packed {
    logic [2:0] chip;
    logic [9:0] addr;   // first hit bit of the cluster
    logic [2:0] width;  // cluster width minus one (1..8 hits)
  } cluster_t;

  localparam int unsigned FE_STUB_W  = $bits(fe_stub_t);   // 18
  localparam int unsigned SEL_STUB_W = $bits(sel_stub_t);  // 23
  localparam int unsigned HDR_W      = $bits(trig_hdr_t);  // 27
  localparam int unsigned CLUSTER_W  = $bits(cluster_t);   // 16

  // Absolute value of a 4-bit two's complement bend (0..8).
  function automatic logic [3:0] bend_abs(input logic [3:0] b);
    return b[3] ? 4'(-b) : b;
  endfunction

endpackage
