// stub_output_formatter: builds the trigger output packet and serialises it.
//
// Every 8 BX one packet leaves the chip on the trigger output lines: 6 lines
// (384 bits per 8 BX at 320 Mbps) or, for strip modules that use only 5, 5
// lines (320 bits). The packet is the 27-bit header followed by as many stubs
// from the stub register as fit, in register order (smallest |bend| first). A
// stub takes 23 bits, or 19 when no_bend is set (the bend is left out, the
// mode without bend information). Stubs that do not fit are dropped and the
// header's ovf bit is set; header.nstubs is the number actually sent. With 6
// lines 15 stubs fit (18 without bend), with 5 lines 12 (15 without bend).
// The line count and no_bend are configuration inputs, taken at the start of
// each frame so that a change never splits a frame; the field layout and the
// bit order on the lines are this design's own.
//
// Bit order: the packet is held MSB first; in cycle c of the frame, line l
// carries packet bit (FRAME_MAX-1) - (c*L + l), L being 5 or 6. Unused bits
// are zero, and a frame with no new packet is all zero.
//
// Timing: a frame lasts 64 cycles; its first bits are on the lines two cycles
// after a ce40 pulse (frame_start high), i.e. frames stay on BX boundaries.
// A packet presented with pkt_valid goes out in the next frame that starts
// after it. The lines are driven straight from the frame shift register.
module stub_output_formatter
  import cic_pkg::*;
#(
  parameter int unsigned NMAX = NMAX_STUBS
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce40,
  input  logic       six_lines,   // 1: 6 output lines, 0: 5 lines
  input  logic       no_bend,     // 1: stubs sent without bend
  input  logic       pkt_valid,
  input  logic [HDR_W + SEL_STUB_W*NMAX - 1:0] packet,
  output logic [OUT_LINES_MAX-1:0] trig_out,
  output logic       frame_start  // high while the first bits of a frame are out
);
  localparam int unsigned FRAME_MAX = OUT_LINES_MAX * BITS_PER_BX * BX_PER_BLOCK; // 384
  localparam int unsigned NB_W      = SEL_STUB_W - 4;                             // 19

  logic [HDR_W + SEL_STUB_W*NMAX - 1:0] pend;
  logic                                 pend_v;
  logic [5:0]                           cyc;
  logic [FRAME_MAX-1:0]                 sr;
  logic [FRAME_MAX-1:0]                 frame;
  logic                                 six_q;  // line count of the current frame

  // Packet for the frame that starts now.
  always_comb begin
    trig_hdr_t   h;
    sel_stub_t   s;
    int unsigned w, f, k, nsend, pos;
    h     = pend[HDR_W + SEL_STUB_W*NMAX - 1 -: HDR_W];
    w     = no_bend ? NB_W : SEL_STUB_W;
    f     = six_lines ? FRAME_MAX : FRAME_MAX / OUT_LINES_MAX * (OUT_LINES_MAX - 1);
    k     = (f - HDR_W) / w;
    nsend = (int'(h.nstubs) < k) ? int'(h.nstubs) : k;
    frame = '0;
    s     = '0;
    pos   = 0;
    if (pend_v) begin
      for (int i = 0; i < NMAX; i++) begin
        if (i < nsend) begin
          s   = pend[SEL_STUB_W*(NMAX - i) - 1 -: SEL_STUB_W];
          pos = FRAME_MAX - HDR_W - (i + 1) * w;
          if (no_bend)
            frame |= FRAME_MAX'({s.chip, s.bx, s.addr, s.aux}) << pos;
          else
            frame |= FRAME_MAX'(s) << pos;
        end
      end
      h.ovf    = h.ovf | (int'(h.nstubs) > k);
      h.nstubs = 6'(nsend);
      frame[FRAME_MAX-1 -: HDR_W] = h;
    end
  end

  wire start = (cyc == 6'd63);

  always_ff @(posedge clk) begin
    if (rst) begin
      pend        <= '0;
      pend_v      <= 1'b0;
      cyc         <= '0;
      sr          <= '0;
      six_q       <= 1'b1;
      frame_start <= 1'b0;
    end else begin
      // Cycle counter; ce40 keeps frame boundaries on BX boundaries.
      if (ce40 && cyc[2:0] != 3'd6) cyc <= {cyc[5:3], 3'd7};
      else                          cyc <= cyc + 6'd1;

      frame_start <= start;
      if (start) begin
        sr     <= frame;
        six_q  <= six_lines;
        pend_v <= 1'b0;
      end else if (six_q) begin
        sr <= sr << 6;
      end else begin
        sr <= sr << 5;
      end
      if (pkt_valid) begin
        pend   <= packet;
        pend_v <= 1'b1;
      end
    end
  end

  // The lines show the top L bits of the shift register.
  always_comb begin
    for (int l = 0; l < OUT_LINES_MAX; l++)
      trig_out[l] = (l < OUT_LINES_MAX - 1 || six_q) ? sr[FRAME_MAX-1-l] : 1'b0;
  end
endmodule
