// l1_fe: L1 input block of one FE chip.
//
// After an L1-accept the FE chip sends one frame of its event on its L1 line.
// This block detects the arrival of each frame, deserialises it and stores it
// as one fixed-size entry in a FIFO of 16 events, so that each of the 8 chips
// is received independently of the others. The frame framing is this design's
// choice: the line idles at 0, a frame starts with the two bits "11" and
// is followed by ENTRY_W bits (first bit = MSB of the entry); at least one 0
// must follow a frame before the next one. A frame that arrives while the FIFO
// is full is dropped and counted in dropped_cnt.
//
// Interface: l1_in is the phase-aligned L1 bit. The FIFO side is read by the
// L1 output formatter: rdata is the oldest event (valid when !empty), rd_en
// removes it.
//
// Timing: an entry is in the FIFO (empty falls) two cycles after its last bit
// was on l1_in.
module l1_fe
  import cic_pkg::*;
#(
  parameter int unsigned ENTRY_W = L1_ENTRY_W,
  parameter int unsigned DEPTH   = L1_FIFO_DEPTH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               l1_in,
  input  logic               rd_en,
  output logic [ENTRY_W-1:0] rdata,
  output logic               empty,
  output logic               full,
  output logic [7:0]         frames_cnt,   // frames received (wraps)
  output logic [7:0]         dropped_cnt,  // frames lost to a full FIFO (saturates)
  output logic [$clog2(DEPTH):0] level     // events in the FIFO
);
  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_GAP} state_t;

  state_t               state;
  logic                 prev;
  logic [ENTRY_W-1:0]   sr;
  logic [$clog2(ENTRY_W+1)-1:0] nbits;
  logic                 push;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      prev        <= 1'b0;
      sr          <= '0;
      nbits       <= '0;
      push        <= 1'b0;
      frames_cnt  <= '0;
      dropped_cnt <= '0;
    end else begin
      push <= 1'b0;
      prev <= l1_in;
      case (state)
        S_IDLE: begin
          if (prev && l1_in) begin
            state <= S_CAPTURE;
            nbits <= '0;
          end
        end
        S_CAPTURE: begin
          sr    <= {sr[ENTRY_W-2:0], l1_in};
          nbits <= nbits + 1'b1;
          if (nbits == $bits(nbits)'(ENTRY_W - 1)) begin
            state      <= S_GAP;
            frames_cnt <= frames_cnt + 8'd1;
            if (full) begin
              if (dropped_cnt != 8'hFF) dropped_cnt <= dropped_cnt + 8'd1;
            end else begin
              push <= 1'b1;
            end
          end
        end
        default: begin  // S_GAP: wait for the idle level
          if (!l1_in) begin
            state <= S_IDLE;
            prev  <= 1'b0;
          end
        end
      endcase
    end
  end

  sync_fifo #(.WIDTH(ENTRY_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en(push), .wdata(sr),
    .rd_en(rd_en && !empty), .rdata, .empty, .full, .count(level)
  );
endmodule
