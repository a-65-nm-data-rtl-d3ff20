// trigger_fe: trigger input block of one FE chip.
//
// Deserialises the chip's 5 trigger lines into one 40-bit word per BX, using
// the per-line word offsets found by the word alignment controller, and
// unpacks it into up to 3 stubs of 18 bits (the 3x18 output of each trigger FE
// block). The 40-bit word layout is this design's own, modelled on a strip
// readout chip:
//
//   word = {line0, line1, line2, line3, line4} (8 bits each, first bit = MSB)
//   word[39:28] stub 0 = {address[7:0], bend[3:0]}
//   word[27:16] stub 1,  word[15:4] stub 2
//   word[0]     FE error flag, word[3:1] unused
//
// A stub slot with address 0 is empty. The aux bits of the stub (extra
// position bits of a pixel-strip module) are zero in this format.
//
// Timing: out_valid is high for one cycle, the cycle after ce40, with the word
// that ended at that ce40.
module trigger_fe
  import cic_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ce40,
  input  logic [TRIG_LINES-1:0] lines,
  input  logic [2:0]            offset [TRIG_LINES],
  output logic                  out_valid,
  output fe_stub_t              stubs  [STUBS_PER_FE],
  output logic                  fe_err
);
  logic [14:0] hist [TRIG_LINES];
  logic [39:0] word;

  // Word ending now, assembled from the aligned window of each line.
  always_comb begin
    for (int l = 0; l < TRIG_LINES; l++)
      word[39 - 8*l -: 8] = hist[l][{1'b0, offset[l]} +: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < TRIG_LINES; l++) hist[l] <= '0;
      out_valid <= 1'b0;
      fe_err    <= 1'b0;
      for (int s = 0; s < STUBS_PER_FE; s++) stubs[s] <= '0;
    end else begin
      for (int l = 0; l < TRIG_LINES; l++) hist[l] <= {hist[l][13:0], lines[l]};
      out_valid <= ce40;
      if (ce40) begin
        fe_err <= word[0];
        for (int s = 0; s < STUBS_PER_FE; s++) begin
          stubs[s].addr  <= word[39 - 12*s -: 8];
          stubs[s].bend  <= word[31 - 12*s -: 4];
          stubs[s].aux   <= '0;
          stubs[s].valid <= (word[39 - 12*s -: 8] != 8'd0);
        end
      end
    end
  end
endmodule
