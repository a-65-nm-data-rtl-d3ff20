// reset_sync: reset stabiliser of the system manager.
//
// RESET_IN is asynchronous to the core clock. It is passed through a chain of
// STAGES flip-flops (two, as drawn in the system-manager diagram) so the
// internal reset asserts and releases on a clock edge. The reset is active
// high at the output; assertion is asynchronous so the core resets even
// without a running clock, release is synchronous after STAGES clock edges.
// The input polarity (active high) is this design's choice.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic reset_in,   // asynchronous, active high
  output logic reset_int   // synchronous release, active high
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge reset_in) begin
    if (reset_in) chain <= '1;
    else          chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign reset_int = chain[STAGES-1];
endmodule
