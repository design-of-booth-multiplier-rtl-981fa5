// cspa_valid_ctrl: variable-latency control of the carry speculative adder.
//
// Produces VALID, the signal that tells the input side an addition is complete
// and lets the operand registers fetch the next pair. An addition whose
// speculation is right (ER = 0) completes in its first cycle. One with ER = 1
// is not valid in its first cycle; the operands are held, the recovery logic
// gets a second cycle, and VALID rises in that second cycle:
//   valid = !er | second,   second <= er & !second   (while er is set).
// The one-bit state 'second' marks the second cycle of a recovered addition.
// VALID from ER back to the operand-register enables follows the block diagram;
// the state bit and its reset value are this design's choices.
module cspa_valid_ctrl (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic er,      // speculation error on the current operands
  output logic valid,   // addition complete this cycle; operands load at this edge
  output logic second   // this is the second (recovery) cycle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) second <= 1'b0;
    else        second <= er & ~second;
  end

  assign valid = ~er | second;

endmodule
