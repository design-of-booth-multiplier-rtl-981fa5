// cspa_operand_reg: the "EN" operand register in front of the carry speculative
// adder (one for A, one for B).
//
// A plain load-enable register: at a rising clock edge with en = 1 it takes d,
// otherwise it holds its value. In the adder, en is the VALID signal, so a new
// operand is fetched only when the previous addition has finished; while an
// error is being recovered the operand is held for the second cycle.
// Timing: q changes one clock edge after d is presented with en = 1.
// Reset (asynchronous, active low) clears q to zero, so that
// the adder starts on 0 + 0, an addition that cannot mispredict. The register
// and its enable follow the block diagram; the reset value is this design's choice.
module cspa_operand_reg #(
  parameter int unsigned W = 16  // operand width
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         en,     // load enable (VALID)
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
