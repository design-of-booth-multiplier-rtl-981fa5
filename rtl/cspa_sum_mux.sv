// cspa_sum_mux: output multiplexer of the carry speculative adder.
//
// Selects the speculative sum Sum* (input 0) when ER is 0 and the recovered sum
// Sum** (input 1) when ER is 1, with the carry-out alongside. The two inputs and
// their numbering follow the block diagram. Combinational.
module cspa_sum_mux #(
  parameter int unsigned N = 16
) (
  input  logic         er,
  input  logic [N-1:0] sum_spec,   // Sum*
  input  logic         cout_spec,
  input  logic [N-1:0] sum_rec,    // Sum**
  input  logic         cout_rec,
  output logic [N-1:0] sum,
  output logic         cout
);

  always_comb begin
    if (er) {cout, sum} = {cout_rec, sum_rec};
    else    {cout, sum} = {cout_spec, sum_spec};
  end

endmodule
