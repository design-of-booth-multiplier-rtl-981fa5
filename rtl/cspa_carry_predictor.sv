// cspa_carry_predictor: carry predictor of one block adder.
//
// Predicts the block's carry-out from only the K bits next to the block's MSB:
// the prediction is the group generate of those K bits, G[W-1:W-K], i.e. the
// carry those bits would produce with no carry coming into them. The prediction
// can only be wrong when all K bits propagate (P[W-1:W-K] = 1), in which case
// the true carry-out is decided by the lower bits and the block's carry-in.
// Using bits near the MSB follows the document; taking exactly the group
// generate of the top K bits as the predicted carry is this design's reading of
// the correction equation, whose first term is that group generate.
// Purely combinational; its depth grows with K, not with the adder width.
module cspa_carry_predictor #(
  parameter int unsigned W = 4,  // block width x
  parameter int unsigned K = 2   // predictor bits k, 1 <= K <= W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         c_pred,  // predicted carry-out C*out
  output logic         p_top    // all K top bits propagate: prediction is uncertain
);

  logic [K-1:0] p, g;
  logic [K:0]   c;

  assign p    = a[W-1 -: K] ^ b[W-1 -: K];
  assign g    = a[W-1 -: K] & b[W-1 -: K];
  assign c[0] = 1'b0;
  for (genvar i = 0; i < K; i++) begin : g_bit
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end
  assign c_pred = c[K];
  assign p_top  = &p;

endmodule
