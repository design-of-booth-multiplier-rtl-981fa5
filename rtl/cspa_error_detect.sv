// cspa_error_detect: error detection of the carry speculative adder.
//
// For every block i it recomputes the block's carry-out from the block's own
// group generate/propagate and the *predicted* carry coming into it,
//   C^i = g_blk[i] | p_blk[i] & c_pred[i-1]      (carry into block 0 is 0),
// and compares it with the block's own prediction by an exclusive OR:
//   err_block[i] = C^i ^ c_pred[i].
// er is the OR of all err_block bits. Every term is one block deep, so the
// detection is as fast as the speculative sum itself.
// If no bit is set, all predictions are exact (by induction from block 0, whose
// carry-in is known). If some are set, the lowest set bit is the first block
// whose prediction is really wrong; a higher bit may be a consequence of a
// lower error. The XOR comparison and the ER / ERR_block outputs follow the
// document and its block diagram; comparing against the one-block lookahead
// carry is this design's way of keeping the check short.
module cspa_error_detect #(
  parameter int unsigned M = 4  // number of block adders
) (
  input  logic [M-1:0] g_blk,      // block group generate
  input  logic [M-1:0] p_blk,      // block group propagate
  input  logic [M-1:0] c_pred,     // predicted carry-out of each block
  output logic [M-1:0] err_block,  // ERR_block: block i carry-out mispredicted (or suspect)
  output logic         er          // ER: the speculative sum is not to be trusted
);

  logic [M-1:0] c_chk;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      if (i == 0) c_chk[i] = g_blk[i];
      else        c_chk[i] = g_blk[i] | (p_blk[i] & c_pred[i-1]);
    end
    err_block = c_chk ^ c_pred;
    er        = |err_block;
  end

endmodule
