// cspa_error_recovery: error recovery of the carry speculative adder.
//
// Works out the exact carry out of every block by the block-level ripple
//   C^i = g_blk[i] | p_blk[i] & C^(i-1)           (carry into block 0 is 0)
// which is the correction equation of the document written with the block's
// whole-width group terms. The blocks whose carry-in changed against the
// speculation (fix_block) take the other of their two precomputed partial sums;
// every other block keeps its speculative sum. The result is the exact sum,
// Sum**, and the exact carry-out.
// Purely combinational. Its ripple crosses all M blocks, so it is the long
// path of the adder: the surrounding control gives it a second clock cycle
// (a two-cycle path) and uses its result only when ER is set.
// Blocks are X bits wide except the leftmost, which takes the remaining N-(M-1)X.
module cspa_error_recovery #(
  parameter int unsigned N = 16,          // adder width n
  parameter int unsigned X = 4,           // block width x
  parameter int unsigned M = (N + X - 1) / X
) (
  input  logic [M-1:0] g_blk,
  input  logic [M-1:0] p_blk,
  input  logic [M-1:0] c_pred,     // carries the speculative sum was formed with
  input  logic [N-1:0] s0,         // all blocks' partial sums, carry-in 0
  input  logic [N-1:0] s1,         // all blocks' partial sums, carry-in 1
  input  logic [N-1:0] sum_spec,   // Sum*
  output logic [N-1:0] sum_rec,    // Sum**
  output logic         cout_rec,   // exact carry-out
  output logic [M-1:0] fix_block   // blocks whose partial sum was replaced
);

  logic [M-1:0] c_exact;

  // block-level carry ripple
  assign c_exact[0] = g_blk[0];
  for (genvar i = 1; i < M; i++) begin : g_carry
    assign c_exact[i] = g_blk[i] | (p_blk[i] & c_exact[i-1]);
  end

  // re-select only the blocks whose carry-in was mispredicted
  assign fix_block[0] = 1'b0;
  assign sum_rec[0 +: X] = sum_spec[0 +: X];
  for (genvar i = 1; i < M; i++) begin : g_fix
    localparam int unsigned LO = i * X;
    localparam int unsigned BW = (i == M - 1) ? N - LO : X;
    assign fix_block[i] = c_exact[i-1] ^ c_pred[i-1];
    assign sum_rec[LO +: BW] = !fix_block[i] ? sum_spec[LO +: BW]
                             : c_exact[i-1]  ? s1[LO +: BW] : s0[LO +: BW];
  end

  assign cout_rec = c_exact[M-1];

endmodule
