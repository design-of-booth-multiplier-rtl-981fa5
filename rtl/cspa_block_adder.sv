// cspa_block_adder: one block adder (partial sum generator) of the carry
// speculative adder.
//
// The n-bit adder is cut into blocks that add independently of each other. This
// block adds its W bits of a and b twice, once for a carry-in of 0 (s0) and once
// for a carry-in of 1 (s1), so that the carry into the block only has to select
// between two finished sums. It also reduces its propagate (P = a ^ b) and
// generate (G = a & b) bits to the block's group generate and group propagate,
// g_blk = G[W-1:0] and p_blk = P[W-1:0], which the error detection and the error
// recovery use to form the block's true carry-out g_blk | p_blk & c_in.
// Purely combinational. Splitting the sum from the carry logic follows the
// document; producing both s0 and s1 (carry-select style) is this design's
// choice of how a block adds the carry it is given.
module cspa_block_adder #(
  parameter int unsigned W = 4  // block width x
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,     // a + b,     carry-in 0
  output logic [W-1:0] s1,     // a + b + 1, carry-in 1
  output logic         g_blk,  // block generates a carry-out
  output logic         p_blk   // block propagates its carry-in
);

  logic [W-1:0] p, g;
  logic [W:0]   c0, c1;  // ripple carries for carry-in 0 and 1

  assign p     = a ^ b;
  assign g     = a & b;
  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s0[i]   = p[i] ^ c0[i];
    assign s1[i]   = p[i] ^ c1[i];
    assign c0[i+1] = g[i] | (p[i] & c0[i]);
    assign c1[i+1] = g[i] | (p[i] & c1[i]);
  end

  assign g_blk = c0[W];
  assign p_blk = &p;

endmodule
