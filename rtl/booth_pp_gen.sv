// booth_pp_gen: radix-4 Booth partial-product generator.
//
// Forms digit * mcand for a signed W-bit multiplicand and a Booth digit in
// {-2..+2}: it selects mcand or 2*mcand (W+1 bits, sign-extended), negates the
// selection in two's complement when the digit is negative, sign-extends the
// result to the 2W-bit product width and shifts it left by 2*idx, the weight of
// digit idx. The output is ready to be added to the running product.
// The negation is done here in full (invert and add one), so the adder that
// accumulates the partial products needs no carry-in; this is this design's
// choice. Combinational.
module booth_pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned W = 8   // multiplicand width (even, at least 4)
) (
  input  logic [W-1:0]           mcand,  // signed multiplicand
  input  booth_sel_t             sel,
  input  logic [$clog2(W/2+1)-1:0] idx,  // digit position, weight 4**idx
  output logic [2*W-1:0]         pp      // partial product, two's complement
);

  logic signed [W+1:0]   mag;   // mcand or 2*mcand
  logic signed [W+1:0]   val;
  logic        [2*W-1:0] ext;

  always_comb begin
    if (sel.two)      mag = {mcand[W-1], mcand, 1'b0};
    else if (sel.one) mag = {{2{mcand[W-1]}}, mcand};
    else              mag = '0;
    val = sel.neg ? (~mag + 1'b1) : mag;
    ext = {{(W-2){val[W+1]}}, val};
    pp  = ext << (2 * idx);
  end

endmodule
