// booth_encoder: radix-4 (modified) Booth encoder for one digit.
//
// Takes three overlapping multiplier bits {q[2i+1], q[2i], q[2i-1]} (with
// q[-1] = 0) and returns the Booth digit d = -2*q[2i+1] + q[2i] + q[2i-1],
// d in {-2,-1,0,+1,+2}, as sign plus one-hot magnitude:
//   000,111 -> 0   001,010 -> +1   011 -> +2   100 -> -2   101,110 -> -1
// Recoding two multiplier bits at a time halves the number of partial products
// compared with radix-2, which is why the document moves to radix 4; the
// encoding itself is the standard one. Combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  triplet,  // {q[2i+1], q[2i], q[2i-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.neg = triplet[2] & ~(triplet[1] & triplet[0]);
    sel.one = triplet[1] ^ triplet[0];
    sel.two = (triplet[2] & ~triplet[1] & ~triplet[0]) | (~triplet[2] & triplet[1] & triplet[0]);
  end

endmodule
