// ripemd_addlevel: final addition level of RIPEMD-160.
//
// Combines the block's chaining value h with the round-5 results of the left
// (A..E) and right (A'..E') lines, each output word being a three-operand sum
// with the word rotation of the RIPEMD-160 specification:
//   h0' = h1 + C + D',  h1' = h2 + D + E',  h2' = h3 + E + A',
//   h3' = h4 + A + B',  h4' = h0 + B + C'.
// Combinational.
module ripemd_addlevel
  import ripemd_pkg::*;
(
  input  hash_t  h,
  input  state_t lft,
  input  state_t rgt,
  output hash_t  digest
);

  always_comb begin
    digest[0] = h[1] + lft.c + rgt.d;
    digest[1] = h[2] + lft.d + rgt.e;
    digest[2] = h[3] + lft.e + rgt.a;
    digest[3] = h[4] + lft.a + rgt.b;
    digest[4] = h[0] + lft.b + rgt.c;
  end

endmodule
