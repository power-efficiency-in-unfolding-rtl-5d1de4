// Final combination step of RIPEMD-160 (combinational).
//
// After 80 steps the chaining value H0..H4 is mixed with the left registers
// A..E and the right registers A'..E' in rotated order:
//   H0' = H1 + C + D'    H1' = H2 + D + E'    H2' = H3 + E + A'
//   H3' = H4 + A + B'    H4' = H0 + B + C'
// The new chaining value feeds the next block. digest_o is the same value in
// the usual printed byte order: RIPEMD-160 stores each word little-endian, so
// every word is byte-swapped and H0 comes first (bits 159:128).
// The mixing order and the byte-order conversion of the output follow the
// published design and the RIPEMD-160 definition.
module rmd_hash_update
  import rmd160_pkg::*;
(
  input  rmd_chain_t   h_i,       // chaining value before the block
  input  rmd_regs_t    left_i,    // left line A..E after step 79
  input  rmd_regs_t    right_i,   // right line A'..E' after step 79
  output rmd_chain_t   h_o,       // chaining value after the block
  output logic [159:0] digest_o   // h_o as a printed digest
);

  always_comb begin
    h_o.a = h_i.b + left_i.c + right_i.d;
    h_o.b = h_i.c + left_i.d + right_i.e;
    h_o.c = h_i.d + left_i.e + right_i.a;
    h_o.d = h_i.e + left_i.a + right_i.b;
    h_o.e = h_i.a + left_i.b + right_i.c;
    digest_o = {bswap(h_o.a), bswap(h_o.b), bswap(h_o.c), bswap(h_o.d), bswap(h_o.e)};
  end

endmodule
