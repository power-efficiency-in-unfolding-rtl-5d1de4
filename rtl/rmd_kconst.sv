// Round-constant selector of the four-way unfolded RIPEMD-160 core.
//
// Returns the left constant K and the right constant K' for the cycle index
// round (0..19). Every cycle's four steps share one 16-step group
// g = round / 4, so one constant per line and cycle is enough. The right
// constant for group 4 and the left one for group 0 are both zero.
// Combinational. Round values above 19 return the group-4 constants.
// The constants are RIPEMD-160's; the per-cycle lookup is this design's.
module rmd_kconst
  import rmd160_pkg::*;
(
  input  logic [4:0] round_i,  // cycle index 0..19
  output word_t      k_l_o,    // K  (left line)
  output word_t      k_r_o     // K' (right line)
);

  int unsigned g;

  always_comb begin
    g = int'(round_i) / 4;
    if (g > 4) g = 4;
    k_l_o = K_L[g];
    k_r_o = K_R[g];
  end

endmodule
