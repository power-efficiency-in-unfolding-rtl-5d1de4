// Step coder of the four-way unfolded RIPEMD-160 core.
//
// For the cycle index round (0..19) it returns, for each of the four steps
// t = 4*round + j (j = 0..3) and for both lines, one byte that packs the
// message-word index and the rotate amount: code = {m(t), s(t)} on the left
// and {m'(t), s'(t)} on the right. Packing both fields into one value keeps
// the step selection to a single table lookup per step. Combinational.
// Round values above 19 return the codes of round 19.
// Combining message index and rotate amount in one value follows the
// published design; the bit layout {m, s} is this design's choice.
module rmd_coder
  import rmd160_pkg::*;
(
  input  logic [4:0]       round_i,  // cycle index 0..19
  output logic [3:0][7:0]  code_l_o, // left  {m, s} for steps j = 0..3
  output logic [3:0][7:0]  code_r_o  // right {m', s'} for steps j = 0..3
);

  logic [4:0] r;
  logic [6:0] t;

  always_comb begin
    r = (round_i > 5'd19) ? 5'd19 : round_i;
    for (int j = 0; j < 4; j++) begin
      t = 7'(4 * int'(r) + j);
      code_l_o[j] = {M_L[t], S_L[t]};
      code_r_o[j] = {M_R[t], S_R[t]};
    end
  end

endmodule
