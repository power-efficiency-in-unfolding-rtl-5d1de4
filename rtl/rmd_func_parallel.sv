// Parallel boolean-function block of the four-way unfolded RIPEMD-160 core.
//
// One clock cycle runs four steps per line, so four boolean functions per
// line are evaluated together. Only the first of them sees the registered
// B, C, D; the later ones see values the earlier steps of the same cycle
// produce, expressed directly in terms of the step results Ta, Tb, Tc:
//   fa = f(B, C, D)
//   fb = f(Ta, B, rol10(C))
//   fc = f(Tb, Ta, rol10(B))
//   fd = f(Tc, Tb, rol10(Ta))
// and the same for the right line (B1, C1, D1, T1a..T1c). The round input is
// the cycle index 0..19; all four steps of a cycle lie in the same 16-step
// group g = round / 4, so the left line uses f_(g+1) and the right line
// f_(5-g). Combinational; the T inputs come from the rmd_step chain.
// The argument lists of the four functions follow the published unfolded
// design; taking the cycle index as the select is this design's choice.
module rmd_func_parallel
  import rmd160_pkg::*;
(
  input  logic [4:0] round_i,                    // cycle index 0..19
  input  word_t      b_i,  c_i,  d_i,            // left registered B, C, D
  input  word_t      b1_i, c1_i, d1_i,           // right registered B', C', D'
  input  word_t      ta_i,  tb_i,  tc_i,         // left step results a..c
  input  word_t      t1a_i, t1b_i, t1c_i,        // right step results a..c
  output word_t      fa_o,  fb_o,  fc_o,  fd_o,  // left f values, steps a..d
  output word_t      f1a_o, f1b_o, f1c_o, f1d_o  // right f values, steps a..d
);

  logic [2:0] sel_l, sel_r;

  always_comb begin
    sel_l = 3'(round_i >> 2);
    sel_r = 3'd4 - sel_l;
    fa_o  = rmd_f(sel_l, b_i,   c_i,   d_i);
    fb_o  = rmd_f(sel_l, ta_i,  b_i,   rol10(c_i));
    fc_o  = rmd_f(sel_l, tb_i,  ta_i,  rol10(b_i));
    fd_o  = rmd_f(sel_l, tc_i,  tb_i,  rol10(ta_i));
    f1a_o = rmd_f(sel_r, b1_i,  c1_i,  d1_i);
    f1b_o = rmd_f(sel_r, t1a_i, b1_i,  rol10(c1_i));
    f1c_o = rmd_f(sel_r, t1b_i, t1a_i, rol10(b1_i));
    f1d_o = rmd_f(sel_r, t1c_i, t1b_i, rol10(t1a_i));
  end

endmodule
