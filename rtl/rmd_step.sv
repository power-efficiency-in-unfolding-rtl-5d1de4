// One RIPEMD-160 step of one line (left or right), purely combinational.
//
// Computes T = rol_s(A + f + X + K) + E, where f is the boolean function
// value f(B, C, D) supplied from outside (the four f values of a clock cycle
// are produced together by rmd_func_parallel), X is the selected message
// word, K the round constant and s the rotate amount. The registers then
// move on as A <= E, E <= D, D <= rol10(C), C <= B, B <= T. Four of these are
// chained per line to form one clock cycle of the unfolded core. The adder
// order (X + K first, then A + f, then both) follows the usual step
// datapath; the result is the same in any order. The A, C and E outputs are
// the shifted inputs by definition of the step and carry no logic.
// The step equations are RIPEMD-160's; taking f as an input, so that the
// parallel function block can compute it, follows the published unfolded
// design.
module rmd_step
  import rmd160_pkg::*;
(
  input  rmd_regs_t  regs_i,  // A..E before the step
  input  word_t      f_i,     // f(B, C, D) for this step
  input  word_t      x_i,     // message word X[m(t)]
  input  word_t      k_i,     // constant K(t)
  input  logic [3:0] s_i,     // rotate amount s(t), 5..15
  output word_t      t_o,     // the new B value T
  output rmd_regs_t  regs_o   // A..E after the step
);

  word_t mk, af, sum;

  always_comb begin
    mk  = x_i + k_i;
    af  = regs_i.a + f_i;
    sum = af + mk;
    t_o = rol(sum, {1'b0, s_i}) + regs_i.e;
    regs_o.a = regs_i.e;
    regs_o.e = regs_i.d;
    regs_o.d = rol10(regs_i.c);
    regs_o.c = regs_i.b;
    regs_o.b = t_o;
  end

endmodule
