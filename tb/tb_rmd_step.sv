// Testbench of rmd_step: random register sets, f values, message words,
// constants and rotate amounts 5..15; the expected next registers are
// computed here with a shift-based rotate.
module tb_rmd_step;
  import rmd160_pkg::*;

  rmd_regs_t  regs_i, regs_o;
  word_t      f_i, x_i, k_i, t_o;
  logic [3:0] s_i;
  int checks = 0, failures = 0;

  rmd_step dut (.*);

  function automatic word_t rl(word_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_t;
    for (int n = 0; n < 2000; n++) begin
      regs_i = {$urandom, $urandom, $urandom, $urandom, $urandom};
      f_i = $urandom; x_i = $urandom; k_i = $urandom;
      s_i = 4'($urandom_range(5, 15));
      #1;
      exp_t = rl(regs_i.a + f_i + x_i + k_i, int'(s_i)) + regs_i.e;
      checks++;
      if (t_o !== exp_t || regs_o.b !== exp_t || regs_o.a !== regs_i.e ||
          regs_o.e !== regs_i.d || regs_o.c !== regs_i.b ||
          regs_o.d !== {regs_i.c[21:0], regs_i.c[31:22]}) begin
        failures++;
        if (failures < 10) $display("FAIL step n=%0d t=%h exp %h", n, t_o, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
