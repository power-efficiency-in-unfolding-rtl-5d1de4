// Testbench of rmd_func_parallel: for every cycle index 0..19 and random
// register and step-result values, the eight f values are compared with the
// boolean functions evaluated here for the matching step of each line.
module tb_rmd_func_parallel;
  import tb_rmd_ref_pkg::*;

  logic [4:0] round_i;
  w32_t b_i, c_i, d_i, b1_i, c1_i, d1_i, ta_i, tb_i, tc_i, t1a_i, t1b_i, t1c_i;
  w32_t fa_o, fb_o, fc_o, fd_o, f1a_o, f1b_o, f1c_o, f1d_o;
  int checks = 0, failures = 0;

  rmd_func_parallel dut (.*);

  function automatic w32_t r10(w32_t x); return (x << 10) | (x >> 22); endfunction

  task automatic chk(string what, w32_t got, w32_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s round %0d: %h exp %h", what, round_i, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int n = 0; n < 400; n++) begin
      round_i = 5'(n % 20);
      {b_i, c_i, d_i, b1_i, c1_i, d1_i} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      {ta_i, tb_i, tc_i, t1a_i, t1b_i, t1c_i} = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      t = 4 * int'(round_i);
      chk("fa", fa_o, fstep(t, b_i, c_i, d_i));
      chk("fb", fb_o, fstep(t + 1, ta_i, b_i, r10(c_i)));
      chk("fc", fc_o, fstep(t + 2, tb_i, ta_i, r10(b_i)));
      chk("fd", fd_o, fstep(t + 3, tc_i, tb_i, r10(ta_i)));
      chk("f1a", f1a_o, fstep(79 - t, b1_i, c1_i, d1_i));
      chk("f1b", f1b_o, fstep(78 - t, t1a_i, b1_i, r10(c1_i)));
      chk("f1c", f1c_o, fstep(77 - t, t1b_i, t1a_i, r10(b1_i)));
      chk("f1d", f1d_o, fstep(76 - t, t1c_i, t1b_i, r10(t1a_i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
