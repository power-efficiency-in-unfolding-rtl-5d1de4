// Testbench of rmd_kconst: the left and right constants of every cycle index
// 0..19 against the values of the RIPEMD-160 definition.
module tb_rmd_kconst;
  import tb_rmd_ref_pkg::*;

  logic [4:0] round_i;
  w32_t       k_l_o, k_r_o;
  int checks = 0, failures = 0;

  rmd_kconst dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      round_i = 5'(r);
      #1;
      checks += 2;
      if (k_l_o !== kl(4 * r)) begin failures++; $display("FAIL K round %0d: %h", r, k_l_o); end
      if (k_r_o !== kr(4 * r)) begin failures++; $display("FAIL K' round %0d: %h", r, k_r_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
