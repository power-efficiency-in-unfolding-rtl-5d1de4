// Testbench of rmd_coder: every cycle index 0..19 (and an out-of-range one)
// against the testbench's own copy of the message-order and rotate tables.
module tb_rmd_coder;
  import tb_rmd_ref_pkg::*;

  logic [4:0]      round_i;
  logic [3:0][7:0] code_l_o, code_r_o;
  int checks = 0, failures = 0;

  rmd_coder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    logic [7:0] el, er;
    for (int r = 0; r < 21; r++) begin
      round_i = 5'(r);
      #1;
      for (int j = 0; j < 4; j++) begin
        t = 4 * (r > 19 ? 19 : r) + j;
        el = {4'(msg_l(t)), 4'(SHL[t])};
        er = {4'(msg_r(t)), 4'(SHR[t])};
        checks += 2;
        if (code_l_o[j] !== el) begin failures++; $display("FAIL left t=%0d %h exp %h", t, code_l_o[j], el); end
        if (code_r_o[j] !== er) begin failures++; $display("FAIL right t=%0d %h exp %h", t, code_r_o[j], er); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
