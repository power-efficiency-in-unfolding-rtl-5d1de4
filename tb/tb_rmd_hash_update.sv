// Testbench of rmd_hash_update: random chaining values and line registers;
// the new chaining value and the byte-swapped digest are computed here.
module tb_rmd_hash_update;
  import rmd160_pkg::*;

  rmd_chain_t   h_i, h_o;
  rmd_regs_t    left_i, right_i;
  logic [159:0] digest_o;
  int checks = 0, failures = 0;

  rmd_hash_update dut (.*);

  function automatic logic [31:0] sw(logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 4; i++) y[8*i +: 8] = x[8*(3-i) +: 8];
    return y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0, e1, e2, e3, e4;
    for (int n = 0; n < 500; n++) begin
      h_i     = {$urandom, $urandom, $urandom, $urandom, $urandom};
      left_i  = {$urandom, $urandom, $urandom, $urandom, $urandom};
      right_i = {$urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      e0 = h_i.b + left_i.c + right_i.d;
      e1 = h_i.c + left_i.d + right_i.e;
      e2 = h_i.d + left_i.e + right_i.a;
      e3 = h_i.e + left_i.a + right_i.b;
      e4 = h_i.a + left_i.b + right_i.c;
      checks += 2;
      if (h_o !== {e0, e1, e2, e3, e4}) begin failures++; $display("FAIL chain n=%0d", n); end
      if (digest_o !== {sw(e0), sw(e1), sw(e2), sw(e3), sw(e4)}) begin
        failures++; $display("FAIL digest n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
