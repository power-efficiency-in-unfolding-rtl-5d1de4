// Testbench of rmd_message: fills the store with random words, reads all
// eight ports at random indices against a shadow copy, and checks that
// writes with lock high leave the store unchanged.
module tb_rmd_message;
  import rmd160_pkg::*;

  logic            clk = 1'b0;
  logic            load, lock;
  logic [3:0]      addr;
  word_t           data_in;
  logic [3:0][3:0] idx_l_i, idx_r_i;
  word_t           x_l_o [4];
  word_t           x_r_o [4];
  word_t           shadow [16];
  int checks = 0, failures = 0, locked = 0;

  rmd_message dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int n = 0; n < 20; n++) begin
      for (int j = 0; j < 4; j++) begin
        idx_l_i[j] = 4'($urandom);
        idx_r_i[j] = 4'($urandom);
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if (x_l_o[j] !== shadow[idx_l_i[j]]) begin failures++; $display("FAIL left port %0d", j); end
        if (x_r_o[j] !== shadow[idx_r_i[j]]) begin failures++; $display("FAIL right port %0d", j); end
      end
    end
  endtask

  initial begin
    load = 0; lock = 0; addr = 0; data_in = 0; idx_l_i = '0; idx_r_i = '0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        load = 1; addr = 4'(w); data_in = $urandom; shadow[w] = data_in;
      end
      @(negedge clk);
      load = 0;
      read_all();
      // Locked writes must be ignored.
      lock = 1;
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        load = 1; addr = 4'(w); data_in = $urandom;
        locked++;
      end
      @(negedge clk);
      load = 0; lock = 0;
      read_all();
    end
    checks++;
    if (locked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
