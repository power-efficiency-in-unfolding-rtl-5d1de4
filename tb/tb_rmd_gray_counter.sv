// Testbench of rmd_gray_counter (defaults: 5 bits, wraps after 19): checks
// the binary value against a plain counter, that the registered Gray code is
// the Gray code of that value, that each increment flips exactly one bit,
// the wrap to zero, hold when en is low, and synchronous clear.
module tb_rmd_gray_counter;
  logic       clk = 1'b0;
  logic       rst_n, clr, en;
  logic [4:0] gray_o, bin_o;
  logic       last_o;
  int checks = 0, failures = 0, wraps = 0;
  int model;

  rmd_gray_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    checks++;
    if (int'(bin_o) != model || gray_o !== (5'(model) ^ (5'(model) >> 1)) ||
        last_o !== (model == 19)) begin
      failures++;
      $display("FAIL model=%0d bin=%0d gray=%b last=%b", model, bin_o, gray_o, last_o);
    end
  endtask

  initial begin
    logic [4:0] g_prev;
    rst_n = 0; clr = 0; en = 0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk();
    for (int n = 0; n < 500; n++) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 60) == 0);
      g_prev = gray_o;
      @(negedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model == 19) begin model = 0; wraps++; end
        else begin
          model++;
          checks++;
          if ($countones(g_prev ^ gray_o) != 1) begin
            failures++; $display("FAIL more than one bit flipped: %b -> %b", g_prev, gray_o);
          end
        end
      end
      chk();
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
