// Testbench of rmd_control: after each start pulse, step must be high for
// exactly 20 cycles with cycle indices 0..19 in order, then one final cycle,
// then one done cycle, then idle; every state change must flip one state
// bit. A start pulse while busy must be ignored.
module tb_rmd_control;
  logic       clk = 1'b0;
  logic       rst_n, start;
  logic       init_o, step_o, final_o, done_o, busy_o;
  logic [4:0] round_o, round_gray_o;
  int checks = 0, failures = 0, ignored_starts = 0;

  rmd_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every state change flips exactly one state bit.
  logic [1:0] st_prev;
  always @(posedge clk) begin
    st_prev <= dut.state_q;
    if (rst_n && st_prev != dut.state_q) begin
      checks++;
      if ($countones(st_prev ^ dut.state_q) != 1) begin
        failures++; $display("FAIL state %b -> %b", st_prev, dut.state_q);
      end
    end
  end

  task automatic expect1(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        expect1("idle outputs", !busy_o && !step_o && !done_o && !final_o && !init_o);
      end
      start = 1;
      #1 expect1("init with start", init_o);
      @(negedge clk);
      start = 0;
      for (int r = 0; r < 20; r++) begin
        expect1("step", step_o && busy_o && !final_o && !done_o);
        expect1("round index", int'(round_o) == r);
        expect1("gray index", round_gray_o == (5'(r) ^ (5'(r) >> 1)));
        if (r == 5) begin
          start = 1; ignored_starts++;
          #1 expect1("no init while busy", !init_o);
        end
        @(negedge clk);
        start = 0;
      end
      expect1("final", final_o && busy_o && !step_o && !done_o);
      @(negedge clk);
      expect1("done", done_o && !busy_o && !step_o && !final_o);
      @(negedge clk);
      expect1("back to idle", !done_o && !busy_o);
    end
    expect1("start while busy exercised", ignored_starts > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
