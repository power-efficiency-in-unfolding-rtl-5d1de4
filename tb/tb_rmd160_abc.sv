// Workload testbench: the single-block message "abc", driven the way a host
// would, with the core at its default configuration.
//
// Writes the padded block (X[0] = 32'h80636261, X[14] = 32'h18, all other
// words zero) in 16 cycles, pulses start with init, and waits for done. It
// checks the digest 8eb208f7e05d987a9b044a8e98c6b087f15a0bfc and the total
// cycle count from the first write to done (16 + 1 + 21 = 38), and prints
// the resulting bits per cycle (512 / 38) used in throughput estimates.
module tb_rmd160_abc;
  logic         clk = 1'b0;
  logic         rst, start, init, load;
  logic [3:0]   addr;
  logic [31:0]  data_in;
  logic [159:0] hash_rmd;
  logic         done, busy;
  int checks = 0, failures = 0;

  ripemd160_unfold4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    rst = 1'b0; start = 1'b0; init = 1'b0; load = 1'b0; addr = '0; data_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b1;
    cycles = 0;
    for (int w = 0; w < 16; w++) begin
      load = 1'b1; addr = 4'(w);
      data_in = (w == 0) ? 32'h80636261 : (w == 14) ? 32'h00000018 : 32'h0;
      @(negedge clk);
      cycles++;
    end
    load = 1'b0;
    start = 1'b1; init = 1'b1;
    @(negedge clk);
    cycles++;
    start = 1'b0; init = 1'b0;
    while (!done && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (hash_rmd !== 160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc) begin
      failures++;
      $display("FAIL digest %h", hash_rmd);
    end
    checks++;
    if (cycles != 38) begin
      failures++;
      $display("FAIL %0d cycles from first write to done, expected 38", cycles);
    end
    $display("abc: digest %h after %0d cycles, %0d.%02d bits per cycle",
             hash_rmd, cycles, 512 / cycles, (51200 / cycles) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
