// End-to-end testbench of the four-way unfolded RIPEMD-160 core, at its
// default (and only) configuration.
//
// Hashes the standard test strings ("", "a", "abc", "message digest" and the
// 56-character two-block string) against their published digests, then
// random messages of 0..200 bytes against the reference model in
// tb_rmd_ref_pkg. Every block is written word by word, started, and timed:
// done must come on the 21st rising edge after the start edge and busy must
// be high for 21 cycles. It also exercises and counts: continuation blocks
// (init = 0), a write attempted while busy (must be ignored), wrap-around of
// the Gray-coded round counter (one bit change per increment otherwise).
// Any mechanism never seen counts as a failure.
module tb_ripemd160_unfold4;
  import tb_rmd_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic         start, init, load;
  logic [3:0]   addr;
  logic [31:0]  data_in;
  logic [159:0] hash_rmd;
  logic         done, busy;

  int checks = 0, failures = 0;
  int n_blocks = 0, n_continue = 0, n_locked_write = 0, n_wrap = 0, n_gray_inc = 0;

  ripemd160_unfold4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gray round counter: watch every change.
  logic [4:0] g_prev;
  always @(posedge clk) begin
    g_prev <= dut.u_ctrl.round_gray_o;
    if (rst && g_prev != dut.u_ctrl.round_gray_o) begin
      if (dut.u_ctrl.round_gray_o == 5'd0) n_wrap++;
      else begin
        n_gray_inc++;
        if ($countones(g_prev ^ dut.u_ctrl.round_gray_o) != 1) begin
          failures++;
          $display("FAIL gray step %b -> %b", g_prev, dut.u_ctrl.round_gray_o);
        end
      end
    end
  end

  task automatic check(string what, logic [159:0] got, logic [159:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Stimulus is driven on the falling edge, outputs are sampled there too.
  task automatic write_block(block_t b);
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      load = 1'b1; addr = 4'(w); data_in = b[w];
    end
    @(negedge clk);
    load = 1'b0;
  endtask

  // Start one block and wait for done; check the timing.
  task automatic run_block(bit first, bit try_write);
    int edges = 0, busy_cycles = 0;
    start = 1'b1; init = first;
    @(negedge clk);                 // start taken by the rising edge before
    start = 1'b0; init = 1'b0;
    if (try_write) begin
      // Overwrite word 3 with garbage while busy; must be ignored.
      load = 1'b1; addr = 4'd3; data_in = 32'hdeadbeef;
      n_locked_write++;
    end
    while (!done && edges < 100) begin
      if (busy) busy_cycles++;
      @(negedge clk);
      load = 1'b0;
      edges++;
    end
    // done rises on the 21st rising edge after the one that took start;
    // busy is high for the 20 RUN cycles and the FINAL cycle.
    checks++;
    if (edges != 21) begin
      failures++;
      $display("FAIL latency: done %0d edges after start, expected 21", edges);
    end
    checks++;
    if (busy_cycles != 21) begin
      failures++;
      $display("FAIL busy for %0d cycles, expected 21", busy_cycles);
    end
    n_blocks++;
    if (!first) n_continue++;
  endtask

  task automatic hash_string(string msg, logic [159:0] exp, bit use_exp, bit try_write);
    block_t blocks [$];
    chain_t h;
    pad(msg, blocks);
    iv(h);
    foreach (blocks[i]) begin
      write_block(blocks[i]);
      run_block(i == 0, try_write && i == 0);
      compress(h, blocks[i]);
    end
    check($sformatf("model \"%s\"", msg), hash_rmd, digest(h));
    if (use_exp) check($sformatf("known \"%s\"", msg), hash_rmd, exp);
    // Digest must hold after done.
    repeat (3) @(negedge clk);
    check("digest held", hash_rmd, digest(h));
  endtask

  initial begin
    rst = 1'b0; start = 1'b0; init = 1'b0; load = 1'b0; addr = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check("reset digest", hash_rmd, '0);

    hash_string("", 160'h9c1185a5c5e9fc54612808977ee8f548b2258d31, 1, 0);
    hash_string("a", 160'h0bdc9d2d256b3ee9daae347be6f4dc835a467ffe, 1, 0);
    hash_string("abc", 160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc, 1, 1);
    hash_string("message digest", 160'h5d0689ef49d2fae572b881b123a85ffa21595f36, 1, 0);
    hash_string("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq",
                160'h12a053384a9c0c88e405a06c27dcf49ada62eb2b, 1, 1);
    for (int n = 0; n < 12; n++) begin
      automatic string s = "";
      automatic int len = $urandom_range(0, 200);
      for (int i = 0; i < len; i++) s = {s, string'(8'($urandom_range(32, 126)))};
      hash_string(s, '0, 0, n % 3 == 0);
    end

    checks++; if (n_blocks == 0)       begin failures++; $display("FAIL no block hashed"); end
    checks++; if (n_continue == 0)     begin failures++; $display("FAIL no continuation block"); end
    checks++; if (n_locked_write == 0) begin failures++; $display("FAIL no write while busy"); end
    checks++; if (n_wrap == 0)         begin failures++; $display("FAIL round counter never wrapped"); end
    checks++; if (n_gray_inc == 0)     begin failures++; $display("FAIL round counter never counted"); end
    $display("blocks=%0d continuation=%0d locked_writes=%0d counter_wraps=%0d gray_increments=%0d",
             n_blocks, n_continue, n_locked_write, n_wrap, n_gray_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
