// Gray-coded modulo counter used as the round counter of the RIPEMD-160 core.
//
// The count is held in Gray code, so exactly one register bit toggles on
// every increment except on the wrap from LAST back to zero; this keeps the
// switching activity of the counter register low. The binary value is
// decoded combinationally for the table lookups. clr (synchronous) forces the
// count to zero and has priority over en; en advances it by one. last is high
// while the count equals LAST. Active-low asynchronous reset clears the count.
// A Gray-coded round counter follows the published design; the decode,
// clear and wrap behaviour are this design's choices.
module rmd_gray_counter #(
  parameter int unsigned WIDTH = 5,   // counter width
  parameter int unsigned LAST  = 19   // final count before wrapping to 0
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,     // synchronous clear
  input  logic             en,      // count enable
  output logic [WIDTH-1:0] gray_o,  // count, Gray code (registered)
  output logic [WIDTH-1:0] bin_o,   // count, binary (decoded)
  output logic             last_o   // count == LAST
);

  logic [WIDTH-1:0] gray_q, bin, bin_next;

  // Gray to binary: each binary bit is the XOR of all Gray bits above it.
  always_comb begin
    bin[WIDTH-1] = gray_q[WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray_q[i];
    bin_next = (bin == WIDTH'(LAST)) ? '0 : bin + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   gray_q <= '0;
    else if (clr) gray_q <= '0;
    else if (en)  gray_q <= bin_next ^ (bin_next >> 1);
  end

  assign gray_o = gray_q;
  assign bin_o  = bin;
  assign last_o = (bin == WIDTH'(LAST));

endmodule
