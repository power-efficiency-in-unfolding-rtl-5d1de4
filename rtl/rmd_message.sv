// Message-block store of the four-way unfolded RIPEMD-160 core.
//
// Sixteen 32-bit registers hold one 512-bit message block. A word is written
// on the rising clock edge when load is high: data_in goes to word addr.
// Writes are ignored while the core is hashing (lock high), so the block
// cannot change under a running computation. Eight asynchronous read ports
// (four per line) return the words the coder selects for the four steps of
// the current cycle. Words are the 32-bit values X[0..15] of the RIPEMD-160
// definition, i.e. each word holds four message bytes in little-endian order.
// The store has no reset: a block must be fully written before use.
// The load/addr/data_in write interface follows the published design; the
// write lock, word format and read ports are this design's choices.
module rmd_message
  import rmd160_pkg::*;
#(
  parameter int unsigned WORDS = MSG_WORDS  // 16 words of 32 bits
)(
  input  logic                     clk,
  input  logic                     load,     // write enable
  input  logic                     lock,     // hashing in progress: no writes
  input  logic [$clog2(WORDS)-1:0] addr,     // word address
  input  word_t                    data_in,  // word to write
  input  logic [3:0][$clog2(WORDS)-1:0] idx_l_i,  // left read indices
  input  logic [3:0][$clog2(WORDS)-1:0] idx_r_i,  // right read indices
  output word_t                    x_l_o [4], // left read data
  output word_t                    x_r_o [4]  // right read data
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load && !lock) mem[addr] <= data_in;
  end

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      x_l_o[j] = mem[idx_l_i[j]];
      x_r_o[j] = mem[idx_r_i[j]];
    end
  end

endmodule
