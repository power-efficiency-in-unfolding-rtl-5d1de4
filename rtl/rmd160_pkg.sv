// RIPEMD-160 constants, tables and helper functions shared by the
// four-way unfolded hash core.
//
// Holds the initial chaining value, the ten round constants (five per line),
// the message-word order and rotate amounts of all 80 steps for both lines,
// the five boolean functions and the rotate/byte-swap helpers. All values are
// those of the RIPEMD-160 definition. The tables are indexed by step number
// t = 0..79. The register set of one line (A..E) is bundled in rmd_regs_t.
package rmd160_pkg;

  typedef logic [31:0] word_t;

  // Working registers of one line.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } rmd_regs_t;

  // Chaining value H0..H4 has the same shape.
  typedef rmd_regs_t rmd_chain_t;

  localparam int unsigned STEPS      = 80;  // steps per line
  localparam int unsigned UNFOLD     = 4;   // steps per clock cycle
  localparam int unsigned ROUNDS     = STEPS / UNFOLD;  // 20 cycles per block
  localparam int unsigned MSG_WORDS  = 16;  // 32-bit words per 512-bit block

  localparam word_t IV0 = 32'h67452301;
  localparam word_t IV1 = 32'hefcdab89;
  localparam word_t IV2 = 32'h98badcfe;
  localparam word_t IV3 = 32'h10325476;
  localparam word_t IV4 = 32'hc3d2e1f0;
  localparam rmd_chain_t IV = '{a: IV0, b: IV1, c: IV2, d: IV3, e: IV4};

  // Constants per 16-step group, left line K and right line K'.
  localparam word_t K_L [5] = '{32'h00000000, 32'h5A827999, 32'h6ED9EBA1,
                                32'h8F1BBCDC, 32'hA953FD4E};
  localparam word_t K_R [5] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3,
                                32'h7A6D76E9, 32'h00000000};

  // Message-word index m(t), left line.
  localparam logic [3:0] M_L [80] = '{
     0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15,
     7,  4, 13,  1, 10,  6, 15,  3, 12,  0,  9,  5,  2, 14, 11,  8,
     3, 10, 14,  4,  9, 15,  8,  1,  2,  7,  0,  6, 13, 11,  5, 12,
     1,  9, 11, 10,  0,  8, 12,  4, 13,  3,  7, 15, 14,  5,  6,  2,
     4,  0,  5,  9,  7, 12,  2, 10, 14,  1,  3,  8, 11,  6, 15, 13};

  // Message-word index m'(t), right line.
  localparam logic [3:0] M_R [80] = '{
     5, 14,  7,  0,  9,  2, 11,  4, 13,  6, 15,  8,  1, 10,  3, 12,
     6, 11,  3,  7,  0, 13,  5, 10, 14, 15,  8, 12,  4,  9,  1,  2,
    15,  5,  1,  3,  7, 14,  6,  9, 11,  8, 12,  2, 10,  0,  4, 13,
     8,  6,  4,  1,  3, 11, 15,  0,  5, 12,  2, 13,  9,  7, 10, 14,
    12, 15, 10,  4,  1,  5,  8,  7,  6,  2, 13, 14,  0,  3,  9, 11};

  // Rotate amount s(t), left line.
  localparam logic [3:0] S_L [80] = '{
    11, 14, 15, 12,  5,  8,  7,  9, 11, 13, 14, 15,  6,  7,  9,  8,
     7,  6,  8, 13, 11,  9,  7, 15,  7, 12, 15,  9, 11,  7, 13, 12,
    11, 13,  6,  7, 14,  9, 13, 15, 14,  8, 13,  6,  5, 12,  7,  5,
    11, 12, 14, 15, 14, 15,  9,  8,  9, 14,  5,  6,  8,  6,  5, 12,
     9, 15,  5, 11,  6,  8, 13, 12,  5, 12, 13, 14, 11,  8,  5,  6};

  // Rotate amount s'(t), right line.
  localparam logic [3:0] S_R [80] = '{
     8,  9,  9, 11, 13, 15, 15,  5,  7,  7,  8, 11, 14, 14, 12,  6,
     9, 13, 15,  7, 12,  8,  9, 11,  7,  7, 12,  7,  6, 15, 13, 11,
     9,  7, 15, 11,  8,  6,  6, 14, 12, 13,  5, 14, 13, 13,  7,  5,
    15,  5,  8, 11, 14, 14,  6, 14,  6,  9, 12,  9, 12,  5, 15,  8,
     8,  5, 12,  9, 12,  5, 14,  6,  8, 13,  6,  5, 15, 13, 11, 11};

  // Left rotate by a variable amount (0..31).
  function automatic word_t rol(input word_t x, input logic [4:0] n);
    return (x << n) | (x >> (6'd32 - {1'b0, n}));
  endfunction

  // Fixed ten-place left rotate used for the D register.
  function automatic word_t rol10(input word_t x);
    return {x[21:0], x[31:22]};
  endfunction

  // Boolean function f_(sel+1): sel = 0..4 selects f1..f5.
  function automatic word_t rmd_f(input logic [2:0] sel,
                                  input word_t b, input word_t c, input word_t d);
    unique case (sel)
      3'd0:    return b ^ c ^ d;
      3'd1:    return (b & c) | (~b & d);
      3'd2:    return (b | ~c) ^ d;
      3'd3:    return (b & d) | (c & ~d);
      default: return b ^ (c | ~d);
    endcase
  endfunction

  // Reverse the byte order of a 32-bit word.
  function automatic word_t bswap(input word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

endpackage
