// Reference model of RIPEMD-160 for the testbenches.
//
// A plain step-by-step software model: its own copies of the step tables
// (typed as hex digit strings, one character per step), the five boolean
// functions by step number, a compression function over one 16-word block
// and a helper that pads a byte string into blocks. It shares nothing with
// the RTL package, so a table error in either shows up as a mismatch.
package tb_rmd_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        block_t [16];
  typedef w32_t        chain_t [5];

  // One hex digit per step, 80 per string.
  localparam string RL =
    {"0123456789abcdef", "74d1a6f3c0952eb8", "3ae49f812706db5c", "19ba08c4d37fe562", "40597c2ae138b6fd"};
  localparam string RR =
    {"5e7092b4d6f81a3c", "6b370d5aef8c4912", "f5137e69b8c2a04d", "86413bf05c2d97ae", "cfa4158762de039b"};
  function automatic int hexval(byte c);
    if (c >= "0" && c <= "9") return int'(c) - 48;
    return int'(c) - 87;
  endfunction

  // Rotate tables as integer arrays.
  localparam int SHL [80] = '{
    11,14,15,12,5,8,7,9,11,13,14,15,6,7,9,8,
    7,6,8,13,11,9,7,15,7,12,15,9,11,7,13,12,
    11,13,6,7,14,9,13,15,14,8,13,6,5,12,7,5,
    11,12,14,15,14,15,9,8,9,14,5,6,8,6,5,12,
    9,15,5,11,6,8,13,12,5,12,13,14,11,8,5,6};
  localparam int SHR [80] = '{
    8,9,9,11,13,15,15,5,7,7,8,11,14,14,12,6,
    9,13,15,7,12,8,9,11,7,7,12,7,6,15,13,11,
    9,7,15,11,8,6,6,14,12,13,5,14,13,13,7,5,
    15,5,8,11,14,14,6,14,6,9,12,9,12,5,15,8,
    8,5,12,9,12,5,14,6,8,13,6,5,15,13,11,11};

  function automatic w32_t rotl(w32_t x, int n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  // f_j for step j (0..79), left-line numbering.
  function automatic w32_t fstep(int j, w32_t x, w32_t y, w32_t z);
    if (j < 16) return x ^ y ^ z;
    if (j < 32) return (x & y) | (~x & z);
    if (j < 48) return (x | ~y) ^ z;
    if (j < 64) return (x & z) | (y & ~z);
    return x ^ (y | ~z);
  endfunction

  function automatic w32_t kl(int j);
    case (j / 16)
      0: return 32'h00000000; 1: return 32'h5a827999; 2: return 32'h6ed9eba1;
      3: return 32'h8f1bbcdc; default: return 32'ha953fd4e;
    endcase
  endfunction

  function automatic w32_t kr(int j);
    case (j / 16)
      0: return 32'h50a28be6; 1: return 32'h5c4dd124; 2: return 32'h6d703ef3;
      3: return 32'h7a6d76e9; default: return 32'h00000000;
    endcase
  endfunction

  function automatic int msg_l(int j); return hexval(RL[j]); endfunction
  function automatic int msg_r(int j); return hexval(RR[j]); endfunction

  function automatic void iv(output chain_t h);
    h = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0};
  endfunction

  function automatic void compress(ref chain_t h, input block_t x);
    w32_t al, bl, cl, dl, el, ar, br, cr, dr, er, t;
    chain_t hn;
    al = h[0]; bl = h[1]; cl = h[2]; dl = h[3]; el = h[4];
    ar = h[0]; br = h[1]; cr = h[2]; dr = h[3]; er = h[4];
    for (int j = 0; j < 80; j++) begin
      t  = rotl(al + fstep(j, bl, cl, dl) + x[msg_l(j)] + kl(j), SHL[j]) + el;
      al = el; el = dl; dl = rotl(cl, 10); cl = bl; bl = t;
      t  = rotl(ar + fstep(79 - j, br, cr, dr) + x[msg_r(j)] + kr(j), SHR[j]) + er;
      ar = er; er = dr; dr = rotl(cr, 10); cr = br; br = t;
    end
    hn[0] = h[1] + cl + dr;
    hn[1] = h[2] + dl + er;
    hn[2] = h[3] + el + ar;
    hn[3] = h[4] + al + br;
    hn[4] = h[0] + bl + cr;
    h = hn;
  endfunction

  // Pad a byte string (MD4-family padding, little-endian words).
  function automatic void pad(input string msg, output block_t blocks [$]);
    byte unsigned bytes [$];
    longint unsigned bits;
    block_t b;
    bytes = {};
    for (int i = 0; i < msg.len(); i++) bytes.push_back(msg[i]);
    bits = 64'(msg.len()) * 8;
    bytes.push_back(8'h80);
    while ((bytes.size() % 64) != 56) bytes.push_back(8'h00);
    for (int i = 0; i < 8; i++) bytes.push_back(8'(bits >> (8 * i)));
    blocks = {};
    for (int blk = 0; blk < bytes.size() / 64; blk++) begin
      for (int w = 0; w < 16; w++)
        b[w] = {bytes[blk*64 + 4*w + 3], bytes[blk*64 + 4*w + 2],
                bytes[blk*64 + 4*w + 1], bytes[blk*64 + 4*w]};
      blocks.push_back(b);
    end
  endfunction

  // Chaining value as a printed digest.
  function automatic logic [159:0] digest(chain_t h);
    logic [159:0] d;
    for (int i = 0; i < 5; i++)
      d[159 - 32*i -: 32] = {h[i][7:0], h[i][15:8], h[i][23:16], h[i][31:24]};
    return d;
  endfunction

endpackage
