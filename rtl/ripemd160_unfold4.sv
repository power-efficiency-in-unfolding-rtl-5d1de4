// RIPEMD-160 hash core, unfolded by a factor of four, with Gray-coded control.
//
// A 512-bit block is first written into the message store, one 32-bit word
// per cycle (load, addr, data_in). A start pulse then loads the working
// registers of both lines from the chaining value and runs 20 clock cycles;
// each cycle applies four chained steps to the left line and four to the
// right line (80 steps per line in all). One more cycle adds the two lines
// into the chaining value, and the digest appears on hash_rmd with done
// high for one cycle, on the 21st rising edge after the edge that takes
// start. With the 16 load cycles and the start cycle a block takes 38 cycles.
//
// Structure: rmd_coder and rmd_kconst turn the cycle index into the message
// indices, rotate amounts and constants of the four steps; rmd_message
// returns the eight message words; rmd_func_parallel evaluates the eight
// boolean functions, each later one fed by the result of the step before it;
// eight rmd_step instances form the two four-step chains; rmd_hash_update
// forms the new chaining value and the byte-swapped digest. rmd_control
// sequences it all with Gray-coded state and a Gray-coded round counter to
// reduce switching activity.
//
// The four-step unfolding, the chaining of the boolean functions, the Gray
// coding of the control, the module split and the port names clk, rst,
// start, load, addr, data_in and hash_rmd follow the published design. The
// reset polarity, the init/done/busy signals, the write lock and the exact
// cycle sequencing are this implementation's own choices.
//
// Interface: rst is active low and asynchronous. init selects, at start,
// whether the block begins a new message (chaining value = initial value)
// or continues the previous one (chaining value = last result). Message words
// are RIPEMD-160's little-endian words X[i]; writes are ignored while busy.
// hash_rmd holds the digest of the last block in printed byte order (H0 in
// bits 159:128) until the next block finishes; it is zero after reset.
module ripemd160_unfold4
  import rmd160_pkg::*;
(
  input  logic         clk,
  input  logic         rst,       // active-low asynchronous reset
  input  logic         start,     // start hashing the stored block
  input  logic         init,      // with start: first block of a message
  input  logic         load,      // write data_in to message word addr
  input  logic [3:0]   addr,      // message word address 0..15
  input  word_t        data_in,   // message word X[addr]
  output logic [159:0] hash_rmd,  // digest, printed byte order
  output logic         done,      // one-cycle pulse: hash_rmd updated
  output logic         busy       // block in progress
);

  logic       init_c, step_c, final_c;
  logic [4:0] round;

  rmd_control u_ctrl (
    .clk          (clk),
    .rst_n        (rst),
    .start        (start),
    .init_o       (init_c),
    .step_o       (step_c),
    .final_o      (final_c),
    .done_o       (done),
    .busy_o       (busy),
    .round_o      (round),
    .round_gray_o ()
  );

  // ---- step selection --------------------------------------------------
  logic [3:0][7:0] code_l, code_r;
  word_t           k_l, k_r;

  rmd_coder  u_coder  (.round_i(round), .code_l_o(code_l), .code_r_o(code_r));
  rmd_kconst u_kconst (.round_i(round), .k_l_o(k_l), .k_r_o(k_r));

  logic [3:0][3:0] idx_l, idx_r;
  logic [3:0][3:0] s_l, s_r;
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      idx_l[j] = code_l[j][7:4];
      s_l[j]   = code_l[j][3:0];
      idx_r[j] = code_r[j][7:4];
      s_r[j]   = code_r[j][3:0];
    end
  end

  word_t x_l [4];
  word_t x_r [4];

  rmd_message u_msg (
    .clk     (clk),
    .load    (load),
    .lock    (busy),
    .addr    (addr),
    .data_in (data_in),
    .idx_l_i (idx_l),
    .idx_r_i (idx_r),
    .x_l_o   (x_l),
    .x_r_o   (x_r)
  );

  // ---- datapath ----------------------------------------------------------
  rmd_chain_t h_q, h_new, h_start;
  rmd_regs_t  l_q, r_q;
  rmd_regs_t  l1, l2, l3, l4, r1, r2, r3, r4;
  word_t      ta, tb, tc, t1a, t1b, t1c;
  word_t      fa, fb, fc, fd, f1a, f1b, f1c, f1d;
  logic [159:0] digest;

  rmd_func_parallel u_func (
    .round_i (round),
    .b_i  (l_q.b), .c_i  (l_q.c), .d_i  (l_q.d),
    .b1_i (r_q.b), .c1_i (r_q.c), .d1_i (r_q.d),
    .ta_i  (ta),  .tb_i  (tb),  .tc_i  (tc),
    .t1a_i (t1a), .t1b_i (t1b), .t1c_i (t1c),
    .fa_o  (fa),  .fb_o  (fb),  .fc_o  (fc),  .fd_o  (fd),
    .f1a_o (f1a), .f1b_o (f1b), .f1c_o (f1c), .f1d_o (f1d)
  );

  rmd_step u_la (.regs_i(l_q), .f_i(fa), .x_i(x_l[0]), .k_i(k_l), .s_i(s_l[0]), .t_o(ta), .regs_o(l1));
  rmd_step u_lb (.regs_i(l1),  .f_i(fb), .x_i(x_l[1]), .k_i(k_l), .s_i(s_l[1]), .t_o(tb), .regs_o(l2));
  rmd_step u_lc (.regs_i(l2),  .f_i(fc), .x_i(x_l[2]), .k_i(k_l), .s_i(s_l[2]), .t_o(tc), .regs_o(l3));
  rmd_step u_ld (.regs_i(l3),  .f_i(fd), .x_i(x_l[3]), .k_i(k_l), .s_i(s_l[3]), .t_o(), .regs_o(l4));

  rmd_step u_ra (.regs_i(r_q), .f_i(f1a), .x_i(x_r[0]), .k_i(k_r), .s_i(s_r[0]), .t_o(t1a), .regs_o(r1));
  rmd_step u_rb (.regs_i(r1),  .f_i(f1b), .x_i(x_r[1]), .k_i(k_r), .s_i(s_r[1]), .t_o(t1b), .regs_o(r2));
  rmd_step u_rc (.regs_i(r2),  .f_i(f1c), .x_i(x_r[2]), .k_i(k_r), .s_i(s_r[2]), .t_o(t1c), .regs_o(r3));
  rmd_step u_rd (.regs_i(r3),  .f_i(f1d), .x_i(x_r[3]), .k_i(k_r), .s_i(s_r[3]), .t_o(), .regs_o(r4));

  rmd_hash_update u_upd (
    .h_i      (h_q),
    .left_i   (l_q),
    .right_i  (r_q),
    .h_o      (h_new),
    .digest_o (digest)
  );

  assign h_start = init ? IV : h_q;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      h_q      <= IV;
      l_q      <= '0;
      r_q      <= '0;
      hash_rmd <= '0;
    end else begin
      if (init_c) begin
        h_q <= h_start;
        l_q <= h_start;
        r_q <= h_start;
      end else if (step_c) begin
        l_q <= l4;
        r_q <= r4;
      end else if (final_c) begin
        h_q      <= h_new;
        hash_rmd <= digest;
      end
    end
  end

endmodule
