// Sequencer of the four-way unfolded RIPEMD-160 core.
//
// A four-state machine whose states are Gray coded, so every transition
// changes one state bit:
//   IDLE  (00)  waits for start; on start the working registers are loaded
//               (init_o) and the round counter is cleared
//   RUN   (01)  20 cycles, one per group of four steps (step_o high); the
//               Gray-coded round counter supplies the cycle index
//   FINAL (11)  one cycle: the chaining value is updated (final_o)
//   DONE  (10)  one cycle: done_o high, the new digest is on the output
// and back to IDLE. busy_o is high from RUN through FINAL. A start pulse is
// taken only in IDLE. done_o rises on the 21st rising edge after the edge
// that takes start. Active-low asynchronous reset.
// Gray coding of every state register follows the published design; the
// states themselves and their sequence are this implementation's choice.
module rmd_control
  import rmd160_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // begin hashing the stored block
  output logic       init_o,    // load working registers this cycle
  output logic       step_o,    // apply four steps this cycle
  output logic       final_o,   // update the chaining value this cycle
  output logic       done_o,    // digest valid (one-cycle pulse)
  output logic       busy_o,    // block in progress
  output logic [4:0] round_o,   // cycle index 0..19, binary
  output logic [4:0] round_gray_o  // cycle index, Gray code as registered
);

  typedef enum logic [1:0] {
    IDLE  = 2'b00,
    RUN   = 2'b01,
    FINAL = 2'b11,
    DONE  = 2'b10
  } state_t;

  state_t state_q, state_d;
  logic   last;

  rmd_gray_counter #(.WIDTH(5), .LAST(ROUNDS - 1)) u_round (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (init_o),
    .en     (step_o),
    .gray_o (round_gray_o),
    .bin_o  (round_o),
    .last_o (last)
  );

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      IDLE:    if (start) state_d = RUN;
      RUN:     if (last)  state_d = FINAL;
      FINAL:   state_d = DONE;
      DONE:    state_d = IDLE;
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= IDLE;
    else        state_q <= state_d;
  end

  assign init_o  = (state_q == IDLE) && start;
  assign step_o  = (state_q == RUN);
  assign final_o = (state_q == FINAL);
  assign done_o  = (state_q == DONE);
  assign busy_o  = (state_q == RUN) || (state_q == FINAL);

  // Gray-coded state: each transition flips exactly one bit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $countones(state_q ^ state_d) <= 1);

endmodule
