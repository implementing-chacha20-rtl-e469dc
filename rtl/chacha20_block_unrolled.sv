// chacha20_block_unrolled - ChaCha20 block function with UNROLL rounds
// cascaded combinatorially, so that one clock computes UNROLL rounds and a
// block takes 20/UNROLL clocks of rounds (UNROLL = 2, 4, 5, 10 or 20).
//
// On start the input block is copied into STATE and INITIAL_STATE. Each
// clock the chain of UNROLL round units takes STATE and the round number
// (which tells each unit whether it is a column or a diagonal round) and
// STATE is overwritten with the chain output. After round 20 STATE <= STATE +
// INITIAL_STATE and done pulses for one cycle; block_out then stays valid
// until the next start. Timing: start sampled in cycle 0, done high in cycle
// 20/UNROLL + 2. The design runs this block on a slower clock of its own;
// here it shares the cipher's clock and the long combinatorial path is
// left to the clock constraint.
module chacha20_block_unrolled
  import chacha20_pkg::*;
#(
  parameter int unsigned UNROLL = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t block_in,
  output logic   done,
  output state_t block_out
);
  state_t state, initial_state;
  state_t chain [UNROLL+1];
  logic [4:0] round_in;
  logic started, finalize, completed;

  initial begin
    assert (NUM_ROUNDS % UNROLL == 0) else $fatal(1, "UNROLL must divide 20");
  end

  assign chain[0] = state;
  for (genvar i = 0; i < UNROLL; i++) begin : g_round
    logic diag_i;   // odd rounds are diagonal rounds
    assign diag_i = round_in[0] ^ 1'(i % 2);
    chacha20_round u_round (
      .diag(diag_i), .state_in(chain[i]), .state_out(chain[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      initial_state <= '0;
      round_in <= '0;
      started <= 1'b0;
      finalize <= 1'b0;
      completed <= 1'b0;
    end else begin
      completed <= 1'b0;
      if (!started) begin
        if (start) begin
          state <= block_in;
          initial_state <= block_in;
          round_in <= '0;
          started <= 1'b1;
          finalize <= 1'b0;
        end
      end else if (finalize) begin
        for (int i = 0; i < 16; i++) state[i] <= state[i] + initial_state[i];
        started <= 1'b0;
        finalize <= 1'b0;
        completed <= 1'b1;
      end else begin
        state <= chain[UNROLL];
        round_in <= round_in + 5'(UNROLL);
        if (32'(round_in) + UNROLL == NUM_ROUNDS) finalize <= 1'b1;
      end
    end
  end

  assign done = completed;
  assign block_out = state;
endmodule
