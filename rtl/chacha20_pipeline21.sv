// chacha20_pipeline21 - 21-stage ChaCha20 block-function pipeline.
//
// Stages 1..20 are one round each, column and diagonal alternating (stage 1
// column, stage 2 diagonal, ...), each followed by a 512-bit register. Stage
// 21 adds the initial state of the block leaving stage 20 and registers the
// finished 512-bit keystream block on state_out. The whole pipeline moves one
// stage when `run` is high, so after 21 moves the first block is out and
// afterwards every move delivers a new block. A valid bit travels with each
// block; `flush` clears them all. The caller supplies, with each move, the
// initial state of the block that leaves stage 20 (initial_state); this keeps
// the initial states out of the stage registers. The column/diagonal order
// and the final adder position follow the design; the valid bits and flush
// are this implementation's additions.
module chacha20_pipeline21
  import chacha20_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  logic   flush,
  input  logic   valid_in,
  input  state_t state_in,
  input  state_t initial_state,
  output logic   valid_out,
  output state_t state_out
);
  state_t stage_q [NUM_ROUNDS];
  state_t stage_d [NUM_ROUNDS];
  logic [NUM_ROUNDS-1:0] stage_v;
  state_t sum;

  for (genvar k = 0; k < NUM_ROUNDS; k++) begin : g_stage
    chacha20_round u_round (
      .diag(1'(k % 2)),
      .state_in(k == 0 ? state_in : stage_q[k == 0 ? 0 : k-1]),
      .state_out(stage_d[k])
    );
  end

  always_comb begin
    for (int i = 0; i < 16; i++) sum[i] = stage_q[NUM_ROUNDS-1][i] + initial_state[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_v <= '0;
      valid_out <= 1'b0;
    end else if (flush) begin
      stage_v <= '0;
      valid_out <= 1'b0;
    end else if (run) begin
      stage_v <= {stage_v[NUM_ROUNDS-2:0], valid_in};
      valid_out <= stage_v[NUM_ROUNDS-1];
    end
  end

  // datapath registers: no reset needed, qualified by the valid bits
  always_ff @(posedge clk) begin
    if (run) begin
      for (int k = 0; k < NUM_ROUNDS; k++) stage_q[k] <= stage_d[k];
      state_out <= sum;
    end
  end
endmodule
