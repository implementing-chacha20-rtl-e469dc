// chacha20_block - ChaCha20 block function with 1 or 4 quarter-round units.
//
// On start the 512-bit input block is copied into INITIAL_STATE and STATE.
// The 20 rounds are then computed in place in STATE: NUM_QR QR units are fed
// through multiplexers that pick the words of the current QR slots
// (OPERATION register) and their results are written back to the same
// words. With four units a whole column or diagonal round is one step; with
// one unit a round is four steps. DOUBLE_ROUND counts the ten double rounds.
// After the last round STATE <= STATE + INITIAL_STATE and done pulses for one
// cycle; block_out (STATE) then stays valid until the next start.
//
// QR_SEQ = 0 uses the combinatorial QR (one step per clock: 20 cycles of
// rounds with 4 units, 80 with 1). QR_SEQ = 1 uses the sequential QR with
// SEQ_WIDTH-bit components and a START_QR / DONE_QR handshake per step
// (8*32/SEQ_WIDTH + 2 cycles per step).
// Timing with the defaults: start sampled in cycle 0, done high in cycle 22.
// The register set follows the design's block diagram; the exact cycle
// accounting, reset and the start-while-busy rule (ignored) are this
// implementation's choices. With QR_SEQ = 0 the START_QR register drives
// nothing (the combinatorial units need no start), so lint reports it unused.
module chacha20_block
  import chacha20_pkg::*;
#(
  parameter int unsigned NUM_QR    = 4,   // 1 or 4
  parameter bit          QR_SEQ    = 1'b0,
  parameter int unsigned SEQ_WIDTH = 32   // 32, 16 or 8 (only with QR_SEQ)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t block_in,
  output logic   done,
  output state_t block_out
);
  localparam int unsigned STEPS = 8 / NUM_QR;   // steps per double round
  localparam int unsigned OPW = (STEPS > 1) ? $clog2(STEPS) : 1;

  state_t state, initial_state;
  logic [3:0] double_round;
  logic [OPW-1:0] operation;
  logic started, completed, finalize;
  logic start_qr, qr_busy;

  word_t qa[NUM_QR], qb[NUM_QR], qc[NUM_QR], qd[NUM_QR];
  word_t ra[NUM_QR], rb[NUM_QR], rc[NUM_QR], rd[NUM_QR];
  logic [NUM_QR-1:0] qdone;
  logic step_done;
  state_t written;

  initial begin
    assert (NUM_QR == 1 || NUM_QR == 4) else $fatal(1, "NUM_QR must be 1 or 4");
  end

  // QR input multiplexers and write-back
  always_comb begin
    written = state;
    for (int q = 0; q < NUM_QR; q++) begin
      int unsigned s;
      s = 32'(operation) * NUM_QR + q;
      qa[q] = state[qr_word(s, 0)];
      qb[q] = state[qr_word(s, 1)];
      qc[q] = state[qr_word(s, 2)];
      qd[q] = state[qr_word(s, 3)];
    end
    for (int q = 0; q < NUM_QR; q++) begin
      int unsigned s;
      s = 32'(operation) * NUM_QR + q;
      written[qr_word(s, 0)] = ra[q];
      written[qr_word(s, 1)] = rb[q];
      written[qr_word(s, 2)] = rc[q];
      written[qr_word(s, 3)] = rd[q];
    end
  end

  for (genvar q = 0; q < NUM_QR; q++) begin : g_qr
    if (QR_SEQ) begin : g_seq
      chacha20_qr_seq #(.WIDTH(SEQ_WIDTH)) u_qr (
        .clk, .rst_n, .start(start_qr),
        .in_a(qa[q]), .in_b(qb[q]), .in_c(qc[q]), .in_d(qd[q]),
        .done(qdone[q]),
        .out_a(ra[q]), .out_b(rb[q]), .out_c(rc[q]), .out_d(rd[q])
      );
    end else begin : g_comb
      chacha20_qr u_qr (
        .in_a(qa[q]), .in_b(qb[q]), .in_c(qc[q]), .in_d(qd[q]),
        .out_a(ra[q]), .out_b(rb[q]), .out_c(rc[q]), .out_d(rd[q])
      );
      assign qdone[q] = 1'b1;
    end
  end

  // all units run in lock step and finish together
  assign step_done = QR_SEQ ? (qr_busy && (&qdone)) : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      initial_state <= '0;
      double_round <= '0;
      operation <= '0;
      started <= 1'b0;
      completed <= 1'b0;
      finalize <= 1'b0;
      start_qr <= 1'b0;
      qr_busy <= 1'b0;
    end else begin
      completed <= 1'b0;
      start_qr <= 1'b0;
      if (!started) begin
        if (start) begin
          state <= block_in;
          initial_state <= block_in;
          double_round <= '0;
          operation <= '0;
          started <= 1'b1;
          finalize <= 1'b0;
          start_qr <= QR_SEQ;
          qr_busy <= QR_SEQ;
        end
      end else if (finalize) begin
        for (int i = 0; i < 16; i++) state[i] <= state[i] + initial_state[i];
        started <= 1'b0;
        finalize <= 1'b0;
        completed <= 1'b1;
      end else if (step_done) begin
        state <= written;
        if (32'(operation) == STEPS - 1) begin
          operation <= '0;
          double_round <= double_round + 4'd1;
          if (double_round == 4'd9) finalize <= 1'b1;
        end else begin
          operation <= operation + OPW'(1);
        end
        // next step of a sequential QR: START_QR again unless this was the last
        if (QR_SEQ) begin
          qr_busy <= !(double_round == 4'd9 && 32'(operation) == STEPS - 1);
          start_qr <= !(double_round == 4'd9 && 32'(operation) == STEPS - 1);
        end
      end
    end
  end

  assign done = completed;
  assign block_out = state;
endmodule
