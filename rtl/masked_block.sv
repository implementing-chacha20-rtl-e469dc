// masked_block - ChaCha20 block function on masked data (protected cores).
//
// Same organisation as the unprotected iterative block function: the input
// block, given as S share blocks, is copied into INITIAL_STATE and STATE;
// NUM_QR masked quarter-round units (1 or 4) work through the 80 quarter
// rounds with a START_QR / DONE_QR handshake per step, fed by word
// multiplexers that pick the words of the current QR slots; then sixteen
// masked adders add INITIAL_STATE to STATE in one pass. done pulses once and
// block_out (STATE) stays valid until the next start. No share is ever
// recombined here. The sixteen parallel final adders are this
// implementation's choice.
module masked_block
  import chacha20_pkg::*;
  import mask_pkg::*;
#(
  parameter mask_e       SCHEME = MASK_TI,
  parameter int unsigned NUM_QR = 4,
  localparam int unsigned S = num_shares(SCHEME)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t block_in [S],
  output logic   done,
  output state_t block_out [S]
);
  localparam int unsigned STEPS = 8 / NUM_QR;
  localparam int unsigned OPW = (STEPS > 1) ? $clog2(STEPS) : 1;

  state_t state [S], initial_state [S];
  logic [3:0] double_round;
  logic [OPW-1:0] operation;
  logic started, finalize, fin_start, completed, start_qr, qr_busy;
  logic [NUM_QR-1:0] qdone;
  logic [15:0] fdone;
  logic [31:0] qa [NUM_QR][S], qb [NUM_QR][S], qc [NUM_QR][S], qd [NUM_QR][S];
  logic [31:0] ra [NUM_QR][S], rb [NUM_QR][S], rc [NUM_QR][S], rd [NUM_QR][S];
  logic [31:0] fa [16][S], fb [16][S], fr [16][S];
  state_t written [S];

  initial begin
    assert (NUM_QR == 1 || NUM_QR == 4) else $fatal(1, "NUM_QR must be 1 or 4");
  end

  always_comb begin
    for (int s = 0; s < S; s++) written[s] = state[s];
    for (int q = 0; q < NUM_QR; q++) begin
      int unsigned sl;
      sl = 32'(operation) * NUM_QR + q;
      for (int s = 0; s < S; s++) begin
        qa[q][s] = state[s][qr_word(sl, 0)];
        qb[q][s] = state[s][qr_word(sl, 1)];
        qc[q][s] = state[s][qr_word(sl, 2)];
        qd[q][s] = state[s][qr_word(sl, 3)];
        written[s][qr_word(sl, 0)] = ra[q][s];
        written[s][qr_word(sl, 1)] = rb[q][s];
        written[s][qr_word(sl, 2)] = rc[q][s];
        written[s][qr_word(sl, 3)] = rd[q][s];
      end
    end
    for (int i = 0; i < 16; i++)
      for (int s = 0; s < S; s++) begin
        fa[i][s] = state[s][i];
        fb[i][s] = initial_state[s][i];
      end
  end

  for (genvar q = 0; q < NUM_QR; q++) begin : g_qr
    masked_qr #(.SCHEME(SCHEME)) u_qr (
      .clk, .rst_n, .start(start_qr),
      .in_a(qa[q]), .in_b(qb[q]), .in_c(qc[q]), .in_d(qd[q]),
      .done(qdone[q]),
      .out_a(ra[q]), .out_b(rb[q]), .out_c(rc[q]), .out_d(rd[q]));
  end

  for (genvar i = 0; i < 16; i++) begin : g_fin
    masked_add #(.SCHEME(SCHEME)) u_add (
      .clk, .rst_n, .start(fin_start), .a(fa[i]), .b(fb[i]), .done(fdone[i]), .r(fr[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++) begin state[s] <= '0; initial_state[s] <= '0; end
      double_round <= '0;
      operation <= '0;
      started <= 1'b0;
      finalize <= 1'b0;
      fin_start <= 1'b0;
      completed <= 1'b0;
      start_qr <= 1'b0;
      qr_busy <= 1'b0;
    end else begin
      completed <= 1'b0;
      start_qr <= 1'b0;
      fin_start <= 1'b0;
      if (!started) begin
        if (start) begin
          state <= block_in;
          initial_state <= block_in;
          double_round <= '0;
          operation <= '0;
          started <= 1'b1;
          finalize <= 1'b0;
          start_qr <= 1'b1;
          qr_busy <= 1'b1;
        end
      end else if (finalize) begin
        if (&fdone) begin
          for (int s = 0; s < S; s++)
            for (int i = 0; i < 16; i++) state[s][i] <= fr[i][s];
          started <= 1'b0;
          finalize <= 1'b0;
          completed <= 1'b1;
        end
      end else if (qr_busy && (&qdone)) begin
        state <= written;
        if (32'(operation) == STEPS - 1) begin
          operation <= '0;
          double_round <= double_round + 4'd1;
        end else begin
          operation <= operation + OPW'(1);
        end
        if (double_round == 4'd9 && 32'(operation) == STEPS - 1) begin
          qr_busy <= 1'b0;
          finalize <= 1'b1;
          fin_start <= 1'b1;
        end else begin
          start_qr <= 1'b1;
        end
      end
    end
  end

  assign done = completed;
  assign block_out = state;
endmodule
