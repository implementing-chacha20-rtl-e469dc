// chacha20_round - one combinatorial ChaCha20 round: four QR units side by
// side. With diag=0 it is a column round (QRs on words {0,4,8,12},
// {1,5,9,13}, ...), with diag=1 a diagonal round ({0,5,10,15},
// {1,6,11,12}, ...). The four QRs touch disjoint words, so they work in
// parallel. No register: the unrolled block function chains several of these
// in one clock period and the pipelines put a register after each.
module chacha20_round
  import chacha20_pkg::*;
(
  input  logic   diag,
  input  state_t state_in,
  output state_t state_out
);
  word_t qa[4], qb[4], qc[4], qd[4];
  word_t ra[4], rb[4], rc[4], rd[4];

  for (genvar q = 0; q < 4; q++) begin : g_qr
    chacha20_qr u_qr (
      .in_a(qa[q]), .in_b(qb[q]), .in_c(qc[q]), .in_d(qd[q]),
      .out_a(ra[q]), .out_b(rb[q]), .out_c(rc[q]), .out_d(rd[q])
    );
  end

  always_comb begin
    state_out = state_in;
    for (int q = 0; q < 4; q++) begin
      int unsigned s;
      s = diag ? q + 4 : q;
      qa[q] = state_in[qr_word(s, 0)];
      qb[q] = state_in[qr_word(s, 1)];
      qc[q] = state_in[qr_word(s, 2)];
      qd[q] = state_in[qr_word(s, 3)];
    end
    for (int q = 0; q < 4; q++) begin
      int unsigned s;
      s = diag ? q + 4 : q;
      state_out[qr_word(s, 0)] = ra[q];
      state_out[qr_word(s, 1)] = rb[q];
      state_out[qr_word(s, 2)] = rc[q];
      state_out[qr_word(s, 3)] = rd[q];
    end
  end
endmodule
