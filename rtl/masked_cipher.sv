// masked_cipher - side-channel protected ChaCha20 cipher on 32-bit words.
//
// Same host interface and command codes as the unprotected cipher (1..3
// nonce, 4..B key, C counter, D text word; ready/done handshake), but all
// key-dependent data inside are Boolean-masked: three shares per bit with
// SCHEME = MASK_TI (threshold implementation), two with MASK_LC (low-cost
// gate-level masking). The 40-bit LFSR bank supplies fresh random bits every
// clock (96 LFSRs for TI, 48 for LC); the encoder splits each incoming word
// with them (TI uses 64 of the bits, LC 32; the remaining LFSR outputs of
// the design's bank are left unused and lint reports them) and only the
// final ciphertext is recombined, by the decoder at the output.
//
// Data path: key and nonce words are encoded on arrival and stored as
// shares. Before each block the four constants and the block counter are
// encoded one per clock (CONSTANTS register), then the masked block function
// runs; the counter itself is public and kept unmasked. The text word of a
// D command is encoded, xored with the masked keystream word in a masked xor
// bank and decoded into REG_OUT. As in the unprotected cipher the next block
// is computed in advance, and key/nonce writes discard it and step the
// counter back. The encoder is shared: host words take precedence over the
// constant encoding. Every D takes a few clocks (encode, xor, decode) and
// `ready` stays low meanwhile. Masking scheme, encoders/decoders at the
// interface and the LFSR bank sizes follow the design; the encoding
// schedule, unmasked counter and handshake are this implementation's.
module masked_cipher
  import chacha20_pkg::*;
  import mask_pkg::*;
#(
  parameter mask_e       SCHEME = MASK_TI,
  parameter int unsigned NUM_QR = 4,
  parameter logic [39:0] SEED   = 40'hA5_C3E1_7B29,
  localparam int unsigned S = num_shares(SCHEME)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] control,
  input  word_t      in,
  output logic       ready,
  output logic       done,
  output word_t      out
);
  localparam int unsigned NRND = (SCHEME == MASK_TI) ? 96 : 48;

  typedef enum logic [2:0] {E_NONCE, E_KEY, E_PLAIN, E_PREP} ekind_e;

  logic [NRND-1:0] rnd;
  word_t enc_in, dec_out;
  logic [31:0] enc_s [S];
  logic enc_v;
  ekind_e enc_kind;
  logic [2:0] enc_idx;

  logic [31:0] key_sh [8][S], nonce_sh [3][S], const_sh [5][S];
  word_t counter;
  logic [31:0] plain_sh [S], ksw_sh [S], x_r [S];
  state_t bf_in [S], bf_out [S], reg_state [S];
  logic bf_start, bf_done;
  logic prep_active;
  logic [2:0] prep_idx;
  logic [3:0] ks_idx;
  logic ks_valid, pre_ok, working, stale, run, pending, plain_ok, x_start, x_busy, x_done;
  logic reg_done;
  word_t reg_out;
  logic is_cfg, host_enc, prep_fire;

  lfsr_bank #(.N(NRND), .SEED_BASE(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);

  if (SCHEME == MASK_TI) begin : g_ti
    ti_encoder #(.W(32)) u_enc (.clk, .b(enc_in), .z0(rnd[31:0]), .z1(rnd[63:32]), .s(enc_s));
    ti_decoder #(.W(32)) u_dec (.s(x_r), .b(dec_out));
  end else begin : g_lc
    lc_encoder #(.W(32)) u_enc (.clk, .b(enc_in), .z(rnd[31:0]), .s(enc_s));
    assign dec_out = x_r[0] ^ x_r[1];
  end

  masked_block #(.SCHEME(SCHEME), .NUM_QR(NUM_QR)) u_block (
    .clk, .rst_n, .start(bf_start), .block_in(bf_in), .done(bf_done), .block_out(bf_out));

  masked_xor #(.SCHEME(SCHEME)) u_xor (
    .clk, .rst_n, .start(x_start), .a(plain_sh), .b(ksw_sh), .done(x_done), .r(x_r));

  // block input from the stored shares
  always_comb begin
    for (int s = 0; s < S; s++) begin
      for (int i = 0; i < 4; i++) bf_in[s][i] = const_sh[i][s];
      for (int i = 0; i < 8; i++) bf_in[s][4 + i] = key_sh[i][s];
      bf_in[s][12] = const_sh[4][s];
      for (int i = 0; i < 3; i++) bf_in[s][13 + i] = nonce_sh[i][s];
    end
  end

  assign ready = !pending;
  assign is_cfg = (control >= CTRL_NONCE1) && (control <= CTRL_COUNTER);
  assign host_enc = ready && ((is_cfg && control != CTRL_COUNTER) || control == CTRL_CRYPT);
  assign prep_fire = prep_active && prep_idx < 3'd5 && !host_enc;

  always_comb begin
    if (host_enc) enc_in = in;
    else begin
      unique case (prep_idx)
        3'd0:    enc_in = SIGMA0;
        3'd1:    enc_in = SIGMA1;
        3'd2:    enc_in = SIGMA2;
        3'd3:    enc_in = SIGMA3;
        default: enc_in = counter - 32'd1;   // counter was stepped when the block was claimed
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) for (int s = 0; s < S; s++) key_sh[i][s] <= '0;
      for (int i = 0; i < 3; i++) for (int s = 0; s < S; s++) nonce_sh[i][s] <= '0;
      for (int i = 0; i < 5; i++) for (int s = 0; s < S; s++) const_sh[i][s] <= '0;
      for (int s = 0; s < S; s++) begin plain_sh[s] <= '0; ksw_sh[s] <= '0; reg_state[s] <= '0; end
      counter <= '0;
      enc_v <= 1'b0;
      enc_kind <= E_NONCE;
      enc_idx <= '0;
      bf_start <= 1'b0;
      prep_active <= 1'b0;
      prep_idx <= '0;
      ks_idx <= '0;
      ks_valid <= 1'b0;
      pre_ok <= 1'b0;
      working <= 1'b0;
      stale <= 1'b0;
      run <= 1'b0;
      pending <= 1'b0;
      plain_ok <= 1'b0;
      x_start <= 1'b0;
      x_busy <= 1'b0;
      reg_done <= 1'b0;
      reg_out <= '0;
    end else begin
      reg_done <= 1'b0;
      bf_start <= 1'b0;
      x_start <= 1'b0;

      // tag of the word entering the encoder
      enc_v <= host_enc || prep_fire;
      if (host_enc) begin
        if (control == CTRL_CRYPT)       begin enc_kind <= E_PLAIN; enc_idx <= '0; end
        else if (control <= CTRL_NONCE3) begin enc_kind <= E_NONCE; enc_idx <= 3'(control - 4'd1); end
        else                             begin enc_kind <= E_KEY;   enc_idx <= 3'(control - 4'd4); end
      end else if (prep_fire) begin
        enc_kind <= E_PREP;
        enc_idx <= prep_idx;
        prep_idx <= prep_idx + 3'd1;
      end

      // encoded word arrives
      if (enc_v) begin
        unique case (enc_kind)
          E_NONCE: nonce_sh[enc_idx[1:0]] <= enc_s;
          E_KEY:   key_sh[enc_idx] <= enc_s;
          E_PLAIN: begin plain_sh <= enc_s; plain_ok <= 1'b1; end
          default: begin
            const_sh[enc_idx] <= enc_s;
            if (enc_idx == 3'd4) begin
              bf_start <= 1'b1;
              prep_active <= 1'b0;
            end
          end
        endcase
      end

      // block function finished
      if (bf_done) begin
        working <= 1'b0;
        stale <= 1'b0;
        if (!stale) pre_ok <= 1'b1;
      end

      // host commands
      if (ready && is_cfg) begin
        if (control == CTRL_COUNTER) counter <= in;
        else if (pre_ok || (working && !stale)) counter <= counter - 32'd1;
        ks_valid <= 1'b0;
        pre_ok <= 1'b0;
        run <= 1'b0;
        if (working && !bf_done) stale <= 1'b1;
      end else if (ready && control == CTRL_CRYPT) begin
        pending <= 1'b1;
        run <= 1'b1;
      end

      // claim the next counter value and encode the block's constants
      if (run && !working && !pre_ok) begin
        working <= 1'b1;
        prep_active <= 1'b1;
        prep_idx <= '0;
        counter <= counter + 32'd1;
      end

      // masked encryption of the waiting text word
      if (pending && plain_ok && !x_busy) begin
        if (ks_valid) begin
          for (int s = 0; s < S; s++) ksw_sh[s] <= reg_state[s][ks_idx];
          ks_idx <= ks_idx + 4'd1;
          if (ks_idx == 4'd15) ks_valid <= 1'b0;
          x_start <= 1'b1;
          x_busy <= 1'b1;
        end else if (pre_ok) begin
          for (int s = 0; s < S; s++) ksw_sh[s] <= bf_out[s][0];
          reg_state <= bf_out;
          ks_idx <= 4'd1;
          ks_valid <= 1'b1;
          pre_ok <= 1'b0;
          x_start <= 1'b1;
          x_busy <= 1'b1;
        end
      end
      if (x_done) begin
        reg_out <= dec_out;
        reg_done <= 1'b1;
        pending <= 1'b0;
        plain_ok <= 1'b0;
        x_busy <= 1'b0;
      end
    end
  end

  assign done = reg_done;
  assign out = reg_out;
endmodule
