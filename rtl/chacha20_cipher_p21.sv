// chacha20_cipher_p21 - ChaCha20 stream cipher on 64-bit words around the
// 21-stage pipeline.
//
// Host interface as for the 32-bit cipher (same control codes, ready/done,
// done one clock after D when a keystream block is at the output),
// but text words are 64 bits wide; nonce, key and counter words are taken
// from in[31:0]. Text words are little-endian 64-bit words of the byte
// stream, so keystream word j of a block is {state[2j+1], state[2j]}.
//
// The first D after configuration lets the pipeline move every clock until
// the first finished block reaches the output (21 moves), with a new counter
// value entering at each move. From then on the output block is used eight
// words long, one word per clock, and the pipeline moves once on the last
// word, so that a new block is ready on the next clock: 64 bits per clock in
// steady state. The initial state added in stage 21 is rebuilt from key,
// nonce and COUNTER - 20, which is the counter of the block leaving stage 20
// because the counter steps once per move. Writing key, nonce or counter
// flushes the pipeline; the counter is not stepped back, so after a key or
// nonce change the host writes the counter again. The pipeline and its
// 64-bit words follow the design; flush and counter rules are this
// implementation's choices.
module chacha20_cipher_p21
  import chacha20_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  control,
  input  logic [63:0] in,
  output logic        ready,
  output logic        done,
  output logic [63:0] out
);
  word_t [7:0] reg_key;
  word_t [2:0] reg_nonce;
  word_t counter;
  logic [63:0] reg_plain, reg_out;
  logic [2:0] ks_idx;
  logic en, pending, reg_done, is_cfg, run, flush, take, use_ks;
  logic p_valid;
  state_t p_state_in, p_initial, p_out;

  chacha20_pipeline21 u_pipe (
    .clk, .rst_n, .run, .flush, .valid_in(en),
    .state_in(p_state_in), .initial_state(p_initial),
    .valid_out(p_valid), .state_out(p_out)
  );

  assign p_state_in = init_state(reg_key, counter, reg_nonce);
  assign p_initial  = init_state(reg_key, counter - 32'd20, reg_nonce);
  assign ready  = !pending;
  assign is_cfg = (control >= CTRL_NONCE1) && (control <= CTRL_COUNTER);
  assign flush  = ready && is_cfg;
  // move while filling, and when the last word of the output block is used
  assign take = ready && control == CTRL_CRYPT;
  assign use_ks = p_valid && (pending || take);
  assign run = en && !flush && (!p_valid || (use_ks && ks_idx == 3'd7));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_key <= '0;
      reg_nonce <= '0;
      counter <= '0;
      reg_plain <= '0;
      reg_out <= '0;
      ks_idx <= '0;
      en <= 1'b0;
      pending <= 1'b0;
      reg_done <= 1'b0;
    end else begin
      reg_done <= 1'b0;
      if (run) counter <= counter + 32'd1;
      if (ready && is_cfg) begin
        if (control == CTRL_COUNTER)     counter <= in[31:0];
        else if (control <= CTRL_NONCE3) reg_nonce[control - 4'd1] <= in[31:0];
        else                             reg_key[control - 4'd4] <= in[31:0];
        en <= 1'b0;
        ks_idx <= '0;
      end else if (take) begin
        reg_plain <= in;
        pending <= !p_valid;
        en <= 1'b1;
      end
      if (use_ks) begin
        reg_out <= (pending ? reg_plain : in) ^ {p_out[2*ks_idx+1], p_out[2*ks_idx]};
        reg_done <= 1'b1;
        pending <= 1'b0;
        ks_idx <= ks_idx + 3'd1;
      end
    end
  end

  assign done = reg_done;
  assign out = reg_out;
endmodule
