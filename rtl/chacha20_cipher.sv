// chacha20_cipher - ChaCha20 stream cipher on 32-bit words.
//
// The host writes the nonce, key and initial block counter one 32-bit word at
// a time and then sends text words to be encrypted (or decrypted: the
// operation is the same XOR with the keystream). Commands on `control`:
//   1..3  in -> nonce word 1..3 (state words 13..15)
//   4..B  in -> key word 1..8   (state words 4..11)
//   C     in -> initial block counter (state word 12)
//   D     encrypt/decrypt text word `in`
//   other no operation
// A command is taken in a cycle where `ready` is high. For D the result
// appears on `out` with a one-cycle `done` pulse: one clock after the command
// when keystream is at hand, otherwise when the block function delivers;
// `ready` is low while such a long encryption waits.
// Text words are the little-endian 32-bit words of the byte stream (byte 0 in
// bits 7:0), matching the keystream serialisation of RFC 8439.
//
// Keystream management: the first D after a (re)configuration starts a block
// computation and has to wait for it ("long" encryption). The 16 keystream
// words are kept in REG_STATE and used one per D ("short" encryptions), while
// the block with the next counter value is computed in advance. If the
// prefetched block is not finished when REG_STATE runs out, the D waits for
// it. COUNTER always holds the counter of the next block to be started;
// writing key or nonce discards a prefetched or running block and steps the
// counter back so that the stream continues with the first unused block.
// BF_ARCH selects the block function: iterative with NUM_QR combinatorial or
// sequential (SEQ_WIDTH-bit) QR units, or unrolled with UNROLL rounds per
// clock. Defaults: four combinatorial QR units. Register names follow the
// design's block diagram; the ready output and the roll-back rule are this
// implementation's own.
module chacha20_cipher
  import chacha20_pkg::*;
#(
  parameter bf_arch_e    BF_ARCH   = BF_ITERATIVE,
  parameter int unsigned NUM_QR    = 4,
  parameter bit          QR_SEQ    = 1'b0,
  parameter int unsigned SEQ_WIDTH = 32,
  parameter int unsigned UNROLL    = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] control,
  input  word_t      in,
  output logic       ready,
  output logic       done,
  output word_t      out
);
  word_t [7:0] reg_key;
  word_t [2:0] reg_nonce;
  word_t counter;
  word_t reg_plain, reg_out;
  state_t reg_state;
  logic [3:0] ks_idx;
  logic ks_valid;      // REG_STATE holds unused keystream words
  logic pre_ok;        // block function output holds the next, unused block
  logic working;       // block function is computing
  logic stale;         // the running computation is to be discarded
  logic run;           // keystream wanted: set by D, cleared by reconfiguration
  logic pending;       // a D command waits for a block (long encryption)
  logic reg_done;
  logic chacha20_start, chacha20_done;
  state_t chacha20_in, chacha20_out;
  logic is_cfg;

  if (BF_ARCH == BF_UNROLLED) begin : g_unrolled
    chacha20_block_unrolled #(.UNROLL(UNROLL)) u_block (
      .clk, .rst_n, .start(chacha20_start), .block_in(chacha20_in),
      .done(chacha20_done), .block_out(chacha20_out)
    );
  end else begin : g_iterative
    chacha20_block #(.NUM_QR(NUM_QR), .QR_SEQ(QR_SEQ), .SEQ_WIDTH(SEQ_WIDTH)) u_block (
      .clk, .rst_n, .start(chacha20_start), .block_in(chacha20_in),
      .done(chacha20_done), .block_out(chacha20_out)
    );
  end

  assign ready = !pending;
  assign is_cfg = (control >= CTRL_NONCE1) && (control <= CTRL_COUNTER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_key <= '0;
      reg_nonce <= '0;
      counter <= '0;
      reg_plain <= '0;
      reg_out <= '0;
      reg_state <= '0;
      ks_idx <= '0;
      ks_valid <= 1'b0;
      pre_ok <= 1'b0;
      working <= 1'b0;
      stale <= 1'b0;
      run <= 1'b0;
      pending <= 1'b0;
      reg_done <= 1'b0;
      chacha20_start <= 1'b0;
      chacha20_in <= '0;
    end else begin
      reg_done <= 1'b0;
      chacha20_start <= 1'b0;

      // block function finished
      if (chacha20_done) begin
        working <= 1'b0;
        stale <= 1'b0;
        if (!stale) pre_ok <= 1'b1;
      end

      // host commands
      if (ready && is_cfg) begin
        if (control == CTRL_COUNTER) counter <= in;
        else begin
          if (control <= CTRL_NONCE3) reg_nonce[control - 4'd1] <= in;
          else                        reg_key[control - 4'd4] <= in;
          // a prefetched or running block is no longer valid: give its counter back
          if (pre_ok || (working && !stale)) counter <= counter - 32'd1;
        end
        ks_valid <= 1'b0;
        pre_ok <= 1'b0;
        run <= 1'b0;
        if (working && !chacha20_done) stale <= 1'b1;
      end else if (ready && control == CTRL_CRYPT) begin
        run <= 1'b1;
        if (ks_valid) begin
          // short encryption: keystream word at hand
          reg_out <= in ^ reg_state[ks_idx];
          reg_done <= 1'b1;
          ks_idx <= ks_idx + 4'd1;
          if (ks_idx == 4'd15) ks_valid <= 1'b0;
        end else if (pre_ok) begin
          // first word of the block computed in advance
          reg_out <= in ^ chacha20_out[0];
          reg_state <= chacha20_out;
          reg_done <= 1'b1;
          ks_idx <= 4'd1;
          ks_valid <= 1'b1;
          pre_ok <= 1'b0;
        end else begin
          // long encryption: wait for the block function
          reg_plain <= in;
          pending <= 1'b1;
        end
      end

      // start the next block as soon as the block function is free
      if (run && !working && !pre_ok && !chacha20_start) begin
        chacha20_start <= 1'b1;
        chacha20_in <= init_state(reg_key, counter, reg_nonce);
        counter <= counter + 32'd1;
        working <= 1'b1;
      end

      // long encryption: the block has arrived
      if (pending) begin
        if (pre_ok) begin
          reg_out <= reg_plain ^ chacha20_out[0];
          reg_state <= chacha20_out;
          reg_done <= 1'b1;
          pending <= 1'b0;
          ks_idx <= 4'd1;
          ks_valid <= 1'b1;
          pre_ok <= 1'b0;
        end
      end
    end
  end

  assign done = reg_done;
  assign out = reg_out;
endmodule
