// chacha20_pkg - types, constants and helpers shared by the ChaCha20 cores.
//
// The ChaCha20 state is a 4x4 matrix of 32-bit words (RFC 8439 variant:
// 32-bit block counter in word 12, 96-bit nonce in words 13..15). It is
// carried as a packed array state_t, word i at state[i]. A quarter round
// (QR) works on four words a, b, c, d; a double round is four column QRs
// followed by four diagonal QRs, and the block function runs ten of them.
// QR slots are numbered 0..7: 0..3 are the column QRs, 4..7 the diagonal
// QRs, in the order of the reference algorithm. qr_word() maps a slot and a
// position (0=a .. 3=d) to a state word index.
//
// The host command codes follow the control-value list of the design: 1..3
// load nonce word 1..3, 4..B load key word 1..8, C loads the initial counter,
// D encrypts/decrypts one text word, anything else is no operation.
package chacha20_pkg;

  typedef logic [31:0] word_t;
  typedef word_t [15:0] state_t;

  // "expand 32-byte k" as four little-endian words
  localparam word_t SIGMA0 = 32'h61707865;
  localparam word_t SIGMA1 = 32'h3320646e;
  localparam word_t SIGMA2 = 32'h79622d32;
  localparam word_t SIGMA3 = 32'h6b206574;

  localparam int NUM_ROUNDS = 20;

  typedef enum logic [3:0] {
    CTRL_NOP     = 4'h0,
    CTRL_NONCE1  = 4'h1,
    CTRL_NONCE3  = 4'h3,
    CTRL_KEY1    = 4'h4,
    CTRL_KEY8    = 4'hB,
    CTRL_COUNTER = 4'hC,
    CTRL_CRYPT   = 4'hD
  } ctrl_e;

  // Block-function architecture used inside the 32-bit cipher.
  typedef enum logic [0:0] {
    BF_ITERATIVE = 1'b0,   // one round (4 QRs) or one QR per step
    BF_UNROLLED  = 1'b1    // UNROLL rounds per clock
  } bf_arch_e;

  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Word index of position pos (0=a,1=b,2=c,3=d) of QR slot 0..7.
  function automatic int unsigned qr_word(int unsigned slot, int unsigned pos);
    int unsigned col;
    col = slot % 4;
    if (slot < 4) return 4 * pos + col;                 // column round
    else          return 4 * pos + ((col + pos) % 4);   // diagonal round
  endfunction

  // Initial state from key, counter and nonce words.
  function automatic state_t init_state(input word_t [7:0] key, input word_t ctr,
                                        input word_t [2:0] nonce);
    state_t s;
    s[0] = SIGMA0; s[1] = SIGMA1; s[2] = SIGMA2; s[3] = SIGMA3;
    for (int i = 0; i < 8; i++) s[4 + i] = key[i];
    s[12] = ctr;
    for (int i = 0; i < 3; i++) s[13 + i] = nonce[i];
    return s;
  endfunction

endpackage
