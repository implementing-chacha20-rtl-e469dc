// chacha20_ref_pkg - plain behavioural ChaCha20 reference for the testbenches.
//
// Written straight from the algorithm (quarter round, ten double rounds,
// final addition) on unpacked word arrays, with no code shared with the RTL.
// ref_block() returns the 16 keystream words of a block; ref_ks_word()
// returns keystream word n (counting from word 0 of block `ctr0`) of the
// stream started at counter ctr0.
package chacha20_ref_pkg;

  typedef bit [31:0] w32;
  typedef w32 blk_t [16];

  function automatic w32 r_rotl(w32 x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic void r_qr(ref w32 x[16], input int a, int b, int c, int d);
    x[a] = x[a] + x[b]; x[d] = r_rotl(x[d] ^ x[a], 16);
    x[c] = x[c] + x[d]; x[b] = r_rotl(x[b] ^ x[c], 12);
    x[a] = x[a] + x[b]; x[d] = r_rotl(x[d] ^ x[a], 8);
    x[c] = x[c] + x[d]; x[b] = r_rotl(x[b] ^ x[c], 7);
  endfunction

  function automatic void r_round(ref w32 x[16], input bit diag);
    if (!diag) begin
      r_qr(x, 0, 4, 8, 12); r_qr(x, 1, 5, 9, 13);
      r_qr(x, 2, 6, 10, 14); r_qr(x, 3, 7, 11, 15);
    end else begin
      r_qr(x, 0, 5, 10, 15); r_qr(x, 1, 6, 11, 12);
      r_qr(x, 2, 7, 8, 13); r_qr(x, 3, 4, 9, 14);
    end
  endfunction

  function automatic blk_t ref_block_fn(blk_t in);
    w32 x[16];
    blk_t o;
    foreach (x[i]) x[i] = in[i];
    for (int r = 0; r < 10; r++) begin
      r_round(x, 0);
      r_round(x, 1);
    end
    foreach (o[i]) o[i] = x[i] + in[i];
    return o;
  endfunction

  function automatic blk_t ref_init(w32 key[8], w32 ctr, w32 nonce[3]);
    blk_t s;
    s[0] = 32'h61707865; s[1] = 32'h3320646e; s[2] = 32'h79622d32; s[3] = 32'h6b206574;
    for (int i = 0; i < 8; i++) s[4+i] = key[i];
    s[12] = ctr;
    for (int i = 0; i < 3; i++) s[13+i] = nonce[i];
    return s;
  endfunction

  function automatic blk_t ref_block(w32 key[8], w32 ctr, w32 nonce[3]);
    return ref_block_fn(ref_init(key, ctr, nonce));
  endfunction

  function automatic w32 ref_ks_word(w32 key[8], w32 ctr0, w32 nonce[3], int n);
    blk_t b;
    b = ref_block(key, ctr0 + w32'(n / 16), nonce);
    return b[n % 16];
  endfunction

endpackage
