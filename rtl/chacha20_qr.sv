// chacha20_qr - fully combinatorial ChaCha20 quarter round.
//
// Four add / xor / rotate lines in sequence, as in the ChaCha20 definition:
//   a+=b; d^=a; d<<<=16;  c+=d; b^=c; b<<<=12;
//   a+=b; d^=a; d<<<=8;   c+=d; b^=c; b<<<=7;
// It holds four 32-bit adders and four 32-bit xor banks and no register; the
// whole quarter round settles within one clock period of the enclosing
// block. Interface: in_a..in_d in, out_a..out_d out, no clock.
module chacha20_qr
  import chacha20_pkg::*;
(
  input  word_t in_a,
  input  word_t in_b,
  input  word_t in_c,
  input  word_t in_d,
  output word_t out_a,
  output word_t out_b,
  output word_t out_c,
  output word_t out_d
);
  word_t a1, b1, c1, d1, a2, d2, c2;

  always_comb begin
    a1 = in_a + in_b;
    d1 = rotl(in_d ^ a1, 16);
    c1 = in_c + d1;
    b1 = rotl(in_b ^ c1, 12);
    a2 = a1 + b1;
    d2 = rotl(d1 ^ a2, 8);
    c2 = c1 + d2;
    out_a = a2;
    out_d = d2;
    out_c = c2;
    out_b = rotl(b1 ^ c2, 7);
  end
endmodule
