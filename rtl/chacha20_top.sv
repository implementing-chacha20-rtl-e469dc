// chacha20_top - the ChaCha20 cipher cores side by side.
//
// The main core is the basic design: a 32-bit-word cipher whose block
// function computes a whole round per clock with four fully combinatorial
// quarter-round units (main_*). Next to it stand the three architecture
// variants that trade area against speed, each a complete cipher with its
// own host port set:
//   seq_*  block function with sequential QR units (SEQ_NUM_QR units, one
//          SEQ_WIDTH-bit adder and xor bank each)
//   unr_*  block function with UNROLL rounds cascaded per clock
//   p21_*  64-bit-word cipher on a 21-stage round pipeline
// and the two side-channel protected cores, whose block function, key and
// data path work on Boolean-masked shares refreshed by an LFSR bank:
//   ti_*   three-share threshold implementation
//   lc_*   two-share low-cost gate-level masking
// All six share clock and reset and have the same command set (see
// chacha20_cipher): control codes 1..3 nonce, 4..B key, C counter, D text.
// The cores are independent; nothing is shared between them. The protected
// cores get different LFSR seeds.
module chacha20_top
  import chacha20_pkg::*;
  import mask_pkg::*;
#(
  parameter int unsigned SEQ_NUM_QR = 4,
  parameter int unsigned SEQ_WIDTH  = 32,
  parameter int unsigned UNROLL     = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // basic design: four combinatorial QR units
  input  logic [3:0]  main_control,
  input  logic [31:0] main_in,
  output logic        main_ready,
  output logic        main_done,
  output logic [31:0] main_out,
  // sequential QR variant
  input  logic [3:0]  seq_control,
  input  logic [31:0] seq_in,
  output logic        seq_ready,
  output logic        seq_done,
  output logic [31:0] seq_out,
  // unrolled variant
  input  logic [3:0]  unr_control,
  input  logic [31:0] unr_in,
  output logic        unr_ready,
  output logic        unr_done,
  output logic [31:0] unr_out,
  // 21-stage pipelined variant, 64-bit text words
  input  logic [3:0]  p21_control,
  input  logic [63:0] p21_in,
  output logic        p21_ready,
  output logic        p21_done,
  output logic [63:0] p21_out,
  // threshold-implementation protected core
  input  logic [3:0]  ti_control,
  input  logic [31:0] ti_in,
  output logic        ti_ready,
  output logic        ti_done,
  output logic [31:0] ti_out,
  // low-cost masked core
  input  logic [3:0]  lc_control,
  input  logic [31:0] lc_in,
  output logic        lc_ready,
  output logic        lc_done,
  output logic [31:0] lc_out
);

  chacha20_cipher #(.BF_ARCH(BF_ITERATIVE), .NUM_QR(4), .QR_SEQ(1'b0)) u_main (
    .clk, .rst_n, .control(main_control), .in(main_in),
    .ready(main_ready), .done(main_done), .out(main_out)
  );

  chacha20_cipher #(.BF_ARCH(BF_ITERATIVE), .NUM_QR(SEQ_NUM_QR), .QR_SEQ(1'b1),
                    .SEQ_WIDTH(SEQ_WIDTH)) u_seq (
    .clk, .rst_n, .control(seq_control), .in(seq_in),
    .ready(seq_ready), .done(seq_done), .out(seq_out)
  );

  chacha20_cipher #(.BF_ARCH(BF_UNROLLED), .UNROLL(UNROLL)) u_unr (
    .clk, .rst_n, .control(unr_control), .in(unr_in),
    .ready(unr_ready), .done(unr_done), .out(unr_out)
  );

  chacha20_cipher_p21 u_p21 (
    .clk, .rst_n, .control(p21_control), .in(p21_in),
    .ready(p21_ready), .done(p21_done), .out(p21_out)
  );

  masked_cipher #(.SCHEME(MASK_TI), .SEED(40'h3C_5A96_E1F0)) u_ti (
    .clk, .rst_n, .control(ti_control), .in(ti_in),
    .ready(ti_ready), .done(ti_done), .out(ti_out)
  );

  masked_cipher #(.SCHEME(MASK_LC), .SEED(40'h91_2B7D_04C6)) u_lc (
    .clk, .rst_n, .control(lc_control), .in(lc_in),
    .ready(lc_ready), .done(lc_done), .out(lc_out)
  );

endmodule
