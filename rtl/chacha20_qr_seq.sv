// chacha20_qr_seq - sequential ChaCha20 quarter round with one adder and one
// xor bank of WIDTH bits (32, 16 or 8), used in turn.
//
// On start the four input words are copied into A_BUF..D_BUF. The quarter
// round is then run as eight operations, add and xor alternating:
//   A+=B, D=(D^A)<<<16, C+=D, B=(B^C)<<<12, A+=B, D=(D^A)<<<8, C+=D, B=(B^C)<<<7
// Each operation walks the 32-bit operands in 32/WIDTH slices, least
// significant first, one slice per clock; the adder's carry is kept in a
// flip-flop between slices and the result slices are collected in a shift
// register, written back (rotated, for xor) after the last slice. The
// rotation is wiring. Timing: start sampled in cycle 0, operations in cycles
// 1 .. 8*32/WIDTH, done is a one-cycle pulse in the next cycle and out_a..d
// (the buffers) stay valid until the next start.
// The single adder, single xor bank and component widths follow the design;
// the slice order, the carry flip-flop and the exact cycle count are this
// implementation's choice.
module chacha20_qr_seq
  import chacha20_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t in_a,
  input  word_t in_b,
  input  word_t in_c,
  input  word_t in_d,
  output logic  done,
  output word_t out_a,
  output word_t out_b,
  output word_t out_c,
  output word_t out_d
);
  localparam int unsigned NSLICE = 32 / WIDTH;
  localparam int unsigned SW = (NSLICE > 1) ? $clog2(NSLICE) : 1;

  word_t a_buf, b_buf, c_buf, d_buf;
  logic started;
  logic [2:0] op;               // 0..7, even = add, odd = xor
  logic [SW-1:0] slice;
  logic carry;
  // holds the NSLICE-1 result slices already produced (one dummy slice when NSLICE == 1)
  localparam int unsigned SHW = (NSLICE > 1) ? 32 - WIDTH : WIDTH;
  logic [SHW-1:0] shift_reg, shift_next;

  word_t dst, src, full;
  logic [WIDTH-1:0] x, y, r;
  logic cout;
  int unsigned rot;

  initial begin
    assert (WIDTH * NSLICE == 32) else $fatal(1, "WIDTH must divide 32");
  end

  always_comb begin
    // operand selection: add lines 0/2: A+=B, 1/3: C+=D; xor lines 0/2: D^=A, 1/3: B^=C
    unique case (op)
      3'd0, 3'd4: begin dst = a_buf; src = b_buf; end
      3'd1, 3'd5: begin dst = d_buf; src = a_buf; end
      3'd2, 3'd6: begin dst = c_buf; src = d_buf; end
      default:    begin dst = b_buf; src = c_buf; end
    endcase
    unique case (op)
      3'd1:    rot = 16;
      3'd3:    rot = 12;
      3'd5:    rot = 8;
      default: rot = 7;
    endcase
    x = dst[slice * WIDTH +: WIDTH];
    y = src[slice * WIDTH +: WIDTH];
    if (op[0]) begin
      r = x ^ y;
      cout = 1'b0;
    end else begin
      {cout, r} = {1'b0, x} + {1'b0, y} + {{WIDTH{1'b0}}, carry};
    end
    if (NSLICE == 1) begin
      full = word_t'(r);
      shift_next = SHW'(r);
    end else begin
      full = word_t'({r, shift_reg});
      shift_next = SHW'({r, shift_reg} >> WIDTH);
    end
    if (op[0]) full = rotl(full, rot);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      done <= 1'b0;
      op <= '0;
      slice <= '0;
      carry <= 1'b0;
      shift_reg <= '0;
      a_buf <= '0; b_buf <= '0; c_buf <= '0; d_buf <= '0;
    end else begin
      done <= 1'b0;
      if (!started) begin
        if (start) begin
          a_buf <= in_a; b_buf <= in_b; c_buf <= in_c; d_buf <= in_d;
          started <= 1'b1;
          op <= '0;
          slice <= '0;
          carry <= 1'b0;
        end
      end else begin
        shift_reg <= shift_next;
        carry <= cout;
        if (32'(slice) == NSLICE - 1) begin
          slice <= '0;
          carry <= 1'b0;
          unique case (op)
            3'd0, 3'd4: a_buf <= full;
            3'd1, 3'd5: d_buf <= full;
            3'd2, 3'd6: c_buf <= full;
            default:    b_buf <= full;
          endcase
          op <= op + 3'd1;
          if (op == 3'd7) begin
            started <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          slice <= slice + SW'(1);
        end
      end
    end
  end

  assign out_a = a_buf;
  assign out_b = b_buf;
  assign out_c = c_buf;
  assign out_d = d_buf;
endmodule
