// masked_qr - sequential quarter round on masked words (protected cores).
//
// Same schedule as the sequential QR: the four input words (each as S
// Boolean shares) are copied into A_BUF..D_BUF on start, then eight
// operations run one after the other on one masked adder and one masked xor
// bank:  A+=B, D=(D^A)<<<16, C+=D, B=(B^C)<<<12, A+=B, D=(D^A)<<<8, C+=D,
// B=(B^C)<<<7. Rotation is applied to every share alike (it is linear), so
// it costs nothing. Each operation is one issue clock plus the unit's
// evaluation time, and every result is registered before it is used again.
// With the TI scheme a quarter round takes 4*(1+33) + 4*(1+2) + 1 clocks,
// with the LC scheme 4*(1+98) + 4*(1+3) + 1. done pulses once, out_* (the
// buffers) stay valid until the next start. Unit choice and registered
// results follow the design; the schedule is this implementation's.
module masked_qr
  import mask_pkg::*;
#(
  parameter mask_e SCHEME = MASK_TI,
  localparam int unsigned S = num_shares(SCHEME)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] in_a [S],
  input  logic [31:0] in_b [S],
  input  logic [31:0] in_c [S],
  input  logic [31:0] in_d [S],
  output logic        done,
  output logic [31:0] out_a [S],
  output logic [31:0] out_b [S],
  output logic [31:0] out_c [S],
  output logic [31:0] out_d [S]
);
  logic [31:0] a_buf [S], b_buf [S], c_buf [S], d_buf [S];
  logic [31:0] dst [S], src [S], add_r [S], xor_r [S];
  logic started, issue, waiting;
  logic [2:0] op;
  logic add_done, xor_done;
  int unsigned rot;
  logic [31:0] wb [S];   // value written back: sum, or rotated xor

  always_comb begin
    for (int s = 0; s < S; s++) begin
      unique case (op)
        3'd0, 3'd4: begin dst[s] = a_buf[s]; src[s] = b_buf[s]; end
        3'd1, 3'd5: begin dst[s] = d_buf[s]; src[s] = a_buf[s]; end
        3'd2, 3'd6: begin dst[s] = c_buf[s]; src[s] = d_buf[s]; end
        default:    begin dst[s] = b_buf[s]; src[s] = c_buf[s]; end
      endcase
    end
    unique case (op)
      3'd1:    rot = 16;
      3'd3:    rot = 12;
      3'd5:    rot = 8;
      default: rot = 7;
    endcase
  end

  always_comb
    for (int s = 0; s < S; s++)
      wb[s] = op[0] ? ((xor_r[s] << rot) | (xor_r[s] >> (32 - rot))) : add_r[s];

  masked_add #(.SCHEME(SCHEME)) u_add (
    .clk, .rst_n, .start(issue && !op[0]), .a(dst), .b(src), .done(add_done), .r(add_r));
  masked_xor #(.SCHEME(SCHEME)) u_xor (
    .clk, .rst_n, .start(issue && op[0]), .a(dst), .b(src), .done(xor_done), .r(xor_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      issue <= 1'b0;
      waiting <= 1'b0;
      done <= 1'b0;
      op <= '0;
      for (int s = 0; s < S; s++) begin
        a_buf[s] <= '0; b_buf[s] <= '0; c_buf[s] <= '0; d_buf[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      issue <= 1'b0;
      if (!started) begin
        if (start) begin
          a_buf <= in_a; b_buf <= in_b; c_buf <= in_c; d_buf <= in_d;
          started <= 1'b1;
          op <= '0;
          issue <= 1'b1;
          waiting <= 1'b1;
        end
      end else if (waiting && (add_done || xor_done)) begin
        for (int s = 0; s < S; s++) begin
          unique case (op)
            3'd0, 3'd4: a_buf[s] <= wb[s];
            3'd1, 3'd5: d_buf[s] <= wb[s];
            3'd2, 3'd6: c_buf[s] <= wb[s];
            default:    b_buf[s] <= wb[s];
          endcase
        end
        op <= op + 3'd1;
        if (op == 3'd7) begin
          started <= 1'b0;
          waiting <= 1'b0;
          done <= 1'b1;
        end else begin
          issue <= 1'b1;
        end
      end
    end
  end

  assign out_a = a_buf;
  assign out_b = b_buf;
  assign out_c = c_buf;
  assign out_d = d_buf;
endmodule
