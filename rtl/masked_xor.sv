// masked_xor - 32-bit masked xor bank of the selected scheme: the TI xor
// (registered, one clock) or the low-cost masked XOR (two clocks). A small
// counter turns the fixed evaluation time into a done pulse: with start in
// cycle 0, done comes in cycle LAT + 1 (LAT = 1 for TI, 2 for LC), when r is
// valid. Operands must stay stable from start to done.
module masked_xor
  import mask_pkg::*;
#(
  parameter mask_e SCHEME = MASK_TI,
  localparam int unsigned S = num_shares(SCHEME)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a [S],
  input  logic [31:0] b [S],
  output logic        done,
  output logic [31:0] r [S]
);
  localparam int unsigned LAT = (SCHEME == MASK_TI) ? 1 : 2;
  logic [1:0] cnt;
  logic busy;

  if (SCHEME == MASK_TI) begin : g_ti
    ti_xor2 #(.W(32)) u_xor (.clk, .a, .b, .r);
  end else begin : g_lc
    lc_xor #(.W(32)) u_xor (.clk, .x(a), .y(b), .z(r));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt <= '0;
      end else if (busy) begin
        cnt <= cnt + 2'd1;
        if (32'(cnt) == LAT - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
