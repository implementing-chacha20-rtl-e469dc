// ti_carry - threshold-implementation carry-out (majority) of a full adder,
// r = ab | bc | ca = ab ^ bc ^ ca, on three-share operands, W bits wide.
// The nine cross products of each operand pair are distributed over three
// output shares so that share i uses no share i of any operand:
//   r0 = a1b2 ^ a2b1 ^ a1c2 ^ a2c1 ^ b1c2 ^ b2c1 ^ a1b1 ^ b2c2 ^ c1a1
//   r1 = a0b2 ^ a2b0 ^ a0c2 ^ a2c0 ^ b0c2 ^ b2c0 ^ a2b2 ^ b0c0 ^ c2a2
//   r2 = a1b0 ^ a0b1 ^ a1c0 ^ a0c1 ^ b1c0 ^ b0c1 ^ a0b0 ^ b1c1 ^ c0a0
// (all 27 products appear once in total). Registered output, valid one clock
// after the operands, so that glitches cannot combine shares. Share
// equations follow the design.
module ti_carry #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] a [3],
  input  logic [W-1:0] b [3],
  input  logic [W-1:0] c [3],
  output logic [W-1:0] r [3]
);
  always_ff @(posedge clk) begin
    r[0] <= (a[1] & b[2]) ^ (a[2] & b[1]) ^ (a[1] & c[2]) ^ (a[2] & c[1]) ^ (b[1] & c[2])
          ^ (b[2] & c[1]) ^ (a[1] & b[1]) ^ (b[2] & c[2]) ^ (c[1] & a[1]);
    r[1] <= (a[0] & b[2]) ^ (a[2] & b[0]) ^ (a[0] & c[2]) ^ (a[2] & c[0]) ^ (b[0] & c[2])
          ^ (b[2] & c[0]) ^ (a[2] & b[2]) ^ (b[0] & c[0]) ^ (c[2] & a[2]);
    r[2] <= (a[1] & b[0]) ^ (a[0] & b[1]) ^ (a[1] & c[0]) ^ (a[0] & c[1]) ^ (b[1] & c[0])
          ^ (b[0] & c[1]) ^ (a[0] & b[0]) ^ (b[1] & c[1]) ^ (c[0] & a[0]);
  end
endmodule
