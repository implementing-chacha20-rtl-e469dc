// ti_xor3 - threshold-implementation three-operand xor (the sum bit of a
// full adder), r = a ^ b ^ c, on three-share operands, W bits wide:
//   r0 = a1 ^ b2 ^ c1,  r1 = a2 ^ b0 ^ c2,  r2 = a0 ^ b1 ^ c0
// Share i of r never sees share i of any operand. Registered output: r is
// valid one clock after the operands. Share equations follow the design.
module ti_xor3 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] a [3],
  input  logic [W-1:0] b [3],
  input  logic [W-1:0] c [3],
  output logic [W-1:0] r [3]
);
  always_ff @(posedge clk) begin
    r[0] <= a[1] ^ b[2] ^ c[1];
    r[1] <= a[2] ^ b[0] ^ c[2];
    r[2] <= a[0] ^ b[1] ^ c[0];
  end
endmodule
