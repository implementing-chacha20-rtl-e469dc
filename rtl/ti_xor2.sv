// ti_xor2 - threshold-implementation xor bank, r = a ^ b, on three-share
// operands, W bits wide. Share i of the result avoids share i of both
// operands (non-completeness):
//   r0 = a1 ^ b2,  r1 = a2 ^ b0,  r2 = a0 ^ b1
// The result shares are registered, so r is valid one clock after a and b.
// Share equations follow the design.
module ti_xor2 #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] a [3],
  input  logic [W-1:0] b [3],
  output logic [W-1:0] r [3]
);
  always_ff @(posedge clk) begin
    r[0] <= a[1] ^ b[2];
    r[1] <= a[2] ^ b[0];
    r[2] <= a[0] ^ b[1];
  end
endmodule
