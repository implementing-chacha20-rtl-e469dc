// lc_xor - low-cost masked XOR on two-share bits, W bits wide, built from
// masked gates: x ^ y = (~x & y) | (x & ~y). Two masked ANDs feed a masked
// OR, so the output is valid two clocks after the inputs settle. Structure
// follows the design.
module lc_xor #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x [2],
  input  logic [W-1:0] y [2],
  output logic [W-1:0] z [2]
);
  logic [W-1:0] nx [2], ny [2], t0 [2], t1 [2];

  assign nx[0] = x[0];  assign nx[1] = ~x[1];
  assign ny[0] = y[0];  assign ny[1] = ~y[1];
  lc_and #(.W(W)) u_and0 (.clk, .x(nx), .y(y),  .z(t0));
  lc_and #(.W(W)) u_and1 (.clk, .x(x),  .y(ny), .z(t1));
  lc_or  #(.W(W)) u_or   (.clk, .x(t0), .y(t1), .z(z));
endmodule
