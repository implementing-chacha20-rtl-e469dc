// lc_and - low-cost masked AND gate on two-share bits, W bits wide
// (gate-level masking): z = x & y with x = x0^x1, y = y0^y1,
//   z0 = (x0 & y0) ^ (x0 | ~y1),   z1 = (x1 & y0) ^ (x1 | ~y1)
// Both output shares depend on y0 and y1; the y1 share is delayed by a
// flip-flop so that it arrives last and no glitch combines both shares of y
// before it does. The output is therefore valid one clock after the inputs
// settle. Equations and the y1 flip-flop follow the design.
module lc_and #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x [2],
  input  logic [W-1:0] y [2],
  output logic [W-1:0] z [2]
);
  logic [W-1:0] y1_q;

  always_ff @(posedge clk) y1_q <= y[1];

  assign z[0] = (x[0] & y[0]) ^ (x[0] | ~y1_q);
  assign z[1] = (x[1] & y[0]) ^ (x[1] | ~y1_q);
endmodule
