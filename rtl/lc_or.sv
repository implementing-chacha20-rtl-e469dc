// lc_or - low-cost masked OR on two-share bits, W bits wide, from the masked
// AND by De Morgan: x | y = ~(~x & ~y). A masked NOT flips share 1 only,
// so it costs an inverter and no clock. Latency one clock (one masked AND).
// Structure follows the design.
module lc_or #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] x [2],
  input  logic [W-1:0] y [2],
  output logic [W-1:0] z [2]
);
  logic [W-1:0] nx [2], ny [2], t [2];

  assign nx[0] = x[0];  assign nx[1] = ~x[1];
  assign ny[0] = y[0];  assign ny[1] = ~y[1];
  lc_and #(.W(W)) u_and (.clk, .x(nx), .y(ny), .z(t));
  assign z[0] = t[0];
  assign z[1] = ~t[1];
endmodule
