// lc_xor3 - low-cost masked three-input xor (full-adder sum), W bits wide:
// r = (a ^ b) ^ c with two masked XORs in series. Output valid four clocks
// after the inputs settle. Structure follows the design.
module lc_xor3 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] a [2],
  input  logic [W-1:0] b [2],
  input  logic [W-1:0] c [2],
  output logic [W-1:0] r [2]
);
  logic [W-1:0] t [2];

  lc_xor #(.W(W)) u_x0 (.clk, .x(a), .y(b), .z(t));
  lc_xor #(.W(W)) u_x1 (.clk, .x(t), .y(c), .z(r));
endmodule
