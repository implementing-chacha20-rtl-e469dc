// lc_carry - low-cost masked carry-out (majority), W bits wide:
// r = ((a & b) | (b & c)) | (c & a) with three masked ANDs and two masked
// ORs. Output valid three clocks after the inputs settle. Structure follows
// the design.
module lc_carry #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] a [2],
  input  logic [W-1:0] b [2],
  input  logic [W-1:0] c [2],
  output logic [W-1:0] r [2]
);
  logic [W-1:0] ab [2], bc [2], ca [2], o1 [2];

  lc_and #(.W(W)) u_ab (.clk, .x(a), .y(b), .z(ab));
  lc_and #(.W(W)) u_bc (.clk, .x(b), .y(c), .z(bc));
  lc_and #(.W(W)) u_ca (.clk, .x(c), .y(a), .z(ca));
  lc_or  #(.W(W)) u_o1 (.clk, .x(ab), .y(bc), .z(o1));
  lc_or  #(.W(W)) u_o2 (.clk, .x(o1), .y(ca), .z(r));
endmodule
