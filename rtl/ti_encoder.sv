// ti_encoder - splits a W-bit value into three shares with 2*W fresh random
// bits z0, z1 (bitwise):  b0 = b ^ z0 ^ z1,  b1 = z0,  b2 = z1.
// Each share on its own is uniformly distributed whatever b is. Registered
// output, valid one clock after b. The encoding follows the design.
module ti_encoder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] b,
  input  logic [W-1:0] z0,
  input  logic [W-1:0] z1,
  output logic [W-1:0] s [3]
);
  always_ff @(posedge clk) begin
    s[0] <= b ^ z0 ^ z1;
    s[1] <= z0;
    s[2] <= z1;
  end
endmodule
