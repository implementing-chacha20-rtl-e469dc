// lc_encoder - splits a W-bit value into two shares with W fresh random bits:
// b0 = b ^ z, b1 = z. Registered output, valid one clock after b. The
// encoding follows the design.
module lc_encoder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] b,
  input  logic [W-1:0] z,
  output logic [W-1:0] s [2]
);
  always_ff @(posedge clk) begin
    s[0] <= b ^ z;
    s[1] <= z;
  end
endmodule
