// lfsr40 - 40-bit maximum-length linear-feedback shift register used as a
// random bit source for the masked cipher cores.
//
// Fibonacci form, feedback polynomial x^40 + x^38 + x^21 + x^19 + 1 (a
// maximum-length tap set for 40 bits, period 2^40 - 1). Each clock with
// `en` high the register shifts left by one and the xor of taps 40, 38, 21
// and 19 enters at bit 0; `rnd` is bit 39. Reset loads SEED, which must be
// non-zero. The 40-bit width and the maximum period are the design's; the
// tap set and the shift direction are this implementation's choice.
module lfsr40 #(
  parameter logic [39:0] SEED = 40'h00_0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        rnd,
  output logic [39:0] state
);
  initial begin
    assert (SEED != '0) else $fatal(1, "LFSR seed must be non-zero");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[38:0], state[39] ^ state[37] ^ state[20] ^ state[18]};
  end

  assign rnd = state[39];
endmodule
