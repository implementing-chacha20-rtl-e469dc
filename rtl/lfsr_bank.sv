// lfsr_bank - N independent 40-bit LFSRs, one fresh random bit each per
// clock, for the encoders of the masked cores (96 LFSRs feed the threshold
// implementation, 48 the low-cost one). Each LFSR starts from its own
// non-zero seed, SEED_BASE xor'ed with a multiple of a large odd constant
// of its index (index + 1, so no seed is zero unless SEED_BASE collides).
// The bank size and the distinct seeds follow the design; the seed formula
// is this implementation's.
module lfsr_bank #(
  parameter int unsigned N = 96,
  parameter logic [39:0] SEED_BASE = 40'hA5_C3E1_7B29
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] rnd
);
  for (genvar i = 0; i < N; i++) begin : g_lfsr
    localparam logic [39:0] SEED = SEED_BASE ^ (40'(i + 1) * 40'h9E_3779_B97F);
    lfsr40 #(.SEED(SEED)) u_lfsr (.clk, .rst_n, .en, .rnd(rnd[i]), .state());
  end
endmodule
