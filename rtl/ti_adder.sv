// ti_adder - W-bit ripple-carry adder on three-share operands (threshold
// implementation), r = a + b mod 2^W.
//
// W full adders, each a ti_xor3 (sum) and a ti_carry (carry-out) with
// registered outputs. The carry into bit 0 is the sharing (0,0,0); the carry
// out of bit i is registered and feeds bit i+1, so the carry ripples one bit
// per clock and no combinational path mixes shares of different functions.
// The operands must stay stable from `start` until `done`. Timing: `start`
// in cycle 0, sum bit i valid from cycle i+1, `done` is a one-cycle pulse in
// cycle W+1 when all of r is valid; r stays valid while the operands do.
// The full-adder decomposition follows the design; the start/done counter is
// this implementation's.
module ti_adder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a [3],
  input  logic [W-1:0] b [3],
  output logic         done,
  output logic [W-1:0] r [3]
);
  logic [W:0] carry [3];   // carry[.][i] is the carry into bit i
  logic [W-1:0] cin [3];
  logic [W-1:0] cout [3];
  logic [$clog2(W+1)-1:0] cnt;
  logic busy;

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      carry[s][0] = 1'b0;
      carry[s][W:1] = cout[s];
      cin[s] = carry[s][W-1:0];
    end
  end

  ti_xor3  #(.W(W)) u_sum   (.clk, .a(a), .b(b), .c(cin), .r(r));
  ti_carry #(.W(W)) u_carry (.clk, .a(a), .b(b), .c(cin), .r(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (32'(cnt) == W - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
