// lc_adder - W-bit ripple-carry adder on two-share operands built from the
// low-cost masked gates: per bit a masked xor-3 for the sum and a masked
// carry-out. The only registers are the delayed y1 shares inside the masked
// ANDs, so the carry settles three clocks per bit and sum bit i four clocks
// after carry i. The operands must stay stable from `start` until `done`;
// with `start` in cycle 0, `done` pulses in cycle LATENCY + 1, where
// LATENCY = 3*(W-1) + 4 bounds the settling time of the top sum
// bit. The carry out of the top bit is computed by the generic bit cell but
// not used (addition is modulo 2^W), which lint reports. The gate
// decomposition follows the design; the latency count and the start/done
// counter are this implementation's.
module lc_adder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a [2],
  input  logic [W-1:0] b [2],
  output logic         done,
  output logic [W-1:0] r [2]
);
  localparam int unsigned LATENCY = 3 * (W - 1) + 4;
  logic [$clog2(LATENCY+1)-1:0] cnt;
  logic busy;

  // one masked full adder per bit; the carry wires run from bit to bit
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ai [2], bi [2], ci [2], si [2], co [2];
    assign ai[0] = a[0][i]; assign ai[1] = a[1][i];
    assign bi[0] = b[0][i]; assign bi[1] = b[1][i];
    if (i == 0) begin : g_c0
      assign ci[0] = 1'b0; assign ci[1] = 1'b0;
    end else begin : g_ci
      assign ci[0] = g_bit[i-1].co[0]; assign ci[1] = g_bit[i-1].co[1];
    end
    lc_xor3  #(.W(1)) u_sum   (.clk, .a(ai), .b(bi), .c(ci), .r(si));
    lc_carry #(.W(1)) u_carry (.clk, .a(ai), .b(bi), .c(ci), .r(co));
    assign r[0][i] = si[0]; assign r[1][i] = si[1];
  end

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
        if (32'(cnt) == LATENCY - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
