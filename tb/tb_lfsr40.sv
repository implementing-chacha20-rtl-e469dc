// tb_lfsr40 - checks the 40-bit LFSR.
//  1. Maximum period, by algebra: the feedback polynomial
//     p(x) = x^40 + x^38 + x^21 + x^19 + 1 must satisfy x^(2^40-1) = 1 mod p
//     and x^((2^40-1)/q) != 1 for every prime q of 2^40-1 = 3*5^2*11*17*31*
//     41*61681 (GF(2) polynomial arithmetic written out in the testbench).
//  2. The register follows that recurrence: the bit entering each clock is
//     the xor of the bits 40, 38, 21 and 19 clocks back (kept in a plain
//     history array), and the output is the bit that entered 40 clocks ago.
//  3. Reset loads the seed; `en` low freezes the state.
module tb_lfsr40;
  logic clk = 0, rst_n = 0, en = 0, rnd;
  logic [39:0] state;
  int checks = 0, failures = 0;
  localparam logic [39:0] SEED = 40'h12_3456_789A;
  localparam logic [40:0] POLY = (41'd1 << 40) | (41'd1 << 38) | (41'd1 << 21) | (41'd1 << 19) | 41'd1;

  always #5 clk = ~clk;

  lfsr40 #(.SEED(SEED)) dut (.clk, .rst_n, .en, .rnd, .state);

  function automatic logic [39:0] mulmod(logic [39:0] a, logic [39:0] b);
    logic [40:0] aa = {1'b0, a};
    logic [39:0] r = '0;
    for (int i = 0; i < 40; i++) begin
      if (b[i]) r ^= aa[39:0];
      aa = aa << 1;
      if (aa[40]) aa ^= POLY;
    end
    return r;
  endfunction

  function automatic logic [39:0] xpow(logic [39:0] e);
    logic [39:0] r = 40'd1, base = 40'd2;
    for (int i = 0; i < 40; i++) begin
      if (e[i]) r = mulmod(r, base);
      base = mulmod(base, base);
    end
    return r;
  endfunction

  initial begin
    bit hist[$];
    logic [39:0] n = 40'hFF_FFFF_FFFF;
    int unsigned primes[7] = '{3, 5, 11, 17, 31, 41, 61681};
    checks++;
    if (xpow(n) != 40'd1) begin failures++; $display("FAIL x^(2^40-1) != 1"); end
    foreach (primes[i]) begin
      checks++;
      if (xpow(n / 40'(primes[i])) == 40'd1) begin failures++; $display("FAIL order divides (2^40-1)/%0d", primes[i]); end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (state !== SEED) begin failures++; $display("FAIL reset state %h", state); end
    for (int i = 39; i >= 0; i--) hist.push_back(SEED[i]);   // oldest first
    en = 1;
    for (int t = 0; t < 3000; t++) begin
      bit nb;
      int L;
      if (t % 97 == 5) begin
        logic [39:0] held;
        held = state;
        en = 0;
        @(negedge clk);
        checks++;
        if (state !== held) begin failures++; $display("FAIL state moved with en low"); end
        en = 1;
      end
      L = hist.size();
      nb = hist[L-40] ^ hist[L-38] ^ hist[L-21] ^ hist[L-19];
      checks++;
      if (rnd !== hist[L-40]) begin failures++; if (failures < 10) $display("FAIL output bit %0d", t); end
      @(negedge clk);
      hist.push_back(nb);
      checks++;
      if (state[0] !== nb) begin failures++; if (failures < 10) $display("FAIL feedback bit %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
