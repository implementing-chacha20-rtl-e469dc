// tb_ti_adder - random 32-bit additions on random three-share sharings,
// including carry-heavy operands (all ones plus one). The recombined sum
// must equal a + b mod 2^32 when done pulses, and done must come exactly
// 33 clocks after start (carry ripples one bit per clock, plus the sum register).
module tb_ti_adder;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] a [3], b [3], r [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ti_adder #(.W(32)) dut (.clk, .rst_n, .start, .a(a), .b(b), .done, .r(r));

  initial begin
    logic [31:0] av, bv;
    int cyc;
    for (int s = 0; s < 3; s++) begin a[s] = 0; b[s] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      av = $urandom; bv = $urandom;
      if (t == 0) begin av = 32'hffffffff; bv = 32'h1; end
      if (t == 1) begin av = 32'h7fffffff; bv = 32'h7fffffff; end
      a[1] = $urandom; a[2] = $urandom; a[0] = av ^ a[1] ^ a[2];
      b[1] = $urandom; b[2] = $urandom; b[0] = bv ^ b[1] ^ b[2];
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks += 2;
      if ((r[0] ^ r[1] ^ r[2]) !== av + bv) begin
        failures++; $display("FAIL %h + %h got %h", av, bv, r[0] ^ r[1] ^ r[2]);
      end
      if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
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
