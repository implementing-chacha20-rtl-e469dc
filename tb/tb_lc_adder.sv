// tb_lc_adder - random 32-bit additions on random two-share sharings with
// the low-cost masked ripple-carry adder, including long carry chains.
// Before each addition the operands hold random other values; the
// recombined sum must equal a + b mod 2^32 when done pulses, and done must
// come in clock 3*31+4+1 = 98 after start.
module tb_lc_adder;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] a [2], b [2], r [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lc_adder #(.W(32)) dut (.clk, .rst_n, .start, .a(a), .b(b), .done, .r(r));

  initial begin
    logic [31:0] av, bv;
    int cyc;
    a[0] = 0; a[1] = 0; b[0] = 0; b[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      a[0] = $urandom; a[1] = $urandom; b[0] = $urandom; b[1] = $urandom;
      repeat (5) @(negedge clk);
      av = $urandom; bv = $urandom;
      if (t == 0) begin av = 32'hffffffff; bv = 32'h1; end
      if (t == 1) begin av = 32'h7fffffff; bv = 32'h7fffffff; end
      a[1] = $urandom; a[0] = av ^ a[1];
      b[1] = $urandom; b[0] = bv ^ b[1];
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 300) begin @(negedge clk); cyc++; end
      checks += 2;
      if ((r[0] ^ r[1]) !== av + bv) begin
        failures++; $display("FAIL %h + %h got %h", av, bv, r[0] ^ r[1]);
      end
      if (cyc != 98) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
