// tb_ti_carry - exhaustive test of the three-share xor-3. All 512 sharings of
// (a, b, c) are applied; for each it checks correctness (the output shares
// recombine to ab|bc|ca) and builds the uniformity table: for every unshared
// input, each correct output sharing must occur exactly 16 times and each
// wrong one never. Non-completeness is checked by flipping share i of all
// operands and requiring output share i to stay unchanged.
module tb_ti_carry;
  logic clk = 0;
  logic a [3], b [3], c [3], r [3];
  int checks = 0, failures = 0;
  int tab [8][8];

  always #5 clk = ~clk;

  function automatic bit maj(bit x, bit y, bit z);
    return (x & y) | (y & z) | (z & x);
  endfunction

  ti_carry #(.W(1)) dut (.clk, .a(a), .b(b), .c(c), .r(r));

  initial begin
    logic [2:0] ref_r;
    foreach (tab[i, j]) tab[i][j] = 0;
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      for (int s = 0; s < 3; s++) begin a[s] = v[s]; b[s] = v[3+s]; c[s] = v[6+s]; end
      @(negedge clk);
      ref_r = {r[0], r[1], r[2]};
      tab[{a[0]^a[1]^a[2], b[0]^b[1]^b[2], c[0]^c[1]^c[2]}][ref_r]++;
      checks++;
      if ((r[0]^r[1]^r[2]) !== maj(a[0]^a[1]^a[2], b[0]^b[1]^b[2], c[0]^c[1]^c[2])) begin
        failures++; $display("FAIL correctness v=%0d", v);
      end
      for (int i = 0; i < 3; i++) begin
        a[i] = ~a[i]; b[i] = ~b[i]; c[i] = ~c[i];
        @(negedge clk);
        checks++;
        if (r[i] !== ref_r[2-i]) begin failures++; $display("FAIL non-completeness share %0d", i); end
        a[i] = ~a[i]; b[i] = ~b[i]; c[i] = ~c[i];
      end
    end
    for (int in = 0; in < 8; in++) begin
      bit x;
      x = maj(in[2], in[1], in[0]);
      for (int o = 0; o < 8; o++) begin
        checks++;
        if (tab[in][o] != (((o[0] ^ o[1] ^ o[2]) == x) ? 16 : 0)) begin
          failures++; $display("FAIL uniformity in=%0d out=%0d count %0d", in, o, tab[in][o]);
        end
      end
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
