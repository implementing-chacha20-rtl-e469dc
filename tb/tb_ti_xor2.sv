// tb_ti_xor2 - exhaustive test of the three-share xor bank (one bit lane of
// a 32-bit bank is driven, the others get random data). All 64 sharings of
// (a, b) are applied; it checks correctness, the uniformity table (each
// correct output sharing exactly 4 times per unshared input, wrong ones
// never) and non-completeness (output share i ignores input share i).
module tb_ti_xor2;
  logic clk = 0;
  logic [31:0] a [3], b [3], r [3];
  int checks = 0, failures = 0;
  int tab [4][8];
  localparam int L = 13;   // observed bit lane

  always #5 clk = ~clk;

  ti_xor2 #(.W(32)) dut (.clk, .a(a), .b(b), .r(r));

  initial begin
    logic [2:0] o;
    foreach (tab[i, j]) tab[i][j] = 0;
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      for (int s = 0; s < 3; s++) begin
        a[s] = $urandom; b[s] = $urandom;
        a[s][L] = v[s]; b[s][L] = v[3+s];
      end
      @(negedge clk);
      o = {r[0][L], r[1][L], r[2][L]};
      tab[{a[0][L]^a[1][L]^a[2][L], b[0][L]^b[1][L]^b[2][L]}][o]++;
      checks++;
      if ((r[0]^r[1]^r[2]) !== (a[0]^a[1]^a[2]^b[0]^b[1]^b[2])) begin
        failures++; $display("FAIL correctness v=%0d", v);
      end
      for (int i = 0; i < 3; i++) begin
        a[i][L] = ~a[i][L]; b[i][L] = ~b[i][L];
        @(negedge clk);
        checks++;
        if (r[i][L] !== o[2-i]) begin failures++; $display("FAIL non-completeness share %0d", i); end
        a[i][L] = ~a[i][L]; b[i][L] = ~b[i][L];
      end
    end
    for (int in = 0; in < 4; in++)
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (tab[in][k] != (((k[0] ^ k[1] ^ k[2]) == (in[0] ^ in[1])) ? 4 : 0)) begin
          failures++; $display("FAIL uniformity in=%0d out=%0d count %0d", in, k, tab[in][k]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
