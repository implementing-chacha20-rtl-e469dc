// tb_lc_gates - exhaustive test of the low-cost masked gates (AND, OR, XOR,
// xor-3, carry-out) on two-share bits. Every sharing of every input
// combination is applied after a random previous input, held for the gate's
// evaluation time (AND 1, OR 1, XOR 2, carry-out 3, xor-3 4 clocks) and the
// recombined output is compared with the plain function.
module tb_lc_gates;
  logic clk = 0;
  logic x [2], y [2], w [2];
  logic z_and [2], z_or [2], z_xor [2], z_x3 [2], z_cy [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lc_and   #(.W(1)) u_and (.clk, .x(x), .y(y), .z(z_and));
  lc_or    #(.W(1)) u_or  (.clk, .x(x), .y(y), .z(z_or));
  lc_xor   #(.W(1)) u_xor (.clk, .x(x), .y(y), .z(z_xor));
  lc_xor3  #(.W(1)) u_x3  (.clk, .a(x), .b(y), .c(w), .r(z_x3));
  lc_carry #(.W(1)) u_cy  (.clk, .a(x), .b(y), .c(w), .r(z_cy));

  task automatic expect_bit(string name, logic got, logic exp, int v);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s sharing %0d got %0d exp %0d", name, v, got, exp);
    end
  endtask

  initial begin
    logic xv, yv, wv;
    for (int pass = 0; pass < 4; pass++)
      for (int v = 0; v < 64; v++) begin
        // random previous input, then the input under test
        @(negedge clk);
        x[0] = 1'($urandom); x[1] = 1'($urandom); y[0] = 1'($urandom);
        y[1] = 1'($urandom); w[0] = 1'($urandom); w[1] = 1'($urandom);
        repeat (2) @(negedge clk);
        x[0] = v[0]; x[1] = v[1]; y[0] = v[2]; y[1] = v[3]; w[0] = v[4]; w[1] = v[5];
        xv = x[0] ^ x[1]; yv = y[0] ^ y[1]; wv = w[0] ^ w[1];
        @(negedge clk);  // 1 clock
        expect_bit("and", z_and[0] ^ z_and[1], xv & yv, v);
        expect_bit("or",  z_or[0] ^ z_or[1],   xv | yv, v);
        @(negedge clk);  // 2 clocks
        expect_bit("xor", z_xor[0] ^ z_xor[1], xv ^ yv, v);
        @(negedge clk);  // 3 clocks
        expect_bit("carry", z_cy[0] ^ z_cy[1], (xv & yv) | (yv & wv) | (wv & xv), v);
        @(negedge clk);  // 4 clocks
        expect_bit("xor3", z_x3[0] ^ z_x3[1], xv ^ yv ^ wv, v);
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
