// tb_chacha20_qr - checks the combinatorial quarter round against the
// published ChaCha20 quarter-round test vector and against the behavioural
// reference on random words.
module tb_chacha20_qr;
  import chacha20_ref_pkg::*;
  logic [31:0] a, b, c, d, oa, ob, oc, od;
  int checks = 0, failures = 0;

  chacha20_qr dut (.in_a(a), .in_b(b), .in_c(c), .in_d(d),
                   .out_a(oa), .out_b(ob), .out_c(oc), .out_d(od));

  task automatic check(logic [31:0] ea, eb, ec, ed);
    checks++;
    if ({oa, ob, oc, od} !== {ea, eb, ec, ed}) begin
      failures++;
      $display("FAIL in %h %h %h %h got %h %h %h %h exp %h %h %h %h", a, b, c, d, oa, ob, oc, od, ea, eb, ec, ed);
    end
  endtask

  initial begin
    w32 x[16];
    a = 32'h11111111; b = 32'h01020304; c = 32'h9b8d6f43; d = 32'h01234567;
    #1 check(32'hea2a92f4, 32'hcb1cf8ce, 32'h4581472e, 32'h5881c4bb);
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      x[0] = a; x[4] = b; x[8] = c; x[12] = d;
      r_qr(x, 0, 4, 8, 12);
      #1 check(x[0], x[4], x[8], x[12]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
