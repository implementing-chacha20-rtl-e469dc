// tb_chacha20_cipher - end-to-end test of the 32-bit cipher in its default
// configuration (four combinatorial QR units).
//  - loads random nonce, key and counter and encrypts 80 random words; every
//    ciphertext word is checked against the reference keystream;
//  - checks the timing: the first word after configuration is a long
//    encryption (block computation, 22+ clocks), the next fifteen are short
//    (done one clock after the command), and back-to-back streaming costs
//    no more than 24 clocks per 16 words;
//  - changes the key in the middle of a block and checks that the stream
//    continues with the first unused counter value;
//  - reloads the counter and decrypts the first ciphertext back.
module tb_chacha20_cipher;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] control = 0;
  logic [31:0] din = 0, dout;
  logic ready, done;
  int checks = 0, failures = 0;
  int n_long = 0, n_short = 0;

  always #5 clk = ~clk;

  chacha20_cipher dut (.clk, .rst_n, .control, .in(din), .ready, .done, .out(dout));

  // tasks start and end just after a falling edge
  task automatic cmd(logic [3:0] c, logic [31:0] d);
    while (!ready) @(negedge clk);
    control = c; din = d;
    @(negedge clk);
    control = 0; din = $urandom;
  endtask

  // encrypt one word, return the result and the clocks from command to done
  task automatic crypt(input logic [31:0] p, output logic [31:0] c, output int cyc);
    while (!ready) @(negedge clk);
    control = CTRL_CRYPT; din = p;
    cyc = 0;
    do begin
      @(negedge clk);
      control = 0;
      cyc++;
    end while (!done && cyc < 5000);
    c = dout;
  endtask

  task automatic configure(w32 key[8], w32 ctr, w32 nonce[3]);
    for (int i = 0; i < 3; i++) cmd(4'(CTRL_NONCE1 + i), nonce[i]);
    for (int i = 0; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key[i]);
    cmd(CTRL_COUNTER, ctr);
  endtask

  task automatic expect_word(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    w32 key[8], nonce[3], key2[8], ctr;
    logic [31:0] p, c, first_p, first_c;
    int cyc, t0, n;
    foreach (key[i]) begin key[i] = $urandom; key2[i] = $urandom; end
    foreach (nonce[i]) nonce[i] = $urandom;
    ctr = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    configure(key, ctr, nonce);

    for (n = 0; n < 80; n++) begin
      p = $urandom;
      crypt(p, c, cyc);
      if (n == 0) begin first_p = p; first_c = c; end
      expect_word(c, p ^ ref_ks_word(key, ctr, nonce, n), "stream");
      if (cyc > 1) n_long++; else n_short++;
      checks++;
      if (n == 0 && cyc < 22) begin failures++; $display("FAIL first word took only %0d clocks", cyc); end
      if (n % 16 != 0 && cyc != 1) begin failures++; $display("FAIL word %0d short encryption took %0d clocks", n, cyc); end
      repeat ($urandom % 3) @(negedge clk);
    end

    // back-to-back streaming rate
    t0 = $time;
    for (int k = 0; k < 64; k++) begin
      p = $urandom;
      crypt(p, c, cyc);
      expect_word(c, p ^ ref_ks_word(key, ctr, nonce, n), "back-to-back");
      n++;
    end
    checks++;
    $display("back-to-back: %0d clocks for 64 words", ($time - t0) / 10);
    if (($time - t0) / 10 > 4 * 24) begin failures++; $display("FAIL streaming too slow"); end

    // key change in the middle of block n/16: continue at the next counter
    for (int k = 0; k < 5; k++) begin p = $urandom; crypt(p, c, cyc); n++; end
    repeat (30) @(negedge clk);   // let the prefetch finish first
    for (int i = 0; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key2[i]);
    for (int k = 0; k < 20; k++) begin
      p = $urandom;
      crypt(p, c, cyc);
      expect_word(c, p ^ ref_ks_word(key2, ctr + w32'((n + 15) / 16), nonce, k), "after rekey");
    end
    // key change while a block is being computed
    p = $urandom; crypt(p, c, cyc);
    cmd(CTRL_KEY1, key[0]);
    for (int i = 1; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key[i]);
    cmd(CTRL_COUNTER, ctr);
    // decrypt the first ciphertext again
    crypt(first_c, c, cyc);
    expect_word(c, first_p, "decrypt");
    checks++;
    if (n_long == 0 || n_short == 0) begin failures++; $display("FAIL long/short not both seen"); end
    $display("long encryptions %0d, short encryptions %0d", n_long, n_short);
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
