// tb_masked_cipher - end-to-end test of the protected ciphers: a three-share
// TI core and a two-share low-cost core, driven with the same commands.
//  - loads random nonce, key and counter and encrypts 36 words (three
//    blocks); every ciphertext word of both cores is checked against the
//    reference keystream;
//  - timing: the first word waits for a whole masked block (over 3000 clocks
//    for TI, 8000 for LC), words served from an already computed block take
//    only the encode / masked xor / decode clocks (at most 8), and the next
//    block is computed in advance while words are being encrypted;
//  - changes the key in the middle of a block and checks that the stream
//    continues with the first unused counter value under the new key;
//  - reloads the counter and decrypts the first ciphertext back.
// Mechanism counts (long waits, short words, discarded blocks) must be
// non-zero.
module tb_masked_cipher;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] control = 0;
  logic [31:0] din = 0, dout[2];
  logic [1:0] ready, done;
  int checks = 0, failures = 0;
  int n_long = 0, n_short = 0, n_prefetch = 0;

  always #5 clk = ~clk;

  masked_cipher #(.SCHEME(MASK_TI)) dut_ti (.clk, .rst_n, .control, .in(din), .ready(ready[0]), .done(done[0]), .out(dout[0]));
  masked_cipher #(.SCHEME(MASK_LC)) dut_lc (.clk, .rst_n, .control, .in(din), .ready(ready[1]), .done(done[1]), .out(dout[1]));

  task automatic cmd(logic [3:0] c, logic [31:0] d);
    while (ready != 2'b11) @(negedge clk);
    control = c; din = d;
    @(negedge clk);
    control = 0; din = $urandom;
  endtask

  // encrypt one word on both cores, return both results and their latencies
  task automatic crypt(input logic [31:0] p, output logic [31:0] c[2], output int cyc[2]);
    logic [1:0] got;
    while (ready != 2'b11) @(negedge clk);
    control = CTRL_CRYPT; din = p;
    cyc = '{0, 0};
    got = 0;
    for (int k = 1; k < 20000 && got != 2'b11; k++) begin
      @(negedge clk);
      control = 0;
      for (int i = 0; i < 2; i++) if (done[i] && !got[i]) begin got[i] = 1; c[i] = dout[i]; cyc[i] = k; end
    end
  endtask

  task automatic configure(w32 key[8], w32 ctr, w32 nonce[3]);
    for (int i = 0; i < 3; i++) cmd(4'(CTRL_NONCE1 + i), nonce[i]);
    for (int i = 0; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key[i]);
    cmd(CTRL_COUNTER, ctr);
  endtask

  task automatic check_word(logic [31:0] c[2], logic [31:0] exp, string what);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (c[i] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s core %0d got %h exp %h", what, i, c[i], exp);
      end
    end
  endtask

  initial begin
    w32 key[8], nonce[3], key2[8], ctr;
    logic [31:0] p, c[2], first_p, first_c[2];
    int cyc[2], n;
    foreach (key[i]) begin key[i] = $urandom; key2[i] = $urandom; end
    foreach (nonce[i]) nonce[i] = $urandom;
    ctr = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    configure(key, ctr, nonce);

    for (n = 0; n < 36; n++) begin
      p = $urandom;
      crypt(p, c, cyc);
      if (n == 0) begin first_p = p; first_c = c; end
      check_word(c, p ^ ref_ks_word(key, ctr, nonce, n), "stream");
      checks += 2;
      if (n == 0) begin
        n_long++;
        if (cyc[0] < 3000 || cyc[1] < 8000) begin failures++; $display("FAIL first word too fast %0d %0d", cyc[0], cyc[1]); end
      end else if (n % 16 != 0) begin
        n_short++;
        if (cyc[0] > 8 || cyc[1] > 8) begin failures++; $display("FAIL word %0d took %0d %0d clocks", n, cyc[0], cyc[1]); end
      end else begin
        // block boundary: the next block was prefetched during the previous words
        // plus the idle time below, so it is served quickly
        if (cyc[0] <= 8 && cyc[1] <= 8) n_prefetch++;
        else begin failures++; $display("FAIL block boundary word %0d took %0d %0d clocks", n, cyc[0], cyc[1]); end
      end
      // leave time to finish the prefetch before the boundary word
      if (n % 16 == 15) repeat (8500) @(negedge clk);
    end

    // key change in the middle of a block (a prefetched block is discarded)
    for (int i = 0; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key2[i]);
    for (int k = 0; k < 3; k++) begin
      p = $urandom;
      crypt(p, c, cyc);
      check_word(c, p ^ ref_ks_word(key2, ctr + 3, nonce, k), "after rekey");
    end

    // decrypt the first word again
    configure(key, ctr, nonce);
    crypt(first_c[0], c, cyc);
    check_word(c, first_p, "decrypt");
    checks += 2;
    if (first_c[0] !== first_c[1]) begin failures++; $display("FAIL cores disagree"); end

    checks += 3;
    if (n_long == 0) begin failures++; $display("FAIL no long encryption"); end
    if (n_short == 0) begin failures++; $display("FAIL no short encryption"); end
    if (n_prefetch == 0) begin failures++; $display("FAIL no prefetched block"); end
    $display("long=%0d short=%0d prefetch=%0d", n_long, n_short, n_prefetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
