// tb_chacha20_cipher_p21 - end-to-end test of the 64-bit cipher built on the
// 21-stage pipeline. Loads random nonce, key and counter, encrypts 160
// random 64-bit words (1280 bytes) back to back and checks every word
// against the reference keystream. Timing checks: the first word waits for
// the pipeline to fill (at least 21 clocks), later words take one clock
// each, so the 1280 bytes must take under 0.15 clocks per byte. Then the
// counter is reloaded (a flush) and a ciphertext word is decrypted back.
module tb_chacha20_cipher_p21;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] control = 0;
  logic [63:0] din = 0, dout;
  logic ready, done;
  int checks = 0, failures = 0;
  int n_fill = 0, n_stream = 0;

  always #5 clk = ~clk;

  chacha20_cipher_p21 dut (.clk, .rst_n, .control, .in(din), .ready, .done, .out(dout));

  // tasks start and end just after a falling edge
  task automatic cmd(logic [3:0] c, logic [31:0] d);
    while (!ready) @(negedge clk);
    control = c; din = {32'($urandom), d};
    @(negedge clk);
    control = 0;
  endtask

  task automatic crypt(input logic [63:0] p, output logic [63:0] c, output int cyc);
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

  function automatic logic [63:0] ks64(w32 key[8], w32 ctr, w32 nonce[3], int n);
    return {ref_ks_word(key, ctr, nonce, 2*n+1), ref_ks_word(key, ctr, nonce, 2*n)};
  endfunction

  initial begin
    w32 key[8], nonce[3], ctr;
    logic [63:0] p, c, p0, c0;
    int cyc, t0;
    foreach (key[i]) key[i] = $urandom;
    foreach (nonce[i]) nonce[i] = $urandom;
    ctr = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) cmd(4'(CTRL_NONCE1 + i), nonce[i]);
    for (int i = 0; i < 8; i++) cmd(4'(CTRL_KEY1 + i), key[i]);
    cmd(CTRL_COUNTER, ctr);
    t0 = $time;
    for (int n = 0; n < 160; n++) begin
      p = {32'($urandom), 32'($urandom)};
      crypt(p, c, cyc);
      if (n == 0) begin p0 = p; c0 = c; end
      checks++;
      if (c !== (p ^ ks64(key, ctr, nonce, n))) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %h exp %h", n, c, p ^ ks64(key, ctr, nonce, n));
      end
      if (cyc > 1) n_fill++; else n_stream++;
      checks++;
      if ((n == 0 && cyc < 21) || (n > 0 && cyc != 1)) begin
        failures++; $display("FAIL word %0d took %0d clocks", n, cyc);
      end
    end
    $display("1280 bytes in %0d clocks", ($time - t0) / 10);
    checks++;
    if (($time - t0) / 10 > 192) begin failures++; $display("FAIL too slow"); end
    cmd(CTRL_COUNTER, ctr);
    crypt(c0, c, cyc);
    checks++;
    if (c !== p0) begin failures++; $display("FAIL decrypt got %h exp %h", c, p0); end
    checks++;
    if (n_fill == 0 || n_stream == 0) begin failures++; $display("FAIL fill/stream not both seen"); end
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
