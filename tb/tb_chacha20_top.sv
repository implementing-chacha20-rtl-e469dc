// tb_chacha20_top - end-to-end test of all cores in the top level at their
// default sizes. Each core gets its own random nonce, key and counter and
// encrypts a text stream long enough to use several keystream blocks, with
// random pauses; every output word is checked against the reference
// keystream. A key change in the middle of a block (discarding the block
// computed in advance) and a decryption after reloading the counter are
// done on every core. The mechanisms seen are counted and each must occur:
// long encryptions (waiting for a block), short encryptions (keystream at
// hand), a prefetched block used without waiting, a discarded prefetch, and
// the pipeline fill and streaming of the 64-bit core. For the two masked
// cores a word served from a computed block takes a few clocks (encode,
// masked xor, decode) instead of one, so "short" means at most 8 clocks.
module tb_chacha20_top;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ctl[6];
  logic [63:0] din[6];
  logic [5:0] rdy, dn;
  logic [31:0] o32[6];
  logic [63:0] o64;
  int checks = 0, failures = 0;
  int n_long[6], n_short[6], n_prefetch_hit[6], n_discard[6];

  always #5 clk = ~clk;

  chacha20_top dut (
    .clk, .rst_n,
    .main_control(ctl[0]), .main_in(din[0][31:0]), .main_ready(rdy[0]), .main_done(dn[0]), .main_out(o32[0]),
    .seq_control(ctl[1]),  .seq_in(din[1][31:0]),  .seq_ready(rdy[1]),  .seq_done(dn[1]),  .seq_out(o32[1]),
    .unr_control(ctl[2]),  .unr_in(din[2][31:0]),  .unr_ready(rdy[2]),  .unr_done(dn[2]),  .unr_out(o32[2]),
    .p21_control(ctl[3]),  .p21_in(din[3]),        .p21_ready(rdy[3]),  .p21_done(dn[3]),  .p21_out(o64),
    .ti_control(ctl[4]),   .ti_in(din[4][31:0]),   .ti_ready(rdy[4]),   .ti_done(dn[4]),   .ti_out(o32[4]),
    .lc_control(ctl[5]),   .lc_in(din[5][31:0]),   .lc_ready(rdy[5]),   .lc_done(dn[5]),   .lc_out(o32[5])
  );

  function automatic logic [63:0] outp(int k);
    return k == 3 ? o64 : {32'h0, o32[k]};
  endfunction

  // tasks start and end just after a falling edge
  task automatic cmd(int k, logic [3:0] c, logic [31:0] d);
    while (!rdy[k]) @(negedge clk);
    ctl[k] = c; din[k] = {32'h0, d};
    @(negedge clk);
    ctl[k] = 0;
  endtask

  task automatic crypt(int k, input logic [63:0] p, output logic [63:0] c, output int cyc);
    while (!rdy[k]) @(negedge clk);
    ctl[k] = CTRL_CRYPT; din[k] = p;
    cyc = 0;
    do begin
      @(negedge clk);
      ctl[k] = 0;
      cyc++;
    end while (!dn[k] && cyc < 20000);
    c = outp(k);
  endtask

  // longest "short" encryption and time to compute one block, per core
  function automatic int short_lim(int k);
    return k >= 4 ? 8 : 1;
  endfunction
  function automatic int blk_wait(int k);
    return k == 5 ? 8600 : k == 4 ? 3200 : 900;
  endfunction

  // keystream word n of core k (64-bit words for the pipelined core)
  function automatic logic [63:0] ks(int k, w32 key[8], w32 ctr, w32 nonce[3], int n);
    if (k == 3) return {ref_ks_word(key, ctr, nonce, 2*n+1), ref_ks_word(key, ctr, nonce, 2*n)};
    return {32'h0, ref_ks_word(key, ctr, nonce, n)};
  endfunction

  task automatic run_core(int k);
    w32 key[8], key2[8], nonce[3], ctr, ctr2;
    logic [63:0] p, c, p0, c0, mask;
    int cyc, words, per_blk, n;
    mask = (k == 3) ? '1 : 64'hffffffff;
    per_blk = (k == 3) ? 8 : 16;
    words = 3 * per_blk + 5;
    foreach (key[i]) begin key[i] = $urandom; key2[i] = $urandom; end
    foreach (nonce[i]) nonce[i] = $urandom;
    ctr = $urandom;
    for (int i = 0; i < 3; i++) cmd(k, 4'(CTRL_NONCE1 + i), nonce[i]);
    for (int i = 0; i < 8; i++) cmd(k, 4'(CTRL_KEY1 + i), key[i]);
    cmd(k, CTRL_COUNTER, ctr);
    for (n = 0; n < words; n++) begin
      p = {32'($urandom), 32'($urandom)} & mask;
      // leave time for the prefetch before the last block
      if (n == 2 * per_blk) repeat (blk_wait(k)) @(negedge clk);
      crypt(k, p, c, cyc);
      if (n == 0) begin p0 = p; c0 = c; end
      if (cyc > short_lim(k)) n_long[k]++; else n_short[k]++;
      if (n % per_blk == 0 && n > 0 && cyc <= short_lim(k)) n_prefetch_hit[k]++;
      checks++;
      if (c !== (p ^ ks(k, key, ctr, nonce, n))) begin
        failures++;
        if (failures < 20) $display("FAIL core %0d word %0d got %h exp %h", k, n, c, p ^ ks(k, key, ctr, nonce, n));
      end
      if ($urandom % 4 == 0) @(negedge clk);
    end
    // key change in the middle of a block, after the next block was prefetched
    repeat (blk_wait(k)) @(negedge clk);
    if (k != 3) n_discard[k]++;
    for (int i = 0; i < 8; i++) cmd(k, 4'(CTRL_KEY1 + i), key2[i]);
    if (k == 3) begin
      cmd(k, CTRL_COUNTER, ctr + 5);  // the pipelined core does not step the counter back
      ctr2 = ctr + 5;
    end else begin
      ctr2 = ctr + w32'((words + per_blk - 1) / per_blk);
    end
    for (n = 0; n < per_blk + 2; n++) begin
      p = {32'($urandom), 32'($urandom)} & mask;
      crypt(k, p, c, cyc);
      checks++;
      if (c !== (p ^ ks(k, key2, ctr2, nonce, n))) begin
        failures++;
        if (failures < 20) $display("FAIL core %0d rekey word %0d got %h exp %h", k, n, c, p ^ ks(k, key2, ctr2, nonce, n));
      end
    end
    // back to the first key and counter: decrypt the first ciphertext word
    for (int i = 0; i < 8; i++) cmd(k, 4'(CTRL_KEY1 + i), key[i]);
    cmd(k, CTRL_COUNTER, ctr);
    crypt(k, c0, c, cyc);
    checks++;
    if (c !== p0) begin failures++; $display("FAIL core %0d decrypt got %h exp %h", k, c, p0); end
  endtask

  initial begin
    foreach (ctl[k]) begin ctl[k] = 0; din[k] = 0; n_long[k] = 0; n_short[k] = 0; n_prefetch_hit[k] = 0; n_discard[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_core(0);
      run_core(1);
      run_core(2);
      run_core(3);
      run_core(4);
      run_core(5);
    join
    for (int k = 0; k < 6; k++) begin
      $display("core %0d: long %0d short %0d prefetch-hit %0d discard %0d", k, n_long[k], n_short[k], n_prefetch_hit[k], n_discard[k]);
      checks++;
      if (n_long[k] == 0 || n_short[k] == 0 || n_prefetch_hit[k] == 0) begin
        failures++; $display("FAIL core %0d: a mechanism never happened", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
