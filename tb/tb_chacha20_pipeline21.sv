// tb_chacha20_pipeline21 - feeds the 21-stage pipeline one random block per
// move, with idle clocks (run low) in between at random, and supplies the
// initial state of the block leaving stage 20 as the cipher does. Every
// block that comes out valid must equal the reference block function of the
// block that went in 21 moves earlier; the valid bit must first rise after
// exactly 21 moves, and a flush must clear it.
module tb_chacha20_pipeline21;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, flush = 0, valid_in = 0;
  state_t sin, sinit, sout;
  logic vout;
  int checks = 0, failures = 0;
  blk_t inq[$];
  int moves = 0;

  always #5 clk = ~clk;

  chacha20_pipeline21 dut (.clk, .rst_n, .run, .flush, .valid_in,
    .state_in(sin), .initial_state(sinit), .valid_out(vout), .state_out(sout));

  initial begin
    blk_t b, e;
    sin = '0; sinit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      run = ($urandom % 4) != 0;
      valid_in = 1;
      for (int k = 0; k < 16; k++) begin b[k] = $urandom; sin[k] = b[k]; end
      if (inq.size() >= 20) for (int k = 0; k < 16; k++) sinit[k] = inq[inq.size() - 20][k];
      if (run) begin
        inq.push_back(b);
        moves++;
      end
      @(posedge clk);
      #1;
      if (run) begin
        checks++;
        if (vout !== (moves >= 21)) begin
          failures++; $display("FAIL valid_out %0d after %0d moves", vout, moves);
        end
        if (vout) begin
          e = ref_block_fn(inq[inq.size() - 21]);
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (sout[k] !== e[k]) begin
              failures++;
              if (failures < 10) $display("FAIL move %0d word %0d got %h exp %h", moves, k, sout[k], e[k]);
            end
          end
        end
      end
    end
    @(negedge clk);
    flush = 1; run = 0;
    @(negedge clk);
    flush = 0;
    checks++;
    if (vout !== 1'b0) begin failures++; $display("FAIL flush"); end
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
