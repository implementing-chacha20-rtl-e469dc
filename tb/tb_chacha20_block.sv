// tb_chacha20_block - runs the iterative block function in four
// configurations side by side (4 and 1 combinatorial QR units, 4 sequential
// 8-bit units, 1 sequential 32-bit unit) on the RFC 8439 block test vector
// and on random blocks. Each result is compared with the behavioural
// reference and the start-to-done latency with the expected cycle count:
// 20 steps of rounds with 4 combinatorial units, 80 with 1, and
// 8*32/W + 2 clocks per step for sequential units, plus two clocks for
// loading and the final addition.
module tb_chacha20_block;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  localparam int N = 4;
  localparam int NQ[N]  = '{4, 1, 4, 1};
  localparam bit SEQ[N] = '{0, 0, 1, 1};
  localparam int SW[N]  = '{32, 32, 8, 32};
  logic clk = 0, rst_n = 0, start = 0;
  state_t bin;
  state_t bout[N];
  logic [N-1:0] done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_dut
    chacha20_block #(.NUM_QR(NQ[i]), .QR_SEQ(SEQ[i]), .SEQ_WIDTH(SW[i])) dut (
      .clk, .rst_n, .start, .block_in(bin), .done(done[i]), .block_out(bout[i]));
  end

  function automatic int exp_latency(int i);
    int steps = 20 * (4 / NQ[i]);
    int per = SEQ[i] ? 8 * (32 / SW[i]) + 2 : 1;
    return steps * per + 2;
  endfunction

  initial begin
    blk_t ref_in, ref_out;
    int lat[N];
    bit all;
    bin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      for (int k = 0; k < 16; k++) ref_in[k] = $urandom;
      if (t == 0) begin   // RFC 8439 section 2.3.2
        w32 key[8], nonce[3];
        for (int k = 0; k < 8; k++) key[k] = {8'(4*k+3), 8'(4*k+2), 8'(4*k+1), 8'(4*k)};
        nonce = '{32'h09000000, 32'h4a000000, 32'h00000000};
        ref_in = ref_init(key, 32'd1, nonce);
      end
      ref_out = ref_block_fn(ref_in);
      if (t == 0) begin
        checks++;
        if (ref_out[0] != 32'he4e7f110 || ref_out[15] != 32'h4e3c50a2) begin
          failures++; $display("FAIL reference model vs RFC vector");
        end
      end
      for (int k = 0; k < 16; k++) bin[k] = ref_in[k];
      start = 1;
      @(negedge clk);
      start = 0;
      bin = '0;
      lat = '{default: 0};
      for (int cyc = 1; cyc < 3000; cyc++) begin
        all = 1;
        for (int i = 0; i < N; i++) begin
          if (done[i] && lat[i] == 0) lat[i] = cyc;
          if (lat[i] == 0) all = 0;
        end
        if (all) break;
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (bout[i][k] !== ref_out[k]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d word %0d got %h exp %h", i, k, bout[i][k], ref_out[k]);
          end
        end
        checks++;
        if (lat[i] != exp_latency(i)) begin
          failures++;
          $display("FAIL cfg %0d latency %0d exp %0d", i, lat[i], exp_latency(i));
        end
        if (t == 0) $display("cfg %0d (NUM_QR=%0d seq=%0d width=%0d): %0d cycles per block", i, NQ[i], SEQ[i], SW[i], lat[i]);
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
