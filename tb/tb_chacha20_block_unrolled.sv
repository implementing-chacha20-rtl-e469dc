// tb_chacha20_block_unrolled - runs the unrolled block function with
// unrolling factors 2, 4, 5, 10 and 20 side by side on random blocks,
// compares each result with the behavioural reference and checks that a
// block takes 20/UNROLL clocks of rounds plus two (load, final addition).
module tb_chacha20_block_unrolled;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  localparam int N = 5;
  localparam int U[N] = '{2, 4, 5, 10, 20};
  logic clk = 0, rst_n = 0, start = 0;
  state_t bin;
  state_t bout[N];
  logic [N-1:0] done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_dut
    chacha20_block_unrolled #(.UNROLL(U[i])) dut (
      .clk, .rst_n, .start, .block_in(bin), .done(done[i]), .block_out(bout[i]));
  end

  initial begin
    blk_t ref_in, ref_out;
    int lat[N];
    bit all;
    bin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      for (int k = 0; k < 16; k++) begin ref_in[k] = $urandom; bin[k] = ref_in[k]; end
      ref_out = ref_block_fn(ref_in);
      start = 1;
      @(negedge clk);
      start = 0;
      bin = '0;
      lat = '{default: 0};
      for (int cyc = 1; cyc < 100; cyc++) begin
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
            if (failures < 10) $display("FAIL U=%0d word %0d got %h exp %h", U[i], k, bout[i][k], ref_out[k]);
          end
        end
        checks++;
        if (lat[i] != 20 / U[i] + 2) begin
          failures++;
          $display("FAIL U=%0d latency %0d exp %0d", U[i], lat[i], 20 / U[i] + 2);
        end
      end
      repeat (2) @(negedge clk);
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
