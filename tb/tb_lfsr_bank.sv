// tb_lfsr_bank - checks the random bit bank at its default size (96 LFSRs).
// Every output lane must obey the 40-bit LFSR recurrence
// r(t) = r(t-40) ^ r(t-38) ^ r(t-21) ^ r(t-19) over 300 clocks, no two
// lanes may produce the same sequence, each lane must be roughly balanced,
// and the whole bank must hold still while en is low.
module tb_lfsr_bank;
  localparam int N = 96, T = 300;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] rnd;
  logic [N-1:0] hist [T];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_bank dut (.clk, .rst_n, .en, .rnd);

  initial begin
    logic [N-1:0] held;
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int t = 0; t < T; t++) begin
      hist[t] = rnd;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      int ones;
      ones = 0;
      for (int t = 0; t < T; t++) ones += int'(hist[t][i]);
      for (int t = 40; t < T; t++) begin
        checks++;
        if (hist[t][i] != (hist[t-40][i] ^ hist[t-38][i] ^ hist[t-21][i] ^ hist[t-19][i])) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d breaks the recurrence at %0d", i, t);
        end
      end
      checks++;
      if (ones < T / 4 || ones > 3 * T / 4) begin failures++; $display("FAIL lane %0d has %0d ones", i, ones); end
      for (int j = 0; j < i; j++) begin
        bit same;
        same = 1;
        for (int t = 0; t < T; t++) if (hist[t][i] != hist[t][j]) same = 0;
        checks++;
        if (same) begin failures++; $display("FAIL lanes %0d and %0d are equal", i, j); end
      end
    end
    // freeze
    en = 0;
    @(negedge clk);
    held = rnd;
    for (int k = 0; k < 20 + int'($urandom % 20); k++) begin
      @(negedge clk);
      checks++;
      if (rnd !== held) begin failures++; $display("FAIL bank moved with en low"); end
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
