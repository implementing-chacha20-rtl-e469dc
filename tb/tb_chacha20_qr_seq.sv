// tb_chacha20_qr_seq - runs the sequential quarter round with 32-, 16- and
// 8-bit components side by side on random words, compares the results with
// the behavioural reference and checks the latency: done must come exactly
// 8*32/WIDTH + 1 clocks after start.
module tb_chacha20_qr_seq;
  import chacha20_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] a, b, c, d;
  logic [2:0] done;
  logic [31:0] oa[3], ob[3], oc[3], od[3];
  int checks = 0, failures = 0;
  localparam int W[3] = '{32, 16, 8};

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    chacha20_qr_seq #(.WIDTH(W[i])) dut (
      .clk, .rst_n, .start, .in_a(a), .in_b(b), .in_c(c), .in_d(d),
      .done(done[i]), .out_a(oa[i]), .out_b(ob[i]), .out_c(oc[i]), .out_d(od[i]));
  end

  initial begin
    w32 x[16];
    int lat[3];
    a = 0; b = 0; c = 0; d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      if (t == 0) begin a = 32'h11111111; b = 32'h01020304; c = 32'h9b8d6f43; d = 32'h01234567; end
      else begin a = $urandom; b = $urandom; c = $urandom; d = $urandom; end
      x[0] = a; x[4] = b; x[8] = c; x[12] = d;
      r_qr(x, 0, 4, 8, 12);
      start = 1;
      @(negedge clk);
      start = 0;
      a = $urandom;   // inputs are only sampled with start
      lat = '{0, 0, 0};
      for (int cyc = 1; cyc < 80 && !(lat[0] && lat[1] && lat[2]); cyc++) begin
        for (int i = 0; i < 3; i++) if (done[i] && lat[i] == 0) lat[i] = cyc;
        if (!(lat[0] && lat[1] && lat[2])) @(negedge clk);
      end
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if ({oa[i], ob[i], oc[i], od[i]} !== {x[0], x[4], x[8], x[12]}) begin
          failures++;
          $display("FAIL W=%0d got %h %h %h %h exp %h %h %h %h", W[i], oa[i], ob[i], oc[i], od[i], x[0], x[4], x[8], x[12]);
        end
        if (lat[i] != 8 * (32 / W[i]) + 1) begin
          failures++;
          $display("FAIL W=%0d latency %0d exp %0d", W[i], lat[i], 8 * (32 / W[i]) + 1);
        end
      end
      repeat (2) @(negedge clk);
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
