// tb_masked_qr - runs the masked quarter round of both schemes (three-share
// TI and two-share low-cost) side by side. Each input word is split into
// random shares, the recombined outputs are compared with the reference
// quarter round and the latency (start to done) is checked against the
// schedule: 4 additions and 4 xors, each one issue clock plus the unit's
// evaluation time. Also checks that the output shares are really masked,
// i.e. no single share equals the plain result on every test.
module tb_masked_qr;
  import chacha20_ref_pkg::*;
  import mask_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] ti_in [4][3], ti_out [4][3];
  logic [31:0] lc_in [4][2], lc_out [4][2];
  logic [1:0] done;
  int checks = 0, failures = 0;
  localparam int LAT_TI = 4 * (1 + 33) + 4 * (1 + 2) + 1;
  localparam int LAT_LC = 4 * (1 + 98) + 4 * (1 + 3) + 1;

  always #5 clk = ~clk;

  masked_qr #(.SCHEME(MASK_TI)) dut_ti (
    .clk, .rst_n, .start, .in_a(ti_in[0]), .in_b(ti_in[1]), .in_c(ti_in[2]), .in_d(ti_in[3]),
    .done(done[0]), .out_a(ti_out[0]), .out_b(ti_out[1]), .out_c(ti_out[2]), .out_d(ti_out[3]));
  masked_qr #(.SCHEME(MASK_LC)) dut_lc (
    .clk, .rst_n, .start, .in_a(lc_in[0]), .in_b(lc_in[1]), .in_c(lc_in[2]), .in_d(lc_in[3]),
    .done(done[1]), .out_a(lc_out[0]), .out_b(lc_out[1]), .out_c(lc_out[2]), .out_d(lc_out[3]));

  initial begin
    w32 x[16], v[4], z0, z1;
    int lat[2], share_eq;
    share_eq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        v[j] = (t == 0) ? (j == 0 ? 32'h11111111 : j == 1 ? 32'h01020304 : j == 2 ? 32'h9b8d6f43 : 32'h01234567) : $urandom;
        z0 = $urandom; z1 = $urandom;
        ti_in[j][0] = v[j] ^ z0 ^ z1; ti_in[j][1] = z0; ti_in[j][2] = z1;
        z0 = $urandom;
        lc_in[j][0] = v[j] ^ z0; lc_in[j][1] = z0;
      end
      x[0] = v[0]; x[4] = v[1]; x[8] = v[2]; x[12] = v[3];
      r_qr(x, 0, 4, 8, 12);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = '{0, 0};
      for (int cyc = 1; cyc < 1000 && !(lat[0] && lat[1]); cyc++) begin
        for (int i = 0; i < 2; i++) if (done[i] && lat[i] == 0) lat[i] = cyc;
        if (!(lat[0] && lat[1])) @(negedge clk);
      end
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if ((ti_out[j][0] ^ ti_out[j][1] ^ ti_out[j][2]) !== x[4 * j]) begin
          failures++;
          $display("FAIL TI word %0d got %h exp %h", j, ti_out[j][0] ^ ti_out[j][1] ^ ti_out[j][2], x[4 * j]);
        end
        if ((lc_out[j][0] ^ lc_out[j][1]) !== x[4 * j]) begin
          failures++;
          $display("FAIL LC word %0d got %h exp %h", j, lc_out[j][0] ^ lc_out[j][1], x[4 * j]);
        end
        if (ti_out[j][0] == x[4 * j] || lc_out[j][0] == x[4 * j]) share_eq++;
      end
      checks += 2;
      if (lat[0] != LAT_TI) begin failures++; $display("FAIL TI latency %0d exp %0d", lat[0], LAT_TI); end
      if (lat[1] != LAT_LC) begin failures++; $display("FAIL LC latency %0d exp %0d", lat[1], LAT_LC); end
      repeat (2) @(negedge clk);
    end
    checks++;
    if (share_eq > 2) begin failures++; $display("FAIL shares equal plain result %0d times", share_eq); end
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
