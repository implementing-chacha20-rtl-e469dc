// tb_masked_block - runs the masked block function with three-share TI
// (4 and 1 quarter-round units) and two-share low-cost masking (4 units) on
// the RFC 8439 block and random blocks. Inputs are split into random
// shares; the recombined result is compared with the reference block
// function and the start-to-done latency with the schedule: 20 * 4/NUM_QR
// quarter-round steps, each the masked QR time plus one handshake clock,
// then one pass of the masked final adders plus load and hand-over clocks.
module tb_masked_block;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  import mask_pkg::*;
  localparam int QR_TI = 4 * (1 + 33) + 4 * (1 + 2) + 1;
  localparam int QR_LC = 4 * (1 + 98) + 4 * (1 + 3) + 1;
  localparam int LAT_TI4 = 20 * (QR_TI + 1) + 33 + 2;
  localparam int LAT_TI1 = 80 * (QR_TI + 1) + 33 + 2;
  localparam int LAT_LC4 = 20 * (QR_LC + 1) + 98 + 2;
  logic clk = 0, rst_n = 0, start = 0;
  state_t ti_in [3], ti_out4 [3], ti_out1 [3];
  state_t lc_in [2], lc_out [2];
  logic [2:0] done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  masked_block #(.SCHEME(MASK_TI), .NUM_QR(4)) dut_ti4 (
    .clk, .rst_n, .start, .block_in(ti_in), .done(done[0]), .block_out(ti_out4));
  masked_block #(.SCHEME(MASK_TI), .NUM_QR(1)) dut_ti1 (
    .clk, .rst_n, .start, .block_in(ti_in), .done(done[1]), .block_out(ti_out1));
  masked_block #(.SCHEME(MASK_LC), .NUM_QR(4)) dut_lc (
    .clk, .rst_n, .start, .block_in(lc_in), .done(done[2]), .block_out(lc_out));

  initial begin
    blk_t ref_in, ref_out;
    int lat[3];
    localparam int EXP[3] = '{LAT_TI4, LAT_TI1, LAT_LC4};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      for (int k = 0; k < 16; k++) ref_in[k] = $urandom;
      if (t == 0) begin   // RFC 8439 section 2.3.2
        w32 key[8], nonce[3];
        for (int k = 0; k < 8; k++) key[k] = {8'(4*k+3), 8'(4*k+2), 8'(4*k+1), 8'(4*k)};
        nonce = '{32'h09000000, 32'h4a000000, 32'h00000000};
        ref_in = ref_init(key, 32'd1, nonce);
      end
      ref_out = ref_block_fn(ref_in);
      for (int k = 0; k < 16; k++) begin
        w32 z0, z1;
        z0 = $urandom; z1 = $urandom;
        ti_in[0][k] = ref_in[k] ^ z0 ^ z1; ti_in[1][k] = z0; ti_in[2][k] = z1;
        z0 = $urandom;
        lc_in[0][k] = ref_in[k] ^ z0; lc_in[1][k] = z0;
      end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = '{0, 0, 0};
      for (int cyc = 1; cyc < 20000 && !(lat[0] && lat[1] && lat[2]); cyc++) begin
        for (int i = 0; i < 3; i++) if (done[i] && lat[i] == 0) lat[i] = cyc;
        if (!(lat[0] && lat[1] && lat[2])) @(negedge clk);
      end
      for (int k = 0; k < 16; k++) begin
        checks += 3;
        if ((ti_out4[0][k] ^ ti_out4[1][k] ^ ti_out4[2][k]) !== ref_out[k]) begin
          failures++; $display("FAIL TI4 word %0d", k);
        end
        if ((ti_out1[0][k] ^ ti_out1[1][k] ^ ti_out1[2][k]) !== ref_out[k]) begin
          failures++; $display("FAIL TI1 word %0d", k);
        end
        if ((lc_out[0][k] ^ lc_out[1][k]) !== ref_out[k]) begin
          failures++; $display("FAIL LC word %0d", k);
        end
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (lat[i] != EXP[i]) begin failures++; $display("FAIL dut %0d latency %0d exp %0d", i, lat[i], EXP[i]); end
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
