// tb_chacha20_round - checks one column round and one diagonal round of the
// four-QR round unit against the behavioural reference on random states.
module tb_chacha20_round;
  import chacha20_pkg::*;
  import chacha20_ref_pkg::*;
  logic diag;
  state_t sin, sout;
  int checks = 0, failures = 0;

  chacha20_round dut (.diag, .state_in(sin), .state_out(sout));

  initial begin
    w32 x[16];
    for (int i = 0; i < 400; i++) begin
      diag = i[0];
      for (int k = 0; k < 16; k++) begin sin[k] = $urandom; x[k] = sin[k]; end
      r_round(x, diag);
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (sout[k] !== x[k]) begin
          failures++;
          if (failures < 10) $display("FAIL diag=%0d word %0d got %h exp %h", diag, k, sout[k], x[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
