// tb_ti_codec - encoder and decoder of the three-share encoding. Random
// words and random masks: the shares must be (b^z0^z1, z0, z1), one clock
// after the input, and the decoder must give b back.
module tb_ti_codec;
  logic clk = 0;
  logic [31:0] b, z0, z1, bd;
  logic [31:0] s [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ti_encoder #(.W(32)) u_enc (.clk, .b(b), .z0(z0), .z1(z1), .s(s));
  ti_decoder #(.W(32)) u_dec (.s(s), .b(bd));

  initial begin
    logic [31:0] eb, e0, e1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      b = $urandom; z0 = $urandom; z1 = $urandom;
      eb = b; e0 = z0; e1 = z1;
      @(negedge clk);
      b = $urandom; z0 = $urandom; z1 = $urandom;
      checks += 2;
      if (bd !== eb) begin failures++; $display("FAIL decode %h exp %h", bd, eb); end
      if (s[0] !== (eb ^ e0 ^ e1) || s[1] !== e0 || s[2] !== e1) begin
        failures++; $display("FAIL shares %h %h %h", s[0], s[1], s[2]);
      end
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
