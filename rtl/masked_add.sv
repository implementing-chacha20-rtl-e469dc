// masked_add - 32-bit masked modular adder of the selected scheme: the
// three-share TI ripple-carry adder (done in cycle 33 after start) or the
// two-share low-cost one (done in cycle 98). Operands must stay stable from
// start to done. Thin selector around ti_adder / lc_adder.
module masked_add
  import mask_pkg::*;
#(
  parameter mask_e SCHEME = MASK_TI,
  localparam int unsigned S = num_shares(SCHEME)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a [S],
  input  logic [31:0] b [S],
  output logic        done,
  output logic [31:0] r [S]
);
  if (SCHEME == MASK_TI) begin : g_ti
    ti_adder #(.W(32)) u_add (.clk, .rst_n, .start, .a, .b, .done, .r);
  end else begin : g_lc
    lc_adder #(.W(32)) u_add (.clk, .rst_n, .start, .a, .b, .done, .r);
  end
endmodule
