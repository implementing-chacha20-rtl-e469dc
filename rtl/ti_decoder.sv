// ti_decoder - recombines a three-share W-bit value: b = s0 ^ s1 ^ s2.
// Combinational; it sits at the output interface of a masked core, where
// the value is released anyway.
module ti_decoder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] s [3],
  output logic [W-1:0] b
);
  assign b = s[0] ^ s[1] ^ s[2];
endmodule
