// sign_ext: widens an IN_W-bit two's-complement immediate to OUT_W bits by
// copying its most significant bit into every new upper bit, so the value is
// unchanged (8'b1010_1010 becomes 16'b1111_1111_1010_1010). The CPU uses two
// instances: IN_W = 5 for imm5 (sximm5) and IN_W = 8 for imm8 (sximm8).
// Purely combinational, no clock.
module sign_ext #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
