// tail_ext: widens an IN_W-bit immediate to OUT_W bits by placing it in the
// most significant bits and filling the tail with zeros, i.e. a left shift
// by OUT_W-IN_W (8'b0101_0101 becomes 16'b0101_0101_0000_0000). It feeds the
// "load upper immediate" input (tximm8) of the register-file write mux.
// Purely combinational, no clock.
module tail_ext #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {in, {(OUT_W-IN_W){1'b0}}};
endmodule
