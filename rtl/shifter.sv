// shifter: the one-bit shifter on the B read port of the register file.
// The 2-bit shift_op comes from instruction[4:3] (or 00 in pass-through
// mode) and selects one of four one-bit operations:
//   00 unchanged, 01 left by one (zero in), 10 logical right by one
//   (zero in), 11 arithmetic right by one (bit 15 kept).
// The two-bit field and its place in the datapath follow the CPU's
// instruction set; what each code does is this design's choice.
// Purely combinational, no clock.
module shifter
  import cpu_pkg::*;
(
  input  word_t     in,
  input  shift_op_t shift_op,
  output word_t     out
);
  always_comb begin
    unique case (shift_op)
      SH_NONE: out = in;
      SH_LSL1: out = {in[WORD_W-2:0], 1'b0};
      SH_LSR1: out = {1'b0, in[WORD_W-1:1]};
      SH_ASR1: out = {in[WORD_W-1], in[WORD_W-1:1]};
      default: out = in;
    endcase
  end
endmodule
