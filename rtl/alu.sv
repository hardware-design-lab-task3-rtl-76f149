// alu: 16-bit arithmetic/logic unit with Z, N, C and V flags.
//
// Operation (alu_op = instruction[13:11]):
//   000 ADD   A + B            100 AND    A & B
//   001 SUB   A - B            101 ANDBB  A & ~B
//   010 ADDC  A + B + Cin      110 OR     A | B
//   011 SUBC  A - B - Cin      111 ORBB   A | ~B
// Cin is the C bit of the status register, fed back into the ALU. The
// operations and which flags they affect follow the instruction set. Z and
// N always describe the result. For the four arithmetic operations C is the
// carry out of an add and the borrow out of a subtract (so that SUBC, which
// subtracts C, chains a multi-word subtraction), and V is signed overflow.
// The logic operations do not affect C, which passes Cin through, and clear
// V; these two conventions are this design's choice.
// Purely combinational, no clock.
module alu
  import cpu_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_t alu_op,
  input  logic    c_in,
  output word_t   result,
  output flags_t  flags
);
  logic [WORD_W:0] wide;  // result with carry/borrow in the top bit
  logic            is_arith;
  logic            is_sub;

  always_comb begin
    is_arith = 1'b1;
    is_sub   = 1'b0;
    unique case (alu_op)
      ALU_ADD:   wide = {1'b0, a} + {1'b0, b};
      ALU_SUB:   begin wide = {1'b0, a} - {1'b0, b};                         is_sub = 1'b1; end
      ALU_ADDC:  wide = {1'b0, a} + {1'b0, b} + {{WORD_W{1'b0}}, c_in};
      ALU_SUBC:  begin wide = {1'b0, a} - {1'b0, b} - {{WORD_W{1'b0}}, c_in}; is_sub = 1'b1; end
      ALU_AND:   begin wide = {1'b0, a & b};  is_arith = 1'b0; end
      ALU_ANDBB: begin wide = {1'b0, a & ~b}; is_arith = 1'b0; end
      ALU_OR:    begin wide = {1'b0, a | b};  is_arith = 1'b0; end
      ALU_ORBB:  begin wide = {1'b0, a | ~b}; is_arith = 1'b0; end
      default:   begin wide = '0;             is_arith = 1'b0; end
    endcase

    result  = wide[WORD_W-1:0];
    flags.z = (result == '0);
    flags.n = result[WORD_W-1];
    if (is_arith) begin
      flags.c = wide[WORD_W];
      // Overflow: operands of equal sign (add) or of opposite sign
      // (subtract) give a result whose sign differs from A.
      flags.v = ((a[WORD_W-1] ^ b[WORD_W-1]) == is_sub) &&
                (result[WORD_W-1] != a[WORD_W-1]);
    end else begin
      flags.c = c_in;
      flags.v = 1'b0;
    end
  end
endmodule
