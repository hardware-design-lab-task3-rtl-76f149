// arith_ctrl: chooses the ALU operation and the shift operation.
// In IR mode (arith_sel = 0) they are taken from the instruction fields
// (ALUop = instruction[13:11], shift_op = instruction[4:3]); this is used
// for register and immediate arithmetic. In pass-through mode
// (arith_sel = 1) ALUop is forced to 000 (add) and shift_op to 00 (no
// shift), so with A forced to zero the B operand passes unchanged through
// the ALU. Both modes follow the CPU description. Combinational, no clock.
module arith_ctrl
  import cpu_pkg::*;
(
  input  arith_sel_t arith_sel,
  input  logic [2:0] ir_alu_op,
  input  logic [1:0] ir_shift_op,
  output alu_op_t    alu_op,
  output shift_op_t  shift_op
);
  always_comb begin
    if (arith_sel == ARITH_PASS) begin
      alu_op   = ALU_ADD;
      shift_op = SH_NONE;
    end else begin
      alu_op   = alu_op_t'(ir_alu_op);
      shift_op = shift_op_t'(ir_shift_op);
    end
  end
endmodule
