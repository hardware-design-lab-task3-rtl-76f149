// tb_arith_ctrl: exhaustive over both modes and every instruction field
// value. IR mode passes the fields; pass-through mode gives ALUop 000 and
// shift_op 00.
module tb_arith_ctrl;
  import cpu_pkg::*;
  arith_sel_t arith_sel;
  logic [2:0] ir_alu_op;
  logic [1:0] ir_shift_op;
  alu_op_t    alu_op;
  shift_op_t  shift_op;
  int checks = 0, failures = 0;

  arith_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int o = 0; o < 8; o++)
        for (int s = 0; s < 4; s++) begin
          arith_sel   = arith_sel_t'(m[0]);
          ir_alu_op   = o[2:0];
          ir_shift_op = s[1:0];
          #1;
          checks++;
          if (alu_op != ((m == 1) ? 3'd0 : o[2:0]) ||
              shift_op != ((m == 1) ? 2'd0 : s[1:0])) begin
            failures++;
            $display("FAIL mode %0d op %0d sh %0d: got %0d %0d", m, o, s, alu_op, shift_op);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
