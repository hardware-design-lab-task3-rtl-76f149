// tb_cpu_fsm: checks the controller's state sequence and every control
// output against the expected per-state table: INIT after reset, then
// FETCH (load_ir only), DECODE (per opcode class) and WB (rf_wen and
// dp_gate) for arithmetic opcodes, or straight back to FETCH for LDI, LUI
// and unknown opcodes. All 32 opcodes are decoded, several times each.
module tb_cpu_fsm;
  import cpu_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [4:0] opcode;
  ctrl_t      ctrl;
  state_t     state;
  int checks = 0, failures = 0;

  cpu_fsm dut (.*);

  always #5 clk = ~clk;

  // expected control word: {vsel, asel, bsel, loady, loads, rf_wen,
  // arith_sel, load_ir, dp_gate}
  function automatic logic [9:0] expected(state_t s, logic [4:0] op);
    case (s)
      ST_FETCH: return 10'b00_0_0_0_0_0_0_1_0;
      ST_WB:    return 10'b00_0_0_0_0_1_0_0_1;
      ST_DECODE:
        if (op[4:3] == 2'b00)              return 10'b00_0_0_1_1_0_0_0_0;
        else if (op == 5'b01000 || op == 5'b01001) return 10'b00_0_1_1_1_0_0_0_0;
        else if (op == 5'b10000)           return 10'b10_0_0_0_0_1_0_0_0;
        else if (op == 5'b10001)           return 10'b11_0_0_0_0_1_0_0_0;
        else                               return 10'b00_0_0_0_0_0_0_0_0;
      default:  return 10'b0;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state %s opcode %b ctrl %b", what, state.name(), opcode, ctrl);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode = 5'b00000;
    #2;
    check(state == ST_INIT, "reset state");
    check(ctrl == expected(ST_INIT, opcode), "INIT outputs");
    #10 rst_n = 1;                            // t = 12, between edges
    #1;
    check(state == ST_INIT, "INIT held until first edge");
    @(negedge clk);
    check(state == ST_FETCH, "INIT -> FETCH");
    for (int rep = 0; rep < 4; rep++)
      for (int op = 0; op < 32; op++) begin
        bit arith;
        opcode = 5'($urandom);                 // ignored in FETCH
        #1;
        check(state == ST_FETCH, "in FETCH");
        check(ctrl == expected(ST_FETCH, opcode), "FETCH outputs");
        @(negedge clk);
        opcode = op[4:0];
        #1;
        check(state == ST_DECODE, "FETCH -> DECODE");
        check(ctrl == expected(ST_DECODE, opcode), "DECODE outputs");
        arith = (op < 8) || (op == 8) || (op == 9);
        @(negedge clk);
        if (arith) begin
          opcode = 5'($urandom);               // WB does not depend on it
          #1;
          check(state == ST_WB, "DECODE -> WB");
          check(ctrl == expected(ST_WB, opcode), "WB outputs");
          @(negedge clk);
        end
      end
    // reset from the middle of an instruction returns to INIT
    @(negedge clk);
    rst_n = 0; #1;
    check(state == ST_INIT, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
