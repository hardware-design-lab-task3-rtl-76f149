// cpu_fsm: the controller of the CPU, a Mealy machine written as three
// blocks (state register, next-state logic, output logic).
//
//   INIT   after reset; no control asserted                  -> FETCH
//   FETCH  load_ir: the instruction register captures the
//          instruction                                       -> DECODE
//   DECODE from the opcode in the instruction register:
//          R-type   A = Ra, B = shift(Rb), ALU -> Y and S    -> WB
//          ADDI/SUBI A = Ra, B = sximm5,  ALU -> Y and S     -> WB
//          LDI      Rd <= sximm8 (vsel 2, rf_wen)            -> FETCH
//          LUI      Rd <= tximm8 (vsel 3, rf_wen)            -> FETCH
//          other    nothing asserted                         -> FETCH
//   WB     dp_gate puts Y on the data bus and rf_wen writes
//          it to Rd through vsel 0                           -> FETCH
//
// So an arithmetic instruction takes three cycles (FETCH, DECODE, WB) and
// a load-immediate two. Outputs are combinational from the state and the
// opcode. The states, transitions and the control values of INIT, FETCH,
// DECODE and WB follow the CPU description, and so does the reset into
// INIT. The DECODE values for each instruction class, the handling of
// unknown opcodes, the state encoding and the asynchronous active-low reset
// are this design's choices.
//
// asel and arith_sel are never raised by the twelve instructions: they
// belong to the pass-through mode (A = 0, ALU add, no shift) that data-move
// instructions would use, so they stay 0 here by design.
module cpu_fsm
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] opcode,   // instruction[15:11] from the IR
  output ctrl_t      ctrl,
  output state_t     state
);
  state_t next_state;

  // State register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_INIT;
    else        state <= next_state;
  end

  // Next-state logic
  always_comb begin
    unique case (state)
      ST_INIT:   next_state = ST_FETCH;
      ST_FETCH:  next_state = ST_DECODE;
      ST_DECODE: next_state = (opcode[4:3] == 2'b00 || opcode == OP_ADDI ||
                               opcode == OP_SUBI) ? ST_WB : ST_FETCH;
      ST_WB:     next_state = ST_FETCH;
      default:   next_state = ST_INIT;
    endcase
  end

  // Output logic
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      ST_INIT: ;
      ST_FETCH: ctrl.load_ir = 1'b1;
      ST_DECODE: begin
        unique casez (opcode)
          5'b00???: begin                  // ADD .. ORBB
            ctrl.arith_sel = ARITH_IR;
            ctrl.loady     = 1'b1;
            ctrl.loads     = 1'b1;
          end
          OP_ADDI, OP_SUBI: begin
            ctrl.arith_sel = ARITH_IR;
            ctrl.bsel      = 1'b1;
            ctrl.loady     = 1'b1;
            ctrl.loads     = 1'b1;
          end
          OP_LDI: begin
            ctrl.vsel   = VSEL_SXIMM8;
            ctrl.rf_wen = 1'b1;
          end
          OP_LUI: begin
            ctrl.vsel   = VSEL_TXIMM8;
            ctrl.rf_wen = 1'b1;
          end
          default: ;
        endcase
      end
      ST_WB: begin
        ctrl.rf_wen  = 1'b1;
        ctrl.dp_gate = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
