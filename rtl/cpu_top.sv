// cpu_top: a 16-bit multi-cycle CPU built from an instruction register, a
// controller FSM, an arithmetic-control block, immediate extenders, the
// register/ALU datapath and a tri-state gate onto a shared data bus.
//
// Each instruction starts with FETCH, in which the FSM raises load_ir and
// the instruction register captures the `instruction` input at the rising
// clock edge; load_ir is brought out so that whatever supplies instructions
// knows when one is taken. The opcode (IR[15:11]) then steers DECODE.
// Register and immediate arithmetic compute into the Y and S registers in
// DECODE and, in WB, Y is gated onto data_bus and written back from the bus
// into Rd: the data bus loops back into the datapath's datapath_in. LDI and
// LUI write sximm8 or tximm8 into Rd directly in DECODE.
//
// IR fields: Rd = [10:8] (write address), Ra = [7:5] (read port A),
// Rb = [2:0] (read port B), ALUop = [13:11], shift_op = [4:3],
// imm5 = [4:0], imm8 = [7:0]. pc_plus1 is tied to zero, as there is no
// program counter yet. All of this follows the CPU description; the
// active-low asynchronous reset, the instruction input port and the state
// output are this design's choices.
//
// Timing: arithmetic instructions take 3 clock cycles (FETCH, DECODE, WB),
// LDI/LUI and unknown opcodes 2, plus one INIT cycle after reset.
//
// Bus rule, checked by an assertion: whenever the register file takes its
// write data from the bus (rf_wen with vsel = bus), the CPU itself must be
// driving the bus, since nothing else does.
module cpu_top
  import cpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  instruction,   // sampled when load_ir is high
  output logic   load_ir,       // the instruction is taken this cycle
  output word_t  data_bus,      // shared bus, driven by the CPU in WB
  output word_t  datapath_out,  // Y register
  output flags_t status_out,    // S register {Z, N, C, V}
  output state_t state          // controller state
);
  word_t      ir;
  ctrl_t      ctrl;
  alu_op_t    alu_op;
  shift_op_t  shift_op;
  word_t      sximm5, sximm8, tximm8;
  tri  [WORD_W-1:0] bus;

  instr_reg u_ir (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_ir  (ctrl.load_ir),
    .instr_in (instruction),
    .ir       (ir)
  );

  cpu_fsm u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .opcode (ir[15:11]),
    .ctrl   (ctrl),
    .state  (state)
  );

  arith_ctrl u_arith_ctrl (
    .arith_sel   (ctrl.arith_sel),
    .ir_alu_op   (ir[13:11]),
    .ir_shift_op (ir[4:3]),
    .alu_op      (alu_op),
    .shift_op    (shift_op)
  );

  sign_ext #(.IN_W(5), .OUT_W(WORD_W)) u_signext5 (.in(ir[4:0]), .out(sximm5));
  sign_ext #(.IN_W(8), .OUT_W(WORD_W)) u_signext8 (.in(ir[7:0]), .out(sximm8));
  tail_ext #(.IN_W(8), .OUT_W(WORD_W)) u_tailext8 (.in(ir[7:0]), .out(tximm8));

  datapath u_datapath (
    .clk          (clk),
    .rst_n        (rst_n),
    .datapath_in  (bus),
    .pc_plus1     (16'd0),
    .sximm8       (sximm8),
    .tximm8       (tximm8),
    .sximm5       (sximm5),
    .rf_wen       (ctrl.rf_wen),
    .rf_waddr     (ir[10:8]),
    .rf_raddra    (ir[7:5]),
    .rf_raddrb    (ir[2:0]),
    .vsel         (ctrl.vsel),
    .asel         (ctrl.asel),
    .bsel         (ctrl.bsel),
    .alu_op       (alu_op),
    .shift_op     (shift_op),
    .loady        (ctrl.loady),
    .loads        (ctrl.loads),
    .datapath_out (datapath_out),
    .status_out   (status_out)
  );

  tristate_buf #(.W(WORD_W)) u_dp_gate (
    .en (ctrl.dp_gate),
    .a  (datapath_out),
    .y  (bus)
  );

  // The register file may only read the bus while the CPU drives it. No
  // disable is needed: in reset the FSM sits in INIT with every control low.
  bus_driven_on_write: assert property (
    @(posedge clk)
      (ctrl.rf_wen && ctrl.vsel == VSEL_BUS) |-> ctrl.dp_gate
  ) else $error("register write from an undriven data bus");

  assign data_bus = bus;
  assign load_ir  = ctrl.load_ir;
endmodule
