// cpu_pkg: shared widths, encodings and types of the 16-bit multi-cycle CPU.
//
// The instruction word is 16 bits. Opcode is instruction[15:11]; for the
// arithmetic group the ALU operation is instruction[13:11], Rd is [10:8],
// Ra is [7:5], the shift field [4:3] and Rb [2:0]. Immediate forms merge
// [4:0] into a 5-bit immediate (imm5) or [7:0] into an 8-bit immediate
// (imm8). These field positions, the opcodes, the ALU operation numbers and
// the four vsel inputs follow the instruction table and datapath drawing.
// The shift encodings, the state encoding and the bit order of the status
// word are choices of this design.
package cpu_pkg;

  localparam int unsigned WORD_W  = 16;  // datapath and instruction width
  localparam int unsigned NREGS   = 8;   // R0..R7
  localparam int unsigned RADDR_W = 3;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [RADDR_W-1:0] reg_addr_t;

  // ALU operation, instruction[13:11]
  typedef enum logic [2:0] {
    ALU_ADD   = 3'b000,  // A + B
    ALU_SUB   = 3'b001,  // A - B
    ALU_ADDC  = 3'b010,  // A + B + C
    ALU_SUBC  = 3'b011,  // A - B - C
    ALU_AND   = 3'b100,  // A & B
    ALU_ANDBB = 3'b101,  // A & ~B
    ALU_OR    = 3'b110,  // A | B
    ALU_ORBB  = 3'b111   // A | ~B
  } alu_op_t;

  // Shift applied to the B read port, instruction[4:3]
  typedef enum logic [1:0] {
    SH_NONE = 2'b00,  // unchanged
    SH_LSL1 = 2'b01,  // shift left by one, zero fill
    SH_LSR1 = 2'b10,  // logical shift right by one, zero fill
    SH_ASR1 = 2'b11   // arithmetic shift right by one, MSB copied
  } shift_op_t;

  // Register-file write-data select (vsel)
  typedef enum logic [1:0] {
    VSEL_BUS    = 2'd0,  // datapath_in (the data bus)
    VSEL_PC     = 2'd1,  // pc_plus1
    VSEL_SXIMM8 = 2'd2,  // sign-extended imm8
    VSEL_TXIMM8 = 2'd3   // tail-extended imm8 (imm8 << 8)
  } vsel_t;

  // Arith Ctrl mode (arith_sel)
  typedef enum logic {
    ARITH_IR   = 1'b0,  // ALUop and shift_op taken from the instruction
    ARITH_PASS = 1'b1   // ALUop = 000, shift_op = 00
  } arith_sel_t;

  // Full opcodes, instruction[15:11]
  localparam logic [4:0] OP_ADD   = 5'b00000;
  localparam logic [4:0] OP_SUB   = 5'b00001;
  localparam logic [4:0] OP_ADDC  = 5'b00010;
  localparam logic [4:0] OP_SUBC  = 5'b00011;
  localparam logic [4:0] OP_AND   = 5'b00100;
  localparam logic [4:0] OP_ANDBB = 5'b00101;
  localparam logic [4:0] OP_OR    = 5'b00110;
  localparam logic [4:0] OP_ORBB  = 5'b00111;
  localparam logic [4:0] OP_ADDI  = 5'b01000;
  localparam logic [4:0] OP_SUBI  = 5'b01001;
  localparam logic [4:0] OP_LDI   = 5'b10000;
  localparam logic [4:0] OP_LUI   = 5'b10001;

  // Status word: {Z, N, C, V}, Z in bit 3 and V in bit 0
  typedef struct packed {
    logic z;  // result is zero
    logic n;  // result bit 15
    logic c;  // carry out of an add, borrow out of a subtract
    logic v;  // signed overflow
  } flags_t;

  // Controller states
  typedef enum logic [1:0] {
    ST_INIT   = 2'd0,
    ST_FETCH  = 2'd1,
    ST_DECODE = 2'd2,
    ST_WB     = 2'd3
  } state_t;

  // The FSM's control outputs as one bundle
  typedef struct packed {
    vsel_t      vsel;
    logic       asel;       // 1: A operand is 16'b0
    logic       bsel;       // 1: B operand is sximm5
    logic       loady;      // load the result register
    logic       loads;      // load the status register
    logic       rf_wen;     // register-file write enable
    arith_sel_t arith_sel;
    logic       load_ir;    // load the instruction register
    logic       dp_gate;    // drive datapath_out onto the data bus
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{vsel: VSEL_BUS, arith_sel: ARITH_IR, default: 1'b0};

endpackage
