// tb_cpu_top: runs the whole CPU at its only configuration. It feeds
// instructions whenever the CPU raises load_ir (FETCH) and checks each one
// against an instruction-level model of the register file and the Z/N/C/V
// flags:
//   * the result on data_bus and datapath_out during WB,
//   * the status register after every instruction,
//   * the cycle count: 3 cycles for register/immediate arithmetic,
//     2 for LDI/LUI and for opcodes the CPU does not implement,
//   * every register at the end, read out with OR Ri, Ri, Ri.
// The program is directed code (32-bit add and subtract chains through the
// carry, overflow, zero and negative results, every shift) followed by
// 3000 random instructions. Every mechanism of the design is counted and
// must occur at least once: each of the 12 instructions, each shift code,
// each flag set, an ADDC/SUBC consuming C = 1, a skipped unknown opcode, a
// write-back over the data bus and a reset into INIT.
module tb_cpu_top;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  word_t  instruction = '0;
  logic   load_ir;
  word_t  data_bus, datapath_out;
  flags_t status_out;
  state_t state;

  cpu_top dut (.*);

  always #5 clk = ~clk;

  int unsigned m_reg [8];
  bit          m_z, m_n, m_c, m_v;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_instr [12];        // ADD..ORBB, ADDI, SUBI, LDI, LUI
  int n_shift [4];
  int n_flag  [4];         // Z, N, C, V set by an instruction
  int n_carry_in, n_unknown, n_bus_wb, n_reset_init;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (instr %h)", what, $time, instruction);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Execute one instruction; entered and left at a falling edge in FETCH.
  task automatic exec(logic [15:0] instr);
    logic [4:0]  op;
    int unsigned rd, ra, rb, sh, exp_cycles, cycles;
    int unsigned a_val, b_val, wval;
    bit          writes_alu, writes_imm;
    ref_alu_t    r;

    op = instr[15:11];
    rd = instr[10:8]; ra = instr[7:5]; sh = instr[4:3]; rb = instr[2:0];
    writes_alu = 0; writes_imm = 0;
    check(state == ST_FETCH && load_ir, "in FETCH before an instruction");
    instruction = instr;

    if (op[4:3] == 2'b00) begin
      a_val = m_reg[ra];
      b_val = ref_shift(m_reg[rb], sh);
      r = ref_alu(a_val, b_val, op[2:0], m_c);
      writes_alu = 1;
      n_instr[op[2:0]]++;
      n_shift[sh]++;
      if ((op == OP_ADDC || op == OP_SUBC) && m_c) n_carry_in++;
    end else if (op == OP_ADDI || op == OP_SUBI) begin
      a_val = m_reg[ra];
      b_val = instr[4] ? 32'hFFE0 | instr[4:0] : instr[4:0];
      r = ref_alu(a_val, b_val, op[0], m_c);
      writes_alu = 1;
      n_instr[8 + op[0]]++;
    end else if (op == OP_LDI || op == OP_LUI) begin
      wval = (op == OP_LUI) ? instr[7:0] * 256
                            : (instr[7] ? 32'hFF00 | instr[7:0] : instr[7:0]);
      writes_imm = 1;
      n_instr[10 + op[0]]++;
    end else begin
      n_unknown++;
    end
    exp_cycles = writes_alu ? 3 : 2;

    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
      if (state == ST_WB) begin
        n_bus_wb++;
        check(data_bus == r.result[15:0], "result on the data bus in WB");
        check(datapath_out == r.result[15:0], "datapath_out in WB");
      end
    end while (state != ST_FETCH && cycles < 10);
    check(cycles == exp_cycles, "cycles per instruction");
    if (cycles != exp_cycles) $display("  took %0d cycles, expected %0d", cycles, exp_cycles);

    if (writes_alu) begin
      m_reg[rd] = r.result;
      {m_z, m_n, m_c, m_v} = {r.z, r.n, r.c, r.v};
      if (r.z) n_flag[0]++;
      if (r.n) n_flag[1]++;
      if (r.c) n_flag[2]++;
      if (r.v) n_flag[3]++;
    end
    if (writes_imm) m_reg[rd] = wval;
    check(status_out == {m_z, m_n, m_c, m_v}, "status register");
  endtask

  task automatic readout();
    for (int i = 0; i < 8; i++) begin
      int unsigned prev;
      prev = m_reg[i];
      exec(enc_r(6, i, i, 0, i));   // OR Ri, Ri, Ri
      check(datapath_out == prev[15:0], "register readout");
      if (datapath_out != prev[15:0])
        $display("  R%0d = %h, expected %h", i, datapath_out, prev[15:0]);
    end
  endtask

  function automatic logic [15:0] random_instr();
    int unsigned k;
    k = $urandom_range(0, 99);
    if (k < 55) return enc_r($urandom_range(0, 7), $urandom_range(0, 7),
                             $urandom_range(0, 7), $urandom_range(0, 3),
                             $urandom_range(0, 7));
    if (k < 75) return enc_i(1'($urandom), $urandom_range(0, 7),
                             $urandom_range(0, 7), $urandom_range(0, 31));
    if (k < 95) return enc_ld(1'($urandom), $urandom_range(0, 7),
                              $urandom_range(0, 255));
    // opcodes with no instruction: 01010..01111, 10010..11111
    return {($urandom_range(0, 1) == 0) ? 5'(10 + $urandom_range(0, 5))
                                        : 5'(18 + $urandom_range(0, 13)),
            11'($urandom)};
  endfunction

  initial begin
    foreach (m_reg[i]) m_reg[i] = 0;
    {m_z, m_n, m_c, m_v} = 4'b0;

    // reset: INIT, then FETCH
    #2;
    check(state == ST_INIT, "reset into INIT");
    if (state == ST_INIT) n_reset_init++;
    #10 rst_n = 1;
    @(negedge clk);
    check(state == ST_FETCH, "INIT -> FETCH");

    // --- directed: 32-bit add 0x0001_FFFF + 0x0000_0001 (R1:R0 + R3:R2)
    exec(enc_ld(0, 0, 8'hFF));           // LDI R0, -1   -> FFFF
    exec(enc_ld(0, 1, 8'h01));           // LDI R1, 1
    exec(enc_ld(0, 2, 8'h01));           // LDI R2, 1
    exec(enc_ld(0, 3, 8'h00));           // LDI R3, 0
    exec(enc_r(0, 4, 0, 0, 2));          // ADD  R4 = R0 + R2 -> 0000, C=1, Z=1
    exec(enc_r(2, 5, 1, 0, 3));          // ADDC R5 = R1 + R3 + C -> 0002
    check(m_reg[5] == 2 && m_reg[4] == 0, "model: 32-bit add");
    // --- 32-bit subtract 0x0002_0000 - 0x0000_0001
    exec(enc_r(1, 6, 4, 0, 2));          // SUB  R6 = 0000 - 0001 -> FFFF, borrow
    exec(enc_r(3, 7, 5, 0, 3));          // SUBC R7 = 0002 - 0 - 1 -> 0001
    check(m_reg[7] == 1 && m_reg[6] == 16'hFFFF, "model: 32-bit subtract");
    // --- signed overflow 0x7F00 + 0x7F00, LUI
    exec(enc_ld(1, 0, 8'h7F));           // LUI R0 -> 7F00
    exec(enc_r(0, 1, 0, 0, 0));          // ADD R1 = R0 + R0 -> FE00, V=1, N=1
    // --- every shift code on a negative value
    exec(enc_ld(1, 2, 8'h80));           // LUI R2 -> 8000
    exec(enc_ld(0, 3, 8'h00));           // LDI R3, 0
    for (int s = 0; s < 4; s++) exec(enc_r(0, 4, 3, s, 2));
    // --- logic operations and immediates
    exec(enc_ld(0, 5, 8'h5A));
    for (int o = 4; o < 8; o++) exec(enc_r(o, 6, 5, 1, 2));
    exec(enc_i(0, 7, 5, 5'b10000));      // ADDI R7 = R5 + (-16)
    exec(enc_i(1, 7, 7, 5'b01111));      // SUBI R7 = R7 - 15
    exec({5'b11111, 11'h7FF});           // not an instruction: skipped
    readout();

    // --- random program
    repeat (3000) exec(random_instr());
    readout();

    // --- reset in the middle of an instruction
    exec(enc_ld(0, 0, 8'h12));
    instruction = enc_r(0, 1, 0, 0, 0);
    @(posedge clk); @(negedge clk);      // now in DECODE
    rst_n = 0; #1;
    check(state == ST_INIT, "asynchronous reset into INIT");
    check(datapath_out == 0 && status_out == 4'b0, "reset clears Y and S");
    if (state == ST_INIT) n_reset_init++;

    // --- every mechanism must have occurred
    foreach (n_instr[i]) check(n_instr[i] > 0, $sformatf("instruction %0d executed", i));
    foreach (n_shift[i]) check(n_shift[i] > 0, $sformatf("shift code %0d used", i));
    foreach (n_flag[i])  check(n_flag[i] > 0, $sformatf("flag %0d set", i));
    check(n_carry_in > 0,   "carry input consumed");
    check(n_unknown > 0,    "unknown opcode skipped");
    check(n_bus_wb > 0,     "write-back over the data bus");
    check(n_reset_init > 1, "reset into INIT");
    $display("instructions ADD..ORBB,ADDI,SUBI,LDI,LUI: %p", n_instr);
    $display("shift codes %p, flags Z N C V set %p", n_shift, n_flag);
    $display("carry-in uses %0d, unknown opcodes %0d, bus write-backs %0d, resets %0d",
             n_carry_in, n_unknown, n_bus_wb, n_reset_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
