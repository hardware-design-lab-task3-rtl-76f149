// tb_datapath: drives the datapath's control inputs directly for 3000
// random cycles. Each cycle picks register writes from any of the four vsel
// sources and an ALU operation with random operand selects, shift and
// load enables. A model of the register file, Y and S predicts every
// register value, datapath_out and status_out. Y and S must change exactly
// one clock edge after loady/loads, never before; the ALU's carry input
// must come from the S register.
module tb_datapath;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;
  logic      clk = 0, rst_n = 0;
  word_t     datapath_in, pc_plus1, sximm8, tximm8, sximm5;
  logic      rf_wen;
  reg_addr_t rf_waddr, rf_raddra, rf_raddrb;
  vsel_t     vsel;
  logic      asel, bsel, loady, loads;
  alu_op_t   alu_op;
  shift_op_t shift_op;
  word_t     datapath_out;
  flags_t    status_out;

  int unsigned m_reg [8];
  int unsigned m_y;
  bit          m_z, m_n, m_c, m_v;
  int checks = 0, failures = 0;
  int n_vsel [4];
  int n_carry_used;

  datapath dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_alu_t    r;
    int unsigned a_val, b_val, wval;
    datapath_in = 0; pc_plus1 = 0; sximm8 = 0; tximm8 = 0; sximm5 = 0;
    rf_wen = 0; rf_waddr = 0; rf_raddra = 0; rf_raddrb = 0;
    vsel = VSEL_BUS; asel = 0; bsel = 0; loady = 0; loads = 0;
    alu_op = ALU_ADD; shift_op = SH_NONE;
    foreach (m_reg[i]) m_reg[i] = 0;
    m_y = 0; {m_z, m_n, m_c, m_v} = 4'b0;
    #12 rst_n = 1;
    check(datapath_out == 0 && status_out == 4'b0, "reset Y/S");

    repeat (3000) begin
      @(negedge clk);
      datapath_in = 16'($urandom);
      pc_plus1    = 16'($urandom);
      sximm8      = 16'($urandom);
      tximm8      = 16'($urandom);
      sximm5      = 16'($urandom);
      rf_wen      = ($urandom_range(0, 2) == 0);
      rf_waddr    = 3'($urandom);
      rf_raddra   = 3'($urandom);
      rf_raddrb   = 3'($urandom);
      vsel        = vsel_t'($urandom_range(0, 3));
      asel        = ($urandom_range(0, 5) == 0);
      bsel        = 1'($urandom);
      loady       = 1'($urandom);
      loads       = 1'($urandom);
      alu_op      = alu_op_t'($urandom_range(0, 7));
      shift_op    = shift_op_t'($urandom_range(0, 3));

      // expected operation from the model (registers before this edge)
      a_val = asel ? 0 : m_reg[rf_raddra];
      b_val = bsel ? int'(sximm5) : ref_shift(m_reg[rf_raddrb], int'(shift_op));
      r = ref_alu(a_val, b_val, int'(alu_op), m_c);
      case (vsel)
        VSEL_BUS:    wval = datapath_in;
        VSEL_PC:     wval = pc_plus1;
        VSEL_SXIMM8: wval = sximm8;
        default:     wval = tximm8;
      endcase
      if (rf_wen) n_vsel[vsel]++;
      if ((alu_op == ALU_ADDC || alu_op == ALU_SUBC) && m_c && loady) n_carry_used++;

      // nothing registered may change before the edge
      #1;
      check(datapath_out == m_y[15:0], "Y held before edge");
      check(status_out == {m_z, m_n, m_c, m_v}, "S held before edge");

      @(posedge clk);
      if (loady) m_y = r.result;
      if (loads) {m_z, m_n, m_c, m_v} = {r.z, r.n, r.c, r.v};
      if (rf_wen) m_reg[rf_waddr] = wval;
      #1;
      if (datapath_out != m_y[15:0])
        $display("  Y got %h expected %h (op %0d a %h b %h)", datapath_out, m_y[15:0], alu_op, a_val, b_val);
      check(datapath_out == m_y[15:0], "Y after edge");
      check(status_out == {m_z, m_n, m_c, m_v}, "S after edge");
    end

    // read every register back through the ALU: A = Rn, B = 0 via asel path
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      rf_wen = 0; asel = 0; bsel = 1; sximm5 = 0; alu_op = ALU_OR;
      rf_raddra = i[2:0]; loady = 1; loads = 0;
      @(posedge clk); #1;
      check(datapath_out == m_reg[i][15:0], "register read-back");
    end

    for (int k = 0; k < 4; k++) check(n_vsel[k] > 0, "every vsel source written");
    check(n_carry_used > 0, "carry feedback exercised");
    $display("vsel writes %0d %0d %0d %0d, carry-in uses %0d",
             n_vsel[0], n_vsel[1], n_vsel[2], n_vsel[3], n_carry_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
