// datapath: the register/ALU datapath the controller drives.
//
//   vsel mux (4:1) -> regfile wdata
//     0 datapath_in (the data bus)   1 pc_plus1
//     2 sximm8                       3 tximm8
//   regfile B port -> shifter -> bsel mux (0: shifted B, 1: sximm5) -> ALU B
//   regfile A port ->            asel mux (0: A, 1: 16'b0)         -> ALU A
//   ALU result -> Y register (load_y) -> datapath_out
//   ALU flags  -> S register (load_s) -> status_out, C fed back to the ALU
//
// Every register here updates on the rising edge of clk: a register-file
// write when rf_wen is high, Y when loady is high, S when loads is high.
// The muxes, the register file and the ALU are combinational, so an
// operation read in one cycle is captured in Y and S at the end of it.
// The structure, port names and widths follow the datapath drawing; the
// asynchronous active-low reset clearing Y, S and the registers is this
// design's choice.
module datapath
  import cpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // write-data sources
  input  word_t     datapath_in,
  input  word_t     pc_plus1,
  input  word_t     sximm8,
  input  word_t     tximm8,
  input  word_t     sximm5,
  // register file
  input  logic      rf_wen,
  input  reg_addr_t rf_waddr,
  input  reg_addr_t rf_raddra,
  input  reg_addr_t rf_raddrb,
  // control
  input  vsel_t     vsel,
  input  logic      asel,
  input  logic      bsel,
  input  alu_op_t   alu_op,
  input  shift_op_t shift_op,
  input  logic      loady,
  input  logic      loads,
  // results
  output word_t     datapath_out,
  output flags_t    status_out
);
  word_t  data_in;
  word_t  out_a, out_b, b_shifted;
  word_t  a_operand, b_operand;
  word_t  alu_out;
  flags_t alu_flags;

  always_comb begin
    unique case (vsel)
      VSEL_BUS:    data_in = datapath_in;
      VSEL_PC:     data_in = pc_plus1;
      VSEL_SXIMM8: data_in = sximm8;
      VSEL_TXIMM8: data_in = tximm8;
      default:     data_in = datapath_in;
    endcase
  end

  regfile u_regfile (
    .clk    (clk),
    .rst_n  (rst_n),
    .wen    (rf_wen),
    .waddr  (rf_waddr),
    .wdata  (data_in),
    .raddra (rf_raddra),
    .raddrb (rf_raddrb),
    .rdataa (out_a),
    .rdatab (out_b)
  );

  shifter u_shifter (
    .in       (out_b),
    .shift_op (shift_op),
    .out      (b_shifted)
  );

  assign a_operand = asel ? '0     : out_a;
  assign b_operand = bsel ? sximm5 : b_shifted;

  alu u_alu (
    .a      (a_operand),
    .b      (b_operand),
    .alu_op (alu_op),
    .c_in   (status_out.c),
    .result (alu_out),
    .flags  (alu_flags)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      datapath_out <= '0;
      status_out   <= '0;
    end else begin
      if (loady) datapath_out <= alu_out;
      if (loads) status_out   <= alu_flags;
    end
  end
endmodule
