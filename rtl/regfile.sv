// regfile: eight 16-bit registers R0..R7 with two combinational read ports
// (A and B) and one write port. A write happens on the rising clock edge
// when wen is high, to register waddr with wdata; a read in the same cycle
// still returns the old value. The 8 x 16 organisation and the port names
// follow the datapath drawing. The asynchronous active-low reset that
// clears all eight registers, and R0 being an ordinary register, are this
// design's choices.
module regfile
  import cpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wen,
  input  reg_addr_t waddr,
  input  word_t     wdata,
  input  reg_addr_t raddra,
  input  reg_addr_t raddrb,
  output word_t     rdataa,
  output word_t     rdatab
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wen) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdataa = regs[raddra];
  assign rdatab = regs[raddrb];
endmodule
