// instr_reg: the instruction register (IR). It holds the 16-bit instruction
// being executed; on a rising clock edge with load_ir high it captures
// instr_in, otherwise it keeps its value. Its width and load enable follow
// the CPU description; the asynchronous active-low reset to 16'h0000 is
// this design's choice.
module instr_reg
  import cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_ir,
  input  word_t instr_in,
  output word_t ir
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ir <= '0;
    else if (load_ir) ir <= instr_in;
  end
endmodule
