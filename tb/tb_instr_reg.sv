// tb_instr_reg: the instruction register must read zero after reset, take
// instr_in on a clock edge with load_ir high and hold it otherwise.
module tb_instr_reg;
  import cpu_pkg::*;
  logic  clk = 0, rst_n = 0, load_ir = 0;
  word_t instr_in = '0, ir;
  logic [15:0] model;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_in = 16'hBEEF;
    #12;
    checks++; if (ir != 16'h0000) begin failures++; $display("FAIL reset value %h", ir); end
    rst_n = 1;
    model = 16'h0000;
    repeat (1000) begin
      @(negedge clk);
      load_ir  = 1'($urandom);
      instr_in = 16'($urandom);
      @(posedge clk);
      if (load_ir) model = instr_in;
      #1;
      checks++;
      if (ir != model) begin
        failures++;
        $display("FAIL load_ir=%0d ir %h expected %h", load_ir, ir, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
