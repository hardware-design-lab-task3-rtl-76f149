// tb_regfile: checks reset clears all eight registers, then runs 3000
// cycles of random writes and reads on both ports against an array model.
// A read in the cycle of a write must return the old value.
module tb_regfile;
  import cpu_pkg::*;
  logic      clk = 0, rst_n = 0, wen;
  reg_addr_t waddr, raddra, raddrb;
  word_t     wdata, rdataa, rdatab;
  int unsigned model [8];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(word_t got, int unsigned exp, string what);
    checks++;
    if (got != exp[15:0]) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp[15:0]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 0; waddr = 0; wdata = 0; raddra = 0; raddrb = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      model[i] = 0;
      raddra = i[2:0]; raddrb = 3'(7 - i); #1;
      check(rdataa, 0, "reset A");
      check(rdatab, 0, "reset B");
    end
    repeat (3000) begin
      @(negedge clk);
      wen    = 1'($urandom);
      waddr  = 3'($urandom);
      wdata  = 16'($urandom);
      raddra = 3'($urandom);
      raddrb = 3'($urandom);
      #1;
      check(rdataa, model[raddra], "port A");
      check(rdatab, model[raddrb], "port B");
      @(posedge clk);
      if (wen) model[waddr] = wdata;
    end
    @(negedge clk);
    wen = 0;
    for (int i = 0; i < 8; i++) begin
      raddra = i[2:0]; raddrb = i[2:0]; #1;
      check(rdataa, model[i], "final A");
      check(rdatab, model[i], "final B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
