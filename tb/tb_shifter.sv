// tb_shifter: all four shift codes on corner values and 2000 random
// words, compared with integer multiply/divide results.
module tb_shifter;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;
  word_t     in, out;
  shift_op_t op;
  int checks = 0, failures = 0;

  shifter dut (.in(in), .shift_op(op), .out(out));

  task automatic try(int unsigned x, int unsigned code);
    int unsigned exp;
    in = x[15:0];
    op = shift_op_t'(code[1:0]);
    #1;
    exp = ref_shift(x, code);
    checks++;
    if (out != exp[15:0]) begin
      failures++;
      $display("FAIL in %h code %0d: got %h expected %h", in, code, out, exp[15:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned corners[6] = '{0, 1, 16'h8000, 16'hFFFF, 16'h7FFF, 16'hA5A5};
    foreach (corners[i])
      for (int c = 0; c < 4; c++) try(corners[i], c);
    repeat (2000) try($urandom_range(0, 65535), $urandom_range(0, 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
