// tb_alu: every ALU operation with both carry inputs on corner operands
// and 4000 random ones; result and all four flags are compared with an
// integer reference.
module tb_alu;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;
  word_t   a, b, result;
  alu_op_t op;
  logic    c_in;
  flags_t  flags;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_op(op), .c_in(c_in), .result(result), .flags(flags));

  task automatic try(int unsigned x, int unsigned y, int unsigned code, bit cin);
    ref_alu_t r;
    a = x[15:0]; b = y[15:0]; op = alu_op_t'(code[2:0]); c_in = cin;
    #1;
    r = ref_alu(x, y, code, cin);
    checks++;
    if (result != r.result[15:0] || flags.z != r.z || flags.n != r.n ||
        flags.c != r.c || flags.v != r.v) begin
      failures++;
      $display("FAIL op %0d a %h b %h cin %0d: got %h zncv=%b%b%b%b expected %h %b%b%b%b",
               code, a, b, cin, result, flags.z, flags.n, flags.c, flags.v,
               r.result[15:0], r.z, r.n, r.c, r.v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned corners[7] = '{0, 1, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5555, 16'hAAAA};
    foreach (corners[i])
      foreach (corners[j])
        for (int o = 0; o < 8; o++)
          for (int c = 0; c < 2; c++) try(corners[i], corners[j], o, c[0]);
    repeat (4000)
      try($urandom_range(0, 65535), $urandom_range(0, 65535), $urandom_range(0, 7), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
