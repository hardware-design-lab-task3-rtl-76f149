// tb_tail_ext: exhaustive check of the 8-to-16 tail extender against
// in * 256, plus the two worked examples (8'hAA -> 16'hAA00,
// 8'h55 -> 16'h5500).
module tb_tail_ext;
  logic [7:0]  in;
  logic [15:0] out;
  int checks = 0, failures = 0;

  tail_ext dut (.in(in), .out(out));

  task automatic check(int unsigned exp, string what);
    checks++;
    if (out != exp[15:0]) begin
      failures++;
      $display("FAIL %s: in %h got %h expected %h", what, in, out, exp[15:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in = i[7:0]; #1;
      check(i * 256, "sweep");
    end
    in = 8'b1010_1010; #1; check(32'hAA00, "example AA");
    in = 8'b0101_0101; #1; check(32'h5500, "example 55");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
