// tb_sign_ext: exhaustive check of the 5-bit and 8-bit sign extenders
// against the signed value of each input, plus the two worked examples
// (8'hAA -> 16'hFFAA, 8'h55 -> 16'h0055).
module tb_sign_ext;
  logic [4:0]  in5;
  logic [7:0]  in8;
  logic [15:0] out5, out8;
  int checks = 0, failures = 0;

  sign_ext #(.IN_W(5), .OUT_W(16)) dut5 (.in(in5), .out(out5));
  sign_ext                         dut8 (.in(in8), .out(out8));

  task automatic check(logic [15:0] got, int exp_signed, string what);
    int unsigned exp;
    exp = (exp_signed < 0) ? 65536 + exp_signed : exp_signed;
    checks++;
    if (got != exp[15:0]) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp[15:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      in5 = i[4:0]; #1;
      check(out5, (i >= 16) ? i - 32 : i, "imm5");
    end
    for (int i = 0; i < 256; i++) begin
      in8 = i[7:0]; #1;
      check(out8, (i >= 128) ? i - 256 : i, "imm8");
    end
    in8 = 8'b1010_1010; #1; check(out8, 16'hFFAA - 65536, "example AA");
    in8 = 8'b0101_0101; #1; check(out8, 16'h0055, "example 55");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
