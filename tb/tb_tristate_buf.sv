// tb_tristate_buf: two gates share one bus with a weak pull-down, as
// several units share the CPU's data bus. With one gate enabled the bus
// carries that gate's data; with none enabled the pull-down wins and the
// bus reads zero, which only holds if a disabled gate releases the bus.
module tb_tristate_buf;
  logic        en0, en1;
  logic [15:0] a0, a1;
  tri   [15:0] bus;
  int checks = 0, failures = 0;

  tristate_buf dut0 (.en(en0), .a(a0), .y(bus));
  tristate_buf dut1 (.en(en1), .a(a1), .y(bus));
  pulldown pd [15:0] (bus);

  task automatic check(logic [15:0] exp, string what);
    #1;
    checks++;
    if (bus !== exp) begin
      failures++;
      $display("FAIL %s: bus %h expected %h", what, bus, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      a0 = 16'($urandom) | 16'h0001;
      a1 = 16'($urandom) | 16'h8000;
      en0 = 1; en1 = 0; check(a0, "gate 0 drives");
      en0 = 0; en1 = 1; check(a1, "gate 1 drives");
      en0 = 0; en1 = 0; check(16'h0000, "bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
