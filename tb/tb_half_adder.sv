// Exhaustive test of the half adder: all four input pairs, carry and sum checked
// against the two-bit sum a + b.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic a, b, c, s;

  half_adder dut (.a(a), .b(b), .c(c), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      @(negedge clk);
      checks++;
      if ({c, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b s=%0b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
