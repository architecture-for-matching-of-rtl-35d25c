// Exhaustive test of a 5-input OR-gate tree: the output must be 1 exactly when at
// least one input is 1.
module tb_or_gate_tree;
  localparam int W = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] in_bits;
  logic any;

  or_gate_tree #(.W(W)) dut (.in_bits(in_bits), .any(any));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      in_bits = W'(i);
      @(negedge clk);
      checks++;
      if (any != (i != 0)) begin
        failures++;
        $display("FAIL in=%b any=%0b", in_bits, any);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
