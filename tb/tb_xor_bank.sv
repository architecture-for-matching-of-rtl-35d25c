// Random test of the XOR bank at 33 bits (the data part of the (40,33) code): each
// difference bit is checked against the inequality of the two input bits.
module tb_xor_bank;
  localparam int W = 33;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] x, y, diff;

  xor_bank #(.W(W)) dut (.x(x), .y(y), .diff(diff));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      x = {$urandom, $urandom};
      y = (t % 4 == 0) ? x : {$urandom, $urandom};
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        checks++;
        if (diff[i] != (x[i] != y[i])) begin
          failures++;
          $display("FAIL bit %0d x=%0b y=%0b diff=%0b", i, x[i], y[i], diff[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
