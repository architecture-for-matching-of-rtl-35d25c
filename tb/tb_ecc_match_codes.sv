// The four codes of the latency and complexity comparison, (16,11), (24,18),
// (31,25) and (40,33), all SEC-DED (t_max = 1, r_max = 2), plus the default (8,4)
// code, each with its own matcher checked against an independent reference model on
// 2000 random comparisons (see ecc_code_check). Each matcher must also show every
// outcome and every way to a mismatch at least once.
module tb_ecc_match_codes;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic start = 1'b0;

  logic [4:0] done;
  int         c [5];
  int         f [5];

  ecc_code_check #(.N(8),  .K(4))  u_8_4   (.clk(clk), .start(start), .done(done[0]), .checks(c[0]), .failures(f[0]));
  ecc_code_check #(.N(16), .K(11)) u_16_11 (.clk(clk), .start(start), .done(done[1]), .checks(c[1]), .failures(f[1]));
  ecc_code_check #(.N(24), .K(18)) u_24_18 (.clk(clk), .start(start), .done(done[2]), .checks(c[2]), .failures(f[2]));
  ecc_code_check #(.N(31), .K(25)) u_31_25 (.clk(clk), .start(start), .done(done[3]), .checks(c[3]), .failures(f[3]));
  ecc_code_check #(.N(40), .K(33)) u_40_33 (.clk(clk), .start(start), .done(done[4]), .checks(c[4]), .failures(f[4]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    start = 1'b1;
    wait (&done);
    for (int i = 0; i < 5; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
