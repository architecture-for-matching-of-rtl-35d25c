// Exhaustive test of the decision unit of the (8,4) code. Its inputs reduce to the
// six signals of the code's truth table: Q (OR-gate tree), R|S (overflow of the
// accumulator for 2's), T (its weight-2 output), U and V (weights 2 and 1 of the
// accumulator for 1's). The expected result is worked out from d = 2T + 2U + V:
// d <= 1 match (exact for d = 0), d = 2 fault, d >= 3 or any of Q, R, S mismatch.
module tb_decision_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [1:0][7:0] l2_bits;
  logic            q;
  logic [1:0]      ovf2;
  logic            match, fault, mismatch, exact;
  logic            t, u, v, rs;

  decision_unit #(.N(8), .K(4), .TMAX(1), .RMAX(2)) dut (
    .l2_bits(l2_bits), .q(q), .ovf2(ovf2),
    .match(match), .fault(fault), .mismatch(mismatch), .exact(exact)
  );

  // Positions of T, U and V: output 3 of the 4-input accumulator for 2's, outputs 0
  // and 1 of the 2-input accumulator for 1's.
  always_comb begin
    l2_bits       = '0;
    l2_bits[1][3] = t;
    l2_bits[0][0] = u;
    l2_bits[0][1] = v;
    ovf2          = {rs, 1'b0};
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    logic em, ef, emm, ee;
    for (int i = 0; i < 32; i++) begin
      {q, rs, t, u, v} = 5'(i);
      @(negedge clk);
      d   = 2 * t + 2 * u + v;
      emm = q || rs || d >= 3;
      em  = !emm && d <= 1;
      ef  = !emm && d == 2;
      ee  = !emm && d == 0;
      checks++;
      if ({match, fault, mismatch, exact} != {em, ef, emm, ee}) begin
        failures++;
        $display("FAIL QRS=%0b%0b T=%0b U=%0b V=%0b -> m/f/mm/e %b, expected %b",
                 q, rs, t, u, v, {match, fault, mismatch, exact}, {em, ef, emm, ee});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
