// End-to-end test of the matcher at its default configuration, the (8,4) SEC-DED
// code, run exhaustively: every one of the 256 possible retrieved words against
// every one of the 16 tags (4096 comparisons). The reference is written out here:
// the tag's parity from the hand-written equations
//   p0 = d0^d1^d3, p1 = d0^d2^d3, p2 = d1^d2^d3, p3 = overall parity,
// d = number of ones of retrieved XOR {tag, parity}, and the four ranges of d
// (0 exact match, 1 match, 2 fault, 3 or more mismatch).
// Mechanisms counted, each required at least once: exact match, match after
// correction, fault, mismatch through the OR-gate tree (Q), through the overflow of
// the accumulator for 2's (R, S) and through the decision sum alone (T, U, V).
// The design has no clock: outputs are sampled one time step after the inputs
// change, and the clock here only paces the stimulus and the watchdog.
module tb_ecc_match_top;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [7:0] cw;
  logic [3:0] tag;
  logic       match, fault, mismatch, exact;

  ecc_match_top dut (
    .retrieved_cw(cw), .incoming_tag(tag),
    .match(match), .fault(fault), .mismatch(mismatch), .exact(exact)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_parity(logic [3:0] d);
    logic [3:0] p;
    p[0] = d[0] ^ d[1] ^ d[3];
    p[1] = d[0] ^ d[2] ^ d[3];
    p[2] = d[1] ^ d[2] ^ d[3];
    p[3] = ^{d, p[2:0]};
    return p;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cw=%b tag=%b m/f/mm/e=%b", what, cw, tag, {match, fault, mismatch, exact});
    end
  endtask

  int n_exact = 0, n_corr = 0, n_fault = 0, n_mm_q = 0, n_mm_ovf = 0, n_mm_sum = 0;

  initial begin
    int d;
    for (int c = 0; c < 256; c++) begin
      for (int t = 0; t < 16; t++) begin
        cw  = 8'(c);
        tag = 4'(t);
        #1;
        d = $countones(cw ^ {tag, ref_parity(tag)});
        check(exact    == (d == 0), "exact");
        check(match    == (d <= 1), "match");
        check(fault    == (d == 2), "fault");
        check(mismatch == (d >= 3), "mismatch");
        check($countones({match, fault, mismatch}) == 1, "one-hot");
        if (exact) n_exact++;
        if (match && !exact) n_corr++;
        if (fault) n_fault++;
        if (mismatch && dut.q) n_mm_q++;
        if (mismatch && !dut.q && |dut.ovf2) n_mm_ovf++;
        if (mismatch && !dut.q && !(|dut.ovf2)) n_mm_sum++;
        @(negedge clk);
      end
    end
    $display("exact=%0d corrected=%0d fault=%0d mismatch: or-tree=%0d level2-overflow=%0d sum=%0d",
             n_exact, n_corr, n_fault, n_mm_q, n_mm_ovf, n_mm_sum);
    // 16 codewords, 16*8 at distance 1 and 16*28 at distance 2 from some codeword
    check(n_exact == 16,      "exact match count");
    check(n_corr  == 16 * 8,  "corrected match count");
    check(n_fault == 16 * 28, "fault count");
    check(n_mm_q   > 0, "mismatch by the OR-gate tree never occurred");
    check(n_mm_ovf > 0, "mismatch by the second-level overflow never occurred");
    check(n_mm_sum > 0, "mismatch by the decision sum never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
