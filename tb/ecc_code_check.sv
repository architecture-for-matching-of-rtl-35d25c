// Testbench helper: drives one ecc_match_top of an (N, K) SEC-DED code and checks it
// against a reference model written independently of the design.
//
// Reference: the extended Hamming parity of a tag is computed here bit by bit (data
// bit i takes the i-th syndrome column from 3 upward that is not a power of two;
// the top parity bit is the overall parity), and the distance d is the number of
// ones of retrieved_cw XOR {tag, parity}. Expected: d = 0 exact match, d = 1 match,
// d = 2 fault, d >= 3 mismatch.
// Stimulus: TRIALS comparisons. Most take a codeword of a random tag and flip e
// distinct bits (e = 0..6), so every distance range is reached; the rest compare a
// random tag with the codeword of another random tag.
// Mechanisms counted: exact match, corrected match, fault, mismatch flagged by the
// OR-gate tree (a first-level bit beyond r_max), by an overflow of a second-level
// accumulator, and by the decision unit's sum alone. Each must occur at least once.
// Runs when start rises; raises done with the counts.
module ecc_code_check #(
  parameter int N      = 8,
  parameter int K      = 4,
  parameter int TRIALS = 2000
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int P = N - K;

  logic [N-1:0] cw;
  logic [K-1:0] tag;
  logic         match, fault, mismatch, exact;

  ecc_match_top #(.N(N), .K(K)) dut (
    .retrieved_cw(cw), .incoming_tag(tag),
    .match(match), .fault(fault), .mismatch(mismatch), .exact(exact)
  );

  function automatic logic [P-1:0] ref_parity(logic [K-1:0] data);
    logic [P-1:0] p;
    int col;
    p   = '0;
    col = 3;
    for (int i = 0; i < K; i++) begin
      while ((col & (col - 1)) == 0) col++;
      for (int c = 0; c < P - 1; c++)
        if (col[c]) p[c] = p[c] ^ data[i];
      col++;
    end
    p[P-1] = ^{data, p[P-2:0]};
    return p;
  endfunction

  int n_exact, n_corr, n_fault, n_mm_q, n_mm_ovf, n_mm_sum;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d,%0d) %s cw=%0h tag=%0h m/f/mm/e=%b", N, K, what, cw, tag,
               {match, fault, mismatch, exact});
    end
  endtask

  initial begin
    int d, e, pos;
    logic [N-1:0] flips;
    done = 1'b0;
    checks = 0;
    failures = 0;
    {n_exact, n_corr, n_fault, n_mm_q, n_mm_ovf, n_mm_sum} = '0;
    cw  = '0;
    tag = '0;
    wait (start);
    for (int t = 0; t < TRIALS; t++) begin
      tag = K'({$urandom, $urandom});
      if (t % 8 == 7) begin
        cw = {K'({$urandom, $urandom}), P'(0)};
        cw[P-1:0] = ref_parity(cw[N-1:P]);
      end else begin
        cw = {tag, ref_parity(tag)};
        e = (t % 8) % 7;
        flips = '0;
        while ($countones(flips) < e) begin
          pos = $urandom % N;
          flips[pos] = 1'b1;
        end
        cw = cw ^ flips;
      end
      @(negedge clk);
      d = $countones(cw ^ {tag, ref_parity(tag)});
      check(exact    == (d == 0), "exact");
      check(match    == (d <= 1), "match");
      check(fault    == (d == 2), "fault");
      check(mismatch == (d >= 3), "mismatch");
      if (exact) n_exact++;
      if (match && !exact) n_corr++;
      if (fault) n_fault++;
      if (mismatch && dut.q) n_mm_q++;
      if (mismatch && !dut.q && |dut.ovf2) n_mm_ovf++;
      if (mismatch && !dut.q && !(|dut.ovf2)) n_mm_sum++;
    end
    $display("(%0d,%0d): exact=%0d corrected=%0d fault=%0d mismatch: or-tree=%0d level2-overflow=%0d sum=%0d",
             N, K, n_exact, n_corr, n_fault, n_mm_q, n_mm_ovf, n_mm_sum);
    check(n_exact  > 0, "exact match never occurred");
    check(n_corr   > 0, "corrected match never occurred");
    check(n_fault  > 0, "fault never occurred");
    check(n_mm_q   > 0, "mismatch by the OR-gate tree never occurred");
    check(n_mm_ovf > 0, "mismatch by a second-level overflow never occurred");
    check(n_mm_sum > 0, "mismatch by the decision sum never occurred");
    done = 1'b1;
  end
endmodule
