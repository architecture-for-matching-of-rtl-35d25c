// Decision unit: turns the outputs of the second level into the result of the
// comparison. The Hamming distance d between the incoming tag (encoded) and the
// retrieved codeword falls in one of four ranges:
//   d == 0               the words match exactly            -> match, exact
//   0 < d <= TMAX        they match once the codeword's errors are corrected -> match
//   TMAX < d <= RMAX     detectable, uncorrectable error     -> fault
//   d > RMAX             different words                     -> mismatch
// Inputs: l2_bits[j] holds the kept outputs of the second-level accumulator for
// weight class 2**j, whose position weights follow ecc_match_pkg::bwa_out_lw; q is
// the OR-gate tree output (a first-level bit beyond RMAX); ovf2[j] the overflow
// output of the class-j accumulator (bits it stopped adding). Any of these flags
// means d > RMAX.
// The ranges follow the architecture. The decision itself is written here as a
// small weighted sum of the remaining bits compared with TMAX and RMAX: for the
// (8,4) code that is a sum of at most 2T+2U+V = 5, which synthesis reduces to the
// few gates of a truth table. Combinational.
module decision_unit
  import ecc_match_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 4,
  parameter int unsigned TMAX = 1,
  parameter int unsigned RMAX = 2,
  localparam int unsigned NCLASS = num_classes(RMAX),
  localparam int unsigned W      = N
) (
  input  logic [NCLASS-1:0][W-1:0] l2_bits,
  input  logic                     q,
  input  logic [NCLASS-1:0]        ovf2,
  output logic                     match,
  output logic                     fault,
  output logic                     mismatch,
  output logic                     exact
);
  localparam int unsigned P  = N - K;
  localparam int unsigned DW = $clog2(l2_max_sum(K, P, RMAX) + 1) + 1;

  if (TMAX > RMAX || RMAX == 0) begin : g_bad_range
    $error("decision_unit: need 0 < RMAX and TMAX <= RMAX");
  end

  // Weight of every second-level bit (0 where the bit is not used).
  function automatic logic [NCLASS-1:0][W-1:0][DW-1:0] weights();
    logic [NCLASS-1:0][W-1:0][DW-1:0] wt;
    int c;
    wt = '0;
    for (int j = 0; j < NCLASS; j++) begin
      c = class_count(K, P, RMAX, j);
      for (int i = 0; i < c; i++)
        if (bwa_out_valid(c, j, RMAX, i)) wt[j][i] = DW'(1 << bwa_out_lw(c, j, i));
    end
    return wt;
  endfunction

  localparam logic [NCLASS-1:0][W-1:0][DW-1:0] WT = weights();

  logic [DW-1:0] d_low;    // distance when no overflow flag is set
  logic          beyond;   // d > RMAX

  always_comb begin
    d_low = '0;
    for (int j = 0; j < NCLASS; j++)
      for (int i = 0; i < W; i++)
        if (l2_bits[j][i]) d_low = d_low + WT[j][i];
  end

  assign beyond   = q || (|ovf2) || (d_low > DW'(RMAX));
  assign mismatch = beyond;
  assign match    = !beyond && (d_low <= DW'(TMAX));
  assign fault    = !beyond && (d_low >  DW'(TMAX));
  assign exact    = !beyond && (d_low == '0);
endmodule
