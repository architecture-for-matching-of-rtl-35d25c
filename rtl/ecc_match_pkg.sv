// Shared constants and elaboration-time helpers for the ECC-protected data matcher.
//
// The matcher counts the 1s of a difference vector with butterfly-formed weight
// accumulators (BWAs). A BWA maps N input bits to N output bits, and every output
// position carries a fixed power-of-two weight. The functions below give that weight
// for any position, so that the interconnection and the decision unit can be wired
// at elaboration time without hand-written tables.
//
// BWA recursion used throughout (see bwa.sv): an N-input group of weight 2**lw is
// paired into floor(N/2) half adders. Their carries (weight 2**(lw+1)) form the first
// floor(N/2) output positions; their sums, plus the unpaired last input when N is odd,
// form the remaining ceil(N/2) positions at weight 2**lw. Each half is processed the
// same way until a group holds one bit. For N = 8 this gives the weights
// 8,4,4,2,4,2,2,1, the outputs I..P of the 8-input accumulator.
//
// "Revised" BWAs stop adding bits whose weight exceeds a limit (r_max): such bits only
// tell that the distance is beyond r_max, so they are ORed into one flag instead. An
// output position is "valid" when its weight does not exceed that limit; all other
// positions are driven to 0.
package ecc_match_pkg;

  // Three-way outcome of a comparison, by Hamming distance d.
  typedef enum logic [1:0] {
    DEC_MATCH    = 2'd0,   // d <= t_max: equal, possibly after correcting the codeword
    DEC_FAULT    = 2'd1,   // t_max < d <= r_max: detectable but uncorrectable error
    DEC_MISMATCH = 2'd2    // d > r_max: different data
  } decision_e;

  // log2 of the weight of output position idx of an n-input BWA whose inputs have
  // weight 2**lw0.
  function automatic int bwa_out_lw(int n, int lw0, int idx);
    int lw, m, i, h;
    lw = lw0;
    m  = n;
    i  = idx;
    while (m > 1) begin
      h = m / 2;
      if (i < h) begin
        lw = lw + 1;
        m  = h;
      end else begin
        i = i - h;
        m = m - h;
      end
    end
    return lw;
  endfunction

  // Group of positions that position p belongs to before stage s of an n-input BWA
  // (stage 0 sees one group holding all n inputs of weight 2**lw0). Each stage splits
  // a group of size m into its carry half (floor(m/2) positions, weight doubled) and
  // its sum half (the remaining positions, same weight).
  typedef struct packed {
    int start;
    int size;
    int lw;
  } bwa_group_t;

  function automatic bwa_group_t bwa_group(int n, int lw0, int s, int p);
    bwa_group_t g;
    int h;
    g.start = 0;
    g.size  = n;
    g.lw    = lw0;
    for (int k = 0; k < s; k++) begin
      if (g.size > 1) begin
        h = g.size / 2;
        if (p < g.start + h) begin
          g.size = h;
          g.lw   = g.lw + 1;
        end else begin
          g.start = g.start + h;
          g.size  = g.size - h;
        end
      end
    end
    return g;
  endfunction

  // Whether output position idx carries a weight that is still added up (<= limit).
  function automatic bit bwa_out_valid(int n, int lw0, int limit, int idx);
    return (64'd1 << bwa_out_lw(n, lw0, idx)) <= 64'(limit);
  endfunction

  // Number of weight classes 2**0 .. 2**(nclass-1) that do not exceed rmax.
  function automatic int num_classes(int rmax);
    return $clog2(rmax + 1);
  endfunction

  // Number of valid first-level output bits of weight 2**j, over the BWA for tags
  // (k inputs) and the BWA for parities (p inputs).
  function automatic int class_count(int k, int p, int rmax, int j);
    int cnt;
    cnt = 0;
    for (int i = 0; i < k; i++)
      if (bwa_out_valid(k, 0, rmax, i) && bwa_out_lw(k, 0, i) == j) cnt++;
    for (int i = 0; i < p; i++)
      if (bwa_out_valid(p, 0, rmax, i) && bwa_out_lw(p, 0, i) == j) cnt++;
    return cnt;
  endfunction

  // Slot that first-level output idx of an n-input BWA takes inside its weight class,
  // counting only the bits of the same class placed before it. Tag bits are placed
  // first, parity bits after them (offset = number of tag bits of that class).
  function automatic int class_slot(int n, int rmax, int idx, int offset);
    int slot, j;
    j    = bwa_out_lw(n, 0, idx);
    slot = offset;
    for (int i = 0; i < idx; i++)
      if (bwa_out_valid(n, 0, rmax, i) && bwa_out_lw(n, 0, i) == j) slot++;
    return slot;
  endfunction

  // Largest sum of valid second-level weights: bounds the distance the decision unit
  // has to represent.
  function automatic int l2_max_sum(int k, int p, int rmax);
    int s, c;
    s = 0;
    for (int j = 0; j < num_classes(rmax); j++) begin
      c = class_count(k, p, rmax, j);
      for (int i = 0; i < c; i++)
        if (bwa_out_valid(c, j, rmax, i)) s += (1 << bwa_out_lw(c, j, i));
    end
    return s;
  endfunction

  // Syndrome column of data bit i in the SEC-DED (extended Hamming) code: the i-th
  // integer from 3 upward that is not a power of two.
  function automatic int hamming_col(int i);
    int v, cnt;
    v   = 3;
    cnt = 0;
    while (1) begin
      if ((v & (v - 1)) != 0) begin
        if (cnt == i) return v;
        cnt++;
      end
      v++;
    end
    return 0;
  endfunction

endpackage
