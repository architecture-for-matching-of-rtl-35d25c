// Matcher for data stored under a systematic error-correcting code.
//
// A stored codeword (data part and parity part) is compared with an incoming k-bit
// tag without decoding the codeword first. The tag is encoded, and the Hamming
// distance d between the encoded tag and the stored codeword tells the answer:
// d <= TMAX means the codeword holds the tag (after correcting at most TMAX errors),
// TMAX < d <= RMAX means the codeword has an uncorrectable error (fault), and
// d > RMAX means the tag is not there (mismatch). Because the code is systematic, the
// data part is compared with the tag at once, in parallel with encoding, and only
// the parity part waits for the encoder.
//
// Datapath (all combinational):
//   first level   xor_bank (data part ^ tag)      -> bwa "for tags"     (revised)
//                 sec_ded_encoder -> xor_bank (parity part ^ new parity)
//                                                 -> bwa "for parities" (revised)
//   interconnection: first-level bits grouped by weight 1, 2, 4, ... up to RMAX
//   second level  or_gate_tree over the first-level overflow flags (bits beyond RMAX)
//                 one bwa per weight class (for 1's, for 2's, ...)
//   decision_unit -> match / fault / mismatch (+ exact for d == 0)
// For the (8,4) code this is exactly: two 4-input accumulators at the first level,
// an OR gate (Q) over their weight-4 bits, a 4-input accumulator for the 2's whose
// weight-4 carries are ORed (R, S) and a half adder for the 1's (U, V), with T the
// remaining weight-2 bit.
//
// The structure, the (8,4) configuration and the ranges of d follow the
// architecture; the code (extended Hamming), the codeword layout and the general
// rule that builds the levels for any (N, K) are this design's choices.
// Ports: retrieved_cw = {data[K-1:0], parity[N-K-1:0]}; one-hot outputs
// match / fault / mismatch, plus exact. No clock: the result settles after the
// longer of the tag path and the encoder-plus-parity path.
module ecc_match_top
  import ecc_match_pkg::*;
#(
  parameter int unsigned N    = 8,   // codeword bits (n)
  parameter int unsigned K    = 4,   // data / tag bits (k)
  parameter int unsigned TMAX = 1,   // errors the code corrects
  parameter int unsigned RMAX = 2    // errors the code detects
) (
  input  logic [N-1:0] retrieved_cw,
  input  logic [K-1:0] incoming_tag,
  output logic         match,
  output logic         fault,
  output logic         mismatch,
  output logic         exact
);
  localparam int unsigned P      = N - K;
  localparam int unsigned NCLASS = num_classes(RMAX);

  // ---- first level ----
  logic [P-1:0] tag_parity;
  logic [K-1:0] diff_tag,  w_tag;
  logic [P-1:0] diff_par,  w_par;
  logic         ovf_tag,   ovf_par;

  sec_ded_encoder #(.N(N), .K(K)) u_enc (
    .data(incoming_tag), .parity(tag_parity)
  );

  xor_bank #(.W(K)) u_xor_tag (
    .x(retrieved_cw[N-1:P]), .y(incoming_tag), .diff(diff_tag)
  );
  xor_bank #(.W(P)) u_xor_par (
    .x(retrieved_cw[P-1:0]), .y(tag_parity), .diff(diff_par)
  );

  bwa #(.N(K), .LW(0), .LIMIT(RMAX)) u_bwa_tag (
    .in_bits(diff_tag), .out_bits(w_tag), .ovf(ovf_tag)
  );
  bwa #(.N(P), .LW(0), .LIMIT(RMAX)) u_bwa_par (
    .in_bits(diff_par), .out_bits(w_par), .ovf(ovf_par)
  );

  // ---- interconnection ----
  logic [NCLASS-1:0][N-1:0] groups;

  interconnection #(.K(K), .P(P), .RMAX(RMAX)) u_ic (
    .tag_bits(w_tag), .par_bits(w_par), .groups(groups)
  );

  // ---- second level ----
  logic                     q;
  logic [NCLASS-1:0][N-1:0] l2_bits;
  logic [NCLASS-1:0]        ovf2;

  or_gate_tree #(.W(2)) u_or (
    .in_bits({ovf_par, ovf_tag}), .any(q)
  );

  for (genvar j = 0; j < NCLASS; j++) begin : g_l2
    localparam int CNT = class_count(K, P, RMAX, j);
    if (CNT == 0) begin : g_empty
      assign l2_bits[j] = '0;
      assign ovf2[j]    = 1'b0;
    end else begin : g_bwa
      logic [CNT-1:0] cnt_bits;
      bwa #(.N(CNT), .LW(j), .LIMIT(RMAX)) u_bwa (
        .in_bits(groups[j][CNT-1:0]), .out_bits(cnt_bits), .ovf(ovf2[j])
      );
      assign l2_bits[j] = N'(cnt_bits);
    end
  end

  // ---- decision ----
  decision_unit #(.N(N), .K(K), .TMAX(TMAX), .RMAX(RMAX)) u_du (
    .l2_bits(l2_bits), .q(q), .ovf2(ovf2),
    .match(match), .fault(fault), .mismatch(mismatch), .exact(exact)
  );
endmodule
