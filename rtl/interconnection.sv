// Interconnection between the two levels of accumulators. The first level has one
// revised accumulator for the tag difference (K bits) and one for the parity
// difference (P bits); each of their kept output bits has a weight 2**j with
// 2**j <= RMAX. This block gathers all bits of weight 2**j, tag bits first and parity
// bits after them, into groups[j] starting at index 0, so that the second level can
// count each weight class with one accumulator. Unused group positions are 0;
// ecc_match_pkg::class_count gives the number of bits in each class.
// Input positions whose weight exceeds RMAX (always 0, their bits went to the
// accumulators' overflow flags) are left unconnected; for the (8,4) code that is bit 0
// of each input, which is why lint reports those bits as unused.
// Only wires: no logic, no delay.
module interconnection
  import ecc_match_pkg::*;
#(
  parameter int unsigned K    = 4,   // tag (data part) bits
  parameter int unsigned P    = 4,   // parity bits, n-k
  parameter int unsigned RMAX = 2,   // largest weight passed on
  localparam int unsigned NCLASS = num_classes(RMAX),
  localparam int unsigned W      = K + P
) (
  input  logic [K-1:0]             tag_bits,
  input  logic [P-1:0]             par_bits,
  output logic [NCLASS-1:0][W-1:0] groups
);
  for (genvar j = 0; j < NCLASS; j++) begin : g_class
    localparam int CNT = class_count(K, P, RMAX, j);
    localparam int NT  = class_count(K, 0, RMAX, j);   // tag bits in this class
    for (genvar i = 0; i < K; i++) begin : g_tag
      if (bwa_out_valid(K, 0, RMAX, i) && bwa_out_lw(K, 0, i) == j) begin : g_wire
        assign groups[j][class_slot(K, RMAX, i, 0)] = tag_bits[i];
      end
    end
    for (genvar i = 0; i < P; i++) begin : g_par
      if (bwa_out_valid(P, 0, RMAX, i) && bwa_out_lw(P, 0, i) == j) begin : g_wire
        assign groups[j][class_slot(P, RMAX, i, NT)] = par_bits[i];
      end
    end
    for (genvar m = CNT; m < W; m++) begin : g_zero
      assign groups[j][m] = 1'b0;
    end
  end
endmodule
