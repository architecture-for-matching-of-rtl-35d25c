// OR-gate tree of the second level. Its inputs are bits whose weight is larger than
// r_max (the overflow outputs of the first-level accumulators, and inside an
// accumulator the bits it stops adding); a single one of them already puts the
// Hamming distance beyond r_max, so they need no adding, only an OR. The reduction
// OR is left to synthesis to build as a balanced tree of two-input gates,
// ceil(log2 W) levels deep. Combinational. The architecture names this tree and its
// purpose; leaving its shape to synthesis is this design's choice.
module or_gate_tree #(
  parameter int unsigned W = 2   // two for the (8,4) code: one flag per first-level BWA
) (
  input  logic [W-1:0] in_bits,
  output logic         any
);
  assign any = |in_bits;
endmodule
