// XOR bank: W two-input XOR gates that form the bitwise difference vector of two
// words. The number of 1s in diff is the Hamming distance of x and y, which the
// butterfly-formed weight accumulators then count. Combinational, one gate level.
// Follows the architecture, which uses one bank for the data part (k bits) and one
// for the parity part (n-k bits).
module xor_bank #(
  parameter int unsigned W = 4   // k for the data part, n-k for the parity part
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] diff
);
  assign diff = x ^ y;
endmodule
