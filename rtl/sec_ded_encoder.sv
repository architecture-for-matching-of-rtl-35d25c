// Systematic SEC-DED encoder: computes the parity part of a codeword from its data
// part, so that an incoming tag can be compared with a stored codeword in the parity
// domain while its data bits are compared directly.
//
// Code: extended Hamming code, N-K = R+1 parity bits for K data bits. Data bit i is
// given the syndrome column hamming_col(i), the i-th integer from 3 upward that is
// not a power of two (3,5,6,7,9,... over R bits). Parity bit c < R is the XOR of the
// data bits whose column has bit c set; parity bit R, the most significant, is the
// overall parity of the data bits and the other R parity bits. The minimum distance
// is 4: single errors are correctable and double errors detectable.
// Codeword layout: {data[K-1:0], parity[N-K-1:0]}, data part first.
//
// The architecture only requires some systematic code; the choice of the extended
// Hamming code, its column order and the bit layout are this design's own. Every
// configuration whose K fits in 2**R - R - 1 data bits is accepted, which covers
// the (8,4), (16,11), (24,18), (31,25) and (40,33) codes.
// Combinational: a tree of XOR gates per parity bit.
module sec_ded_encoder
  import ecc_match_pkg::*;
#(
  parameter int unsigned N = 8,   // codeword bits
  parameter int unsigned K = 4    // data bits
) (
  input  logic [K-1:0]   data,
  output logic [N-K-1:0] parity
);
  localparam int unsigned R = N - K - 1;   // Hamming check bits below the overall parity

  if (R < 2 || K > (1 << R) - R - 1) begin : g_bad_size
    $error("sec_ded_encoder: no SEC-DED code with N=%0d, K=%0d", N, K);
  end

  // Column masks: bit i of MASK[c] is set when data bit i takes part in check bit c.
  function automatic logic [K-1:0] check_mask(int c);
    logic [K-1:0] m;
    for (int i = 0; i < K; i++) m[i] = ((hamming_col(i) >> c) & 1) != 0;
    return m;
  endfunction

  logic [R-1:0] checks;
  for (genvar c = 0; c < R; c++) begin : g_chk
    localparam logic [K-1:0] MASK = check_mask(c);
    assign checks[c] = ^(data & MASK);
  end

  assign parity = {(^data) ^ (^checks), checks};
endmodule
