// Butterfly-formed weight accumulator (BWA): counts the 1s among its inputs.
//
// How it works: the N inputs, all of weight 2**LW, are paired into floor(N/2) half
// adders. The carries of all half adders (weight 2**(LW+1)) and the sums (weight
// 2**LW, joined by the unpaired last input when N is odd) are then accumulated
// separately by the next stage: this is the butterfly connection, carries with
// carries and sums with sums. Each stage splits every group of equal-weight bits the
// same way, until all groups hold one bit; that takes ceil(log2 N) stages. With N = 8
// there are three stages of four half adders and eight outputs of weights
// 8,4,4,2,4,2,2,1, so that the count is
//   D = 8*out[0] + 4*(out[1]+out[2]+out[4]) + 2*(out[3]+out[5]+out[6]) + out[7].
// ecc_match_pkg::bwa_out_lw gives the weight of every output position for any N, and
// ecc_match_pkg::bwa_group the group a position belongs to at each stage.
//
// Revised form: a group whose weight exceeds LIMIT is no longer added; its bits pass
// unchanged to the end and are ORed into ovf, since any one of them already makes
// the count larger than LIMIT. Output positions whose weight exceeds LIMIT are 0.
// With LIMIT at or above the largest weight (the default) the accumulator is the
// plain one and ovf is 0.
//
// The 8-input and 4-input accumulators and the OR-based revision follow the
// architecture; the general rule for any N (including the odd-N rule) and the use of
// r_max as the weight limit are this design's choices.
//
// Interface: in_bits -> out_bits (same width), ovf. Combinational, ceil(log2 N)
// half-adder levels.
module bwa
  import ecc_match_pkg::*;
#(
  parameter int unsigned N     = 8,  // number of input bits
  parameter int unsigned LW    = 0,  // log2 of the weight of each input bit
  parameter int unsigned LIMIT = 8   // largest weight still added up
) (
  input  logic [N-1:0] in_bits,
  output logic [N-1:0] out_bits,
  output logic         ovf
);
  localparam int unsigned S = (N > 1) ? $clog2(N) : 0;   // number of stages

  logic [N-1:0] v [S+1];   // v[s]: bits entering stage s; v[S]: after the last stage
  logic [N-1:0] keep;      // output positions whose weight is at most LIMIT

  assign v[0] = in_bits;

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar q = 0; q < N; q++) begin : g_pos
      localparam bwa_group_t G  = bwa_group(N, LW, s, q);
      localparam int         H  = G.size / 2;
      localparam bit         OV = (64'd1 << G.lw) > 64'(LIMIT);
      if (G.size == 1 || OV || q == G.start + G.size - 1 && G.size % 2 == 1 && q >= G.start + H) begin : g_pass
        // single bit, bit beyond LIMIT, or the unpaired bit of an odd group
        assign v[s+1][q] = v[s][q];
      end else if (q < G.start + H) begin : g_ha
        // half adder i of this group: carry to position start+i, sum to start+H+i
        localparam int I = q - G.start;
        half_adder u_ha (
          .a(v[s][G.start + 2*I]),
          .b(v[s][G.start + 2*I + 1]),
          .c(v[s+1][q]),
          .s(v[s+1][G.start + H + I])
        );
      end
      // sum positions are driven by the half adder of their carry position
    end
  end

  for (genvar q = 0; q < N; q++) begin : g_out
    assign keep[q] = bwa_out_valid(N, LW, LIMIT, q);
  end

  assign out_bits = v[S] & keep;
  assign ovf      = |(v[S] & ~keep);
endmodule
