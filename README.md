# Direct matching of ECC-protected data by Hamming distance

A cache tag array, or any memory that is searched, stores its words under an
error-correcting code. The usual way to compare an incoming tag with a stored word is
to decode the stored codeword first and then compare. That puts the slow decoder in
the critical path. This design skips the decoder. It encodes the incoming tag and
measures the Hamming distance `d` between the encoded tag and the stored codeword.
With a code that corrects `t_max` errors and detects `r_max` errors, the distance
alone gives the answer:

| distance            | meaning                                                        | outputs          |
|---------------------|----------------------------------------------------------------|------------------|
| `d == 0`            | the stored word is the tag                                     | `match`, `exact` |
| `0 < d <= t_max`    | the stored word is the tag, with up to `t_max` bit errors in it | `match`          |
| `t_max < d <= r_max`| the stored word has a detectable but uncorrectable error        | `fault`          |
| `d > r_max`         | the stored word is a different word                            | `mismatch`       |

On a `fault`, the system should raise an error rather than use the comparison.

The code is systematic: a codeword is the data itself followed by parity bits. The
data part can therefore be compared with the tag at once, while the encoder is still
working. Only the parity part waits for the encoder.

The RTL is purely combinational. By default it is built for the (8,4) SEC-DED code
(`t_max = 1`, `r_max = 2`). It can be set to any extended-Hamming (n,k) code. The
(16,11), (24,18), (31,25) and (40,33) codes are tested.

## Datapath

```
 retrieved_cw[N-1:N-K] (data part)   incoming_tag[K-1:0]            retrieved_cw[N-K-1:0] (parity part)
          |                              |        |                          |
          +---------> xor_bank <---------+   sec_ded_encoder                 |
                        | K                       | N-K                      |
                        |                         +------> xor_bank <--------+
                        v                                     | N-K
               bwa "for tags"                        bwa "for parities"              1st level
               (revised, limit r_max)                (revised, limit r_max)
                  |ovf   | weight bits                 | weight bits  |ovf
                  |      +-------> interconnection <---+              |
                  |        (group bits by weight 1, 2, 4 ... <= r_max)|
                  +-----> or_gate_tree <------------------------------+
                              | q              | group 2^0 ... group 2^j           2nd level
                              |          bwa for 1's ... bwa for 2^j's
                              |                | weight bits, ovf
                              +----------> decision_unit --> match / fault / mismatch / exact
```

`ecc_match_top` wires the blocks together, and `ecc_match_pkg` holds the
elaboration-time functions that work out this wiring for any `(N, K, RMAX)`.

## The butterfly-formed weight accumulator (`bwa`)

Counting the 1s of the difference vector is the core of the design. A BWA counts
them with half adders only. Each of its output bits has a fixed power-of-two
weight, and the weighted sum of the outputs is the count.

**Stage rule.** A group of `m` bits, all of weight `w`, is paired into `floor(m/2)`
half adders: inputs `(0,1)`, `(2,3)`, ... Each half adder gives:

- a carry of weight `2w`, which goes to the carry half (the first `floor(m/2)`
  positions);
- a sum of weight `w`, which goes to the sum half (the remaining positions).

When `m` is odd, the last bit is not paired and goes to the end of the sum half. The
next stage applies the same rule to each half separately, carries with carries and
sums with sums. That is the butterfly connection. Groups shrink until they hold one
bit, which takes `ceil(log2 N)` stages. Each output is one half adder (one gate)
per stage away from the inputs.

For 8 inputs this gives three stages of four half adders. The outputs `out[0..7]`
have weights 8, 4, 4, 2, 4, 2, 2, 1:

```
count = 8*o0 + 4*(o1 + o2 + o4) + 2*(o3 + o5 + o6) + o7
```

`ecc_match_pkg::bwa_out_lw(n, lw0, idx)` gives the weight of any output position.
`ecc_match_pkg::bwa_group` gives the group a position belongs to at each stage, and
the generate loops in `bwa.sv` are built from it.

**Revised form.** The matcher only needs to know whether `d` exceeds `r_max`. Past
that point, the exact distance does not matter. A bit of weight greater than
`r_max` settles the answer on its own. So once a group's weight exceeds `LIMIT`,
the BWA stops adding it. Those bits pass unchanged to the end, where they are ORed
into the `ovf` output. Output positions of weight above `LIMIT` are driven to 0. This
saves the half adders that would only refine a count that is already too large. The
matcher uses `LIMIT = r_max` everywhere. With the default `LIMIT = 8`, a stand-alone
`bwa` is the plain 8-input accumulator.

## Two levels and the (8,4) example

The first level has one revised BWA for the tag difference (k bits) and one for the
parity difference (n-k bits). Their output bits come in several weights.

The `interconnection` collects all kept bits of weight `2^j` into group `j`. Tag bits
come first, then parity bits. The second level then has:

- one BWA per group, counting the bits of weight `2^j`;
- an `or_gate_tree` over the two first-level `ovf` flags.

The `decision_unit` adds the small weights that remain. It then applies the table
at the top, using every `ovf` flag as "beyond `r_max`".

For the (8,4) code (`r_max = 2`), the signals are as follows:

| signal | where | weight |
|--------|-------|--------|
| first-level outputs | each 4-input BWA: `out[0]`, `out[1]`, `out[2]`, `out[3]` | 4, 2, 2, 1; the weight-4 bit becomes that BWA's `ovf` |
| Q | `or_gate_tree` over the two weight-4 bits (`dut.q`) | > 2 |
| BWA for 2's | 4 inputs, `LW = 1`. Its stage-1 carries and the carry of its second half adder (weight 4) form `ovf2[1]` | > 2 |
| T | `l2_bits[1][3]`, the remaining sum | 2 |
| U, V | BWA for 1's, a single half adder: `l2_bits[0][0]` and `l2_bits[0][1]` | 2, 1 |

So `d = 2T + 2U + V` unless Q or `ovf2` is set:

- `d <= 1`: match;
- `d == 2`: fault;
- anything larger, or any overflow flag: mismatch.

This split into two levels keeps each adder tree shallow. The critical path runs
through the encoder, the parity XOR bank, the BWA for parities, the second level and
the decision unit. The tag side works meanwhile on data that needs no encoding.

## The code (`sec_ded_encoder`)

The design uses an extended Hamming code with `R = n-k-1` check bits plus one
overall parity bit.

- **Syndrome columns.** Data bit `i` gets syndrome column `hamming_col(i)`. That is
  the `i`-th integer from 3 upward that is not a power of two: 3, 5, 6, 7, 9, 10, ...
- **Check bits.** Check bit `c` is the XOR of the data bits whose column has bit `c`
  set.
- **Overall parity.** The top parity bit is the parity of all data bits and check
  bits.

The minimum distance is 4, so `t_max = 1` and `r_max = 2`. For the (8,4) code:

```
p0 = d0^d1^d3   p1 = d0^d2^d3   p2 = d1^d2^d3   p3 = ^{d3..d0, p2..p0}
codeword = {d3 d2 d1 d0, p3 p2 p1 p0}
```

The layout is `retrieved_cw = {data[K-1:0], parity[N-K-1:0]}`, with the data part
in the upper bits. The architecture itself works with any systematic code. The
choice of code, column order and bit layout belongs to this implementation. To use
another code, replace the encoder and the code's `TMAX`/`RMAX`. The rest of the
datapath is generic.

## Parameters and interface

`ecc_match_top #(N, K, TMAX, RMAX)`:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | codeword bits |
| `K` | 4 | data / tag bits |
| `TMAX` | 1 | errors the code corrects |
| `RMAX` | 2 | errors the code detects; also the BWA limit |

The encoder accepts any `K <= 2^R - R - 1`, with `R = N-K-1`, and stops elaboration
otherwise. The decision unit requires `0 < RMAX` and `TMAX <= RMAX`.

Ports:

- inputs: `retrieved_cw[N-1:0]` and `incoming_tag[K-1:0]`;
- outputs: `match`, `fault` and `mismatch`, exactly one of which is high, plus
  `exact` (`d == 0`).

There is no clock and no reset. Register the inputs and outputs outside if the
matcher is to be timed as a pipeline stage.

## How far it can be trusted

The testbenches compare the design against reference models written independently
of the RTL:

- **(8,4) top.** The top at its default (8,4) size is simulated exhaustively: all 256
  stored words against all 16 tags. The test checks:
  - every output against the distance ranges;
  - the exact number of matches (16), corrected matches (128) and faults (448);
  - that each way of reaching `mismatch` occurs: through Q, through the
    second-level overflow, and through the sum alone.
- **Table codes.** The (16,11), (24,18), (31,25) and (40,33) codes each run 2000
  random comparisons. Most of them have 0 to 6 bits flipped on purpose, so that every
  distance range occurs. The same six outcomes are required.
- **Each block alone.** Each block has its own exhaustive or random test. For each
  test, a deliberately broken copy of the block was confirmed to fail it.

For a rough comparison with published gate counts, `yosys` was used: generic
synthesis, then `abc` mapping to two-input AND/OR/XOR gates and their inversions.

| code | gates | deepest path |
|------|-------|--------------|
| (16,11) | 112 | 14 |
| (24,18) | 182 | 16 |
| (31,25) | 239 | 18 |
| (40,33) | 315 | 19 |

The depth is yosys' longest topological path. `abc` restructures the logic, so
these figures show only the order of magnitude. The gate counts are close to the
complexity reported for this architecture: 125, 192, 261 and 342 gates. The
latencies reported there are a little lower: 12, 13, 13 and 15 gates.

## Where this implementation makes its own choices

- **The code.** Only "a systematic SEC-DED code" is given for the architecture. The
  parity equations and the codeword layout are this design's own.
- **Sizes other than 8 and 4 inputs.** Only accumulators of those sizes are
  specified in detail. The rule for any size is this design's generalisation:
  pairing neighbours, with an odd bit joining the sum half. So is the rule for the
  revised form: stop adding above `r_max` and OR the rest.
- **R and S.** In the (8,4) accumulator for 2's, the OR of its two carries (R) and
  its weight-4 output (S) leave as one flag, `ovf2[1]`. Both mean mismatch, so
  nothing is lost.
- **Decision unit.** The decision unit is written as a small weighted sum compared
  with `TMAX`/`RMAX`, not as a fixed truth table, so that it works for every code.
  For (8,4) it implements the table of the code's Q..V signals.
- **The `exact` output** is an addition.

Lint reports two unused input bits of `interconnection`. They are the weight-4
positions of the first-level accumulators, which are always 0 (their bits went to
`ovf`).

## Simulating

All files are SystemVerilog 2017. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` at the end. For example:

```
verilator --binary --timing -Irtl -Itb rtl/ecc_match_pkg.sv tb/tb_ecc_match_top.sv \
    --top-module tb_ecc_match_top
./obj_dir/Vtb_ecc_match_top
```

The package must come first on the command line, and `-Irtl -Itb` lets verilator
find the other modules by name. Tests:

- `tb_ecc_match_top`: the default (8,4) matcher, exhaustive;
- `tb_ecc_match_codes` with its helper `ecc_code_check`: the four larger codes and
  (8,4) again;
- `tb_bwa`, `tb_sec_ded_encoder`, `tb_interconnection`, `tb_decision_unit`,
  `tb_or_gate_tree`, `tb_xor_bank` and `tb_half_adder`: the blocks.

Each runs in well under a second.
