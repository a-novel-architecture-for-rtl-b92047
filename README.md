# Matching ECC-protected data without decoding it, plus a small LDPC toolkit

When a memory such as a cache tag array stores its entries as ECC codewords, a
lookup usually has to read the codeword, decode and correct it, and only then
compare it with the incoming tag. Decoding sits in the critical path. The
*direct compare* approach avoids that. It encodes the incoming tag and
compares the two codewords. The entry matches if the stored codeword lies
within the code's correctable Hamming distance of the encoded incoming tag.
Then the stored copy is the same tag, perhaps with a few correctable bit
errors.

This RTL implements that matching unit for a systematic (8,4) code. It adds
two ideas:

* **Systematic split.** The tag bits of a systematic codeword need no
  encoding. The tag half of the comparison therefore starts at once, and only
  the check half waits for the encoder.
* **Butterfly-formed weight accumulators (BWAs).** These count the differing
  bits using half adders only. They produce a set of bits with fixed weights
  (4, 2, 1) instead of a binary number. Once the distance is known to be
  beyond the correctable range, its exact value is no longer needed, so the
  counter's final stages are OR gates instead of adders.

Next to the matcher sits a set of LDPC coding blocks for a small regular
code of length 12:

* an encoder;
* a hard-decision bit-flipping decoder;
* a soft sum-product decoder that reproduces a published worked example;
* the accumulator that forms the constituent code of repeat-accumulate LDPC
  encoders.

The LDPC blocks share no signals with the matcher. They stand beside it in
the top level.

## The matching datapath

```
 in_tag[3:0] ──┬───────────────────────────────┐
               │                               │ (tag half: no encoder delay)
               └─► dmc_encoder ─► in_par[3:0]  │
                                     │         │
 stored_cw[7:4] (check bits) ──► XOR ▼   XOR ◄─┘◄── stored_cw[3:0] (tag bits)
                                 │ 4 bits  │ 4 bits
                          bwa4 "parities"  bwa4 "tags"
                          (w4,w2a,w2b,w1)  (w4,w2a,w2b,w1)
                                 └──► bwa_second_level ◄──┘
                                   Q  R S T  U V
                                        │
                                  decision_unit ──► match
```

### The code: a 4-bit decimal matrix code (DMC)

The 4-bit word is arranged *logically* as two 2-bit symbols in a 2×2 matrix.
The check bits are row and column parities:

```
  i1  i0 | H0        H0 = i1 ^ i0     V0 = i0 ^ i2
  i3  i2 | H1        H1 = i3 ^ i2     V1 = i1 ^ i3
  V1  V0
```

Codeword layout is `{V1, V0, H1, H0, i3, i2, i1, i0}`, with the tag in bits
3:0. The code has minimum distance 3 and corrects one error. The matcher
therefore declares a match at distance 0 or 1 (`TMAX = 1`).

### How the BWA counts

A half adder takes two bits of weight *w*. It returns a sum of weight *w* and
a carry of weight *2w*, so no information is lost. The first-level BWA
(`bwa4`, used once for the tag half and once for the check half) has two rows
of two half adders:

* **Row 1** adds the input pairs. Each half adder gives a (2, 1) pair.
* **Row 2**, the butterfly, crosses the wires: both weight-2 carries meet in
  one half adder and both weight-1 sums in the other. The outputs have
  weights 4, 2 | 2, 1.

The result is exact: `4·w4 + 2·w2a + 2·w2b + w1` equals the number of ones.

The second level regroups the eight outputs by weight:

| inputs | unit | outputs |
|---|---|---|
| two weight-4 bits | OR-gate tree | **Q** (≥ 4) |
| four weight-2 bits | BWA for 2's: two half adders; their weight-4 carries are OR-ed, their sums go to a third half adder | **R** (≥ 4, OR-ed), **S** (4), **T** (2) |
| two weight-1 bits | BWA for 1's: one half adder | **U** (2), **V** (1) |

The Hamming distance *D* between the codewords is then:

* **Q, R or S set:** *D* ≥ 4. The exact value is lost, and it does not
  matter.
* **Otherwise:** *D* = 2T + 2U + V exactly, from 0 to 5.

The decision unit computes `match = !(Q|R|S) && (2T+2U+V <= TMAX)`. It also
brings out `dist_low` (2T+2U+V) and `dist_far` (Q|R|S) for observation.

The whole matcher is combinational. Counting from the XOR outputs, its depth
is an XOR, two half adders, one half adder or an OR, and a small comparison.
Encoder delay adds to the check half only.

## The n = 12 LDPC code

The code has twelve symbols c1..c12 and nine parity equations, each the XOR
of four symbols. Every symbol appears in exactly three equations, so the code
is regular:

```
 1: c3 c6 c7 c8      4: c2 c6 c7 c10     7: c1 c4 c5 c7
 2: c1 c2 c5 c12     5: c1 c3 c8 c11     8: c6 c8 c11 c12
 3: c4 c9 c10 c11    6: c4 c5 c9 c12     9: c2 c3 c9 c10
```

The equations have rank 7, so the code has 32 codewords, including the
all-ones word. `ldpc12_pkg` holds them as bit masks (`H_ROWS`), as symbol
lists (`EQ_BITS`) and as the three edges of each symbol (`BIT_EDGES`). Edge
`4m+j` joins equation m to its j-th symbol. In every word, bit k-1 is
symbol c_k.

* **`ldpc12_syndrome`**: the nine parity nodes as XOR trees.
* **`ldpc12_encoder`**: places five message bits on c1..c5 and solves the
  equations for c6..c12. The resulting XOR expressions are listed in the
  file. Which five positions carry the message is a choice; any independent
  five would do.
* **`ldpc12_bitflip_decoder`**: the hard-decision decoder. Each clock it
  evaluates the equations, counts the failing equations of every bit, and
  flips the bits with the largest count. It stops on an all-zero syndrome
  (`ok=1`) or after `MAX_ITER` (8) flips (`ok=0`). `done` rises `iters + 1`
  edges after the edge that samples `start`. Any single error is always
  corrected: the erroneous bit fails all three of its equations and every
  other bit fails at most two (no two symbols share more than two
  equations).
* **`ldpc12_sp_decoder`**: soft message passing on probabilities
  Pr[c = 1], in unsigned fixed point with `PW = 16` fraction bits.
  - **Parity node:** sends each bit the probability that the other three
    bits have odd parity, (1 − Π(1 − 2p)) / 2.
  - **Bit node:** sends each equation the combination of its channel value
    with the replies of its two other equations,
    comb(x, y) = xy / (xy + (1−x)(1−y)).
  - **Posterior:** combines all three replies with the channel value.

  One shared check unit processes one parity node per clock (9 cycles). One
  shared bit unit, containing the dividers, processes one bit node per clock
  (12 cycles). This gives a flooding schedule of 21 cycles per iteration.
  Latency is `2 + 21·ITERS` edges from `start` to `done`, which is 44 for
  the default `ITERS = 2`.
* **`ldpc_accumulator`**: the constituent code of repeat-accumulate
  encoders. It is an XOR with a one-bit register in its feedback loop, so the
  register holds the running parity of the bits routed to it. `clear` loads
  `chain_in`, which lets one accumulator's parity seed the next. The top
  chains `NACC = 4` of them this way.

### The worked example

The channel gives Pr[c=1] = 0.9 0.5 0.4 0.3 0.9 0.9 0.9 0.9 0.9 0.9 0.9 0.9.
Relative to the all-ones codeword, c2..c4 are unreliable or wrong.

* **Soft decoder:** its first replies to c1 are 0.500, 0.436 and 0.372, and
  its next messages from c1 are 0.805, 0.842 and 0.874. These match the
  published values to within 0.001. After two iterations the posteriors are
  all above 0.87 and the word decodes to all ones.
* **Bit-flipping decoder:** given the hard decisions of the same input
  (three errors), it converges to a *different* codeword. The top-level test
  uses this case to show the soft decoder doing what the hard one cannot.

## Top level (`ecc_match_top`)

`ecc_match_top` holds the five parts side by side, each with its own ports:

| part | ports |
|---|---|
| matcher | `in_tag`, `stored_cw`, `match`, `weights`, `dist_low`, `dist_far` |
| LDPC encoder | `enc_msg`, `enc_cw` |
| bit-flipping decoder | `dec_*` |
| sum-product decoder | `sp_*` |
| accumulator chain | `acc_clear`, `acc_valid`, `acc_d`, `acc_p` (one bit per accumulator) |

Parameters: `NACC = 4`, `MAX_ITER = 8`, `PW = 16`, `SP_ITERS = 2`.

* **Clock and reset:** all sequential logic uses `clk` and the asynchronous
  active-low `rst_n`.
* **`stored_cw`:** comes from a tag array, which is not part of this design.
* **Constant output bits:** `enc_cw[4:0]` are the message bits passed
  straight through, as the code is systematic.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a cycle watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ecc_match_pkg.sv rtl/ldpc12_pkg.sv tb/tb_ecc_match_top.sv \
    --top-module tb_ecc_match_top && ./obj_dir/Vtb_ecc_match_top
```

Replace the testbench name to run any other.

| testbench | what it establishes |
|---|---|
| `tb_ecc_match_top` | End to end at default parameters. It counts every mechanism: exact match, single-error match, near miss, Q/R/S flags, zero-iteration decode, flip decode, give-up, soft decode beating hard decode, chained parity. A mechanism that never occurs is a failure. |
| `tb_ecc_matcher` | All 16 × 256 tag/stored pairs against `$countones` of an independently encoded tag. |
| `tb_bwa4`, `tb_bwa_twos`, `tb_bwa_ones`, `tb_bwa_second_level`, `tb_decision_unit` | Exhaustive checks of the weighted-sum invariants. |
| `tb_dmc_encoder`, `tb_xor_bank` | Check bits against the matrix layout; the code's minimum distance (3); the XOR bank bit by bit. |
| `tb_ldpc12_syndrome`, `tb_ldpc12_encoder` | All 4096 words; all 32 messages. |
| `tb_ldpc12_bitflip_decoder` | Against a reference model: every codeword and every single-error word, the worked example, random words. Checks latency. |
| `tb_ldpc12_sp_decoder` | Against a floating-point model, message by message, and against the published values. Checks latency. |
| `tb_ldpc_accumulator` | Random frames with gaps, and chaining. |

## Where this RTL makes its own choices

These choices are not fixed by the design's description. Change them freely.

* **Correctable range.** `TMAX = 1` follows from the DMC code's distance
  of 3. The decision unit supports `TMAX` from 0 to 3.
* **DMC check bits.** They are plain XORs of each row's symbol and each
  column. A "decimal" (integer-sum) variant of DMC exists for wider words,
  but with one 2-bit symbol and one check bit per row it reduces to parity
  here.
* **Wiring details.** The pairing of inputs inside each BWA, and the
  bit-to-half-adder assignment in the BWA for 2's, are arbitrary. The
  weighted sums do not depend on them.
* **Bit-flipping decoder.** The flipping rule, the iteration limit and the
  handshake are choices.
* **Sum-product decoder.** The fixed-point format, the fixed iteration count
  (no early stop), the serial node scheduling and the handshake are choices.
  A fully parallel version would replicate the node units.
* **Accumulators.** The number of accumulators and the clear/valid handshake
  are choices.

## What is not here

* **Repeat-and-distribute network of a large LDPC encoder.** For example,
  the DVB-S2 rate-2/3 code with N = 64800, K = 43200 and M = 21600. Its
  connection table is not available, so only its accumulators are provided.
* **The 3-bit to 7-bit codec.** It is known only from one codeword
  (101 → 1010011) and two decoder samples. These do not determine the code.
* **The memory array that holds the codewords.**
