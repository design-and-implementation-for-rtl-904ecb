# Layered EMS decoder for a (112,56) non-binary LDPC code over GF(64)

This is synthesizable SystemVerilog for a decoder chip core for a rate-1/2
non-binary LDPC code. The code has 112 symbols, each a GF(64) element carrying
6 bits, so a frame is 672 bits. It has 56 parity checks. Every symbol takes part in
exactly two checks and every check covers four symbols, which makes it a
(2,4)-regular code. The parity-check matrix is quasi-cyclic, built from 8×8
cyclically shifted identity matrices.

Decoding uses the Extended Min-Sum (EMS) algorithm with a layered schedule. A
message between a check and a variable is not all 64 likelihoods but only the
`n_m = 8` most likely (symbol, log-likelihood) pairs. The architecture relies
on two tricks:

* **Two output elements per cycle in the check node.** A degree-4 check is
  computed as a chain of *check elementary steps* (CES). Each CES merges two
  sorted 8-element vectors. Here each CES produces two candidates per clock
  cycle, so it needs `n_m` cycles instead of `2·n_m` (section
  [The double-throughput L-bubble check step](#the-double-throughput-l-bubble-check-step)).
* **Degree-2 variable nodes.** A degree-2 variable node sends to one check
  exactly what it received from the other check, plus its channel
  information. So only one message per variable is stored. The variable node
  update becomes a single pass over the incoming vector, topped up with a few
  of the best channel symbols.

The default parameters are those of the published decoder: `n_m = 8`, sorter
size `n_s = 5`, 7-bit message likelihoods, 6-bit binary channel LLRs, seven
processing elements and at most 10 iterations.

## The code

`H` is a 7 × 14 array of 8×8 blocks. Each block row holds four circulants,
two in block columns 0–6 and two in 7–13. Each block column holds two. The
table gives, for every block row `b`, the block columns and cyclic shifts
(`nb_pkg::H_COL`, `nb_pkg::H_SHIFT`). Check `k` of block row `b` (0 ≤ k < 8)
connects to variable `8·col + (k + shift) mod 8`.

| block row | block columns  | shifts     |
|-----------|----------------|------------|
| 0         | 3, 6, 10, 11   | 5, 0, 0, 1 |
| 1         | 2, 6, 9, 12    | 4, 4, 4, 5 |
| 2         | 1, 5, 9, 13    | 7, 7, 7, 0 |
| 3         | 2, 5, 8, 13    | 0, 1, 6, 6 |
| 4         | 0, 4, 8, 12    | 2, 1, 1, 2 |
| 5         | 0, 3, 7, 11    | 4, 7, 7, 7 |
| 6         | 1, 4, 7, 10    | 1, 6, 3, 3 |

The code comes from a binary quasi-cyclic LDPC code whose ones are replaced
by random non-zero GF(64) values. The published design does not list those
values. This RTL uses a fixed rule instead:
`h(b,k,e) = α^((11b + 5k + 17e + 3) mod 63)`, where `e` is the edge index
0..3 within the check. GF(64) is built with the primitive polynomial
`x^6 + x + 1`. Both choices live only in `nb_pkg.sv`. Another code of the
same shape needs changes there alone.

In every block column, the two circulants have different shifts. So the
eight checks `k` of the seven block rows never share a variable:

* check `k` of block row `b` meets check `k` of block row `b'` only if
  their shifts in the shared column are equal;
* the shifts in each shared column differ, so the two checks share nothing.

This is what lets seven processing elements work at once on a **group**: row
`k` of every block row.

## Number formats

A message element is the packed struct `elem_t`:

| field | bits | meaning |
|-------|------|---------|
| `vld` | 1 | the element exists |
| `sym` | 6 | GF(64) symbol |
| `llr` | 7 | log-likelihood, signed |

* **Likelihood values.** Larger is more likely. Every stored vector is
  normalised so its best element is 0 and the others are negative. Sums
  saturate at −64.
* **Vector order.** A vector holds `n_m` elements, sorted from most to least
  likely.
* **Channel input.** The input is six binary LLRs of 6 bits each, one per
  symbol bit, in the form log P(0)/P(1).
* **Channel likelihood of a symbol.** Take the sum of −|λᵢ| over the bits
  where the symbol disagrees with the sign of λᵢ. This is exact up to a
  constant, and 0 for the bit-wise hard decision. `nb_cvc` computes it.

## Data flow

```
 binary LLRs ──► LLR generator ──► input buffer ──► decoder ──► decoded symbols
 (1 variable)    (8 best symbols)   (one frame)     (7 PEs,       (112 × 6 bit)
                                                     V2C memory,
                                                     channel memory,
                                                     syndrome check)
```

`nbldpc_top` accepts one variable (six binary LLRs) per `in_vld`/`in_rdy`
handshake, in variable order.

* **LLR generator** (`nb_llr_gen`). Turns each variable into its `n_m` most
  likely symbols.
* **Input buffer** (`nb_input_buffer`). Collects a whole frame. When the
  frame is complete and the decoder is idle, the decoder takes it over in one
  cycle. The buffer is then free for the next frame, so loading overlaps with
  decoding.
* **Output.** `done` pulses with the decoded symbols on `dec_out`, the
  iterations used on `iters`, and whether all checks hold on `converged`.

## The decoder and its schedule

`nb_decoder` holds:

* the **V2C memory** (`nb_v2c_mem`): one 8-element vector per variable;
* the **channel memory** (`nb_llrcv_mem`): per variable, the six binary LLRs
  plus the five most likely channel symbols;
* **seven processing elements** (`nb_pe`), one per block row;
* the **syndrome checker** (`nb_syndrome`).

The steps of decoding are:

1. **Load.** When decoding starts, the initial sorted channel lists become
   the V2C messages. The hard decisions start as the best channel symbol.
2. **Process a group.** For each group `k = 0..7`:
   1. read the 28 V2C vectors and channel words of the group;
   2. start all seven PEs;
   3. wait for them;
   4. write back 28 new V2C vectors and 28 decisions.
3. **Check the syndrome.** After eight groups (one iteration), check all
   56 checks.

Decoding stops when every check holds (early termination) or after
`MAX_ITER` iterations.

This is a layered schedule: a group already uses the messages that earlier
groups of the same iteration produced. Only one V2C vector is stored per
variable. It always holds the message towards that variable's other check:

1. When a check updates a variable, the variable's new outgoing message
   comes from this update's C2V message plus the channel.
2. That message is exactly what the variable's other check needs next.

Groups run strictly one after another. A group reads only after the previous
group has written back, so reads never collide with pending writes.

## Processing element: forward–backward check node

A degree-4 check with incoming vectors `V0..V3` must produce, for each edge,
the combination of the other three. `nb_pe` works in four steps:

1. **Permute.** Multiply every incoming symbol by its edge coefficient `h`
   (`nb_gf_mul`).
2. **First-stage CES.** Run two CESs in parallel: `I01 = V0 ⊕ V1` and
   `I23 = V2 ⊕ V3`.
3. **Second-stage CES.** Feed four *function units* (`nb_fu`):
   * edge 0 gets `V1 ⊕ I23`;
   * edge 1 gets `V0 ⊕ I23`;
   * edge 2 gets `I01 ⊕ V3`;
   * edge 3 gets `I01 ⊕ V2`.
4. **Finish in each function unit.** Multiply the result by `h⁻¹` and update
   the variable.

Here `⊕` combines symbols with GF addition and adds their likelihoods.

A function unit chains a second-stage CES, a small internal buffer
(`nb_ibuf`), an inverse-permutation multiplier, a variable node unit
(`nb_vnu`) and a decision unit (`nb_decision`). The variable node update
starts as soon as the CES emits its first elements. It does not wait for the
CES to finish.

## The double-throughput L-bubble check step

This is the densest part of the design (`nb_ces.sv`).

**What a CES computes.** It combines sorted inputs `I1` and `I2` of `n_m`
elements each.

* Candidate `M[i][j]` has symbol `I1[i].sym ⊕ I2[j].sym` and likelihood
  `I1[i].llr + I2[j].llr`.
* The output takes the `n_m` best candidates with distinct symbols.
* Because the inputs are sorted, `M` decreases along rows and along columns.

**Sorter.** A small sorter of `n_s = 5` entries holds the current frontier.
It starts with `M[0..3][0]` and `M[0][1]`.

**Each cycle:**

1. The **two** best sorter entries are popped.
2. Each popped entry is dropped if its symbol is already in the output, or if
   both pops carry the same symbol (the redundancy check). Otherwise it is
   inserted into the output in likelihood order. Two pops of one cycle are not
   always in global order, which is why the output uses ordered insertion.
3. Two new candidates replace the two pops. Where they come from depends on
   which region the pops came from.

The candidate map has two regions:

* **Region a**: row 0, plus column 0 from row `n_s−2` down. It is treated as
  one merged stream with two pointers: the next unused column of row 0 and
  the next unused row of column 0. The four heads `x, y` (row 0) and `m, n`
  (column 0) are compared. The best two become the region-a candidates.
* **Region b**: everything else is covered by fixed L-shaped paths. Bubble
  `k` (1 ≤ k ≤ n_s−3) starts at `M[k][0]` and moves right while
  `r + c < n_s − 2`, then down. The successor of a popped region-b entry is
  the next cell of its path.

How the two new candidates are chosen:

| popped entries | new candidates |
|----------------|----------------|
| both from region a | the two region-a candidates |
| one from region a | one region-a candidate, plus the path successor of the other pop |
| both from region b | their two path successors |

**Timing.** The step runs at most `T = n_m` cycles after a one-cycle
initialisation, or stops as soon as the output is full. Latency from `start`
to `done` is at most `n_m + 2` cycles. Every newly accepted element is also
sent out on `s_push/s_elem`.

**Accuracy.** Like any bubble check, this is an approximation of the exact
EMS step. Against an exhaustive top-8 search on random inputs, 2366 of 2400
output vectors are identical.

### Internal buffer and variable node unit

The CES can emit two new elements per cycle, but the variable node unit takes
one. `nb_ibuf` handles the cases:

| new elements this cycle | what happens |
|-------------------------|--------------|
| two | one goes to the variable node unit, the other is buffered |
| one | it goes on directly |
| none | the buffer supplies the element |

The buffer is four deep.

`nb_vnu` builds the new V2C vector for a degree-2 variable:

* **Stream pass.** For every C2V element, its likelihood is added to the
  channel likelihood of that symbol. `nb_cvc` recomputes that likelihood from
  the stored binary LLRs, so no 64-entry channel vector is stored.
* **Channel top-up.** The five best channel symbols that did not appear in the
  C2V vector are then added with a fixed penalty `GAMMA` (−24). This is the
  value a missing C2V element is assumed to have.
* **Result.** The best `n_m` candidates are kept sorted and normalised so the
  best is 0. The unit takes `n_m + 5` element slots.

`nb_decision` runs alongside the variable node unit. It adds each new C2V
element to the matching element of the old stored V2C vector, which already
contains the other C2V message and the channel. A symbol missing from the
stored vector gets `GAMMA`. The decision is the best such sum.

## Timing and throughput

| operation | cycles (measured in simulation) |
|-----------|---------------------------------|
| check step | ≤ `n_m + 2` = 10 |
| function unit | ≤ `n_m + NC + 8` = 21 |
| processing element | ≤ `2·n_m + NC + 12` = 33 |
| one group, including memory read and write | ≤ 32 |
| one iteration | ≈ 8 × 32 + syndrome ≈ 252 |
| LLR generator, per variable | 65 |
| loading one frame | ≈ 7,300 |

At the published 277 MHz and 10 iterations, one iteration taking about 252
cycles gives roughly 74 Mb/s. At low noise most frames stop after one or two
iterations, so decoding is much faster. Then the simple LLR generator becomes
the bottleneck.

## Where this RTL departs from the published decoder

* **Overlapped groups and the bypass path.** The published decoder overlaps
  the processing of successive groups. It adds a bypass path from the output
  buffers to the PE inputs for V2C messages still being computed. Here groups
  do not overlap, so no bypass is needed, and an iteration takes about 252
  cycles instead of the ≈149 that the published 124.6 Mb/s at 277 MHz
  implies.
* **LLR generator.** The published chip uses a systolic LLR generator. This
  one sweeps all 64 symbols in 64 cycles and inserts them into a sorted list.
  The result is the same, but it is slower.
* **Memories.** The V2C and channel memories are multi-ported flip-flop
  arrays (28 ports), not banked SRAM. This gives about 61 K flip-flop bits
  after generic synthesis, against 42 K memory bits published.
* **Matrix values.** The GF(64) coefficients and the primitive polynomial are
  this design's own choices (see [The code](#the-code)).
* **Details not specified by the published design.** The following were
  chosen here:
  * `GAMMA = −24`;
  * the exact L paths of region b;
  * the depth of the internal buffer;
  * the order of groups;
  * all handshakes.
* **Test modes.** The chip's test modes are not included: the input-buffer
  test, the single-PE test, and the single-PE test driven by a random number
  generator.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NM` | 8 | top, decoder, PE, FU, CES, VNU, ... | elements per message vector (`n_m`) |
| `NS` | 5 | top → CES | sorter size (`n_s`) |
| `NC` | 5 | top → VNU, channel memory | channel symbols kept per variable |
| `GAMMA` | −24 | decoder → VNU, decision | likelihood of a symbol missing from a vector |
| `MAX_ITER` | 10 | top, decoder | iteration limit |
| `LLR_W`, `BLLR_W` | 7, 6 | `nb_pkg` | message and binary LLR widths |

The code's geometry (`R`, `BROWS`, `BCOLS`, `H_COL`, `H_SHIFT`, coefficient
rule) is in `nb_pkg.sv`. Only `NM = 8` has been simulated. The RTL accepts
other values, for example `NM = 32` with a larger `NS`.

## Files

| file | contents |
|------|----------|
| `rtl/nb_pkg.sv` | types, code tables, GF arithmetic, saturating adds |
| `rtl/nbldpc_top.sv` | LLR generator + input buffer + decoder |
| `rtl/nb_decoder.sv` | layered schedule, memories, PEs, syndrome check |
| `rtl/nb_pe.sv` | processing element (permutation, two-stage CES) |
| `rtl/nb_fu.sv` | function unit: second-stage CES, buffer, inverse permutation, VNU, decision |
| `rtl/nb_ces.sv` | double-throughput L-bubble check step |
| `rtl/nb_ibuf.sv` | internal buffer |
| `rtl/nb_vnu.sv` | degree-2 variable node unit |
| `rtl/nb_cvc.sv` | channel likelihood of a symbol from binary LLRs |
| `rtl/nb_decision.sv` | posterior and hard decision |
| `rtl/nb_gf_mul.sv` | GF(64) multiplier |
| `rtl/nb_v2c_mem.sv`, `rtl/nb_llrcv_mem.sv` | V2C and channel memories |
| `rtl/nb_syndrome.sv` | parity check of the decisions |
| `rtl/nb_llr_gen.sv` | LLR generator |
| `rtl/nb_input_buffer.sv` | frame buffer between generator and decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/nb_pkg.sv tb/tb_nbldpc_top.sv \
          --top-module tb_nbldpc_top -Mdir obj_top
./obj_top/Vtb_nbldpc_top
```

Replace the testbench and top-module name for any other block.
`tb_nbldpc_top` runs the whole core at its default size. It takes about 80 s
to compile and a second to run.

It sends six frames of the all-zero codeword over a simulated BPSK/AWGN
channel, back to back, at noise levels from almost none to very heavy. It
checks:

* ordered output;
* correct codewords;
* early termination on clean frames;
* the iteration limit on the heavy frame;
* the per-group cycle bound.

It also counts that every mechanism occurs:

* early stop and the iteration limit;
* a frame loaded during decoding;
* redundant symbols dropped;
* two elements buffered at once;
* the variable node unit fed from the buffer;
* channel symbols added.

In the last run, the three moderately noisy frames had 22–29 wrong channel
symbols out of 112. All were corrected in two iterations.

The block testbenches check against independent references:

| testbench | reference |
|-----------|-----------|
| check step | exhaustive EMS search, plus ordering and exactness tests |
| GF multiplier | all 4096 products, against log tables |
| variable node unit | a full 64-entry computation |
| decoder | random error patterns |

Each also checks the block's cycle count.
