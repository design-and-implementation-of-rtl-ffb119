# A 2-bit soft-input (9153,8256) LDPC decoder for NAND flash

NAND flash gets less reliable with every process shrink and every extra bit
per cell. Algebraic BCH codes deal with that only by spending more spare area
on parity, and they gain little when the flash supplies soft information.
This decoder is built for a rate-0.9 quasi-cyclic LDPC code. It takes just
two bits per cell read: the usual hard read plus one extra read voltage that
marks the bits lying close to the decision threshold. One codeword carries
8256 data bits, so a 1024-byte page sector fits with room to spare.

The main difficulty of a high-rate LDPC code is its row degree: each parity
check here covers 81 bits. A fully parallel check node needs an 81-input
sorter and a routing network that ties every check to every bit it covers.
The decoder avoids both with *variable-node-centric sequential scheduling*
(VSS):

* The 9153 bits are split into 27 groups of 339.
* The 339 variable node units (VNUs) serve one group per clock.
* All 904 check node units (CNUs) see, in that clock, only the 3 edges of
  each check that fall into that group.
* Each CNU keeps a running summary of the rest of its row.

With the default parameters a codeword takes 27 + 27·10 = 297 clock cycles:
one initialization pass, then 10 iterations. That is 8256 bits per 297 cycles,
or 2.78 Gb/s at 100 MHz.

## The code

The parity-check matrix H is an 8 × 81 array of 113 × 113 circulants. Block
(i, j) is the identity matrix cyclically shifted by

    S(i,j) = (j + (j+1)·i) mod 113,      0 ≤ i < 8, 0 ≤ j < 81

This is the permutation-matrix construction. Because 113 is prime, no two
columns share two rows, so H has no 4-cycles. Every bit lies in 8 checks and
every check covers 81 bits: exactly one bit in each block column. H has
904 rows of which 897 are independent, so k = 9153 − 897 = 8256.

In this RTL, row r of a circulant with shift s has its one in column
(r + s) mod 113. The shift function is `ldpc_pkg::circ_shift`.

A useful consequence: each check has exactly one one in every block column.
So any word whose ones fill an even number of whole block columns is a
codeword. The testbenches use this to build non-zero codewords without an
encoder.

## Message format and quantization

| quantity | format |
|---|---|
| soft input `ch` | 2 bits: `ch[1]` = hard decision (1 = data '1'), `ch[0]` = 1 if the read value lies outside ±f around zero (reliable) |
| channel LLR | ±1.75 (reliable) or ±0.5 (unreliable), i.e. ±7 or ±2 in units of 0.25; negative for data '1' |
| CNU ↔ VNU messages | 4 bits. Two's complement in the VNU (2 integer, 2 fraction bits); sign + 3-bit magnitude (`msg_t`) on the wires and in the CNU |
| check-to-variable magnitude | min-sum minimum × 0.5 (normalized min-sum), halved by a right shift |

The levels (threshold f = 0.35, V_min = 0.5, V_max = 1.75) are the
best-performing quantization of the original study. The 2-bit code on `ch` is
this design's own choice.

## One decoding cycle

In the cycle that serves group g, everything below is combinational between
two clock edges. No variable-to-check message is ever stored.

1. Each CNU sends a message to each of its 3 edges in group g. The
   magnitude is half its best minimum over the *other* groups. The sign is
   the XOR of the latest signs of its other 80 edges.
2. Each VNU adds its channel LLR and its 8 incoming messages; the sum is at
   most 9 terms and fits an 8-bit adder.
   * It sends back `total − own message` to each check, saturated to ±7.
   * `total < 0` is its hard decision.
3. Each CNU absorbs the 3 new messages of group g into its summary and
   stores their signs.
4. The shifting network rotates the CNU states, and all registers load.

During the 27 initialization cycles the VNUs ignore the check messages and
send the bare channel LLR. This fills every CNU summary before the first
iteration. Within an iteration, a check sees the current-iteration values of
groups before g and the previous-iteration values of groups after g. That is
the sequential, "shuffled" flavour of belief propagation, and it converges
faster than flooding.

## The check node: a sorter without a second minimum (`cnu`)

A min-sum check node normally keeps the smallest and second-smallest input
magnitude and the index of the smallest. Under VSS a conventional
accumulative sorter also keeps both minima of every group, which costs 26 + 26
registers per check. This CNU keeps only two 3-bit magnitudes, each tagged
with the 5-bit group it came from:

* `gmin/gidx` — the global first minimum over the latest values of the row;
* `lmin/lidx` — a "local" minimum from a different group, used as a cheap
  stand-in for the second minimum.

Together with the 81 sign bits, that is 97 bits per check and 87,688 bits for
all 904 checks. The 904 · 97 figure is what the original register count
reports.

When the CNU serves group g:

* **Outgoing magnitude.** If `gidx ≠ g`, the global minimum comes from
  another group and is sent.
* **Stale minimum.** If `gidx = g`, the global minimum is one of the values
  now being replaced, so the local minimum is sent instead. The local
  minimum also takes over as the base for the update, and the local register
  is emptied. A local minimum that itself came from group g is likewise
  dropped.
* **Update.** The minimum of the 3 new magnitudes is compared with the
  surviving base minimum. The smaller becomes `gmin` tagged with its group.
  The larger competes with the local register for `lmin`.

"Empty" is magnitude 7 with group index 31. The exact merge rule is this
design's own reading: the original describes the sorter by an example and its
rules, not by equations.

The approximation does lose information. When the minimum edge's own group
is served, every edge of that group gets the local minimum, even where a true
second minimum would differ. The original study measures about 0.1 dB of loss
for this, in exchange for a far smaller check node.

A CNU does not hold its own register input. Its updated state leaves on `upd`
and the register loads `nxt`, which the shifting network takes from a
neighbouring CNU.

## Fixed wiring through rotating check states (`shift_network`)

Group g contains block columns 3g, 3g+1 and 3g+2, and bit t of block column
j meets row (t − S(i,j)) mod 113 of row block i. From one group to the next,
S(i,j) grows by the constant D_i = 3(i+1) mod 113. So instead of routing
messages, the decoder moves the check *states*:

* After every cycle, the 113 CNU states of row block i rotate by D_i
  positions.
* At group g, physical CNU q of block i then holds logical row
  (q − g·D_i) mod 113.
* VNU (c, t) (block column c of the group, position t) is therefore always
  wired to CNU (i, (t − S(i,c)) mod 113), with no multiplexers at all.

27 regular rotations would leave the rows displaced by 81·D_i mod 113 ≠ 0. The
rotation after the last group of an iteration therefore uses −26·D_i mod 113
instead, which returns every row to its home CNU for group 0. The shifting
network is one 2:1 multiplexer per state bit.

## The variable node (`vnu`)

One VNU serves the same bit position t of block column c in every group. It
keeps the 27 two-bit channel values of its bits, which are written during
initialization. Each cycle it converts the 8 incoming sign-magnitude messages
to two's complement, adds them to the LLR, and forms the 8 extrinsic sums. It
then saturates those sums and converts them back. 339 VNUs cover a group.

## Interface and timing (`ldpc_decoder`, `decoder_ctrl`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ch_valid` | in | 1 | `ch_in` holds the next group of soft values |
| `ch_in` | in | 339 × 2 | group g: code bits g·339 + k, with k = c·113 + t |
| `in_ready` | out | 1 | decoder is initializing and accepts a group |
| `out_valid` | out | 1 | `out_bits` holds final hard decisions |
| `out_grp` | out | 5 | group being served |
| `out_bits` | out | 339 | hard decisions of `out_grp`, same bit order as `ch_in` |
| `done` | out | 1 | last output group of the codeword |
| `busy`, `iter` | out | 1, 4 | codeword in progress; current iteration |

* **Input.** A codeword enters during its 27 initialization cycles, one group
  per cycle, whenever `ch_valid && in_ready`. A cycle without `ch_valid`
  stalls the whole decoder. The first group may be offered while the decoder
  is idle; that cycle also clears the CNUs.
* **Decoding.** The 10 iterations run without stalls.
* **Output.** During the last iteration the hard decisions come out one group
  per cycle, with `done` on group 26.
* **Back to back.** A new codeword can start in the cycle after `done`, so
  codewords follow each other every 297 cycles.
* **Critical path.** The loop CNU → VNU → CNU update → rotation closes within
  one clock.

The handshake, the stall and the output strobes are this design's own.
Loading each group during its initialization cycle is what makes the
297-cycle rate possible.

## Parameters

All defaults are the original numbers. The top (`ldpc_decoder`) takes:

| parameter | default | meaning |
|---|---|---|
| `P` | 113 | circulant size (must be prime, ≥ DC and DV for no 4-cycles) |
| `DC` | 81 | row degree = block columns |
| `DV` | 8 | column degree = block rows |
| `G` | 27 | groups; `DC/G` block columns per group |
| `ITERS` | 10 | iterations |

A smaller code of the same construction (for example P = 13, DC = 9, DV = 3,
G = 3) can be built from the same RTL, and the short testbench uses one.
The whole design synthesizes to about 106 k flip-flops: 87,688 in the CNUs,
18,306 in the VNU channel registers, plus the controller.

## Where this design departs from, or adds to, the original description

* **Interface and loading.** The original does not say how soft inputs
  enter or how decisions leave; the handshake above is this design's own.
* **Sorter merge rule.** The rule for the two-register sorter (sort new
  minimum against the surviving minimum, larger one competes for the local
  register, drop a stale local minimum) is an interpretation of the described
  behaviour.
* **Rounding.** The 0.5 normalization rounds down.
* **Wrap-around rotation.** The rotation at the end of each iteration is
  needed for the fixed wiring to hold across iterations. The original states
  only the constant per-group shift.
* **No early termination.** There is no syndrome check or early stop; every
  codeword gets all 10 iterations. The original mentions early termination
  only as a possible improvement.
* **Decoder only.** No encoder is included, and nothing of the flash array
  or its soft read.
* **Unchecked figures.** Gate count, area, power and clock frequency (about
  1100 k gates, 4.82 mm², 437 mW, 100 MHz in 90 nm) were not reproduced.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

* `tb/ldpc_ref_pkg.sv` — a cycle-level reference model of the decoder. It
  addresses H directly by logical row and computes every edge from S(i,j),
  so it shares neither the fixed wiring nor the rotation with the RTL.
* `tb_ldpc_decoder` — 40 codewords on the small P = 13 code:
  * random stalls and back-to-back words;
  * outputs compared bit for bit with the model;
  * lightly corrupted words must decode;
  * done must come exactly 3·(4+1) − 1 cycles (plus stalls) after the first
    group.
  It counts stalls, back-to-back starts, stale-minimum replacements and
  corrected words, and fails if any of them never happens.
* `tb_ldpc_decoder_full` — the same test at the default size, on four
  codewords with about 0.2 % unreliable errors, some also with reliable
  errors. It checks the 297-cycle latency and the bit-exact match with the
  model, and all four words decode.
* `tb_ldpc_awgn` — the full-size decoder on the channel used to choose the
  quantization: BPSK over additive white Gaussian noise, with received
  values quantized to 2 bits at thresholds −0.35, 0, +0.35. It decodes four
  words at each of three Eb/N0 points:

  | Eb/N0 | raw BER | decoded BER |
  |---|---|---|
  | 4.0 dB | 1.7e-2 | 1.8e-2 |
  | 5.0 dB | 8.1e-3 | 0 |
  | 5.5 dB | 5.7e-3 | 0 |

  At 4.0 dB the code is below its waterfall: decoding fails and can even
  add a few errors. The test requires error-free words at 5.5 dB and the
  297-cycle latency for every word. Four words per point is a smoke test,
  not a BER measurement.
* `tb_code_construction` — checks the shift table of the default code:
  * there are no 4-cycles among all pairs of block rows and block columns;
  * the first block row holds shifts 0..80;
  * the shift grows by the constant 3(i+1) from one group to the next, which
    the fixed wiring depends on.
* `tb_cnu`, `tb_vnu`, `tb_shift_network`, `tb_decoder_ctrl` — unit tests
  against integer models. They cover the sorter and sign rules (including a
  worked example of the stale-minimum replacement), LLR sums and saturation,
  rotation amounts and return to home after an iteration, and the complete
  schedule with stalls.

The BER curves of the original study (its main evidence for the code and the
sorter simplification) are software results and are not reproduced here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv \
        --top-module tb_ldpc_decoder -o sim && ./obj_dir/sim

Replace the testbench with `tb/tb_ldpc_decoder_full.sv` (and
`--top-module tb_ldpc_decoder_full`) for the full-size run. It compiles in a
few minutes and runs in seconds. Unit testbenches need only `ldpc_pkg.sv`,
their module and their testbench file. Uninitialized state is not relied on:
all registers have a reset.
