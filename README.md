# Rate-15/16 QC-LDPC decoder with a single pipelined shuffled schedule

This is the RTL of a decoder for a (2048,1920) quasi-cyclic LDPC code with a
code rate of 15/16, and of a Box-Muller Gaussian noise generator used to
test it.

High-rate LDPC codes have very long check rows. In this code every check
node connects to 46 variable nodes. A fully parallel decoder has a large
routing problem, and a classic two-phase (flooding) decoder needs many
iterations. This design uses a *shuffled* schedule that is centred on the
variable nodes (VSS):

- The 64 block columns of the parity-check matrix are split into G = 4
  groups.
- The decoder processes one group per clock cycle.
- One set of variable node units (VNUs) serves all four groups.
- The check node units (CNUs) are fully parallel and accumulate over the
  four groups.
- Check messages produced in one group are used by the next group within
  the same iteration. The decoder therefore converges in fewer iterations
  than with flooding.
- Nothing between VNU and CNU is registered. In one cycle the path runs
  CNU output → VNU → CNU sorter. This is the *single pipelined* design.

The throughput is fixed:

- 4 initialisation cycles load the channel values, one group per cycle.
- Then 4 iterations × 4 groups follow.
- This gives 20 cycles per 1920 information bits, and the next codeword
  starts right away.
- At 120 MHz this is 11.5 Gbit/s.

## The code and its layout in hardware

H is a 4 × 64 array of 32 × 32 blocks. Each block is either a circulant
permutation (the identity cyclically shifted by some amount) or all zero.

Column degrees:

| Block columns | Degree |
|---|---|
| 16 | 4 |
| 24 | 3 |
| 24 | 2 |

Every block row has 46 non-zero blocks. The columns are permuted into 4
groups of 16 *slots*. Every group has the same slot pattern:

| Slots | Degree | Block rows used |
|---|---|---|
| 0–3 | 4 | all four |
| 4–9 | 3 | all except row `((s-4) + 2g) mod 4` |
| 10–15 | 2 | one of the six row pairs: (0,1) (2,3) (0,2) (1,3) (0,3) (1,2) |

Because of this, one VNU of the right degree can be shared by the same slot
of all groups. That is 16 × 32 = 512 VNUs in total:

- 128 VNU4
- 192 VNU3
- 192 VNU2

In every group each block row receives 11 or 12 messages, 46 over all four
groups. A CNU therefore has 12 inputs. It uses 11 or 12 of them depending
on the group.

The row choices and the circulant shifts are this design's own:

- The shifts live in the table `SHIFT32` in `rtl/ldpc_pkg.sv`. A search
  chose them so that few pairs of block columns close a length-4 cycle. It
  was not an exhaustive search: 21 such block pairs remain.
- To decode a different code with the same degree pattern, replace that
  table. If the row pattern differs, also replace `has_row()`.

All wiring is generated from these two functions.

### Numbering

| Node | Index |
|---|---|
| Variable node | `n = (g*16 + s)*32 + j` (group g, slot s, position j) |
| Check node | `m = r*32 + i` |

A block with shift k connects check `i` to variable `(i + k) mod 32`.
`out_bits` and the LLR input use this permuted order. A system that uses
the encoder's column order must apply the column permutation outside the
decoder.

## Messages and arithmetic

- **Channel LLRs and messages:** 6 bits, with 5 integer bits and 1
  fractional bit.
- **Format between units:** VNUs and CNUs exchange sign-magnitude values
  with a 5-bit magnitude.
- **VNU sum:** the VNU adds in two's complement with 9 bits. It saturates
  each outgoing message to a magnitude of 31.
- **CNU rule:** the CNU applies normalised min-sum with β = 0.75, computed
  as `(3·m) >> 2`. The result is rounded down.

### VNU (`ldpc_vnu`)

The VNU is combinational from its inputs to `z_out`:

```
z   = P + Σ eps
z_e = z − eps_e
```

It holds two 4-entry shift registers:

- **Channel values.** On a load cycle the new LLR enters. On a decode
  cycle the register rotates. The head entry always belongs to the group
  being processed.
- **Hard decisions.** On every decode cycle the sign of `z` is shifted
  into this register.

After the last cycle of a codeword, entry g holds the decision for group g.

### CNU (`ldpc_cnu`)

The CNU has a sign part and a magnitude part. Both are accumulative: they
see only the 12 messages of the current group, but they keep enough state
to produce outgoing messages that reflect all 46 inputs.

**Sign unit (`ldpc_sign_unit`)**

- It stores the 46 input signs and the XOR of each group's 12 signs.
- The global sign is the XOR of the four group parities.
- The outgoing sign on a port is the global sign XOR that port's stored
  sign.
- The outputs are formed before the current group's signs are replaced.
  Groups already handled in this iteration therefore contribute new
  values, and later groups contribute old values. This is exactly what the
  shuffled schedule asks for.

**RMAS1, Reduced Memory Accumulative Sorter (`ldpc_rmas1`)**

A plain accumulative sorter would keep min, second min and indices for
each of the four groups. RMAS1 keeps two such sets:

- **L:** min, second min and their indices for the group updated last.
  The local sorter writes it.
- **O:** the running global min and second min.

Each cycle a 4-to-2 sorter merges L with the *feedback* from O. The result
`gm` does two jobs:

- it forms the outgoing magnitudes for this group: the second minimum on
  the port that holds the minimum, the minimum elsewhere;
- it becomes the new O.

If an O entry came from the group that L now holds, its feedback loop is
*opened*: the entry is forced to magnitude 31, and L's newer values take
its place. Indices are `{group, port}` (6 bits), so the comparison is on
the upper two index bits. On the first initialisation cycle of a codeword
both loops are open.

- **During initialisation** O builds the exact global pair.
- **During decoding** an entry that is opened and not replaced by L leaves
  O holding a value from another group that may not be the true second
  minimum. This is the approximation that buys the smaller memory. At the
  signal-to-noise ratios tested, the decoder's result matches the
  bit-accurate reference model, which implements the same rule.

**Local sorter (`ldpc_local_sorter`)**

- It is a tree of two-input min/second-min merges over the 12 ports.
- Unused ports are masked to magnitude 31.
- Ties go to the lower port.

### Interconnect (`ldpc_v2c_net`, `ldpc_c2v_net`)

- Between a VNU and a CNU, one connection per group exists. It is selected
  by a 4-input multiplexer driven by the group number.
- The source of every multiplexer input is a constant, computed at
  elaboration from `has_row()` and `cp_shift()`.
- Where two groups share the same source, synthesis folds the multiplexer
  away.
- With the shift table used here, 128 CNU inputs have two sources and
  1408 have three or four. In the other direction, 1472 VNU inputs have
  three or four sources. A shift table in which blocks of the same slot
  and block row carry the same shift in all four groups would remove most
  of these multiplexers. A column permutation inside each group can often
  make that happen without changing the code's graph.

### Storage per CNU

The original RMAS1 design counts 90 bits per CNU: 2 × (5+5+6+6) + 46
signs. That is 11,520 bits for 128 CNUs.

This RTL holds 96 bits per CNU:

- 44 bits for L and O;
- 48 sign bits, one per port and group, including the unused 12th port of
  11-port groups;
- 4 group parities.

## Controller and timing (`ldpc_ctrl`, `ldpc_decoder`)

The decoder port is a valid/ready stream of LLR groups:

1. `in_ready` is high while the decoder initialises.
2. Each accepted beat (`in_valid && in_ready`) loads the 512 LLRs of one
   group, groups 0 to 3 in order.
3. The source may pause between beats. The decoder waits.
4. After the fourth beat, 16 decoding cycles follow.
5. During those cycles `in_ready` is low.
6. In the cycle after the last decoding cycle `in_ready` rises again and
   `out_valid` pulses for one cycle: 20 cycles after the first beat when
   no stall occurs. The next codeword can load its first group in that
   same cycle.
7. `out_bits` then holds all 2048 decisions. They stay stable until the
   next codeword's first decoding cycle (4 beats later).

- **Iterations:** the iteration count is the parameter `ITER` (default 4).
  There is no early stop.
- **Reset:** `rst_n` is asynchronous and active low.
- **Assertion:** the controller asserts that a load and a decode cycle
  never coincide.

## Gaussian noise generator (`awgn_core`)

This is a six-stage pipelined Box-Muller generator. From two uniform
numbers u1 and u2 it produces two independent normal samples:

```
x = sqrt(−2 ln u1) · cos(2π u2)
y = sqrt(−2 ln u1) · sin(2π u2)
```

It then scales them by σ.

| Stage | Work |
|---|---|
| 1 | Uniform generators (`awgn_urng`): two independent combined Tausworthe generators with period about 2^113, 32-bit outputs |
| 2 | Address generation for R and for the sine table |
| 3 | Coefficient ROM of R; sine/cosine table |
| 4 | R = â·û + b |
| 5 | R·cos, R·sin |
| 6 | × σ, saturated |

### R function (`awgn_rfunc`)

- R is steep near u1 = 0 and u1 = 1, so the interval is cut into segments
  whose size shrinks logarithmically towards both ends.
- The segment is the number of leading zeros of u1 for u1 < ½, or of
  1 − u1 for u1 ≥ ½.
- Each segment is cut uniformly into 8 sub-segments.
- The input is shifted left by the leading-zero count, so the multiplier
  always sees a value in [½, 1). Each slope is pre-scaled by the same
  power of two.
- Coefficients are Q(16,12). They are computed during elaboration from
  the exact end points of each sub-segment.
- The largest error is about 6·10⁻⁴.
- The tail reaches √(64 ln 2) ≈ 6.66 at u1 = 2⁻³².

### Sine and cosine (`awgn_sincos`)

- A 1024-entry quarter-wave table in Q(16,15), computed at elaboration.
- Quadrant symmetry covers the full circle.

### Interface

- `seed_load` loads both seeds and σ. σ is unsigned Q(16,12).
- While `en` is high, one pair is produced per cycle. `out_valid` marks
  the first valid pair and every later one.
- The pair from the seed state appears on the fifth enabled edge after
  loading.
- Outputs are signed Q(16,12).

## Top (`cppeg_top`)

The decoder and the noise generator stand side by side, each with its own
ports (`dec_*`, `awgn_*`). In a test set-up the noise generator feeds the
channel model. The BPSK mapping and LLR scaling that turn noise samples
into decoder input sit in the testbench, not in hardware.

## Where this design departs from the original description

- **Shift table and row layout.** The parity-check matrix (shift values
  and which block rows each degree-3 and degree-2 column uses) is this
  design's own. The degree pattern, block size, 46-edge rows and 11/12
  ports per group are as specified.
- **RMAS1 feedback at the fourth group.** The original condition list for
  RMAS1 also opens the global-min feedback when the current group is the
  fourth. This design opens it only when the stored entry belongs to the
  group held in L. Opening it at every fourth group would drop the other
  groups' minima once per iteration, with nothing to restore them.
- **Open-loop value.** The open-loop value is the 5-bit maximum 31.
- **Storage.** CNU storage is 96 bits instead of 90 (see above).
- **Decoder interfaces.** The input handshake, reset, output word and bit
  order are this design's choices.
- **Normalisation rounding.** β = 0.75 is rounded down.
- **Noise generator internals.**
  - The uniform generator's component parameters are the standard taus113
    ones.
  - The R function uses 8 sub-segments per segment.
  - The upper half of (0,1) is handled through 1 − u1.
  - The Q formats of the sine table, products and output are chosen here.
- **σ, not variance.** The generator scales by the standard deviation σ.

## Not built

- **Emulation set-up.** The FPGA board, the UART link and host program
  that configure the emulation and collect error counts are not part of
  this RTL.
- **Viterbi decoder.** The Viterbi decoder that the noise generator was
  also used with is not built.
- **Sorter alternatives.** The plain accumulative sorter and the RMAS2
  variant are not built. Only RMAS1, the configuration chosen for the
  decoder, is.
- **Other codes.** Decoding other codes, such as the (1440,1344) code of
  IEEE 802.15.3c, would need a new matrix description. Codes with a
  different size or degree pattern would also need new wiring.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

With plain Verilator (5.x), from the repository root:

```
verilator --binary -j 0 -Wno-fatal -y rtl -y tb --top-module tb_cppeg_top \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_cppeg_top.sv
./obj_dir/Vtb_cppeg_top
```

- Testbenches that do not use the reference decoder need only
  `rtl/ldpc_pkg.sv` and their own file.
- `tb/taus113_model.svh` is included by path relative to the repository
  root.

| Testbench | What it checks |
|---|---|
| `tb_ldpc_vnu`, `tb_ldpc_local_sorter`, `tb_ldpc_sign_unit`, `tb_ldpc_rmas1`, `tb_ldpc_cnu` | Random stimulus against independent models |
| `tb_ldpc_v2c_net`, `tb_ldpc_c2v_net` | Every wire of the interconnect against the matrix functions |
| `tb_ldpc_ctrl` | Cycle sequence, handshake, stalls, 20-cycle latency |
| `tb_ldpc_decoder` | Full size. Twelve noisy codewords against the bit-accurate reference model `ldpc_ref` (`tb/ldpc_ref_pkg.sv`); latency, back-to-back words and stalls |
| `tb_awgn_urng`, `tb_awgn_rfunc`, `tb_awgn_sincos`, `tb_awgn_core` | Bit-exact generator model; R and sin/cos accuracy; pipeline against a model; sample statistics |
| `tb_cppeg_top` | Full size, default parameters. Noise from the generator → BPSK LLRs → decoder, checked against the reference model |

`tb_cppeg_top` counts each mechanism and fails if one never happens:

- input stalls
- back-to-back codewords
- opened feedback loops
- 11- and 12-port groups
- corrected words
- noise-generator pauses

Building either full-size decoder testbench takes about two minutes.
