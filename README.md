# Bit-swapping LFSR BIST engine

A built-in self-test (BIST) applies pseudo-random patterns to a block of logic
and folds the block's answers into a short signature. A plain LFSR pattern
generator is cheap, but successive LFSR patterns differ in about half of their
bits, and every flipped input bit switches logic in the circuit under test
(CUT). That is why test-mode power is higher than functional power.

This design keeps a fixed-polynomial LFSR and puts a layer of 2:1
multiplexers behind it. The multiplexers **re-order the bits** of each pattern
so that successive patterns differ in fewer bits. Each pattern only has its
bits permuted, so a full LFSR period still produces every non-zero pattern
exactly once. The coverage of a full run is unchanged, and switching activity
at the CUT inputs drops. For the default 8-bit generator, one period (255
patterns) has 1024 bit transitions without swapping and 832 with it, about
19 % fewer.

Around that generator sit a seed table with a reseeding sequencer and a
programmable multiple-input signature register (MISR) that compacts the CUT
responses. A separate 8-bit BILBO register (built-in logic block observer) can
act as a scan chain, a pattern generator, a plain register or a signature
register.

```
            +----------+  seed   +-----------------------------+  test_pattern
 start ---> | bist_ctrl|-------> | bs_lfsr                     |-------------> CUT
            |          | load/en |  lfsr --> bit_swap_mux      |                |
            +----------+         +-----------------------------+                |
              |  seed_addr                    ^ swap_en                          |
              v                                                                 v
            seed_rom                 signature <-- misr <------------- cut_response
                                                    ^ misr_poly
            bilbo (own ports: b1, b2, si, d -> q, so)
```

## The bit-swapping generator (`lfsr`, `bit_swap_mux`, `bs_lfsr`)

**LFSR.** This is a Fibonacci register. Bits shift from stage 0 towards stage
N-1, and stage 0 takes the XOR of the tapped stages. For 8 bits the taps are
stages 7, 3, 2 and 1, i.e. the polynomial x^8 + x^4 + x^3 + x^2 + 1. It is
primitive, so the period is 255. Stage N-1 is the serial output.

A `load` pulse writes a seed (reseeding) and takes priority over `en`. A zero
seed is replaced by 1, because the all-zero state would lock the register.

**Width.** The width is a parameter. `TAPS` defaults to
`bist_pkg::lfsr_taps(N)`, a table of primitive polynomials for 3 to 32 bits,
so resizing the generator for a different CUT is a one-parameter change.
Widths 3 to 20 were checked exhaustively for maximal period. Widths 21 to 32
come from the standard published table and were not simulated.

**Swap rule.** The last stage, `q[N-1]`, is the selector. When it is 1 and
`swap_en` is 1, the stage pairs (0,1), (2,3), ... below N-1 swap places. The
selector bit itself is never moved, so the mapping can always be undone and is
one-to-one. When N is even, stage N-2 has no partner and passes straight
through.

The reduction is an empirical property of this swap rule on this LFSR, not a
guarantee for every width and polynomial. The 8-bit figures above are counted
over a whole period, and the testbenches check them exactly.

**Switch.** `swap_en = 0` gives the plain LFSR pattern. Keep that mode for
comparison, or for when the exact LFSR order matters.

**Timing.** The pattern is a combinational image of the LFSR register. It is
valid in the cycle after the edge that advanced or reseeded the LFSR.

## Test sequence and reseeding (`bist_ctrl`, `seed_rom`)

A `start` pulse runs one test:

| cycles                         | what happens                                        |
|--------------------------------|-----------------------------------------------------|
| 1                              | MISR cleared                                        |
| 1 per seed                     | seed `seed_addr` written into the LFSR (`tpg_load`) |
| `PATTERNS_PER_SEED` per seed   | one pattern per cycle, `pattern_valid` = 1; the MISR compacts the response on the closing edge, the LFSR steps |

After the last segment `done` rises and stays high until the next `start`. A
`start` while `busy` is ignored.

- **Test length:** 1 + NUM_SEEDS × (1 + PATTERNS_PER_SEED) cycles after the
  edge that samples `start`.
- **Defaults:** 4 seeds × 64 patterns, i.e. 256 patterns in 261 cycles.
- **Seed table:** `SEEDS` defaults to `{01, 5A, C3, 96}`.

Each seed starts the LFSR at a different point of its sequence. A short run per
seed therefore samples the whole sequence, and the seed count and run length
trade test time against coverage. The seed values and counts are parameters,
not tuned values. Choose them for your CUT with a fault simulator.

## Signature register (`misr`)

Each enabled cycle the MISR shifts one place, feeds the XOR of the stages
selected by `poly` into stage 0, and XORs the N response bits into the whole
word. The polynomial is a run-time input, so one register can be programmed
for different compaction polynomials. Use a primitive one, e.g. `8'h8E` (the
LFSR's own). Aliasing then stays near 2^-N.

`clr` and reset set the signature to zero. Compare the final signature with the
signature of a fault-free run.

## BILBO register (`bilbo`)

N stages (8 by default) and two control bits. Stage Qi is `q[i-1]`.

| B1 B2 | mode              | next state                                |
|-------|-------------------|-------------------------------------------|
| 0 0   | serial scan chain | Q1 ← SI, Qi ← Q(i-1); SO = Qn             |
| 0 1   | LFSR generator    | Q1 ← feedback, Qi ← Q(i-1); D ignored     |
| 1 0   | normal register   | Qi ← Di                                   |
| 1 1   | MISR compactor    | Q1 ← feedback ⊕ D1, Qi ← Q(i-1) ⊕ Di      |

- **Feedback:** the XOR of the stages in `TAPS`, the same polynomial as the
  LFSR. It reaches Q1 through a 2:1 multiplexer whose other input is SI.
- **Reset:** clears the register.
- **Starting LFSR mode:** all-zero is a fixed point in LFSR mode. Scan in a
  seed or load one in normal mode first.

In the top level the BILBO is a separate unit with its own `bilbo_*` ports. It
is not wired into the BS-LFSR engine. A typical use is as the register at a
block boundary: a generator for the logic after it, and a MISR for the logic in
front of it.

## Top level (`bslfsr_bist_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | start a test |
| `swap_en` | in | 1 | 1 = bit swapping on |
| `misr_poly` | in | N | MISR feedback mask (bit i = stage i tapped) |
| `test_pattern`, `pattern_valid` | out | N, 1 | pattern to the CUT |
| `cut_response` | in | N | CUT response; sampled on the edge that ends each `pattern_valid` cycle |
| `signature`, `busy`, `done` | out | N, 1, 1 | result and status |
| `bilbo_b1`, `bilbo_b2`, `bilbo_si`, `bilbo_d` | in | 1, 1, 1, N | BILBO controls and data |
| `bilbo_q`, `bilbo_so` | out | N, 1 | BILBO outputs |

Parameters: `N` (8), `TAPS` (`lfsr_taps(N)`), `NUM_SEEDS` (4),
`PATTERNS_PER_SEED` (64) and `SEEDS`.

The CUT is outside the design. It is assumed to be combinational and to answer
in the same cycle. For a registered CUT, delay `cut_response` by the CUT's
latency, and extend each segment, or drop the first responses, to match. The
responses must be as wide as the patterns (N bits). Fold or pad wider or
narrower CUT interfaces.

Every register has a synchronous reset and there is no clock gating. No input
reaches an output without passing a register. `test_pattern`, `pattern_valid`,
`busy` and `done` are decoded from registers, and the other outputs are register
bits.

## What is the source design's and what is not

Taken from the design:
- the 8-bit LFSR and its tap positions;
- the block structure: seed input → LFSR with feedback polynomial → MUX
  selection → test pattern;
- the idea of lowering switching activity by re-ordering LFSR bits with
  multiplexers, under a switch;
- reseeding from seeds held in a ROM;
- an 8-bit programmable MISR as the response analyser;
- the 8-bit BILBO with its four modes, their B1/B2 encoding, and the SI
  multiplexer with SO from the last stage;
- a generator whose length is a parameter.

Choices made here, where the source gives no detail:
- the exact swap rule (adjacent pairs, the top stage as selector, active high);
- what is programmable in the MISR (the polynomial);
- the seed values and count, and the number of patterns per seed;
- the controller's sequencing and handshake;
- the tap table for widths other than 8, and the BILBO's taps;
- reset behaviour everywhere, the zero-seed guard, and a same-cycle CUT
  response.

Not included:
- a "dual-LFSR" variant built from two concatenated LFSRs, which the source
  mentions without defining;
- the "priority" in its "switch controlled priority based" pattern
  generation, which is never explained;
- any power figures. Switching activity is only counted as bit transitions
  at the generator output.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against a
reference model written separately from the RTL and prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it proves |
|-----------|----------------|
| `tb_bist_pkg` | every tap mask of widths 3..16 is primitive (period 2^n - 1); the 8-bit mask; the BILBO mode encoding |
| `tb_lfsr` | every step of a full 8-bit period against the model; period exactly 255 with 255 distinct states; hold, load priority, zero-seed guard; 5-bit and 12-bit instances reach periods of 31 and 4095 |
| `tb_bit_swap_mux` | all 256 inputs with both switch settings; the mapping is a permutation; 1024 vs 832 transitions over a period |
| `tb_bs_lfsr` | full periods with swapping on and off, all patterns distinct, fewer transitions when swapping, random reseeds |
| `tb_seed_rom` | default table, and a 3-entry table with its out-of-range address |
| `tb_misr` | 900 random cycles under three polynomials, clear and hold, detection of a single-bit error in a 200-response stream |
| `tb_bist_ctrl` | exact cycle count, seed order, clear first, strobes, start ignored while busy, at default and small sizes |
| `tb_bilbo` | scan in/out, LFSR period 255, 2000 random cycles over all four modes |
| `tb_bslfsr_bist_top` | end to end at the default parameters (see below) |

`tb_bslfsr_bist_top` runs the top with default parameters and a behavioural
8-bit CUT. It does four full tests:

1. swapping on: signature equals the model's;
2. the same with a stuck-at-1 fault on one CUT output: signature differs;
3. swapping off: model signature; the swapped run had fewer pattern
   transitions (824 against 982 over the 256 patterns);
4. a different MISR polynomial.

It then drives the BILBO through all four modes. It counts reseeds, swapped
patterns, compactions, fault detections and each BILBO mode, and fails if any
count is zero.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_bslfsr_bist_top.sv --top-module tb_bslfsr_bist_top
./obj_dir/Vtb_bslfsr_bist_top
```

Every testbench finishes in well under a second.
