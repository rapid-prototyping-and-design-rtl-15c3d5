# Cell-seeded LFSR random number generator

A pseudorandom generator is cheap and gives well-spread numbers. Its output
repeats, though, and anyone who learns its state can predict it. A physical
noise source cannot be predicted, but its raw bits are biased. This design
combines the two. Raw bits from an array of CMOS random-bit cells are first
*conditioned*: XORing many biased bits gives bits close to 50/50. Each
conditioned 32-bit word then supplies three things to a 32-bit LFSR:

- its seed;
- which of eight tap sets (feedback polynomials) the LFSR uses;
- how many cycles the seed is used before the next word replaces it.

The LFSR produces one 32-bit word per clock. Its seed, feedback polynomial and
reseed interval all change all the time, driven by the physical source.

The RTL is written in synthesizable SystemVerilog. The random-bit cell itself
is an analog circuit and is not part of the RTL. A behavioural model of it is
used by the testbenches.

## Data flow

```
 random-bit cells ──(cell_we/cell_waddr/cell_wdata)──► cell memory (2^20 x 32)
                                                          │ one word / clock
                                                          ▼
                                  XOR handler: XOR of 16 consecutive words
                                                          │ bitsout / rdy_snd
                                                          │ ◄── got_it
                                                          ▼
                                  controller: seed, tap row, TR; counts TR
                                      │ LFSR_reset, LFSR_seed, LFSR_tap
                                      ▼                   ▲ LFSR_in
                                  LFSR + tap table ───────┘
                                                          │
                                  controller output register ──► finalbits
```

| file | module | role |
|---|---|---|
| `rtl/rng_pkg.sv` | `rng_pkg` | widths, types, field extraction of the conditioned word |
| `rtl/rng_cell_mem.sv` | `rng_cell_mem` | RAM holding raw cell words; write port + 1-cycle read port |
| `rtl/rng_xor_handler.sv` | `rng_xor_handler` | conditioner; contains the cell memory |
| `rtl/rng_tap_lut.sv` | `rng_tap_lut` | 8-row table of tap sets |
| `rtl/rng_lfsr.sv` | `rng_lfsr` | 32-bit LFSR, seed and tap set loaded on `reset` |
| `rtl/rng_controller.sv` | `rng_controller` | reseeding control and output register |
| `rtl/rng_top.sv` | `rng_top` | the three units wired together |

## The conditioned word

Call the XOR handler's 32-bit output `LFSR_IN`. The controller splits it like
this. In each list the first bit named is the most significant.

| field | bits of LFSR_IN | meaning |
|---|---|---|
| seed | all 32 | loaded into the LFSR as is |
| tap row | [23, 10, 2] | row of the tap table |
| TR (time of refresh) | [22, 20, 18, 16, 12, 10, 6, 4, 2, 0] | 10-bit reseed interval in clock cycles |

Bits 10 and 2 belong to both the tap row and TR.

The conditioner XORs bit *i* of sixteen consecutive stored words to form bit
*i* of `LFSR_IN`. Take two independent bits that are 1 with probabilities
p and q. Their XOR is 1 with probability p(1−q) + q(1−p), so its distance from
1/2 is 2·|p−½|·|q−½|. Each further XOR shrinks the bias again. With sixteen
words, a cell bias of 60 % becomes practically zero.

## The LFSR and its tap table

The register shifts towards bit 0 every clock. The XOR of the state bits at
the tap positions enters at bit 31. Bit 0 is the least significant bit.

| row | taps | row | taps |
|---|---|---|---|
| 0 | 31, 30, 28, 0 | 4 | 31, 28, 5, 4 |
| 1 | 31, 30, 4, 3 | 5 | 31, 28, 5, 3 |
| 2 | 31, 29, 7, 2 | 6 | 31, 25, 14, 6 |
| 3 | 31, 29, 6, 3 | 7 | 31, 30, 15, 1 |

The table is meant to hold only maximal-length tap sets (period 2^32−1).
Choosing the polynomial from a fixed table, not from raw bits, is meant to
keep a seed out of short cycles.

The shift direction and the tap convention are pinned down by a reference
output sequence that goes with the design. The generator's first twenty output
words for the seed 3869298507 are:

3869298507, 1934649253, 967324626, 2631145961, 1315572980, 657786490,
328893245, 2311930270, 1155965135, 2725466215, 1362733107, 681366553,
2488166924, 1244083462, 2769525379, 3532246337, 1766123168, 3030545232,
3662756264, 1831378132.

The seed's bits [23,10,2] are 110, which selects row 6. Its TR is 25, so all
twenty words come from the one seed. Under the convention above, row 6
reproduces the list exactly, and the seed is the first output word. Both
`tb_rng_lfsr` and the end-to-end tests check this sequence.

**Caution: the tap sets are not maximal-length as implemented.** The
convention fixed by the reference sequence uses the listed numbers directly as
state-bit indices. The recurrence is then x(n+32) = Σ x(n+t) over the taps t,
with characteristic polynomial x^32 + Σ x^t. None of the eight rows gives a
primitive polynomial under this reading. Seven rows do not include bit 0, so
the state map is not even invertible: the oldest bit of the seed has no
effect on the future.

Read the rows instead as the usual 1-based tap lists: 31 means the x^0 term,
and every other number t means x^(t+1). Then all eight rows are primitive. For
example, row 6 becomes x^32 + x^26 + x^15 + x^7 + 1.

The RTL keeps the behaviour that matches the reference sequence. Every reseed
replaces the state within 1023 cycles, which limits the harm. A user who wants
true maximal-length rows should change the masks in `rng_tap_lut`: replace
position 31 by 0 and every other position t by t+1. For row 6 that gives the
feedback s[0]^s[26]^s[15]^s[7]. The published sequence will then no longer be
reproduced.

## Reseed timing

This is the least obvious part of the design. Let cycle *r* be a reload pulse
(`LFSR_reset` and `got_it` both high for one cycle):

| cycle | what happens |
|---|---|
| r | controller pulses `LFSR_reset` and `got_it`. The new seed, tap row and TR are already in its registers. |
| r+1 | the LFSR holds the seed. The XOR handler has dropped `rdy_snd` and starts reading the next 16 words. |
| r+2 | the seed is on `finalbits`. |
| r+18 | the XOR handler raises `rdy_snd` with the next conditioned word (N_WORDS+2 cycles after the `got_it` cycle). |
| r+TR−1 or later | the controller takes the word once it is due (`count+1 ≥ TR`) and `rdy_snd` is high. |
| next pulse | one cycle after the word is taken. |

So, with the default N_WORDS = 16, a seed produces exactly **max(TR, 19)**
output words:

- If TR ≥ 19, the next reload comes exactly TR cycles later (an *on-time
  reseed*).
- If TR < 19, the conditioner is not ready yet (a *late refresh*). The LFSR
  keeps running on the old seed and taps, and the reload follows one cycle
  after `rdy_snd` rises.

The XOR handler only starts a new word after `got_it`, so its 19-cycle
turnaround sets the shortest seed life. Output never stops: `finalbits`
changes every clock from the first seed on.

After reset is released, the first word appears on `finalbits` N_WORDS+4
cycles later (20 cycles by default). `finalbits_valid` rises with it and stays
high.

## Handshake between XOR handler and controller

`rdy_snd` rises when `bitsout` holds a new word. `bitsout` then stays unchanged
until the controller answers with a one-cycle `got_it`, and `rdy_snd` drops in
the following cycle.

The controller never takes a word in the cycle of its own `got_it` pulse, so a
word cannot be taken twice. Two assertions check the protocol:

- in `rng_xor_handler`: the word stays offered and stable until `got_it`;
- in `rng_controller`: `got_it` only while `rdy_snd` is high, and `got_it`
  always equals `LFSR_reset`.

## Top-level interface (`rng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (the original prototype ran at 50 MHz) |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `cell_we` | in | 1 | write a raw cell word into the cell memory |
| `cell_waddr` | in | ADDR_W | its address |
| `cell_wdata` | in | 32 | the raw cell word |
| `finalbits` | out | 32 | random output word, one per clock |
| `finalbits_valid` | out | 1 | high from the first seed on |
| `refresh_time` | out | 10 | TR of the seed in use |

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 20 | cell memory holds 2^ADDR_W 32-bit words (4 MiB) |
| `N_WORDS` | 16 | raw words XORed per conditioned word |

The cell memory is not reset, and it can be written at any time. The usual
sequence is:

1. Hold `rst_n` low and store the cell words from address 0 up.
2. Release `rst_n`.

The XOR handler reads the memory in address order and uses each word once. At
the end it wraps to address 0. The words may also be refreshed while the
generator runs.

## The random-bit cell (not in the RTL)

The entropy source is a latch made of two cross-coupled inverters. Two PMOS
devices, gated by a clock, pull both nodes high while the clock is low. When
the clock rises the pull-ups release and the latch is left balanced. Noise
decides which node falls, so Q is 1 or 0 at random. The original is a 45 nm
transistor-level circuit. Device mismatch biases it, so its raw bits fail
statistical tests on their own. That bias is why the conditioner exists.

`tb/rng_cell_model.sv` models only the logical behaviour:

- ports `vsource`, `node_a` (Q) and `node_b` (~Q);
- both nodes high while `vsource` is low;
- a biased random resolution one time unit after `vsource` rises.

The end-to-end testbenches build a 32-cell array from it and store its samples
in the cell memory. The number of cells and the way they are sampled into
words are this implementation's choices.

## Where this RTL departs from, or adds to, the original

- **Added ports.**
  - `rst_n`: the original had only a clock and the 32 output pins, and its
    registers started from their power-up values.
  - The cell memory write port: the original memory was preloaded before
    simulation.
  - `finalbits_valid` and `refresh_time`.
- **Conditioner.** The XOR of sixteen words per output follows the FPGA
  version of the design. The algorithm-level description of the design XORs
  two cell bits; `N_WORDS = 2` gives that form.
- **Own choices where the original says nothing:**
  - the reseed interval counted from reload pulse to reload pulse;
  - TR values below 2 acting as 2;
  - continuing on the old seed when the next word is late;
  - a synchronous memory read with one cycle of latency;
  - the address order of the reads;
  - the two-state XOR handler FSM.
- **Zero seed.** An all-zero conditioned word gives an all-zero seed. The LFSR
  then stays at zero until the next reseed, as a plain LFSR would. This has
  probability 2^-32 per seed with a working source, and no guard is added.
- **Size.** The original FPGA build was reported at 83 logic elements and 64
  registers. This RTL has 247 flip-flop bits after coarse synthesis:
  - the LFSR state and its tap mask;
  - the controller's seed, TR, counter and output register;
  - the conditioner's accumulator and output word.

  The reason for the difference was not investigated.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_rng_tap_lut` | all eight rows against an independent list of tap positions |
| `tb_rng_lfsr` | the published 20-word sequence; 200 random seeds and rows against a reference model; back-to-back loads |
| `tb_rng_cell_mem` | random writes and read-back over the full 2^20 words; read latency; read-during-write |
| `tb_rng_xor_handler` | each word is the XOR of the right 16 stored words, including across the address wrap; `rdy_snd` timing; word held until `got_it` |
| `tb_rng_controller` | field extraction; reload spacing of exactly max(TR,2) when a word is ready; a late reload exactly one cycle after the word appears; output register delay; counts on-time reloads, late reloads and TR = 0 |
| `tb_rng_xor_bias` | conditioner with `N_WORDS = 2` fed by two cell groups biased 60 % and 70 %: the fraction of ones must match p(1−q)+q(1−p) = 0.46 |
| `tb_rng_top` | whole design with a 1024-word memory (see below) |
| `tb_rng_top_full` | the same at default parameters, through 250 reseeds |
| `tb_rng_workload_1m` | one million output words at default parameters against the reference, plus the frequency (monobit) test on 100 and 1,000,000 output bits |

`tb_rng_top`, `tb_rng_top_full` and `tb_rng_workload_1m` use the reference
model in `tb/rng_ref_pkg.sv`, which predicts every output word and the exact
cycle of every reseed. In `tb_rng_top`, the memory is filled from 32
behavioural cells, and some groups of sixteen words are adjusted to force
chosen conditioned words: the published seed, every tap row, TR = 0, and
small and large TRs. It checks:

- every output word and every reseed cycle against the reference;
- one output per clock, and the latency to the first word;
- that the memory address wraps;
- that conditioning brings the raw bias of about 60 % close to 50 %;
- that every mechanism occurs: on-time reseeds, late refreshes, TR = 0 and
  every tap row.

The broader statistical suites the original design was judged by (the full
NIST suite, DIEHARD) are not reimplemented here.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rng_top \
    rtl/rng_pkg.sv tb/rng_ref_pkg.sv tb/tb_rng_top.sv
./obj_dir/Vtb_rng_top
```

Replace `tb_rng_top` with any testbench name; the packages are always listed
first. `tb_rng_workload_1m` takes about ten seconds. All the others finish in
about a second.
