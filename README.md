# Hold-flag decompressor for low-power LFSR reseeding

LFSR reseeding compresses scan test data by storing, per test pattern, only a
seed: the LFSR expands it into the full scan load, and only the few specified
bits of the test cube (typically 1–5 %) have to come out right. Every other
bit is whatever the LFSR produces, i.e. random. Shifting those random bits
into the scan chains makes roughly half of all scan cells toggle on every
shift, so scan-in power is far above what the chip sees in functional mode.

This RTL adds a small second stage between the LFSR and the scan chains. Each
scan chain is cut into a few equal **blocks**, and each block has a one-bit
**hold flag**:

* flag 0 — the block is filled from the LFSR, as in plain reseeding;
* flag 1 — the chain input is **held** at the bit shifted in last, so the
  whole block is constant and causes no toggling.

A block whose specified bits all have the value the chain input already holds
needs no LFSR data at all, only its flag. Many cubes therefore need fewer
specified LFSR bits than before, and every held block is transition-free.
Flags for all chains of a pattern form a **hold cube**. Consecutive patterns
whose hold cubes agree wherever both are specified share one hold cube, so it
is sent only with the first pattern of such a group; an **update flag** at the
start of each pattern says whether a new hold cube follows.

The scheme comes from J. Lee and N. A. Touba, "Low Power Test Data
Compression Based on LFSR Reseeding". The hardware structure follows that
paper. The LFSR, the cycle plan, the interfaces and the exact HF-SR behaviour
are this implementation's own choices; the paper says what the parts do but
not how they are built.

## What one seed produces

The LFSR has one output per scan chain plus one update-flag output. Starting
from a seed, its successive output words are used as follows:

```
word 0 ........ update-flag output = update flag U
if U = 1:
  words 0..B-1  output i = hold flag of block 0..B-1 of chain i   (hold cube)
then:
  next L words  output i = data bit for chain i, one per shift     (test data)
```

`B` is the number of blocks per chain (`N_BLOCKS`) and `L` the chain length
(`CHAIN_LEN`). The update flag is an extra output of word 0, not a word of its
own. With seeds back to back, a pattern costs `L + 1` cycles (L shifts and one
capture), plus `B` cycles when it brings a new hold cube. The extra test time
is therefore `B` cycles per hold-cube group. That is what the published
results show: for example, 143 groups × 3 cycles over 196 patterns × 20
shifts is +10.9 % for s5378, against +11 % in the paper.

### Cycle by cycle

| cycle(s) | controller state | what happens |
|---|---|---|
| seed | `ST_IDLE` or `ST_CAPTURE` | `seed_valid && seed_ready`: LFSR ← seed |
| 1 | `ST_FIRST` | update flag stored; if 1 this is hold-load cycle 0, else shift 0 |
| B−1 more (if U=1) | `ST_HOLD` | every HF-SR shifts in its chain's LFSR bit; chains stand still |
| L shifts in all | `ST_SCAN` | `shift_en`; every chain takes its MUX output; `hf_rotate` on the last cycle of each block |
| 1 | `ST_CAPTURE` | `capture_en`; the next seed may be taken in the same cycle |

The LFSR advances in every hold-load and shift cycle and stops otherwise.

## Blocks and the hold rule

The block length is `K = ceil(L / B)`; the last block may be shorter. B must
be the number of K-cell pieces that L actually makes. For example, 54 cells in
6 blocks gives K = 9. A combination such as 9 cells in 4 blocks is rejected at
elaboration.

"Held" means the MUX at the chain input feeds back the chain's own first
cell (`scan_head`), which contains the bit shifted in last. So a held block
repeats the **last bit of the previous block**, whatever that bit was. There
are two consequences that the seed computation has to respect:

* A held block only gets the right value if the previous block ends in it.
  The previous block ends in it if it is itself a held block of that value,
  or an LFSR-fed block whose last bit is specified to that value. If that
  last bit was X, the encoder can simply specify it. This is the
  "conversion" step: one extra specified bit saves all the data bits of the
  next block.
* The first block of a pattern has no previous block. Holding it keeps
  whatever the first cell captured from the circuit, so a first block with
  specified bits must have flag 0.

An all-X block may get any flag: held or random, it does not matter.

## Hold-flag shift registers (HF-SRs)

Each chain has a B-bit HF-SR (`hf_sr`). While a hold cube is loaded, the
flags enter at the top and shift down, so the flag loaded first ends in
bit 0 and belongs to the first block. During the shift phase the register
rotates by one place at the end of every block. Bit 0 is therefore always the
flag of the current block. After a full pattern, B rotations have brought the
cube back to where it started, ready for the next pattern of the same group.

Rotation is this implementation's way of keeping the hold cube across
patterns. It costs no extra logic besides the shift register itself, in line
with the paper's hardware count: one MUX and one HF-SR per chain, one
update-flag flip-flop, and a small controller with a bit counter. The price is
that the HF-SR bits toggle at block boundaries. The paper also counts
HF-SR transitions in its power figures.

## Hardware

```
            seed ──► reseed_lfsr ──out[N_CHAINS]──────────────► update flag ─► hold_ctrl
                        │ out[i]                                              (FSM, bit counter,
                        ├──────────► hf_sr[i] ──hold[i]──┐                    update-flag FF)
                        │                                 ▼                      │ hf_load, hf_rotate,
                        └──────────────────────────► hold_mux[i] ──► scan_in[i]  │ shift_en, capture_en,
                                     scan_head[i] ──────┘                         │ lfsr_load/step
```

| module | what it is |
|---|---|
| `lp_reseed_decompressor` | top level: everything below wired together |
| `reseed_lfsr` | 256-bit Fibonacci LFSR, parallel seed load, XOR output network |
| `hf_sr` | one chain's hold-flag shift register (load / rotate) |
| `hold_mux` | the 2-to-1 MUX at every chain input |
| `hold_ctrl` | state machine, bit and block counters, update-flag flip-flop |
| `lpr_pkg` | default sizes, LFSR taps, state type, output-tap function |

### The LFSR

The paper works with any reseeding LFSR, so the one here is a plain choice:

* 256 bits, feedback taps 255, 253, 250, 245. That is the recurrence of
  x^256 + x^10 + x^5 + x^2 + 1, which is primitive, so no non-zero seed falls
  into a short cycle. The length has to exceed the number of specified bits
  any one seed must satisfy. For s38417, the paper's averages give about 116
  for a pattern that carries a hold cube (53 data bits plus 62 hold flags).
  The maximum is not published.
* Output j = `s[8j] ^ s[11j+83] ^ s[13j+173]` (mod 256), output 31 being the
  update flag. The taps are spread over the whole register and spaced
  differently for every output. As a result, a 60-cycle pattern depends on
  every seed bit and no chain receives a delayed copy of another.

A seed is computed by writing each required bit (update flag, specified hold
flags, specified data bits of flag-0 blocks) as a linear equation over the
seed bits and solving over GF(2). `tb/tb_workload_encode.sv` contains a
complete, small implementation of this.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears LFSR, all hold flags, FSM) |
| `seed_valid`, `seed` | in | 1, `LFSR_LEN` | tester offers the next seed; must stay stable until taken (asserted) |
| `seed_ready` | out | 1 | high in idle and capture cycles; the seed is taken when both are high |
| `scan_head` | in | `N_CHAINS` | first cell of each scan chain |
| `scan_in` | out | `N_CHAINS` | serial input of each scan chain |
| `shift_en` | out | 1 | chains shift this cycle; they must hold their contents when neither this nor `capture_en` is high |
| `capture_en` | out | 1 | capture cycle |
| `update_flag` | out | 1 | update flag of the current pattern (valid from the cycle after `ST_FIRST`) |
| `hold_loading` | out | 1 | hold cube being shifted into the HF-SRs |
| `hold_now` | out | `N_CHAINS` | hold flag of each chain's current block |

Parameters of the top: `N_CHAINS` = 31, `CHAIN_LEN` = 54, `N_BLOCKS` = 6,
`LFSR_LEN` = 256, `LFSR_TAPS`.

## Sizes and the published configurations

The defaults are the s38417 configuration with 185 blocks in total: 31 scan
chains and a 6-bit HF-SR per chain, as published. The chain length is 54
because s38417 has 1664 scan inputs (28 primary inputs and 1636 flip-flops),
and 1664 / 31 rounds up to 54. That count is a property of the benchmark, not
something the paper states. It agrees with the paper's block count, since
185 blocks of 9 cells cover 1664.

The other published configurations run with these parameters. Chain lengths
come from the benchmarks' input and flip-flop counts.

| circuit | blocks | `N_CHAINS` | `CHAIN_LEN` | `N_BLOCKS` |
|---|---|---|---|---|
| s5378 | 31 / 22 | 11 | 20 | 3 / 2 |
| s9234 | 31 / 11 | 11 | 23 | 3 / 1 |
| s13207 | 100 / 20 | 21 | 34 | 5 / 1 |
| s15850 | 51 / 31 | 21 | 30 | 3 / 2 |
| s38417 | 185 / 152 | 31 | 54 | 6 / 5 |
| s38584 | 209 / 21 | 31 | 48 | 7 / 1 |

At the defaults the design is 458 flip-flops (256 LFSR, 186 hold flags, the
rest control). The paper also applies the hold flags on top of partial
reseeding, where the seed is changed while the LFSR runs. That variant is not
implemented: here there is one full seed per pattern.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it shows |
|---|---|
| `tb_reseed_lfsr` | state and all 32 outputs against an independent model, random loads/steps; no short cycle |
| `tb_hf_sr` | 6-bit and 1-bit HF-SR against a queue model; a loaded cube comes out block by block and survives rotation |
| `tb_hold_mux` | MUX truth on random vectors |
| `tb_hold_ctrl` | cycle-exact strobe sequence and pattern length (B·U + L + 1) at 54/6 and 20/3 (short last block), idle gaps and back-to-back seeds |
| `tb_lp_reseed_decompressor` | full design at default size, 400 random seeds with scan chains and random captured responses; every chain compared with a reference model, pattern length checked, each mechanism counted (new/reused hold cube, held/LFSR blocks, held first block, back-to-back/idle seeds) |
| `tb_workload_encode` | the full flow (`workload_run`): synthetic cubes → hold-flag encoding with conversion → compatible groups → GF(2) seed solving → decompression; every specified bit checked in the chains |
| `tb_paper_examples` | the paper's two worked 16-bit examples: exact hold flags and data bits (including two conversions), then decompressed |
| `tb_table1_configs` | the same flow on all twelve published scan configurations, each with both encoder policies (24 decompressors side by side) |

Typical `tb_workload_encode` result, for 120 patterns with 1–3 % specified
bits clustered in runs: about 50 hold-cube groups, LFSR data bits down by
about 30 %, and scan-in transitions halved compared with plain reseeding of
the same cubes on the same LFSR. The paper reports 40–53 % reductions. The
testbenches count transitions at the chain inputs only; the paper's figures
also include the HF-SRs. On
these random cubes the hold flags cost more than they save, so the total of
specified bits rises by 20–60 %. The storage balance depends on how well real
test cubes share hold cubes, and synthetic cubes cannot show that.

Running a testbench with Verilator (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/lpr_pkg.sv \
    tb/tb_lp_reseed_decompressor.sv --top-module tb_lp_reseed_decompressor
./obj_dir/Vtb_lp_reseed_decompressor
```

Each run takes well under a second.

## Encoding policy for all-X blocks

The hardware does not care how hold flags are chosen, but the results do.
The testbench encoder has two policies (`HOLD_DC` in `workload_run`):

* **all-X flags left free** (default): only blocks with specified bits get a
  specified flag. Few flags are specified and consecutive cubes often share a
  hold cube. With several blocks per chain this halves the transitions. With
  **one block per chain** it achieves nothing: every block is a first block,
  so a chain with specified bits needs flag 0, and flags that are 0 or
  unspecified never conflict.
* **all-X blocks held**: every all-X block gets flag 1. Transitions drop by
  about 90 % or more, but nearly every flag is specified, hold cubes are
  rarely shared, and specified bits grow several-fold.

| configuration (chains × cells, blocks) | free: transitions / specified bits | held: transitions / specified bits |
|---|---|---|
| s9234 (11 × 23, 1) | −1 % / +34 % | −92 % / +310 % |
| s13207 (21 × 34, 5) | −48 % / +38 % | −97 % / +943 % |
| s38417 (31 × 54, 6) | −50 % / +24 % | −96 % / +793 % |

The paper's one-block-per-chain results (for example s9234: 133 groups for
205 patterns, nearly all flags specified, 38 % fewer transitions) fall
between the two policies. So its encoder must specify the flags of some
all-X blocks, and it must trade storage against power in a way it does not
spell out.

## Choices not taken from the paper

* LFSR length, polynomial, output network and parallel seed load.
* The update flag is an extra LFSR output read in the first cycle; it costs
  no cycle of its own. This matches the published test-time figures.
* The held value comes from the chain's first cell. The paper places all added
  logic at the chain inputs and lists no extra register.
* HF-SRs rotate to keep the hold cube across patterns, and the first flag
  loaded belongs to the first block shifted in.
* The chains stand still while hold flags are loaded, and each pattern ends
  with a one-cycle capture.
* Reset clears all hold flags, so every block is LFSR-fed until the first hold
  cube arrives. The first pattern must carry update flag 1 if it needs any
  held block.
* The encoder and grouping in `workload_run` are a simple greedy version.
  It groups consecutive patterns and caps the equations per seed at the LFSR
  length minus 10. The paper's own partitioning algorithm is not reproduced
  here.
* The first block of a pattern holds the captured value of the first cell.
  The paper does not say what a held first block contains.
