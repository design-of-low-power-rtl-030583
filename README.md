# Low-power logic BIST: PRESTO pattern generator with adaptive scan inputs

Logic built-in self-test (LBIST) shifts pseudorandom patterns into the scan
chains of a circuit. Random data flips about half of the scan cells on every
shift clock, which is far more switching than the circuit sees in normal
operation. That causes excess power, IR drop and heating during test. This RTL
lowers shift switching in two ways:

1. **PRESTO generator** (pseudorandom generator with *pre*selected *to*ggling).
   Hold latches sit between the PRPG (an LFSR) and the phase shifter. A latch
   that holds freezes its bit, and every scan chain whose phase-shifter inputs
   are all frozen receives a constant. Three 4-bit codes program what fraction
   of latches toggle and for how long. Switching activity can then be traded
   against test coverage from the tester, without changing the hardware.
2. **Transition controller** in front of every scan chain. The response bits
   leaving a chain steer a multiplexer, which either lets a new random bit in
   or repeats the previous bit. A repeat creates no transition.

A controller sequences the patterns, and a MISR compacts the responses into a
signature.

```
             +-------------------------- presto_generator ---------------------------+
 seed  ----->| lfsr_prpg (n) --+--> hold_latches (n) --> phase_shifter (n -> M) ----+---> M chain inputs
             |                 |        ^ enables                                   |
 codes ----->| lp_config_regs  |   toggle_control_register  +  hold_toggle_control  |
  (shadow)   |  switching ---> weighted_logic --^               (T flip-flop)       |
             +-----------------------------------------------------------------------+
 chain c:  ps_out[c] -> transition_controller -> scan_chain (k cells) -> misr input c
                              ^---- XOR of cells k-1, k ----'
 bist_controller: start / pattern load / k shifts / capture ... / unload / done
```

## How the switching activity is chosen

Every scan shift clock, the PRPG advances. Each hold latch either takes the
new PRPG bit (toggle mode) or keeps its value (hold mode). Phase-shifter output
`j` is the XOR of three latches. It changes only if one of its three latches
changed.

**Enable of latch i:**

    latch_en[i] = lp_bypass | (toggle_state & tcr[i])

- `lp_bypass` is 1 when the switching code is `0000`. Low-power operation is
  then off and every latch toggles on every shift clock, as in a plain LBIST.
- `tcr` is the **toggle control register**. During the shifting of a pattern,
  the switching weighted logic shifts one bit per clock into an n-bit shift
  register. At the next pattern start, that register is copied into `tcr`. The
  density of 1s in `tcr`, and with it the fraction of toggling latches, is set
  by the switching code.
- `toggle_state` is a **T flip-flop**. It divides the shift period into
  *toggle intervals* (`tcr` decides) and *hold intervals* (all latches frozen).
  The flip-flop inverts whenever its weighted logic outputs a 1. In a hold
  interval that logic uses the hold code, and in a toggle interval the toggle
  code, so the two codes set the mean lengths of the two intervals. Every
  pattern starts in a toggle interval.

**Weighted logic** (`weighted_logic`): four AND gates combine 1, 2, 3 and 4
PRPG bits, which gives a 1 with probability 1/2, 1/4, 1/8 and 1/16. Each gate
is enabled by one code bit, and the gate outputs are ORed:

| code bit | AND of | P(1) | as switching code: fraction of latches toggling | as hold / toggle code: mean interval length |
|---|---|---|---|---|
| `code[0]` | 1 PRPG bit | 1/2 | 50 % | 2 clocks |
| `code[1]` | 2 PRPG bits | 1/4 | 25 % | 4 clocks |
| `code[2]` | 3 PRPG bits | 1/8 | 12.5 % | 8 clocks |
| `code[3]` | 4 PRPG bits | 1/16 | 6.25 % | 16 clocks |

When several code bits are set, the probability is that of the OR of the
selected terms. A hold or toggle code of `0000` keeps the generator in that
interval. For example, hold `0000` with toggle `0000` gives toggle intervals
only, so the toggle control register alone controls the switching.

The switching weighted logic reads PRPG stages 0, n/4, n/2 and 3n/4. The
hold/toggle weighted logic reads the same stages offset by n/8. Because the
stages are n/4 apart, one clock's AND terms share no PRPG bit with the next
clock's.

**Shadow registers** (`lp_config_regs`): the three codes can be written at any
time (`cfg_we`). They take effect only at the next pattern start, so they stay
constant through the shift and capture of a pattern.

## The adaptive scan-chain input

Each chain has a multiplexer and a D flip-flop in front of cell 1:

    repeat       = tc_active & (cell[k-1] ^ cell[k])
    dff (shift)  <= repeat ? dff : ps_out[c]
    cell 1       <= dff

While a chain shifts, its last two cells hold responses of the previous
pattern on their way to the MISR. When they differ, the controller repeats the
last stimulus bit; when they agree, it takes a fresh random bit. The stimulus
therefore becomes correlated, with fewer transitions, in a way that depends on
the circuit's responses.

`tc_active` is `tc_enable & misr_en`. The feedback is used only while the
tails hold responses of the current run, which excludes the first pattern.
`tc_enable` switches the mechanism off entirely.

## A BIST run, clock by clock

`bist_controller` runs this sequence:

| phase | clocks | what happens |
|---|---|---|
| start | 1 | `start` accepted. PRPG seeded; hold latches cleared; shift and toggle control registers set to all 1; T flip-flop set to toggle; transition controller flip-flops cleared; MISR cleared |
| LOAD | 1 | `pattern_start`: working codes ← shadow codes, `tcr` ← shift register, T flip-flop ← toggle |
| SHIFT | k | `scan_en`: generator advances, new stimulus in, previous responses out into the MISR (not for pattern 0) |
| CAPTURE | 1 | `capture`: scan cells load `cut_response` |
| … | | LOAD, SHIFT and CAPTURE repeat for `NUM_PATTERNS` patterns |
| UNLOAD | k | last responses shifted into the MISR |
| DONE | – | `done` high and `signature` valid until the next `start` |

`done` rises `1 + NUM_PATTERNS·(k + 2) + k` clocks after the start clock. That
is 2209 clocks at the defaults. The run depends only on the seed, the codes and
the circuit's responses, so the same inputs always give the same signature.

In the first pattern of a run the shift register has no history yet, so every
latch toggles (`tcr` all 1), unless the hold/toggle codes create hold
intervals.

## Modules

All files are in `rtl/`, with one module or package per file.

| module | role |
|---|---|
| `lp_bist_top` | the whole engine: controller, generator, M transition controllers, M scan chains, MISR |
| `presto_generator` | PRPG, codes, toggle control, T flip-flop, hold latches, phase shifter |
| `lfsr_prpg` | n-bit Fibonacci LFSR with a primitive polynomial (x^32+x^22+x^2+x+1 at n = 32); an all-zero seed becomes 1 |
| `weighted_logic` | 4 AND terms + OR, probabilities 1/2 … 1/16 |
| `toggle_control_register` | n-bit shift register + n-bit toggle control register |
| `hold_toggle_control` | T flip-flop, hold/toggle code multiplexers, second weighted logic |
| `hold_latches` | n hold elements |
| `phase_shifter` | output j = latch j ⊕ latch (j+n/3) ⊕ latch (j+2n/3+1), mod n |
| `lp_config_regs` | shadow and working copies of the switching, hold and toggle codes |
| `bist_controller` | pattern and shift counters, run sequence |
| `transition_controller` | multiplexer + D flip-flop + tail XOR of one chain |
| `scan_chain` | k scan cells with shift and capture |
| `misr` | M-bit signature register, primitive-polynomial feedback |
| `lp_bist_pkg` | code type, configuration struct, polynomial table, tap functions |

All logic is on one clock with synchronous active-low reset.

## Parameters of `lp_bist_top`

| parameter | default | meaning |
|---|---|---|
| `PRPG_WIDTH` | 32 | n: PRPG, shift register, toggle control register and hold latches (8 to 32) |
| `NUM_CHAINS` | 16 | M: phase-shifter outputs, scan chains, MISR width (4 to 32) |
| `CHAIN_LEN` | 32 | k: cells per chain (≥ 2) |
| `NUM_PATTERNS` | 64 | patterns per run |

The source architecture gives no numbers for any of these. The defaults are
this design's choices. The polynomial table covers widths 4 to 32.

## Ports of `lp_bist_top` that need explanation

- `cut_response[c][i]` / `scan_cells[c][i]`: cell `i+1` of chain `c`. The
  circuit under test is not included. `scan_cells` carries the stimulus it
  sees, and `cut_response` carries what its scan flip-flops would capture. To
  use the engine on a real design, replace `scan_chain` with that design's
  scan flip-flops.
- `cfg_switching`, `cfg_hold`, `cfg_toggle`: the switching code, the hold duty
  cycle code (HC) and the toggle code (TC).
- Observation outputs: `pattern_idx`, `latch_en`, `toggle_state`, `lp_bypass`
  and `tc_repeat` (which chains repeat a bit this clock).

## Decisions not taken from the source architecture

The architecture is specified at the level of block diagrams and prose. The
following choices fill the gaps, and anyone adapting the design should check
them first:

- **Hold latches are enable flip-flops.** The architecture calls them
  transparent latches. Here a passed PRPG bit appears one clock later, which
  keeps the design single-clock and free of latch timing. This changes no
  statistic.
- **Bypass on switching code 0000.** The source diagram shows a gate on the
  switching register's outputs that reaches every latch enable. It is built
  here as "all latches toggle when the code is zero".
- **Reading of the transition controller diagram.** The tail XOR drives the
  multiplexer select, and input 1 is the D flip-flop's own output. A repeat
  happens when the two tail bits *differ*. Both the wiring and the polarity are
  interpretations of the diagram.
- **Unspecified details:** LFSR form and polynomial, phase-shifter taps, which
  PRPG stages feed the weighted logic, MISR polynomial, all sizes, the
  load/shift/capture sequence, the initial values at the start of a run, each
  pattern starting in a toggle interval, transition control being off during
  pattern 0, and the parallel write port of the shadow registers.
- **Not built:**
  - The circuit under test (an ISCAS'89 benchmark in the original evaluation).
  - The scan insertion / ATPG tool flow.
  - The dual-speed LFSR and the other earlier low-power schemes that the
    original work compares against.
  - Test-data decompression by encoding. The PRESTO generator can also act as
    a decompressor for deterministic patterns, but no encoder or reseeding
    path is described in enough detail to build.
- **The three goals the original work lists** (less repetition, pattern
  coverage, reduced switching) are not separate hardware modes here. They
  correspond to settings:
  - switching code `0000` with transition control off: plain random patterns,
    full coverage;
  - the switching, hold and toggle codes: reduced switching;
  - `tc_enable`: adaptive correlation.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against a reference model written independently inside the testbench
and prints `TB_RESULT checks=N failures=F`. Highlights:

- `tb_lfsr_prpg`: step-by-step comparison at 32 bits; maximal periods 255 and
  65535 at 8 and 16 bits.
- `tb_weighted_logic`: exhaustive; probabilities 8/16, 4/16, 2/16, 1/16.
- `tb_hold_toggle_control`: mean hold interval ≈ 2 clocks at hold code `0001`,
  and mean toggle interval ≈ 8 clocks at toggle code `0100`.
- `tb_presto_generator`: latch and phase-shifter values every clock. It also
  checks the toggle control register against the last n switching bits, its
  density (50 % at `0001`, about 6 % at `1000`), and the shadow-register
  timing. Phase-shifter output transitions over 40 patterns: 10441 with low
  power off, 1976 at switching code `1000`.
- `tb_lp_bist_top` (default parameters, four full runs, about 9000 clocks):
  - every clock, it checks shifting through the transition controllers,
    capture, and the MISR signature against a reference;
  - run length is 2209 clocks, and a repeated run gives the same signature;
  - transitions entering the chains: 16820 with low power off, 3337 at
    switching code `1000`, and 863 with density 1/4, hold/toggle intervals and
    transition control on;
  - it counts bypass, toggle intervals, hold intervals, controller repeats,
    captures, pattern loads, unload and a mid-run code change, and fails if
    any of them never happened.
- `tb_switching_sweep` (default parameters): one full run per setting, with
  transition control off. It measures how often a phase-shifter output changes
  between shift clocks and compares the rate with `r(p) = (1 - (1-p)^3) / 2`.
  Here `p` is the fraction of toggling latches: an output is the XOR of three
  latches, and an enabled latch changes with probability 1/2. Hold intervals
  scale `r` by the time share of toggle intervals. Measured rates vs
  expected:

  | switching code | p | measured | expected |
  |---|---|---|---|
  | `0000` (low power off) | 1 | 0.482 | 0.500 |
  | `0001` | 1/2 | 0.430 | 0.438 |
  | `0010` | 1/4 | 0.287 | 0.289 |
  | `0100` | 1/8 | 0.185 | 0.165 |
  | `1000` | 1/16 | 0.092 | 0.088 |
  | `0001`, hold `0010`, toggle `0010` | 1/2, half the time | 0.246 | 0.219 |

  Each measured rate must lie within 20 % of the expected one.
- `tb/cut_model.sv` is a small behavioural stand-in for the circuit under test.
  It is used only by `tb_lp_bist_top`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/lp_bist_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
./obj_dir/Vtb_lp_bist_top
```

Replace `tb_lp_bist_top` with any other `tb_*` module to run that block's
testbench. Each run takes well under a second. For lint, run
`verilator --lint-only -Wall -y rtl rtl/lp_bist_pkg.sv rtl/lp_bist_top.sv`,
which is clean.
