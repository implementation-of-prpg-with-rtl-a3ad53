# PRESTO: a pseudorandom pattern generator with preselected toggling

Scan-based logic BIST normally loads the scan chains with plain pseudorandom
data. About half of all scan cells then flip on every shift clock, and the
circuit burns far more power during test than in normal operation. This
design is a low-power pattern generator that keeps the pseudorandom source
but lets you choose the switching activity in the scan chains ahead of time.
Those "preselected toggling" levels give the generator its name, PRESTO. The
same hardware works as a plain BIST generator, or as a test-data
decompressor fed by a tester. The circuit's responses are compacted into a
signature.

The main idea is small. Between the PRPG (pseudorandom pattern generator)
and the phase shifter sit one *hold latch* per PRPG stage. A latch in
**toggle mode** is transparent, so new random bits flow through. A latch in
**hold mode** repeats its last bit. Every scan-chain input is the XOR of
three latches, so a chain whose three latches all hold gets a constant
value and does not switch. Controlling how many latches toggle, and when,
controls the scan-in switching activity.

## Datapath

```
            +------+  N   +--------------+  N   +---------------+  M   scan_in
  seed ---->| PRPG |----->| hold latches |----->| phase shifter |-----> to CUT
  inj  ---->|(LFSR)|  |   +--------------+      | (3-input XORs)|
            +------+  |          ^ latch_en     +---------------+
                      |          |
                      |   +------+---------------------------+
                      +-->| weight logic -> shift register   |
                          |   -> toggle control register     |
                          | duty cycle control (T, counter)  |
                          +----------------------------------+
  scan_out (from CUT) ---> TRA (MISR) ---> signature
```

| Module | Role |
|---|---|
| `prpg` | 32-bit Fibonacci LFSR, x^32+x^22+x^2+x+1. In decompressor mode two tester channels are XORed into stages 10 and 21. |
| `hold_latches` | 32 hold latches. Each is a flip-flop plus a bypass multiplexer, so it is transparent when enabled and holds when disabled. |
| `phase_shifter` | 16 outputs. Output j is the XOR of latches j, j+s, j+2s (mod N). |
| `weight_logic` | Switching register. It turns PRPG bits into one enable bit per cycle with a programmable probability. |
| `toggle_control` | Shift register of weighted bits, plus the toggle control register. The control register is reloaded from the shift register once per pattern. |
| `duty_cycle_control` | Hold and Toggle registers, down counter, T flip-flop, No Hold detection. |
| `bist_controller` | Session sequencer: preload, shift, capture, unload, done. |
| `tra` | Test response analyzer: a 32-bit MISR (multiple-input signature register) over the 16 scan outputs. |
| `presto_top` | Connects everything. The circuit under test (CUT) is outside the top. |
| `presto_pkg` | Sizes, the `presto_cfg_t` control struct, the mode enum, and tap functions. |

## When a hold latch is transparent

This is the heart of the design. In a shift cycle, latch *i* is enabled when

```
latch_en[i] = first_cycle | (tcr[i] & (T | no_hold))
```

Outside shift cycles every latch holds. Three separate controls go into this
expression.

**Which latches: the toggle control register (`tcr`).** Each cycle,
`weight_logic` produces one bit that is 1 with a probability set by the
3-bit switching code:

| code | probability of 1 | | code | probability of 1 |
|---|---|---|---|---|
| 0 | 1/2 | | 4 | 1/2 |
| 1 | 1/4 | | 5 | 3/4 |
| 2 | 1/8 | | 6 | 7/8 |
| 3 | 1/16 | | 7 | 15/16 |

The bit is the AND of `code[1:0]+1` PRPG stages (3, 11, 19 and 27, in that
order). When `code[2]` is 1 the bit is inverted. The bits are shifted into a
32-bit shift register on every PRPG step. At the first shift cycle of each
pattern, the shift register is copied into `tcr`. So the fraction of 1s in
`tcr`, which is the fraction of toggling latches, follows the switching code.

**When: the hold/toggle duty cycle.** The T flip-flop splits each pattern
into alternating phases. When T=1 (toggle phase) the latches selected by
`tcr` toggle. When T=0 (hold phase) every latch holds. A 4-bit down counter
measures each phase. When it reaches 0, T flips and the counter reloads from
the register of the phase being entered. A toggle phase therefore lasts
`toggle_len+1` shift cycles and a hold phase lasts `hold_len+1`. At the first
shift cycle of every pattern, T is set to `t_init` and the counter to
`offset`. This lets each pattern start in either phase, for a chosen
duration.

**Overrides.**
- **No Hold.** If `hold_len` is 0, `no_hold` is ORed onto T, and the whole
  pattern stays in the toggle phase.
- **First cycle.** In the first shift cycle of every pattern, all latches are
  made transparent. This gives every latch a fresh, defined value before it
  may be held.

## A test session

`start` samples `mode`, `n_patterns`, `seed` and `cfg`. After that the
sequence is fixed, and `bist_controller` produces it:

| phase | cycles | what happens |
|---|---|---|
| start | 1 | The seed is loaded, the controls are sampled and the signature is cleared. |
| preload | N = 32 | The PRPG runs and the toggle shift register fills. `scan_en` is 0. |
| shift | CHAIN_LEN = 64 per pattern | `scan_en` is 1. `scan_in` is valid every cycle. The first of these cycles is `first_cycle`. |
| capture | 1 per pattern | `capture` is 1 for the CUT. |
| unload | CHAIN_LEN | The last responses shift out into the TRA. |
| done | until next `start` | `done` is 1 and `signature` is final. |

A session takes 1 + 32 + 65·P + 64 cycles for P patterns. The TRA compacts
`scan_out` in every shift cycle except those of the first pattern, because
the chains do not yet hold a captured response then. It also compacts in
every unload cycle.

**BIST mode** (`MODE_BIST`): the controls are delivered once, at `start`.

**Decompressor mode** (`MODE_DECOMP`): the tester drives `inj`, which is
XORed into the PRPG in every preload and shift cycle. This turns the PRPG
into a sequential decompressor. `cfg_load` also rises in every capture cycle
except the last. In that cycle the tester must present the next pattern's
`cfg`, which lets the encoder pick the switching code and duty cycle per
pattern. For example, `hold_len = 0` keeps a whole pattern in toggle mode.

The controls are one packed struct, `presto_cfg_t`:

| field | bits | meaning |
|---|---|---|
| `sw_code` | 3 | switching code (table above) |
| `hold_len` | 4 | hold phase length − 1; 0 = no hold phase |
| `toggle_len` | 4 | toggle phase length − 1 |
| `t_init` | 1 | 1 = each pattern starts in the toggle phase |
| `offset` | 4 | length − 1 of the first phase of each pattern |

## Which parts follow the reference architecture

These parts follow the published PRESTO architecture:
- the PRPG, hold latches and phase shifter chain;
- three latches per phase shifter output;
- a toggle control register with 1 = toggle, reloaded once per pattern from
  a shift register of weighted PRPG bits;
- a switching code, hold duty cycle and toggle duty cycle, delivered once per
  session in BIST mode;
- a down counter and T flip-flop loaded from Hold/Toggle registers and
  initialised every pattern (T value and offset);
- a No Hold override through an OR gate when the Hold register is 0000;
- a First cycle signal;
- the responses going to a test response analyzer.

These are this implementation's own choices:
- **Sizes.** 32-bit PRPG, 16 chains of 64 cells, 2 tester channels, 16-bit
  pattern counter. Only the 4-bit Hold/Toggle width comes from the reference.
- **PRPG.** An LFSR rather than a ring generator, with its polynomial and
  injection points.
- **Phase shifter taps.** See `presto_pkg::ps_tap`.
- **Weight set.** The set of weights and the PRPG stages that feed it.
- **Duty cycle conventions.** T=1 means toggle, and a phase lasts value+1
  cycles.
- **Hold latches.** Each one is a flip-flop plus a multiplexer, not a
  level-sensitive latch. There are no latches in the netlist, and a latch's
  output still follows its input in the same cycle.
- **Controller.** The whole session sequence, including the preload phase.
- **TRA.** A MISR, with its width and polynomial.
- **Decompressor mode.** The per-pattern reload of the controls in the
  capture cycle, and injection only during preload and shift.

Not included:
- the circuit under test (`tb/cut_model.sv` is a small behavioural stand-in);
- the software that selects the controls or encodes test cubes;
- any seed or control values tuned for a real circuit.

## Parameters

`presto_top` takes `N` (PRPG width), `POLY` (its feedback taps, bit k =
stage k), `M` (scan chains, at most N), `CHAIN_LEN`, `N_INJ` and `PAT_W`.
The defaults are set in `presto_pkg`. If you change `N`, also give a
primitive `POLY` of that degree. The weighting stages scale with N as
(2i+1)·N/8 − 1.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block against a reference written independently in the testbench and prints
`TB_RESULT checks=… failures=…`:

- `prpg_tb`, `tra_tb`: LFSR and MISR against models written from the
  polynomial exponents, including seed load, hold and injection.
- `hold_latches_tb`: transparency and hold under random enables.
- `phase_shifter_tb`: exact taps at the default size. It also checks, by
  flipping one input at a time, that every output of an 8×20 instance
  depends on exactly three latches.
- `weight_logic_tb`: all eight codes bit-exact, plus the measured
  probabilities (within ±0.03 over 4096 samples).
- `toggle_control_tb`: shift register and reload timing.
- `duty_cycle_control_tb`: phase sequences of 60 random configurations with
  idle cycles mixed in, including Hold = 0.
- `bist_controller_tb`: every control output, cycle by cycle, in both modes
  and with zero patterns.
- `presto_top_tb`: end to end at the default parameters. It runs four
  sessions of 40 patterns: BIST at 1/4, 15/16 and 1/16 toggling, then
  decompressor mode with random injections and per-pattern controls. A
  cycle-level reference model of the generator predicts `scan_in` in every
  shift cycle and the final signature. The test also checks the session
  length, and counts the hold phases, toggle phases, No Hold patterns, first
  cycles, held latches, register reloads, injections, per-pattern loads and
  captures. The measured scan-in toggle rates are about 0.49 (15/16, no
  hold), 0.11 (1/4, Hold 5 / Toggle 3) and 0.01 (1/16, Hold 15 / Toggle 1).

To run the end-to-end test with Verilator 5:

```
verilator --binary --timing -Irtl rtl/presto_pkg.sv rtl/*.sv \
    tb/cut_model.sv tb/presto_top_tb.sv --top-module presto_top_tb -o sim
./obj_dir/sim
```

For a unit test, replace the last two files with that block's testbench and
set `--top-module` to match. The package must be listed first.
