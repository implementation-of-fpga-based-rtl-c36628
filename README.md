# On-chip trained neural network for 4x4 character recognition

A user draws a character on a 4x4 grid of 16 toggle switches. A three-layer
perceptron classifies it as one of 29 letters (20 English, 9 Arabic). All
arithmetic is IEEE-754 single precision. The network is trained on the chip
itself, by back propagation. A training supervisor drives that training from
a stored set of 29 character bitmaps. The winning class is shown on a 2x16
character LCD and on LEDs.

The system is modelled on the one in the thesis *Implementation of
FPGA-Based Artificial Neural Network for Character Recognition* (O. S. Salman,
Universiti Malaysia Perlis). That thesis built it in VHDL for an Altera
Cyclone II on a DE2 board. The thesis fixes the system-level facts:

- 16 switch inputs;
- a three-layer network;
- 29 classes (20 English, 9 Arabic);
- 32-bit floating point;
- back-propagation training by a training supervisor;
- the most probable class shown on an LCD;
- an LFSR among its parts.

It does not describe the insides of the blocks, so the microarchitecture here
is this design's own. The section "Departures and open points" lists every
choice that was not fixed by the source.

## Structure

```
 sw[15:0] ─► switch_input ─► grid ──────────────┐
                                                 ▼   (recognition command)
 train_btn ─► train_supervisor ─(training cmds)─► ann_core ─► class ─► pattern_rom (names)
               └ pattern_rom (training set)       ├ fp32_mac (fp32_mul + fp32_add)
                                                  ├ sigmoid_pla, bp_delta, fp32_mul (eta*delta)
                                                  ├ weight_ram W1 (16x17), W2 (29x17)
                                                  └ lfsr_weight_init
                                                                 ▼
                                         ledg / ledr       lcd_ctrl ─► LCD
```

`ann_char_rec_top` connects the blocks. While the supervisor is training, it
owns the core's command port. The rest of the time, every change of the grid
queues one recognition command. The end of a training run also queues one.

## The network core (`ann_core`)

**Network.** The sizes are 16 inputs, N_H = 16 hidden neurons and 29 output
neurons, one per class. Each hidden and output neuron also has a bias weight
with a constant input of 1.0. The activation is the logistic function, in
piecewise-linear form. The answer is the arg-max of the 29 outputs.

**One arithmetic unit.** A single multiply-add, `y = c + a*b`, does every
multiplication and addition of the weighted sums and weight updates, one per
clock. The product is rounded, then the sum is rounded. The activation, the
delta term and `eta*delta` each have a small unit of their own, used once
per neuron.

**Weight memories.** The weights sit in two simple dual-port RAMs with a
registered read:

- W1: word `j*17 + i` is the weight from input `i` to hidden neuron `j`
  (`i = 16` is the bias).
- W2: word `k*17 + j` is the weight from hidden neuron `j` to output `k`
  (`j = 16` is the bias).

**The loop.** Each phase of a command walks a rows × columns grid with a
two-stage loop:

- Stage 0 presents one RAM address per clock.
- Stage 1 gets the word one clock later and feeds it to the multiply-add.
- The running sum is kept in `acc`. The first column of each row starts the
  sum from zero.
- At the last column of a row, stage 1 stores the row's result: an
  activation or a delta.
- In the update phases, stage 1 writes the new weight back to the address
  it just read (read-modify-write). The next read is always a different
  word, so there is no hazard.

| phase | rows × columns | what it does | clocks |
|---|---|---|---|
| `PH_FH` | 16 × 17 | `h_j = sig(Σ W1[j][i]·x_i + b_j)` | 273 |
| `PH_FO` | 29 × 17 | `o_k = sig(Σ W2[k][j]·h_j + b_k)`, running arg-max; when training also `d2_k = (t_k − o_k)·o_k(1−o_k)` | 494 |
| `PH_BH` | 16 × 29 | `d1_j = (Σ_k W2[k][j]·d2_k)·h_j(1−h_j)`, W2 read by column | 465 |
| `PH_UW2` | 29 × 17 | `W2[k][j] += η·d2_k·h_j` | 494 |
| `PH_UW1` | 16 × 17 | `W1[j][i] += η·d1_j·x_i` | 273 |

Counting one clock to accept the command and one to finish it:

- A recognition takes **768 clocks**.
- A training step on one pattern takes **2001 clocks**: a forward pass, then
  a full back-propagation update.
- The initial weight fill takes 767 clocks.

The hidden deltas are computed with W2 *before* its update, as in textbook
back propagation. `done` pulses when a command ends. `class_out` and
`class_score` then hold the winner of that command's forward pass. For a
training command, this is the class before the update.

**Targets.** The target is 0.9 for the pattern's class and 0.1 for the
others. This choice matters. The piecewise-linear sigmoid reaches exactly 0
and 1 for |x| ≥ 5. There the derivative term `y(1−y)` is zero, and with 0/1
targets the outputs that saturate early stop learning. In a software model
of this network, 0/1 targets failed to converge for two of three random
starts. With 0.9/0.1 targets and η = 1 it converged in 51–81 epochs.

**Initial weights.** `PH_INIT` writes all 765 words from a 32-bit Galois
LFSR with taps x^32+x^22+x^2+x+1. Each word has a random sign and a
magnitude in [0.125, 0.5).

## Arithmetic units

- `fp32_mul`, `fp32_add`: combinational single precision with round to
  nearest, ties to even. They differ from full IEEE-754 as follows:
  - subnormal inputs count as zero, and results below the normal range are
    flushed to zero;
  - NaN results are always 0x7FC00000;
  - no exception flags.

  For normal numbers the results are bit-exact. The testbenches check this
  against double-precision arithmetic rounded back to single precision.
- `sigmoid_pla`: PLAN approximation of the logistic function, mirrored for
  negative x (`1 − f`):
  - f = 1 for |x| ≥ 5;
  - f = |x|/32 + 0.84375 for 2.375 ≤ |x| < 5;
  - f = |x|/8 + 0.625 for 1 ≤ |x| < 2.375;
  - f = |x|/4 + 0.5 for |x| < 1.

  The slopes are powers of two, so each is an exponent decrement. Two adders
  do the rest. The error is below 0.02. The published segments step down by
  0.004 at |x| = 2.375, so the curve is not strictly monotonic there.
- `bp_delta`: `err · (y · (1 − y))`, rounded after each step.
- `fp32_mac`: `c + a·b`, as a multiply followed by an add (not fused).

All of these are single-cycle combinational paths, and the core chains the
multiply-add and sigmoid in one clock. That is convenient for simulation. On
an FPGA it limits the clock to a few tens of MHz. The 50 MHz board clock
would need pipelining or a slower clock enable. This is not done here (see
below).

## Training supervisor (`train_supervisor`)

A start request runs one training:

1. Fill the weights from the LFSR.
2. Run epochs. Each epoch presents classes 0..28 in order, one training
   command each.
3. Count an error when the forward pass of a pattern (before its own update)
   picks the wrong class.
4. Stop after the first epoch with no errors (`trained = 1`), or after
   `MAX_EPOCHS` (default 1000, `trained = 0`).

One epoch is 29 × 2001 = 58,029 clocks. With the default seed, training
converges after 78 epochs: about 4.5 M clocks, 0.09 s at 50 MHz. The top
starts a training run after reset and on every rising edge of `train_btn`.
The LFSR is not reset between runs, so each retraining starts from new
weights.

## Training set (`pattern_rom`)

Grid packing: `pattern[15:12]` is the top row and bit 15 is its left cell.
On the board, `sw[15]` is the top-left switch. The names are 8 ASCII
characters, padded with spaces.

| class | name | bitmap | class | name | bitmap | class | name | bitmap |
|---|---|---|---|---|---|---|---|---|
| 0 | A | 69F9 | 10 | K | 9AE9 | 20 | ALIF | 4444 |
| 1 | B | EF9E | 11 | L | 888F | 21 | BA | 09F4 |
| 2 | C | 7887 | 12 | M | 9FF9 | 22 | TA | A09F |
| 3 | D | E99E | 13 | N | 9DB9 | 23 | THA | 4A9F |
| 4 | E | FE8F | 14 | O | F99F | 24 | JIM | E2C7 |
| 5 | F | F8E8 | 15 | P | E9E8 | 25 | HA | E2C3 |
| 6 | G | 78B7 | 16 | Q | F9BF | 26 | KHA | 2E43 |
| 7 | H | 9F99 | 17 | R | E9E9 | 27 | DAL | 422E |
| 8 | I | E44E | 18 | S | 7C3E | 28 | DHAL | 822E |
| 9 | J | 72A4 | 19 | T | F444 | | | |

The source fixes the counts (20 English, 9 Arabic) but not which letters or
their bitmaps. Here the letters are A–T and alif…dhal, and the 4x4 drawings
are this design's own. All 29 bitmaps are distinct. JIM and HA differ in one
cell, which makes them the hardest pair to separate.

## Switches, LEDs and LCD

- `switch_input`: two synchroniser flip-flops per switch. A change of the
  synchronised grid gives a one-clock pulse. The LEDs show the new class 773
  clocks after a switch changes: 3 clocks to synchronise and detect the
  change, 768 for the forward pass, 2 to start and to register the result.
- `ledr` echoes the grid. `ledg[4:0]` is the class, `ledg[5]` means a result
  is shown, `ledg[6]` means training, `ledg[7]` means the last training
  converged.
- `lcd_ctrl`: drives an HD44780-type 2x16 display over an 8-bit, write-only
  bus.
  - After a power-on wait it sends 0x38, 0x0C, 0x01 and 0x06.
  - Then it loops: 0x80, the 16 characters of line 1, 0xC0, the 16
    characters of line 2. A new text appears within one refresh.
  - Timing parameters, in clocks: `T_PWR` (20 ms), `T_EN` (setup time and
    enable width, 320 ns), `T_CMD` (50 µs per transfer), `T_CLR` (2 ms after
    a clear). The defaults assume 50 MHz.
- LCD text:
  - while training: `TRAINING...` and `EPOCH eeee E=nn` (hex epoch count,
    errors of the last epoch);
  - afterwards: `RECOGNISED:` (or `NOT CONVERGED`) and `CLASS nn: NAME`.

## Departures and open points

- **Own choices.** These are not given by the source:
  - hidden size 16;
  - one output per class with arg-max;
  - bias weights;
  - η = 1.0;
  - targets 0.9/0.1;
  - on-line (per-pattern) updates;
  - the PLAN sigmoid and its derivative `y(1−y)`;
  - the single shared multiply-add;
  - the stopping rule;
  - the training bitmaps and letter choice;
  - the LCD text and timing;
  - the LFSR polynomial, seed and weight range;
  - training at reset.
- **Recognition rates.** The source reports recognition rates of 76.92 %
  (English) and 32.14 % (Arabic) on test patterns it does not list. Those
  figures cannot be reproduced here. On its own training set, this network
  reaches 100 % by construction of the stopping rule.
- **Timing closure.** The floating-point operators are combinational, and
  one clock chains a multiply, an add, the sigmoid and the delta. Timing
  closure at 50 MHz on a Cyclone II has not been attempted. Pipelining the
  multiply-add would need extra drain clocks per row in `ann_core`.
- **Weight storage.** The weights fit block RAM (765 × 32 bits). The 16+16+29
  activation and delta registers are flip-flops.
- **Floating point.** Subnormals are flushed, as described above.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `fp32_mul_tb`, `fp32_add_tb`, `fp32_mac_tb`, `bp_delta_tb` | bit-exact against double precision rounded to single (`tb/fp_ref_pkg.sv`) |
| `sigmoid_pla_tb` | bit-exact against the segment formula; error < 0.02 against the true logistic function |
| `weight_ram_tb`, `lfsr_weight_init_tb`, `pattern_rom_tb`, `switch_input_tb`, `lcd_ctrl_tb` | behaviour and timing of each block |
| `ann_core_tb` | training and recognition commands on random grids against a software model of the whole network: every weight compared bit for bit after each command, and the clock counts |
| `train_supervisor_tb` | command order, error counting and stopping rule, convergence, then recognition of all 29 patterns; a second instance stops at its epoch limit |
| `ann_char_rec_top_tb` | end to end with short LCD delays. It covers training, recognition of all classes on the LEDs and LCD, retraining by button, and an unconverged run. It counts each mechanism. |
| `ann_char_rec_top_full_tb` | the top with all defaults: training to convergence, all 29 classes, 773-clock latency, LCD text at real timing |

`tb/hd44780_model.sv` is a behavioural model of the display.

To run a testbench with Verilator 5:

```
verilator --binary --timing --top-module ann_core_tb -Irtl -y rtl -y tb \
    rtl/ann_pkg.sv tb/ann_core_tb.sv
./obj_dir/Vann_core_tb
```

The full-size top test simulates about 5 M clocks and runs in a few
seconds. All RTL parameters have typed defaults. `N_H`, `ETA`, `MAX_EPOCHS`
and the LCD delays can be changed at the top. `N_I` and `N_O` are tied to
the grid and the training set through `ann_pkg`.
