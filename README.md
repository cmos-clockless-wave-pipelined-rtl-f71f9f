# Clockless wave-pipelined 8-bit adder with edge-sensing completion detection

A wave-pipelined circuit has no registers inside its logic. New operands
enter before the previous result has left, so several "waves" of data
travel through the gates at once. The catch is the output end. Output bits
reach their final value at different times, because their paths differ in
depth and in gate delay. Conventional wave pipelining handles this with a
clock at the output that is carefully delayed ("intentional skew"). Getting
that delay right is hard.

This design drops the clock. Each output bit of the adder is watched by an
*edge-sensing circuit* (ESC), which emits a short pulse whenever the bit
changes. The pulses of all bits are ORed. The OR stays high from the first
change of a wave until one pulse width after the last change. Its falling
edge therefore marks the moment the whole word has settled, and at that
edge a latch takes the word. The skewed adder outputs, about 300 ps apart,
become an aligned word in which every bit changes at the same instant.
There is no clock and no request/acknowledge handshake: the data time
their own capture.

The datapath is an 8-bit carry-lookahead adder. Its carry tree is padded so
that every carry path crosses the same number of cells, which keeps the
skew small to begin with.

```
 a[7:0] b[7:0]
   |      |
 +-----------------+   p = a^b, g = a&b
 |  pg_generator   |
 +-----------------+
   |  p, g
 +-----------------+   3 levels of prefix cells + 1 row of padding
 | carry_generator |   (every column crosses 4 cells)
 +-----------------+
   |  f (= p, delayed), c (carry out of each bit)
 +-----------------+   sum[i] = f[i] ^ c[i-1], cout = c[7]
 |  sum_generator  |
 +-----------------+
   |  9 skewed bits ----------------+
   |                                |
   |                       +-----------------+  one edge-sensing circuit per bit,
   |                       |      escd       |  pulses ORed into "done"
   |                       +-----------------+
   |                                | done
 +-----------------+                |
 | pipeline_latch  |<---------------+  takes the word at done's falling edge
 +-----------------+
   |
 sum_q[7:0], cout_q   (aligned)
```

## How one wave travels (default delays)

The RTL carries picosecond gate delays, used only in simulation (see
[Timing model](#timing-model-and-what-synthesis-keeps)). With the defaults,
operands applied at time 0 go through these steps:

| time after operands | event |
|---|---|
| 150 ps | `p` and `g` of every bit are valid (PG generator, 150 ps) |
| 550 – 850 ps | carries leave the tree. A column with *n* prefix cells takes `150 + n·200 + (4−n)·100` ps. Column 1 has no prefix cell; column 8 has three. |
| 700 – 1000 ps | sum bits and carry-out change. Bit 0 is first (700 ps) and bit 7 last (1000 ps): **300 ps of skew** |
| 700 ps | `done` rises with the first output change |
| last change + 350 ps | `done` falls, and the latch takes all 9 bits at once: 1050 – 1350 ps |
| 1000 ps | the next operands enter (1 GHz) |
| 1700 ps | the next wave's first output change |

The word must be taken after this wave's last change and before the next
wave's first change. The whole design rests on this condition:

```
T_max + PULSE_W  <  T_period + T_min
1000  + 350      <  1000     + 700        (1350 < 1700: 350 ps of margin)
```

So the smallest operand period is `T_max − T_min + PULSE_W = 650 ps`.
Simulation agrees: every wave is captured correctly at a 660 ps period, and
waves are lost at 640 ps.

The pulse width also has a lower bound. A gap between two consecutive output
changes of one wave that is longer than `PULSE_W` splits `done` into two
pulses, and the latch then captures twice, first a half-settled word.
The second capture corrects it, but the output is no longer clean. In this
model no such gap exceeds the 300 ps skew, so a `PULSE_W` above 300 ps
and below 700 ps works at 1 GHz. The default is 350 ps.

A wave whose result equals the previous one changes no output bit. It then
produces no pulse, and the latch simply keeps the word, which is already
right.

## The carry tree and its padding

`carry_generator` is a Sklansky (divide-and-conquer) parallel-prefix tree
with one extra row of padding cells. Columns are numbered 1 to 8 from the
least significant bit. `P` marks a prefix cell, `→k` names the column it
combines with, and `d` marks a padding cell:

```
column:    8     7     6     5     4     3     2     1
level 1:   P→7   d     P→5   d     P→3   d     P→1   d
level 2:   P→6   P→6   d     d     P→2   P→2   d     d
level 3:   P→4   P→4   P→4   P→4   d     d     d     d
level 4:   d     d     d     d     d     d     d     d
```

A prefix cell (`pg_cell`) merges the propagate/generate pair of its own
span with that of the lower span below it: `P = Pl & Pr`,
`G = Gl | (Pl & Gr)`. After the tree, `c[i]` is the generate of bits
`i..0`, which is the carry out of bit `i` (the adder has no carry-in). In
RTL the rule is general: at level `l`, column index `i` (0-based) holds a
prefix cell when bit `l` of `i` is set, and its partner is
`((i >> (l+1)) << (l+1)) + 2**l − 1`.

A padding cell has no logic. It only delays its column by one cell time,
so every path crosses exactly four cells. The paths are therefore matched
in *depth*. They are not matched in *delay*, because the default prefix
cell (200 ps) is slower than a padding cell (100 ps), and that difference
is where the 300 ps output skew comes from. Set `PG_DLY == PAD_DLY` and
the carries all arrive together.

Each cell also passes along a third lane, `f`. Here `f` carries the bit's
own propagate `a ^ b` down beside the carries, so the sum XOR receives
both of its inputs through the same four cells. (The group propagate that
the tree also computes cannot serve the sum, since it covers a whole
span.)

## The edge-sensing circuit

The real ESC is analog. An RC differentiator turns an input edge into a
current spike: positive for a rising edge and negative for a falling one.
Two inverters built on different supply rails turn each polarity into a
logic pulse, and the two pulses are ORed. In effect the cell takes the
absolute value of the derivative.

`edge_sensing_circuit` is a **behavioural model** of that behaviour. Each
rising edge starts a `PULSE_W` pulse on a "positive" path. Each falling
edge starts one on a "negative" path. The output is the OR of the two.
Edges closer together than `PULSE_W` stretch the pulse. This covers
glitches: a bit that changes twice within a wave yields a single longer
pulse. The model cannot be synthesized. A silicon implementation would
need the analog cell, or a digital one-shot such as an XOR against a
delay line.

`escd` holds nine ESCs, one for each sum bit and one for the carry-out,
plus the OR. The OR is ordinary logic.

## The latch

`pipeline_latch` takes the 9-bit word on the **falling** edge of `done`
and holds it until the next falling edge. It has an asynchronous
active-low clear. A level latch that is transparent while `done` is high
would pass the skew straight through, so it would not align anything. The
trailing edge is the only point in the pulse where every bit is known to
have settled. Synthesis produces 9 flip-flops clocked by `done`.

## Timing model and what synthesis keeps

The combinational modules give each bit its own delayed continuous
assignment: `assign #(DLY) y[i] = ...`. Per-bit assignments matter,
because a simulator applies one delayed assignment to a whole vector as a
single inertial event, and changes to different bits then cancel each
other. The delays are inertial, so a pulse shorter than a gate's delay does
not get through that gate.

| parameter (package `wpa_pkg`) | default | where |
|---|---|---|
| `ADD_WIDTH` | 8 | operand width |
| `GATE_DLY_PS` | 150 ps | XOR/AND of the PG generator |
| `PG_DLY_PS` | 200 ps | prefix cell |
| `PAD_DLY_PS` | 100 ps | padding cell |
| `SUM_DLY_PS` | 150 ps | sum XOR (the carry-out takes no gate) |
| `PULSE_W_PS` | 350 ps | ESC pulse width |
| `IN_PERIOD_PS` | 1000 ps | operand period used by the testbenches (1 GHz) |

The 8-bit width, the 1 GHz rate and the ~300 ps skew are the published
design's figures. The individual delays are this implementation's choice.
They were picked to reproduce that skew. The original circuit is
transistor-level static CMOS in a 0.35 µm, 3.3 V process, and its delays
also depend on the data; a fixed delay per gate does not capture that.

Synthesis drops every delay. The adder then becomes an ordinary
combinational adder (52 word-level cells) and the latch 9 flip-flops. The
wave-pipelining behaviour exists only in simulation, or in silicon whose
delays are matched as above. `edge_sensing_circuit`, and through it `escd`
and `wave_pipelined_adder`, are not synthesizable.

## Where this RTL departs from, or fills in, the original description

- **Gate delays, ESC pulse width and reset** are not given in the original
  description. They are chosen here as described above.
- **Lane `f`** appears in the cell drawings without explanation. Reading it
  as the delayed bit propagate is an interpretation.
- **The prefix-cell function** is the standard carry-lookahead operator.
  The cell's port names (`f, Pl, Gl, Pr, Gr → f, P, G`) follow the
  original.
- **The carry-out** is taken straight from the top carry, without an extra
  gate.
- **The latch type**: the original only says that the completion pulse
  latches the data. Trailing-edge capture is what makes the bits align.
- **The ESC** is a behavioural model, not the RC/inverter circuit.
- **No carry-in**: the adder takes only A and B, as in the original.

## Files

| file | contents |
|---|---|
| `rtl/wpa_pkg.sv` | width, delay constants, `result_t` |
| `rtl/pg_generator.sv` | per-bit propagate and generate |
| `rtl/pg_cell.sv` | prefix operator cell |
| `rtl/carry_generator.sv` | padded Sklansky tree |
| `rtl/sum_generator.sv` | sum XORs and carry-out |
| `rtl/cla_adder.sv` | the three stages together (skewed outputs) |
| `rtl/edge_sensing_circuit.sv` | behavioural ESC |
| `rtl/escd.sv` | ESC per bit + OR → `done` |
| `rtl/pipeline_latch.sv` | trailing-edge capture |
| `rtl/wave_pipelined_adder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports: `rst_n`, `a[7:0]`, `b[7:0]` in. `sum_q[7:0]` and `cout_q`
out, aligned. `sum_skewed`, `cout_skewed` and `done` are also brought out
so the skew and the completion pulse can be watched.

## Simulating

Every file starts with `` `timescale 1ps/1ps ``. Delays need Verilator's
timing support:

```
verilator --binary --timing --assert -Irtl rtl/wpa_pkg.sv \
    tb/tb_wave_pipelined_adder.sv --top-module tb_wave_pipelined_adder
./obj_dir/Vtb_wave_pipelined_adder
```

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog that counts a failure if the run hangs. The same command works
for any other testbench once its name is swapped in. Lint with
`verilator --lint-only -Wall -Irtl rtl/wpa_pkg.sv rtl/<module>.sv`.

## Verification

- `tb_pg_generator`, `tb_carry_generator`, `tb_sum_generator`,
  `tb_cla_adder`: all 65 536 operand pairs, checked against a reference
  computed bit by bit in the testbench. The carry test also times every
  column of the tree against `n·PG_DLY + (4−n)·PAD_DLY`. The adder test
  times the 700 ps / 1000 ps earliest and latest output change, and runs
  2000 back-to-back operand pairs at 1 GHz.
- `tb_pg_cell`: all 32 input combinations, plus the cell delay.
- `tb_edge_sensing_circuit`: pulse start and end for rising edges, falling
  edges, glitches and separated edges, and no pulse on a quiet input.
- `tb_escd`: 400 rounds of random bits changing at random times inside a
  300 ps window. Checks one pulse from the first change to 350 ps after the
  last, only the changed bits pulsing, and no pulse when nothing changed.
- `tb_pipeline_latch`: clear, and capture only on the falling edge.
- `tb_wave_pipelined_adder`: the full design at its default parameters.
  It runs 4000 waves at 1 GHz, of which one in eight repeats its
  predecessor. Each wave checks the result, the single completion pulse and
  its timing (first change to last change + 350 ps), capture between
  1050 ps and 1350 ps, and a single-instant latch update. The run also
  counts how often each mechanism occurred: skewed waves, pulses merged
  across several bits, quiet waves with no pulse, and aligned updates. It
  fails if any count is zero.

Each testbench was also run against a copy of its module with one
deliberate bug, and caught it. Examples: OR in place of AND for the
generate term, the wrong partner column in the tree, capture on the rising
edge of `done`, and a 100 ps pulse that is shorter than the skew.
