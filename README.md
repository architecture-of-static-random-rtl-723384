# Reversible-logic SRAM and FIR filter

Reversible gates lose no information: every output pattern maps back to exactly
one input pattern. In principle a circuit made only of them need not dissipate
the kT·ln 2 per erased bit that ordinary logic does. This RTL describes two
circuits built in that style from two reversible primitives, the **Fredkin**
(controlled-swap) gate and the **Feynman** (controlled-NOT) gate:

1. **A 16-word × 8-bit static RAM.** Each bit cell uses a Fredkin gate as its
   access device and a Feynman + Fredkin pair as its storage latch. The word
   line is passed from cell to cell along a row.
2. **A four-tap FIR filter**, `y[n] = c0·x[n] + c1·x[n-1] + c2·x[n-2] + c3·x[n-3]`,
   with 12-bit samples and 4-bit coefficients. Its arithmetic is built from
   Fredkin gates: full adders, AND arrays, shifters and a shift-and-add
   multiplier. Its delay line uses Fredkin-selected D flip-flops.

The two circuits share nothing except clock and reset. The top level
`rsram_fir_top` puts them side by side with separate ports.

All code is synthesizable SystemVerilog (IEEE 1800-2017). Gates are written
as logic equations, so a synthesis tool will merge them into ordinary cells.
The RTL gives the reversible *structure* and its function. It does not
claim the energy properties of a real reversible implementation.

## The two primitives

| gate | inputs | outputs |
|---|---|---|
| Fredkin (`fredkin_gate`) | A, B, C | P = A, Q = A'B + AC, R = A'C + AB |
| Feynman (`feynman_gate`) | A, B | P = A, Q = A ⊕ B |

A Fredkin gate passes B and C straight through when A = 0 and swaps them when
A = 1. Every building block below uses this property in one of three ways:

* **as a 2:1 multiplexer.** Take R with B = "new", C = "old": R = A ? new : old.
* **as an AND.** Take Q with B = 0: Q = A·C.
* **as an XOR.** Take Q with C = ¬B: Q = A ⊕ B. This needs an inverter.

Outputs that nothing uses are the "garbage" outputs of reversible design. In
the RTL they are wired to named signals and left unused, which is why lint
reports unused signals.

`fredkin_gate` has a `WIDTH` parameter. Its default of 1 is the 3×3 gate. A
larger value gives a bank of gates with one shared control, which the wide
datapaths use.

## The reversible SRAM

### Bit cell (`rsram_cell`)

The cell is the least conventional part of the design. In signal order it is
built from these gates:

| gate | connection | function |
|---|---|---|
| access Fredkin | A = wl_in, B = bit_in, C = stored | P → `wl_out`; R = wl_in ? bit_in : stored |
| latch Fredkin | A = we, B = access.R, C = stored | R = next stored value |
| Feynman | A = stored, B = 0 | two copies of the stored bit |
| read-select Fredkin | A = wl_in, B = 0, C = re | Q = wl_in·re |
| drive Fredkin | A = stored copy, B = read-select, C = 0 | R = `bl`, Q = `blb` |

The behaviour that follows:

* **Write.** On a rising clock edge with `wl_in = 1` and `we = 1`, the cell
  stores `bit_in`. In any other case it keeps its value. The access gate
  follows the original cell's truth table: with WL = 0 its third output is
  the stored data, with WL = 1 it is the bit line.
* **Read.** With `wl_in = 1` and `re = 1`, the cell drives `bl = stored` and
  `blb = ¬stored`. Otherwise it drives both lines low, so the lines of all
  rows in a column can be ORed.
* **Word-line chaining.** The access gate's P output is `wl_in` passed
  through. It is the `wl_out` that enables the next cell in the row, so only
  the first cell of each row is driven by the decoder.

The stored bit is held in an edge-triggered register, not in a level-sensitive
latch. It has no reset, as in any SRAM.

### Array (`rsram_array`, `row_decoder`, `decoder_2to4`, `sense_amp`)

```
 addr[3:2] ─► 2-to-4 ─► en of four 2-to-4 decoders ◄─ addr[1:0]
                               │ 16 word lines
                               ▼
   row r:  wl[r] ─► cell0 ─wl─► cell1 ─wl─► … ─► cell7
                      │bl/blb     │              │
 din ─► write circuit ─► column write lines (bit_in of every cell in a column)
 column c: OR of bl/blb over 16 rows ─► sense_amp[c] ─► dout[c]
```

* **Row decoder.** The word lines come from four 2-to-4 decoders with enable.
  A fifth 2-to-4 decoder on the high address bits drives their enables. The
  decoder as a whole is enabled only while `we` or `re` is high.
* **Write circuit.** During a write, `din` is placed on the column write
  lines. Only the addressed row has `wl = 1`, so only that row stores it.
* **Sense amplifiers.** There is one per column. On a rising edge with sense
  enable (`re`) it resolves the differential pair: (1,0) gives 1 and (0,1)
  gives 0. If the pair is not differential it keeps its old output. An
  assertion flags sensing when no cell drives the column. This is a
  logic-level model of what is an analog amplifier in silicon.

### SRAM interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `addr` | in | 4 | word address |
| `we` | in | 1 | write the word at `addr` at this rising edge |
| `re` | in | 1 | read the word at `addr` at this rising edge |
| `din` | in | 8 | write data |
| `dout` | out | 8 | read data, valid after the read edge, held until the next read |
| `dout_valid` | out | 1 | high for the cycle after a read |

The memory has a single port and is synchronous. `we` and `re` must not be
high together, which an assertion checks. A read returns a word written on any
earlier edge, including the edge just before. `dout` and `dout_valid` reset
asynchronously (`rst_n` low). The stored words do not reset.

## The FIR filter

### Arithmetic blocks

* **`fredkin_full_adder`** is made of three Fredkin gates and two inverters.
  `hp = a ⊕ b` comes from one gate, `sum = hp ⊕ cin` from a second, and
  `carry = hp ? cin : a` from a third. The third works because the carry is
  `a` when a = b and `cin` otherwise.
* **`fredkin_adder`** is an unsigned ripple-carry adder of `S_W` full adders.
  Operands are zero-extended and carry in is 0. The defaults are 15-bit +
  16-bit → 17-bit, which uses 17 full adders. At those sizes the sum cannot
  overflow, so `cout` is always 0.
* **`fredkin_and_array`** forms a partial product, a W-bit word ANDed with one
  bit. It uses one Fredkin gate per bit (default W = 12).
* **`bit_shifter`** moves a 12-bit word by up to `MAX_SHIFT` = 2 places into a
  14-bit result. The direction is `SHIFT_LEFT` (towards the MSB) or
  `SHIFT_RIGHT` (towards the LSB, zero-filled). The shift distance `amt` is an
  input. It is built as a log-depth barrel of Fredkin multiplexers.
* **`fredkin_multiplier`** computes 12 × 4 → 16 bits, unsigned. For each
  multiplier bit i, an AND array forms `pp_i = a·b[i]` and a shifter moves it
  `i` places (`MAX_SHIFT` = 3 here, giving 15 bits). Three 15 + 16 → 17-bit
  Fredkin adders then accumulate `acc_i = acc_{i-1} + (pp_i << i)`. The
  top sum bit is always 0 and is dropped. The multiplier is combinational.
* **`fredkin_dff`** is a register whose next state is R of a Fredkin gate:
  `en ? d : q`. It has an asynchronous active-low reset to 0. With `en = 1` it
  is a plain D flip-flop.

### Filter datapath (`fir_filter`)

```
x_in ─► [tap0] ─► [tap1] ─► [tap2] ─► [tap3]       (fredkin_dff, shift on in_valid)
          │×c0      │×c1      │×c2      │×c3        (fredkin_multiplier, 16 b)
          └───► + ──┴───► + ──┴───► + ──┘          (fredkin_adder chain, 18 b)
                                         └─► [y_out] (fredkin_dff)
```

* **Delay line.** When `in_valid = 1` at a rising edge, `x_in` enters tap 0 and
  every tap shifts one place. When `in_valid = 0` the line holds, which is a
  stall: any number of idle cycles may separate samples.
* **Products.** Each tap has its own multiplier.
* **Sum.** A chain of Fredkin adders adds the products into `OUT_W` = 16 + 2 =
  18 bits. That is enough for four maximum products (4 · 4095 · 15 = 245 700).
* **Coefficients.** `coef[k]` multiplies tap k. They are an input port, read
  combinationally. Hold them steady while samples flow, and change them only
  once the last output has appeared.
* **Latency.** A sample presented with `in_valid` before edge E enters the line
  at E. Its result `y_out` appears, with a one-cycle `out_valid` pulse, after
  edge E+1. The filter accepts one sample per cycle.
* **Reset.** Reset clears the line, so the first outputs treat earlier samples
  as 0.

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid` | in | 1 | a sample is on `x_in` |
| `x_in` | in | 12 | sample, unsigned |
| `coef[0:3]` | in | 4 each | coefficients, unsigned |
| `out_valid` | out | 1 | `y_out` holds a new result |
| `y_out` | out | 18 | Σ c_k · x[n−k] |

## Top level (`rsram_fir_top`)

The top level has `clk`, `rst_n`, the SRAM port prefixed `mem_` and the filter
port prefixed `fir_`. It has no parameters. Sizes come from `rlogic_pkg`:
16 × 8 memory, 4 taps, 12-bit data, 4-bit coefficients and 18-bit output.
The lower-level modules have parameters with these values as defaults. The
exception is `rsram_array`, whose decoder is fixed at 16 rows.

## What follows the original design and what does not

The following come from the original design description:

* the 16 × 8 organisation;
* the Fredkin access gate and its truth table;
* the Feynman + Fredkin latch;
* word-line chaining from cell to cell;
* enabled 2-to-4 decoders, a write circuit and per-column sense amplifiers;
* the four-coefficient filter built from Fredkin multipliers, adders and flip-flops;
* the sizes 12 × 4 → 16 (multiplier), 15 + 16 → 17 with 17 full adders
  (adder), 12 → 14 by two places (shifter) and 12 × 1 → 12 (array).

These are choices made here:

* **Storage.** The original flip-flop and cell are clocked Fredkin latches.
  Here the storage is an edge-triggered register, with the Fredkin gate only
  choosing the next state. So timing analysis and simulation see ordinary
  flip-flops.
* **Exact gate arrangement.** The original gives garbage-output counts and a
  quantum cost of 16 for its cell. This netlist does not reproduce them:
  the read-select gate and the drive gate are additions.
* **Fifth decoder.** The decoder that produces the enables of the four 2-to-4
  decoders is an addition.
* **Shift direction.** The original shifter is described both as a "right"
  shift and as producing a 14-bit result from 12 bits. Only a shift towards
  the MSB needs the extra bits, and the multiplier needs exactly that. That
  is the direction used. The zero-filled shift the other way is available
  through `dir`. The variable shift amount is an addition so the multiplier
  can reuse the block.
* **Flip-flop in the adder.** The original lists a flip-flop among the parts
  of the adder. Here the adder is combinational and the registers sit in the
  filter.
* **Conventions.** Every interface convention was chosen here: unsigned
  arithmetic, valid strobes, coefficients as a port, the 18-bit output, the
  two-cycle filter latency, the synchronous single-port SRAM protocol, the
  OR-combined read lines and the reset style.
* **Not modelled.** The conventional six-transistor CMOS cell appears only as
  background. Power, delay and area figures from 65 nm synthesis are outside
  what RTL can show.

Lint notes. The unused-signal warnings come from the garbage outputs. The
"flopped as both synchronous and async" warning on `rst_n` comes from the
`disable iff (!rst_n)` clauses of the assertions, not from the logic.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each compares
against values computed independently in the testbench: integer arithmetic, a
reference memory array, or a software model of the filter history. Each ends
by printing `TB_RESULT checks=N failures=M`. Coverage:

* the gates, full adder and decoders are checked exhaustively;
* the adders, array, shifter and multiplier are checked on corner and random
  operands;
* the flip-flop, cell and sense amplifier are checked against cycle-level
  reference models;
* the SRAM array is checked on fill and read-back, walking ones and zeros,
  random traffic, read-after-write and output hold;
* the filter is checked on an impulse response, maximum values, random
  streams with stalls, and exact two-cycle latency.

`tb_rsram_fir_top` runs both designs at once, at full size. It counts each
mechanism (writes, reads, read-after-write, output hold, every row read,
filter stalls, filter outputs, both designs active in the same cycle) and
fails if any never happened.

To simulate one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rlogic_pkg.sv tb/tb_rsram_fir_top.sv --top-module tb_rsram_fir_top
./obj_dir/Vtb_rsram_fir_top
```

Replace the file and top name to run another testbench. Every testbench
finishes in well under a second.

## Files

* `rtl/rlogic_pkg.sv` holds the shared sizes and the shift-direction enum.
* `rtl/fredkin_gate.sv` and `rtl/feynman_gate.sv` are the two primitives.
* The SRAM is in `rtl/rsram_cell.sv`, `rtl/decoder_2to4.sv`,
  `rtl/row_decoder.sv`, `rtl/sense_amp.sv` and `rtl/rsram_array.sv`.
* The filter is in `rtl/fredkin_full_adder.sv`, `rtl/fredkin_adder.sv`,
  `rtl/fredkin_and_array.sv`, `rtl/bit_shifter.sv`,
  `rtl/fredkin_multiplier.sv`, `rtl/fredkin_dff.sv` and `rtl/fir_filter.sv`.
* `rtl/rsram_fir_top.sv` is the top level.
* `tb/tb_*.sv` are the testbenches, one per module.
