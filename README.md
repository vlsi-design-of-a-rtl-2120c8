# A cellular-automaton chip for gate-level logic and fault simulation

This is a hardware engine that simulates gate-level circuits. It runs both
plain logic simulation and single stuck-at fault simulation. The circuit under
test is not held in a memory and evaluated gate by gate. Instead it is laid
out on a two-dimensional array of small, identical cells, and each cell talks
only to its four neighbours. Gate inputs flow from left to right, one circuit
level per pair of columns. Signals that must reach another row travel up or
down a column on short-range data paths. Every column is a pipeline stage, so
a new input pattern can enter while earlier ones are still being evaluated
further right.

The RTL describes one chip: a 6 x 6 cell array with its serial I/O and its
clock generator. All four edges of the array leave the chip through
time-multiplexed pins, so chips can be tiled into a larger array. The ISCAS-85
benchmark c17 fits in one chip. It produces one output vector every six array
clock cycles, in both logic and fault simulation.

## Mapping a circuit onto the array

Columns alternate between two kinds:

* **Fanin columns** (0, 2, 4) evaluate gates. Each gate of a circuit level
  takes one or two vertically adjacent cells:
  * A two-input gate uses a `Fanin` cell with a `BotFanin` cell below it. The
    `Fanin` cell computes `gate(own input, input of the cell below)`.
  * A one-input gate (buffer or inverter) is a single `BotFanin` cell. It also
    serves to carry a signal across a level unchanged.
* **Fanout columns** (1, 3, 5) take the gate results from the fanin column on
  their left. They deliver each result to the row (or rows) where the next
  fanin column needs it:
  * A `FanoutRecv` cell reads the result next to it.
  * A `Fanout` cell reads nothing from the left. It only passes traffic
    through and takes part in the column handshake.
* Unused cells are `STABLE`. They pass path traffic through and otherwise do
  nothing.

Each cell holds a small configuration:

| Register | Bits | Meaning |
|---|---|---|
| state | 4 | Fanin / BotFanin / Fanout / FanoutRecv / NewPipe / NewPipeRecv / STABLE |
| FanoutNo | 2 | fanout cells: 0 no delivery, 1 one copy sent to the row at OffReg (0 = this row), 2 one copy kept here and one sent to OffReg |
| OffReg | 8 | signed row distance to the destination of this cell's signal |
| Gtype | 3 | fanin cells: BUF, INV, AND, NAND, OR, NOR, XOR (codes 0..6) |
| fault | 2 | fanin cells: {enable, stuck value} |

`tb/c17_pkg.sv` contains the complete c17 mapping table. It is a worked
example of the whole scheme: three levels, all offsets within +/-1, one cell
that feeds two gates, and one STABLE cell.

## Moving signals along a column

A fanin cell with a non-zero OffReg cannot use its input itself. It sends the
input to the row that needs it on one of two one-bit data paths. Each path
register carries its signal together with an 8-bit signed offset:

* A positive OffReg puts the signal on the **downward** path. Each cell it
  passes decrements the offset by one.
* A negative OffReg puts the signal on the **upward** path. Each cell it
  passes increments the offset by one.
* A cell is the **target** when the cell above shows a downward offset of +1,
  or the cell below shows an upward offset of -1. It then loads the signal into
  its SigReg. Any other non-zero offset passes through the cell's adder.
* An offset of 0 in a path register means the register is empty.

Data already on a path has priority over new data. A cell that wants to
inject while the path through it is busy keeps its signal in a one-bit
holding register and retries every cycle.

The increment and decrement are done by `ca_au`, an 8-bit ripple-carry adder
that adds +1 or the two's complement of 1.

* A fanin cell has two adders, so that one signal moving up and another moving
  down can pass in the same cycle.
* A fanout cell has one adder, because only one signal can pass through it at
  a time. An assertion in `ca_cell` checks this.

## The column handshake: `gc` and NewPipe

A column may hand its results on only when every active cell in it is done.
Each cell contributes to two chained signals:

* `gcu = gcd & (computed | s0)` accumulates upwards. `gcd` is the `gcu` of the
  cell below, `computed` means "this cell is finished", and `s0` means "this
  cell is STABLE".
* `gc = u_s0 ? gcu : gc_from_above` travels downwards. `u_s0` means the cell
  above is STABLE, or this is the top row.

The effect is that the topmost active cell of a contiguous group reports the
status of the whole group, and every cell of the group sees that status as
`gc` (`ca_pc`). The sequence within one period is:

1. When a fanin column's `gc` rises, the fanout cells on its right take the
   gate results.
2. Each result is delivered within the fanout column.
3. When that column's `gc` rises, its cells spend one cycle in
   `NewPipe`/`NewPipeRecv`.
4. This tells the next fanin column that new inputs are waiting.
5. `gc` also clears `computed`, which readies the column for the next pattern.

Pattern k+1 enters column 0 while pattern k is still in column 2 or 4. For
c17 the period is six array cycles per pattern.

"Done" always refers to the current pattern:

* A fanin cell is done once it holds its input, and for a two-input gate once
  the cell below holds its input too. It drops that state when it sees its
  column's `gc`.
* A fanout cell is done once it has started on the pattern and has nothing
  left to send or pass on.

A stale "done" would let a column finish early when its cells do not all
start in the same cycle. That happens when a column spans two chips.

## Loading a circuit: initialization mode

While `start = 0` the array is loaded from the top edge of each column. No
extra wiring is needed: the downward path registers of a column form a shift
register.

* The top edge supplies one 8-bit word per cycle on the offset field. The
  signal bit is set as a "word valid" flag.
* A word moves down until it meets a cell whose `computed` flag is clear.
* That cell takes the word, sets `computed`, and clears the valid flag it
  passes on. So the k-th word of a pass lands in the k-th cell from the top.
* After the words, the feeder sends zeros.
* Once every cell of the column has loaded, the column's `gc` rises and clears
  all `computed` flags, ready for the next pass.

Each cell keeps two pass-type bits, `uo1,uo0`, in the low bits of its upward
path register. They say what the next word means:

| uo1,uo0 | Pass | Word layout |
|---|---|---|
| 00 | A | `[7:6]` next pass type, `[5:4]` FanoutNo, `[3:0]` state |
| 01 | B | OffReg |
| 10 | C | `[2:0]` Gtype (fanin cells) |
| 11 | D | `[1:0]` fault register {enable, value} (fanin cells) |

To return fanin cells to pass type A, pulse **IRN**. IRN is the `s2` bit of a
column's top-edge bundle while `start = 0`, and it is forwarded down the
column. Fanout cells return to type A by themselves after a type-B load.

The loading sequences are:

| Column | Sequence |
|---|---|
| fanin | A(next=B), B, IRN, A(next=C), C |
| fanout | A, B, A, B (the repeat keeps both column kinds in step) |
| fault only | IRN, A(next=D), D; fanout columns can stay idle |

`tb/tb_ca_array.sv` and `tb/tb_ca_chip.sv` contain a feeder for these passes.

## Fault simulation

Each fanin cell has a two-bit fault register. When it is enabled, the value
the cell feeds into its gate is replaced by the stuck value. This places a
stuck-at-0 or stuck-at-1 fault on that gate input, which is a fanout branch of
the net.

Signals in this design are one bit wide. A fault run is therefore a separate
pass over the patterns: load the fault register, run the patterns, and compare
the outputs with the fault-free run outside the chip. The testbenches do this
for a stuck-at-1 on one branch of c17's N3 net, which 10 of 64 patterns detect.

## Chip I/O and clocking

The array exchanges 324 bits with its neighbours every array cycle:

* a 12-bit bundle in each direction at the top and bottom of each of the six
  columns;
* a 3-bit bundle per row at the left and right edges.

To keep the pin count down, each stream is sent in four groups. Four system
clocks therefore make up one array cycle.

* Top and bottom: 12 bits on 3 pins (`sipo_bank`/`piso_bank` with 3
  primitives), per column and direction.
* Left and right: 18 bits on 6 pins, made of 4 multiplexed pins (16 bits) and
  2 pins that carry one bit each for the whole cycle.
* Pin `p` carries bit `4p+k` in group `k`.
* The total is 84 data pins.

`ca_clkgen` derives all clocks from the system clock `clk`:

* `ca_clk` is `clk / 8`. It is high for four system clocks.
* `sipo_clk = clk & ca_clk` gives four pulses per array cycle.
* `count[3:0]` is a one-hot group select, stepped on the falling edge of `clk`.

On each `sipo_clk` pulse the receiving `sipo_1x4` captures group `k` into
flip-flop `k`. The sending `piso_4x1` drives group `k` while `count[k]` is
high. The array registers update on the rising edge of `ca_clk`. Their new
outputs then settle for the next four groups.

Constraints and latency:

* `rst_n` is asynchronous and active low. Release it while `clk` is low. If it
  is released during a high phase, the rising-edge and falling-edge counters
  start half a step apart, and the groups no longer line up with the
  `sipo_clk` pulses.
* A bundle that crosses a chip boundary is registered in the receiving SIPO.
  This adds one array cycle of latency per boundary. As a result, the lower
  part of a column that spans chips sees `gc` and starts each pattern one
  cycle later than the upper part.

`tb_ca_tile` checks this on a column of two chips. It uses two arrays joined
by a register stage that stands for the SIPO. c17 is placed so that one gate
has its two cells on different chips, and signals cross the boundary in both
directions.

Loading, logic simulation and fault simulation all run correctly at the
single-chip rate. During development, every vertical placement of c17 across
the boundary was also run:

* Logic and fault simulation passed for all of them.
* With through traffic from above, one placement produced wrong outputs. The
  patterns were still applied at the fixed 6-cycle rate, and the column could
  not absorb the extra delay in time.

The pattern rate must therefore leave some slack when columns carry through
traffic across chips. The left neighbour does not wait for the column to be
ready.

## Module hierarchy

```
ca_chip                    chip top: pins, clock generator, array
├── ca_clkgen              ca_clk, sipo_clk, count[3:0]
├── sipo_bank / piso_bank  per column top and bottom (3 pins), left/right (6 pins)
│   ├── sipo_1x4           1 pin -> 4 bits
│   └── piso_4x1           4 bits -> 1 pin
└── ca_array               ROWS x COLS cells, all four edges brought out
    └── ca_cell            one cell; FANIN parameter selects the kind
        ├── ca_au          +/-1 ripple-carry adder (2 in fanin cells, 1 in fanout cells)
        ├── ca_lu          7-function gate (fanin cells)
        └── ca_pc          gcu / gc logic
ca_pkg                     bundle structs, state / gate / pass encodings
```

The neighbour bundles are packed structs in `ca_pkg`:

* `dn_bus_t` (downward, 12 bits): offset, signal, gc, s0, s2.
* `up_bus_t` (upward, 12 bits): offset, signal, gcu, the cell's own signal
  for the gate above, and a have-signal flag.
* `fo_bus_t` (fanout to fanin, 3 bits): signal, NewPipe, STABLE.
* `fi_bus_t` (fanin to fanout, 2 bits): gate result, gc.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it hangs.
Each testbench sits in `tb/` and is named `tb_<module>.sv`. The helper
package `tb/c17_pkg.sv` holds the c17 mapping and a reference model.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ca_pkg.sv tb/c17_pkg.sv tb/tb_ca_chip.sv --top-module tb_ca_chip
./obj_dir/Vtb_ca_chip
```

| Testbench | What it checks |
|---|---|
| `tb_ca_chip` | Full chip at default size, driven only through its pins. The testbench acts as the four neighbouring chips. It loads c17, runs 64 patterns (all 32 input vectors plus 32 random ones) in logic and then fault simulation, and compares every output with a reference model. It also checks the 6-cycle output spacing, and that the downward path, upward path, two-way fanout, NewPipe, IRN and fault injection were each used. A final run adds through traffic: the testbench, acting as the chip above, sends signals down column 0 that must leave on the bottom pins unchanged. Their timing drifts against the patterns, so cells sometimes have to hold their own signal while the path is busy. Outputs must stay correct. |
| `tb_ca_array` | The same c17 run on the bare array, including the through-traffic phase. It also reads back every cell's configuration after loading. |
| `tb_ca_tile` | The c17 run on a 12-row column of two arrays with a registered boundary, placed across the boundary. Covers loading through the boundary, configuration read-back, logic, fault and through traffic. |
| `tb_ca_cell` | One cell with scripted neighbours: every pass type, IRN, pass-through with offset update, holding register under path contention, target detection, gate evaluation, fault forcing, two-way fanout, NewPipe. |
| `tb_ca_pc` | A single cell exhaustively, and a column with active and STABLE parts. |
| `tb_ca_au`, `tb_ca_lu` | Exhaustive. |
| `tb_sipo_*`, `tb_piso_*`, `tb_ca_clkgen` | Random words through the pin multiplexing, and the clock and group-select relations. |

## Size and cost

After generic synthesis the chip has 1,564 flip-flop bits, 1,407 of them in
the array. The reference design has 1,404 flip-flops in the array and 1,573 in
total. The array holds 432 adder bits (18 fanin cells x 2 x 8, plus 18 fanout
cells x 8).

## Design choices and departures

The cell register set, the offset rules, the path priority, the `gc` logic,
passes A-C, IRN, the pin multiplexing and the clock scheme follow the original
description of this engine. The following are this design's own choices:

* **Cell transition rules where the description is silent.**
  * A fanin cell starts on NewPipe from its left.
  * A fanout cell starts on the rising edge of the left column's `gc`.
  * The one-bit holding register for blocked injections.
  * STABLE cells report "done" in simulation mode only, so that every cell
    loads during initialization.
  * "Done" refers to the current pattern only, as described under the column
    handshake. Every cell therefore ends a run with `computed` clear, and
    reloading starts again at the top cell.
* **Encodings.** The state codes, the seven gate functions and their codes,
  the FanoutNo meanings and the bundle contents are all this design's own.
* **Fault register and pass D.** A wider engine would pack several patterns,
  for both the good and the faulty circuit, into one machine word and compare
  them in the output cells. Here signals are one bit wide, and the comparison
  happens outside the chip.
* **Two adders per fanin cell.** An alternative with a single adder used on
  both clock phases is not built.
* **Gated clocks.** The per-flip-flop gated clock of the serial-in module is
  written as a load enable on a common clock. The behaviour is the same.
* **Not modelled.** The I/O pads, the power pins and the package.
