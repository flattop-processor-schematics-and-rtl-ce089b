# FlatTop: a processor array for the billiard-ball cellular automaton

FlatTop is a chip that runs the Billiard Ball Model cellular automaton
(BBMCA), a reversible cellular automaton in which single bits behave like
billiard balls: they travel diagonally, bounce off each other and off fixed
walls, and are never created or destroyed. Since such collisions can act as
logic gates, a large enough BBMCA array is a universal, fully reversible
computer. FlatTop was built as an adiabatic circuit (in the three-phase SCRL
logic style, split-level charge recovery logic, where the supply rails
themselves swing and act as clocks). This RTL captures its logic: the rule
each processing element (PE) computes, the three-stage pipeline inside a PE,
how 20 x 20 PEs are wired into one array, what happens at the chip edge, and
the shift-register mode used to load and read the array.

The RTL is synthesizable SystemVerilog. The swinging rails become one clock
with three phase enables; the analog parts (rail drivers, the reverse halves
of the SCRL gates, the layout) are not modelled.

## The block rule

The BBMCA uses the Margolus neighbourhood: the cell lattice is cut into 2x2
blocks, each block is updated on its own, and the cut moves by one cell
every step so that information spreads. A FlatTop PE updates one block.
Call its cells A, B, C, D going round the block, so that A is opposite C and
B is opposite D. One generation maps each block as follows:

| block before                              | block after                     |
|-------------------------------------------|---------------------------------|
| one ball                                  | the ball in the opposite cell   |
| two balls on one diagonal (A,C or B,D)    | two balls on the other diagonal |
| anything else (empty, two side by side, three, four) | unchanged            |

A lone ball therefore crosses the block diagonally; two balls meeting head-on
are deflected by 90 degrees; a block with a ball on both diagonals is
"static" and acts as a wall.

### How the three stages compute it

The PE (`flattop_pe`) is a pipeline of three stages, each with its own
clock phase. The equations below were read from the transistor networks of
the original gates. Every SCRL gate inverts, so the polarities alternate
between stages:

**Stage 1** (`pe_stage1`, phase 1) latches the inverse of each input and of
the shift signal `sh`, plus the inverse of the static signal:

    S = sh + (A + C)(B + D)          (stage 1 outputs S-bar)

S is high when both diagonals hold a ball (the block will not change). Shift
mode also forces S high.

**Stage 2** (`pe_stage2`, phase 2) regenerates the true values and runs four
copies of one gate, one per cell. For cell A:

    Aout = S.A + (not S).(not A).(C + B.D)      (stage 2 outputs Aout-bar)

With S high the cell keeps its value. With S low the block has balls on at
most one diagonal. Cell A then receives a ball if the opposite cell C has one
and A has none (a ball crossing), or if B and D both have one (a diagonal pair
turning). The other three copies are the same gate with the pins rotated one
place round the block. The stage also passes S-bar and `sh` (in both
polarities) on to stage 3.

**Stage 3** (`pe_stage3`, phase 3) is a 2-to-1 selector per cell:

    Aout = (not sh).A + sh.C

In normal mode it passes the stage-2 result through. In shift mode stage 2
has left the block unchanged (S was forced high), and stage 3 moves every
bit to the opposite cell. The stage-3 registers are the PE's outputs.

The S-bar signal that the schematic carries into stage 3 is only needed by
the reverse, charge-recovering half of the gates, so `pe_stage3` has no port
for it.

## The array: PEs share cells

In the array the 2x2 blocks are drawn turned by 45 degrees. A PE's A cell
then faces the PE above, B the PE to the right, C the PE below and D the PE
to the left. Each CA cell lies between two neighbouring PEs, and the two take
turns updating it:

    PE(r,c).A  is  PE(r-1,c).C        PE(r,c).B  is  PE(r,c+1).D

A PE sends its new A value up, where the PE above reads it as C, and
similarly in the other three directions. Turning the lattice this way lets
all wiring run parallel to the chip edges.

Every PE computes in every cycle. Neighbouring PEs belong to the two
alternating Margolus partitions (the two colours of a checkerboard), so
in one cycle the outputs of the "black" PEs carry one lattice and the
outputs of the "white" PEs another. Each generation the two lattices swap
colours. The two corner links that feed a PE's output back into the same PE
pass bits from one lattice to the other. The array state is the four output
bits of every PE:
4 x 20 x 20 = 1600 bits.

## Timing

`scrl_phase_gen` divides the clock into FlatTop cycles of three ticks:
phase 1, 2, 3, with phase 1 right after reset. Stage k of every PE loads in
phase k.

* A PE samples its inputs in the phase-1 tick. Its new outputs appear after
  the phase-3 tick of the same cycle and stay until the next phase-3 tick.
* One generation per cycle, i.e. one block update per PE every three ticks.
* `shift` and `shift_data_in` pass through buffers that load in phase 3.
  They take effect in the following cycle.
* `shift_data_out` is buffered in phase 1, so it lags the array by one cycle.
* `din` must be stable from the start of a cycle through its phase-1 tick.
  `dout` changes after phase 3.
* `cycle_end` is high during the phase-3 tick.

## Shift mode: loading and reading the array

With `shift` high, each PE passes every input bit straight through to the
opposite side: the bit from above goes out below, the bit from the left goes
out right, and so on. Together with the edge wiring below, the 1600 output
bits then form a single shift register. It starts at `shift_data_in`, which
enters PE(0,0) from above, snakes down and up the columns and back and forth
along the rows, and ends at `shift_data_out`, which leaves PE(0,0)
upwards. A bit applied to `shift_data_in` during cycle n appears on
`shift_data_out` after cycle n + 4*ROWS*COLS + 1 (1601 cycles at 20 x 20).
Loading a full array therefore takes 1600 cycles. To load, hold `shift` high
and feed 1600 bits. Lowering `shift` starts the CA from that state. Raising
`shift` again reads the state out while a new one is shifted in.

The shift signal is pipelined through each PE along with the data (the
`shiftOut` pair of the schematic). The top level brings out PE(0,0)'s copy as
`shift_out`/`shift_out_n`.

## The chip edge

There are too few pins to connect every boundary cell, so the boundary PEs
along each side are taken in pairs:

| side   | pairs                        | edge cell on pairs    | loops on pairs        |
|--------|------------------------------|-----------------------|-----------------------|
| left   | rows (0,1), (2,3), ...       | (0,1), (4,5), ...     | (2,3), (6,7), ...     |
| bottom | columns (0,1), (2,3), ...    | (0,1), (4,5), ...     | (2,3), (6,7), ...     |
| right  | rows (1,2), (3,4), ...       | (1,2), (5,6), ...     | (3,4), (7,8), ...     |
| top    | columns (1,2), (3,4), ...    | (1,2), (5,6), ...     | (3,4), (7,8), ...     |

A **loop** sends each PE's outgoing boundary bit into the other PE's
boundary input. Four boundary cells, in three places, are left over:

* the top of PE(0,0), which carries the shift-register input and output;
* the top and right of PE(0, COLS-1), looped into each other at the corner;
* the right of PE(ROWS-1, COLS-1), looped back into itself.

At 20 x 20 there are five edge cells per side, with pins `din/dout[19:0]`
numbered counter-clockwise:

* left side, top to bottom: 0..4
* bottom side, left to right: 5..9
* right side, bottom to top: 10..14
* top side, right to left: 15..19

`flattop_array` works out the count for other sizes (ROWS and COLS even,
at least 4).

An **edge cell** (`edge_cell`) stands in a loop and connects it to a pin
pair. Only the purpose of the edge cell is known: inter-chip communication in
normal operation. The behaviour here is this design's own choice, made as the
smallest change to a loop:

* the "left" PE's outgoing bit leaves on `dout`;
* in normal mode the bit on `din` enters the "right" PE;
* the "right" PE's bit always returns to the "left" PE;
* in shift mode the cell is a plain loop, so the shift chain stays unbroken.

"Left" is the PE further counter-clockwise round the chip. When `dout` of one
chip drives `din` of another, and the other way round, balls cross from chip
to chip, and the two boundary loops become one path.

## What follows the original design and what is filled in

Taken from the original schematics:

* the three stage equations;
* the stage order and the signals between stages;
* the cell placement A/B/C/D of a PE;
* the 20 x 20 size;
* the edge pairing on the top and left sides;
* the top-right corner loop;
* the shift I/O at PE(0,0);
* the pin numbers of the first edge cells.

Filled in here:

* **Clocking.** The rails become a single clock with three phase enables, and
  each SCRL stage becomes a register. The adiabatic behaviour, and with it the
  reversible un-computing halves of the gates, is not modelled.
* **Reset.** The original has no reset; it is initialised through shift mode.
  Here a synchronous active-low reset clears the array to empty, normal mode,
  phase 1.
* **Stage-2 pin assignment.** Each copy of the gate gets the pins rotated
  round the block. This is the assignment that makes every copy follow the
  same rule.
* **Edge cell behaviour.** As described above.
* **Edge details.** These were not legible in the drawings and were completed
  here: the self-loop at the bottom-right corner, the pairing on the bottom
  and right sides, the orientation of the edge cells there, and the numbers of
  most pins. The chosen completion is the one that leaves the shift chain as a
  single path through all 1600 bits, and the array testbench confirms this.
* **Boundary buffers.** The buffers for shift data in/out and for the global
  shift signal are modelled as phase-enabled registers. Their phases come from
  the rail names drawn next to them.
* **Fan-out of `shiftOut`.** Where each PE's `shiftOut` pair goes in the
  array is not known. Every PE takes `sh` from one global driver.

## Files

| file | contents |
|------|----------|
| `rtl/flattop_pkg.sv` | `quad_t` (one bit per cell A, B, C, D), `phase_e`, `opposite()` |
| `rtl/scrl_phase_gen.sv` | three-phase stage enables |
| `rtl/pe_stage1.sv`, `pe_stage2.sv`, `pe_stage3.sv` | the three PE stages |
| `rtl/flattop_pe.sv` | one PE |
| `rtl/edge_cell.sv` | chip-edge pin connection |
| `rtl/scrl_buffer.sv` | phase-clocked dual-rail boundary buffer |
| `rtl/flattop_array.sv` | top level, parameters `ROWS`, `COLS` (default 20) |
| `tb/bbm_ref_pkg.sv` | reference block rule, written from the rule table above |
| `tb/tb_*.sv` | self-checking testbenches, one per module, and a two-chip test |

Top-level ports of `flattop_array`: `clk`, `rst_n`, `shift`, `shift_data_in`,
`shift_data_out`, `din[NPINS-1:0]`, `dout[NPINS-1:0]`, `cycle_end`,
`shift_out`, `shift_out_n` (NPINS = 20 at the default size).

## Simulation

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/flattop_pkg.sv tb/bbm_ref_pkg.sv tb/tb_flattop_array.sv \
        --top-module tb_flattop_array
    ./obj_dir/Vtb_flattop_array

Substitute any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M`.

* The unit testbenches try every input combination of their block. They
  compare with the rule table, not with the gate equations, and check the
  phase at which outputs change.
* `tb_flattop_array` runs the full 20 x 20 array at its default parameters.
  It loads 1600 random bits through the shift port and checks that each bit
  reappears exactly 1601 cycles later. It then runs 200 generations with
  random traffic on the pins and reads the array out again. Every cycle it
  compares the whole state, `dout` and `shift_data_out` with its own model of
  the array. It also checks that the number of balls changes only by what
  the pins and the shift port carry. It counts the ball moves, collisions,
  static blocks, pin traffic, loop and corner traffic and mode switches, and
  fails if any of them never happened. The run takes well under a second
  after compilation.
* `tb_flattop_two_chips` joins two 8 x 8 chips pin to pin. It checks that
  balls cross in both directions and that no ball is lost or created in the
  pair.

All testbenches pass.
