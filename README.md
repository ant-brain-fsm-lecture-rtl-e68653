# Ant brain: a wall-following maze walker

An electronic ant stands somewhere in a 128 × 128 maze. It has to find the
exit. It has two antennae, left and right, and can do one of three things per
step: move one cell forward, turn left 90°, or turn right 90°. The strategy is
the classic one for a maze without islands: **keep the wall on your right**.
Follow the wall you touch. Go around its ends when it breaks off. Turn left
when something blocks the way ahead.

The whole strategy fits in a four-state Moore machine with two input bits. The
rest of the design is a small datapath:
- two 7-bit position counters,
- a one-hot heading register,
- a few gates that turn the maze word of the current cell into antenna bits.

The maze itself is in an external asynchronous 32K × 8 SRAM.

```
                 +-----------+   {0,Y,X}  +-------------+  maze word  +-----------+  L,R,exit  +----------+
  start ------>  | X counter |----------->|  SRAM       |------------>| antennae  |----------->| ant_fsm  |
  start_x/y ---> | Y counter |  sram_addr | (external)  | sram_rdata  | logic     |            | S0..S3   |
                 +-----------+            +-------------+             +-----------+            +----------+
                      ^  inc/dec                                           ^ heading               | F,TL,TR
                      |                   +-----------+                    |                       |
                      +---- F & heading --| heading   |--------------------+                       |
                                          | register  |<------ TL / TR ----------------------------+
                                          +-----------+
```

## The maze memory

Each cell is one 8-bit word at address `{Y, X}`. X is the column: 0 is the
west edge, 127 the east edge. Y is the row: 0 is the south edge, 127 the north
edge. The 14-bit address fits in the lower half of the SRAM; A14 is driven low.

| bit | meaning                 |
|-----|-------------------------|
| 0   | no wall around the cell |
| 1   | wall on the north side  |
| 2   | wall on the west side   |
| 3   | wall on the south side  |
| 4   | wall on the east side   |
| 5   | this cell is the exit   |

A cell can have several walls: `0000_1100` means walls on the west and south
sides. The walls are the walls of the cell the ant is standing in. The ant
never looks at a neighbouring cell.

## Sensing: from wall flags to antennae

The heading is one-hot: N = `0001`, W = `0010`, S = `0100`, E = `1000`.
- The **right antenna** touches a wall that is ahead of the ant or on its right.
- The **left antenna** touches a wall that is ahead or on its left.

With the cell's wall flags NW, WW, SW, EW:

```
R = NW·(N+W) + WW·(W+S) + SW·(S+E) + EW·(E+N)
L = NW·(N+E) + WW·(W+N) + SW·(S+W) + EW·(E+S)
```

That is eight 2-input ANDs, four 2-input ORs and two 4-input ORs
(`rtl/antennae_logic.sv`). The meaning of the two bits:

| L R | meaning                                     |
|-----|---------------------------------------------|
| 0 0 | no wall touched                             |
| 0 1 | wall on the right: following it             |
| 1 0 | wall on the left                            |
| 1 1 | wall in front (or in a corner ahead)        |

Bit 5 of the maze word passes through this block as `at_exit`.

## The controller

`rtl/ant_fsm.sv` is a Moore machine. Its outputs depend on the state alone.

| state | name                     | code | output | L'R' | L'R | L R' | L R |
|-------|--------------------------|------|--------|------|-----|------|-----|
| S0    | lost                     | 00   | F      | S0   | S1  | S3   | S3  |
| S1    | right antenna touching   | 01   | F      | S2   | S1  | S3   | S3  |
| S2    | break in the wall        | 10   | TR     | S0   | S0  | S0   | S0  |
| S3    | left antenna touching    | 11   | TL     | S1   | S1  | S3   | S3  |

How to read the table:
- **S1** is the normal case: the wall is on the right, so walk on.
- When the right wall stops (L'R' in S1), the ant has passed the end of a
  wall. It turns right (**S2**) and then walks forward **lost** (**S0**) until
  it touches something again.
- Any touch of the left antenna (**S3**) makes the ant turn left. It keeps
  turning left until the left antenna is free.

No two states are equivalent: their outputs or successors differ. So the
machine is already minimal. With the state bits named X (msb) and Y (lsb),
the next-state and output logic reduce to:

```
X+ = L·Y + L·X' + X'·Y·R'        F  = X'
Y+ = X·Y + X'·R + X'·L           TL = X·Y
                                 TR = X·Y'
```

The RTL implements exactly these equations. The state-transition table is
used only by the testbenches, as an independent reference. Both agree on all
16 rows.

**Exit.** When the current cell's exit bit is set, the controller goes back
to its reset state S0 and sets a `done` flag. While `done` is set, F, TL and
TR are held low, so the ant stays on the exit cell until the next `start`.
The separate `done` flip-flop is this design's own choice; the source design
only says that the exit leads to "reset, done flag".

## Datapath

* **Position counters** (`rtl/updown_counter.sv`, used twice). Each is a
  7-bit register with preload, increment and decrement; preload wins over
  the other two. A forward step moves along the heading:
  - east increments X, west decrements X;
  - north increments Y, south decrements Y.

  The count wraps modulo 128. A maze with a closed outer wall never lets
  that happen.
* **Heading register** (`rtl/heading_reg.sv`). A 4-bit one-hot shift
  register:
  - turning right rotates it right (N → E → S → W);
  - turning left rotates it left (N → W → S → E).

  A preload sets the starting heading. An assertion checks that the code
  stays one-hot.

## Step timing: sense, then act

This is the one point where the design adds something of its own to the
lecture scheme, and it matters. A Moore controller decides on the antennae of
cycle *t*, but its new output only takes effect in cycle *t+1*. Suppose the
controller and the datapath were clocked together. Then the action chosen
for a cell would be carried out in the *next* cell, after the ant has already
moved on. In a grid maze that makes the ant overshoot the ends of walls, and
it can even step through a wall it has just touched.

So `rtl/ant_brain_top.sv` splits every ant step into two clock cycles, with a
one-bit phase toggle:

| cycle | `act_phase` | what happens                                                         |
|-------|-------------|----------------------------------------------------------------------|
| sense | 0           | the controller loads its next state from the antennae of the current cell |
| act   | 1           | the counters and the heading register carry out that state's action |

The antennae are always read after the previous move has finished. Moving
one cell therefore takes 2 clock cycles, and so does a 90° turn. The maze
word is read asynchronously during the sense cycle. The SRAM access time
(10–20 ns for this class of part) plus the decoder and next-state logic must
fit in one clock period.

## Top-level interface (`ant_brain_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (ant idle, S0, heading N, position 0,0) |
| `start` | in | 1 | one-cycle pulse: load `start_x`, `start_y`, `start_heading`, go to S0, clear `done`, begin walking |
| `start_x`, `start_y` | in | 7 | start cell |
| `start_heading` | in | 4 | one-hot start heading |
| `sram_addr` | out | 15 | `{1'b0, Y, X}` |
| `sram_cs_n`, `sram_oe_n`, `sram_we_n` | out | 1 | held at 0, 0, 1: the design only reads |
| `sram_rdata` | in | 8 | maze word of the addressed cell |
| `pos_x`, `pos_y`, `heading` | out | 7, 7, 4 | where the ant is and where it faces |
| `state`, `action` | out | 2, 3 | controller state and its `{F, TL, TR}` output |
| `act_phase` | out | 1 | 1 in the cycle the action is applied |
| `ant_l`, `ant_r` | out | 1 | antenna bits |
| `running`, `done` | out | 1 | a walk is in progress / the exit was reached |

The parameters are `XY_W = 7` (bits per coordinate) and `SRAM_AW = 15`
(SRAM address pins). The shared types are in `rtl/ant_pkg.sv`:
- the heading codes,
- the maze-word bit positions,
- the state enum,
- the `{fwd, turn_left, turn_right}` action struct.

After synthesis the whole design has 23 flip-flops:
- 14 for position,
- 4 for heading,
- 2 for the state,
- 1 each for done, phase and running.

## What the design does not include

* **The SRAM chip** is an external part; the top brings out its pins.
  `tb/w24257a_model.sv` is a simulation-only model of the chip's function,
  following the chip's truth table:
  - separate input and output data instead of a bidirectional bus,
  - no high-impedance state,
  - no access delays.
* **Crumbs, the memory controller and the display.** The ant is not built
  to eat a crumb in each cell it visits, to write the crumb map back to the
  SRAM, or to show it on a monitor. No state machine arbitrates the SRAM
  between the ant and a loader. The lecture names these only as extensions
  and gives no detail for them. The maze has to be in the SRAM before
  `start`.
* The start cell must be a free cell. Behaviour in mazes with islands, or
  with corridors one cell wide, is outside the strategy. In a one-cell
  corridor both antennae touch the side walls, and the ant reads that as a
  wall in front.

## Testbenches and simulation

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_antennae_logic.sv` | all 128 combinations of heading, wall flags and exit bit, against a geometric reference (wall ahead or on the antenna's side) |
| `tb/tb_ant_fsm.sv` | 4000 random cycles of L, R, exit, enable and restart, against the state-transition table; every table row must occur |
| `tb/tb_updown_counter.sv` | 3000 random preload/increment/decrement cycles against a modulo-128 model; wrap-around in both directions must occur |
| `tb/tb_heading_reg.sv` | 2000 random turn/preload cycles against a compass-index model |
| `tb/tb_ant_brain_top.sv` | the full design at its default size, described below |
| `tb/tb_example_maze.sv` | the full design walking the lecture's example maze |

`tb/tb_ant_brain_top.sv` works like this:
1. It builds a 128 × 128 maze: outer walls, a gap in the north wall with the
   exit cells, one slab rising from the south wall and one hanging from the
   north wall.
2. It writes the maze into the SRAM model through the model's write pins.
3. It runs two walks, each compared step by step with a reference ant. The
   reference works from maze geometry and the state table, not from the
   wall flags or the equations.
   - The first walk starts lost in the open.
   - The second starts against the west wall, where only the left antenna
     touches.

   Both walks reach the exit: 605 and 550 steps, two cycles each.
4. It fails if any of these never happened:
   - each of the four states,
   - a forward step while lost,
   - a wall in front,
   - only the left antenna touching,
   - a break in the wall,
   - a left turn and a right turn,
   - an increment and a decrement of X and of Y,
   - reaching the exit.

`tb/tb_example_maze.sv` runs the same kind of check on the lecture's example
maze. The maze is redrawn on the 128 × 128 grid from its picture. The ant
starts where the picture puts it: in the open west part, facing north. It
reaches the exit gap in the north wall after 605 steps; a second walk from
the west wall takes 502.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ant_pkg.sv rtl/antennae_logic.sv rtl/ant_fsm.sv rtl/updown_counter.sv \
    rtl/heading_reg.sv rtl/ant_brain_top.sv tb/w24257a_model.sv tb/tb_ant_brain_top.sv \
    --top-module tb_ant_brain_top -Mdir obj_top
./obj_top/Vtb_ant_brain_top
```

The block testbenches need only `rtl/ant_pkg.sv`, their block and their own
file. Every simulation takes well under a second.

## Where to change things

* **Maze size:** `XY_W` on the top, and the SRAM with it: `2·XY_W` address
  bits must fit in `SRAM_AW`.
* **Other maze words or heading codes:** `rtl/ant_pkg.sv`. The antennae
  equations name the wall bits through the package.
* **A different strategy** (for example keeping the wall on the left): the
  next-state and output equations in `rtl/ant_fsm.sv`, and
  `table_next` in the testbenches that use it.
* **Single-cycle steps:** remove the phase toggle in the top. Read the
  section on step timing first.
