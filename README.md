# Signal-integrity test of SoC interconnects through an extended boundary scan

On-chip wires that run side by side couple through capacitance and mutual
inductance. A switching neighbour can delay a signal or put a glitch on a quiet
one. Whether this happens depends on how the neighbours switch relative to the
line being observed. This design extends an IEEE 1149.1 (JTAG) boundary-scan
chain so that it can do two things. At the driving end of each interconnect
under test (IUT) it generates switching patterns in hardware. At the receiving
end it records whether a sensor saw a late or noisy transition. The JTAG pins
stay as the standard defines them. Two instructions are added: `G_SITEST`
generates patterns and `O_SITEST` reads the results out.

## The multiple-transition (MT) pattern set

A test is a pair of vectors applied to a group of neighbouring lines, one after
the other. One line is the *victim* and the lines near it are *aggressors*. The
MT set includes every case in which all aggressors switch: the victim stays at 0,
rises, stays at 1 or falls, and each aggressor rises or falls on its own. It
leaves out quiet aggressors, because they do not disturb the victim. The
classic "maximum aggressor" set is the subset in which all aggressors switch the
same way.

The generator rests on one observation. Order the vectors well, and every
aggressor toggles on every step while the victim toggles on every second step.
Start from a seed and apply four steps. With the middle of three lines as
victim and seed `000`, the lines go through

    000 -> 101 -> 010 -> 111 -> 000

That is four vector pairs, with the victim quiet at 0, rising, quiet at 1 and
falling. The lines end on the seed again. Seeds `000`, `001`, `100` and `101`
together give all 16 MT pairs for that victim. The "locality factor" k is the
number of lines on each side of a victim that still matter. Only the victim
and k lines on each side need to be enumerated, so a group has m = 2k+1 lines
and needs (2k+1)·2^(2k) seeds.

Because only k lines on each side matter, victims k+1 lines apart can be tested
at the same time. Victim-select data `100100…` (for k = 2) marks lines 0, 3, 6,
… as victims. Shifting one more 0 into the chain moves every victim one line
on. After k shifts, every line has been a victim once.

## Cells

All cells are clocked by TCK. The standard's gated ClockDR and UpdateDR become
clock enables, `ctrl.clock_dr` and `ctrl.update_dr`. Every cell receives the
same control bundle, `si_pkg::bs_ctrl_t`.

* **`bsc`**: the standard cell. FF1 captures the parallel input or shifts.
  FF2 is loaded from FF1 on UpdateDR. `Mode` selects FF2 or the parallel input
  for the output.
* **`pgbsc`**: the pattern generation cell, on each core output that drives an
  IUT. It adds three things to the standard cell. A multiplexer feeds /Q2 back
  into FF2 when `SI=1`. A toggle flip-flop, FF3, divides UpdateDR by two. A
  clock selector chooses FF2's clock. With `SI=1`, FF1 holds the victim-select
  bit, not test data:

  | mode      | Q1 | SI | FF2 changes on                       |
  |-----------|----|----|--------------------------------------|
  | victim    | 1  | 1  | every 2nd UpdateDR (rising edge of Q3) |
  | aggressor | 0  | 1  | every UpdateDR, toggling             |
  | normal    | x  | 0  | every UpdateDR, loading FF1          |

  FF3 is held at 1 while `SI=0`. This makes the first UpdateDR after a seed
  leave the victim alone and the second toggle it, which gives the vector order
  shown above.
* **`obsc`**: the observation cell, on each core input fed by an IUT. An
  integrity loss sensor (`ils`) watches the received line. Its pulse sets a
  flag, F. With `SI=1`, Capture-DR loads F into FF1 instead of the pin, so an
  ordinary DR scan reads the flags out. With `SI=0` the cell is a standard cell.
* **`ils`**: a *behavioural model* of the sensor, which in silicon is an
  analog circuit. Each TCK rising edge opens a window of `WINDOW` (2 ns),
  timed with a delay. A transition that arrives after the window has closed
  produces a 0.5 ns pulse. So does a second transition after the same edge,
  which is a glitch. The window, the pulse width and the glitch rule are this
  model's own values. Synthesis tools drop the delays, so the synthesized
  sensor means nothing; a real chip needs the analog circuit in its place.
* **`bidir_si_cell`**: a bidirectional pin. It is a standard control cell for
  the output enable, a `pgbsc` for the driven value and an `obsc` for the
  received value, in that scan order.
* **`mt_pattern_gen`**: N `pgbsc` in one scan segment. Line 0 is nearest the
  segment's scan input, so a shifted 0 enters at line 0 and moves the victims
  upward.

## Control: TAP, instructions, timing

`tap_ctrl` is the standard 16-state TAP controller. `si_instr_reg` holds a
4-bit instruction register, the bypass bit, and a decoder that produces the
control bundle:

| instruction | opcode | Mode | SI | Capture-DR loads FF1 | UpdateDR reaches cells | flags cleared |
|-------------|--------|------|----|----------------------|------------------------|---------------|
| EXTEST      | 0000   | 1    | 0  | yes                  | yes                    | –             |
| SAMPLE      | 0001   | 0    | 0  | yes                  | yes                    | –             |
| G_SITEST    | 1000   | 1    | 1  | **no**               | yes (cells toggle)     | –             |
| O_SITEST    | 1001   | 1    | 1  | yes (flags)          | **no**                 | during Shift-DR |
| BYPASS      | 1111   | –    | –  | –                    | –                      | –             |

The two gated columns are this design's own choices, made to keep the procedure
consistent:

* Every route to Update-DR passes Capture-DR. If Capture-DR loaded FF1 under
  `G_SITEST`, it would overwrite the victim-select data before each pattern.
* A read-out under `O_SITEST` should not move the lines. If it did, the
  sensors would see transitions that no pattern caused.

The flags are cleared in Test-Logic-Reset and during the Shift-DR that follows
an `O_SITEST` capture. Each read-out therefore reports what happened since the
previous one. Unknown opcodes act as BYPASS.

Registers act on the rising TCK edge that *leaves* a TAP state. That includes
Update-DR and Update-IR, where the standard uses the falling edge. TDO is
combinational from the last stage of the selected register. A pattern is
launched on the rising edge that leaves Update-DR, and the sensors time the
arrival from that same edge.

## The SoC top, `si_soc_top`

Core i drives `N_IUT` interconnects into core j. `N_BIDIR` bidirectional lines
run between them, with a `bidir_si_cell` at each end. Core i's primary inputs
and core j's primary outputs keep standard cells. The cores and the wires are
outside the module; their signals are ports. The chain runs:

    TDI -> core i input BSCs (M_IN) -> core i bidir groups (3 x N_BIDIR)
        -> PGBSCs (N_IUT, line 0 first) -> OBSCs (N_IUT, line 0 first)
        -> core j bidir groups (3 x N_BIDIR) -> core j output BSCs (K_OUT) -> TDO

| parameter  | default | note |
|------------|---------|------|
| N_IUT      | 32      | lines under test; the largest size in the published timing study (8, 16, 32) |
| M_IN       | 4       | own choice |
| K_OUT      | 4       | own choice |
| N_BIDIR    | 2       | own choice |
| ILS_WINDOW | 2.0 ns  | acceptable delay after the launching edge; own choice |

The locality factor k is not a parameter. It only shapes the victim-select data
that the tester scans in.

## Running a test session

For each seed:

1. Load `EXTEST`. Scan the seed into the PGBSC positions, and let Update-DR
   apply it.
2. Load `G_SITEST`. Scan the victim-select data (`100100…`). Its Update-DR is
   the first of four pattern steps.
3. Pass through Update-DR three more times. A short route is Select-DR,
   Capture-DR, Exit1-DR, Update-DR. The lines are now back on the seed.
4. Shift a single 0 (a one-bit DR scan). Its Update-DR is the first step for
   the new victims. Repeat step 3, then step 4, until each line has been a
   victim (k shifts).
5. When results are wanted, load `O_SITEST` and scan the chain. The OBSC bits
   come out as the flags. The same scan can refill the victim-select data, so
   generation continues afterwards with `G_SITEST`.

Flags can be read after every pair, after every victim position, or once per
session. The more often they are read, the more precisely a failure is tied to
a pattern, and the longer the test takes.

A published outline of this loop applies four UpdateDRs and then shifts a 0.
Each shift also ends in an Update-DR, so this design counts that update as the
first of the next four. As a result, the seed is back in FF2 after every group
of four.

## Test time

`tb_mt_workload` applies the full seed set for n = 8, 16, 32 and k = 2, 3. It
counts the TCK cycles and compares them with two closed forms:

* N_seed·(2n + 8k) for this architecture;
* m·N_pattern·(n+4), with N_pattern = m·2^(m+1), for scanning every vector
  through a plain chain.

| n | k | seeds | closed form | plain chain | measured here |
|---|---|-------|-------------|-------------|---------------|
| 8 | 2 | 80  | 2560  | 19200  | 10801  |
| 8 | 3 | 448 | 17920 | 150528 | 69889  |
| 16| 2 | 80  | 3840  | 32000  | 13361  |
| 16| 3 | 448 | 25088 | 250880 | 84225  |
| 32| 2 | 80  | 6400  | 57600  | 18481  |
| 32| 3 | 448 | 39424 | 451584 | 112897 |

The closed forms assume roughly two cycles per pattern step. The measured
counts include the real TAP walk: five TCK per extra UpdateDR, two instruction
scans per seed, and the full chain with its non-IUT cells. The measured
reduction against the plain chain is 44–75 %, well below the 86–92 % that the
closed forms give. The seeds used here tile each (2k+1)-bit group pattern along
the lines. For every line with k neighbours on both sides, the testbench records
each vector pair seen while that line was the victim. It requires all
2^(2k+2) MT pairs of that victim to appear, and they do for all six
configurations. Lines nearer the ends of the bus than k have a shorter window
and are not counted.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_mt_pattern_gen` checks the exact five-vector sequences for seeds 000,
  001, 100 and 101. It checks that seeds 000 and 101 together produce all six
  maximum-aggressor pairs. It also checks victim rotation over 8 lines with
  k = 2.
* `tb_si_soc_top` runs the top at its default sizes, through JTAG only. It
  covers BYPASS, SAMPLE, static EXTEST and then seven seeds of the MT
  procedure, with all three read-out rates. In the first six seeds core i
  drives the bidirectional lines; in the last one core j drives them. Its wire model carries two crosstalk defects:
  - one line arrives late when it switches against both neighbours;
  - another line glitches when it is quiet and both neighbours switch the same
    way.

  The testbench keeps a model of both stages of every cell. It compares every
  line after every UpdateDR and every bit on TDO, predicts the sensor flags,
  and fails if any mechanism never occurred.
* `tb_mt_workload` is described under "Test time". Besides the cycle counts,
  it checks every line after every UpdateDR and the MT pair coverage.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/si_pkg.sv tb/tb_si_soc_top.sv --top-module tb_si_soc_top
    ./obj_dir/Vtb_si_soc_top

## Limits and departures

* The sensor is a behavioural model with delays. Everything else is
  synthesizable, and the top synthesizes as a whole (about 230 flip-flops at
  the default sizes, with the sensor reduced to nothing). The OBSC flag flip-flop is set asynchronously by the sensor
  pulse; this is the one place where an analog event enters the TCK domain.
* The cell costs (NAND equivalents) and the analog noise/delay results of the
  method are not reproduced. They need a cell library and an RLC model of the
  wires.
* The following are this design's choices and should be reviewed for a real
  chip:
  - the opcodes;
  - the 4-bit instruction register, with no IDCODE;
  - rising-edge update;
  - combinational TDO;
  - the chain order;
  - the Capture-DR and UpdateDR gating of the two new instructions;
  - when flags are cleared.
* Only the delay/glitch rules of the sensor model are exercised. Real sensors
  have their own thresholds.
