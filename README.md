# Pseudo-constant logic for reconfigurable LUTs

Many replicated circuits (adders, comparators, multiplexers) have one input
that almost never changes: a filter coefficient, a threshold, a mux select set
at start-up. If that input were a true constant, synthesis would fold it into
the logic and save area. A *pseudo-constant* is treated the same way, except
that its value is folded into the truth tables of LUTs that can be rewritten
at run time. When the value changes (an *invalidation*), a precomputed set of
truth tables for the new value (a *bitfile*) is copied from a block RAM into
those LUTs, and the circuit carries on.

This repository holds synthesizable SystemVerilog for that scheme: a model of
the six-input, two-output reconfigurable LUT it is built on, the four
pseudo-constant circuits built from it, the bitfile store and the
reconfiguration controller, and a top level that puts them side by side.

| circuit | function | LUTs (this RTL) | ordinary mapping |
|---|---|---|---|
| `pc_adder` | `y = a + B + cin`, 32 bits | 22 | 32 |
| `pc_cmp` | `gt = a > C`, 32 bits | 8 | 11 |
| `pc_mux` | `y = d[S]`, 32 inputs | 7 (5 inputs/LUT) or 6 (6 inputs/LUT) | 8 (4 inputs/LUT) |
| `pc_mux4x2` | `y = {d[S1], d[S0]}`, 4 inputs | 1 | 2 |

B, C, S, S0 and S1 are the pseudo-constants. They never appear as signals in
the datapath.

## The reconfigurable LUT (`pc_lut6_2`)

Every circuit is made of one primitive: a 64-bit LUT with six read inputs
(`a[0]`..`a[5]`, A1..A6) and two outputs. Its storage is split into an
upper and a lower 32-bit half. `o6` reads the full table (A6 picks the half),
`o5` always reads the lower half. The `MODE` parameter picks how the table is
rewritten at run time:

| MODE | write mechanism | usable as |
|---|---|---|
| `LUT_RAM64` | `we`: bit `wa` <= `di` | 6-input/1-output, or 5-input/2-output |
| `LUT_SRL32` | `we`: shift `si1` into a 32-bit chain (upper 16 bits feed lower 16); `so` is the bit leaving | 5-input/1-output |
| `LUT_SRL16X2` | `we`: shift `si1` into the upper and `di` into the lower 16-bit register | 4-input/2-output (`o6` upper, `o5` lower) |

A shift register is read at address *k* = the bit shifted in *k* clocks ago,
so a table T is loaded by shifting T[LEN-1] first and T[0] last. The LUT has
no reset and no initial value; its table is undefined until written. Reads
are combinational, writes land on the rising clock edge.

## The three fabrics: how many LUTs per slice can compute

Four LUTs (A-D) form a slice. With LUT RAM there is a catch that
`pc_lutram_slice` models: on the stock (Virtex-5 style) slice the shared
write address of all four LUTs comes from LUT D's six inputs. LUT D then
reads back whatever sits at the write address and cannot compute anything, so
a slice gives only three functions. The shift-register modes need no address,
so all four LUTs stay usable, at five inputs (SRL32) or four inputs with two
outputs (SRL16x2).

`ARCH = ARCH_MODIFIED` models a proposed slice with a separate set of
write-address pins (`wa`), which frees LUT D: four six-input functions per
slice. The same proposal adds carry logic and a flip-flop to *both* outputs
of each LUT, which makes the two-output adder segments fast. That change
affects timing only and has no separate RTL here.

## How each circuit folds its constant

**Adder (`pc_adder3`, `pc_adder`).** Two LUTs in SRL16x2 mode see four inputs
(three bits of `a` and the carry from below) and give four outputs (three sum
bits and the carry out). With B folded in, those four outputs are just
`a[2:0] + B[2:0] + cin`. So three bits cost two LUTs, and the carries inside
the segment never exist as wires. Eleven segments make 32 bits in 22 LUTs
with 11 LUT stages on the carry path. The top segment covers bits 30-31. Its
unused third input is tied to 0, and its tables are built with B's bit 32 = 0,
so its third sum output is the adder's carry out.

Table index (both LUTs): `x = {cin, a2, a1, a0}`. LUT 0: `o6` = t[0],
`o5` = t[1]. LUT 1: `o6` = t[2], `o5` = t[3] (carry), where
`t = x[2:0] + B3 + x[3]`.

**Comparator (`pc_cmp`).** Eight SRL32 LUTs each see four bits of `a` plus
the result of the group below, least significant group first. LUT *i*
outputs 1 if its group of `a` is greater than C's group, passes the incoming
result on if they are equal, and outputs 0 if it is smaller. The lowest group
sees 0, so the last output is `a > C` (unsigned). Index
`x = {c_in, a_group}`.

**Multiplexer (`pc_mux`).** The inputs are split into groups of K (5 on the
stock fabric using SRL32, 6 on the modified fabric using LUT RAM). The LUT
holding input S stores "output input S mod K". The LUT outputs are joined by a
mux whose select, S / K, is a register loaded at the end of every
reconfiguration (`sel_load`, `pc_sel`). Per slice this gives 20 inputs on the
stock fabric and 24 on the modified one, against 16 for an ordinary mux.
Tables of the other LUTs are loaded as zeros.

**Four-input, two-output selector (`pc_mux4x2`).** One SRL16x2 LUT: both
halves see the same four inputs, the upper one stores "input S0" and the
lower one stores "input S1".

## Bitfiles and reconfiguration (`pc_bitfile_store`, `pc_reconfig_ctrl`)

Bitfiles are made ahead of time, one per value the pseudo-constant may take.
They are written into a simple dual-port block RAM through a host port. Each
unit stores a fixed number of values: 2 for the adder, 2 for the comparator
(e.g. two run-time thresholds), all 32 select values for the mux and all 16
select pairs for the selector.

A unit has NLUT LUTs, each filled in LEN clocks with CW bits per clock. The
per-LUT sizes follow from the mode:

| mode | LEN | CW |
|---|---|---|
| SRL16x2 | 16 | 2 |
| SRL32 | 32 | 1 |
| RAM64 | 64 | 1 |

The controller loads `LANES` LUTs at once, so a load takes `NLUT/LANES`
phases of LEN clocks. `LANES = 1` is fully serial loading: fewest store bits
read per clock, longest load. `LANES = NLUT` is fully parallel loading: widest
store, shortest load. `LANES` must divide NLUT. The trade-off is between the
block-RAM width and how many operations it takes to amortise one load.

Shift-register LUTs can also be strung into one configuration chain: the
shift-out of each SRL32 feeds the next one's shift-in. `pc_cmp` and `pc_mux`
(stock fabric) have a `CFG_CHAIN` parameter for this, and `pc_top` exposes it
as `CMP_CHAIN` / `MUX_CHAIN`. The controller then sees a single "LUT" with
LEN = 32 x NLUT. Clock *c* carries chain bit 32·NLUT−1−*c*, where chain bit
32·*i*+*k* is index *k* of LUT *i*. The load time equals per-LUT serial
loading, but the store is one bit wide and only one enable wire is needed.
Two 16-bit registers in one LUT cannot be chained like this, so the adder
always has one input per register.

Store layout: word `(v*PHASES + p)*LEN + c` holds, in lane *l* (bits
`l*CW +: CW`), the bits LUT `p*LANES + l` takes in clock *c* of the load of
value *v*. The bits for a table T are:

- SRL modes: T[LEN-1-c] in clock *c*.
- LUT RAM: T[c] in clock *c*, with `cfg_addr = c` as the write address.

Handshake:

- `inval` is a one-clock pulse with `inval_val` = the value number.
- `busy` is high while the load runs.
- The store has one clock of read latency. `ready` and `cur_val` therefore
  update `PHASES*LEN + 1` clocks after the `inval` clock.
- The circuit's output is meaningful only while `ready` is high.
- An `inval` during a load restarts it with the new value.
- After reset nothing is `ready` until the first invalidation.

Load times at the `pc_top` defaults, in clocks:

| unit | fully parallel (default) | fully serial |
|---|---|---|
| adder | 17 | 353 |
| comparator | 33 | 257 |
| mux, stock fabric | 33 | 225 |
| mux, modified fabric | 65 | 385 |
| selector | 17 | 17 |

## Top level (`pc_top`)

`pc_top` places the four units side by side. Each unit has its own store,
controller and a port group with its prefix: `add_`, `cmp_`, `mux_`, `m42_`.
Each group has three parts:

- store host port: `_st_we`, `_st_addr`, `_st_data`
- invalidation and status: `_inval`, `_inval_val`, `_busy`, `_ready`,
  `_cur_val`
- the datapath operands and results

Parameters and defaults:

| parameter | default |
|---|---|
| `ADD_WIDTH` | 32 |
| `ADD_NVAL` | 2 |
| `ADD_LANES` | 22 |
| `CMP_WIDTH` | 32 |
| `CMP_NVAL` | 2 |
| `CMP_LANES` | 8 |
| `MUX_N` | 32 |
| `MUX_ARCH` | `ARCH_V5` |
| `CMP_CHAIN`, `MUX_CHAIN` | 0 |
| `MUX_LANES` | 7 |

The datapaths are combinational from operand to result. Nothing is
pipelined.

## Files

- `rtl/pc_pkg.sv` — mode and fabric enums, slice size
- `rtl/pc_lut6_2.sv` — the reconfigurable LUT
- `rtl/pc_lutram_slice.sv` — four LUT RAMs with a shared write address, stock or modified
- `rtl/pc_adder3.sv`, `rtl/pc_adder.sv` — adder segment and the 32-bit adder
- `rtl/pc_cmp.sv` — comparator
- `rtl/pc_mux.sv`, `rtl/pc_mux4x2.sv` — N:1 mux and the 4-input, 2-output selector
- `rtl/pc_bitfile_store.sv`, `rtl/pc_reconfig_ctrl.sv` — bitfile RAM and load controller
- `rtl/pc_top.sv` — top level
- `tb/pc_tb_pkg.sv` — reference "offline tool": table generators for every circuit and the bit order of each mode
- `tb/tb_*.sv` — one self-checking testbench per module
- `tb/tb_pc_top.sv` — end to end at the defaults
- `tb/tb_pc_top_serial.sv` — serial loading: a chained comparator and the modified-fabric mux
- `tb/tb_pc_invalidation_sweep.sv`, `tb/pc_sweep_unit.sv` — operations between invalidations swept from 1 to 1024, for the four mux set-ups (stock or modified fabric, parallel or serial loading) and the adder

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(there is a watchdog). Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pc_pkg.sv tb/pc_tb_pkg.sv tb/tb_pc_top.sv --top-module tb_pc_top -o sim
./obj_dir/sim
```

For another testbench, change the last file and `--top-module`. The top-level
tests:

- write all bitfiles into the stores
- invalidate each unit repeatedly, switching between stored values
- restart a load in progress
- check every load time against `PHASES*LEN + 1`
- check the results against plain arithmetic
- count that each mechanism occurred: a carry out, both comparator answers,
  every mux select, every selector pair

`tb_pc_invalidation_sweep` prints, for each set-up and each sweep point, the
load clocks per invalidation and the operating clocks. Those numbers, with
LUT counts and clock period, are what an area-time (functional density)
comparison needs. All top-level tests run in well under a second.

To add a circuit, write its tables as a function in `tb/pc_tb_pkg.sv` (that
is the offline step) and give it a store and controller like the units in
`pc_top`.

## Departures and open points

- **Comparator on the modified fabric.** With wider, two-output LUTs the
  32-bit comparator is expected to fit in 6 LUTs. That mapping is not worked
  out here. The 8-LUT comparator is the one built, and it runs on both
  fabrics.
- **Comparison type.** "Greater than, unsigned" was chosen; any other
  ordering needs only different tables.
- **Joining the mux's LUTs.** The LUT outputs are joined by a registered
  group select. This is one reasonable reading of "slice mux hardware", not a
  given.
- **LUT D on the stock slice.** A stock slice whose LUT D inputs are
  switched between logic and the configuration address is not modelled. It
  would give four functions per slice without new pins; only the
  extra-pin version is built.
- **Numbers of stored values.** Adder 2, comparator 2. They are parameters.
- **Speed.** Combinational delay and the functional-density trade-off
  (area times time, including amortised load time) are properties of a mapped
  FPGA netlist. This RTL does not model them.
- **Bitfile generation.** Bitfiles come from outside. Only the testbench
  package computes them.
- **LUT RAM writes.** They are one bit per clock, also when the LUT is read
  as a 32x2 memory. A two-bit write per clock is not modelled.
- **Slice-level RAM address bits.** WA7/WA8, which join LUTs into deeper
  RAMs, are not part of the LUT model.

## How far it is verified

- Every module has a self-checking testbench. The expected values come from
  plain arithmetic in `tb/pc_tb_pkg.sv`, never from the RTL.
- The LUT model is checked at every read address in all three modes.
- The adder is checked over carry chains that ripple through all 32 bits.
- The comparator is checked at the boundaries `a = C`, `C ± 1`, and at single
  groups that differ from C.
- The mux is checked on every select value, on both fabrics, with both
  configuration styles.
- The controller is checked clock by clock against the store image, for
  2-lane and 6-lane loading, including a restarted load.
- The end-to-end tests run the top at its default sizes, and in the serial,
  chained and modified-fabric set-ups.
- Timing closure, resource use on a real FPGA and the delay figures are not
  verified by anything here.
