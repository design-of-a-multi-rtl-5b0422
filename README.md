# Multi-context FPGA built from floating-gate functional pass gates

A multi-context FPGA keeps several complete configurations ("contexts") on
chip and switches between them in one clock by changing a small
context-selection signal `CS`. Usually every configuration bit then needs
one memory cell per context plus a multiplexer, and that memory takes most of
the area. This design removes the separate memory. Every programmable point
is a **multi-context switch** (MC switch) made of a few floating-gate MOS
transistors. Each transistor both stores the configuration, as its
programmed threshold voltage, and passes the signal. The context number is
applied to the transistor gates as a multiple-valued level. The pattern of
thresholds decides in which contexts the switch conducts.

The logic is fine-grained and bit-serial: a mesh of small cells, each wired
only to its four neighbours. Each cell holds a 2-input LUT, a carry
generator and one register. A single cell can be a bit-serial adder or
subtractor, any 2-input gate, or a one-bit delay.

The RTL describes this architecture at the logic level. The floating-gate
devices become threshold comparators. Nets of pass transistors are resolved
as the OR of their drivers. The analog programming circuit becomes a
configuration shift chain. The defaults match the fabricated device: a 4 × 4 array with
2 contexts. Any even number of contexts is supported.

## The multi-context switch

This is the part that takes the most explaining.

### From an ON/OFF pattern to window literals

An MC switch for `N` contexts must be ON or OFF in each context, in any
combination. Number the contexts `S = 0 … N-1` (the binary value of `CS`).
Then any pattern is a union of runs of consecutive ON contexts. A run from
`a` to `b` is a **window literal**: 1 for `a ≤ S ≤ b`. A window literal is
the AND of two monotone functions:

* an **up-literal**, 1 for `S ≥ a`;
* a **down-literal**, 1 for `S ≤ b`.

A down-literal of `S` is an up-literal of the complemented level
`S̄ = N-1-S`: `S ≤ b` exactly when `S̄ ≥ N-1-b`.

A floating-gate functional pass gate (FGFP) with threshold `Vth` conducts
when its control level is above `Vth`, so one FGFP is one up-literal. One
FGFP on `S` and one on `S̄`, in series, make a window (wired-AND). `N/2`
windows in parallel make the switch (wired-OR). `N/2` windows are enough for
the worst pattern, which alternates ON and OFF. So an `N`-context switch is
built from `N` transistors, against `N` memory cells plus a multiplexer in
the conventional design.

Example with 4 contexts: a switch that is ON in contexts 0 and 2.

| window | contexts | FGFP on `S`, Vth | FGFP on `S̄`, Vth |
|--------|----------|------------------|-------------------|
| 1      | 0        | −0.5 (always on) | 2.5 (`S̄ = 3`, that is `S = 0`) |
| 2      | 2        | 1.5 (`S ≥ 2`)    | 0.5 (`S̄ ≥ 1`, that is `S ≤ 2`) |

### Two contexts

With `N = 2`, the configuration that was fabricated, each FGMOS is used as
a binary device. One transistor is gated by `CS` and one by its complement,
and they are connected in parallel. Programming the first one conducting
makes the switch ON in context 1. Programming the second one conducting
makes it ON in context 0.

### Threshold encoding in the RTL

`fgfp` stores a threshold as a code `k ∈ 0 … N`, standing for
`Vth = k − 0.5` levels. The gate conducts when `level ≥ k`. Code 0 always
conducts and code `N` never does. `mc_switch` takes `N` codes:

* `N > 2`: code `2w` is the up-literal of window `w` on `S`. Code `2w+1` is
  its down-literal, applied to `S̄`. To disable a window, give its up-literal
  code `N`.
* `N = 2`: code 0 is the gate on `CS`, code 1 the gate on `S̄`.

The widths are `$clog2(N+1)` bits per code and `$clog2(N)` bits for `CS`.
The bench package `tb/mcfpga_cfg_pkg.sv` (`cfg_util#(N)::compile`) turns an
ON/OFF pattern into codes. It assigns one window per run, with
`up = a` and `down = N-1-b`.

## The cell

```
            lines N, W, E, S (shared with the neighbours)
                 │
   ┌─────────────┴──────────────┐
   │ switch block: 4 x 4 MC sw. │── L1, L2, RST ──► logic block ──► LOUT ─┐
   │ (line × {L1,L2,RST,LOUT})  │◄──────────────────────────────────────┘
   └────────────────────────────┘
```

### Switch block (`switch_block`)

There is one MC switch for each pair of (line N/W/E/S) and (terminal wire
L1/L2/RST/LOUT), 16 in all. The switches are pass gates, so they work in
both directions. A terminal wire with two or more switches ON therefore
joins those lines into one net. A signal can then cross a cell, or turn a
corner in it, without passing through the logic block. The LOUT wire also
carries the cell's registered output onto every line it is joined to.

The switch block reports its 16 switch states (`conn`). The array resolves
the nets from them (next section). The block then forms the logic-block
inputs L1, L2 and RST, each as the OR of the resolved lines connected to
it, and 0 if none is connected.

### Logic block (`logic_block`, `mc_lut`, `carry_gen`)

```
 L1,L2 ──► MC-LUT ──────────────┐
                                XOR ──► D-FF ──► LOUT
 L1,L2,RST ──► CG ──► MUX(MODE: CG or 0) ┘
```

* **MC-LUT**: four MC switches to ground. The one picked by `{L1,L2}`
  (L1 is the upper index bit) discharges a precharged node, and an inverter
  gives the output. The truth-table entry `{L1,L2}` in a context is
  therefore that switch's ON state in that context. The model gives the
  evaluated value combinationally and does not model the precharge phase.
* **Carry generator (CG)**: one flip-flop and one 2-to-1 mux. When the two
  operand bits are equal, the carry out equals them; otherwise it equals
  the carry in. The mux select is `L1 ^ L2 ^ SUB`, and the mux picks either
  the carry in or `L2`. With `SUB = 1` the same circuit stores the borrow
  of `L1 − L2`. `RST` marks the first (least significant) bit of each word
  and forces the carry or borrow into that bit to 0.
* **Modes.** All modes use one datapath. What differs is the LUT contents
  and `MODE`:

| mode       | LUT          | MODE | SUB | LOUT (one clock later) |
|------------|--------------|------|-----|------------------------|
| logic      | any f(L1,L2) | 0    | –   | f(L1, L2)              |
| delay      | L1 (entries 10, 11) | 0 | – | L1                  |
| add        | XOR          | 1    | 0   | L1 ^ L2 ^ carry        |
| subtract   | XOR          | 1    | 1   | L1 ^ L2 ^ borrow       |

`MODE` and `SUB` are each one more MC switch. A context switch can
therefore turn an adder into a subtractor or a gate. Each cell has 22 MC
switches: 16 in the switch block, 4 in the LUT, plus MODE and SUB.

### Timing

* Everything between registers is combinational: switch state, LUT and
  carry-in.
* Each cell's result is registered in LOUT. The sum bit `i` appears on LOUT
  in the clock after its operand bits, so a chain of `k` cells has a latency
  of `k` clocks.
* Words run back to back. `RST` is high during bit 0 of each word.
* A change of `CS` acts in the same cycle on every switch in the array.
  LOUT and the carry registers keep their values across the change.
* `rst_n` asynchronously clears LOUT and the carry registers. It does not
  touch the configuration.

## The array (`mcfpga_top`, `mesh_interconnect`)

The array has `ROWS × COLS` cells in a mesh. Row 0 is the north edge and
column 0 the west edge. The E line of a cell is the W line of its east
neighbour, and the S line of a cell is the N line of its south neighbour.
The edge lines are the array's pins. An edge input (`n_in`, `s_in`, `w_in`,
`e_in`) is ORed onto its line. The matching output (`n_out`, …) shows the
resolved line. `CS` is common to all cells.

**Net resolution.** A net is a set of lines joined through terminal wires,
and it may span many cells. Its value is the OR of its drivers: the edge
inputs on it, and the LOUT of every cell whose LOUT wire is joined to it.
A legal configuration drives each net from one source at most, and there
the OR equals what the pass-gate wiring does. The OR also keeps a bad
configuration deterministic.

`mesh_interconnect` computes the nets by repeated sweeps. In each sweep,
every terminal wire takes the OR of its connected lines (plus LOUT for the
LOUT wire) and writes it back to them. A value crosses at least one cell
per sweep, and a simple path crosses at most `NLINES` lines, where
`NLINES = ROWS·(COLS+1) + (ROWS+1)·COLS` (40 at 4 × 4). `NLINES` sweeps are
therefore exact. Each sweep is a generate stage.

This is the price of describing bidirectional switches in one-directional
logic. On silicon the nets are plain wires, but this description grows
with the square of the array size: about 39k cells for 4 × 4 before
optimisation.

A net through pins and pass gates only is combinational from pin to pin.
Every other net is driven by a register, so the design has no
combinational loop.

### Configuration chain

On the real device the thresholds are non-volatile charge, written by a
high-voltage programming circuit. Here each cell holds a shift register of
`22 × N × $clog2(N+1)` bits, which is 88 bits for `N = 2`. The cells are
chained: `cfg_in → (0,0) → (0,1) → … → (ROWS-1, COLS-1) → cfg_out`.

* While `cfg_en` is high, the chain shifts one bit per clock.
* In a cell, bit `b` is bit `b mod TW` of code `(b / TW) mod N` of switch
  `b / (N·TW)`, where `TW = $clog2(N+1)`.
* Switches are numbered as follows: `side*4 + terminal` (0–15), then LUT
  entries 16–19, MODE 20 and SUB 21 (`mcfpga_pkg`).
* To load an array, shift the last cell's bits first, bit 0 first. Loading
  the default array takes 16 × 88 = 1408 clocks.
* What comes out of `cfg_out` is the old contents, so a configuration can
  be read back.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NCTX`    | 2       | contexts; must be even. 2 uses the binary two-transistor switch, larger values the window-literal switch |
| `ROWS`, `COLS` | 4, 4 | array size |

## Files

| file | contents |
|------|----------|
| `rtl/mcfpga_pkg.sv` | side and terminal enums, switch numbering, width functions |
| `rtl/fgfp.sv` | floating-gate pass gate as a threshold comparator |
| `rtl/mc_switch.sv` | multi-context switch (window literals, or binary for 2 contexts) |
| `rtl/mc_lut.sv` | multi-context 2-input LUT |
| `rtl/carry_gen.sv` | bit-serial carry/borrow generator |
| `rtl/logic_block.sv` | LUT + CG + MODE mux + XOR + output register |
| `rtl/switch_block.sv` | 4 × 4 MC switches between lines and terminal wires |
| `rtl/mc_cell.sv` | cell: logic block, switch block, configuration register |
| `rtl/mesh_interconnect.sv` | resolves the nets of the mesh |
| `rtl/mcfpga_top.sv` | array of cells, interconnect and configuration chain |
| `tb/mcfpga_cfg_pkg.sv` | pattern-to-threshold compiler and a pattern-level reference model of cell and array |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_mcfpga_top_ctx4` |

## Simulating

Any testbench builds with plain Verilator 5. The packages come first, and
`-y` lets Verilator find the modules:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/mcfpga_pkg.sv tb/mcfpga_cfg_pkg.sv tb/tb_mcfpga_top.sv \
    --top-module tb_mcfpga_top
./obj_dir/Vtb_mcfpga_top
```

Each testbench ends with `TB_RESULT checks=<n> failures=<m>`. What they
check:

* `tb_fgfp`: every level and threshold code, for 2 and 4 contexts.
* `tb_mc_switch`: every ON/OFF pattern for 2, 4 and 8 contexts, the
  4-context example above with its thresholds set by hand, and random raw
  codes.
* `tb_mc_lut`, `tb_switch_block`: random per-context tables and
  connections.
* `tb_mesh_interconnect`: a pass-through net along a row, a corner turn,
  a LOUT wire driving two lines, and 2000 sparse random connection
  patterns. All are compared with a union-find computation of the nets.
* `tb_carry_gen`: 8-bit words added and subtracted back to back, including
  long carry chains.
* `tb_logic_block`: 4 contexts (add, subtract, random gate, delay). Checks
  every result bit exactly one clock after its operands, and whole words as
  numbers.
* `tb_mc_cell`: configuration through the chain, with read-back. Then a
  directed adder and AND gate on different lines in two contexts, and
  random configurations against the reference model.
* `tb_mcfpga_top` runs at the default size. It builds a two-context
  pipeline: two delay cells feed an adder in context 0. In context 1 the
  same cells compute `A − ~B`, with one cell as an inverter. Row 3 is a
  four-cell chain that runs west→east in one context and east→west in the
  other. Row 2 is a pass-through net from the west pin to the east pin in
  context 0 only. The bench checks sums with their two-clock latency, the
  chain's four-clock latency and the pass-through in the same cycle. It
  counts each mechanism (context switch, add, subtract, logic, delay, RST,
  both chain directions, pass-through, load, read-back) and fails if one
  never occurs. It then runs random configurations, alternately dense and
  sparse, with `CS` changing every clock. All edges are compared with a
  reference model that finds the nets by union-find.
* `tb_mcfpga_top_ctx4`: the same random comparison on a 3 × 3 array with
  4 contexts.

## What is taken from the original design and what is chosen here

These parts follow the published architecture:

* the mesh of cells wired to four neighbours, with a common `CS`;
* the cell split into a logic block and a switch block, with a 4 × 4 grid
  of pass-gate switches between lines N/W/E/S and L1, L2, RST, LOUT.
  Nets that pass through cells follow from these pass gates; they are not
  discussed separately;
* the logic-block datapath (MC-LUT, CG, MODE mux with a 0 input, XOR,
  D-FF) and its three modes;
* the CG built from a mux and a flip-flop, with RST marking word
  boundaries;
* the MC-LUT built from four grounded MC switches on a precharged node;
* the MC switch built as a wired-OR of window literals, each a wired-AND of
  up- and down-literals, with down-literals driven by `S̄ = N-1-S`;
* the two-transistor binary switch for 2 contexts;
* the 4 × 4, 2-context default.

These parts are choices made here, because the original design leaves them
open:

* the threshold code encoding;
* the CG's select logic and the `SUB` control for subtraction;
* `MODE` and `SUB` stored as per-context switches;
* L1 as the upper LUT index bit;
* RST on the least significant bit, with LSB-first words;
* OR resolution of nets with several drivers, and the sweep method that
  computes them;
* edge lines brought out as pins, each with an input and an output;
* reset behaviour;
* the configuration shift chain, its bit order and its lack of reset. On
  silicon this is a high-voltage writing circuit, which is not modelled.

The precharge/evaluate timing of the LUT is abstracted away. Analog
behaviour, programming voltages and area are outside the scope of this RTL.
