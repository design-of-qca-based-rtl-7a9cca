# One-bit QCA memory cells in SystemVerilog

Quantum-dot cellular automata (QCA) compute without currents. Each cell is a
square of four quantum dots holding two electrons. The electrons sit on one
of the two diagonals, and that choice is the cell's polarisation: P = -1 is
logic 0 and P = +1 is logic 1. Neighbouring cells push each other into the
same polarisation, so a row of cells is a wire. Three cells meeting at a
central cell form a **majority gate**, the basic gate of QCA. Pinning one
majority input to a fixed polarisation gives a two-input AND (pinned at -1)
or OR (pinned at +1).

This RTL models two one-bit static memory cells built from those gates, as
described in the paper *Design of QCA based One-Bit Memory Cell*:

* **Majority-gate cell** (`maj_sram_cell`). The write decision is folded into
  a single majority gate. The paper presents this as the better of the two
  designs: it has an output delay of T/4, where T is the QCA clock period.
* **Basic cell** (`basic_sram_cell`). It uses the classic AND-OR memory loop
  with an inverter on the read/write line. Its output delay is 3T/4.

The gate netlists and the output delays follow the paper. The mapping onto a
synchronous clock, the reset and the output-valid flag are this design's own
choices; they are marked as such below.

## How QCA clocking becomes a synchronous clock

This part needs the most care when reading the RTL.

A QCA circuit has no registers. It is driven by four clock signals, Clock 0 to
Clock 3, and every cell belongs to the zone of one of them. In each period T,
a clock takes its zone through four phases:

| phase   | what the cells in the zone do                              |
|---------|------------------------------------------------------------|
| Switch  | they polarise, so the logic is computed                    |
| Hold    | they keep the result stable; the zone acts as a latch      |
| Release | they lose their polarisation                               |
| Relax   | they stay unpolarised; the output is 0 whatever the input  |

Clock k runs the same waveform as Clock k-1, a quarter period later. So a
value moves forward by one zone every T/4. The standard QCA scheme works this
way; the paper shows only the shape of one clock.

The RTL maps this as follows:

* **One `clk` cycle is one zone step, T/4.** `qca_clock_gen` counts cycles
  modulo 4 and outputs `phase[k]`, the current phase of Clock k, as the enum
  `qca_phase_t`. Clock 0 is in Switch when the counter is 0, and
  `phase[k] = counter - k`. `period_start` marks the Switch cycle of Clock 0.
* **The inputs of a cell sit in the zone of Clock `IN_CLOCK`** (0 by
  default). The cell takes its inputs on the clock edge that ends that
  zone's Switch phase. On that same edge it updates its memory loop and
  computes the output value. This happens once per period. Input values in
  the other three cycles are ignored, just as a QCA input zone ignores its
  driver outside its Switch phase.
* **The output sits in the zone of Clock `OUT_CLOCK`.** It is loaded on the
  edge that ends that zone's Switch phase, `(OUT_CLOCK - IN_CLOCK) mod 4` cycles
  after the inputs were taken. It is valid (`dout_valid = 1`) for one cycle,
  the zone's Hold phase. For the rest of the period it is unpolarised, with
  `dout = 0` and `dout_valid = 0`. An assertion in each cell checks that
  `dout` is never 1 while `dout_valid` is 0.

The paper says the basic cell's output arrives in Clock 3 and the majority
cell's in Clock 1. The defaults are therefore `OUT_CLOCK = 3` (3 cycles =
3T/4) and `OUT_CLOCK = 1` (1 cycle = T/4). With inputs taken at edge *s*:

```
cycle after edge   s-1   s     s+1   s+2   s+3   s+4
Clock 0 phase      Sw    Ho    Re    Rx    Sw    Ho     inputs taken at edge s
majority valid     0     0     1     0     0     0      output in Clock 1
basic    valid     0     0     0     0     1     0      output in Clock 3
```

Each column is the cycle that follows the named clock edge.

The RTL does not model which zone each individual QCA cell of a gate network
belongs to in the physical layout. Gates are combinational. The memory loop is one register, updated once per period.

## Majority-gate cell

Ports: `write_read` (Write/Read'; 1 = write), `sel` (Select), `din` (Input),
`q` (Q, the stored bit), `dout` (Output).

```
ws   = write_read & sel            AND
p    = ws | q                      OR, fed back from Q
n    = ~ws & q                     NOT + AND, fed back from Q
q'   = MV(din, p, n)               majority gate
out  = sel & n                     output AND
```

The majority gate does the whole job:

* When the cell is selected for writing (`ws = 1`), its inputs are
  `(din, 1, 0)`, so Q takes `din`.
* Otherwise they are `(din, q, q)`, so Q keeps its value whatever `din` is.

A write with `sel = 0` therefore stores nothing. `sel` is meant to come from
a row or column decoder in an array.

The output AND reads `n` rather than Q, so `dout` shows the stored bit only
during a selected read. It is 0 when the cell is not selected and 0 during a
write. The paper's logic diagram wires it this way. One sentence in the
paper's results suggests that the output follows the input during a write;
that can only refer to Q, which does take the new value. Use `q` to observe a
write.

## Basic cell

Ports: `d` (D), `en` (EN), `rw` (R/W; 1 = write), `loop_q` (the memory loop),
`dout` (Output).

```
loop' = (d & rw) | (loop & ~rw)    two ANDs, inverter, OR (the memory loop)
out   = en & loop'                 output AND
```

* With `rw = 1` the loop takes `d`.
* With `rw = 0` it recirculates.
* EN only gates the output. A write with `en = 0` still stores `d`. During a
  write with `en = 1`, the output shows the new value.

## Gates

* `qca_majority`: out = ab + bc + ca.
* `qca_and2` and `qca_or2`: a `qca_majority` with its third input tied to 0
  or to 1 respectively, mirroring a cell of fixed polarisation.
* `qca_inverter`: the complement.

All the cell logic is built from instances of these four modules, so the
hierarchy matches the paper's gate diagrams.

## Top level

`qca_sram_top` places both cells on one `qca_clock_gen`. Each cell has its own
ports, prefixed `mj_` and `bs_`. The four clock phases are brought out, so
the two cells can be driven side by side and their delays compared. The
shared clock generator is this design's choice. The top has no parameters.

## Choices not taken from the paper

* **Reset.** `rst_n` is active low and synchronous. It clears the stored bit
  and the output, and restarts the clock at Clock 0 = Switch. The paper says
  nothing about the power-up state.
* **Input zone.** `IN_CLOCK = 0` is assumed.
* **Timing.** The output-valid flag and the once-per-period update are
  assumed.
* **Encodings.** The phase encoding (Switch = 0 ... Relax = 3) and the
  quarter-period lag between clocks are this design's choices.
* **Physical figures.** The paper also reports power, area, energy and
  QCA-cell counts for both layouts. These are physical properties of the
  QCA layout and have no counterpart here. Only the delay row of that
  comparison is modelled.
* **Memory array.** A memory array built from these cells is mentioned only
  as future work and is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

* **Gates** (`tb_qca_majority`, `tb_qca_and2`, `tb_qca_or2`,
  `tb_qca_inverter`): all input combinations, checked against the truth
  table.
* **`tb_qca_clock_gen`**: checks the phase of every clock in every cycle,
  the one-phase lag between neighbours, and one visit to each phase per
  period. It also resets part-way through a period.
* **`tb_basic_sram_cell` and `tb_maj_sram_cell`**:
  * They generate the clock phases themselves and change every input at
    random in every cycle.
  * They compare against a reference model that samples only in the input
    zone's Switch cycle.
  * They check the stored bit in every cycle, the output value, and that
    the output is valid exactly 3 (basic) or 1 (majority) cycles after the
    inputs were taken, for one cycle only.
  * They count each mode and fail if one never happened: write, read,
    read with EN = 0, and write with Select = 0.
* **`tb_qca_sram_top`**: runs the full design at its defaults.
  * A directed sequence first: write 1, read twice with the data input
    toggling, try a write without Select or a read with EN = 0, read again,
    write 0, read.
  * Then 300 random periods.
  * It checks both cells' delays against each other through the shared
    clock.

Each testbench was also run against a deliberately broken copy of its module
and reported failures:

* a majority gate missing one product term;
* AND and OR gates with the wrong fixed input;
* a non-inverting inverter;
* a wrong clock reset phase;
* the basic cell's hold path reading R/W instead of its inverse;
* the majority cell's output reading Q directly;
* two swapped top-level connections.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qca_pkg.sv tb/tb_qca_sram_top.sv --top-module tb_qca_sram_top
./obj_dir/Vtb_qca_sram_top
```

Replace `tb_qca_sram_top` with any other testbench name to run that test.
`rtl/qca_pkg.sv` must come first, because all modules import its phase type.
