# Reconfigurable multiplier-less FIR array

This design builds FIR filters with no multipliers. A 13 × 13 array of small
cells, each of which can add or subtract, shift by one bit, or just route, is
configured so that shifted and delayed copies of the input are summed into
the filter output. Every cell has a pipeline register, so a coefficient is
set by which cells the data passes through, and a tap delay is set by how
many registers lie on its path. A new filter is loaded in one clock cycle from
a parallel configuration word.

The architecture follows the reconfigurable FIR array of E. F. Stefatos,
H. Wei, T. Arslan and R. Thomson, *Low-Power Reconfigurable VLSI Architecture
for the Implementation of FIR Filters* (University of Edinburgh). The cell
structure, floor plan, 20-bit bus, overflow scheme and single-cycle
configuration come from that work. Bit encodings, tie-offs, reset behaviour
and the output select are this implementation's own choices; they are listed
under [Where this RTL departs from or fills in the original](#where-this-rtl-departs-from-or-fills-in-the-original).
In the original system a genetic algorithm, running with a 256-point FFT on a
separate chip or microcontroller, searches for configurations. Neither is
part of this RTL. Their connections are plain ports of the top module.

## Numbers on the bus: 20 bits plus an exponent bit

Additions and left shifts overflow easily in a deep array. Each word therefore
carries a **protection bit** next to its 20-bit two's-complement mantissa
(`calu_pkg::hword_t`, 21 bits: `{prot, data}`):

    value = data            when prot = 0
    value = data * 2**3     when prot = 1

Every arithmetic cell applies the same rule (`overflow_protect`):

1. **Align.** If only one operand of an adder has `prot` set, the other is
   shifted right by 3 first. The shift is arithmetic and drops the low 3 bits.
2. **Compute exactly**, in 21 bits.
3. **Fits in 20 bits:** pass it on. `prot` is the operands' `prot`.
4. **Overflows and `prot` = 0:** shift the exact result right by 3 and set
   `prot`. A sample gets this exponent step only once.
5. **Overflows and `prot` = 1 already:** saturate to +2¹⁹−1 or −2¹⁹ and set
   the cell's sticky **saturation flag**.

So a word can grow about eight times before it clips, and words with
different exponents still add correctly. Step 1 and step 4 drop bits, so a
filter whose partial sums overflow gives approximately the exact result. In
the workload tests below, the error stays within a few tens of units on
results of about 2²¹. Saturation means a configuration is unusable. The flags
exist so that an optimiser can penalise such configurations.

## The three cells

All cells have a horizontal input A (from the upstream neighbour in the row)
and a vertical input B (from the register of the cell below). They have a
vertical output (their register) and a horizontal output. Each cell also has
an enable bit `en`. With `en` = 0 the cell's register and flag hold. This
stands in for the AND-gated clock of the original, which switches off cells
that a configuration does not use. A cell that has been off since reset holds
zero, and the mappings below use this to get zero operands.

| cell | file | config field (MSB→LSB) | register gets | horizontal output |
|---|---|---|---|---|
| A, add/subtract | `as_calu.sv` | `en sel_a sel_b sub hor_reg` | op1 ± op2, each operand chosen from A or B | register, or op2 unchanged (combinational) |
| S, shift by one | `lrs_calu.sv` | `en sel_in right hor_reg` | selected input ×2 or ÷2 (arithmetic) | register, or the selected input unshifted (combinational) |
| F, switch box | `sbox_calu.sv` | `en sel_in` | A or B unchanged | always the register |

A few consequences are worth knowing when you write configurations:

* An S cell with `hor_reg` = 0 does two things at once. It registers a shifted
  copy of its input, which goes upward. It also passes the unshifted input on
  sideways in the same cycle.
* An A cell can copy A to its register unscaled only if B is zero, for
  example when the cell below is switched off. Otherwise A+A gives ×2.
* Only S cells shift, and only by one bit. So a branch usually alternates
  left and right shifts to return to its scale. Shift left first, so that
  every right shift divides an even number and stays exact.

## The array

`calu_array.sv` places the cells as in this view of the lower five rows
(row 0 at the bottom, column 0 on the left):

    row 4  A→S→A→S→F→S→A→S→F→S→A→S→A→   (exit of a 5-row array)
    row 3  S←A←S←A←F←A←S←A←F←A←S←A←S
    row 2  A→S→A→S→F→S→A→S→F→S→A→S→A
    row 1  S←A←S←A←F←A←S←A←F←A←S←A←S
    row 0 →A→S→A→S→F→S→A→S→F→S→A→S→A
           (every cell also feeds the cell directly above it)

* Even rows flow left to right and odd rows right to left. The input sample
  enters the bottom-left cell. Rows are not joined end to end: a value moves
  to the next row only through a vertical (registered) link, so a filter
  climbs the array in a serpentine.
* In the full 13-row array, even rows start with an adder and odd rows with a
  shifter. Columns 4 and 8 are switch boxes. That gives 71 adders, 72
  shifters and 26 switch boxes.
* Horizontal inputs at the other ends of the rows are tied to zero, and so
  are the vertical inputs of row 0.
* **Fast interconnections.** A cell's horizontal output can bypass its
  register, so a value can cross several cells of a row in one clock cycle.
  The switch boxes always register, which ends such a chain. The longest
  combinational path is therefore one adder behind at most four bypass
  multiplexers, whatever the configuration. All vertical links are
  registered and every horizontal link in a row points the same way, so no
  configuration can form a combinational loop.
* The original counts the taps the array can hold as
  169 − (width + height − 1) = 144.

## Configuration, output and saturation (`reconfig_fir_top.sv`)

The configuration word is 703 bits. The cell fields are packed back to back
from bit 0 in cell order `idx = row*13 + col`, so cell `idx` starts at
`calu_pkg::cfg_offset(idx, 13)`. An 8-bit **output select** sits above them
(`cfg_total`, `osel_width`). When `cfg_load` is high, `cfg_register`
captures the whole word at the next clock edge, so a new filter takes effect
one cycle after it is offered. The same edge clears all saturation flags, so
the flags that are set afterwards belong to the new configuration.

`y_out` is the horizontal output of the cell named by the output select. Any
cell can be the filter output. An output select of 169 or more picks the
top-right cell, where the floor plan above has its exit. `sat_flags` holds one
flag per cell (switch boxes never saturate) and `sat_count` is the number of
flags set.

| port | width | |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset (clears registers, flags and configuration) |
| `cfg_load`, `cfg_in` | 1, 703 | apply a configuration |
| `x_in` | 20 | input sample, two's complement, enters with `prot` = 0 |
| `y_out` | 21 | output `{prot, data}` |
| `sat_flags`, `sat_count` | 169, 8 | saturation report |

Latency from `x_in` to `y_out` is the number of registers on the shortest
path of the configured filter. It is fixed per configuration and has no
handshake.

## Mapping a filter: worked example

Taps do not come for free. An adder has one operand from the side and one
from below, and each register adds one cycle of delay. A direct-form FIR with
8 independent coefficients is hard to lay out. Factored filters fit the
array well: each stage adds a signal to a delayed copy of itself, so every
partial sum is reused. `tb/tb_fir_workloads.sv` builds this cascade:

    H(z) = (1 + z^-1)(1 + z^-2)(1 + z^-4)(1 + z^-8)(1 + z^-16)   (times gains and a latency)

| stage | rows | how the two copies are made | adder | filter at that adder |
|---|---|---|---|---|
| 1 | 0–1 | registered delay line along row 0 (A, S×2, A). Cell (1,2) bypasses so (1,1) sees two neighbouring taps | (1,1) | 2 taps |
| 2 | 2–3 | S (2,3) halves, then switch boxes (2,4) and (3,4) add two cycles | (3,3) | 4 taps |
| 3 | 4–5 | S (4,5) sends ×2 up as the short branch and passes its input right, through A (4,6) and switch boxes (4,8) and (5,8). The long branch comes back through A (5,7) and S (5,6), which doubles it | (5,5) | **8 taps**, y = 2·Σ x[k−7…k−14] |
| 4 | 6–7 | short branch S (6,5): 1 register. Long branch right along row 6 and back along row 7: 9 registers, with net scale ×2 like the short one | (7,5) | **16 taps**, y = 4·Σ x[k−9…k−24] |
| 5 | 8–11 | short branch up column 5: 3 registers. Long branch over rows 8–11: 19 registers. Both ×½ | (11,5) | **32 taps**, y = 2·Σ x[k−13…k−44] |

The three filters use one configuration and differ only in the output
select. The cascade uses 12 of the 13 rows. Other coefficient sets need
other layouts. The original leaves the search for them to its genetic
algorithm, which is not part of this design.

## Where this RTL departs from or fills in the original

* **Floor plan.** The published floor plan shows five rows. The 13 × 13
  array repeats its pattern, which gives 71 adders, 72 shifters and 26
  switch boxes. The published cell counts are 63, 63 and 41, which total
  167, not 169, and do not fit this pattern. The published area table also
  labels the array 16 × 16. This RTL follows the 13 × 13 size used
  throughout the rest of the description.
* **Configuration width.** It is 703 bits here; the original states 464
  bits. Its field layout is not published. Here the width follows from
  5/4/2 bits per A/S/F cell, which includes a per-cell enable, plus the
  8-bit output select.
* **Switch box insides.** Only "routes horizontally/vertically and registers
  its output" is given. This RTL uses one register with a one-bit input
  select that drives both outputs (169 registers in all, as in the original).
* **Operand order** of subtraction (op1 − op2), the **alignment rule** for
  operands with different exponents, and **saturation to the 20-bit
  limits** are choices made here.
* **Clock gating** is a clock enable per cell. A synthesis flow can turn it
  back into a gated clock.
* **Output select and saturation count** are this design's reading of "any
  cell can act as the output" and "the number of saturation events". The
  count is of cells that saturated, not of events.
* **Reset**: all registers, flags and the configuration go to zero, which
  leaves every cell disabled. **Flag clearing** happens on configuration
  load.
* **Not included:** the genetic algorithm and the radix-4 single-path delay
  commutator 256-point FFT that evaluates each configuration's frequency
  response.

## Files

| file | contents |
|---|---|
| `rtl/calu_pkg.sv` | word type, config field structs, floor plan and config layout functions |
| `rtl/overflow_protect.sv` | the rescale/saturate rule (combinational) |
| `rtl/as_calu.sv`, `rtl/lrs_calu.sv`, `rtl/sbox_calu.sv` | the three cells |
| `rtl/calu_array.sv` | the array and its wiring (parameters `ROWS`, `COLS`, default 13) |
| `rtl/cfg_register.sv` | one-cycle parallel configuration register |
| `rtl/reconfig_fir_top.sv` | top: configuration, array, output select, saturation report |
| `tb/calu_ref_pkg.sv` | integer reference model of the arithmetic and a cycle-level array model |
| `tb/tb_*.sv` | self-checking testbenches (one per module, plus `tb_fir_workloads`) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/calu_pkg.sv tb/calu_ref_pkg.sv tb/tb_fir_workloads.sv \
        --top-module tb_fir_workloads
    ./obj_dir/Vtb_fir_workloads

Swap in any other `tb/tb_*.sv` and its module name. Each testbench checks
the following:

* `tb_overflow_protect`: corner cases and random results, against the
  integer rule.
* `tb_as_calu`, `tb_lrs_calu`, `tb_sbox_calu`: random operands and
  configurations, checked cycle by cycle. This covers the register, the
  combinational bypass, rescaling, saturation, the sticky flag and its
  clear, and the hold when disabled.
* `tb_cfg_register`: one-cycle load, hold and reset at the full 703-bit
  width.
* `tb_calu_array`: a 5 × 13 array under random configurations. Every cell's
  outputs and flags are compared with the reference model each cycle.
* `tb_reconfig_fir_top`: full 13 × 13 size with default parameters. A
  hand-built three-tap filter is checked against its formula, including
  latency. Then 60 random configurations are loaded and `y_out`, the flags
  and the count are compared with the model every cycle. The testbench also
  checks that every mechanism occurred: add, subtract, both shifts,
  rescale, saturation, bypass chains, both switch-box routes, gated cells,
  the fallback output select and reconfiguration.
* `tb_fir_workloads`: the 8/16/32-tap cascade above. It is exact for small
  inputs. For inputs of 2¹⁴–2¹⁶ the partial sums overflow, and the testbench
  checks that the output is rescaled, stays within 64 of the exact sum and
  never saturates.

All testbenches use `$urandom` for stimulus and need no files. Simulation
at full size takes well under a second per testbench.
