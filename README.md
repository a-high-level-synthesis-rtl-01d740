# A bus-based 4-point FIR filter built by high-level synthesis

This is the register-transfer structure of a 4-point FIR filter,

    y(n) = k0·x(n) + k1·x(n-1) + k2·x(n-2) + k3·x(n-3),

as a high-level synthesis flow for dedicated DSP hardware would produce it.
The flow starts from the filter's data-flow graph: four multiplications
`*1..*4` produce the products `v1, v2, v4, v6`, and a chain of three additions
`+1, +2, +3` turns them into `v3, v5` and finally `y`. The flow also takes a
sample period of 300 ns and a library of units: an 80 ns multiplier, a 40 ns
adder and a 20 ns latch. From these it chooses a 20 ns clock, so each sample
period is **15 control steps**. It then finds the smallest set of units that
can meet that period, and binds every operation, variable and data transfer
to one of them.

The result is small and heavily shared:

| resource | count | used for |
|---|---|---|
| multipliers | 3 (`m1`, `m2`, `m3`) | `m2` computes two of the four products in every period |
| adder | 1 (`a`) | all three additions, one after another |
| registers | 2 (`r1`, `r2`) | `r1` holds the running sum, `r2` the next product |
| buses | 2 (`b1`, `b2`) | every data move in the data path |
| memories | coefficient ROM, sample/result RAM | |

Nothing is wired point to point. Every value moves over one of the two buses:
a source puts it on a bus through its own tristate buffer, and a destination
loads it through an input multiplexer. The control unit is a 15-state FSM that
decides, step by step, who drives and who loads. So the design is an FSMD: a
finite state machine plus a data path.

## The data path

The connections, as two lists:

* **Drivers (tristate buffers, 8 in all).** On `b1`: ROM, `m1`, `r1`, `a`.
  On `b2`: RAM, `m2`, `m3`, `r2`.
* **Loads (multiplexer inputs, 11 in all).** From `b1`: operand a of `m1`,
  `m2`, `m3` and `a`, plus register `r1` and the RAM's result word (6 inputs).
  From `b2`: operand b of the four units and register `r2` (5 inputs).

Every multiplexer has a single input, so in the RTL it is a wire. Every unit
has one tristate buffer onto one bus. A bus is modelled as an AND-OR network:
each source is ANDed with its enable and the results are ORed. That gives the
same value as a tristate bus whenever at most one buffer is on. An assertion
in `bus_line` flags contention (two buffers on at once). An idle bus reads 0.

Each functional unit (`fu_mult`, `fu_add`) has two operand latches, loaded
from the buses in one step, with combinational logic behind them. The latches
hold their operands until the next load. So a result stays on the unit's
output until something reads it, and the unit needs no output register. This
is what lets `m2` serve two operations: it is loaded, read four steps later,
and loaded again.

## The schedule, step by step

This is the core of the design, in `fir_ctrl`. The transfers are named
`t1..t15` after the connections they use. A label can recur: `t9`/`t10` (the
registers feeding the adder) happen three times per period, because the one
adder performs all three additions.

| step | bus b1 | bus b2 | loaded at the end of the step |
|---|---|---|---|
| 1 | t1: k0 ROM→m1 | t2: x(n) RAM→m1 | m1 (`*1` starts) |
| 2 | t3: k1 ROM→m2 | t4: x(n-1) RAM→m2 | m2 (`*2`) |
| 3 | t5: k2 ROM→m3 | t6: x(n-2) RAM→m3 | m3 (`*3`) |
| 4 | – | – | |
| 5 | t7: v1 m1→r1 | – | r1 |
| 6 | – | t8: v2 m2→r2 | r2 |
| 7 | t9: r1→a | t10: r2→a | a (`+1`: v1+v2) |
| 8 | t11: k3 ROM→m2 | t12: x(n-3) RAM→m2 | m2 again (`*4`) |
| 9 | t13: v3 a→r1 | t14: v4 m3→r2 | r1, r2 |
| 10 | t9: r1→a | t10: r2→a | a (`+2`: v3+v4) |
| 11 | – | – | |
| 12 | t13: v5 a→r1 | t8: v6 m2→r2 | r1, r2 |
| 13 | t9: r1→a | t10: r2→a | a (`+3`: v5+v6) |
| 14 | – | – | |
| 15 | t15: y a→RAM | – | RAM result word; next sample taken |

Rules this schedule obeys (the control-unit testbench checks each one):

* **Latency.** A unit loaded at the end of step *s* may be read in step
  *s*+4 (multiplier, 80 ns) or *s*+2 (adder, 40 ns), or later. Each unit
  carries a step counter and a `ready` flag, and assertions fire if a result
  is read early or a unit is reloaded too soon.
* **One transfer per bus per step.** A multiplier load needs both buses,
  because the ROM sits only on `b1` and the RAM only on `b2`. So at most one
  multiplier can start per step.
* **Register timing.** A register may be read and reloaded in the same step.
  The bus sees the old value and the new one is stored at the clock edge.

The critical path is `*1` followed by the three additions, with one step
after each operation to store its result: 4+1 + 3·(2+1) = 14 steps, or
280 ns. Only one multiplier can be loaded per step, which pushes the `*2`
operand (and so `+1`) back by a step. The full period is therefore exactly
15 steps: a new sample and a new result every 300 ns.

The source fixes the allocation, the binding of each transfer to units and
buses, the unit delays and the 15-step period. It does not print the step of
each transfer. The table above is one schedule that satisfies all of those
constraints. It also puts the transfers in the order of their numbers.

## Samples, results and the interface

`sample_ram` keeps the last four samples in a circular buffer. Its pointer
arithmetic is modulo 4, so `N_TAPS` must be a power of two. Its bus read port
is addressed by the age of the sample (tap *i* reads x(n-i)), so the schedule
never changes when a new sample arrives: only the head pointer moves. The RAM
also holds one 16-bit result word, written from `b1` in step 15.

Ports of the top, `fir4_fsmd` (one clock = one 20 ns step):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | step clock; asynchronous active-low reset |
| `x_in` | in | 8 | next sample |
| `x_take` | out | 1 | high in step 15; `x_in` is captured at the clock edge ending that step |
| `y_out` | out | 16 | the stored result; constant for a whole period |
| `y_valid` | out | 1 | one-clock pulse in step 1, when `y_out` has just changed |
| `step` | out | 4 | current control step 1..15 |

Latency: a sample taken at the end of period *p* is x(n) during period *p*+1.
Its result appears on `y_out`, with `y_valid`, at the start of period *p*+2.
That is 16 clocks after the sample was captured. Reset clears every register
and memory word. The filter therefore starts from an all-zero history, and
its first `y_valid` brings 0.

Arithmetic is unsigned. Coefficients and samples are 8 bits and products are
16 bits. Sums wrap modulo 2^16: with coefficients up to 255, the exact sum can
reach 260 100. The coefficients are the parameter `COEF` of the top (element
*i* is k*i*). The default is k = 0, 1, 2, 3.

## Files

| file | block |
|---|---|
| `rtl/fir_pkg.sv` | widths, step counts, the control-word struct `ctrl_t` |
| `rtl/fir4_fsmd.sv` | top: control unit, two buses, ROM, RAM, m1–m3, a, r1, r2 |
| `rtl/fir_ctrl.sv` | 15-step control FSM and the schedule above |
| `rtl/bus_line.sv` | one bus with its gated drivers and a contention assertion |
| `rtl/fu_mult.sv`, `rtl/fu_add.sv` | functional units with operand latches and latency tracking |
| `rtl/bus_reg.sv` | intermediate register |
| `rtl/coef_rom.sv`, `rtl/sample_ram.sv` | the two memories |

Each block has a self-checking testbench `tb/tb_<module>.sv`. Two more test
the whole filter:

* `tb/tb_fir4_fsmd.sv` runs the top at its default parameters and compares
  305 results with a reference model. It first feeds 3, 2, 1, 0 and then 1,
  which must give 14 and then 8. It checks the 15-clock rate of samples and
  results, and counts that every bus driver, every load, the double use of
  `m2` and the three-addition reuse of the adder all occur.
* `tb/tb_fir4_wrap.sv` uses coefficients of 255 and checks 16-bit wrap-around.

`tb/tb_fir_ctrl.sv` deserves a note. It runs the control words on a
behavioural model of the data path written inside the testbench. That checks
the schedule on its own: no bus contention, no early reads, one result per
period, and the right result.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
          --top-module tb_fir4_fsmd rtl/fir_pkg.sv tb/tb_fir4_fsmd.sv
./obj_dir/Vtb_fir4_fsmd
```

Replace `tb_fir4_fsmd` with any other testbench name. The end-to-end test
runs in well under a second.

## Where this departs from, or goes beyond, the source

* **Clocking.** The source uses a two-phase clocking scheme (phases `ph1`
  and `ph2`) for the registers, latches and control. It does not say which
  element each phase clocks. Here everything is on the rising edge of one
  clock, one period per control step. The operand "latches" are therefore
  edge-triggered registers. The path from a unit's operand registers through
  the unit and the bus to the destination register is a multicycle path of
  LAT clock periods: 4 for the multiplier and 2 for the adder. A timing
  constraint must say so when the design is synthesized.
* **Tristate buses** are AND-OR networks, as described above.
* **Schedule, memory organisation and interface** are this design's own
  choices, made within the source's allocation, binding, delays and sample
  period. The same goes for how samples enter the RAM, the result word, and
  the `x_take`/`y_valid` handshake.
* **Reset, signedness and overflow** are not specified by the source. The
  choices here are: asynchronous reset to zero, unsigned arithmetic, and
  modulo-2^16 sums.
* **Reference waveform.** The source's reference simulation drives the four
  samples x(n)..x(n-3) as four independent inputs. This design has a real
  delay line, so only its first window, (0,1,2,3) giving 14, can be
  reproduced exactly. The delay line's next window, (1,0,1,2), happens to give
  the same second result, 8. The end-to-end test checks both. A later output
  in that waveform is printed as 12, while the filter equation gives 6 for
  the window shown there. This design follows the equation.
* The synthesis method itself (bounds, the integer-programming schedule,
  bipartite-matching binding) is software, not hardware. It is represented
  here only by its result.

## Changing it

* **Coefficients:** override `COEF` on `fir4_fsmd`.
* **Widths and step counts:** these live in `fir_pkg`. `DATA_W` and `BUS_W`
  must satisfy BUS_W = 2·DATA_W, because the multiplier output fills the bus.
* **Unit latencies or the number of taps:** the schedule in `fir_ctrl` has to
  be redone by hand. The latency and contention assertions, together with
  `tb_fir_ctrl`, will show whether a new schedule is legal.
