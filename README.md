# Jacobi load-flow pipeline

A full-AC load flow finds the complex voltage of every bus of a power
network from the network's admittance matrix (the Y-bus) and the power
injected at each bus. The Jacobi method updates every bus voltage from the
*previous* voltage vector:

    V(i) <- ( (S(i)/V(i))*  -  sum_{k != i} Y(i,k) V(k) ) / Y(i,i)      S = P + jQ

Jacobi needs more iterations than Gauss-Seidel or Newton-Raphson. But the
rows of one iteration do not depend on each other, so a deep floating-point
pipeline can take a new row every few clocks and never wait for a result.
The Y-bus is very sparse: a bus has about four neighbours. This RTL builds
that pipeline as one chain of pipelined multipliers, adders and dividers.
A row takes about four clocks to enter, and its new voltage comes out 90
clocks later.

The accelerator does not work alone. A host program queues the rows of an
iteration. It reads back each new voltage and its squared magnitude. It
rescales generator buses to their set voltage magnitude and checks for
convergence. The hardware is the same for Jacobi and Gauss-Seidel. Only the
host's scheduling differs: for Gauss-Seidel the host holds a row back while a
neighbouring row is still in the pipe.

## Dataflow

```
 host ──elements──► input queue ──► Q-estimator / ──Q,R,X,V(i),row,type──► S/V unit ──R',X',row──► Y-bus scaling ──► result queue ──► host
                    (sync_fifo)     inner product                          (P,Q memory)            (Y(i,i) memory)    (sync_fifo)
                                    (qest_ip_unit)                         (sv_unit)               (ybus_scale_unit)
```

`jacobi_pipeline` is the top. Nothing between the two queues ever stalls. A
row that has started reaches the result queue after a fixed number of
clocks.

### Row packets

The host sends row *i* as a packet of `elem_t` elements, one per non-zero
of the row, one element per clock:

| field     | meaning                                        |
|-----------|------------------------------------------------|
| `g`, `b`  | Y(i,k) = G + jB                                |
| `vr`, `vj`| V(k), the current voltage of bus k             |
| `row`     | i                                              |
| `btype`   | `BUS_LOAD` or `BUS_GEN`                        |
| `row_len` | number of non-zeros in row i (the packet size) |

**The diagonal element Y(i,i) must come first.** Its voltage is V(i), the
voltage of the bus being updated. The pipeline reads the row length from the
first element only. Slack-bus rows are not sent.

Before a solve the host writes two per-bus tables through the `cfg_*` port:
{P, Q} with `cfg_sel = 0`, and {G(i,i), B(i,i)} with `cfg_sel = 1`. The
first value of each pair goes in bits 63:32. Q is used only for load buses.
The tables hold up to `N_BUS` buses (100,000 by default).

## The Q-estimator / inner-product unit

This is the hardest part of the design. Each row needs the complex sum
I = Σ_k Y(i,k) V(k), taken over a variable number of elements. The adder
that forms the sum takes four clocks, so a plain running sum could take only
one element every four clocks.

The unit keeps **four lane partial sums** in a four-entry buffer (one set
for the real part, one for the imaginary part). Element *k* of a row goes to
lane *k mod 4*:

1. Two multipliers and an adder form Y(i,k)·V(k). The real part is
   G·Vr + (−B)·Vj and the imaginary part is G·Vj + B·Vr.
2. The accumulating adder adds that product to the lane's partial sum. In a
   row's first four elements the partial sum is zero. Because the adder has
   exactly four stages, the partial sum of element *k* leaves the adder in the
   same clock that element *k+4* arrives. A bypass feeds it straight back, so
   a long row streams at one element per clock.
3. When the last lane result of the row leaves the accumulator, two adders
   add lanes 0+1 and 2+3, and a third adds the two halves. This gives I.
4. Two adders subtract the diagonal term Y(i,i)·V(i), which was captured
   when the first element passed step 1. The result is the inner product
   R + jX over k ≠ i.
5. In parallel, two multipliers and an adder form the reactive-power estimate
   Q = Vj(i)·Re I − Vr(i)·Im I, which is Im(V I*).

**Slots and pads.** A row occupies ceil(NZ/4)·4 issue slots. Slots after the
last element are filled with zero elements. This is how every lane ends each
row with a valid value. A row with 2 to 4 non-zeros costs 4 clocks, a row
with 5 to 8 costs 8, and so on. These pad slots are the pipeline's only
bubbles, apart from waiting for the host. `pad_slot` pulses for each one. A
new row starts only when the top allows it (`row_ok`, see flow control).
Inside a row the unit waits only for elements that have not arrived yet. A
gap inside a row is harmless, because partial sums wait in the buffer.

The row's side-band data is its index, bus type, V(i) and diagonal product.
It travels through a small FIFO (from the first element until the row
completes) and through delay lines after that.

Q is computed for every row. The S/V unit uses it only for generator buses,
whose reactive injection is unknown.

## S/V unit and Y-bus scaling unit

`sv_unit` reads {P, Q} by row index. It uses the estimated Q for generator
buses. It computes

    R' + jX' = [(P·Vr + Q·Vj) + j(P·Vj − Q·Vr)] / (Vr² + Vj²)  −  (R + jX)

This uses six multipliers, three adders, two dividers that share the
denominator, and two subtractors.

`ybus_scale_unit` reads {G, B} = Y(i,i) by row index. It computes

    V(i) = [(R'·G + X'·B) + j(X'·G − R'·B)] / (G² + B²),   SUMSQ = Vr² + Vj²

SUMSQ is reported for generator buses and is 0 for load buses. The host uses
SUMSQ to scale a generator's voltage back to its set magnitude without a
square root in hardware.

## Arithmetic

All values are IEEE-754 single precision (`fp_t`). The cores round to
nearest (ties to even). They flush subnormal inputs and results to zero.
Overflow and division by zero give a signed infinity. There is no NaN
handling. The kernels are functions in `jlf_pkg`. The core modules
(`fp_mul`, `fp_addsub`, `fp_div`) wrap them in fixed-latency pipelines of 5,
4 and 13 stages, one operation per clock, with no stall input. Each core
does its whole operation in its first stage. The remaining stages are plain
registers, left for a synthesis tool's retiming to balance. To reach a real
clock rate, replace the cores with vendor or hand-pipelined cores of the
same latency. All other modules take the latencies from `jlf_pkg`
(`MUL_LAT`, `ADD_LAT`, `DIV_LAT`), so a core with a different latency only
needs those constants changed.

## Flow control and timing

* Input side: `in_valid`/`in_ready` into a 256-element first-word-fall-through
  queue.
* Output side: `out_valid`/`out_ready` from a 64-row result queue
  (`result_t`: Vr, Vj, SUMSQ, row).
* Credit: a row may start only while (rows in flight + results waiting) <
  `OUT_DEPTH`. A full result queue therefore stops new rows at the head of
  the pipe and never drops a result. `credit_stall` is high while this
  limit holds new rows back.

| stage                     | latency (clocks)                       |
|---------------------------|----------------------------------------|
| Q-estimator / inner product | 30 from the row's last slot (2·5 + 5·4) |
| S/V unit                  | 27 (1 memory + 5 + 4 + 13 + 4)          |
| Y-bus scaling             | 32 (1 memory + 5 + 4 + 13 + 5 + 4)      |
| result queue              | 1                                       |

A result is visible at the output 90 clocks after its row's last slot. One
Jacobi iteration over a network costs Σ ceil(NZ(i)/4)·4 clocks of issue, plus
90 clocks to drain. Later iterations can follow as soon as the host has the
new voltages.

## Capacity and benchmark-sized systems

The per-bus tables are sized for 100,000 buses. The row-length field is 8
bits wide (up to 255 non-zeros per row). Rows stream through, so the queues
never need to hold a whole network.

The four benchmark systems of the original design are listed below. Each
one's bus count, total non-zeros and largest row fit easily.
`tb_workloads` runs one pass over a synthetic system with each shape; the
real network data is not included.

| buses | non-zeros (max/row) | issue slots per pass (synthetic) | clocks for one pass | original estimate (later / first iteration) |
|------:|------:|------:|------:|------:|
| 118   | 490 (13)    | 636    | 726    | 567 / 890      |
| 300   | 1118 (13)   | 1496   | 1586   | 1250 / 1945    |
| 1648  | 6680 (24)   | 8872   | 8962   | 7828 / 11223   |
| 7917  | 32211 (16)  | 42524  | 42614  | 39707 / 55649  |

The synthetic systems spread row lengths at random between the minimum and
maximum. This gives more rows of five or more non-zeros than real networks
have, so they need more slots than the original estimates.

## What this RTL covers, and where it departs from the original design

Built as the original design describes it:
* the three-unit chain
* the arithmetic networks of each unit
* the four-entry partial-sum buffer
* Q estimation in parallel with the inner product
* per-bus P/Q and Y-bus-diagonal tables read by row index
* SUMSQ for generator voltage control
* the core latencies (5/4/13)
* the 100,000-bus capacity

Choices made here that the original design does not specify:
* single-precision floating point
* the packet layout with the diagonal element first
* summing all entries and subtracting the diagonal term afterwards
* the lane/slot/pad scheme of the accumulator
* queue depths and valid/ready handshakes
* the credit rule for the result queue
* SUMSQ reported as 0 for load buses
* table word layouts

Not built:
* The pipe-management and back-end stages, which are host software in this
  design. The end-to-end testbench models both.
* The PCI-X/DMA host interface. The queue ports stand where it would
  connect.
* The 128-bit ring that links several FPGAs. Only its width and topology
  are known.
* Several parallel pipelines. The design is one pipeline.

## Files

| file | contents |
|------|----------|
| `rtl/jlf_pkg.sv` | types (`elem_t`, `ip_out_t`, `sv_out_t`, `result_t`), sizes, core latencies, floating-point kernels |
| `rtl/fp_mul.sv`, `rtl/fp_addsub.sv`, `rtl/fp_div.sv` | pipelined floating-point cores |
| `rtl/delay_line.sv` | side-band delay registers |
| `rtl/sync_fifo.sv` | input and result queues |
| `rtl/row_mem.sv` | per-bus tables |
| `rtl/qest_ip_unit.sv`, `rtl/sv_unit.sv`, `rtl/ybus_scale_unit.sv` | the three pipeline units |
| `rtl/jacobi_pipeline.sv` | top |
| `tb/tb_*.sv` | self-checking testbenches; `tb/tb_fp_ref_pkg.sv` is the double-precision reference |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build one with Verilator 5, listing the packages first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jacobi_pipeline \
  rtl/jlf_pkg.sv tb/tb_fp_ref_pkg.sv rtl/fp_mul.sv rtl/fp_addsub.sv rtl/fp_div.sv \
  rtl/delay_line.sv rtl/sync_fifo.sv rtl/row_mem.sv rtl/qest_ip_unit.sv rtl/sv_unit.sv \
  rtl/ybus_scale_unit.sv rtl/jacobi_pipeline.sv tb/tb_jacobi_pipeline.sv -o sim
./obj_dir/sim
```

* `tb_jacobi_pipeline` runs at the top's default sizes. It solves a 10-bus
  network three times: Jacobi with a gap-free host, Jacobi with random gaps,
  and Gauss-Seidel. It checks every returned row against a double-precision
  update and the converged voltages against a double-precision solution. It
  also checks row spacing and latency exactly, and fills both queues to
  exercise the credit stall and a full input queue.
* `tb_workloads` runs the benchmark-shaped passes above and checks every row
  and the exact pass time.
* The unit testbenches check each core bit-exactly against double precision
  rounded to single, and each unit to 1e-5 relative. They also check each
  latency to the clock.

Each testbench takes well under a second.
