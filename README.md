# Byte-serial matrix multiplier with a single multiply-accumulate element

This RTL computes C = A x B for square matrices of unsigned bytes, of any
order N from 1 up to a build-time maximum NMAX. It uses one processing
element. Two block RAMs hold A and B. Each clock they deliver one element of a
row of A and one element of a column of B over dedicated routes. The PE
multiplies the pair in one cycle and adds the product into a running sum. A
small down-counter decides when the sum is complete: after N products. The
finished element then goes through a result FIFO into a third block RAM, which
holds C. Only one multiplier and one adder are needed for any N. Changing N
changes nothing but a counter value. The price is N^3 cycles per product.

The same engine scales by repeating hardware. A parameter `P` builds P
processing elements that never exchange data. Each has its own memories for
its share of the rows of A and C, and all of them receive the same element of
B. The default build has one element.

Next to this engine, the top level also holds the other arrangement the
architecture describes: an NMAX x NMAX array of multiplier cells. Each clock
it takes a whole column of A and a whole row of B, and it finishes C in N
cycles.

The structure follows a published FPGA matrix-multiplier architecture:

- three memories;
- a PE made of a multiplier, a register, an adder and a counter;
- a result FIFO;
- a control unit;
- the outer-product multiplier array.

Widths beyond the byte inputs, the handshakes, the address map, the FIFO depth
and the reset behaviour are this implementation's own choices. They are listed
under "Choices and departures".

## Block overview

```
          addr1/din1                    addr2/din2
              |                             |
          +---v---+                     +---v---+
          | MEM1  |  A                  | MEM2  |  B        (matrix_mem)
          +---+---+                     +---+---+
              | 1 byte/clk                  | 1 byte/clk
              +-------------+  +------------+
                            |  |
                    +-------v--v--------+
                    |  PE (mac_pe)      |
                    |  X -> reg -> +    |<-- counter (N)
                    +---------+---------+
                              | one element of C per N clocks
                        +-----v-----+
                        |  FIFO     |                   (result_fifo)
                        +-----+-----+
                              |
          addr3 ---------> +--v---+
                           | MEM3 |--> dout3            (matrix_mem)
                           +------+
   matmul_ctrl: generates the MEM1/MEM2 read addresses, the PE valid
   strobe, the FIFO pops and the MEM3 write addresses.

   outer_product_array (separate ports op_*): NMAX x NMAX MAC cells.
```

## The processing element and its counter

`mac_pe` has two register stages.

1. **Multiply.** When `in_valid` is high, `a*b` (16 bits) is registered. The
   multiply takes one clock.
2. **Accumulate.** The registered product is added into the partial-sum
   register. The adder's second operand comes through a "feedback buffer":
   either the stored partial sum or zero.

The counter `cnt` holds the number of products of the current element that are
still to come:

| `cnt` when a product arrives | feedback | new partial sum | new `cnt` | output strobe              |
|------------------------------|----------|-----------------|-----------|----------------------------|
| 0 (first term of an element) | off      | product         | N-1       | only if N = 1              |
| 1                            | on       | sum + product   | 0         | yes, on the next clock     |
| > 1                          | on       | sum + product   | cnt-1     | no                         |

While the counter is not zero, the stored sum is fed back. When the counter
returns to zero, the output buffer fires (`out_valid` for one cycle), and the
next product is loaded with the feedback off. This starts the next element
with no idle cycle in between, so back-to-back elements flow at full rate. The
counter only moves on valid products, so gaps in the input stream are
harmless. `clear` empties the pipeline at the start of a run.

The result of an element appears two cycles after its last input pair: one
cycle for the multiplier and one for the adder. Results are
`2*DATA_W + clog2(NMAX)` bits wide, 18 by default. That is enough for the
largest possible sum, NMAX x 255 x 255, so no precision is lost.

## Memory map and host protocol

All three memories are `matrix_mem`: a single-port synchronous RAM. In each
clock it either writes (`we` high) or reads into a registered output
(`we` low). A read therefore takes one cycle, and the output holds during a
write. Each memory has NMAX*NMAX words. Element [r][c] is stored at
`r*NMAX + c` whatever the run's order N, so the row stride is always NMAX.

Using `matmul_top`:

1. **Load.** While `busy` is low, raise `load_we`. Put A elements on
   `addr1`/`din1` and B elements on `addr2`/`din2`; both memories are written
   in the same cycle. `load_we` is ignored while `busy` is high.
2. **Start.** Pulse `start` for one cycle, with the order on `n`. The start is
   ignored:
   - if `n` is 0 or larger than NMAX;
   - if a run is already in progress.
3. **Wait.** `busy` stays high until `done` pulses for one cycle.
4. **Read back.** Put `r*NMAX + c` on `addr3`. `dout3` shows C[r][c] on the
   next clock. MEM3 is single-ported: in a cycle where the control unit writes
   a result, `addr3` is ignored. Read C after `done`.

## Control unit sequence

`matmul_ctrl` is a four-state machine: IDLE, RUN, DRAIN and DONE.

**RUN.** This state walks i, j, k with k innermost. Each clock it presents:

- `i*NMAX + k` to MEM1 (element A[i][k]);
- `k*NMAX + j` to MEM2 (element B[k][j]).

So C[0][0] is formed from row 0 of A and column 0 of B, then C[0][1], and so
on. The PE's valid strobe is the read strobe delayed by one cycle, to match
the memories' read latency. After N^3 reads the machine moves to DRAIN.

**Writing results.** In both RUN and DRAIN, whenever the FIFO is not empty,
the controller pops one entry. It writes the entry to MEM3 at the next
row-major address of C. After the N*N-th write it goes to DONE for one cycle,
then back to IDLE.

**Measurements.** The controller also counts two times for every run and
reports them on `latency_cycles` and `total_cycles`:

- **latency:** from the first read of A and B to the first write of C;
- **total computation time:** from the first read to the last write of C.

## Timing

Pipeline from a read address to the MEM3 write:

| stage                     | cycles |
|---------------------------|--------|
| memory read               | 1      |
| multiply                  | 1      |
| add                       | 1      |
| FIFO (write, then pop)    | 1      |

| quantity (P = 1)              | cycles  | N = 3 |
|-------------------------------|---------|-------|
| latency to first element of C | N + 3   | 6     |
| total computation time        | N^3 + 4 | 31    |
| `start` to `done`             | N^3 + 5 | 32    |

The PE delivers at most one result every N cycles, and MEM3 takes one per
cycle, so the FIFO holds at most one entry. Its depth of 4 only adds slack. An
assertion checks that the PE never pushes into a full FIFO.

## Several processing elements (`P` > 1)

Setting `P` replicates everything except MEM2. Element p gets its own MEM1,
PE, FIFO and MEM3. It holds the rows r of A and C with `r mod P = p`, at local
row `r div P`. MEM2 (matrix B) is read once per clock, and its output goes to
every element.

The control unit runs the elements in lockstep over ceil(N/P) local rows. All
elements see the same local A address and the same B address. Element p
computes C[ii*P+p][j] for local row ii. If that row is not below N, the
element's valid strobe is held low for that row, so its PE and FIFO stay idle.
Element 0 always has a row, so its FIFO paces the write-back. Every non-empty
FIFO is popped in the same cycle, into its own MEM3.

The host addresses do not change with P. Element [r][c] is still written and
read at `r*NMAX + c`; the top splits that address into an element number and
a local address. The run time falls to ceil(N/P)*N^2 + 4 cycles. The latency
stays at N + 3.

The rows are interleaved (`r mod P`) rather than given out as contiguous
blocks. Contiguous blocks would leave elements idle whenever a run's N is
below NMAX. With interleaving, any N spreads as evenly as it can.

## The multiplier array (outer-product order)

`outer_product_array` reads the matrices the other way round. In step k it
takes column k of A (`a_col[i] = A[i][k]`) and row k of B
(`b_row[j] = B[k][j]`). Cell (i,j) then adds `A[i][k]*B[k][j]` to its own
element of C. Every input element is used exactly once. One partial product of
every element of C is formed per clock, so N steps finish the product.

Using the array:

1. Pulse `start`, with the order on `n`. This clears all cells.
2. Supply N column/row pairs with `in_valid` high. They need not be in
   consecutive cycles.
3. `done` pulses two cycles after the N-th pair.
4. Read the result on `c`. It is held until the next `start`.

For N < NMAX, drive zeros outside the N x N corner, or ignore those cells.

This engine needs NMAX bytes of A and NMAX bytes of B per clock. The byte-wide
MEM1/MEM2 cannot supply that, so in `matmul_top` the array sits on its own
`op_*` ports and shares only clock and reset with the single-PE engine.

## Parameters

| parameter    | default | where            | meaning                                        |
|--------------|---------|------------------|------------------------------------------------|
| `DATA_W`     | 8       | top, PE, array   | width of an element of A and B (one byte)      |
| `NMAX`       | 3       | top, PE, array, control | largest order; memories hold NMAX*NMAX words |
| `P`          | 1       | top, control     | number of processing elements                  |
| `FIFO_DEPTH` | 4       | top              | result FIFO depth (per element)                |

Derived widths are computed in `matmul_pkg`:

- order: `clog2(NMAX+1)`;
- address: `clog2(NMAX*NMAX)`;
- local address: `clog2(ceil(NMAX/P)*NMAX)`;
- result: `2*DATA_W + clog2(NMAX)`.

NMAX = 3 matches the 3 x 3 case the architecture is worked through with. The
RTL is written for any NMAX. Only the array's size grows as NMAX^2; the
PE engine grows only in its memories and counters, times P.

## Choices and departures

Two points in the source architecture pull in different directions. In each
case one reading was built, and the other is kept or noted.

**Processing order.** The architecture says it needs only one PE, and it reads
a row of A against a column of B. It also describes an outer-product reading
order that needs a full array of multipliers. Both are built:

- the single PE is the main datapath, fed from the memories;
- the array is a second engine on its own ports.

The architecture does not say how the array is fed from memory.

**Result storage.** A separate MEM3 for C is used, as in the three-memory
block diagram. The architecture also mentions keeping C in the same block RAM
as the PE's local memory; that is not done here.

The following are this implementation's own choices:

- unsigned arithmetic;
- exact-width results, with no truncation or saturation;
- an active-low asynchronous reset;
- row-major storage with stride NMAX;
- the interleaved assignment of rows to processing elements;
- the start/busy/done handshake;
- the first-word-fall-through FIFO and its depth;
- the two-stage PE pipeline, with 1-cycle multiply and 1-cycle add;
- the cycle counters;
- the `clear` and `start` inputs of the PE and the array.

The counter that drives the feedback and output buffers is kept inside the PE.
The architecture notes that the control unit could equally drive them.

## Files

| file                         | contents                                               |
|------------------------------|--------------------------------------------------------|
| `rtl/matmul_pkg.sv`          | default sizes, width functions, control state enum     |
| `rtl/matrix_mem.sv`          | single-port block RAM (MEM1, MEM2, MEM3)               |
| `rtl/mac_pe.sv`              | processing element with counter-steered accumulation   |
| `rtl/result_fifo.sv`         | first-word-fall-through result FIFO                    |
| `rtl/matmul_ctrl.sv`         | control unit: address generation, result write-back    |
| `rtl/outer_product_array.sv` | NMAX x NMAX multiplier array                           |
| `rtl/matmul_top.sv`          | top level                                              |
| `tb/tb_*.sv`                 | one self-checking testbench per module                 |

## Simulation

Every testbench is self-checking. Each one:

- computes its expected values itself;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<n>`.

Run, for example, the end-to-end test with:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_matmul_top \
    rtl/matmul_pkg.sv tb/tb_matmul_top.sv rtl/*.sv
./obj_dir/Vtb_matmul_top
```

Other testbenches are run the same way, with their own top module:
`tb_matrix_mem`, `tb_mac_pe`, `tb_result_fifo`, `tb_matmul_ctrl`,
`tb_outer_product_array`.

`tb_matmul_top` runs at the default parameters. It does the following:

- multiplies random matrices for every order 1..NMAX, plus a few random
  orders;
- runs one all-0xFF product, the largest possible values;
- reads C back through MEM3 and checks every element;
- checks the reported latency (N+3) and total time (N^3+4) against its own
  cycle count;
- checks that a start and a memory write issued during a run are ignored;
- repeats every product on the multiplier array and checks it.

It also counts that each mechanism occurred: fresh loads and accumulations in
the PE, FIFO pushes, MEM3 writes, changes of order, and runs of the array.

`tb_matmul_scaling` builds the same top with NMAX = 8 and P = 3. It runs every
order from 1 to 8 on both engines, so it covers orders that do and do not
divide evenly over the three elements. Near-maximal byte values exercise the
wider result path. It checks the run time ceil(N/3)*N^2 + 4, and that an
order of 9 is refused. `tb_matmul_ctrl` tests the control unit alone, with
P = 2 and NMAX = 5.

## How far to trust it

All modules pass Verilator lint and elaborate with a second SystemVerilog
front end. All testbenches pass. Each testbench also fails on a copy of its
module with one deliberate bug.

The remaining lint warnings are understood:

- a constant comparison when NMAX+1 is a power of two;
- the reset used in assertion `disable iff` clauses;
- package constants unused by some modules;
- one unconnected FIFO status output.

Only two-state simulation has been done. No FPGA timing or resource results
were produced.
