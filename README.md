# External memory system for processor arrays

A processor array built from a loop nest (a matrix product, a convolution, a
linear solver) can consume and produce one word per border lane in every
clock cycle. The memory behind it has to keep up, or the array stalls. This
RTL is a memory system that keeps up. It uses no caches and no arbitration.
The data of each input/output variable is spread over several memory banks
that work in parallel. Each bank is dual-ported. Each bank runs at twice the
array clock. One bank can therefore move **four words per array cycle**:
two ports, two accesses each. Banks are added until the array's demand is
met.

The design is the memory scheme published for processor arrays derived in
the polytope model. A mapping step decides how each variable meets the
array, and that decision selects one of four cases. The top level,
`ems_top`, builds all four cases for an 8 x 8 array (the configuration used
for a matrix product) with 32-bit words and 512 Kbit banks.

## The four cases

Whether a variable is an input or an output, and how it meets the array,
gives four cases:

| case | what the array needs | module per bank | helpers |
|---|---|---|---|
| input border | one word per border lane per cycle, e.g. row *i* of A streaming in along one edge | `input_border` | `tagm`, `agu`, `dp_mem_bank`, `sipo_border` |
| output border | one word per border lane per cycle leaving along an edge | `output_border` | `tagm`, `agu`, `dp_mem_bank`, `piso_border`, plus the `te` layer |
| input broadcast | one word *per PE*, delivered ahead of use and held, e.g. a stationary operand | `input_bcast` | `sipo_bcast`, `bcast_in_array` |
| output broadcast | one word *per PE*, gathered and stored | `output_bcast` | `two_pisos`, `piso_bcast`, `bcast_out_array` |

For C = A x B with schedule t = i + j + k, and the array covering the (j, k)
plane, A enters along a border (input border), B sits still in the PEs
(input broadcast) and C leaves along the opposite border (output border).
`ems_top` wires these three as variables **A**, **B** and **C**. It also
places the fourth case beside them as variable **D**, with its own ports.
Each variable gets SSP/4 banks, so two banks for the 8 x 8 array, and one
module per bank.

## Two clocks, one bank, four words

Everything rests on a fixed relation between two clocks:

* `clk_1x`: the array clock.
* `clk_2x`: the memory clock, exactly twice as fast. Its rising edges are
  aligned with those of `clk_1x`. Both must come from one source, for
  example two outputs of one clock manager. No synchronisers are used, and
  none are needed, because the two clocks are synchronous.

Each array cycle is therefore two memory cycles, **phase 0** and
**phase 1**. The phase is held in the T flip-flop of each `tagm`. The
flip-flop toggles on every memory clock edge. Reset clears it, and reset
must be released on a rising edge of `clk_1x`. After that, phase is 0 in the
first half of every array cycle.

A `tagm` (two-address generator module) drives one bank port. It holds two
address generators (`agu`), one for each of two lanes, and a multiplexer
steered by the T flip-flop. In phase 0 the port gets lane 0's address. In
phase 1 it gets lane 1's address. The second port of the bank has its own
TAGM for two more lanes. That makes four lanes per bank.

Read path of the input border case, for an index presented in array cycle c:

```
array cycle      |        c        |       c+1       |       c+2       |
memory cycle     |  ph0   |  ph1   |  ph0   |  ph1   |  ph0   |  ph1   |
port address     | lane0  | lane1  |
bank read data            | word0  | word1  |
SIPO shift pair                    | word0  | w1,w0  |
SIPO array pair                                      | word0, word1 out  |
```

The bank reads synchronously, like an FPGA block RAM. The `sipo_border` has
one register pair in each clock domain. The memory-side pair shifts in both
words. The array-side pair copies them at the next array edge. The words of
an index in cycle c are on `data[]` for the whole of cycle c+2, and a new
index can be taken every cycle.

The write path runs the other way. `piso_border` loads the array's two words
at the end of cycle c. It sends word 0 to the port in phase 0 of cycle c+1
and word 1 in phase 1. The output modules keep the index bus in a register
for one array cycle, so that each word meets its own address.

## Where each word lives: the addressing formula

All address generators evaluate one formula:

```
addr = N*(k + LANE) + i' - FCOL*N*(tilep + BANK)      (mod 2^14)
```

* `N` is the problem size.
* `i`, `k` and `tilep` come from the index bus. `tilep` is the index of the
  current tile of the partitioned processor space.
* `LANE` is the lane's fixed processor-index offset, 4*BANK + q for lane q
  of a bank.
* `BANK` (0 or 1) is the bank's place in its variable's pair.
* `FCOL` = 4 is the number of columns in one data block.
* `i'` = `i` in the border cases. In the broadcast cases it is `i + pos`,
  where `pos` is the AGU's own scan counter (below).

What this means for the data: a matrix is stored column by column, in blocks
of 4 columns. The blocks alternate between the two banks of the variable:
bank 0 holds blocks 0, 2, 4 and so on, and bank 1 holds blocks 1, 3, 5 and
so on. With `k` = 8*t and `tilep` = t for tile t, the formula reduces to
`N*(4t + q) + i`. That is the address of column 8t + 4*BANK + q inside its
own bank.

For N = 170, the largest address used is 14959, so a full 170 x 170 matrix
fits in two 16384-word banks. The 8-bit index bus allows N up to 255 as far
as the indexes go, but the bank capacity limits N to about 181.

The formula is computed with 32-bit arithmetic and cut to 14 bits.
Out-of-range results wrap around; the hardware does not flag them.

## The index bus

`idx_bus_t` (in `ems_pkg`) is driven by the array controller once per array
cycle, as a register output. Each variable has its own bus.

| field | meaning |
|---|---|
| `valid` | this cycle carries an access for every lane of the variable |
| `first` | first index of a broadcast scan or store (restarts the scan counters) |
| `i`, `k` | the variable's two indexes |
| `tilep` | tile index |

In the border cases, every valid index moves one word per lane.

In the broadcast cases, a scan is SSP valid indexes, the first one flagged
`first`. The index may stall between them by dropping `valid`. The scan
counter inside each AGU supplies the position along the row. The counter
restarts on `first`, advances on every valid index and wraps after SSP-1.

## Border cases

`input_border` is one bank, two TAGMs and two SIPOs. It delivers
`data[0..3]` two cycles after the index, with `out_valid` to match. Port 0
serves lanes 0 and 1. Port 1 serves lanes 2 and 3.

`output_border` is one bank, two TAGMs and two PISOs. A word on `din[q]` in
a cycle with `idx.valid` is stored at lane q's address during the next
cycle.

**Transporting elements.** When N is not a multiple of the strip size, the
last iteration of the output variable is computed by an inner PE, not by
the border PE. A layer of `te` elements runs alongside each row of the
array. Each `te` registers either its own PE's result (`sel_pe = 1`) or its
upstream neighbour's output. A result therefore takes one cycle per hop to
reach the border. In `ems_top`, TE column SSP-1 feeds the output border.
The controller raises `c_sel[r][s]` for the PE that holds the final result,
and issues the store index when the word reaches the border: 8 - s cycles
later for column s.

## Broadcast cases

These cases are the least obvious part of the design. Each PE of a row
needs a different word. All rows must be loaded together, and loading must
not stall the array.

**Input.** `input_bcast` reads, on each port, one word for each of two rows
per array cycle. The phase-0 word and the phase-1 word go to different
`sipo_bcast` shift registers, so each port fills two rows. After a scan of
SSP indexes, each of the module's four buses holds the SSP words of one
row: bus q is row 4*BANK + q, and word p is the one read with `i + p`.
`bus_ready` is high in the cycle after the scan's last index. The buses
must be taken at the end of that cycle. The next scan can start at once.

`bcast_in_array` then carries all rows in together.

* Stage 0 takes all SSP buses at once, SSP words per row.
* Each stage gives word 0 to its PE's hold register and passes the
  remaining words to the next stage. Stage s therefore stores SSP - s words
  per row.
* Column s of the hold registers updates s+2 cycles after `bus_ready`.
  `pe_valid[s]` is high in that cycle.

The register count is ROWS*(1+2+...+COLS) for the stages plus ROWS*COLS for
the hold registers. That is 352 words, or 11264 bits, for 8 x 8. This
quadratic growth is the cost of the broadcast cases.

**Output.** `bcast_out_array` is the mirror image.

* `d_capture` copies all PE results into hold registers, which frees the
  PEs at once.
* A pipeline from column 0 to the border column then builds each row's
  sub-block. Stage s appends its PE's word to the s words it receives.
* `d_bus_valid` rises SSP+1 cycles after the capture. The sub-blocks stay
  until the next capture reaches the border.
* Captures must be at least SSP+1 cycles apart.

`output_bcast` stores four such buses in one bank. It is started by a
store: SSP valid indexes, the first flagged `first`, issued while the buses
hold the sub-blocks. `two_pisos` loads both of its buses at the end of the
first index's cycle. Each `piso_bcast` selects one word per cycle with an
SSP-to-1 multiplexer driven by its own scan counter. Bus 0 of a pair is
written in phase 0 and bus 1 in phase 1.

## Latency summary (array cycles)

| path | from | to |
|---|---|---|
| A | index in cycle c | `a_data`, `a_valid` in c+2 |
| B | last index of a scan in c | `bus_ready` in c+1, `b_data[*][s]`/`b_valid[s]` in c+3+s |
| C | result handed to TE column s in c | at the border in c+8-s; stored in the cycle after its index |
| D | `d_capture` in c | `d_bus_valid` in c+9; each word stored one cycle after its index |

## Host port

How the banks are filled and emptied is outside the scheme. Every module
here adds a `host` request (`host_req_t`: `en`, `we`, `addr`, `wdata`) in
the memory clock domain. While `en` is high, it takes over port 0 of the
bank. Read data appears on `host_rdata` one memory cycle after the address.
It may be used only while that variable's index bus is idle; an assertion
checks this. In `ems_top`, host port `2*v + b` reaches bank b of variable v,
with A = 0, B = 1, C = 2 and D = 3.

## What follows the original scheme and what is this design's own

From the scheme:

* the four cases and what each module contains (TAGM = two AGUs + T
  flip-flop + multiplexer; SIPO = two register pairs in two clock domains;
  broadcast PISO = register, SSP-to-1 multiplexer and counter);
* dual-port banks at twice the array clock, giving four words per bank per
  cycle;
* the addressing formula;
* scan counters in the broadcast AGUs;
* the pipeline-stage structure and register count of the broadcast data
  arrays;
* the TE layer (multiplexer plus register);
* 8 x 8 array, 32-bit words, 512 Kbit banks.

Choices made here, where the scheme is silent:

* the index bus fields and the `first` flag;
* 8-bit indexes;
* synchronous reset and the phase alignment it provides;
* read-first synchronous banks;
* which of a port's two lanes goes in phase 0;
* the one-cycle index register in the output modules;
* a single capture strobe for the output broadcast array;
* one cycle per broadcast stage;
* the host port;
* two banks per variable with FCOL = 4. This is the reading of the
  addressing formula under which it tiles a matrix without gaps. The
  modules check `FCOL == 4` at elaboration.

The scheme treats the array's entry and exit skew as the array's own
business (its FIFOs). This memory system presents all lanes of one index in
the same cycle.

## Not included

* **The processor array.** It is generated by a separate synthesis flow.
  Its signals are ports of `ems_top`.
* **The controller that drives the index buses and TE selects.** It is
  likewise generated elsewhere.
* **The clock source for `clk_2x`/`clk_1x`.**

The scheme also allows fewer banks for smaller arrays, by dropping the
double clock or the second port. Those variants are not built.

## Files

* `rtl/ems_pkg.sv`: widths, `idx_bus_t`, `host_req_t`.
* `rtl/agu.sv`, `rtl/tagm.sv`, `rtl/dp_mem_bank.sv`: addressing and storage.
* `rtl/sipo_border.sv`, `rtl/piso_border.sv`, `rtl/input_border.sv`,
  `rtl/output_border.sv`, `rtl/te.sv`: the border cases.
* `rtl/sipo_bcast.sv`, `rtl/input_bcast.sv`, `rtl/bcast_in_array.sv`,
  `rtl/piso_bcast.sv`, `rtl/two_pisos.sv`, `rtl/output_bcast.sv`,
  `rtl/bcast_out_array.sv`: the broadcast cases.
* `rtl/ems_top.sv`: the complete system.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_util_pkg.sv`: a reference copy of the addressing formula.
* `tb/tb_ems_top.sv`: an end-to-end run at full size (all four variables
  plus host fill and read-back; it counts each mechanism and fails if one
  never happened).
* `tb/tb_matmul.sv`: complete matrix products for N = 8, 5 and 3, through
  a modelled 8 x 8 array that follows the recurrences of the product. For
  N = 5 and 3, results come from inner PEs over the TE layer. The same
  testbench also runs two 8 x 8 tiles of a 170 x 170 product. For these,
  the full matrices are stored, and the array computes one k strip's
  partial product for one j strip over all 170 rows, at non-zero tile
  indexes. All results are checked against a reference product.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ems_top \
    -y rtl -y tb +libext+.sv rtl/ems_pkg.sv tb/tb_util_pkg.sv tb/tb_ems_top.sv
./obj_dir/Vtb_ems_top
```

Replace `tb_ems_top` with any other testbench name. Each testbench ends
with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

The testbenches generate both clocks from one process, so the rising edges
are truly simultaneous. A clock derived through a non-blocking assignment
would race the memory-side registers.

All testbenches finish within seconds. `tb_ems_top` and `tb_matmul` run the
top at its default parameters, with eight 16384-word banks.
