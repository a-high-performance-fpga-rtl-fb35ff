# Dual-FPGA accelerator for double-precision matrix multiplication (BLAS dgemm)

This RTL computes C = A x B on 64-bit IEEE 754 floating-point matrices. The
work is spread over two FPGAs on one PCI board. Matrix multiplication suits
this kind of hardware because every word fetched from memory can feed many
operations. For n x n matrices there are 2n³ operations against 2n² memory
words, so the bottleneck moves from the memory to the arithmetic.

Each FPGA holds a **linear chain of processing elements (PEs)**. Each PE is a
64-bit multiply-accumulate (MAC) unit with a small local memory. A **master**
feeds the chain one element of A and one element of B per clock. The elements
move from PE to PE, one PE per clock. Each PE picks out the A elements that
belong to its row of C. With this shape, adding PEs raises the compute rate,
but the memory still only has to supply two 64-bit words per clock.

The structure follows a published design: the two-FPGA board, the PE chain
fed by a master, 14 PEs per FPGA, a 14-stage MAC, block-wise products, A split
into two 32-bit banks, and B shared over a direct FPGA-to-FPGA link. The
published description stops at block diagrams and a few formulas. Everything
below that level is this design's own choice, marked as such in each file
header and summarised in [Departures and own choices](#departures-and-own-choices).

## How the product is split

```
           B (N x K), stored once, in FPGA 2's SODIMM
          ┌───────────────┐
          │ col block 0 1 …│   each column block is SJ = 32 wide
          └───────────────┘
A (M x N)                      C (M x K)
┌────────┐ upper half          ┌────────┐
│ FPGA 1 │ ───────────────────▶│ FPGA 1 │  rows 0 … M/2-1
├────────┤ lower half          ├────────┤
│ FPGA 2 │ ───────────────────▶│ FPGA 2 │  rows M/2 … M-1
└────────┘                     └────────┘
```

* **Between the FPGAs:** each FPGA computes its own half of the rows of C.
  Both need all of B. FPGA 2 reads each B word once from its SODIMM bank,
  uses it itself, and forwards it to FPGA 1 over a 64-bit link.
* **Within one FPGA:** C is cut into blocks of `NUM_PE x SJ` (14 x 32 by
  default). PE number p computes row p of the current block. Its 32 running
  sums stay in a 32-entry memory inside the PE. Each A element held in a PE
  is used 32 times, and each B element passing by is used once per PE.
* **Padding:** the host pads the last block row and block column with zeros.

## The operand stream

The host software rearranges A and B into exactly the order the hardware
consumes them. The hardware therefore only ever reads memory sequentially,
in bursts, and needs no address generator for operands. For each block
(block row `br`, block column `bc`), in order:

* **A stream:** for k = 0 … N-1, the NUM_PE elements `A[br*NUM_PE + p][k]`.
* **B stream:** for k = 0 … N-1, the SJ elements `B[k][bc*SJ + j]`.

The master merges the two streams into **rounds** of SJ slots. It sends one
`slot_t` per clock into PE 0 (see `dgemm_pkg`):

| field | meaning |
|---|---|
| `a_valid`, `a_row`, `a` | an A element, and the PE (row) that must keep it |
| `b_valid`, `b_col`, `b` | a B element, and the column of the block it belongs to |
| `k_first`, `k_last` | this B row starts / finishes the dot products |

Round g carries the following:

* **B part:** B row `k = (g-1) mod N` of block `(g-1)/N`, in all SJ slots.
* **A part:** A column `g mod N` of block `g/N`, in the first NUM_PE slots.

A PE catches its A element during round g into `a_next`. It moves the element
to `a_cur` when round g+1 begins, which is the slot with `b_col == 0`, so the
next column can load while the current one is in use. Rounds run back to back
across blocks. A run of B blocks therefore takes `B*N + 1` rounds, that is
`(B*N + 1) * SJ` slots.

Every slot that carries a B element starts one MAC in every PE it passes:

```
C[p][j] = (k_first ? 0 : psum[j]) + a_cur * B[k][j]      written back to psum[j]
```

The MAC is pipelined over 14 stages: 6 for the multiplier, 8 for the adder.
A partial sum leaves the adder 8 cycles after it was read. The same `psum[j]`
is read again SJ = 32 slots later, so the result is always back in time, and
the accumulation needs no forwarding or hazard logic. The PE checks
`SJ > ADD_LAT` at elaboration. Empty slots only stretch that distance, so
they are always safe.

## Flow control: bubbles, result stalls and link credits

All waiting in the design happens at three points:

1. **Stream bubbles.** SDRAM does not deliver data on every cycle; the
   published figure is about 75 % of cycles. The master sends a slot only
   when every operand it needs (A, B or both) is there. Otherwise it sends an
   empty slot. Because every slot carries its own tags, the PEs simply ignore
   empty slots.
2. **Result stall.** When the `k_last` B row of a block passes a PE, that PE
   finishes 32 results. Results return to the master through a chain, one
   result register per PE:
   * a PE forwards results from its downstream neighbour first;
   * it sends its own results, held in a 32-deep buffer, when the chain is
     free;
   * the chain delivers one result per clock to the master.

   To keep every buffer from overflowing, the master holds back the first
   slot of a block's last round until all results of the previous block have
   arrived. When N is at least about NUM_PE, the results drain during the
   next block and this stall never triggers. For small N it does trigger.
   `RES_STALLS` counts it.
3. **Link credits.** FPGA 2 passes B to FPGA 1 through `b_link_tx` and
   `b_link_rx` (credit-based flow control):
   * `b_link_tx` retires a SODIMM word only after both FPGA 2's master and
     the link have taken it;
   * it sends a word on the link only while it holds a credit;
   * `b_link_rx` returns one credit for each word its master consumes.

   So the slower FPGA throttles the faster one without any word being lost.

## Memory side

* **A and C (`split_word_reader`, `split_word_writer`).** Each FPGA has two
  32-bit DDR2 banks. The host splits every 64-bit word: the low half goes to
  bank 0 and the high half to bank 1, at the same address. A `bank_reader`
  per bank issues sequential read requests. It never has more words in
  flight than its buffer can hold, so the two banks can run with different
  latencies and gaps. The writer stores each 64-bit result the same way, at
  `c_base + block*NUM_PE*SJ + row*SJ + col`, and the host rearranges C
  afterwards.
* **B (`bank_reader` with DW = 64).** On FPGA 2 a single 64-bit reader takes
  B from the SODIMM.
* **Memory-controller interface (own choice).** An in-order request/response
  port:
  * requests: `req_valid`/`req_addr`/`req_ready`;
  * read data: `resp_valid`/`resp_data`, a fixed number of cycles later, with
    no back-pressure;
  * writes: a valid/ready port.

  The DDR2 controllers themselves are vendor IP and are not part of this RTL.

## Control registers (`ctrl_regs`)

Each FPGA has a 32-bit register bus with word addresses. Read data appears
one cycle after `reg_rd`. On the board this bus would sit behind the PCI
bridge.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | CTRL | W | bit 0 = 1 starts a run (ignored while busy) |
| 1 | STATUS | R/W1C | bit 0 busy, bit 1 done (sticky; write 1 to clear) |
| 2 | N | RW | inner dimension |
| 3 | NUM_BLOCKS | RW | number of NUM_PE x SJ blocks to compute |
| 4, 5, 6 | A_BASE, B_BASE, C_BASE | RW | 64-bit word addresses |
| 7 | CYCLES | R | clock cycles of the last run |
| 8, 9, 10 | SLOTS, BUBBLES, RES_STALLS | R | master event counters |

To run a product, the host does the following:

1. Load the rearranged streams into memory.
2. On both FPGAs, write the same N and NUM_BLOCKS, and that FPGA's base
   addresses.
3. Set CTRL on both FPGAs.
4. Poll STATUS.done on both FPGAs.
5. Read C back.

## Floating point (`fp64_pkg`, `fp64_mul`, `fp64_add`, `fp64_mac`)

* **Rounding:** IEEE 754 binary64, round to nearest even.
* **Subnormals** are flushed to zero, on input and on output.
* **NaN:** any NaN input gives the quiet NaN `0x7FF8000000000000`.
* **Infinities** follow the usual rules.
* **Flags:** none.
* **Exactness:** for normal numbers the unit is bit-exact with ordinary
  double arithmetic, rounding once after the multiply and once after the
  add. The testbenches use this to check every result bit for bit.
* **How the arithmetic is written:** as two functions, computed in the first
  register stage of each unit. The remaining stages are plain registers that
  synthesis is expected to retime.
* **Device mapping:** the published MAC reaches 235 MHz on a Stratix II with
  nine 18x18 multipliers. This RTL has not been timed on any device. Making
  the stages real (separate alignment, addition, normalisation and rounding
  stages) is the first thing to do before targeting silicon.

## Module map

| module | role |
|---|---|
| `dgemm_board` | top: FPGA 1 + FPGA 2 + link registers; memories and PCI side as ports |
| `dgemm_fpga` | one FPGA; `FPGA_ID` = 2 reads B from the SODIMM and drives the link, 1 receives it |
| `ctrl_regs` | host registers |
| `master` | stream sequencing, bubbles, result stall, result addressing, counters |
| `pe_array`, `pe` | the PE chain |
| `fp64_mac`, `fp64_mul`, `fp64_add`, `fp64_pkg` | floating point |
| `split_word_reader`, `bank_reader`, `split_word_writer` | memory side |
| `b_link_tx`, `b_link_rx` | inter-FPGA B link |
| `sync_fifo` | FIFO used by several blocks |
| `dgemm_pkg` | shared types (`slot_t`, `result_t`, `dgemm_cfg_t`) and defaults |

Default parameters:

| parameter | default | origin |
|---|---|---|
| `NUM_PE` | 14 per FPGA | published figure for the complete design on a Stratix II 60 |
| MAC latency | 14 stages | published figure |
| `MUL_LAT` / `ADD_LAT` | 6 / 8 | own choice |
| `SJ` | 32 | own choice; must be > `ADD_LAT` and >= `NUM_PE` |
| `RD_FIFO`, `LINK_DEPTH` | 16 | own choice |
| address width | 28 bits (64-bit words) | own choice |

## Simulating

All testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. An example run:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fp64_pkg.sv rtl/dgemm_pkg.sv tb/dgemm_board_tb.sv --top-module dgemm_board_tb
./obj_dir/Vdgemm_board_tb
```

`tb/sdram_bank.sv` is a behavioural model of a memory bank together with its
controller. It has a fixed read latency and accepts requests on a random
YIELD % of cycles.

| testbench | what it shows |
|---|---|
| `fp64_mac_tb` | 4000 random MACs plus special cases, bit-exact; latency 14 |
| `pe_tb` | slot forwarding, row selection, row results, result pass-through priority |
| `pe_array_tb` | 3-PE chain, 3 blocks, random bubbles and back-pressure |
| `master_tb` | master + chain with N < NUM_PE, so the result stall must occur; slot count `(B*N+1)*SJ` |
| `split_word_reader_tb`, `split_word_writer_tb` | split banks with different latencies and gaps; writer sustains one word per cycle |
| `b_link_tb` | both consumers receive the full B sequence in order; credits run out and recover |
| `ctrl_regs_tb` | register map, start pulse, sticky done, cycle counter |
| `dgemm_fpga_tb` | one FPGA (FPGA 2) with the link's far end played by the testbench |
| `dgemm_board_tb` | whole board at 3 PEs / SJ = 10, two runs (N = 6 and N = 1) |
| `dgemm_board_full_tb` | whole board at default parameters: C of 56 x 64, N = 40, then N = 1 |
| `dgemm_1000_tb` | whole board at default parameters on the full 1000 x 1000 x 1000 product; every C element checked bit-exact (about 4 minutes) |

The two board tests require each of the following to happen at least once:
memory gaps, stream bubbles, result stalls, link-credit exhaustion and write
back-pressure. The FPGA 1 memories are given a lower yield so that FPGA 1 is
the slower consumer of B.

## Performance model

At one slot per clock, a run of B blocks takes `(B*N + 1) * SJ` clocks and
does `2 * NUM_PE * SJ * N * B` floating-point operations. That is
`2 * NUM_PE` flops per clock per FPGA, less the bubbles.

**Example, a 1000 x 1000 product:** each FPGA computes 500 rows, that is
36 x 32 blocks. This takes 36.9 M slots, or 0.26 s at 140 MHz of valid data.
In simulation with the bank models of `tb/` it took 38.8 M cycles; the rest
are bubbles from memory gaps and result stalls.
Over the two FPGAs this gives 7.6 Gflop/s, in line with the published
estimate of 7.8 Gflop/s for 2 x 14 PEs.

**Memory footprint:** this stream order sends the A block of a block row
again for every block column, and B again for every block row.
* Per 32-bit bank of each FPGA: 16.1 M words of A stream plus 0.5 M words of
  C. This fits the 64 MB banks.
* In the SODIMM: 295 MB of B.

## Departures and own choices

* **PE count.** The published text gives 16 PEs in one place and "no more
  than 14" for the complete design in another. This RTL uses 14.
* **PE and master internals.** Slot format, A double-buffering, partial-sum
  memory, result chain and result stall rule are this design's own. The
  source describes the PE chain only at block-diagram level.
* **Link synchronisation.** The source says a synchronisation mechanism is
  needed. Credit-based flow control and a common clock for both FPGAs are
  assumed. The board also has a 110-bit connector on FPGA 2 whose purpose is
  not described; it is not modelled.
* **Memory layout.** C is written into the A banks, block-major. The host
  does every rearrangement. The register map and bus are invented.
* **Floating point.** The MAC internals are not given by the source: the
  design uses flush-to-zero, no exception flags, and a 6 + 8 stage split.
* **Not in this RTL:** host CPU, PCI bridge, DDR2 controllers and memories,
  and the dgemm software. The software's pipelining of data conversion with
  FPGA computation needs no hardware support beyond start/done.
* **Not done yet:** no timing or area results for a real device. The full
  1000 x 1000 run is simulated (`dgemm_1000_tb`, about 38.8 M cycles per
  FPGA), but with behavioural memory models, not DDR2 timing.
