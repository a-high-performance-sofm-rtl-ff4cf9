# NB25-VME: a 400-neuron self-organizing feature map accelerator in SystemVerilog

This is RTL for a VME-bus board that runs self-organizing feature maps
(SOFMs, Kohonen maps) in hardware. The design follows the NB25-VME board and
its NBISOM_25 chip, as published in "A High Performance SOFM Hardware-System"
by Rüping, Porrmann and Rückert. Every neuron of the map has its own small
processor with its own weight memory. All 400 processors (a 20 x 20 map) get
the same command in the same clock cycle.

Three simplifications of the SOFM algorithm keep each processor small:

* **Manhattan distance** instead of Euclidean distance, so no multiplier is
  needed.
* **Learning rates that are powers of two** (1, 1/2, ..., 1/128), so
  adaptation is a shift.
* **Best match by counting down.** Every element decrements its distance
  once per cycle. The first element to reach zero is the winner, and it
  reports its position on shared row and column wires.

An input vector has up to 64 components of 8 bits. For each vector the board
takes:

| phase                        | cycles       | what happens                                             |
|------------------------------|--------------|----------------------------------------------------------|
| distance                     | 64           | one component per cycle on the data bus; each element adds \|x - w\| |
| best-match search            | max(d_min,1) | all distances count down; the winner asserts its lines   |
| alpha distribution           | S (<= 8)     | nested squares around the winner get their factor        |
| adaptation                   | 64           | the vector is sent again; w += (x - w) >>> shift         |

With d_min = 36 and S = 8, recall takes 100 cycles and learning 172. At the
original 16 MHz this gives 4096 million connections per second (MCPS) for
recall and 2381 million connection updates per second (MCUPS) for learning.
The end-to-end testbench measures both counts.

## Hierarchy

```
nb25_vme                 board top (VME slave pins)
├── vme_ctrl             VME-bus slave: SRAM window, control/status register, interrupt
├── dp_sram              8 K x 8 dual-port SRAM (port A: VME, port B: array controller)
├── nbisom_ctrl          array controller: job sequencer for recall/learn/read/write/mask
└── nbisom_array         4 x 4 NBISOM_25 chips, 20 row + 20 column lines
    └── nbisom25         one chip: 5 x 5 elements
        └── sofm_pe      one processing element (neuron)
            ├── pe_ctrl        controlling unit: command decode, addressing, line pull
            ├── pe_weight_mem  64 x 8 weight memory with its address counter
            ├── pe_alpha_reg   alpha (shift count), valid and mask flags
            ├── pe_calc        |x-w| accumulate, decrement, shift-adapt (combinational)
            └── pe_dist_reg    14-bit distance register, zero/one flags
sofm_pkg                 widths, element commands, job opcodes, SRAM layout
```

## The row and column lines

The row and column lines are the least obvious part of the design. Each
element row of the board has one line, and so does each element column. Each
line is an open-drain wire shared by the controller and by every chip on that
row or column. The lines serve two purposes.

**Addressing.** The controller asserts a set of row lines and a set of column
lines. An element is addressed when both its row line and its column line are
asserted. Asserting rows 3..7 and columns 10..14 addresses a 5 x 5 square.
Asserting one row and one column addresses a single element. The commands
ALPHA, WRITE and READ act only on addressed elements.

**Best-match search.** During SEARCH the controller releases all lines. Every
element decrements its distance. An element asserts its own row and column
line when its distance is 0, or is 1 and reaches 0 in this cycle. In the
first cycle where any line is up, the asserted row and column give the
winner's position. Because the element signals one cycle early, the search
lasts max(d_min, 1) cycles rather than d_min + 1, which matches the
original's cycle count. The search reveals only the minimum distance, never
the distance itself.

**Ties.** If several elements share the minimum distance, several lines go up.
The controller takes the lowest asserted row and the lowest asserted column.
Tied winners in one row or one column give a real winner's position. Tied
winners in different rows and columns give the crossing point of the two
lines, which need not be a winner.

**Modelling.** The open-drain wires are modelled as active-high wired ORs: an
asserted line stands for a line pulled low. The chip splits each line pin into
a sensed input (`row_in`/`col_in`) and a pull output (`row_pull`/`col_pull`).
`nbisom_array` ORs the controller's drive with every chip's pull. Board row
line `cr*5 + r` is row pin `r` of every chip in chip row `cr`.

## Processing element commands

The chip has a 3-bit control bus, which is common to all elements. This
design's encoding (`sofm_pkg::pe_cmd_e`):

| code | command | effect on every element                                  | effect on an addressed element |
|------|---------|----------------------------------------------------------|--------------------------------|
| 0    | NOP     | none                                                     | |
| 1    | CLR     | address counter := 0                                     | |
| 2    | DIST    | dist := (cnt==0 ? 0 : dist) + \|data - w[cnt]\|; cnt++; alpha valid := 0 | |
| 3    | SEARCH  | dist := max(dist-1, 0); cnt := 0; pull lines if dist <= 1 and not masked | |
| 4    | ALPHA   | cnt := 0                                                 | data[7]=0: alpha := data[2:0], valid := 1; data[7]=1: masked := 1 |
| 5    | ADAPT   | if alpha valid and not masked: w[cnt] += (data - w[cnt]) >>> alpha; cnt++ | |
| 6    | WRITE   | cnt++                                                    | w[cnt] := data |
| 7    | READ    | cnt++                                                    | drive w[cnt] onto the data bus |

The distance restarts at counter value 0, so no separate clear is needed
between vectors of length 64. The weight memory reads asynchronously. This
lets ADAPT read, shift-add and write back one weight per cycle.
`(x - w) >>> shift` is a 9-bit arithmetic shift, so the new weight always
lies between the old weight and x.

## Learning: the alpha distribution

After the search, the controller sends one ALPHA command per neighbourhood
step. Each step addresses a square of radius r_s around the winner, clipped
at the map edges. The list of steps is expected to start with the largest
square and the smallest factor and end with the smallest square and the
largest factor. Each later step overwrites the factor of the inner elements,
so every element ends with the factor of the smallest square that contains
it. Elements outside every square keep `valid = 0` and do not adapt. The
original's example sends 1/4 to a 5 x 5 square and then 1/2 to the inner
3 x 3 square. As SRAM parameters that is steps (shift 2, radius 2),
(shift 1, radius 1).

## Board operation

### SRAM layout (byte offsets, `sofm_pkg`)

| offset          | content                                                                |
|-----------------|------------------------------------------------------------------------|
| 0x000           | number of input vectors (recall/learn)                                 |
| 0x001           | vector length L, 1..64 (0 or more than 64 means 64)                    |
| 0x002           | number of neighbourhood steps S, 0..8                                  |
| 0x010 + 2s      | step s: alpha shift (0..7), then radius                                |
| 0x040           | number of addressed elements (write/read/mask)                         |
| 0x042 + 2i      | element i: row, column (up to 94 entries before the result field)      |
| 0x100 + 2v      | result of vector v: best row, best column (0xFF, 0xFF = no answer)     |
| 0x400 + 64n     | slot n: input vector n, or weight vector of addressed element n        |

8 KB gives 112 slots.

### Jobs (`sofm_pkg::ctrl_op_e`)

* `OP_RECALL` (1): writes the best-match position of every vector.
* `OP_LEARN` (2): best match, alpha distribution and adaptation for every
  vector in turn, with the positions written as in recall.
* `OP_WRITE` (3): copies slot i into addressed element i.
* `OP_READ` (4): copies addressed element i into slot i.
* `OP_MASK` (5): fades out the addressed elements. A faulty element is never
  again reported as a winner and never adapts. Only reset clears the mask.

### VME interface (`vme_ctrl`)

The board answers byte-wide (D8) cycles in the A24 window `BASE`xxxx, where
`BASE` defaults to 0x40.

| window offset   | access | meaning                                                  |
|-----------------|--------|----------------------------------------------------------|
| 0x0000 - 0x7FFF | r/w    | dual-port SRAM (the lower 13 bits)                       |
| 0x8000          | write  | bits 2:0 job opcode, bit 7 = start (ignored while busy)  |
| 0x8000          | read   | bit 7 busy, bit 6 interrupt pending, bits 2:0 last opcode |
| 0x8001          | write  | clear the interrupt                                      |

A host:

1. Writes the parameter field, the address field and the vectors or weights
   into the SRAM.
2. Writes `0x80 | op` to offset 0x8000.
3. Waits for `vme_irq_n` to go low.
4. Reads the results.
5. Writes offset 0x8001 to clear the interrupt.

AS* and DS* are synchronized with two flip-flops. DTACK* follows within five
clock cycles and is held until DS* rises. Between cycles the strobes must stay
high for at least three clock cycles.

## Where this design departs from the original

* **One clock.** The chip had two non-overlapping clock phases. This design
  uses a single rising-edge clock everywhere. The chip's clock pins and their
  generation are not modelled.
* **Own protocols.** The original does not publish the following, so they are
  this design's own: the element command encoding, the SRAM layout, the job
  opcodes, the controller state machine, the VME register map and handshake,
  the tie rule, the no-answer timeout (2^14 - 1 search cycles) and the
  mechanism for masking faulty elements. The original only says that the
  controller "masks the position" of a faulty element. Here it is a flag in
  the element, set by an ALPHA command with data bit 7.
* **Own sizes.** The original gives no SRAM size or organisation; 8 K x 8 with
  two synchronous ports is assumed.
* **Overhead cycles.** Each vector costs one CLR cycle and two result-write
  cycles outside the 100/172 array cycles. The original's figures also leave
  out data transfer.
* **Physical parts not modelled:** the pads, the PGA package, the SRAM macro
  cells, the FPGA parts, the configuration EPROM and the rest of the VME
  system (host CPU and other boards). The weight memories are plain RTL
  arrays.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/sofm_pkg.sv tb/tb_nb25_vme.sv --top-module tb_nb25_vme
./obj_dir/Vtb_nb25_vme
```

| testbench            | checks                                                          |
|----------------------|-----------------------------------------------------------------|
| tb_pe_weight_mem     | counter clear/increment/wrap, write/read, one-cycle read-modify-write |
| tb_pe_alpha_reg      | load, clear, mask flag, reset                                   |
| tb_pe_dist_reg       | load/hold, zero and one flags                                   |
| tb_pe_calc           | distance, decrement and adaptation against integer arithmetic   |
| tb_pe_ctrl           | every command against every input combination                  |
| tb_sofm_pe           | one element: addressing, distance (via search timing), every alpha, masking |
| tb_nbisom25          | one chip: write/read all 25, search lines, two-step alpha of the original's example |
| tb_nbisom_array      | full 20 x 20 array: board line wiring across chip boundaries    |
| tb_dp_sram           | both ports against a model, collisions                          |
| tb_vme_ctrl          | bus cycles, foreign addresses, start/busy, status, interrupt    |
| tb_nbisom_ctrl       | controller with a 5 x 10 array: all jobs against a reference SOFM model, tie, mask, no-answer, cycle counts |
| tb_nb25_vme_small    | whole board on a 10 x 10 map through the VME bus                |
| tb_nb25_vme_chip     | whole board with a single chip (5 x 5 map); prints the chip's MCPS and MCUPS |
| tb_nb25_vme          | whole board at full size (20 x 20, 64 weights) through the VME bus |

Each board-level test checks the 100- and 172-cycle counts. They also count
every mechanism: job types, ties, no-answer, masking and interrupts.

The testbenches' SOFM models keep their loop bounds in run-time variables.
This stops Verilator from unrolling the 400 x 64 loops, which would make the
C++ build take many minutes.

## Changing the design

* **Map size.** Set `CHIP_ROWS`, `CHIP_COLS`, `ROWS` and `COLS` on `nb25_vme`.
  The controller supports up to 255 rows and columns, and more than 94
  addressed elements per job needs a different SRAM layout.
* **Weight-vector length.** `NW`, default 64. Raising it beyond 64 also needs
  a wider distance register (`D_BITS`) and wider SRAM slots.
* **SRAM size.** `AW` on `nb25_vme`.
