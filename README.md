# Givens/CORDIC QR decomposition accelerator with a binary-tree schedule

This RTL factors a 16 x 16 real matrix as A = Q R in hardware. R is upper
triangular and Q is orthogonal. The intended input is an 8 x 8 complex
covariance matrix from a digital beamformer. It is first mapped to its
16 x 16 real equivalent

    [ Re(A)  -Im(A) ]
    [ Im(A)   Re(A) ]

so the datapath never handles complex numbers.

Each element below the diagonal is removed by a Givens rotation. The rotation
is computed by CORDIC and needs no multipliers apart from one gain-correction
multiply. The rotations are ordered in a **binary tree**, not pivot by pivot.
Inside one stage of a column, all row pairs are independent. They therefore
stream back to back through a single pipelined engine. Between stages there
is a **hard barrier**: no row of stage s+1 is read until every row written by
stage s is committed to memory.

At the default size, one decomposition takes **1351 clock cycles**, which is
5.50 us at 245.76 MHz. A beamforming update must finish within 50 us
(12288 cycles).

## The schedule

For pivot column j, stage s uses stride st = 2^s. The row pairs are
(p, p+st) for p = j, j+2st, j+4st, ..., up to where p+st < n. Each pair is
rotated so that element (p+st, j) becomes zero. Row p+st then drops out of
the column, and row p moves on to the next stage. A stage with an odd number
of live rows *carries* its last row unchanged. The column ends when stride
reaches n-j.

A 16 x 16 matrix needs 120 rotations in 15 columns and 49 stages. An n x n
matrix has only ceil(log2(n-j)) stages per column, compared with n-j-1 when
the pivot row is fixed. This keeps the dependent chain short.

`qrd_controller` runs the schedule:
- S_INIT writes the identity into the Q block.
- For each stage it spends one setup cycle, then requests 2P row reads.
- It issues each pair from the feed buffer as soon as both rows are there.
- It waits on the commit count before it moves on.

Its event outputs (stage start, carry, barrier release, column done) drive
the performance counters.

## QR engine pipeline and alignment

`qr_engine` holds these parts:
- **Boundary cell** (`cordic_bc`). Vectoring-mode CORDIC on the two
  pivot-column elements. It produces the new diagonal element and a
  *rotation sequence*: one direction bit per micro-rotation, plus a flag for
  the 180-degree pre-rotation.
- **Rotation sequence broadcaster** (`rsb`). It registers the sequence and
  sends one copy to each engine, so the fan-out is split per engine.
- **R engine and Q engine** (`rot_engine`, two instances). Each has 16
  rotation-mode CORDIC lanes (`cordic_rot_lane`), one per column. The lanes
  apply the broadcast directions to the pivot and target rows of R and of
  Q^T. They use no angle datapath.

The key to the engine is that the lanes use exactly the same arithmetic as
the boundary cell, but one cycle later. Cycle by cycle:

| edge | boundary cell | lanes |
|---|---|---|
| 1 | input register | input register |
| 2..13 | micro-rotation 0..11 (pre-rotation merged into 0); direction bit k is combinational at edge k+2 | 2: alignment register |
| 3..14 | | micro-rotation 0..11, using the RSB's registered bit |
| 14 | gain multiply | |
| 15 | round and saturate | gain multiply |
| 16 | alignment register | round and saturate |

Both paths therefore have a latency of 16 cycles. A new pair can enter every
cycle, and a tag travels with the data. The tag holds the pivot row, the
target row and the column.

The R lane for column j reproduces the boundary cell's output bit for bit.
The reorder buffer still writes the boundary cell's value into column j, and
writes an exact zero at the eliminated position. The CORDIC residual is
small but non-zero, and it is dropped.

## Memory, MAC and buffers

`mem_block` is a memory block of 64 lines of 512 bits. It has one read port
and one write port, and two 256-bit banks that are accessed together. One
line holds one row: 16 elements, each a sign-extended 32-bit word. There are
two blocks:
- block 0 holds A, and R after the run;
- block 1 holds Q^T (line i is column i of Q).

Each pair needs two row reads from the single read port. The engine is
therefore fed one pair every **2 cycles**. This memory-bound interval, not
the engine, sets the throughput.

`mac` (memory access controller) serves four kinds of request in order:
- row fetches, which return one cycle later into `feed_buffer`;
- write-backs from `writeback_buffer`, one row per cycle to both blocks, with
  a commit pulse one cycle after the write;
- identity rows for block 1;
- host line reads and writes, served only while idle. Requests made while
  busy are dropped and counted.

Between the engine and the MAC:
- `lane_mapper` takes the Q1.15 halves of the words into the lanes and picks
  the pivot column for the boundary cell.
- `reorder_buffer` rebuilds two row lines from the lane outputs. It is
  combinational because pairs come out in issue order.
- `writeback_buffer` (8 rows) releases the pivot row and then the target row.

## Barrier timing

Take a stage of P pairs that starts at t0:
- The last pair issues at t0 + 2(P-1).
- It leaves the engine 16 cycles later.
- It enters the write-back buffer one cycle after that.
- The 2P rows are written one per cycle.
- Each write is committed one cycle after it happens.

Compute takes 16 + 2(P-1) cycles. Draining the 2P writes adds a bubble that
shrinks as P shrinks. The controller counts each stage's wait after its last
issue as BARRIER cycles.

Measured for n = 16:
- columns 0..3 take 135, 117, 115 and 113 cycles;
- the whole job takes 1351 cycles, including the identity
  initialisation, written one row per cycle;
- the compute-only bound at one pair per 2 cycles is 926 cycles.

## Number format and rounding

- Elements are Q1.15 (range [-1, 1)), stored in the low half of a
  sign-extended 32-bit word.
- Inside the CORDIC the width is 20 bits: 2 integer bits for the gain growth
  of about 1.647, and 2 guard fraction bits. There are 12 micro-rotations.
- If the pivot is negative, the vector is first turned by 180 degrees by
  negating both elements, so the vectoring mode always converges. The lanes
  apply the same flip.
- At the end the result is multiplied once by round(2^15/K12) = 19898, then
  rounded half up and saturated to Q1.15. Overflow never wraps. Saturation
  and pre-rotation are counted.

Accuracy on random well-scaled inputs: |QR - A| is about 2e-4 and
|Q^T Q - I| about 1.2e-3 (maximum over elements).

## Registers and host use

The register bus is word addressed. Writes use a strobe, an address and data.
Reads are combinational on the address.

| addr | name | meaning |
|---|---|---|
| 0x00 | CTRL | write bit 0 = start; bits 12:8 = n (2..16, other values mean 16) |
| 0x01 | STATUS | bit 0 busy, bit 1 sticky done; write bit 1 = 1 to clear done |
| 0x02 | CYCLES | cycles from start to done |
| 0x03 | ISSUES | row pairs issued |
| 0x04 | STAGES | tree stages run |
| 0x05 | BARRIER | cycles spent waiting for commits |
| 0x06 | CARRIES | stages that carried an odd row |
| 0x07 | SATS | cycles with a saturated result |
| 0x08 | FLIPS | pairs that needed the pre-rotation |
| 0x09 | REJECTS | host requests dropped while busy |
| 0x10+j | COLCYC[j] | cycles spent on pivot column j |

A job runs as follows:
1. Load A while the accelerator is idle. Either write line i of block 0
   through the host port (`host_en`, `host_we`, `host_blk`, `host_addr`,
   `host_wdata`), or offer complex row i (0..7) on `cx_*`. The realifier
   writes rows i and i+8 of the real form.
2. Write CTRL with n and start.
3. Wait for `done` (or STATUS bit 1).
4. Read R from block 0 and Q^T from block 1 with host reads. Host reads
   return data one cycle later on `host_rdata`.

If n is smaller than 16, only the top-left n x n part is used.

## Where this RTL departs from the source design

The source design describes the blocks and their roles, but not every
detail. The following are choices made here:
- Q is kept transposed in block 1, and the identity is written by the
  accelerator itself.
- A 180-degree pre-rotation is used for negative pivots.
- The internal width is 20 bits with 2 guard bits.
- The eliminated element is forced to exactly zero.
- The controller spends one setup cycle per stage.
- The dimension n is set at run time.
- Host access is refused while busy.
- The register map and bus are this design's own.
- The feed buffer holds 8 pairs and the write-back buffer 8 rows.
- A read of a line written in the same cycle returns the old data.
- The realifier is provided as a hardware load path, next to plain line
  loads.
- The source design reports 2415 measured cycles for its FPGA build
  (9.83 us), from a memory controller that it does not detail. The simpler
  in-order controller here needs 1351 cycles. Both are far below the 12288
  cycle budget.
- Only N = 16 with 64-byte lines is built. Larger matrices (32 or 64 rows)
  would need more lanes and wider or multi-beat rows. The parameters exist,
  but those sizes are not tested.
- The processor system, AXI bridges and staging memory used on the FPGA
  board are not part of this RTL. The top's register bus and line port take
  their place.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=... failures=...`. `tb/qrd_ref_pkg.sv` is a bit-exact
integer model of the whole algorithm, written independently of the RTL. The
end-to-end test covers these jobs:
- two complex jobs through the realifier;
- a real job with a host access while busy;
- real jobs with n = 8, 6 and 5 (n = 8 takes 447 cycles);
- a saturating full-scale input.

It compares R and Q^T bit for bit, checks the reconstruction and the
orthogonality, and checks the counters and the pipeline timing.

    verilator --binary --timing --assert -Wno-fatal \
      --top-module tb_qrd_accel_top -y rtl -y tb +libext+.sv -Irtl \
      rtl/qrd_pkg.sv tb/qrd_ref_pkg.sv tb/tb_qrd_accel_top.sv
    ./obj_dir/Vtb_qrd_accel_top

Other testbenches build the same way with their own `--top-module` and file.
The unit testbenches for `cordic_bc`, `cordic_rot_lane`, `rot_engine` and `qr_engine`
compare against the same reference package.

## Files

| file | role |
|---|---|
| `rtl/qrd_pkg.sv` | widths, types, CORDIC micro-step, gain multiply, round/saturate |
| `rtl/qrd_accel_top.sv` | top level |
| `rtl/csr.sv`, `rtl/qrd_controller.sv` | registers, schedule and barrier |
| `rtl/mac.sv`, `rtl/mem_block.sv` | memory access and storage |
| `rtl/feed_buffer.sv`, `rtl/lane_mapper.sv`, `rtl/reorder_buffer.sv`, `rtl/writeback_buffer.sv` | row staging |
| `rtl/qr_engine.sv`, `rtl/cordic_bc.sv`, `rtl/rsb.sv`, `rtl/rot_engine.sv`, `rtl/cordic_rot_lane.sv` | compute |
| `rtl/realifier.sv` | complex-to-real load path |
