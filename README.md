# Near-SRAM binary16 engine for sparse matrix-vector multiplication

Sparse matrix-vector multiplication (SpMV, `C = A x V` with a mostly-zero `A`) is limited by
memory bandwidth, not arithmetic. This design moves the arithmetic to the memory: every SRAM
sub-array gets a small 16-bit floating-point unit (FPU) and a control unit (CU) at its
periphery. The host copies a piece of the matrix (in coordinate, or COO, form) and the matching
pieces of the input and output vectors into a sub-array, writes three pointer registers and
starts it. The sub-array then works through its non-zeros on its own, one multiply-accumulate
(MAC) every 14 cycles, while the other sub-arrays do the same in parallel. When no computation
runs, the block is ordinary memory.

The RTL follows the architecture of *"A 16-bit Floating-Point Near-SRAM Architecture for
Low-power Sparse Matrix-Vector Multiplication"*. It builds that paper's largest configuration:
32 kB split into eight 4 kB sub-arrays (2048 words of 16 bits), each with its own FPU and CU. At
1 GHz this gives a peak of 8 MACs per 14 ns, or about 1.14 GFLOPS. Section "What is this design's
own" lists where the RTL fills gaps that the paper leaves open.

## How a tile is laid out and processed

Each sub-array holds one *tile* at a time, in three regions:

| address range                          | contents                                             |
|----------------------------------------|------------------------------------------------------|
| `0 .. H-1`                             | output slice `C[0..H-1]` (rows of this stripe)       |
| `v_addr .. v_addr+W-1`                 | input slice `V[0..W-1]` (columns of this tile)       |
| `coo_addr .. last_addr+1`              | non-zeros, three words each: `n`, `value`, `m`       |

Here `n` is the column inside the tile (an offset from `v_addr`) and `m` the row inside the
stripe (an address in the output slice). The CU loops while `coo_addr <= last_addr`, where
`last_addr` is the address of the *value* word of the last triplet. Per triplet it performs
`C[m] <- C[m] + value * V[n]`, rounding to binary16 after the multiply and after the add. A
start with `coo_addr > last_addr` is an empty tile and finishes at once.

Large matrices are cut by the host with *fixed-row tiling*. Each sub-array owns a horizontal
stripe of `H` rows, and that stripe's output slice stays in the sub-array. The stripe is split
into tiles of varying width: as many columns as fit together with their non-zeros. Leading
all-zero columns are skipped, so their input elements are never copied. Tiles are run one after
the other, and the outputs accumulate in place. Only the input elements are copied into more
than one sub-array. The tiling runs on the host and is not part of the RTL. The end-to-end
testbench contains a simple version of it (`build_tile` in `tb/tb_nm_spmv_top.sv`).

### The 14-cycle multiply-accumulate

The SRAM has one port, so the CU plans one access per cycle. The read data of cycle `t` is
available in cycle `t+1`.

| cycle | SRAM access              | arriving data | FPU                              |
|-------|--------------------------|---------------|----------------------------------|
| c0    | read `n` (coo_addr++)    |               |                                  |
| c1    | read `V[n + v_addr]`     | `n`           |                                  |
| c2    | read value (coo_addr++)  | `V[n]`        |                                  |
| c3    | read `m` (coo_addr++)    | value         | start `value * V[n]`             |
| c4    | read `C[m]`              | `m`           |                                  |
| c5    | –                        | `C[m]`        |                                  |
| c8    | –                        |               | product ready, start `C[m] + p`  |
| c13   | write `C[m]`             |               | sum ready                        |

The next triplet starts in the following cycle. A sub-array is therefore busy for exactly
`14 x non-zeros` cycles. Reading `m` overlaps the multiply, as the paper describes. The SRAM
is free in c5 to c12, and the bus can use it then.

## The floating-point unit

The FPU adds, subtracts or multiplies two IEEE binary16 numbers (1 sign bit, 5 exponent bits,
10 fraction bits) in five cycles. A subtraction is an addition with the sign of `b` inverted at
the input. The CU itself only needs add and multiply. It is small because a single multiplier does three jobs. It multiplies
significands, and, by multiplying with a one-hot word `2^k`, it also performs the alignment
shift and the normalisation shift. An adder and a three-input exponent adder complete it.

```
            +------------+   BO, SO, exp diff    +---------------------------+
 a, b, op ->| comparator |---------------------->| mantissa logic            |
            | (specials) |                       |  R1/R2 mux -> multiplier  |
            +------------+                       |  adder (bypass for mul)   |
                  | special result               |  leading-one, rounding    |
                  v                              +---------------------------+
            +--------------------+  lead, round carry       |
            | sign/exponent:     |<-------------------------+
            | 3-input adder,     |--> result
            | range, packing     |
            +--------------------+
```

| cycle | addition                                              | multiplication                        |
|-------|-------------------------------------------------------|---------------------------------------|
| 0     | comparator: bigger operand BO, smaller SO, `d = eBO - eSO` | comparator, specials             |
| 1 (R1)| `SO_sig x 2^(13-d)`: SO aligned, 13 guard bits         | `BO_sig x SO_sig` (22-bit product)    |
| 2     | adder: `BO_sig<<13 +/- aligned SO`; find leading one   | adder bypassed; find leading one      |
| 3 (R2)| result `x 2^(24-lead)`: leading one moved to bit 24    | same                                  |
| 4     | round to nearest even; `eBO + 0 + (lead-23+carry)`     | round; `eBO + eSO + (lead-35+carry)`  |
| 5     | `done`, `result` valid                                | same                                  |

Because R1 and R2 share the multiplier, the unit accepts a new operation only when it is idle.
The CU never needs more.

Numerics:

- Rounding is round-to-nearest-even. The result is correctly rounded for every pair of
  normal operands. Alignment is exact for exponent differences up to 13. Beyond that the
  smaller operand can no longer change the rounded result, and it is replaced by a sticky bit.
- Subnormal inputs and results are flushed to zero, keeping their sign. An exponent overflow
  gives a signed infinity.
- The comparator handles NaN, infinity and zero operands on its own. NaN results are
  `0x7E00`. `inf - inf` and `0 x inf` give NaN, and `x + (-x)` gives `+0`.

## Bus, registers and sharing the SRAM port

The top has one request/grant bus port, and all addresses are word addresses:

```
bus_addr[14:12]  sub-array (0..7)
bus_addr[11]     0: SRAM word   1: register window
bus_addr[10:0]   word offset / register number
```

The master holds `bus_req`, `bus_we`, `bus_addr` and `bus_wdata` until it sees `bus_gnt`. The
transfer happens on that clock edge. Read data comes back with `bus_rvalid` one cycle later.

The registers of each sub-array are 16 bits wide:

| reg | name        | write                                    | read                        |
|-----|-------------|------------------------------------------|-----------------------------|
| 0   | CTRL/STATUS | bit 0 = start (ignored while busy)       | `{14'b0, done, busy}`       |
| 1   | COO_ADDR    | first word of the COO region             | running pointer             |
| 2   | V_ADDR      | base of the input slice                  | value                       |
| 3   | LAST_ADDR   | address of the last value word           | value                       |

Writes to registers 1 to 3 are ignored while the sub-array is busy. `done` is set at the end of
a run and cleared by the next start. The `busy` and `done` vectors are also top-level outputs.

The CU has priority on the SRAM port. A bus access to the SRAM of a running sub-array is held
off (grant low) in the cycles the CU uses the port, and then proceeds. The host can therefore
read or refill memory during a run, but it must not overwrite the words the run is using.
Register accesses are always granted.

## Parameters

| parameter | where                                    | default | meaning                          |
|-----------|------------------------------------------|---------|----------------------------------|
| `N_SUB`   | `nm_spmv_top`                            | 8       | number of compute sub-arrays     |
| `WORDS`   | `nm_spmv_top`, `nm_compute_subarray`, `nm_spmv_cu`, `nm_sram` | 2048 | 16-bit words per sub-array |
| `FPU_LATENCY`, `MAC_CYCLES`, `GUARD_W` | `nm_pkg` (constants) | 5, 14, 13 | documented timing and guard bits |

The paper also compares 1 x 32 kB, 2 x 16 kB and 4 x 8 kB. These are `N_SUB`/`WORDS` =
1/16384, 2/8192 and 4/4096. The 16-bit pointer registers limit `WORDS` to 32768.

Capacity against the paper's benchmark matrices: none of them fits in 32 kB at once. For
example, c-61 (43,618 rows, 310,016 non-zeros) needs about 1.0 M words against 16,384. They
run only as a stream of tiles loaded by the host. Indices in the COO words are local to the
tile, so 16 bits always suffice.

## Files

| file | contents |
|------|----------|
| `rtl/nm_pkg.sv` | format constants, operation and register enums, operand unpacking |
| `rtl/nm_spmv_top.sv` | top: bus decoder and `N_SUB` compute sub-arrays |
| `rtl/nm_bus_decoder.sv` | routes host accesses and read data |
| `rtl/nm_compute_subarray.sv` | SRAM + CU + FPU, port sharing, register window |
| `rtl/nm_spmv_cu.sv` | pointer registers and the COO loop |
| `rtl/nm_sram.sv` | single-port synchronous-read SRAM array |
| `rtl/nm_fpu.sv` | five-cycle FPU sequencer |
| `rtl/nm_fpu_comparator.sv` | operand ordering and special values |
| `rtl/nm_mantissa_logic.sv` | multiplier/shifter, adder, leading one, rounding |
| `rtl/nm_shift_onehot.sv` | shift amount to one-hot multiplier operand |
| `rtl/nm_sign_exp_logic.sv` | three-input exponent adder, range, packing |
| `tb/fp16_ref_pkg.sv` | reference binary16 arithmetic, computed in double precision |
| `tb/tb_*.sv` | one self-checking testbench per module, and two workload tests |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each one also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_nm_spmv_top rtl/nm_pkg.sv tb/fp16_ref_pkg.sv tb/tb_nm_spmv_top.sv
./obj_dir/Vtb_nm_spmv_top
```

Replace the top module for the other benches. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/nm_pkg.sv rtl/nm_spmv_top.sv`.
The SRAM contents are not reset, so software has to clear the output slice before the first
tile.

What the tests cover:

- `tb_nm_fpu`: every pair of 20 corner values, directed rounding ties and alignment
  distances 13 and 14, and 20,000 random pairs in each of add, subtract and multiply. Each
  result is checked against double-precision arithmetic rounded to binary16, and each latency
  must be exactly 5 cycles.
- Unit benches for the comparator, mantissa logic, one-hot coder, exponent logic, SRAM and bus
  decoder. Each checks its module against values computed independently in the bench.
- `tb_nm_spmv_cu`: an 80-non-zero tile. It checks the results, that the k-th write lands at
  exactly `14k` cycles, the pointer and status registers, and an empty tile.
- `tb_nm_compute_subarray`: the same over the bus. It adds plain-memory use, register read-back,
  and reads during a run, which must be stalled and still return correct data.
- `tb_nm_spmv_top` runs the whole design at its default size. It computes a 256 x 1024 matrix,
  about 3 % dense, on all eight sub-arrays, in three rounds of tiles. It counts and requires:
  bus stalls, stripes with several tiles, skipped leading columns, empty tiles, overflow to
  infinity, exact cancellation, underflow to zero, accumulation onto infinity, and cycles with
  every loaded sub-array computing at once. It also checks the 14-cycle MAC of every run.
- `tb_nm_fig3_example` repeats the paper's small tiling example on a reduced build: four
  sub-arrays of 16 words (`N_SUB=4`, `WORDS=16`) and a random 16 x 16 matrix in stripes of four
  rows. A 16-word tile holds only a few triplets, so the matrix needs 28 tiles. Outputs stay
  resident across tiles and runs of empty columns are skipped. All 16 outputs are checked.
- `tb_nm_workload_table1` runs one complete SpMV for each of the nine benchmark matrices the
  paper uses, through the full design. The real matrices are not included. Each one is replaced
  by a synthetic matrix with the same number of rows and non-zeros, scattered within +-300 of
  the diagonal. The bench acts as the host:
  - It deals stripes of 128 rows round-robin to the sub-arrays.
  - It cuts each stripe into tiles that fill 2048 words.
  - It loads each tile with burst writes (one word per cycle) and starts the sub-array as soon as
    it is free.
  - It reads and clears the outputs at every stripe change.

  Every output is checked. The run takes about two minutes.

Throughput measured by `tb_nm_workload_table1` includes all host transfers (1 GHz clock, two
operations per non-zero):

| matrix (synthetic, same size) | rows | non-zeros | tiles | cycles | MFLOPS |
|---|---|---|---|---|---|
| c-61          | 43,618    | 310,016   | 682    | 1,311,659  | 472 |
| roadNet-TX    | 1,393,383 | 3,843,320 | 10,886 | 23,363,548 | 329 |
| delaunay_n19  | 524,288   | 3,145,646 | 8,192  | 13,974,398 | 450 |
| fe_ocean      | 143,437   | 819,186   | 2,241  | 3,699,101  | 442 |
| gridgena      | 48,962    | 512,084   | 1,148  | 1,972,975  | 519 |
| k49_norm_10NN | 38,547    | 618,158   | 1,205  | 2,203,550  | 561 |
| worms20_10NN  | 20,055    | 240,826   | 470    | 904,819    | 532 |
| amazon0601    | 403,394   | 3,387,388 | 7,556  | 13,688,825 | 494 |
| webbase-1M    | 1,000,005 | 3,105,536 | 8,638  | 17,836,788 | 348 |

These figures depend on the host model and on the synthetic structure. The bus moves one
16-bit word per cycle, and the matrix is banded. They are not a reproduction of the paper's
measurements. The paper quotes up to 370 MFLOPS for eight 4 kB sub-arrays with its own transfer
model. The compute-only bound is 8 x 2 operations per 14 ns, about 1,140 MFLOPS. Sparse rows,
as in roadNet-TX and webbase-1M, make short tiles. Each such tile costs more transfer per MAC.

## What is this design's own

The paper fixes the overall architecture, the FPU's units, the shared multiplier/shifter in
two rounds, the five-cycle FPU, the three pointer registers, the memory layout, the read order
and the 14-cycle MAC. The following are choices made here:

- **Number format details.** IEEE binary16 is assumed from the 16-bit width and the 11-bit
  significand multiplier. Round-to-nearest-even, flush-to-zero, and the NaN encoding are this
  design's choices.
- **Multiplier width.** The paper's mantissa multiplier is 11 x 11 bits. Here its first operand
  is 25 bits wide, so that the same unit can shift the guard-extended sum and product in the
  second round. This is what makes the rounding exact. A narrower multiplier with truncation
  would be closer to the paper's area figures.
- **Cycle plans** of the FPU and the CU. The totals (5 and 14) are the paper's; how the work is
  spread over the cycles is not.
- **Loop test and pointers.** The loop runs while `coo_addr <= last_addr`, and `last_addr`
  points at the value word of the last triplet. The output slice is at address 0.
- **Bus and registers.** The paper only says that a standard system bus and configuration
  registers are used. The request/grant protocol, the address map, the register map, the start
  and done bits, and the CU's priority on the SRAM port are this design's.
- **SRAM.** The SRAM is a synchronous-read array with one cycle of latency, standing in for the
  process macro.

Not built: the host processor, and the host-side matrix reordering (nested dissection) that the
paper uses to reduce input replication. Area, energy and timing figures depend on the 28 nm
library and the SRAM macro, and cannot be reproduced from this RTL.
