# Window-filter accelerator array with transfer/compute overlap

This is the FPGA side of a heterogeneous CPU + accelerator platform for
window-based image processing (filters, block matching, feature detectors:
anything that slides a W_H x W_W window over an image). A host CPU moves image
data over a single AXI bus into custom accelerator cores and reads results
back. The bus is slow compared with the accelerators. The central idea is
that the transfer time does not have to be hidden by double buffering, which
leaves half of the scarce on-chip memory idle. It is hidden by **splitting
the accelerator into several cores**: while the CPU feeds core 2, core 1
computes. The number of cores `N_C`, the windows per core `N_W` and the pixels
per cycle `P_P` are parameters. Choosing them for a given filter trades
computation time against transfer time.

The architecture follows the published design "Data-Transfer-Aware Design of
an FPGA-Based Heterogeneous Multicore Platform with Custom Accelerators". The
RTL here is an independent implementation. Where that description leaves a
detail open, this RTL makes its own choice; those choices are listed at the
end. The defaults are the configuration reported as optimal for a 16x16 filter
on a 640x480 image: 4 cores x 4 windows, `P_P = 1`, partial images 94 pixels
wide and 248 high.

## How an image is cut up

* The image is divided into **partial images** of `P_W x P_H` pixels. Partial
  images share no data and overlap by `W_W-1` columns and `W_H-1` rows, so
  that every window lies inside one of them. `W_P = N_C x N_W` partial images
  are processed at once, one per **window lane**. Each core has `N_W` lanes.
* A **scan area** is a horizontal strip of a partial image, `W_H` rows high
  and `P_W` wide. It holds the `P_W-W_W+1` windows of one output row. A lane
  stores exactly one scan area: `W_H x P_W` pixels.
* Processing one scan area is a **sequence**. Sequence 1 needs the whole
  scan area. Each later sequence moves down one row. Only the new row
  (`P_W` pixels) is transferred, and it overwrites the row that just fell out
  of the window. A partial image takes `P_H-W_H+1` sequences.
* Inside a window the pixels are read **pixel-parallel, column-serial**.
  `P_P` pixels of one column are read per cycle, so a window takes
  `W_H x W_W / P_P` cycles. `P_P` must divide `W_H` and be a power of two.

### Row slots and the rotating row pointer

Rows are overwritten in place, so the physical row slot that holds the top
row of the current window moves down by one slot (modulo `W_H`) every
sequence. Each core keeps this slot in its `top` register:

* A start flagged as *first sequence* sets `top = 0`.
* Any other start advances `top` by one.
* Before starting sequence *s+1*, the CPU writes the new bottom row into slot
  `top`, the old top row. It can read `top` from the status register.

The pixels themselves are never moved. Instead, the address generators
translate each physical slot back to its logical row when they pick the
filter coefficient: `lrow = (slot - top) mod W_H`. The filter sum runs over
all rows of the window, so the order in which the rows are read does not
matter.

### Memory banking

A lane's scan area is spread over `P_P` local memory modules. Slot `s` lives
in module `s mod P_P`, at local row `s / P_P`, so each module holds
`C_M = W_H / P_P` rows. Reading "row group `k`, column `c`, window `x`" gives
every module the same address, `k*P_W + x + c`, and delivers `P_P` distinct
rows in one cycle without conflicts. Lanes hold different partial images but
walk identical addresses, so one set of `P_P` address generators (AGUs)
serves all lanes of a core.

## Hardware structure

```
hmp_top
 |- axil_slave        AXI4-Lite slave -> one-cycle internal bus (sbus_req_t)
 |- acc_interconnect  core select from address bits, read-data mux
 `- accel_core x N_C
     |- core_ctrl     start/stop, pause, row pointer, cycle counter
     |- agu x P_P     scan-area walk: memory address + coefficient index
     |- coefficient registers (W_H*W_W x 16 bit), PE context registers
     `- lane x N_W
         |- local_mem x P_P   input pixels (B_CA bits, W_H/P_P*P_W deep)
         |- pe_array          P_P rows x (log2 P_P + 1) columns of pe
         `- local_mem         output results (B_AC bits, P_W-W_W+1 deep)
```

### Processing elements and the array

A `pe` has a 16-bit ALU and a multiplier. Its context word selects add,
subtract, multiply (signed, then shifted right by a context field),
absolute difference, max, min or pass-through. It can also accumulate:
`y <= clr ? r : y + r`. Every operation takes one cycle.

The `pe_array` is the tree that reduces `P_P` pixels per cycle:

* Column 0 reads the memories, with pixel x coefficient as operands.
* Each later column picks two outputs of the previous column for every PE,
  through the `sel_a`/`sel_b` context fields. This is the reconfigurable
  interconnect.
* Row 0 of the last column produces the result.

At reset the contexts hold a FIR program: multiply in column 0, pairwise
adds after that, and an accumulate in the result PE. With `P_P = 1` the
array is a single multiply-accumulate PE. The contexts can be rewritten at
run time. For example, `OP_ABSDIFF` in column 0 turns the same hardware into
a sum of absolute differences against the coefficient window.

### Pipeline and timing of a sequence

```
AGU (addr, coef index) -> memory + coefficient read -> PE column 0 .. COLS-1 -> output memory
```

A start write enters RUN. The AGUs issue one step per cycle, which is
`W_H*W_W/P_P*(P_W-W_W+1)` steps. `done` rises when the last window's result
has been written. The run, as counted by the core's cycle register, takes:

    cycles = W_H*W_W/P_P * (P_W-W_W+1) + log2(P_P) + 3

This is the computation time `t_comp` of the timing model, with a pipeline
latency `t_pipe` of `log2(P_P)+3` cycles. At the defaults this is
256 x 79 + 3 = 20,227 cycles, about 202 us at 100 MHz. Address generation
runs in parallel with the PEs and adds no cycles.

**Pause.** The accelerator never computes on data that are being moved. In
any cycle in which the bus transfers data to or from a core, that core's
whole data path (AGUs, memories, PEs, result write) holds for the cycle.
A data transfer is any write, or any read outside the control region.
Status polling does not pause the core. In the intended schedule a core is
idle while it is loaded, so a pause only happens when software touches a
running core.

### Overlap of transfers and computation

There is a single bus, so transfers to different cores are serialised. The
CPU schedule, which runs in software and is reproduced by the testbench CPU
model, is:

1. Load sequence 1 into core 0 and start it, then core 1, and so on.
2. Then, round-robin over the cores: wait for done, read its `P_W-W_W+1`
   results per lane, write its next row, start it.

Call the time to service one core (read results, write a row, start and stop
it) `t_trans`. There are two regimes:

* If `t_comp >= (N_C-1) x t_trans`, each core's computation hides the other
  cores' transfers. The CPU waits for the cores. This is case A2.
* Otherwise the cores wait for the bus. This is case A1.

More cores shorten the computation per core but add transfers to hide. The
best `N_C`, `N_W` and `P_P` depend on the filter size, which is why they are
parameters.

## Programming model

Byte address = `{core, region[1:0], offset[OFFW-1:0], 2'b00}`. `OFFW` is
derived from the parameters by `acc_pkg::core_off_w`; it is 11 at the
defaults, so each core spans 32 KiB. Address bits above the core number are
ignored.

| region | offset | access | content |
|---|---|---|---|
| 0 CTRL | 0 | W | bit0 start, bit1 first sequence (`top := 0`), otherwise `top := top+1` |
| 0 CTRL | 0 | R | bit0 busy, bit1 done, bits 15:8 `top` |
| 0 CTRL | 1 | R | cycles of the last run |
| 0 CTRL | 8 + c*P_P + r | R/W | 16-bit context of PE (row r, column c), layout in `acc_pkg` |
| 1 COEF | `{row, col}` | R/W | 16-bit signed coefficient |
| 2 IN | `{group, slot, col}` | R/W | pixel `col` of row slot `slot` for lanes `group*N_CA ..`; lane i in bits `i*B_CA +: B_CA` |
| 3 OUT | `{group, x}` | R | result of window `x` for lanes `group*N_AC ..`; lane i in bits `i*B_AC +: B_AC` |

`{a, b}` are bit fields of width `ceil(log2(range))`. With `B_B = 32`,
`B_CA = 8` and `B_AC = 16`, one bus word carries the same pixel of 4 lanes,
or the results of 2 lanes. This packing is why more windows per core make
transfers cheaper per window.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_C` | 4 | accelerator cores |
| `N_W` | 4 | window lanes per core (`W_P = N_C*N_W`) |
| `P_P` | 1 | pixels per cycle per window (power of two, divides `W_H`) |
| `W_H`, `W_W` | 16, 16 | window (filter) size |
| `P_W` | 94 | partial-image / scan-area width |
| `B_CA`, `B_AC` | 8, 16 | input pixel and output result widths (at most 32) |
| `ADDR_W` | 32 | AXI address width |

`P_H` (partial-image height) only sets how many sequences software runs; the
hardware does not depend on it. Optimised settings for other filter sizes,
as the design-space search reported them, include:

| filter | N_C | N_W | P_P | P_W |
|---|---|---|---|---|
| 8x8 | 2 | 8 | 1 | 166 |
| 12x12 | 4 | 4 | 1 | 169 |
| 24x24 | 8 | 2 | 1 | 62 |
| 16x16, 64 PEs allowed | 4 | 4 | 2 | 172 |

The first three assume at most 16-way parallelism.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_pe` | every operation against a reference, accumulate/clear, pause |
| `tb_pe_array` | FIR tree and a run-time reprogrammed SAD with a crossed network; `COLS`-cycle latency |
| `tb_local_mem` | both ports, read latency, collision rule |
| `tb_agu` | full address/coefficient stream for every `top`, with random pauses; one step per cycle |
| `tb_core_ctrl` | row pointer and wrap, done/busy, ignored restarts, cycle count |
| `tb_accel_core` | 6 sequences with row replacement, the exact cycle formula above, pauses, read-back, SAD reprogramming |
| `tb_axil_slave`, `tb_acc_interconnect` | bus protocol, routing, read mux |
| `tb_hmp_top` | two reduced platforms end to end; one exercises case A1, the other A2; requires first/next starts, row-pointer wrap, overlapped transfers and a pause to occur |
| `tb_hmp_top_full` | default parameters, one full batch: 16 partial images of 94x248, 233 sequences per core, 294,512 results checked |
| `tb_filter_workloads` | platforms built with the optimised parameters for 8x8, 12x12, 24x24, 15x15 (32-way), and 16x16 and 18x18 with `P_P = 2`, at full scan-area width and 3 sequences each |

The CPU side is `tb/hmp_cpu_model.sv`, which drives the AXI master model in
`tb/axil_master_bfm.sv`. Pixels are a hash of (partial image, row, column),
so no image files are needed. Every window result is compared with a
directly computed 2-D filter sum.

### Checking the processing-time model

The CPU model also tests the analytical processing-time model that is used
to choose the parameters. It measures three costs on the simulated bus:

* `alpha`: about 5.7 cycles per input word;
* `beta`: 5 cycles per output word;
* `t_ctrl`: 10 cycles to start a core and see it done.

From these it evaluates the model: `t_init + t_mid + t_final`, with the
A1/A2 and B1-B3 cases. It then compares the result with the simulated
batch time:

| run | measured | model | error | required |
|---|---|---|---|---|
| default size, full batch | 5,056,544 cycles | 5,060,749 cycles | 0.08 % | 1 % |
| `tb_hmp_top` | | | 1 % and 3 % | 5 % |
| `tb_filter_workloads` (3 sequences only) | | | 3-7 % | 10 % |

At the default size the full batch takes 5.06 M cycles, about 51 ms at
100 MHz. The design-space search estimated about 60 ms for the same
configuration on the original hardware. That estimate uses a measured CPU
transfer cost of about 186/213 ns per word in and out; the testbench bus
model is faster.

Running a testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/acc_pkg.sv tb/tb_hmp_top.sv --top-module tb_hmp_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own name. `tb_hmp_top_full`
needs about 10 s of simulation, and `tb_filter_workloads` about 45 s.

## Where this RTL makes its own choices

* **Bus.** AXI4-Lite, one outstanding transaction, always OKAY, `wstrb`
  ignored (full-word writes). The bus and the cores share one clock; the
  original ran the accelerators at 100 MHz behind the CPU's AXI port. The
  case of a bus narrower than a data word, where a word is split over
  several transfers, is not supported; a simulation of such a setting reports
  an error at time zero.
* **Address map, command and status encodings, the rotating row pointer,
  the memory bank layout and the AGU address function** are this design's.
  The original reused an address function from earlier work without giving
  it. The AGUs walk only the scan-area pattern that window processing needs.
  Their pattern is set by parameters and cannot be reconfigured at run time.
* **PE arithmetic.** Products are shifted right by a context field, then
  truncated. All arithmetic wraps at 16 bits, without saturation. Pixels are
  unsigned, and coefficients are signed 16 bit.
* **PE network.** Any PE may take any output of the previous column.
* **Pause** covers any data transfer to a running core, as described above.
* **Not included:** the CPU, its on-chip memory, the DDR3 memory and the
  timer used for measurements. These are parts of the processing system or
  vendor IP. The CPU's behaviour is modelled in the testbench.
