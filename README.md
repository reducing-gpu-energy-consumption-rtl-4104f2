# OWAR: an operand-width-aware GPU register file

A GPU streaming multiprocessor (SM) keeps a very large register file (128 kB
here). Yet most values written into it are small. Many fit in 8 bits and
many more in 16. In a conventional register file, a warp register always takes
32 threads x 32 bits. OWAR measures how wide each warp result really is when
it is written back. It then stores narrow warp registers in one or two bank
entries instead of four, so several architectural warp registers share one
physical warp register. A renaming table records where each architectural
register lives.

The space this frees is used in two ways:

* **Power gating.** In-service registers are packed into the low sub-arrays of
  the register file. Sub-arrays that hold nothing are switched off. A gated
  sub-array is woken only when the powered ones are full, and waking it stalls
  write-back for one cycle.
* **Thread overrun.** The thread block scheduler can admit blocks according to
  the *predicted* packed register usage rather than the full 32-bit usage. For
  kernels whose occupancy is limited by registers, this runs more blocks at
  once.

A narrow register also costs fewer bank accesses, because only the banks that
hold it are enabled.

This repository holds synthesizable SystemVerilog for the register-file side of
one SM: width detection, the packing table, renaming, allocation, power gating,
the banked storage and the admission check. The rest of the GPU is not included:
pipeline, warp schedulers, SIMD units, caches, operand collectors and crossbar.
The testbenches drive the register file's ports directly in their place.

## Organisation of the storage

| quantity | value |
|---|---|
| banks | 32, each with one read and one write port |
| bank entry | 256 bits = eight 32-bit thread values |
| entries per bank | 128 (rows) |
| physical warp register | 4 entries: the same row of 4 consecutive banks |
| physical warp registers | 1024 (10-bit address) |
| renaming table | 2048 entries x 14 bits (10-bit register + 4-bit entry mask), plus a valid bit per entry |
| availability vector | 4096 bits, one per bank entry |
| packing table (TLPT) | 63 entries x 2 bits |
| power-gating sub-arrays | 8, each 16 rows = 128 physical warp registers |

Physical warp register `p` is stored at row `p / 8`, in banks `4*(p mod 8)` to
`4*(p mod 8)+3`. Its 4-bit mask selects which of those four entries an
architectural register uses. The entries need not be adjacent: mask `0101` is
legal.

### Packed layout

A register of width *w* (8, 16 or 32) takes the low *w* bits of each of the 32
thread values and lays them side by side, thread 0 at the bottom. This gives a
stream of 32*w bits, which is 1, 2 or 4 entries of 256 bits. Chunk *c* of that
stream goes into the entry of the *c*-th set bit of the mask. At width 32 with
mask `1111`, this is the ordinary layout: entry *j* holds threads 8j..8j+7. On a
read, the width is recovered from the number of mask bits, and every value is
zero-extended.

Only leading zeros make a value narrow. Small negative numbers are therefore
stored at 32 bits.

## Write-back: the part that does the work

`owar_top` accepts one warp write per cycle on `wb_valid`/`wb_ready`. The whole
sequence below is combinational within the accepting cycle:

1. **Detect.** `nw_detector` runs 32 zero-detectors, one per thread. Each gives
   a 2-bit code: `01` = 8 bit, `10` = 16 bit, `11` = 32 bit. The warp's width is
   the largest code.
2. **Profile.** `tlpt` holds one width per register id, shared by all warps of
   the kernel. It keeps the wider of the stored width and the new one. If a
   width that was already recorded grows, that is a *misprediction*.
3. **Look up.** The renaming table is indexed by `warp * regs_per_thread + reg`.
   It returns the register's physical register and mask. A mask of `0000` means
   the register is not mapped yet.
4. **Place.** The register needs 1, 2 or 4 entries, according to the TLPT
   width. If its mask already has at least that many entries, the data are
   written in place, at the width the mask implies. Otherwise a *re-map* takes
   place, in one of two cases:
   * the register is unmapped;
   * it was mapped when the TLPT width was narrower (a misprediction, or an
     earlier allocation for another warp).

   For a re-map, `reg_allocator` returns the lowest physical register in a
   powered sub-array that has enough free entries, together with a mask of its
   lowest free entries. In the same cycle:
   * the old entries are freed;
   * the new ones are marked as assigned;
   * the renaming entry is rewritten.

   No data have to be copied, because a write-back replaces the whole warp
   register.
5. **Wake if needed.** If no powered sub-array has room, `wb_ready` is low.
   `subarray_pg` then powers the lowest gated sub-array, which takes
   `WAKE_CYCLES` (default 1) cycles, and the write completes after that. If
   every sub-array is already powered and full, `rf_full` is raised and the
   write waits until a thread block is released.
6. **Write.** `operand_packer` packs the data, and `rf_array` enables only the
   banks whose mask bit is set.

A register never shrinks: once allocated at 16 bits, later 8-bit values are
stored in its two entries. The TLPT is cleared only by `kernel_start`.

## Reads

`rd_valid` with `rd_warp`/`rd_reg` looks up the renaming table
combinationally. The masked banks are read, and `rd_data` arrives one cycle
later with `rd_data_valid`. A read and a write of the same register in the same
cycle return the old value. A register that has never been written reads as
zero. One read and one write are served per cycle. They use the banks'
separate ports and never conflict.

## Thread blocks, prediction and thread overrun

`cta_admit` answers `cta_req` combinationally with `cta_grant`. It also
returns a slot `s`, and the block's warps are numbered from
`s * warps_per_cta`. Slots are always the lowest free ones. This keeps every
renaming index inside the 2048-entry table.

* `to_mode = 0` (power gating only). The baseline limits apply:
  * each warp register reserves 4 entries, out of 4096 in total;
  * at most 16 blocks are resident;
  * at most 48 warps are resident.
* `to_mode = 1` (thread overrun plus power gating). Once a block has completed,
  the TLPT offers a prediction: the sum of 1/2/4 entries over the kernel's
  registers, with unwritten registers counted as 4. A new block then reserves
  `warps_per_cta * pred_entries` entries. The block limit rises to 32, and the
  renaming table (2048 architectural warp registers, twice the physical count)
  bounds the rest.

`cta_done_valid`/`cta_done_slot` retires a block. In response:
* the TLPT latches a new prediction;
* `cta_admit` returns the block's reservation;
* a walker clears the renaming entries of the block's warps and frees their
  bank entries, one register per cycle. `cta_done_ready` is low and write-back
  stalls while it runs.

When a sub-array becomes empty, it is gated on the next cycle.

The prediction is a bet. If registers later turn out wider than predicted, the
packed registers can exceed the file. This design then stalls write-back
(`rf_full`) until a block is released; it has no other recovery.

## Modules

| file | role |
|---|---|
| `owar_pkg.sv` | sizes, width codes, renaming entry struct, helper functions |
| `zero_detect.sv` | width code of one 32-bit value |
| `nw_detector.sv` | 32 zero-detectors and the warp's upper-bound width |
| `tlpt.sv` | packing table, misprediction flag, usage prediction |
| `rename_table.sv` | 2048 x (10-bit register, 4-bit mask), two lookup ports |
| `reg_allocator.sv` | availability vector, first-fit search, per-sub-array occupancy |
| `subarray_pg.sv` | sub-array gating, wake-up with stall, event counters |
| `operand_packer.sv` | pack to / unpack from masked bank entries |
| `rf_bank.sv` | one 128 x 256-bit bank, 1 read + 1 write port, synchronous read |
| `rf_array.sv` | 32 banks and the bank arbitrator, access counters |
| `cta_admit.sv` | block admission in both modes, slot and warp numbering |
| `owar_top.sv` | all of the above wired together, write-back control, release walker |

The top's status outputs count each mechanism:
* mispredictions, re-maps and prediction-based grants;
* wake-ups, wake stall cycles and gatings;
* bank-entry reads and writes.

They make it easy to compare access counts against an unpacked file, where
every access would touch four entries.

## Where this design goes beyond what OWAR specifies

The following points are this implementation's own choices:

* The number of sub-arrays (8) and the rule "gate when empty".
* All sub-arrays are gated at reset.
* The first-fit allocation order, which takes the lowest free entries. OWAR
  intends each warp's registers to occupy consecutive space. First fit gives
  that only when a warp's registers are written in order into free space; it is
  not enforced.
* The bit layout inside a packed entry.
* Unwritten registers are counted as full width in the prediction.
* When a re-map happens: whenever the mapped entries are fewer than the width
  needs, not only on a misprediction.
* The release walker, and the stall on overflow.
* The admission limits in overrun mode: 32 blocks and 128 warp slots. The
  48-warp baseline limit (GTX480-like) is also assumed.
* Every write-back writes all 32 threads. Divergent partial writes are not
  handled: merging a partial write into a packed register would need a
  read-modify-write that is not modelled here.
* One register read and one write per cycle. Operand collectors and the
  crossbar are not included.
* The bank entry availability vector uses 1 for "assigned" and 0 for "free".
* The renaming table has a resettable valid bit per entry (2048 extra bits). It
  lets the 14-bit entries live in an SRAM that is never swept at reset.

All sizes in the table above are the full sizes; nothing is scaled down.

## Simulating

Every testbench in `tb/` checks its own results and prints a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/owar_pkg.sv \
    $(ls rtl/*.sv | grep -v owar_pkg) tb/tb_owar_top.sv --top-module tb_owar_top
./obj_dir/Vtb_owar_top
```

Replace `tb_owar_top` with `tb_nw_detector`, `tb_tlpt`, `tb_rename_table`,
`tb_reg_allocator`, `tb_subarray_pg`, `tb_operand_packer`, `tb_rf_array` or
`tb_cta_admit` for the unit tests, or with `tb_owar_workloads` for the
benchmark block shapes. The package must come first on the command
line, and only once. `-Wno-fatal` keeps lint warnings (for example unused
package constants) from stopping the build.

`tb_owar_top` runs the full-size design in under a second. It keeps an
independent model of every register value, of the TLPT and of the entries each
register occupies, and goes through these phases:

1. It admits blocks under the baseline limits. It expects exactly 6 blocks of
   8 warps x 16 registers.
2. It writes, rewrites (some registers wider) and reads back every register,
   comparing the data and the occupied-entry count after each block.
3. It checks the following:
   * bank writes are fewer than 4 per write-back;
   * every wake-up costs exactly one stall cycle;
   * the powered sub-arrays are the lowest ones.
4. It releases all blocks and expects every entry free and every sub-array
   gated.
5. It switches to thread overrun and expects more than 6 blocks to be admitted.
6. It widens registers until the file overflows, then releases a block and
   checks that the stalled write completes.

Each mechanism must have occurred at least once, or the test fails.

## Benchmark block shapes

`tb_owar_workloads` takes the thread-block shapes of seventeen Rodinia and
PolyBench kernels through the full-size design: 1, 6, 8 or 16 warps per block.
Real kernels cannot run here, so each kernel is synthetic:
* it has 20 registers per thread (an assumed count);
* each register id gets a width class drawn from a typical mix of register
  writes: 45.3% fit in 8 bits, 16.1% in 16 bits, 38.6% need 32 bits.

For each kernel the test does the following:
1. It checks the baseline admission count.
2. It runs one block and retires it, which gives the prediction.
3. It checks the thread-overrun admission count against the limit formula.
4. It writes every register of every admitted block and reads each one back.
5. It checks the occupied entries against the packed sum.

A typical run gives:

| block shape | blocks, baseline | blocks, overrun | entries used vs. unpacked |
|---|---|---|---|
| 8 warps (most kernels) | 6 | 9-12 | 48-66% |
| 16 warps (bfs, sad1) | 3 | 5-6 | 40-58% |
| 6 warps (dwt2d) | 8 | 14 | 60% |
| 1 warp (nw) | 16 | 32 | 53% |

The bank writes per write-back fall from 4 to between 1.6 and 2.7. The
numbers depend on the random width draw.

## How far to trust it

* Every unit has a randomized self-checking testbench against an independent
  reference.
* Each testbench has been shown to fail when its unit is deliberately broken.
* The end-to-end test exercises:
  * narrow packing, mispredictions and re-maps;
  * wake-ups and gating;
  * release of blocks;
  * thread-overrun admission;
  * overflow.
* A coarse synthesis of the whole design gives about 30,000 word-level cells,
  7,100 flip-flops and 1.08 Mbit of memory. The memory is the 1 Mbit of
  register banks plus the 28,672-bit renaming table. The availability vector
  (4,096 flops) and its search account for most of the logic.
* Not verified:
  * timing or area: the allocator's 1024-way first-fit search is a wide
    combinational priority encoder and would need pipelining or a hierarchical
    search for a real clock rate;
  * power: gating is modelled only as the `sa_active` state plus an assertion
    that no access reaches a gated sub-array.
