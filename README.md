# Hybrid SRAM/STT-RAM GPU register file with silent register swapping

A GPU streaming multiprocessor keeps the registers of every resident warp in a
large, banked register file. Built from SRAM, that file leaks a lot. STT-RAM
(magnetic memory) is denser and hardly leaks, but an STT-RAM write takes about
four times as long as an SRAM write. While that write runs, it holds its bank.
Designs that put a small SRAM buffer in front of a large STT-RAM array only
work well when the warp scheduler seldom switches warps. A round-robin
scheduler switches on almost every instruction and floods the buffer.

This RTL takes a different approach and mixes the two memories in every cell.
Each **hybrid cell** pairs one SRAM bit with one STT-RAM bit on the same
bitlines. A local path inside the cell can copy the SRAM bit into the STT-RAM
bit without using the bitlines. Registers that are written often are moved,
on demand, into the SRAM half. The slow STT-RAM write then becomes a
background copy that never blocks the bank, whatever order the scheduler
issues warps in.

The design is one SM's register file: 128 KB in 16 banks, 48 warps of 32
threads, with operand collectors, a crossbar and the issue-time logic that
performs the swap.

## 1. The hybrid cell and the bank

Each bank is an array of 64 device rows by 1024 bits. A row holds one 32-bit
register for all 32 threads of a warp. Device rows 2i and 2i+1 share the
same hybrid cells and form **HC row i**:

| device row | sub-cell | read | write |
|---|---|---|---|
| even (2i) | SRAM | S-Read, 1 cycle | S-Write, 1 cycle |
| odd (2i+1) | STT-RAM (magnetic) | T-Read, 1 cycle | T-Write, `T_WRITE_CYCLES` = 4 cycles, bank busy |

A fifth operation, the **X-Transfer**, raises the HC row's BUE line. This
copies the SRAM row into the STT-RAM row inside the cells. It does not touch
the bitlines, so the bank keeps serving reads and writes of other rows, and
reads of the SRAM row itself, while the copy runs. The magnetic cells switch
only if BUE is held for `XFER_CYCLES` (4) cycles. A shorter pulse changes
nothing.

`hc_bank` models the array at this level. It takes a one-hot wordline `wl`,
`rd_en`/`wr_en` and the BUE lines. It returns read data one cycle later. For
a T-Write it latches the data, holds the bitlines (`wr_busy`) and commits the
write after four cycles. `hc_cell` is a timed behavioural model of a single
cell, for reference only. It uses the per-operation latencies of the cell
(SRAM write/read 0.77 ns, STT-RAM write 2.8 ns, STT-RAM read 0.71 ns) and is
not used by the register file RTL.

## 2. Where a register lives

**Mapping (`reg_mapper`).** Registers are laid out in order across the
banks. The linear index `warp*20 + reg` gives bank `index mod 16` and row
`index div 16`. With 20 registers per warp, warp 0's R0..R15 sit in row 0
of banks 0..15, and R16..R19 in row 1 of banks 0..3. Warp 1 starts in row 1
of bank 4. R1 (row 0) and R17 (row 1) of warp 0 therefore share HC row 0 of
bank 1: R1 is in the SRAM half and R17 in the STT-RAM half.

**Exchange flags (`exchange_flag_table`).** Each bank keeps one flag per HC
row (32 flags). A set flag means the two registers of that HC row have
traded places. The location of a register with row address `r` is therefore

    location = r[0] XOR flag[r >> 1]        (0 = SRAM, 1 = STT-RAM)

and the device row actually driven is `{r >> 1, location}`. This XOR sits in
the row decoder (`efc_decoder`), in front of the wordline drivers. The table
has one read port, used for every bank access (the *R-check*). It has one
read/write port, used by the issue-time check (the *X-check*) and to flip a
flag when a swap ends. All flags clear at reset.

## 3. On-demand swapping at issue

This is the central mechanism, and the part that needs the most care.

A swap is started by an instruction whose **destination** register currently
lives in STT-RAM. Its old value is about to be overwritten, so the STT-RAM
half of its HC row holds nothing worth keeping. The swap therefore needs a
single copy: the partner register (the SRAM half) is copied into the STT-RAM
half by an X-Transfer, and the flag flips. The partner now reads from
STT-RAM, the destination now maps to the SRAM half, and the instruction's
write-back becomes a 1-cycle S-Write.

The check is made when the instruction is **issued**, not at write-back. The
copy then overlaps operand read and execution:

```
cycle  t      issue; X-check in the destination's bank: location = 1, safe -> start
       t+1    BUE high ......................................  reads/writes of other
       ...    BUE high    swap buffer holds the row address    rows continue; reads of
       t+4    BUE high; copy lands and flag flips at the edge  the partner continue
       t+5..  destination maps to SRAM: its write-back is an S-Write
```

`hc_rf` allows the swap only when it is safe. All of these must hold:

* No collector unit, including the one taking this instruction, still waits
  for a read of that HC row.
* No write-back to that HC row is waiting at the write port.
* No T-Write to that HC row is in progress.
* The bank's swap buffer (one entry) is free.

If any of them fails, or the destination is already in SRAM, nothing
happens. A refused check means the write-back will be a T-Write. The outcome
of every check is reported on `ev_xchk`: `XCHK_SRAM`, `XCHK_STARTED` or
`XCHK_REFUSED`.

While a swap runs, the row address in the swap buffer is compared with every
access to the bank:

* A **write** to the swapping HC row is held until the swap ends. Writing
  the SRAM half would corrupt the data being copied, and the flag is not
  final yet.
* A **read of the destination** register (its STT-RAM copy is being
  overwritten) is held.
* A **read of the partner** goes ahead in parallel with the copy.

After the swap, the destination's SRAM half still holds the partner's value
until the write-back arrives. This is harmless under the usual scoreboard
rule that no younger instruction reads a register before an older
instruction writing it has retired. The design relies on that rule (see
section 5).

Only one swap can be in flight per bank. A second X-check in the same bank
during those four cycles is refused.

## 4. Operand collection and write-back

* **Collector units (`operand_collector`, 4 of them).** An issued instruction
  takes a free unit, which holds its warp, its destination and up to two
  source operands, already mapped to (bank, row). The unit requests one
  operand per cycle, so two sources take at least two cycles. When all data
  have arrived it raises `ready`.
* **Arbiter (`bank_arbiter`, one per bank).** Grants one bitline access per
  cycle. A waiting write-back wins. Reads are granted round robin among the
  units. Requests are masked while a T-Write holds the bank or a swap blocks
  them.
* **Crossbar (`rf_crossbar`).** Sorts unit requests by bank. It returns each
  bank's read data, one cycle later, to the unit and slot recorded at grant.
* **Dispatch (`dispatch_mux`).** Picks a ready unit round robin and hands its
  operands to the execution stage with a valid/ready handshake, freeing the
  unit.
* **Write-back.** `wb_ready` rises in the cycle the bank accepts the write.
  The decoder turns the write into an S-Write (1 cycle) or a T-Write (bank
  busy for 4 cycles).

## 5. Interface of `hc_rf`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (control state and flags only, not the arrays) |
| `iss_valid` / `iss_ready` | in / out | issue handshake; ready while a collector unit is free |
| `iss_warp`, `iss_dst`, `iss_dst_valid` | in | warp and destination register |
| `iss_src[2]`, `iss_src_valid[2]` | in | source registers |
| `disp_valid` / `disp_ready` | out / in | dispatch handshake |
| `disp_warp`, `disp_dst`, `disp_dst_valid`, `disp_opnd[2]` | out | instruction with its 1024-bit operands |
| `wb_valid` / `wb_ready` | in / out | write-back handshake |
| `wb_warp`, `wb_reg`, `wb_data` | in | register written back |
| `ev_s_read`, `ev_t_read`, `ev_s_write`, `ev_t_write` | out | per bank, pulses on each cell operation |
| `ev_xfer_start`, `ev_xfer_done`, `swap_busy` | out | per bank, X-Transfer start, last cycle, and in progress |
| `ev_xchk` | out | outcome of this cycle's X-check |

Contract with the issue stage, which is the scoreboard of a normal GPU
pipeline and is not part of this RTL:

* Do not issue an instruction while an older one that writes one of its
  source or destination registers has not written back.
* Do not issue it while an older one has yet to read its destination.
* Write every register before it is read. The arrays are not reset.

Assertions check the handshakes inside the banks: one-hot wordlines, no
access during a T-Write, and no S-Write into a row being copied.

## 6. Parameters

| parameter | default | origin |
|---|---|---|
| `BANKS` | 16 | design description (same as a 16-bank SRAM baseline) |
| `ROWS` | 64 | design description (bank of 64 x 1024 bits) |
| `WIDTH` | 1024 | 32 threads x 32 bits |
| `MAX_WARPS` | 48 | design description |
| `REGS_PER_WARP` | 20 | the design description's mapping example |
| `T_WRITE_CYCLES` | 4 | STT-RAM write about 4x the SRAM write |
| `XFER_CYCLES` | 4 | own choice (same magnetic write as a T-Write) |
| `NUM_CU` | 4 | own choice |
| `NUM_SRC` | 2 | two read operands per instruction |
| `REMAP` | 1 | 1 = on-demand swapping; 0 = static mapping (even rows SRAM, odd rows STT-RAM), for comparison |

Defaults live in `rtl/hc_rf_pkg.sv`. Every module takes them as overridable
parameters. `BANKS` and `ROWS` must be powers of two.

## 7. Files

| file | content |
|---|---|
| `rtl/hc_rf_pkg.sv` | constants, cell-operation and X-check enums |
| `rtl/hc_rf.sv` | top: the register file of one SM |
| `rtl/hc_bank.sv` | hybrid-cell bank |
| `rtl/efc_decoder.sv` | row decoder with exchange flag check, swap buffer and transfer timer |
| `rtl/exchange_flag_table.sv` | per-bank flag table |
| `rtl/reg_mapper.sv` | (warp, register) to (bank, row) |
| `rtl/bank_arbiter.sv`, `rtl/rf_crossbar.sv`, `rtl/operand_collector.sv`, `rtl/dispatch_mux.sv` | operand path |
| `rtl/hc_cell.sv` | timed behavioural model of one cell (not synthesizable) |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_hc_rf_sched.sv`, `tb/hc_rf_workload.sv` | scheduler comparison: LRR and GTO, with and without remapping |

## 8. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/hc_rf_pkg.sv tb/tb_hc_rf.sv --top-module tb_hc_rf
./obj_dir/Vtb_hc_rf
```

Replace `hc_rf` with any other module name to run its testbench.

`tb_hc_rf` runs the register file at its default size. It goes through three
phases:

1. It writes all 960 registers. Half of them become T-Writes.
2. It issues 3000 instructions from the 48 warps in loose round-robin order.
   Each instruction writes one of a few frequently written registers and
   reads two random ones. One in eight reads none.
3. It reads every register back.

Every dispatched operand is compared with a shadow copy of the register
file. The test also checks:

* each X-Transfer lasts exactly `XFER_CYCLES`;
* a T-Write keeps its bank idle for `T_WRITE_CYCLES`;
* every mechanism occurred: S-/T-Read, S-/T-Write, each X-check outcome, a
  read in parallel with a transfer, and a write-back held by a swap.

A typical run shows about 300 swaps and 60 refused checks. About 97% of the
write-backs in the instruction phase are S-Writes, compared with 50% during
the initial fill. The run takes well under a second.

### Scheduler comparison

`tb_hc_rf_sched` runs one program on four copies of the register file at
default size. Each warp runs 40 instructions, every warp has the same kind of
program, and the execute latency is 2 cycles. The copies differ in issue
order, loose round robin (LRR) or greedy-then-oldest (GTO), and in whether
swapping is on (`REMAP`). The helper `tb/hc_rf_workload.sv` drives and
checks each copy. Cycles are counted for the program phase only; the other
columns cover the whole run:

| run | cycles | S-Writes | T-Writes | T-Reads | swaps |
|---|---|---|---|---|---|
| LRR, static mapping | 2651 | 1424 | 1456 | 2164 | 0 |
| LRR, remapping | 2451 | 2356 | 524 | 2108 | 231 |
| GTO, static mapping | 2678 | 1424 | 1456 | 2164 | 0 |
| GTO, remapping | 2470 | 2335 | 545 | 2080 | 215 |

The initial fill accounts for 480 of the T-Writes in every run. With
remapping, the program itself causes about 50 T-Writes instead of 976, under
either scheduler. Total STT-RAM accesses (T-Reads plus T-Writes) fall by about a quarter.
Reads barely change, because the swapped-in registers are mostly written,
not read. Cycle counts improve by about 8%. This model issues at
most one instruction per cycle and has four collector units, so it is mostly
limited by issue, not by bank bandwidth. A full GPU pipeline with more
pressure on the banks would show a larger gap. The test checks the
reduction in T-Writes, and that LRR with remapping is not slower than LRR
without it.

## 9. How far to trust it, and where it departs

**Checked by simulation.** Every module's testbench passes. Each has also
been shown to fail when its module is broken in a way that matters.

**Taken from the design description:**

* the cell operations and the even/odd SRAM/STT-RAM row split;
* the 16 x 64 x 1024 organisation;
* the register mapping;
* one flag per HC row, with a read port and a read/write port;
* the XOR location rule;
* the X-check at issue, with BUE and a flag flip after the transfer;
* the rule that a swap needs no conflicting access.

**This design's own choices:**

* all cycle counts other than the 4x write ratio;
* the number of collector units;
* the arbitration policies;
* the single-entry swap buffer, and refusing instead of queueing;
* holding writes and destination reads during a swap;
* the valid/ready handshakes and the reset behaviour.

**Known departures and gaps:**

* **Flag table size.** The table holds 32 bits (4 bytes) per bank, one flag
  per HC row. The description also quotes an 8-byte table per bank. The
  per-HC-row rule was followed.
* **BUE during X-Transfer.** The operation table of the description lists
  BUE = 0 and WL1 = 1 for the X-Transfer, which contradicts its own
  explanation that BUE drives the copy. Here BUE alone drives it.
* **Reads during a swap.** A read of the swap's destination register is
  held until the swap ends, although the scoreboard rule already rules such
  a read out. This is slightly stricter than needed: the simplest reading of
  the source design lets every read of a swapping row go ahead through the
  normal flag check.
* **Swap fallback.** A swap at write-back time, the fallback of a design
  without issue-stage support, is not built. Refused checks simply lead to a
  T-Write.
* **Analog effects.** The periphery (precharge, sense amplifiers, column
  drivers) and the electrical behaviour of the cell (leakage, weak-'0'
  retention, sensing margins, write error rates) are not modelled beyond
  their logical timing.
* **Pipeline and scheduler.** The warp scheduler and the rest of the SM
  pipeline are outside this RTL. The testbench plays their role.
* **Synthesis.** The cell arrays are written as plain SystemVerilog arrays.
  They synthesize to 1 Mbit of memory bits (16 x 64 x 1024), not to a
  hybrid-cell macro. The X-Transfer (one row copied into another in one
  clock edge) needs a memory with an extra row-to-row copy port, which is
  what the hybrid cell provides physically.
