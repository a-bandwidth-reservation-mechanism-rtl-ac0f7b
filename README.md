# AXI Budgeting Unit (ABU): bandwidth reservation and address protection for FPGA accelerators

On a SoC-FPGA several hardware accelerators ("HW-tasks") usually reach the
system DRAM through their own AXI4 master ports, a shared AXI interconnect and
one FPGA-to-processor port. A stock interconnect arbitrates round robin: it is
built for throughput, gives no way of saying how much of the memory bandwidth
each accelerator may use, and lets one greedy or faulty accelerator slow all
the others down. Worse, an AXI master can address the whole physical memory,
operating-system memory included.

The ABU is a small supervisor placed on the AXI link of each HW-task, between
the task and the interconnect:

```
 HW-task 0 --M S[ ABU 0 ]M S--+
 HW-task 1 --M S[ ABU 1 ]M S--+-- AXI interconnect --M S-- FPGA-PS port -- DRAM
 HW-task 2 --M S[ ABU 2 ]M S--+   (round robin)
 HW-task 3 --M S[ ABU 3 ]M S--+
```

It gives each task two kinds of isolation:

* **Temporal** - a budget of `B` transactions that is refilled every `P`
  clock cycles. When the budget is spent the task is held off the bus until
  the next refill. Each task then sees a private bus of `B/P` transactions per
  cycle, whatever the other tasks do.
* **Spatial** - a list of up to eight address segments (base and size). A
  request that leaves them never reaches the bus; the task is blocked and the
  processor gets an interrupt.

The ABU passes every request it allows on in the same clock cycle, so it adds
no latency. Because of that the period can be very short (the reference
setting is P = 128 cycles, about 1.3 us at 100 MHz), far shorter than the
periods of the tasks themselves. With such a short period the ABU behaves as
a fluid bandwidth regulator.

This repository holds the SystemVerilog of the ABU, of a four-ABU top level,
and self-checking testbenches, together with behavioural models of the parts
around it (accelerators, interconnect, memory) that the testbenches need.

## Budget and period

Each ABU keeps a budget counter `b` and a period counter
(`rtl/abu_budget_counter.sv`):

* The period counter runs `0 .. P-1`. In cycle `P-1`, `status.period_end` is
  high, and on the next edge `b` is loaded with `B` (a refill, not an
  addition: unused budget does not carry over).
* A **transaction** is one address handshake on the downstream side: one
  accepted AR (read burst) or AW (write burst). Each costs one unit of budget,
  whatever the burst length. A read and a write can both go in the same cycle,
  so an ABU passes up to two transactions per cycle and `B` may be larger
  than `P` (up to `2P` is usable).
* Transactions in the last cycle of a period are charged to that period.
* Reset loads `b = B` and starts a period. All ABUs share the clock and reset,
  so with equal `P` their periods stay aligned, which is what the bandwidth
  analysis below relies on.

Granting a request needs care because AXI forbids taking back a `valid` that
has been shown to a slave (`rtl/abu.sv`):

* A request the ABU has shown downstream but the interconnect has not yet
  accepted is **open**. Its channel stays connected until it is accepted, and
  one unit of budget stays reserved for it. A new request is granted only out
  of `avail = b - (open requests)`.
* If `avail >= 2`, new reads and writes both go. If `avail = 1` and both want
  it, they take turns (a toggle flips on each such tie). If `avail = 0`,
  nothing new goes and `status.throttled` is high while a request waits.
* A refused request just waits upstream with `ready` low. The HW-task sees
  an ordinary slow slave.

**Choosing B.** For a task that needs `N` transactions per job and must
finish within `T` cycles, the smallest budget that is enough is
`B = N * P / T` (rounded up). The ABU then guarantees the rate, provided the
interconnect and memory can actually serve all budgets within one period. That
is a property of the system, to be checked separately: roughly, the sum of
the budgets must fit the memory's supply over `P` cycles. The end-to-end
testbench shows the guarantee. A job of 40 transactions under `B = 16`,
`P = 128` starts at a period boundary and finishes in its third period
(between 2P and 3P cycles), while three other tasks flood the bus.

## Address segments

`rtl/abu_addr_checker.sv` checks each new AR and AW against eight segments.
A segment covers bytes `[base, base + size - 1]`, and `size = 0` switches it
off. The check covers the whole burst, not just its start address:

| burst | bytes touched |
|---|---|
| INCR  | `addr .. addr + (len+1)*2^size - 1` |
| FIXED | `addr .. addr + 2^size - 1` |
| WRAP  | the aligned block of `(len+1)*2^size` bytes that holds `addr` |

A burst is legal if some segment holds all of it. The reserved burst type,
and bursts that would run past the top of the 32-bit space, are never legal.

When a new request is illegal:

1. It is not passed on, and in that cycle no other new request is granted
   either.
2. `irq` rises on the next edge and stays high. `status.viol_addr` and
   `status.viol_write` record the offending address and whether it was a
   write.
3. While blocked, the ABU grants no new AR or AW. Requests already open still
   complete, and so does the write data owed to already-granted writes, so
   the interconnect is never left half-way through a transfer.
4. The processor stops or resets the task and pulses `irq_clear`. If the
   illegal request is still being offered, the ABU blocks again at once.

## Write data and responses

* **W (write data).** Write data has no address, so it is gated differently:
  W beats pass only while a granted write burst (or one on offer downstream)
  is still owed data. The ABU counts write bursts granted minus write bursts
  completed (`wcred_q`). So the data of a write that the budget or a
  violation holds back never reaches the interconnect, while a write whose AW
  was granted streams without delay. W may go ahead of its AW in the cycle
  the AW is offered, as AXI allows.
* **R and B (responses).** These are wired straight through: they answer
  requests that were already allowed.

## Timing

Everything on the request path is combinational. The address check, the
budget comparison and the decouplers (`rtl/abu_decoupler.sv`, an AND of
`valid` and of `ready` with an enable) sit between the task's `valid` and the
interconnect's `valid`. No register is inserted, so an allowed request
reaches the interconnect in the cycle the task raises it. The cost is one
32-bit range comparison per segment in that path. With eight segments this
is a modest depth for an FPGA at 100 MHz, but it is the path to watch when
raising the clock. The registered state is small: `b`, the period counter,
two open flags, the tie toggle, the W credit counter, the block flag and the
violation record (77 flip-flops per ABU with the default widths).

## Interfaces

All modules import `abu_pkg` (`rtl/abu_pkg.sv`). An AXI4 link is carried as
two packed structs:

* `axi_req_t` holds what a master drives: AW, W, AR with their valids, plus
  `b_ready` and `r_ready`.
* `axi_resp_t` holds what a slave drives.

The default widths are those of the Zynq-7000 high-performance ports: 32-bit
address, 64-bit data and 6-bit ID. They are package parameters.

`abu_system` (the top level) has these ports:

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (AXI ARESETn style) |
| `cfg[i]` | in | `abu_cfg_t` | `budget` (B), `period` (P, in cycles), `seg[0..7]` (`base`, `size`) |
| `irq_clear[i]` | in | 1 | pulse to release a blocked task |
| `task_req[i]` / `task_resp[i]` | in / out | `axi_req_t` / `axi_resp_t` | AXI slave port facing HW-task i |
| `ic_req[i]` / `ic_resp[i]` | out / in | `axi_req_t` / `axi_resp_t` | AXI master port to interconnect slave port i |
| `irq[i]` | out | 1 | address violation, level until cleared |
| `status[i]` | out | `abu_status_t` | `budget_left`, `period_pos`, `period_end`, `throttled`, `blocked`, `viol_addr`, `viol_write` |

`N_ABU` (default 4) sets the number of ABUs. The configuration is plain
inputs. A system would drive them from a processor-writable register bank
(for example an AXI4-Lite slave), which is not part of this RTL.

The configuration is read live. A new `P` takes effect at once. A new `B`
takes effect at the next refill, and a `b` above the new `B` is not cut.
Segment changes apply to the next new request.

## Files

| file | contents |
|---|---|
| `rtl/abu_pkg.sv` | AXI4 channel structs, configuration and status records, widths |
| `rtl/abu_addr_checker.sv` | burst footprint and segment check (combinational) |
| `rtl/abu_budget_counter.sv` | budget `b`, period counter, refill |
| `rtl/abu_decoupler.sv` | valid/ready switch for one channel |
| `rtl/abu.sv` | one ABU: grant logic, open requests, W credit, blocking, interrupt |
| `rtl/abu_system.sv` | top: `N_ABU` ABUs side by side |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/hw_task_model.sv` | behavioural DMA-like accelerator (jobs of N transactions, or endless) |
| `tb/axi_rr_interconnect_model.sv` | behavioural round-robin N:1 interconnect, in-order routing |
| `tb/axi_sink_model.sv` | behavioural in-order memory: one read and one write request per cycle, fixed read latency |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each one has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/abu_pkg.sv rtl/abu_addr_checker.sv rtl/abu_budget_counter.sv \
  rtl/abu_decoupler.sv rtl/abu.sv rtl/abu_system.sv \
  tb/hw_task_model.sv tb/axi_rr_interconnect_model.sv tb/axi_sink_model.sv \
  tb/tb_abu_system.sv --top-module tb_abu_system
./obj_dir/Vtb_abu_system
```

For the other testbenches, swap in `tb_abu`, `tb_abu_budget_counter`,
`tb_abu_addr_checker` or `tb_abu_decoupler` as the last file and top module
(they need only the package and their module). Each runs in well under a
second.

| testbench | what it establishes |
|---|---|
| `tb_abu_addr_checker` | 10 000 bursts of every type, against a 64-bit reference, plus exact segment edges, disabled segments, WRAP alignment |
| `tb_abu_budget_counter` | refill exactly every P cycles (P = 0, 1, 2, 7, 128), `b = B - spent` every cycle, saturation at 0 |
| `tb_abu_decoupler` | switch truth table and equal transfer counts on both sides |
| `tb_abu` | at most B per period, exactly min(B, 2P) for a greedy task; budget readback; same-cycle pass-through; W never ahead of granted AW; R/B untouched; violation blocks, records the address and raises irq, and `irq_clear` releases; read/write alternation on the last unit; held open requests under a slow slave; B = 144 with P = 128 |
| `tb_abu_system` | four tasks at default size: each gets exactly its B (16, 12, 8, 4) per period alone and under flooding; the response time of a 40-transaction job under B = 16 and B = 40; a violation on one task leaves the others' budgets exact; recovery after clear |
| `tb_abu_case_study` | the case-study budgets (DMA-1 128, DMA-2 144, Sobel 112, FIR 96) with greedy tasks: at P = 1024 every ABU passes exactly its B each period; at P = 128 the memory cannot serve 480 transactions per period, budgets are never exceeded but some go unused |

The ABU also carries assertions (run with `--assert`). They check that a
`valid` shown downstream is held until accepted, and that nothing is granted
while the ABU is blocked.

The case-study testbench shows why the second step of the analysis matters.
A budget is a ceiling that the ABU enforces. It becomes a guarantee only
when the memory behind the interconnect can serve the sum of the budgets
within one period.

## What is this design's own, and what is open

The mechanism follows the published description of the ABU: a budget
consumed per transaction and refilled to its maximum every P cycles,
valid/ready decoupling once it is spent, up to eight base/size segments with
blocking and an interrupt, no added latency, and four units in the evaluated
system. The following were left open there and are choices made here:

* **What a transaction is:** one AR or AW handshake, up to two per cycle,
  not one per data beat.
* **The AXI hold rule:** open requests are kept and budget is reserved for
  them. A read and a write competing for the last unit alternate.
* **Gating on W:** W is gated by granted write bursts; R and B are not gated.
* **The address check:** it covers the whole burst footprint, with the
  `size = 0` disable, and the block is sticky until `irq_clear`.
* **Interfaces and encodings:** configuration as ports, the status record,
  synchronous reset, and the AXI and counter widths.

Not included: the register interface through which software writes the
configuration, the interconnect, the PS port and the accelerators
(behavioural models of the last three are in `tb/` for testing only). The
schedulability check that the memory can serve all budgets within one period
is analysis done offline, not hardware.

The original implementation was measured at about 2000 LUTs and 2000
flip-flops for four ABUs on a Zynq-7020. That figure includes its
configuration interface, so it is not directly comparable with this RTL.

## Changing it

* **Number of tasks:** `abu_system #(.N_ABU(n))`.
* **Number of segments, counter widths, AXI widths:** `N_SEG`, `CNT_W`,
  `ADDR_W`, `DATA_W` and `ID_W` in `abu_pkg`. The configuration and status
  structs follow them.
* **Counting bytes or beats instead of requests:** change `consume` in
  `rtl/abu.sv` (and its width) and the grant test against `avail`.
* **Releasing the block only on task reset:** change the `irq_clear` branch
  in `rtl/abu.sv`.
