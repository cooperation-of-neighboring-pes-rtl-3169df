# Neighbour-cooperating clustered integer back end

A clustered out-of-order processor splits its register file and execution
units into small processing elements (PEs) so that no wire has to cross the
whole core in one cycle. The price is communication: when an instruction runs
in a different PE from the instruction that produces its operand, the value
has to travel, and that costs cycles. Steering every dependent instruction to
its producer's PE avoids the travel but piles work onto a few PEs.

This design lets each PE cooperate with its right-hand neighbour on a ring of
eight PEs:

* **Adjacent forwarding.** Each PE's result buses feed not only its own
  operand bypass but also the bypass of the PE to its right. A consumer in
  the right neighbour therefore runs in the cycle right after its producer,
  exactly as if it were local. Consumers in any other PE wait two extra cycles.
* **Fanout-aware steering (`adjacent_rFO_freereg`).** When several
  instructions wait for the same value, the 2nd and the 4th reader are placed
  in the producer's right neighbour, and the others in the producer's PE. The
  readers of one value thus run in parallel on two PEs with no transfer delay.
  When the chosen PE has no free physical register, the instruction moves one
  PE to the right, where the forwarding path still reaches it.

The RTL is the integer back end: steering and renaming, a shared issue queue,
eight PEs with their register files, the register-read network and a
reorder buffer. Decoded instructions come in, and architectural state can be
read out. It does not include a front end, caches, memory instructions or
floating point.

## Instruction flow

```
in_uop[0..7] ──► dispatch_unit ──► issue_queue (64, shared) ──► pe[0..7]
   (decoded)     steer + rename        wake-up / select            REG ─ operand_xbar ─ reg_file[*]
                      │                 1 per PE per cycle          EX  ─ adj_bypass ─ alu / mul_pipe
                      ▼                                                  │
                     rob (256) ◄───────── completion ◄──── res_alu / res_mul ──► right neighbour's bypass
                      │
                      └─► retired: previous register back to its PE's free_list
```

| cycle | stage    | what happens |
|-------|----------|--------------|
| D     | dispatch | A group of up to 8 instructions is steered, renamed and written into the issue queue and ROB. The group is accepted whole or not at all. |
| D+1   | issue    | The earliest cycle an instruction can be selected. Each PE takes at most one instruction per cycle. |
| +1    | REG      | The PE reads both operands through the crossbar from whichever PE's register file holds them. |
| +1    | EX       | Bypass, then the ALU (1 cycle) or the multiplier (`MUL_LAT` = 7 cycles). At the end of the last EX cycle the result is written into the PE's own register file and into its result register. |
| +1    | result   | The result register drives the local bypass, the right neighbour's bypass and the ROB completion port. |

## Where a value can come from, and what it costs

This is the core of the design. All delays are enforced by the issue queue
(`issue_queue.sv`). The data paths are built so that a value is always
available at the moment the queue allows its consumer to go.

| operand situation                                   | consumer executes             | data path |
|-----------------------------------------------------|-------------------------------|-----------|
| produced in the same PE, consumer was waiting       | cycle after producer's last EX | local bypass |
| produced in the **left** neighbour, consumer waiting | cycle after producer's last EX | adjacent forwarding bypass |
| produced in any other PE, consumer waiting           | 2 cycles later (`REMOTE_FWD_DELAY`) | register file, via crossbar |
| already in the own PE's register file                | normal                        | register file |
| already in another PE's register file (the left neighbour included) | 1 cycle later (`REMOTE_READ_DELAY`) | crossbar |

Wake-up works as follows. An ALU instruction broadcasts its destination name
in the cycle it is selected, and a multiply broadcasts `MUL_LAT-1` cycles
later. A waiting source that sees the name becomes eligible after 0 or
`REMOTE_FWD_DELAY` cycles, depending on the producer's PE. A source that is
already ready at dispatch becomes eligible after 0 or `REMOTE_READ_DELAY`
cycles. The remote read cost is thus charged as a select delay, not as a
longer REG stage. For the instruction itself the timing is the same. An entry
written in the same cycle as a matching broadcast is woken like a waiting one.

Adjacent forwarding only helps with values that are just being produced. A
value already sitting in the left neighbour's register file still costs the
remote-read cycle. A variant that adds a read port so the right neighbour can
read that file directly is not built: it gains little over forwarding alone
and needs the extra ports.

## Steering and renaming (`dispatch_unit`, `steer_logic`)

The PE must be chosen before renaming, because a destination register comes
from the chosen PE's own free list. The slots of a group are handled in
program order in one cycle. Each slot sees the DCOUNTs, free counts and
mappings as the earlier slots left them.

Operand status decides the rule. "Unready" means the value has not been
produced yet.

| in1 \ in2 | none       | unready  | ready      |
|-----------|------------|----------|------------|
| none      | Min_dcount | rFO(in2) | Min_dcount |
| unready   | rFO(in1)   | rFO(in1) | rFO(in1)   |
| ready     | Min_dcount | rFO(in2) | Min_dcount |

* **rFO(X).** X's register instance has a fanout counter: the number of
  instructions that have named it since it was allocated. It is kept per
  physical register, 3 bits, saturating. Readers earlier in the same group
  are added on top. An instruction that names the register twice counts
  once. If this instruction is reader number 2 or 4, it goes to the right
  neighbour of X's producer PE. Otherwise it goes to the producer PE.
* **Min_dcount.** The rule picks the PE with the smallest DCOUNT. DCOUNT is
  `NPE × (instructions dispatched to the PE) − (all instructions dispatched)`.
  It is kept directly: a dispatch to PE p adds `NPE−1` to p and subtracts 1
  from every other PE. The counters are 16 bits and saturate. On a tie the
  lowest-numbered PE wins.
* **Free registers.** Suppose the instruction writes a register and the
  chosen PE has none free. The instruction then moves to the next PE to the
  right, and further right if that one is also full. If no PE has a free
  register, the whole group waits.

Example: B, C, D and E all read the unready result of A, which is in PE 3.
B goes to PE 3, C to PE 4, D to PE 3 and E to PE 4. B and C (and D and E)
issue in the same cycle, and both get A's result without delay.

Readiness comes from a scoreboard with one bit per physical register. The
bit is set by the wake-up broadcast and cleared when the register is
allocated.

## Registers

The register files are *non-consistent*: a value exists only in the PE that
produced it. Each PE has `NREG` = 40 registers. The 32 architectural
registers start out spread evenly over the PEs. Register r is held by PE
`r/4` at index `r%4`, and the other 36 registers of each PE start in that
PE's free list. A register is reclaimed when the next writer of the same
architectural register retires from the ROB. It then goes back to the free
list of the PE that owns it, whichever PE the retiring instruction ran on.
The ROB also keeps the committed map, which the debug port uses.

A physical register name is `{pe[2:0], idx[5:0]}` (`ptag_t`). The widths
allow up to 8 PEs and up to 64 registers per PE.

## Files

| file | contents |
|------|----------|
| `rtl/cpe_pkg.sv` | types (`uop_t`, `iq_entry_t`, `ptag_t`, `result_t`, `perf_ev_t`), ring helpers |
| `rtl/cluster_core.sv` | top: wires everything, left-neighbour connection of the PEs |
| `rtl/dispatch_unit.sv` | map table, scoreboard, fanout counters, DCOUNT, group chain |
| `rtl/steer_logic.sv` | the steering decision for one instruction |
| `rtl/free_list.sv` | free registers of one PE (multi-pop, multi-push FIFO) |
| `rtl/issue_queue.sv` | shared queue, wake-up delays, per-PE select |
| `rtl/pe.sv` | REG/EX pipeline of one PE |
| `rtl/adj_bypass.sv` | local and adjacent operand bypass |
| `rtl/alu.sv`, `rtl/mul_pipe.sv` | functional units |
| `rtl/reg_file.sv` | register file of one PE |
| `rtl/operand_xbar.sv` | fully connected register-read network |
| `rtl/rob.sv` | reorder buffer, register release, committed map |

## Interface of `cluster_core`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `in_valid[7:0]`, `in_uop[8]` | in | decoded group; slot 0 is the oldest |
| `in_ready` | out | the group is taken at this edge. It depends combinationally on `in_valid`. |
| `commit_count` | out | instructions retired this cycle |
| `idle` | out | nothing in flight |
| `dbg_areg` / `dbg_data` | in / out | committed value of an architectural register (combinational) |
| `ev` | out | per-cycle counts: steering rule used, wake-up kind, forwarding path, stall reasons |

`uop_t` holds an operation (`ADD SUB AND OR XOR SLL SRL SRA CMPLT CMPULT MUL`)
and two source register numbers with valid bits. It also holds a 16-bit
immediate that replaces the second source when `use_imm` is set, and an
optional destination. Words are 64 bits.

## Parameters (`cluster_core`)

| parameter | default | notes |
|-----------|---------|-------|
| `NPE` | 8 | PEs on the ring (at most 8) |
| `NREG` | 40 | registers per PE (at most 64). The design is meant to work with 16 or more. |
| `IQ_SIZE` | 64 | shared issue queue |
| `ROB_SIZE` | 256 | |
| `DISPATCH_W` | 8 | instructions steered and renamed per cycle |
| `COMMIT_W` | 8 | own choice |
| `MUL_LAT` | 7 | multiplier latency (Alpha 21264 value), at least 2 |
| `REMOTE_FWD_DELAY` | 2 | extra cycles for a fresh value from a non-adjacent PE |
| `REMOTE_READ_DELAY` | 1 | extra cycle to read another PE's register file |

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Compile the package first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpe_pkg.sv tb/tb_cluster_core.sv \
          --top-module tb_cluster_core -Mdir obj_top
./obj_top/Vtb_cluster_core
```

Replace the testbench name to run another one. The end-to-end tests take well
under a second.

* `tb_cluster_core`: the full-size core with default parameters. A reference
  model executes the same program in order, and all 32 registers are compared
  after each phase. It also checks cycle counts. A serial chain issues one
  instruction per cycle. The first and second readers of a fresh value issue
  together, one cycle after the producer. A reader that needs a value from a
  non-adjacent PE issues 3 cycles after its producer. There are random ALU and
  multiply phases and a stress phase in which the queue and the ROB fill up
  and registers run out. Every event kind must occur, except "no free register
  anywhere". That stall cannot happen at this size, because 8 × 36 free
  registers exceed the 256 ROB entries.
* `tb_cluster_core_r16`: the same test with 16 registers per PE. There the
  no-free-register stall does occur.
* Unit tests: `tb_steer_logic` (table, fanout example, reallocation, random
  inputs against a model), `tb_dispatch_unit` (worked steering/renaming
  example across groups, stalls), `tb_issue_queue` (all wake-up delays,
  multiply wake-up, one issue per PE), `tb_pe`, `tb_adj_bypass`, `tb_rob`,
  `tb_free_list`, `tb_reg_file`, `tb_operand_xbar`, `tb_alu`, `tb_mul_pipe`.

## Design choices and limits

* **Not included.** The front end (fetch, decode, branch prediction), the
  caches, the load/store queues and the floating-point PE are not included.
  There are no branches or exceptions, so there is no recovery logic.
  Performance on real programs cannot be measured with this RTL alone.
* **Select order.** The issue queue picks the lowest-numbered ready entry for
  each PE, not the oldest.
* **Register-read network.** It is fully connected and never blocks: every
  register file has one read port per requester (17). Its latency is
  modelled only through the issue-queue delays.
* **Write ports.** Each register file has two write ports, one for the ALU
  and one for the multiplier, so write-back never conflicts.
* **Steering in corner cases.** A value whose wake-up is broadcast in the
  very cycle of dispatch is still steered as unready. The fanout counters
  saturate at 7. When the right neighbour is also full, reallocation keeps
  searching to the right.
* **Dispatch.** A group is accepted whole or not at all. This keeps the
  control simple but can waste dispatch slots when the queue is nearly full.
* **Size and timing.** The dispatch unit evaluates all 8 slots in sequence
  within one cycle. It is functionally exact but combinationally deep. A
  timing-driven implementation would pipeline or approximate it.
