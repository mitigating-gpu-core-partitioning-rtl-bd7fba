# Partitioned GPU SM with bank-aware issue and hashed warp placement

Recent GPUs split each streaming multiprocessor (SM) into four sub-cores. Each
sub-core has its own warp scheduler, its own small register file and its own
execution units. A warp is bound to one sub-core for its whole life, and two
problems follow from that:

* **Issue imbalance.** Warps are handed to the sub-cores in strict round-robin
  order, so warp `w` always lands on sub-core `w mod 4`. Suppose a kernel has
  one long-running warp in every four. Then all of its long warps share one
  sub-core while the other three sit idle. On real hardware this costs almost
  4x.
* **Register bank conflicts.** A sub-core has only two register banks and two
  operand collector units. Two operands in the same bank must be read one
  after the other, and a blocked collector unit stops further issue.

This RTL models one SM with two fixes:

1. **Hashed sub-core assignment.** A tiny programmable table decides which
   sub-core each new warp goes to. At reset the table holds a *skewed round
   robin* (SRR) pattern, `subcore = (W + floor(W/4)) mod 4`, where `W` counts
   the warps placed so far. The pattern moves by one sub-core every four
   warps, so "one long warp in four" is spread evenly.
2. **Register-bank-aware (RBA) issue.** The warp scheduler tracks how busy
   each register bank is. It prefers the ready warp whose operands sit in the
   least-loaded banks, and breaks ties in favour of the oldest warp.

Everything is SystemVerilog-2017 and synthesizable. The testbenches are
self-checking.

## Structure

```
                 launch (thread block)            tb_done
                        |                            ^
             +----------v----------------------------+---------+
             | sm_interconnect_arbiter                         |
             |  one warp load per cycle, warp-id allocation,   |
             |  running-warp count per block, block retirement |
             +----+-------------------------------^------------+
         advance  |  subcore  <- subcore_assigner |  warp_done (x4)
                  v  (hash table, 2-bit counter, 2 shift regs)
     +------------+------------+------------+------------+
     | subcore 0  | subcore 1  | subcore 2  | subcore 3  |
     |  warp_issue_scheduler:                            |
     |    warp_pc_table (16 entries) -> rba_scoring_logic|
     |    -> warp_selection_logic (min {score, ~age})    |
     |  operand_collector:                               |
     |    2 x collector_unit -> 2 x bank_arbiter         |
     |    -> 2 x rf_bank (32 KB) -> operand_crossbar     |
     |    -> cu_dispatch (round robin) -> ex port        |
     +---------------------------------------------------+
```

The model stops at the edges of the SM core. Instruction fetch and decode,
the execution units, shared memory and the thread-block scheduler are not
included. They connect through ports, and the top-level testbench drives
those ports with behavioural models.

## Hashed sub-core assignment (`subcore_assigner`)

Parts:

* `hash_function_table`: four 1-byte entries, read through a 4:1
  multiplexer.
* `assign_counter`: a 2-bit counter that picks the table entry.
* Two `warp_shift_register`s of 4 bits each.

Each entry describes a group of four consecutive warps:

* bits `[7:4]` drive select line 0 (the low bit of the sub-core number);
* bits `[3:0]` drive select line 1 (the high bit);
* within each nibble, bit `j` belongs to warp `j` of the group;
* the sub-core number is `{SEL1, SEL0}`.

Timing:

* For the first warp of a group, both nibbles are loaded and bit 0 is used
  straight away.
* Each later warp of the group shifts both registers right by one bit.
* The counter advances after every fourth warp.
* After 16 warps the table wraps around. Warp 17 reuses entry 0.
* Assignment is combinational from the registered state. It costs no cycle:
  `subcore` is valid in the same cycle as `advance`.

Reset contents (the SRR pattern) and other useful settings:

| entry | SRR (reset) | plain round robin | meaning of SRR entry |
|-------|-------------|-------------------|----------------------|
| 0     | `8'hAC`     | `8'hAC`           | warps 0-3 -> sub-cores 0,1,2,3 |
| 1     | `8'h56`     | `8'hAC`           | warps 4-7 -> 1,2,3,0 |
| 2     | `8'hA3`     | `8'hAC`           | warps 8-11 -> 2,3,0,1 |
| 3     | `8'h59`     | `8'hAC`           | warps 12-15 -> 3,0,1,2 |

The table can be rewritten at run time through `hash_wr_en`, `hash_wr_idx`
and `hash_wr_data`. Examples:

* `8'hAC` in every entry gives the classic round robin.
* A random permutation of the four sub-cores in each entry gives the
  "random shuffle" policy. Each group of four warps still covers every
  sub-core once, so sub-core warp counts never differ by more than one.

The warp count `W` is not reset between thread blocks. It restarts only when
the SM is reset.

## RBA warp issue (`warp_issue_scheduler`)

Each sub-core has a 16-entry, fully associative warp PC table
(`warp_pc_table`). An entry holds:

* valid bit, warp id and thread-block slot;
* the 5-bit RBA score;
* the decoded next instruction, or a fetch-pending flag;
* PC, age and a done flag.

Every cycle:

1. **Queue lengths.** The operand collector reports one queue length per
   bank. This is the number of collector-unit operand ports that hold a
   valid read request for that bank, including the one being granted this
   cycle (0-6 with two CUs).
2. **Scoring.** `rba_scoring_logic` adds up, for each valid source operand,
   the queue length of that operand's bank, and saturates the sum at 31.
   Example: two operands in bank 0 and one in bank 1 give
   `score = 2*q0 + q1`. Register `r` lives in bank `r mod 2`.
3. **Storage.** The scores are written into the table. The selection
   therefore sees scores that are one cycle old. The parameter `SCORE_LAT`
   (default 0) adds that many more cycles of delay on the queue lengths, to
   study stale scores.
4. **Selection.** `warp_selection_logic` is a binary comparator tree. Among
   the candidates it picks the smallest key `{score, ~age}`: lowest score
   first, oldest warp on equal scores, lower table index if the whole key is
   equal. Age counts cycles since the warp was loaded and saturates at 255.
5. **Issue.** At most one instruction issues per cycle.
   * A normal instruction is a candidate only while a collector unit is
     free.
   * An `EXIT` (opcode `8'hFF`) needs no collector unit. It is a candidate
     once none of the warp's earlier instructions is still waiting in a
     collector unit. It marks the warp done and reports it to the arbiter.

After issue the PC advances by 16 bytes and the next instruction is
requested on the fetch port. A fetch is answered on the fill port. There is
no scoreboard: a warp counts as ready whenever its next instruction has been
decoded. Data dependencies are left to the front end.

## Operand collector (`operand_collector`)

* **Collector units.** There are two per sub-core. The lowest free one takes
  the issued instruction. Each has three operand slots. Every slot holds
  valid, ready and granted bits, a register id and 32 x 32-bit data.
* **Arbitration.** Each bank has a `bank_arbiter` with one ready/valid port
  per collector-unit operand slot (6 ports). It grants one request per cycle
  in round-robin order.
* **Banks.** Each bank (`rf_bank`) is a 256 x 1024-bit 1R1W array with a
  registered read, which makes 32 KB per bank and 64 KB per sub-core.
* **Return path.** Read data comes back one cycle after the grant.
  `operand_crossbar` steers it to the requesting operand slot using the tag
  registered with the read.
* **Dispatch.** `cu_dispatch` picks among the units whose operands are all
  present, in round-robin order. It hands the instruction and its operands
  to the execution-unit port (`ex_valid`/`ex_ready`). The unit is freed when
  the handshake completes.
* **Register windows.** Each warp-table slot owns a fixed 32-register window:
  `row = slot*16 + (r mod 32)/2` in bank `r mod 2`. Write-back from the
  execution units uses the separate write port (`wb_*`).

Latency from issue to `ex_valid`:

| case | cycles |
|------|--------|
| operands spread over both banks, no contention | 3 |
| two of three operands in one bank | 4 |
| each further request queued ahead in the bank | +1 |

`slot_busy` flags, for each table slot, whether an instruction of that warp
is still in a collector unit. The scheduler uses it to hold back `EXIT`.

## Thread-block life cycle (`sm_interconnect_arbiter`)

1. **Launch.** A thread block arrives on `launch` with a slot number (0-31),
   a warp count (1-64) and a start PC. It is accepted when the previous
   block's warps have all been loaded.
2. **Warp load.** One warp is loaded per cycle. The arbiter takes the lowest
   free warp id of 64, asks the assigner for a sub-core and writes the warp
   into that sub-core's PC table. If that table is full, or no warp id is
   free, the load waits and `load_stall` is raised. Warps are never
   redirected to another sub-core.
3. **Completion.** Each slot keeps a count of running warps. Every `EXIT`
   reported by a sub-core decrements it. At zero:
   * the block is reported on `tb_done_valid`/`tb_done_tb`;
   * in the same cycle every sub-core frees the table entries of that block,
     and the arbiter frees its warp ids.
   Resources are therefore released per block, never per warp. If several
   blocks finish together, the lowest slot is reported first.

## Top level (`sm_top`)

| ports | direction | purpose |
|-------|-----------|---------|
| `launch_valid`, `launch`, `launch_ready` | in/out | thread block from the block scheduler |
| `tb_done_valid`, `tb_done_tb` | out | block finished, resources freed |
| `load_stall` | out | a warp load is waiting for room |
| `hash_wr_en`, `hash_wr_idx`, `hash_wr_data` | in | program the assignment table |
| `fetch_*[4]` (valid/slot/pc/wid/ready) | out/in | instruction request per sub-core |
| `fill_*[4]` (valid/slot/insn) | in | decoded instruction returned |
| `ex_valid[4]`, `ex[4]`, `ex_ready[4]` | out/in | instruction plus 3 x 1024-bit operands to the execution units |
| `wb_*[4]` (valid/slot/reg/data) | in | register write-back |

Clocking and reset:

* one clock, `clk`;
* synchronous active-low reset, `rst_n`;
* register-file contents are not reset.

Shared types and sizes are in `sc_pkg`: `insn_t`, `issue_t`, `dispatch_t`,
`tb_launch_t`, and `bank_of()`/`row_of()` for register placement. A decoded
instruction has:

* an 8-bit opcode (`8'hFF` = exit);
* an 8-bit destination register;
* three source register ids, each with a valid bit.

## Parameters

| name | default | where | notes |
|------|---------|-------|-------|
| `NUM_SUBCORES` | 4 | `sc_pkg` | sub-cores per SM |
| `MAX_WARPS_SM` | 64 | `sc_pkg` | warp ids per SM |
| `TABLE_ENTRIES` | 16 | `sc_pkg` | warp PC table entries per sub-core |
| `NUM_BANKS`, `RF_BYTES` | 2, 64 KB | `sc_pkg` | register file per sub-core |
| `NUM_CUS` / `NCU` | 2 | `sc_pkg`, `sm_top` | collector units per sub-core (above `NUM_CUS` the reported queue lengths saturate at 7) |
| `SCORE_W` | 5 | `sc_pkg` | RBA score width |
| `SCORE_LAT` | 0 | `sm_top` | extra cycles of score-update delay |
| `TB_SLOTS` | 32 | `sc_pkg` | thread-block slots (own choice) |
| `AGE_W` | 8 | `sc_pkg` | warp age counter (own choice) |

The sub-core count, 64 warps, 16-entry tables, two banks, 64 KB, two CUs,
the 5-bit score, the 4 x 1-byte hash table, the 2-bit counter and the 4-bit
shift registers all come from the architecture being modelled. This design
chose the rest:

* register width and instruction format;
* bank mapping and register windows;
* arbitration order and SRAM latency;
* thread-block slots and the EXIT handling.

## Results

`tb_sm_top` runs the FMA microbenchmark at its real size. Each thread block
has 32 warps. Every fourth warp runs 4096 fused multiply-adds, and the other
warps exit at once. Two blocks are resident.

| assignment | cycles |
|------------|--------|
| round robin (all compute warps on sub-core 0) | 165 911 |
| skewed round robin (reset table) | 43 031 |
| random shuffle | 122 903 |
| round robin, compute warps 0-7 (balanced layout) | 43 023 |

Round robin takes 3.86x as long as SRR. For comparison, A100 silicon has
been reported at 3.9x on the same kernel. SRR matches the naturally
balanced layout.

In the same run:

* about 262 000 bank-conflict cycles;
* 716 RBA reorderings (a younger warp issued ahead of an older one because
  of its score);
* load stalls, all-CUs-busy cycles and execution-unit back-pressure all
  occurred.

`tb_sm_top_imbalance` sweeps the work of the compute warps. Speedup is
RR cycles divided by SRR (or shuffle) cycles:

| FMAs per compute warp | RR cycles | SRR cycles | SRR speedup | shuffle speedup |
|-----------------------|-----------|------------|-------------|-----------------|
| 10                    | 428       | 132        | 3.24        | 1.30            |
| 100                   | 4 073     | 1 073      | 3.80        | 2.02            |
| 1 000                 | 40 523    | 10 523     | 3.85        | 1.35            |
| 10 000                | 405 023   | 105 023    | 3.86        | 2.02            |

The shuffle results depend on which permutations were drawn. In a full GPU,
launch, memory and barrier overheads hide the imbalance of short kernels, so
the gain there grows from about 1x at 10 instructions. Those overheads are
outside this model, so its speedup is near the 4x limit from the start.

With `SCORE_LAT = 20` (`tb_sm_top_score_lat`), the scheduler sees queue
lengths that are 21 cycles old. All the same checks pass. The SRR run takes
41 499 cycles and round robin 164 774. On this kernel, stale scores cost
nothing: the small differences come from a different issue order.

## Simulating

Each block has its own testbench in `tb/` named `tb_<module>`. All of them
print `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/sc_pkg.sv \
          $(ls rtl/*.sv | grep -v sc_pkg.sv) \
          tb/tb_sm_top.sv --top-module tb_sm_top -Mdir obj_sm_top
./obj_sm_top/Vtb_sm_top
```

The package `rtl/sc_pkg.sv` must be compiled first and only once. For a
block testbench, swap `tb_sm_top` for its name.

What the testbenches cover:

* **`tb_sm_top`** runs at the default parameters, with no overrides.
  * First, a mixed workload. Blocks of 32, 32 and 40 warps force a load
    stall. Every dispatched instruction is checked for program order and
    operand data.
  * Then the FMA runs above.
  * It finishes in about two seconds of simulation.
* **`tb_sm_top_score_lat`** runs the same sequence with `SCORE_LAT = 20`.
* **`tb_sm_top_imbalance`** runs the FMA sweep over 10 to 10 000
  instructions per compute warp.
* **`tb_subcore_assigner`** checks the SRR sequence for 64 warps against the
  formula, round robin with `8'hAC`, and the balance of the shuffle policy.
* **`tb_warp_issue_scheduler`** checks:
  * score-driven reordering;
  * oldest-first tie breaking;
  * the EXIT hold;
  * a `SCORE_LAT=4` instance.
* **`tb_operand_collector`** checks the 3- and 4-cycle latencies and the
  queue lengths, and runs a randomized stress of over a thousand dispatches.

## Departures and limits

* **Scope.** Only the SM core is modelled, as a single SM. The thread-block
  scheduler, the interconnect, shared memory, L1, constant memory, fetch and
  decode, and the execution units are all outside. A block's shared-memory
  and constant-memory allocation is not modelled.
* **Register file.** Each warp slot gets a fixed window of 32 registers. A
  kernel that needs more registers per thread cannot run. Real hardware
  trades registers against resident warps.
* **No dependency tracking.** The scheduler issues whatever instruction the
  front end has decoded. Barriers are not modelled: an `EXIT` simply ends
  the warp.
* **Bank mapping.** A register's bank is `r mod 2`. The arbiter is
  round-robin. The register file has one read and one write port with one
  cycle of read latency. These are reasonable choices, not known hardware
  facts.
* **Bit order.** Within a hash table nibble, the bit for the first warp of
  a group is bit 0. The opposite order would work the same way with the
  table contents mirrored.
* **No greedy term.** The baseline "greedy then oldest" scheduler is not
  built. With the default key, RBA with equal scores falls back to
  oldest-first.
* **Comparator size.** The selection tree has one leaf per table entry (16).
* **Not simulated.** Configurations with more than two collector units
  compile, but only two CUs have been simulated.
