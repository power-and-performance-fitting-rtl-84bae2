# Criticality-steered execution and Contrail verification scheduling

Most instructions in a program do not sit on the critical path of its data
flow graph. They can take longer to execute without making the program
any slower. This RTL uses that fact in two ways to save energy:

1. **Criticality-based scheduling.** A small predictor guesses, per
   instruction address, whether an instruction is critical. Critical
   instructions go to *fast* integer units running at full supply voltage.
   All other instructions go to *slow* units, which run at half the voltage
   and half the clock rate. Dynamic power goes as f·C·V², so a slow unit
   uses about 1/8 of a fast unit's power (1/4 × 1.15 when it is pipelined,
   which costs extra latches).
2. **Contrail.** A value predictor lets a fast *speculation stream* skip
   whole regions of the program. Each skipped region becomes a
   *verification thread*, which re-executes it on a slow *verification
   pipeline* and checks the prediction. The verification threads trail
   behind the speculation stream, like a contrail behind a jet. This RTL
   holds the scheduler that queues those threads, starts them, retires
   them and squashes the speculation stream when a prediction was wrong.

The two mechanisms are independent. `power_fit_top` holds one of each,
side by side, with separate ports: `ex_*` for the execution cluster and
`ct_*` for the Contrail scheduler.

## Block map

```
power_fit_top
├── crit_exec_cluster          (ex_* ports)
│   ├── cpp_buffer             PC-indexed table of saturating counters
│   ├── crit_dispatch          steering: critical→fast, non-critical→slow
│   ├── fast_fu  ×3            1-cycle integer unit
│   └── slow_fu  ×3            2-cycle integer unit, pipelined or not
└── contrail_vscheduler        (ct_* ports)
    └── sync_fifo              queue of threads waiting for a context
```

Shared types are in `fu_pkg` (operations, request/result records, dispatch
classes) and `contrail_pkg` (the verification-thread descriptor).

## Predicting criticality: `cpp_buffer`

The critical path prediction (CPP) buffer is a direct-mapped table with one
6-bit saturating up/down counter per entry. By default it has 4096 entries.

* **Lookup.** The PC of each issuing instruction selects an entry through
  PC bits `[2 +: 12]`, i.e. word address modulo the table size. The
  instruction is predicted critical when its counter is **greater than 8**.
  There are 8 lookup ports, one per issue slot. They are combinational, so
  the prediction arrives in the same cycle as the PC.
* **Training.** The commit stage reports each instruction as critical or not
  critical. Critical adds 8 and not critical subtracts 1, saturating at 63
  and at 0. There are 8 update ports. If several ports hit the same entry in
  one cycle, each step is applied in port order and each one saturates.
* **Hysteresis.** The counter rises fast and falls slowly. One critical
  event brings a fresh counter to exactly 8, which is still not critical.
  A second one gives 16, which is critical, and that entry then stays
  critical through 8 non-critical events.
* **After reset** the table clears itself one entry per cycle. This takes
  4096 cycles, with `init_busy` high. Meanwhile every lookup predicts "not
  critical" and updates are dropped. No one-cycle reset of all entries is
  used, so the table can be a plain RAM.

The rule that decides whether an instruction *was* critical sits outside the
RTL. It is Tune et al.'s QOLD heuristic, which uses the age of an
instruction in the issue queue. Its one-bit result enters through
`upd_crit`.

## Steering: `crit_dispatch` and the four dispatch classes

Each cycle up to 8 ready instructions are offered, slot 0 oldest. Slots are
handled oldest first:

| prediction   | preferred unit | if none of that kind is free | class         |
|--------------|----------------|------------------------------|---------------|
| critical     | fast           | slow                         | CF, else CS   |
| non-critical | slow           | fast                         | NS, else NF   |

A slot gets the lowest-numbered free unit of the chosen kind. A slot finds
no unit when all 6 units are taken or busy. It is then not granted and must
be offered again next cycle. The class (`disp_class_e`) says what happened:

* NS (non-critical on slow) is the case that saves power.
* CS (critical on slow) costs performance.
* NF (non-critical on fast) wastes power.

Falling back to the other kind of unit keeps issue bandwidth up. It is
also why CS and NF occur at all.

## Fast and slow units: `fast_fu`, `slow_fu`

Both run the same integer operations: add, sub, and, or, xor, sll, srl,
sra, slt, sltu and compare-equal, on 32-bit operands. Each result returns
with a 6-bit tag. Timing, counted from the cycle `c` in which an operation
is presented and accepted:

| unit                         | result on `res` | accepts a new operation |
|------------------------------|-----------------|-------------------------|
| `fast_fu`                    | cycle c+1       | every cycle             |
| `slow_fu`, `PIPELINED=1`     | cycle c+2       | every cycle             |
| `slow_fu`, `PIPELINED=0`     | cycle c+2       | every other cycle (`in_ready` low in c+1) |

The slow unit's half-rate clock appears here only as a two-cycle latency on
the core clock. Supply voltage and clock generation are physical matters
and are not in the RTL.

## The execution cluster: `crit_exec_cluster`

This block wires the pieces together for one cycle of issue:

1. look up `iss_pc[i]` to get `iss_pred_crit[i]`;
2. steer, giving `iss_grant[i]` and `iss_class[i]`;
3. send each granted slot's operation to its unit.

Results come back on `fast_res[0..2]` and `slow_res[0..2]`. Training enters
on `upd_valid/upd_pc/upd_crit`. The defaults form the main configuration:
3 fast + 3 slow units, 8-wide issue and commit, 4K entries, pipelined slow
units. Set `PIPELINED=0` for the non-pipelined variant. The unit counts
must be at least 1 each.

The rest of an out-of-order core is outside the cluster: instruction
window, wakeup, register file, FP, load/store, multiply and divide units.
The cluster expects a core that re-offers slots that were not granted and
catches results by tag.

## Contrail verification scheduling: `contrail_vscheduler`

This is the part with the most state. A thread descriptor (`vthread_t`)
holds:

* a 3-bit sequence number, giving program order among outstanding threads;
* the region's start PC;
* the PC at which the speculation stream resumed after the region.

Life of a thread:

1. **Spawn.** The speculation stream raises `spawn_valid` with the two PCs.
   If `spawn_ready`, the thread gets number `spawn_seq` and enters the FIFO.
   `spawn_ready` is low in three cases: the FIFO is full (4 deep), all 8
   sequence numbers are outstanding, or a squash is happening this cycle.
2. **Start.** When a verification context is idle, the oldest queued thread
   starts on the lowest-numbered idle context. This takes one start per
   cycle, at the earliest the cycle after spawn. The start is signalled by
   a one-cycle `ctx_start[c]` pulse, and `ctx_thread[c]` holds the
   descriptor while `ctx_busy[c]` is high.
3. **Verify.** The context raises `ctx_done[c]`, and also `ctx_mispredict[c]`
   if the predicted values were wrong.
4. **Squash.** This happens in the same cycle as a mispredicting done. If
   several contexts report a misprediction, the oldest thread wins.
   `squash_valid`, `squash_seq`, `squash_resume_pc` and `squash_ctx` tell
   the speculation stream where to restart: at that region's resume PC,
   with the state the verification context `squash_ctx` computed. Every
   younger thread is discarded. Queued ones are flushed from the FIFO and
   running ones are aborted (`ctx_abort[c]`). Numbering continues right
   after the squashed thread.
5. **Retire.** Verified threads retire in program order, one per cycle
   (`retire_valid`, `retire_seq`). This includes a thread that found a
   misprediction, because its state is the correct one.
6. **Idle.** `all_verified` is high when nothing is outstanding. A
   speculation stream that has finished waits for this.

`N_VCTX=2` is the three-context machine: one speculation context and two
verification contexts, so consecutive regions verify in parallel.
`N_VCTX=1` is the two-context machine. There, threads wait in the FIFO for
the single verification context, and the verification stream stretches out
behind the speculation stream.

Two assertions guard the context handshake. A `ctx_done` on an idle context
is an error, and so is an overflow of the outstanding-thread count.

## Where this RTL departs from, or adds to, the scheme

* **Threshold.** "Exceeds the threshold" is read strictly (> 8). With ≥ 8, a
  single critical event would already make an instruction critical.
* **Fallback steering** (CS and NF) is inferred from the existence of those
  classes. The oldest-first, lowest-unit-first order is a choice of this
  design.
* **Indexing.** The hash is plain bit selection. Port counts equal the issue
  and commit widths. Lookups are combinational.
* **Initialisation.** The clearing walk after reset is a choice of this
  design.
* **Contrail choices.** Discarding younger threads on a squash, in-order
  retirement, the FIFO depth of 4, 3-bit sequence numbers and one start per
  cycle are all choices of this design.
* **No shared wiring.** The execution cluster and the Contrail scheduler
  share no signals. Nothing in the scheme fixes how a verification pipeline
  would use the slow units.
* **Not in the RTL:**
  * the out-of-order core and its caches and predictors;
  * the criticality detector;
  * the trace-level value predictor;
  * the speculation and verification pipelines;
  * the dual supplies and clocks.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With verilator 5, a testbench is built and
run like this (for example the full design at default size):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fu_pkg.sv rtl/contrail_pkg.sv tb/alu_ref_pkg.sv \
    tb/power_fit_top_tb.sv --top-module power_fit_top_tb -o sim
./obj_dir/sim
```

| testbench                 | what it covers |
|---------------------------|----------------|
| `fast_fu_tb`              | random operations against a separate ALU model; 1-cycle latency |
| `slow_fu_tb`              | both variants; 2-cycle latency; the non-pipelined variant's half throughput |
| `cpp_buffer_tb`           | full-size table: clearing time, +8/−1, saturation, threshold, same-entry multi-port updates, aliasing PCs |
| `crit_dispatch_tb`        | random request/ready patterns against a queue model; all four classes and stalls |
| `crit_exec_cluster_tb`    | non-pipelined units, 256 entries: predictions, classes, values and latencies of a random stream |
| `contrail_vscheduler_tb`  | 3- and 2-context machines against a program-order model with random verification times and mispredictions |
| `power_fit_top_tb`        | whole design at default parameters, both halves at once |
| `unit_mix_tb`             | 1 fast/5 slow, 2 fast/4 slow and 3 fast/3 slow, each with pipelined and non-pipelined slow units, fully checked; prints the share of each dispatch class |
| `dataflow_example_tb`     | a 10-instruction loop body whose critical chain is known: after two iterations of training the 6 chain instructions run on fast units and the 4 with slack on slow units |

`cluster_stream_driver` and `contrail_stream_driver` are the reusable
stimulus-and-check modules. The first draws PCs from 48 static instructions
whose criticality is fixed (always, half the time, never). That pool stands
in for the criticality detector.

Each stream driver counts how often each mechanism occurred and fails if
one never did. For the cluster these are the four classes, stalls, critical
predictions, the clearing walk and busy non-pipelined units. For the
scheduler they are queueing, back-pressure, squash, abort, flush,
retirement and idle.

The default-size end-to-end test finishes in well under a second.

On the random stream of `unit_mix_tb`, fewer fast units move critical
instructions onto slow units: CS rises from about 12% of dispatches with 3
fast units to about 40% with 1. Non-pipelined slow units push more
non-critical work onto fast units: NF rises from about 5% to about 14% with
3 fast units. Both trends are what the scheme predicts. The numbers describe
this synthetic stream, not real programs.
