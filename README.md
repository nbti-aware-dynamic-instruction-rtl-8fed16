# NBTI-aware instruction scheduling for integer ALUs

Negative Bias Temperature Instability (NBTI) slowly raises the threshold
voltage of PMOS transistors while their gates are held low ("stress") and
partly heals it while the gates are held high ("recovery"). Over years an
ALU that is stressed more often gets slower and fails first.

A conventional out-of-order select stage makes this worse. It hands each
ready instruction to the *lowest-numbered* free ALU, so ALU0 works in almost
every busy cycle and ALU3 only when the machine is very busy. This RTL is the
integer issue slice of a superscalar core. The wakeup and select structure is
unchanged, but the way instructions are assigned to ALUs can be switched at
run time between three policies:

| policy | name | rule | effect |
|---|---|---|---|
| PS | prioritized scheduling (baseline) | the lowest-numbered free ALU first | fastest; wear falls from ALU0 to ALU(n-1) |
| PR | priority rotation | the highest priority moves to the next ALU every `CYCLE_PR` cycles (10 000) | same speed as PS; wear is spread evenly over the ALUs |
| TD | time-dependent | after an ALU is used it is held busy for `CYCLE_TD` cycles (2) | every use is followed by a forced recovery; lowest wear, lower throughput |

An ALU that gets no instruction always receives a fixed *recovery vector* on
its inputs, so an idle ALU is always recovering, never just holding stale
operands. Per-ALU counters record stress cycles and recovery cycles. They
are the numbers an ageing model, or an on-chip reliability manager, needs.

The default configuration is a 4-wide core: 4 integer ALUs, 4-wide dispatch
and a 64-entry issue window. The 2-wide variant (2 ALUs, 2-wide, 32 entries)
is the same RTL with different parameters.

## Structure

```
              disp_valid/disp_instr (DISP_W lanes)          result[NUM_ALU]
                         |                                         ^
                         v                                         |
   +---------------- issue_window (ENTRIES) ----------------+      |
   |  age-ordered circular buffer, data-capture entries     |<-----+ bcast (wakeup)
   |  tag compare on every waiting source + dispatch lanes  |      |
   +-----------+-------------------------------^------------+      |
         ready | head                 iss_mask | rd_idx            |
               v                               |                   |
   +----------------------- select_logic ------+------+            |
   | oldest-first pick, i-th oldest -> i-th highest-  |            |
   | priority free ALU, priority order from 'offset'  |            |
   +--^---------------------^-----------------+-------+            |
      | offset              | fu_busy         | grant, operands    |
 priority_rotator    td_recovery_timer <-used-+                    |
   (PR policy)         (TD policy)            v                    |
                                 alu_unit x NUM_ALU ---------------+
                     recovery_vectoring -> operand reg -> int_alu (ks_adder)
                                              |
                                              v active
                                        stress_monitor
```

| file | role |
|---|---|
| `rtl/nbti_pkg.sv` | policy and ALU-operation enums; instruction, source and result records; `DATA_W` = 64, `TAG_W` = 7 |
| `rtl/nbti_scheduler.sv` | top level; wires the blocks below |
| `rtl/issue_window.sv` | window storage, wakeup, issue marking, in-order release, dispatch flow control |
| `rtl/select_logic.sv` | oldest-first select and assignment of instructions to ALUs in priority order |
| `rtl/priority_rotator.sv` | PR priority offset |
| `rtl/td_recovery_timer.sv` | TD busy counters |
| `rtl/alu_unit.sv` | one ALU slot: vectoring, operand register, ALU |
| `rtl/recovery_vectoring.sv` | recovery-vector multiplexer for an idle ALU |
| `rtl/int_alu.sv` | 64-bit integer ALU |
| `rtl/ks_adder.sv` | Kogge-Stone parallel-prefix adder |
| `rtl/stress_monitor.sv` | per-ALU stress and recovery cycle counters |

## How the three policies are built

The policies share one piece of select hardware. `select_logic` takes three
inputs:

* the ready vector and the head (oldest entry) of the window;
* `offset`, the ALU with the highest priority;
* `fu_busy`, the ALUs that must not be used this cycle.

ALU priority runs `offset, offset+1, ..., NUM_ALU-1, 0, ..., offset-1`. The
k-th oldest ready instruction goes to the k-th free ALU in that order, and
as many instructions are granted as there are free ALUs.

* **PS**: `offset` = 0 and `fu_busy` = 0. If three instructions are
  ready, ALUs 0, 1 and 2 get them, oldest first.
* **PR**: `priority_rotator` counts clock cycles. When `CYCLE_PR` cycles
  have passed, `offset` moves on by one, wrapping around. For the first
  10 000 cycles ALU0 is highest and ALU3 lowest. For the next 10 000, ALU1
  is highest and ALU0 lowest, and so on. The issued ALUs therefore always
  form a contiguous run that starts at `offset`. Leaving PR clears the
  counter and the offset, so every entry into PR starts a full period with
  ALU0 highest.
* **TD**: `td_recovery_timer` holds one counter per ALU. It is loaded with
  `CYCLE_TD` in the cycle the ALU is granted, and counts down to zero.
  `fu_busy` is "counter non-zero". An ALU granted in cycle *t* is skipped in
  cycles *t+1 ... t+CYCLE_TD* and can be granted again in *t+CYCLE_TD+1*.
  Each ALU therefore runs at most once every `CYCLE_TD+1` cycles. With 4
  ALUs and `CYCLE_TD` = 2, peak throughput falls from 4 to 4/3 instructions
  per cycle. Under PS and PR the counters are cleared.

`policy` is an ordinary input. The policy can change in any cycle, so a
system can run PR for performance and switch to TD when slowing ageing
matters more. The counters and offset of the old policy are cleared at the
next clock edge.

## Wakeup, select and issue timing

Every ALU is fully pipelined with a latency of one cycle. For an
instruction `B` that depends on `A`:

| cycle | A | B |
|---|---|---|
| t | selected; operands and tag loaded into the ALU's operand register at the edge | waiting on A's tag |
| t+1 | executes; result and tag on `result[f]`, broadcast to the window | source captured at the edge |
| t+2 | (entry released from the window when it reaches the head) | ready, selected |
| t+3 | | executes |

A dependence chain therefore issues one instruction every two cycles. There
is no speculative wakeup. The window is *data-capturing*: a waiting source
stores the broadcast value together with its ready bit, so issued
instructions read their operands from the window itself. A result broadcast
in the same cycle an instruction is dispatched also wakes that instruction;
without this the consumer would wait forever.

Entries are released in program order once they have issued, up to
`DISP_W` per cycle, as from a register update unit (RUU). An entry that
issued out of order keeps its slot until every older entry has issued.
Dispatch accepts up to `DISP_W` instructions per cycle, packed in lane
order. It is refused while fewer than `DISP_W` entries are free
(`disp_ready` low), and the front end must hold its instructions until
`disp_ready` returns. Reset is synchronous and active low.

## Interface of `nbti_scheduler`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `policy` | in | `POL_PS`, `POL_PR` or `POL_TD` |
| `disp_valid[DISP_W]`, `disp_instr[DISP_W]` | in | renamed instructions; see `instr_t` below |
| `disp_ready` | out | dispatch is accepted in this cycle |
| `result[NUM_ALU]` | out | `{valid, tag, val}` per ALU, in the cycle after issue |
| `stats_clear` | in | zero the stress/recovery counters |
| `stress_cnt[NUM_ALU]`, `recov_cnt[NUM_ALU]` | out | cycles each ALU executed / was idle under the recovery vector |
| `fu_issue`, `fu_recovering` | out | ALUs granted this cycle; ALUs held busy by TD |
| `prio_offset` | out | the ALU that currently has the highest priority |
| `window_count` | out | occupied window entries |

`instr_t` is `{op, dst, s1, s2}`. `dst` is the destination tag. Each source
is `{rdy, tag, val}`: either `rdy` = 1 and `val` holds the operand, or
`rdy` = 0 and the source waits for the result with that `tag`. The slice
does no register renaming. The front end must not reuse a tag while an
older instruction in the window still waits on it. Cycling tags through
`2*ENTRIES` values (128 for the 7-bit tag) is enough, because an instruction
that many places older has always left the window. A larger window needs
a wider `TAG_W` in `nbti_pkg`; elaboration stops with an error otherwise.

ALU operations (`alu_op_e`) are ADD, SUB, AND, OR, XOR, CMPEQ, CMPLT
(signed) and CMPULT. Add, subtract and the compares share one 64-bit
Kogge-Stone adder. Compares return 0 or 1.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_ALU` | 4 | integer ALUs (2 for the 2-wide core) |
| `DISP_W` | 4 | dispatch lanes per cycle (2) |
| `ENTRIES` | 64 | issue-window entries, a power of two (32) |
| `CYCLE_PR` | 10000 | PR rotation period in cycles |
| `CYCLE_TD` | 2 | TD recovery cycles after each use (1 and 3 are the other settings worth studying) |
| `CNT_W` | 48 | stress/recovery counter width (over a day of cycles at 3 GHz) |
| `REC_A`, `REC_B`, `REC_OP` (in `recovery_vectoring`) | all ones, all ones, ADD | the recovery vector |

The widest structures are the window (ENTRIES x 2 x 64-bit captured
operands) and the `ENTRIES` x `NUM_ALU` tag comparators. At the defaults,
synthesis reports about 11 500 word-level cells, 1 100 flip-flop bits
outside the window, and a 9 864-bit window memory.

## Where the design makes its own choices

The scheduling scheme fixes three things: the three policies, oldest-first
selection to the lowest-numbered free unit, and the busy-signal way of
implementing TD. The following are this implementation's own choices:

* The slice handles only integer ALU instructions. Loads/stores, multiplies
  and floating point are assumed to be steered elsewhere.
* The ALU latency is one cycle, and wakeup is not speculative.
* The window captures data, and releases entries in order up to `DISP_W`
  per cycle.
* Dispatch needs `DISP_W` free entries.
* The k-th oldest ready instruction is paired with the k-th free ALU.
* Select is written as a combinational priority scan, not a select tree.
* The policy is a run-time input. A policy change clears the state of the
  old policy.
* The "used" cycle of TD is the issue cycle, so an ALU used in cycle *t* is
  busy in *t+1 ... t+CYCLE_TD*.
* The recovery vector defaults to all ones on both operands with an ADD.
  The right vector for a given adder layout is a circuit-level question;
  change `REC_A`/`REC_B`/`REC_OP`.
* The ALU operation set and the 7-bit tags are this design's choices.
* The stress/recovery counters are hardware here. They are meant for a
  reliability manager or for extracting utilisation data.

Not included: the rest of the core (fetch, branch prediction, rename,
load/store queue, caches, multipliers, FP units), and the ageing model that
turns stress/recovery time into threshold-voltage shift and ALU delay. The
ageing model is an analytical device model, not a circuit.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with
values worked out independently. `tb/nbti_tb_pkg.sv` restates the ALU
operations with plain SystemVerilog operators.

| testbench | what it checks |
|---|---|
| `tb_ks_adder` | corner cases, carry chains and 5000 random sums against `+` |
| `tb_int_alu` | every operation on signed/unsigned corner values and random operands |
| `tb_recovery_vectoring` | pass-through when issued; recovery vector when idle; non-default vector |
| `tb_alu_unit` | one-cycle latency, tag, idle ALU computing on the recovery vector |
| `tb_issue_window` | wakeup, capture, wakeup at dispatch, in-order release, full window refusing dispatch, drain rate |
| `tb_select_logic` (+ `sel_case`) | 20 000 random cases each for 64x4 and 32x2, against an age-sort/priority-sort reference |
| `tb_priority_rotator` | offset steps exactly every 10 000 cycles; held at 0 outside PR; 2-ALU wrap |
| `tb_td_recovery_timer` | busy windows for `CYCLE_TD` = 1, 2, 3 against a reference; nothing busy under PS/PR |
| `tb_stress_monitor` | counters against the testbench's counts, with a clear |
| `tb_nbti_scheduler` | the whole slice at default parameters |
| `tb_nbti_benchmarks` | the default slice under the integer-ALU demand of eight SPEC CPU2000 programs, all three policies |
| `tb_nbti_2wide` (+ `sched_run`) | the 2-wide core (2 ALUs, 32 entries) with `CYCLE_TD` = 1, 2 and 3 |

`tb_nbti_scheduler` renames a random program over 8 registers and
dispatches it as a front end would. It checks every result value, and the
select pattern of every cycle against the active policy. It also checks
that idle ALUs show the recovery vector, and that the stress counters
agree. It measures (all at the defaults):

* PS, 4000 independent instructions: 1002 cycles (4 per cycle).
* PS, dependence chain: 2 cycles per instruction, all on ALU0.
* PS, random program: ALU stress ordered ALU0 > ALU1 > ALU2 > ALU3
  (8672 / 6226 / 3561 / 1541 of 20 000).
* PR over four 10 000-cycle periods: spread between the most and least used
  ALU under 2 %.
* TD, 3000 independent instructions: 2250 cycles (4 per 3 cycles), evenly
  spread.
* Dispatch stalls, wakeups at dispatch, select contention and TD blocking
  all occur. About 133 000 instructions run in under a minute of
  simulation.

`tb_nbti_2wide` runs three 2-wide configurations side by side. Each one
runs independent instructions under PS and TD, then the same random program
under both, and checks every result. A longer random program then runs
under PR over about two rotation periods, and the two ALUs' stress must
end within 6 % of each other (measured: about 3.5 %). Independent-stream throughput is 2.00
instructions per cycle under PS. Under TD it is 1.00, 0.67 and 0.50 for
`CYCLE_TD` = 1, 2 and 3, that is 2/(`CYCLE_TD`+1). A program whose
parallelism is already below that limit loses little.

`tb_nbti_benchmarks` drives the default slice with the integer-ALU demand
of eight SPEC CPU2000 programs. The demand is each program's IPC times its
integer share of the instruction mix, from 0.10 per cycle (mcf) to 1.85
(crafty). Each program runs 10 000 cycles under PS and TD and 40 000 under
PR. The testbench prints the share of cycles each ALU is under stress, and
the throughput:

| program | demand | PS stress % ALU0..3 | PR stress % ALU0..3 | TD stress % ALU0..3 | TD IPC |
|---|---|---|---|---|---|
| gzip   | 1.68 | 88 / 54 / 21 / 5  | 42 / 42 / 42 / 42 | 33 / 33 / 33 / 33 | 1.33 |
| mcf    | 0.10 | 10 / 0.3 / 0 / 0  | 2.5 / 2.6 / 2.6 / 2.4 | 7.9 / 1.7 / 0.2 / 0 | 0.10 |
| twolf  | 0.66 | 51 / 13 / 1.4 / 0.1 | 17 / 17 / 17 / 17 | 26 / 20 / 13 / 6.6 | 0.66 |
| crafty | 1.85 | 90 / 60 / 27 / 7  | 46 / 46 / 46 / 46 | 33 / 33 / 33 / 33 | 1.33 |

Under PS the wear is heavily skewed towards ALU0. PR evens it out without
losing throughput. TD caps every ALU at a third of the cycles; programs
whose demand exceeds 4/3 per cycle then fall behind, while low-demand
programs lose nothing. These are stress *times*. Converting them into
threshold-voltage shift and delay needs an NBTI device model, which is not
part of this RTL.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nbti_pkg.sv tb/nbti_tb_pkg.sv tb/tb_nbti_scheduler.sv \
    --top-module tb_nbti_scheduler -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog that ends the run with a failure if it hangs. For the 2-wide core,
override `NUM_ALU`, `DISP_W` and `ENTRIES` on `nbti_scheduler`, as
`sched_run` does.
