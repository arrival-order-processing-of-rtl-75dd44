# A hardware RTOS manager that releases waits in priority or arrival order

In a fully hardware RTOS-based system there is no processor. Each
application task is its own hardware block, and all ready tasks run in
parallel. The RTOS is a manager circuit. It starts and stops the tasks and
executes their service calls (mutex, eventflag, dataqueue, shared variable,
task control) one at a time.

The hard part is what happens when a call cannot complete at once, such as
a lock on a taken mutex or a receive from an empty queue. A software kernel
puts the caller on a linked list sorted by priority or by arrival. This
manager has no lists. It keeps one flag per (task, service instance) pair
and reuses its request arbiter to pick which waiter to serve.

This design adds two things to that flag-based scheme:

* **Arrival order.** A small recorder numbers the outstanding calls in the
  order they came in. The arbiter compares tasks by priority and then by
  arrival order, or the other way round. Each service instance chooses which
  order its waiters are released in. TOPPERS/ASP3 lets mutexes and
  eventflags be created with either order, and some objects are
  first-come-first-served only.
* **A separate release mode.** While a wait release is in progress, the
  arbiter considers only the tasks being released. An unrelated
  high-priority call therefore cannot push in and delay the release.

Everything is plain synthesizable SystemVerilog with a shared package. The
code has no vendor primitives.

## Block overview

```
 task 0..N-1 --call--> TF/TA regs --pending--> ARRIVAL ----ao----+
     ^                    |                                       v
     |                    |                        STATUS.pri -> order switch --key--> RA
     +---ret/run----------+<------------- XT, XA (result) ------------------------------+
                                                                                        |
                                                            XT/XF/XA strobe (req) <-----+
                                                                   |
                      +------------+-----------+------------+------+-------+
                      v            v           v            v              v
                 control_task  shared_var    mutex      eventflag      dataqueue
                      |            |           |            |              |
                      +------------+-----+-----+------------+--------------+
                                         | answer (OR of all modules)
                                         v
                                   WAIT: S_WAIT, R_WAIT, ORDER --w, r_wait, release, order--> RA
```

| File | Part |
|---|---|
| `rtl/rtos_pkg.sv` | Types (`call_t`, `svc_req_t`, `svc_rsp_t`), function codes, error codes and wait-slot numbers |
| `rtl/rtos_manager.sv` | Top: TF/TA registers, STATUS, and the wiring of all parts below |
| `rtl/arrival_order.sv` | ARRIVAL recorder (ORDER per task, MO) |
| `rtl/order_switch.sv` | Builds the arbitration key `{pri, ao}` or `{ao, pri}` |
| `rtl/request_arbiter.sv` | RA: normal and release mode, XT/XF/XA, three-phase call |
| `rtl/wait_ctrl.sv` | WAIT: S_WAIT, R_WAIT, ORDER |
| `rtl/control_task_svc.sv` | Task control services |
| `rtl/shared_var_svc.sv` | 32 x 32-bit shared variable |
| `rtl/mutex_svc.sv` | 2 mutexes |
| `rtl/eventflag_svc.sv` | 2 x 32-bit eventflags |
| `rtl/dataqueue_svc.sv` | 2 dataqueues of 10 words |

## Waiting as a flag matrix (WAIT)

`wait_ctrl` holds three registers:

* `S_WAIT[t][i]` says that task `t` waits for wait slot `i`. A wait slot is
  one waitable side of one service instance. The slots are: mutex 0 and 1
  (slots 0-1), eventflag 0 and 1 (2-3), dataqueue 0 and 1 send side (4-5),
  dataqueue 0 and 1 receive side (6-7), and sleep (8).
* `R_WAIT[t]` says that task `t` is currently being released.
* `ORDER` holds the order of the release in progress.

The module sends three signals to the arbiter:

* `w[t]`, the OR of the task's S_WAIT row. The arbiter ignores the
  outstanding call of a task with `w[t] = 1`.
* `release`, the OR of R_WAIT. It puts the arbiter into release mode.
* `order`.

Each cycle in which a service module answers, its answer updates these
registers.

| Answer field | Effect, for the task `xt` being served |
|---|---|
| `blocked`, `slot` | Set `S_WAIT[xt][slot]` and clear `R_WAIT[xt]`. In release mode this puts the call back to waiting. |
| completed (not blocked) | Clear the S_WAIT row of `xt` and `R_WAIT[xt]` |
| `rel_end` | Clear all R_WAIT. This ends a release that may hand over to only one waiter. |
| `rel`, `rel_slot`, `rel_order` | For every task, `R_WAIT[t] |= S_WAIT[t][rel_slot]`, and `ORDER = rel_order` |

These apply in the order shown. As a result, one answer can end one release
and start another. For example, a released receive takes a word from a
queue and then releases that queue's blocked senders.

A release works like this:

1. The service that frees a resource answers with `rel` for the slot and
   the instance's order.
2. WAIT marks every task waiting on that slot in R_WAIT, and the arbiter
   switches to release mode.
3. The arbiter picks the first marked task by the current order and
   re-sends its original call to the service unchanged.
4. The service decides the outcome:
   * If the call can now complete, it completes, and a single-handover
     service (mutex, dataqueue, eventflag with clear) also answers with
     `rel_end`.
   * If the call still cannot complete, it answers `blocked` again. That
     task is then simply dropped from R_WAIT.
5. This repeats until R_WAIT is empty. The arbiter then returns to normal
   mode.

The calls are stored unchanged and re-sent, so the services need no wait
queues. An eventflag without the clear attribute re-tests every waiter in
one release. The waiters that match complete and the others block again.

## ARRIVAL: arrival order with small integers

`arrival_order` does not timestamp calls. It stores, for each task, the call's
rank among the calls still outstanding:

* If `k` calls are outstanding, their ranks are `0 .. k-1`.
* A task with no outstanding call holds `-1`.
* `MO` holds the largest rank in use.

Ranks are 5-bit signed numbers, which allows 16 tasks.

* **New call from task `t`:** it gets rank `MO + 1`, and MO grows by one.
* **Several new calls in one cycle:** they are ranked in task-id order.
  Each gets `MO + 1 + (number of requesting tasks with a lower id)`. The
  count in parentheses is a prefix popcount of the request vector.
* **Completion for task `t'`:** every rank above `rank[t']` drops by one,
  MO drops by one, and `rank[t']` becomes -1.
* **Completion and new calls in the same cycle:** the decrement is applied
  first, and the new calls are numbered after it.

"Outstanding" means accepted into TF and not yet completed. A call that is
waiting therefore keeps its place. If it is re-blocked during a release, it
also keeps its rank. So in arrival order, the oldest waiter is always
served first.

## The key switch

`order_switch` builds one key per task from the priority `pri` (0 is the
highest) and the arrival rank `ao`. The arbiter takes the smallest key. In
priority order the key is `{pri, ao}`; in arrival order it is `{ao, pri}`.
A rank of -1 reads as all ones, so a task with nothing outstanding sorts
last.

In priority order, tasks of equal priority are therefore served in arrival
order. This fixes a weakness of the priority-only scheme, which broke ties
by task id. Keys that are still equal go to the lower task id.

In normal mode the manager always uses priority order. The ORDER register
applies only during a release.

## The request arbiter (RA)

`request_arbiter` chooses its candidates according to the mode:

* In normal mode, the candidates are tasks with an outstanding call and
  `w[t] = 0`.
* In release mode, the candidates are tasks with `R_WAIT[t] = 1`.

An `allow` mask, driven by the CPU lock, removes tasks from both. The RA is a
three-state machine:

| Cycle | State | What happens |
|---|---|---|
| 1 | SELECT | The winner is latched into XT. Its TF/TA is latched into XF/XA, and the mode is recorded. |
| 2 | EXEC | `req.valid` strobes XT/XF/XA to every service module. The owning module answers combinationally in this cycle. A blocked answer goes straight back to SELECT. |
| 3 | RETURN | `ret_valid` with XT and the result. The manager copies the result into `TA[XT]` and clears the call. |

A function code that no module claims returns `E_NOSPT`.

## Calling a service from a task

Each task has a call register pair (TF/TA). A task issues a call by pulsing
`call_valid[t]` with `call[t]`, which carries:

* `fn`, an 8-bit function code;
* `inst`, an 8-bit object number;
* `arg0` and `arg1`, 32 bits each.

The manager accepts the call when the task has no outstanding call and is
not dormant. From then on `run[t]` is low. When the call completes, the
manager raises `ret_valid[t]` for one cycle. At that point:

* `ret0[t]` holds the return code (TOPPERS/ASP3 values: `E_OK = 0`, `E_PAR`,
  `E_ID`, `E_OBJ`, `E_QOVR`, `E_TMOUT`, `E_RLWAI`, `E_NOSPT`);
* `ret1[t]` holds returned data;
* `run[t]` is high again.

A call that completes at once, with nothing else outstanding, takes
**4 cycles**:

1. The call is accepted on the edge that samples `call_valid`.
2. Select.
3. Execute.
4. Return. `ret_valid` follows on the next edge.

When several calls compete, each one occupies the arbiter for 3 cycles, or
2 if it blocks.

The other task ports are:

* `task_exit[t]`: the task finished. It becomes dormant, or restarts at once
  if an activation is queued.
* `activate[t]`: pulses when a task is (re)started.
* `waiting[t]`: the task's `w[t]`.

Three ports are for observation: `release_active`, `release_order` and
`arrival_max` (MO).

`run[t]` is high when the task is not dormant, not suspended, has no
outstanding call, and no other task holds the CPU lock.

### Call encoding

| fn | Call | inst | arg0 | arg1 | ret1 |
|---|---|---|---|---|---|
| 0x10 | act_tsk | - | task id | - | - |
| 0x11 | can_act | - | task id | - | (ret0 = queued count) |
| 0x12 | ter_tsk | - | task id | - | - |
| 0x13 | chg_pri | - | task id | new priority | - |
| 0x14 | get_pri | - | task id | - | priority |
| 0x15 | wup_tsk | - | task id | - | - |
| 0x16 | can_wup | - | task id | - | (ret0 = queued count) |
| 0x17 | rel_wai | - | task id | - | - |
| 0x18 / 0x19 | sus_tsk / rsm_tsk | - | task id | - | - |
| 0x1A / 0x1B | loc_cpu / unl_cpu | - | - | - | - |
| 0x1C | slp_tsk | - | - | - | - |
| 0x20 | rd_var | - | word address | - | data |
| 0x21 | wr_var | - | word address | data | - |
| 0x30 / 0x31 | loc_mtx / ploc_mtx | mutex | - | - | - |
| 0x32 | unl_mtx | mutex | - | - | - |
| 0x40 | set_flg | flag | pattern | - | - |
| 0x41 | clr_flg | flag | mask (AND) | - | - |
| 0x42 / 0x43 | wai_flg / pol_flg | flag | wait pattern | 1 = OR, 2 = AND | flag value |
| 0x50 / 0x51 | snd_dtq / psnd_dtq | queue | data | - | - |
| 0x52 / 0x53 | rcv_dtq / prcv_dtq | queue | - | - | data |

The upper nibble of `fn` selects the service module. The `p...` forms and
`pol_flg` return `E_TMOUT` instead of waiting. Task ids are 0-based.

## Service modules

Every service module sees the same strobe (`svc_req_t`). Only the module
that owns the function code answers, with a `svc_rsp_t`. The manager ORs
the answers together. State updates on the clock edge after the strobe.

* **mutex** (`N_MTX = 2`). Each mutex has a lock bit and an owner.
  * Locking a free mutex takes it.
  * Re-locking by the owner gives `E_OBJ`.
  * Otherwise the caller waits.
  * Unlocking by the owner frees the mutex and releases its slot in the
    mutex's order. The first released lock that succeeds ends the release.
  * `MTX_ORDER = 2'b10`: mutex 0 releases in priority order, mutex 1 in
    arrival order.
* **eventflag** (`N_FLG = 2`, `FLG_W = 32`).
  * `set_flg` ORs bits in and releases the flag's slot.
  * Without the clear attribute, every waiter is re-tested.
  * With it, the first match clears the flag and ends the release.
  * `FLG_ORDER = 2'b10` (flag 1 releases in arrival order) and
    `FLG_CLR = 2'b10` (flag 1 has the clear attribute).
* **dataqueue** (`N_DTQ = 2`, `DEPTH = 10`, `DW = 32`). Each queue is a
  circular buffer with a head index and a count.
  * A send releases the receivers in arrival order.
  * A receive releases the senders in the queue's `SND_ORDER` (queue 1:
    arrival).
  * One word serves one waiter, so the first success ends the release.
* **shared variable** (`N_WORDS = 32`, `WORD_W = 32`). Reads and writes
  always complete at once. An address out of range gives `E_PAR`.
* **task control** holds one queued activation and one queued wakeup per
  task. It drives commands to the manager's STATUS: activate, terminate,
  priority, suspend and resume, CPU lock.
  * `slp_tsk` waits on the sleep slot. `wup_tsk` queues a wakeup and
    releases that slot in arrival order; in the release, only the sleeper
    with a queued wakeup completes.
  * `rel_wai(t)` on a waiting task returns `E_OK` to the caller. The target's
    call completes with `E_RLWAI`. If the target is not waiting, the result
    is `E_OBJ`.
  * `ter_tsk(t)` withdraws the target's outstanding call, if it has one,
    without a return, and makes the task dormant.
  * Both of these act in the execute cycle of the caller's call. They clear
    the target's TF, its WAIT row and its ARRIVAL rank, so ranks behind it
    move up.
  * `loc_cpu` stops every other task, and the arbiter serves only the
    locking task until `unl_cpu` or until that task ends.

## Where this design makes its own choices

The architecture follows the published scheme:

* the TF/TA, XT/XF/XA and STATUS registers;
* the flag-matrix waiting;
* the R_WAIT/ORDER release and the two-mode arbiter;
* the key switch;
* the rank-based arrival recorder, including its handling of simultaneous
  requests and completions.

The following are this implementation's own choices:

* the call encoding, error codes and wait-slot numbering;
* the 3-phase arbiter timing and the registered return;
* the answer format of the service modules (`blocked`, `rel`, `rel_end`);
* how one answer combines ending and starting a release;
* clearing a task's whole S_WAIT row on completion;
* the CPU lock semantics;
* the withdrawal path for `rel_wai` and `ter_tsk`;
* the example configuration:
  * priorities T0 = 1, T1 = T2 = 2, T3 = 3;
  * all tasks started at reset;
  * the per-instance order and clear defaults;
* all behaviour of the services beyond their names and sizes, which follows
  TOPPERS/ASP3 conventions.

Two further differences from ASP3:

* `slp_tsk` is an addition, so that `wup_tsk` has something to wake.
* The manager does not change the task's STATUS when it waits. `w[t]` and
  the outstanding call already stop the task.

## Limitations

* Mutexes have no priority ceiling or priority inheritance. A mutex held by
  a task that is terminated stays locked.
* There is no `TSK_SELF`, no timeouts (`tslp_tsk`, `twai_flg`, ...) and no
  time management.
* Activation and wakeup counts saturate at one queued request.
* Wait slots are fixed at compile time. Adding instances means widening
  `NSLOT` in the package and giving the new slots numbers.
* The arbiter serves one call at a time, with 3 cycles per call, so heavy
  call traffic from many tasks queues up.
* The tasks themselves are application logic and are not part of the RTL.
  The top brings their call, return and run signals out as ports.

## Simulating

All testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a run that
hangs. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/rtos_pkg.sv tb/tb_rtos_manager.sv --top-module tb_rtos_manager
./obj_dir/Vtb_rtos_manager
```

Replace the testbench name to run another one.

| Testbench | Shows |
|---|---|
| `tb_rtos_manager` | The whole manager at its default size, driven by procedural models of four tasks. It covers mutex release in priority order and in arrival order, arrival-ordered service of equal priorities, simultaneous requests, a request during a completion, eventflag release with and without clear, dataqueue waits on both sides, task control (including `rel_wai` and terminating a waiting task), and the 4-cycle call latency. It counts blocks, releases, re-blocks, simultaneous requests and CPU-lock cycles, and fails if any of them never happened. |
| `tb_rtos_stress` | Random traffic through the whole manager at its default size. One producer sends 200 numbered words through a dataqueue to three consumers; the queue both fills and drains. The consumers also make mutex-protected read-modify-write updates of shared variable words. It checks word order and uniqueness, mutual exclusion, the final counts, and, in every cycle, that MO equals the number of outstanding calls minus one. |
| `tb_arrival_order` | The worked four-step example with six tasks, then random traffic against a queue model |
| `tb_order_switch` | Random keys against a reference comparison in both orders |
| `tb_wait_ctrl` | Random answers and withdrawals against a flag-array model |
| `tb_request_arbiter` | Random candidates and modes: winner, strobe timing, result return, `E_NOSPT` |
| `tb_mutex_svc`, `tb_eventflag_svc`, `tb_control_task_svc` | Directed tests of each call and release request |
| `tb_dataqueue_svc`, `tb_shared_var_svc` | Random traffic against FIFO and array models |

The design contains immediate and concurrent assertions (for example,
R_WAIT only marks waiting tasks, and XT always has an outstanding call).
`--assert` turns them on.
