# Multiprocessor hardware scheduler for non-resident tasks

This is a small hardware scheduler. It places a stream of tasks on four
identical processors. Each task is *non-resident*: its code sits in memory and
must be fetched before the task can run. If a processor runs tasks of one type
back to back, it fetches that code once instead of once per task. So the
scheduler tries to put each task on a processor that already has tasks of the
same type waiting. Fewer code fetches keep memory bandwidth from becoming the
bottleneck. A processor with nothing to do can be put into power saving mode.
It is woken only when no awake processor can take the task.

The target use is voice processing, where a few encoder/decoder task types
make up most of the load. The RTL is written in synthesizable SystemVerilog
(IEEE 1800-2017). It is checked with Verilator 5 and the Yosys slang front end.

## Task entries

Every task is one 32-bit word (`mhs_pkg::task_t`):

| bits  | field      | meaning                                                   |
|-------|------------|-----------------------------------------------------------|
| 31:29 | `ttype`    | task type, 0..4 = A..E; codes 5..7 are dropped at the input |
| 28:5  | `mem_addr` | 24-bit address of the task's code                         |
| 4:0   | `wcet`     | worst-case execution time, in clock cycles (0..31)        |

The field widths and their order are part of the design. Which end of the
word holds which field is this implementation's choice.

## Structure

```
 in_task ──► task_table ──head──► proc_sel_ctrl ──enq──► proc_task_queue ×4 ──dispatch──► processors
 (valid/ready) (500 × 32, FIFO)    ▲      │ pop             (50 × 32 each)          (outside)
                                   │      └──────► task_table
                                   └── proc_status_table ◄── enq / hand-over events
```

| module              | role |
|---------------------|------|
| `mhs_pkg`           | widths, sizes, `task_t`, task type enum |
| `task_table`        | input task table: 500 entries, kept in arrival order |
| `proc_sel_ctrl`     | processor selection controller (ranking and slot search FSM) |
| `proc_task_queue`   | per-processor FIFO of 50 entries, with hand-over to the processor |
| `proc_status_table` | per processor, one count per task type of the tasks waiting in its queue |
| `mhs_top`           | wires the above together for four processors |

Tasks are assumed to arrive in deadline order. The task table is therefore a
plain FIFO, and its head is always the most urgent task.

## How a task is placed

This is the core of the design, in `proc_sel_ctrl`. It is a two-state FSM.

1. **Rank (1 cycle).** Once a task is at the head of the table, the controller
   builds a key for each processor and sorts the processors by that key. The
   key is made of:
   * the number of tasks of *this task's type* waiting in the processor's
     queue, read from the status table (higher first);
   * whether the processor is awake (awake first). A sleeping processor
     always has an empty queue, so this only decides among processors with a
     count of zero;
   * the processor number (lower first). This makes every key distinct.

   The rank of a processor is the number of processors with a larger key.
   This is four comparisons per processor and needs no sorting network.
2. **Search (1 cycle per processor).** The processors are tried in rank order.
   A queue offers a *time slot* if both of these hold:
   * it is not full (fewer than 50 entries);
   * the WCETs already waiting in it, plus this task's WCET, add up to no
     more than `WINDOW` cycles (default 512).

   The search stops at the first queue that offers a slot. The task is
   written into that queue and removed from the table in the same cycle.
3. **No slot anywhere.** If no queue offers a slot, `stall` pulses and the
   task stays at the head of the table. The controller ranks and searches
   again. By then the processors have drained some work.

Timing: a task placed on the processor it ranked `r`-th (`r` = 0..3) is
written into that queue on the `(r+2)`-th rising edge after it reaches the
head of the table. A full search that finds no slot takes 5 cycles. At best,
one task is placed every 2 cycles.

The `WINDOW` rule gives the "time slot" a concrete meaning. Without it, only
the 50-entry depth would limit a queue, and the clustering would pile every
task onto one processor until its queue was full. If `WINDOW` is 1550
(50 × 31) or more, the window never binds and only the queue depth limits.

## Queues, status table and power saving

`proc_task_queue` offers its oldest task on `dispatch_valid`/`dispatch_task`.
The processor takes the task on any rising edge where `proc_ready` is high.
The processor holds `proc_ready` high while it is free, so the next task is
handed over in the cycle the previous one ends. The queue also keeps two
values for the controller: `workload`, the sum of the waiting WCETs, and
`full`.

`sleep` is high when the processor is free and its queue is empty. The
scheduler only raises this flag. Switching the processor's power is left to
the system around it.

`proc_status_table` holds 4 × 5 counters of 6 bits each. A counter goes up
when a task of its type is placed on that processor's queue. It goes down when
such a task is handed to the processor. If both happen in the same cycle, the
counter is unchanged. The counters count waiting tasks only: the task a
processor is running is no longer counted.

## Top-level interface (`mhs_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_task` | in/out/in | task input, valid/ready. `in_ready` is low only while the table is full |
| `in_reject` | out | one-cycle pulse when an entry with type code 5..7 was taken and dropped |
| `dispatch_valid[p]`, `dispatch_task[p]`, `proc_ready[p]` | out/out/in | hand-over to processor `p` |
| `proc_sleep[p]` | out | processor `p` may enter power saving mode |
| `queue_count[p]`, `type_count[p][t]`, `table_count` | out | occupancy of the queues, of the status table and of the task table |
| `place_valid`, `place_proc`, `place_rank`, `stall` | out | placement events, for tracing |

| parameter | default | meaning |
|-----------|---------|---------|
| `NPROC` | 4 | processors |
| `TABLE_ENTRIES` | 500 | task table depth |
| `QUEUE_ENTRIES` | 50 | depth of each processor queue |
| `WINDOW` | 512 | time slot window in cycles (this implementation's choice) |

The number of task types (5) and the field widths are fixed in `mhs_pkg`.

## Size

After coarse synthesis with Yosys, the default configuration has these parts:

* about 590 word-level cells;
* 307 flip-flop bits;
* 22,400 memory bits: 16,000 in the task table and 1,600 in each queue.

The memories are plain arrays read combinationally at the head pointer.
They map onto distributed RAM or flip-flops. On an FPGA with block RAM only,
the head read would need to be made registered.

## Where this implementation fills gaps

The design fixes the following: the block structure, the 32-bit entry with
3/24/5-bit fields, the five task types, the four processors, the table and
queue sizes, the ranking by count of same-type tasks, the in-order search that
stops at the first slot, the FIFO hand-over, the status table updated on every
enqueue and dequeue, and the power saving rule.

This implementation chose the following:

* the meaning of "time slot", which is the `WINDOW` rule above;
* breaking ties first in favour of awake processors, then by processor number;
* searching one processor per cycle;
* retrying when no slot is found;
* treating the arrival order as the deadline order;
* the valid/ready handshakes;
* dropping unused type codes;
* the reset;
* the counter widths;
* the tracing outputs.

All of these are easy to change: each sits in one module.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_task_table` | FIFO order, count, full at exactly 500, dropping of unused type codes, against a reference queue |
| `tb_proc_task_queue` | order, count, full, WCET sum, `sleep`, hand-over report, with enqueue and hand-over in the same cycle |
| `tb_proc_status_table` | all 20 counters against a reference array under random updates, including simultaneous up/down of one counter |
| `tb_proc_sel_ctrl` | chosen processor and rank against an independent sort, the placement latency (`r`+2 edges), the stall after a fruitless search, and the retry |
| `tb_mhs_top` | whole scheduler at default sizes with four processor models (`tb/proc_model.sv`, which runs each task for max(WCET,1) cycles). A reference model checks every cycle. The run forces a full task table, rejects, stalls, searches past the first-ranked processor, clustering, wake-ups, full queues, and enqueue together with hand-over, and fails if one of them never occurs |
| `tb_mhs_queue_status` | steady load of five equally likely types. Prints the queue occupancies every 100 cycles, and checks that every task runs, that all processors are used, and that each processor's most frequent type exceeds a 1/5 share |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mhs_pkg.sv tb/tb_mhs_top.sv --top-module tb_mhs_top -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## Observed behaviour

Under the steady load of `tb_mhs_queue_status`, the most frequent type makes
up about a third of the tasks on each of the three busy processors, and about
a quarter on the fourth, which runs few tasks. Type-blind placement would give
20 %.

The awake-first rule keeps the fourth processor asleep most of the time. It
wakes only when the other three queues have no slot left.

If you prefer to spread the load evenly over the processors over saving
power, drop the awake bit from the ranking key in `proc_sel_ctrl`.
