# Cascabel 2: on-chip task launching with dynamic parallelism

Task-based FPGA accelerators normally depend on the host CPU for every
task: the host writes a task's arguments into a processing element (PE),
starts it, waits for its interrupt and reads back the result. That works
for coarse tasks. It does not work for recursive or data-dependent
parallelism, where a task only learns while running that it needs more
work done. Cascabel 2 moves the dispatcher onto the chip. A PE can launch
child tasks itself, and the unit decides where each child's result goes
when the child finishes:

1. **discard**: nobody needs the result.
2. **return to parent**: the result is streamed back to the launching PE.
3. **merge / reduce**: the results of several sibling tasks are collected
   in a buffer. When all of them are in, the buffer issues a new task on a
   reduce PE with the collected values as its arguments.
4. **return to grandparent**: the result skips the launching PE and goes
   wherever that PE's own result would have gone. The parent may then
   finish at once instead of waiting for its children. This works over any
   number of levels.

Combining 3 and 4 gives continuation-passing recursion without stack
frames in the PEs. A Fibonacci PE for `f(n)` launches `f(n-1)` and
`f(n-2)` as a merge group of two, in grandparent mode, and then finishes
immediately. The reduce task that sums the pair takes over the parent's
destination, so sums cascade up the tree until the final value reaches
the host.

## Structure

```
            host register bus                      PE launch streams (512 b)
                   |                                        |
                host_if                              launch_arbiter (n:1, round robin)
                   |                                        |
                   +------------> request_ingress <---------+
                                   |   ^        ^
                                   |   | merge  | group allocation
                               task_queue   merge_buffer (4096 groups x 4 x 64 b)
                                   |              ^
                                launcher          | deposits
                                   |              |
                  PE start / args  |    return_ctrl ---> result_router (1:n, 64 b)
                                   v       ^   |              |
                                  PEs -----+   +--> host_if   v
                               done/result              PE result streams
```

| Module | Role |
|---|---|
| `cb2_pkg` | Widths, kernel IDs, the launch-request layout and the internal task and action records. |
| `launch_arbiter` | Round-robin n-to-1 merge of the PEs' 512-bit launch streams. It tags each beat with its source PE. |
| `request_ingress` | Takes tasks from the merge buffer, the PEs and the host, in that priority. It assigns task IDs, resolves return actions into absolute destinations, opens and fills merge groups, and pushes into the queue. |
| `task_queue` | First-word-fall-through FIFO of tasks, 512 deep. |
| `launcher` | Starts the queue head on the lowest-numbered idle PE of its kernel. It records the task's return action for `return_ctrl`. |
| `return_ctrl` | Reacts to PE completion. It reads the result and carries out the recorded action, raises the host interrupt if one was requested, and frees the PE. |
| `merge_buffer` | Block-RAM store for merge groups with a free list. A completed group becomes a reduce task. |
| `result_router` | 1-to-n steering of the 64-bit result stream. |
| `host_if` | Register interface for host task submission and results. Also drives the interrupt line. |
| `cascabel2` | The dispatcher unit with all of the above. |
| `fib_pe`, `reduce_pe`, `nop_pe`, `ndp_agg_pe` | Example PEs for recursion, reduction, latency measurement and database column aggregation. |
| `cascabel2_soc` | Top level: the unit plus every example PE, and one external PE slot brought out as ports. |

## How a task's destination is resolved

This is the part that takes most care. Every PE request names its return
action *relative to the launching PE*. `request_ingress` turns that into
an absolute destination as soon as the request is accepted. A destination
(`dest_t`) is one of: none, PE *i*, merge group *g*, or host.

- **discard** gives none.
- **parent** gives the launching PE.
- **grandparent** copies the destination already recorded for the task
  running on the launching PE (`ctx[src].dest`). At the same time it marks
  that PE's current task as *delegated* (`deleg_valid`). When the parent
  finishes, `return_ctrl` drops its result and raises no interrupt for it.
  The parent's interrupt request moves to the child.
- With the **merge** flag set, the destination computed above becomes the
  destination of a merge group, and the child is sent to the group.
  - The first merged request from a PE allocates a group of `merge_count`
    members (1 to 4).
  - The next `merge_count-1` merged requests from that PE join the same
    group.
  - Merged children never raise the interrupt. The interrupt belongs to
    the reduce task.

Each result lands in its group's slot in arrival order. When the last
member arrives, the buffer reads the values back and offers a task to the
ingress. That task has kernel `merge_kernel`, the group size as argc, the
values as arguments and the group's destination. Merge tasks take priority
over new requests, so groups drain even when PEs keep launching.

Because destinations are resolved when the task enters the queue, the
launcher only copies a fixed record. Nothing has to be looked up when the
task completes.

## Launch request format (one 512-bit beat)

| Bits | Field |
|---|---|
| 255:0 | `args[0..3]`, 64 bits each, `args[0]` in 63:0 |
| 263:256 | `kernel`: kernel ID of the child |
| 266:264 | `argc`: 0 to 4 |
| 268:267 | `ret_mode`: 0 discard, 1 parent, 2 grandparent |
| 269 | `merge`: collect into a merge group |
| 272:270 | `merge_count`: group size, 1 to 4 (0 is taken as 1, above 4 as 4) |
| 280:273 | `merge_kernel`: kernel of the reduce task |
| 282:281 | `fmt`: result format if the result goes to a PE |
| 283 | `irq`: interrupt the host when this task's result is final |
| 511:284 | reserved, zero |

Kernel IDs used here: 1 Fibonacci, 2 reduce, 3 NOP, 4 external slot,
5/6/7 average/maximum/sum aggregation.

## Result stream formats

A result sent to a PE uses the format chosen by the launching request:

- **a**: one beat, the 64-bit value.
- **b**: one beat, `{task ID[31:0], value[31:0]}`.
- **c**: two beats, the value and then the 64-bit zero-extended task ID.
  `last` is set on the second beat.

Task IDs are 32 bits. They come from a counter that starts at 1 after
reset and counts every task entering the queue, including merge tasks.

## PE interface

All PEs share one control interface:

- `pe_start[i]` pulses for one cycle. `pe_args`, `pe_argc` and
  `pe_task_id` are valid in that cycle and are shared by all PEs.
- The PE answers with a one-cycle `pe_done[i]`. It holds its result on
  `pe_retval[i]` until its next start.
- A PE that launches children drives a valid/ready launch stream.
- A PE that receives results has a valid/ready/last result stream.

This is a simplified stand-in for a memory-mapped PE register file with a
completion interrupt. Timing on an idle unit:

- A PE request starts its child 3 cycles after the request beat is
  accepted.
- A result appears on the result stream 3 cycles after `pe_done`.
- A NOP child's full round trip, from the parent's launch beat to the
  result beat at the parent, takes 8 cycles.

## Host register map (`host_if`)

64-bit registers. Writes take effect at the clock edge. Read data appears
one cycle after `rd_en`.

| Address | Access | Meaning |
|---|---|---|
| 0x00 | w | TASK: `[7:0]` kernel, `[10:8]` argc, `[11]` interrupt on completion |
| 0x08-0x20 | w | ARG0-ARG3 |
| 0x28 | w | LAUNCH: submit the task. Ignored while a submission is still pending. |
| 0x30 | r | RESULT: oldest result value. Reading it removes the entry. |
| 0x38 | r | RESTID: task ID of the oldest result. Read it before RESULT. |
| 0x40 | r | STATUS: `[0]` submission pending, `[1]` result available, `[12:8]` results held |

Results of host-launched tasks, including the final sum of a
merge/grandparent cascade, go into a 16-entry FIFO. `host_irq` pulses for
one cycle for each finished task that asked for an interrupt.

## Example PEs

- **`fib_pe`**
  - `n < 2` returns `n`.
  - Otherwise it sends two launch beats, for `n-1` and `n-2`. Both use
    grandparent mode and merge with count 2 and the reduce kernel. Then it
    finishes with a dropped result.
- **`reduce_pe`**: returns the sum of its `argc` arguments, one cycle after
  start.
- **`nop_pe`**: returns `args[0]` one cycle after start. It is used to
  measure the launch round trip.
- **`ndp_agg_pe`** (parameter `OP` = average, maximum or sum)
  - It aggregates one column of a table with a fixed record size. `args[0]`
    is the column's word address in the first record, `args[1]` the record
    count and `args[2]` the record size in words.
  - Reads are pipelined through a req/gnt/rvalid port, and data returns in
    order.
  - The average is an integer quotient from a 64-step divider.
  - In the top, the three aggregation PEs' memory ports are brought out.
    The table memory is outside the design.

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| Launch stream width | 512 | as published for the design |
| Result stream width | 64 | as published |
| Arguments per task | 4 × 64 bit | as published |
| Merge groups `SLOTS` | 4096 (16384 × 64 bit = 32 block RAMs of 36 Kbit) | as published (the RAM count) |
| `QUEUE_DEPTH` | 512 | own choice |
| Fibonacci / reduce PEs | 2 / 4 | the published recursion configuration |
| NOP PEs, external slots | 1 / 1 | own choice |
| Host result FIFO | 16 | own choice |

The stream widths and the argument count are constants in `cb2_pkg`. Changing them there changes every PE and the request layout together.

## Departures and limits

- **Latency.** The round trip is 8 cycles. The published figure for the
  original implementation is 62 cycles at 300 MHz. That implementation
  starts PEs and reads their results through memory-mapped PE registers
  and interrupts. The simplified PE interface here has none of that
  overhead, and the two counts are not directly comparable.
- **Fibonacci run time.** `f(11)` with 2 Fibonacci and 4 reduce PEs takes
  2376 cycles in simulation, including host polling. The published time is
  about 18,900 cycles.
- **Scheduling.** Scheduling is strictly FIFO. A head task whose PE kind is
  all busy blocks the tasks behind it (`hol_stall`).
- **Barriers.** The earlier version of this unit also had barriers. They
  are not built here.
- **Not specified in the source, chosen here:**
  - how siblings form a merge group (consecutive merged requests of one
    PE);
  - the request bit layout;
  - task ID assignment;
  - the order in which completions are served (one at a time, lowest PE
    first);
  - the host register map.
- **Discarded results** are never read from the PE. The result of a
  parent that handed its result on to its children is read and then
  dropped.
- **Group size.** A merge group holds at most 4 results, because a task
  carries at most 4 arguments. Wider reductions need a tree of groups.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cb2_pkg.sv \
    tb/tb_cascabel2_soc.sv --top-module tb_cascabel2_soc -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find every module by its file name. For one block,
use `tb/tb_<block>.sv` and `--top-module tb_<block>` instead. The remaining
lint warnings are about unused bits, such as the reserved bits of the
launch request, and about the reset being used in assertion disable
conditions.

`tb_cascabel2_soc` runs the top at its default parameters. It covers:

- `f(1)` to `f(11)`, launched by the host and checked against the
  recurrence, with a cycle bound on `f(11)`;
- the NOP round trip from a parent PE in the external slot;
- a Fibonacci task whose result returns to that parent in format (a);
- the three-aggregate query (average, maximum, sum) over tables of 2, 4,
  8, ... 262144 records, launched by the parent PE as three tasks, with
  results in format (c). The test memory grants reads at random, so the
  largest query takes about 525,000 cycles;
- host interrupts.

It counts every return action, head-of-line stalls and the peak queue
fill. It fails if any of them never happened.

`tb_cascabel2` runs the unit alone with small sizes and covers all three
result formats.
