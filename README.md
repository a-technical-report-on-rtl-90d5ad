# DASED — a non-intrusive soft error detector for loop-dominated software

A soft error that corrupts a register, a branch condition or a program
counter often shows up as a change in control flow. In embedded code, much
of that control flow is in a small number of hot loops, and each of those loops
runs a predictable number of times per execution. DASED (Dynamic Application Soft Error
Detector) uses this. It sits beside a processor and watches the processor's
trace of executed instructions, without stalling it or changing its code.
Before monitoring starts, the hot loops are profiled and each gets a
minimum and a maximum iteration count. At run time the detector counts the
iterations of every loop execution. It reports an error when a loop runs
past its maximum, or ends below its minimum. Separately, it reports any
instruction fetched from a misaligned address or from outside the
application's code.

The detector needs four signals from the processor per executed
instruction. A trace port usually provides them:

| signal   | meaning                                                          |
|----------|------------------------------------------------------------------|
| `i_addr` | address of the executed instruction                              |
| `i_sbb`  | it is a taken *short backwards branch* (the end of a small loop) |
| `i_func` | it is a function call                                            |
| `i_ret`  | it is a function return                                          |

A short backwards branch is a branch whose target is less than 1024 bytes
behind it, which means a loop of fewer than 256 instructions. Addresses are 32-bit,
with 4-byte instructions. Internally every address is kept as a 30-bit word
address (`addr[31:2]`).

## Structure

```
            clk_cpu domain                 |        clk_dased domain (clk_cpu/4)
                                           |
 i_* --> dased_task_filter --> dased_fifo ===> dased_controller <--> dased_profile_cache
             |   (cs, masks)    (encoder +  |     (one event/clk)       (32 loops, registers)
             v                  async FIFO) |            |
          addr_err              overflow    |        loop_err, code, index
```

| file                      | role |
|---------------------------|------|
| `dased_pkg.sv`            | widths, `fifo_entry_t`, `pc_static_t`, `err_code_t`, the loop-body range test |
| `dased_task_filter.sv`    | task regions, context-switch detection, event masking, address check |
| `dased_fifo.sv`           | event FIFO: `dased_event_encoder` and `dased_async_fifo` |
| `dased_event_encoder.sv`  | turns the filtered trace into FIFO entries (loop offset, return destination) |
| `dased_async_fifo.sv`     | dual-clock FIFO with Gray-coded pointers, drop-on-full |
| `dased_sync.sv`, `dased_rst_sync.sv` | two-flop synchronizers for pointers and reset |
| `dased_profile_cache.sv`  | loop table with parallel lookup and range tests |
| `dased_controller.sv`     | the loop-tracking algorithm |
| `dased_top.sv`            | the whole detector |

### Task filter

A multitasking system interleaves several programs on one core, so a
loop's execution can be interrupted by a context switch. The filter holds a
programmable table of `NUM_TASKS` address regions (start, end, enable). For
every instruction it finds the region the instruction lies in, or "none".
When the region changes from one instruction to the next, it raises `cs`
together with the new address. This includes changes to and from
unmonitored code such as the operating system.

Outside monitored regions the `sbb`/`func`/`ret` flags are masked. The
filter also holds one range of valid code, which covers the application,
its libraries and the OS. An instruction that is misaligned or outside that range pulses
`addr_err` one cycle later and is dropped. This is the detector's fastest
path, with zero detector-clock latency.

Library functions called from monitored loops must lie inside a monitored
region. Otherwise their returns are masked, and the calling loop is never
released (see below).

### Event FIFO

Each executed instruction that carries an event produces one 41-bit entry
`{kind, cs, addr, offset}`:

| event | `addr`                               | `offset`                      |
|-------|--------------------------------------|-------------------------------|
| sbb   | address of the branch (the loop tag) | `(branch - target)` in instructions |
| func  | address of the call                  | 0                             |
| ret   | return destination                   | 0                             |
| cs    | first instruction of the new context | (flag, may accompany a kind)  |

The branch target and the return destination are simply the next
executed instruction. The encoder therefore writes each entry when the
following instruction arrives, which also limits writes to one per clock.
The entries cross into the detector clock domain through a 16-deep
dual-clock FIFO.

The detector clock is meant to run at a quarter of the processor clock.
This works because a profiled loop has at least four instructions, so
events average no more than one per four instructions. The FIFO absorbs
bursts. If it is full, the entry is dropped and `fifo_overflow` pulses.
After an overflow, loop state may be wrong until the affected loops end.

### Profile cache

The cache has 32 entries, built from registers:

| field    | bits | set by     | meaning |
|----------|------|------------|---------|
| valid    | 1    | software   | entry in use |
| Tag      | 30   | software   | word address of the loop's backward branch |
| Offset   | 8    | software   | loop size in instructions; the body is `[Tag-Offset, Tag]` |
| MinIter  | 14   | software   | fewest iterations per execution seen without errors |
| MaxIter  | 14   | software   | most iterations per execution |
| CurrIter | 14   | controller | iterations of the current execution |
| InLoop   | 1    | controller | an execution is in progress |
| InFunc   | 1    | controller | the loop has called a function that has not returned |
| InCS     | 1    | controller | the loop's task has been switched out |

A loop is identified by Tag *and* Offset. Every entry compares the event
address against its body in parallel (`in_range`), so the controller can
update all 32 loops in one cycle.

## The loop-tracking algorithm

This is the part that needs care. The controller sees only events, not
every instruction. It must therefore infer that a loop has *ended* from the
first event whose address lies outside the loop's body. Function calls and
context switches also leave the body without ending the loop. That is what
InFunc and InCS are for.

For each FIFO entry the controller does the following, in one `clk_dased` cycle:

1. **Context switch.** `InCS = InLoop`, so every loop in progress is
   suspended. Loops whose body contains the new context's first address
   are resumed (`InCS = 0`).
2. **Return.** Loops with InFunc or InCS whose body contains the return
   destination are released (`InFunc = InCS = 0`). In a nested loop nest,
   all enclosing loops contain the call site, so all of them are released.
   **Short backwards branch** of a cached loop: if InLoop is set, it is one
   more iteration (`CurrIter + 1`), and an error is reported at once if the
   count now exceeds MaxIter. If InLoop is clear, a new execution starts:
   `CurrIter = 1` and `InLoop = 1`.
3. **Exit check, on every event.** A loop with InLoop set and InFunc and
   InCS clear, whose body does not contain the event address, has ended.
   InLoop is cleared, and CurrIter is checked against `[MinIter, MaxIter]`.
4. **Call.** Loops still in progress and not suspended get `InFunc = 1`.

Errors appear on `loop_err` one detector clock after the entry leaves the
FIFO, with `loop_err_code` (`ERR_MAX`/`ERR_MIN`), the cache slot, and the
event's word address. If one event causes several errors, the report
shows the maximum-iteration error of the looked-up loop first, then the
lowest slot. Processing continues after an error, and CurrIter saturates at
16383.

### Where this implementation departs from the original algorithm

* **Ordering of calls.** The original pseudocode sets `InFunc = InLoop`
  *before* the exit check. With that order, a loop that has just finished and
  is followed by a call (a very common pattern) gets InFunc set. Nothing
  ever clears it, so the loop's next execution counts on from the old value
  and trips MaxIter. Here the exit check runs first.
* **Suspended loops and calls.** The original pseudocode also lets a call
  set InFunc on loops of *other*, switched-out tasks. Those loops then
  never close after their task resumes. Here, loops with InCS set keep
  their InFunc unchanged. With both changes, the end-to-end test runs
  thousands of loop executions across five preempted tasks without a false
  error. Tying `cs` low, for comparison, produces false errors at once.
* **Returns trigger the exit check.** The original pseudocode runs the exit check only on
  sbb/call/cs events, while its prose includes returns. Including them
  closes the loops inside a function when the function returns.
* **The exit bound check uses each ending loop's own count.** The
  pseudocode indexes it with the looked-up loop.

### Limits inherent in watching events only

* A loop is seen to end only at a later event outside its body. If the
  same loop is re-entered with no such event in between, the two executions
  merge into one.
* If a context switch falls between a loop's exit and the task's next
  event, the loop stays suspended and merges with its next execution. The
  switch entry carries only the new context's address.
* If an interrupt is taken right after a taken backward branch or a return,
  the next executed address is the handler's. The entry then gets a wrong
  offset or destination.
* Data errors that do not change control flow are invisible by design.

The end-to-end testbench's trace generator places preemption points where
none of these cases arise.

## Clocks, reset and configuration

* `clk_cpu` drives the task filter, the FIFO write side and the
  configuration of task regions and code range (`cfg_task_*`,
  `cfg_code_*`).
* `clk_dased` drives the controller, the profile cache and its
  configuration (`cfg_pc_*`, one `pc_static_t` per write; a write clears
  the slot's dynamic state).
* `rst_n` is asynchronous and active low. It is released in each domain
  through a two-flop synchronizer.
* After reset no task is enabled and the whole address space counts as
  valid code. Configure everything before the monitored software starts.
* The Min/Max bounds come from profiling the application offline or during
  a trusted first run. They count *taken backward branches* per execution,
  which is one less than the number of times the body runs.

Parameters of `dased_top`: `NUM_TASKS` (8), `FIFO_DEPTH` (16, a power of
two) and `PC_ENTRIES` (32). The 32 entries and all field widths are those
of the original design. The task count and FIFO depth are this
implementation's choices. Eight regions cover mixes of up to five tasks
plus extra regions for shared code.

After coarse synthesis with yosys, the default configuration is about
1,530 word-level cells, 3,435 flip-flops and 656 FIFO memory bits.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_dased_task_filter`   | random addresses against a reference model: task id, `cs`, masking, misaligned and out-of-range errors |
| `tb_dased_fifo`          | 2000 events at one per four instructions with a 4:1 clock ratio, all arrive in order with no overflow; a burst with the reader stopped keeps exactly 16 entries and reports the rest as overflow |
| `tb_dased_profile_cache` | lookup on Tag+Offset, priority, range tests, update and hold, reprogramming clears state |
| `tb_dased_controller`    | 20,000 random events against a sequential reference model of the algorithm above; every flag, count and error report, with one-clock latency |
| `tb_dased_mixes`         | task mixes of 1 to 5 tasks, each reset and reconfigured: clean run, then four faults per task; detection rate and time to detection |
| `tb_dased_top`           | whole detector at default parameters on a five-task preemptive trace: no false errors in a clean run; every injected over- or under-iteration detected with the right loop and kind; address errors one cycle after the fetch; FIFO overflow from a one-instruction loop; counts of every mechanism |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dased_pkg.sv tb/tb_dased_top.sv --top-module tb_dased_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

The whole end-to-end run takes well under a second.

### Detection latency

`tb_dased_mixes` measures the time from the instruction that makes a fault
visible to the `loop_err` report, with the processor at 1 GHz and the
detector at 250 MHz. That instruction is the branch that exceeds the maximum,
or, for a loop that stops short, its final branch. Across all mixes, every injected
fault is reported within 15 to 23 ns. The latency is made up of:

* one instruction, while the event waits for the next address;
* one processor clock in the task filter;
* two to three detector clocks for the pointer crossing;
* one detector clock in the controller.

A loop that stops short is only noticed at the task's next event outside
the loop. In software where that event comes much later, the detection
time grows by that gap. So does a backlog in the FIFO.
