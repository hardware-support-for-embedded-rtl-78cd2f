# Multi-context instruction monitor for an embedded OS

A small embedded processor cannot afford a virus scanner, but it can afford a few hundred
gates of hardware that watch it. This design is such a watcher. The processor reports a 4-bit
hash of every instruction it executes. The monitor walks a *monitoring graph* in lock step: a
deterministic automaton built offline from the program binary, whose states are instruction
positions and whose edges are the successors the program allows. Any instruction whose hash
the current graph state does not allow means the processor is running code that was never
installed. The monitor then resets the processor or interrupts it.

What makes this hard is that the processor does not run one program. It runs an operating
system, several tasks, interrupt service routines and system calls, and it switches between
them at any time. Each has its own graph. The monitor therefore keeps track of which task is
running and where each one stopped in its graph. It switches graphs exactly when the
processor switches context. While it switches, it holds the processor on its *Done* signal, so
no instruction ever goes unchecked.

The structure (monitoring hardware, sequencing logic with group base addresses,
override multiplexer, address pointer, slot address, graph memory, bookkeeping tables,
controller state machine, processor and co-processor interfaces) follows a published FPGA
prototype built around a soft processor and a small real-time OS. The graph-entry layout, the
register maps, the state sequence and most widths are this design's own. The section
[Where this design fills gaps](#where-this-design-fills-gaps) lists them.

## Graph memory and the graph entry

Graphs live in one memory, `graph_mem`, with 65,536 entries of 36 bits. Each graph occupies a
contiguous *slot*. Positions inside a graph are graph-relative 16-bit pointers, and the memory
is read at `slot address + pointer`. One slot holds the OS graph. Every other slot holds one
application graph.

Every entry is 36 bits (`hwmon_pkg::graph_entry_t`):

| bits    | field        | meaning |
|---------|--------------|---------|
| 35:32   | `call_group` | 0: ordinary instruction. 1..15: a system call into OS function group *n* |
| 31:16   | `accept`     | one-hot set of the hashes allowed for the *next* instruction |
| 15:0    | `next_ptr`   | position of the successor for the lowest accepted hash |

An entry that accepts *k* hashes has *k* successors. They sit in consecutive entries from
`next_ptr`, in ascending hash order. The successor for hash *h* is therefore

    next = next_ptr + popcount(accept & ((1 << h) - 1))

`hash_check` computes the one-hot code (hash *h* sets bit *h*, so hash 3 is `16'h0008`). It
also computes the match and the popcount ("rank"). `seq_logic` adds the rank to `next_ptr`.
The memory has a registered read address. `addr_path` therefore gives it the address the
pointer and slot registers will hold after the coming edge. The entry for the next
instruction is ready one cycle later. One instruction can be checked per cycle.

36 bits per entry fits the prototype's graphs exactly. Its OS graph has 23,625 entries in
850,500 bits, and the four benchmark graphs also have exactly 36 bits per entry. The
65,536-entry memory holds the OS graph and all four benchmark graphs together (61,182
entries).

### The OS graph and its groups

The OS graph is a single slot that contains the graphs of its functions one after another:
the interrupt service routine, the system calls and so on. `group_base_table` holds 16 start
positions, one per *group*. Group 0 is the interrupt service routine. When an application
entry has a non-zero `call_group`, the next instruction is the first one of that OS function.
The monitor then moves to the OS slot at `group_base[call_group]`. The end-to-end test uses
groups starting at 0x0000, 0x0005 and 0x001b.

## Following context switches

`monitor_ctrl` holds the running PID and the active graph (a task's own graph, or the OS
graph). It also records whether the ISR is being monitored. Its bookkeeping is in
`bookkeeping`:

* **slot table**, per graph ID (GID): resident flag and slot start address;
* **task table**, per PID: valid, GID, saved position in the task's graph (`uptr`), and,
  for a task interrupted inside OS code, a flag and the saved OS position (`in_os`, `optr`).

There are three kinds of switch. Each one starts after a matched instruction (or a command)
and holds Done low for `CTX_SWITCH_CYCLES` (12) cycles. In that time the controller
saves, looks up, overrides the address pointer, loads the slot address, and waits.

| trigger | what is saved | where monitoring continues |
|---|---|---|
| **Interrupt.** The IRQ line goes to the processor and to the monitor. A rising edge marks an interrupt pending. The switch starts after the next matched instruction, the last one the processor retires before entering the ISR. | position after that instruction: `uptr` in a task, or `optr` with `in_os` set inside OS code | ISR group of the OS graph |
| **System call.** A matched entry with `call_group != 0`. | caller's return position (`uptr`) | `group_base[call_group]` in the OS graph |
| **Scheduler.** The OS writes the PID it resumes. | nothing. The OS context is transient. | `optr` in the OS graph if `in_os` was set (the mark is cleared), else `uptr` in the task's graph |

A system call returns through the scheduler command: the OS writes the caller's PID when it
hands the processor back. A task interrupted in the middle of a system call is resumed inside
the system call. The next scheduler command for that PID then returns it to its own graph.

IRQ edges are ignored in two cases: while the processor has disabled interrupts through the
status register, and while the ISR graph itself is active, because the processor masks
interrupts on exception entry.

### Timing of an interrupt

The 12-cycle switch is sized for a processor that needs 6 cycles to enter an interrupt.
Such a processor stalls 6 extra cycles per interrupt, the overhead measured on the
prototype:

    cycle   T      T+1 .. T+6        T+7 .. T+12         T+13
    cpu     last   interrupt entry   ISR instr 1, held   ISR instr 1 accepted
    Done    1      0                 0                   1

The end-to-end test checks exactly 6 stall cycles on every interrupt. Scheduler and
system-call switches take the same 12 cycles. A processor that switches faster than that
is stalled on its next instruction.

### Graph loading

`CREATE {pid, gid}` binds a PID to a GID. If the slot table does not mark that graph
resident, the monitor raises a load request, readable by the secure loader at co-processor
address 0x80030, and holds Done low. When the loader has written the graph and then its slot
row with the resident bit, Done goes high again. The ISR's group of the OS graph is assumed
to be resident before the first task starts.

## Violations

* **In OS code** (ISR, system call, scheduler path): `reset_flag` is high for `RESET_CYCLES`
  (16) cycles. After that the monitor is disarmed until the next scheduler command.
* **In an application**: `interrupt_flag`, the recovery interrupt, stays high until the OS
  issues its next command. Typically the OS kills the task (`DELETE`) and schedules another.
* A scheduler switch to a PID with no valid task row is treated as an OS fault (reset).

After reset the monitor is disarmed: Done is high and nothing is checked. The first scheduler
command arms it.

## Interfaces

Processor side (`hw_monitor`). An instruction is checked in a cycle where `instruction_valid`
and `monitor_ready_flag` (Done) are both high. While Done is low the processor must hold
the instruction. `instruction_hash_onehot` and `accepted_hash_one_hot` show the comparison.
The accepted set is shown only in a cycle where an instruction is checked, and is 0 otherwise:
with no instruction reported, during a switch, and while disarmed. The `ev_*` outputs are one-cycle pulses for counters.

Main processor bus (`cpu_if`): 2-bit word address, 32-bit data, `waitrequest`. A command write
is held until the controller takes it. The processor therefore cannot run past a switch it
has announced.

| word | write | read |
|---|---|---|
| 0 | CREATE: `gid` in [11:8], `pid` in [7:0] | 0 |
| 1 | SWITCH: `pid` in [7:0] | 0 |
| 2 | DELETE: `pid` in [7:0] | 0 |
| 3 | bit 0: ignore IRQ strobes | `{cur_pid[15:8], reset[5], recovery[4], armed[3], in_os[2], done[1], irq_disable[0]}` |

Co-processor bus (`crypto_if`): 20-bit word address, 32-bit data, no wait states.

| address | write |
|---|---|
| 0x00000 + a | graph entry *a*: bits [31:0] from the data, [35:32] from the high-bits register |
| 0x80000 + g | group base *g* (data [15:0]) |
| 0x80010 + gid | slot row: data[31] resident, data[15:0] slot start |
| 0x80020 | high-bits register (data [3:0]) |
| 0x80030 | (read) load request: `{request[31], gid[3:0]}` |

## Parameters

| parameter | default | note |
|---|---|---|
| `ADDR_W` | 16 | graph memory of 2^16 x 36 bits |
| `NUM_GIDS` | 16 | slot-table rows |
| `NUM_PIDS` | 64 | task-table rows, the task limit of the OS the prototype ran |
| `OS_GID` | 0 | GID of the OS graph |
| `CTX_SWITCH_CYCLES` | 12 | Done-low cycles per switch |
| `RESET_CYCLES` | 16 | length of the reset request |

The hash width (4), the number of groups (16) and the entry layout are in `hwmon_pkg`.

## Where this design fills gaps

Taken from the prototype's description: per-instruction checking of a 4-bit hash with one-hot
comparison, 36-bit entries, graph slots with GID-to-slot association, PID-to-GID
bookkeeping, a group base table of 16 entries, and the override multiplexer, address pointer
and slot-address adder. Also taken: the IRQ shared by processor and monitor, the register
that makes the monitor ignore IRQs, system-call graphs found through a field of the calling
entry, the scheduler forwarding the next PID, stalling through Done, loading a non-resident
graph on task creation, reset for violations in the ISR, and 6 extra stall cycles per
interrupt.

This design's own choices:

* the split of the 36 bits into `call_group`, `accept`, `next_ptr`, and the ordered-successor
  rule;
* reading the group base table as the start positions of OS functions inside the OS slot,
  with group 0 as the ISR. The prototype's description gives each system call a graph ID of
  its own and a slot found through the bookkeeping tables. Here all OS functions share the OS
  slot and are told apart by group. A system call therefore never needs a graph load, and its
  switch stalls for the same 12 cycles as any other;
* memory depth (65,536), pointer width (16), table sizes (16 GIDs, 64 PIDs);
* the state sequence of a switch and its length of 12 cycles, chosen to give the 6-cycle stall;
* the switch starting after the first instruction matched once the IRQ is seen, with exactly
  one more instruction of the interrupted code;
* reset request for OS violations and recovery interrupt for application violations, with
  their lengths and clearing;
* system calls returning through a scheduler command, and the saved OS position for tasks
  interrupted inside a system call;
* the DELETE command, both register maps and bus handshakes, the `instruction_valid` strobe,
  and a disarmed state after reset;
* the instruction hash function itself is not part of the monitor. The processor supplies
  `instruction_hash`.

Not included: the processor, its hash unit, and the secure loader (a second processor with an
RSA engine that decrypts graphs from an SD card). The testbenches stand in for them.

## Files and simulation

`rtl/hwmon_pkg.sv` is the package. The top is `rtl/hw_monitor.sv`. Each block has a
self-checking testbench `tb/tb_<module>.sv` that prints `TB_RESULT checks=N failures=M`.
`tb/tb_hw_monitor.sv` runs the whole monitor at its default parameters. Its graphs have the
sizes of the prototype's workload: an OS graph of 23,625 entries and four application graphs
of 11,563, 7,823, 9,055 and 9,116 entries, all resident together. Their contents are random,
because only the sizes are known. The test loads them through the co-processor bus, one of
them on the monitor's request. A processor model then runs 20,000 steps of four tasks,
interrupts (also inside system calls), system calls and round-robin scheduler switches.
After that it tests an ignored IRQ, an attack in an application, and an overwritten first
ISR instruction. That last case uses the values of the prototype's demonstration: the first
ISR entry accepts only hash 11 (`16'h0800`), the injected instruction reports hash 3
(`16'h0008`), and the reset request follows. It counts each mechanism and fails if one never occurred. It runs in well
under a minute.

    verilator --binary --timing --assert -Irtl -y rtl rtl/hwmon_pkg.sv \
        tb/tb_hw_monitor.sv --top-module tb_hw_monitor -o sim
    ./obj_dir/sim

The same command works for every block testbench. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/hwmon_pkg.sv rtl/hw_monitor.sv`. The remaining
warnings are unused package constants, unused bits (part of a bus address, the accept field in
`seq_logic`, the debug pointer outputs of `addr_path`), and the reset net used both by the
flip-flops and by the `disable iff` of the assertions.
