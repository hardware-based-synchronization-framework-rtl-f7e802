# Dynamic Resource Scheduler (DRS) — list-based task synchronisation for a RISC/coprocessor system

A RISC processor that drives hardware processing elements (PEs) across a slow
external link pays a round trip for every task it starts: send the task, wait
for the finish flag. With a link latency in the tens of microseconds, short
hardware tasks spend more time being synchronised than being computed.

The Dynamic Resource Scheduler moves that synchronisation into the
coprocessor. The RISC sends a whole **task list** in one go. The scheduler starts
each task on its PE as soon as two things hold: the PE is idle, and every task
it depends on has finished. Tasks may start out of list order. The scheduler
answers the RISC once, when the whole list has finished. For a chain of `n`
dependent tasks, the link latency is paid once per list instead of once per
task, so its cost per task drops by about a factor of `n`.

This repository holds synthesizable SystemVerilog for the scheduler unit. It
follows the structure and mechanisms of the DRS in *"Hardware-Based
Synchronization Framework for Heterogeneous RISC/Coprocessor Architectures"*,
in the configuration evaluated there: 32-entry task lists, dependencies on all
preceding entries, four PEs. That publication gives the block structure and
behaviour, not RTL. Widths, encodings, the register map, the bus handshake and
the cycle-level sequencing are this implementation's choices. They are listed
under [Departures and choices](#departures-and-choices).

## Why lists pay off

Model the link between RISC and coprocessor as a fixed latency `t_l` per
transfer. The opcode bytes of a task cost almost nothing next to that latency.

**Synchronising every task from the RISC.** Each task costs one transfer to
start it and one to report that it finished. One task therefore takes about
`2·t_l + t_ex`, where `t_ex` is its execution time.

**Sending a list of `n` tasks.** The two transfers are made once for the whole
list. Each task then costs about `2·t_l/n + t_ex`, plus the scheduler's own
synchronisation time. Inside the coprocessor that time is a few bus cycles.

**Example.** On one embedded system, the link latency was measured at about
14 µs. At a 100 MHz coprocessor clock, `2·t_l` is then about 2800 cycles, and
a short task spends almost all of its time waiting for the link. With a list
of 30 such tasks, that waiting drops to about 1/30 per task.

**This RTL.** The scheduler's own cost is 7 cycles from a PE's response to the
start of the task that waits for it. A chain of 30 one-cycle tasks takes 233
cycles in `tb_drs`, about 7.7 cycles per task.

## Where the scheduler sits

```
 RISC --(slow link)-- control unit --+-- 128-bit system bus --+-- PE 0 .. PE 3
                                      |                        |
                                      +------ DRS (slave) -----+ (master: task start writes)
                                              ^  pe_resp[3:0]  (one pulse per finished task)
                                              v  risc_resp     (task list finished)
```

The RISC (through the coprocessor's control unit) writes task lists into the
DRS slave port. The DRS starts a task by writing the task's 128-bit
address/configuration word to the PE's bus address. A PE reports that it has
finished with a one-cycle pulse on its `pe_resp` line. The bus, the control
unit, the PEs and the memories are not part of this RTL.

## Task list format

Each entry of a list has three parts:

| field | width | meaning |
|---|---|---|
| PE code | `NUM_PE` | one-hot code of the PE that runs the task; all zero = entry without PE |
| dependency bits | `DEP_DEPTH` | bit `k-1` set: this task waits for the entry `k` positions above it |
| address/configuration | 128 | written to the PE to start the task (read/write addresses, PE settings) |

Dependencies are relative. The software that builds the list has already
resolved read-after-write, write-after-read and write-after-write conflicts into
these bits, so the hardware compares no addresses. Example, four image tasks
plus an empty last entry, with a dependency window of 3:

| entry | -1 | -2 | -3 | PE |
|---|---|---|---|---|
| hough_transform | 0 | 0 | 0 | 0001 |
| labeling | 0 | 0 | 0 | 0010 |
| vehicle_detection | 1 | 0 | 0 | 0100 |
| line_detection | 0 | 0 | 1 | 1000 |
| (empty) | 0 | 0 | 0 | 0000 |

`hough_transform` and `labeling` start at once, on different PEs.
`vehicle_detection` starts when `labeling` finishes. `line_detection` starts
when `hough_transform` finishes, which may be after `vehicle_detection`.

**Bridging entries.** If the hardware's dependency window `DEP_DEPTH` is
shorter than a needed dependency, software inserts a bridging entry. This
entry has no PE. It depends on the far task and is itself depended on by the
later tasks. An entry with no PE never uses the bus. It is marked finished as
soon as its own dependencies are met, so it carries the dependency forward at
no cost. The empty last entry in the example is the same thing, with no
dependencies.

A dependency bit that reaches above the first entry of a list counts as met.
The previous list has always finished before a new one starts.

## How a list moves through the unit

```
             +-------------------------- drs ---------------------------+
 slave  ---> | drs_bus_if --upload--> drs_task_list  (shadow | execute) |
 port   <--- |    ^   |                  | PE codes, dep bits (regs)   |
             |    |   |                  | config words (drs_cfg_sram) |
             |    |   +--tx-- drs_exec_ctrl <-- state, busy --+        |
 master <--- |    |             | start / finish-empty        |        |
 port        |    +--status-- drs_register_file <-- pe_fin --+        |
 pe_resp --> |                    (task state, PE busy,  drs_resp_ctrl |
 risc_resp<- |                     response config)     (list_done)   |
             +----------------------------------------------------------+
```

1. **Upload.** Each entry's descriptor and configuration word is written into
   the *shadow* buffer. A *commit* write then gives the list's length. Entries
   at and after the length are "no task".
2. **Activation.** When no list is executing and the shadow buffer holds a
   committed list, the two buffers swap (a bank pointer flips). In the same
   clock cycle the register file sets every entry of the new list to
   *waiting*. Activation needs no host action. The next list can therefore be
   uploaded while the current one runs, and it starts the cycle after the
   current one finishes. This double buffering hides most of the upload time.
3. **Execution** (`drs_exec_ctrl`, below).
4. **Responses.** `drs_resp_ctrl` registers all PE response pulses in the same
   cycle. The register file then marks the task that was running on each
   responding PE *finished* and the PE *idle*.
5. **Completion.** When no entry is *waiting* or *running*, `list_done` pulses.
   The list is retired and the completed-list counter advances. If the
   response is enabled, the `risc_resp` flag is set. It stays set until the
   host acknowledges it.

PE codes and dependency bits are kept in flip-flops, because every entry's
conflicts are checked at once. The 128-bit configuration words sit in a
two-bank SRAM. Only the word of the task being started is ever read.

## Conflict analysis and task start (the core of the unit)

Each cycle, `drs_exec_ctrl` computes a *ready* bit for every entry of the
executing list, in parallel. Entry `i` is ready when all of these hold:

* its state is *waiting*;
* for every set dependency bit `k-1`, entry `i-k` is *finished* (or `i-k < 0`);
* its PE code is non-zero and that PE is idle.

For an entry with no PE, the same test without the PE condition drives
`nop_fin[i]`. That entry becomes *finished* at the next clock edge.

Tasks are started by a four-state sequence:

| state | action |
|---|---|
| ANALYZE | register the ready vector |
| SELECT | choose the lowest ready list position; pulse `start`: entry goes to *running*, PE goes to *busy*. If nothing is ready, go back to ANALYZE |
| READ | read the entry's configuration word from the SRAM |
| ISSUE | present the task to the bus interface until the bus grants it, then return to ANALYZE |

Only this controller makes an entry *running* or a PE *busy*, and it starts
one task at a time. A ready vector that is one cycle old can therefore only
miss a task that has just become ready. It can never start a task that is not
ready.

Out-of-order execution comes from the selection rule. A later task whose
dependencies and PE are free starts before an earlier task that is still
blocked.

**Timing.** The scheduler's description gives 10 clock cycles to synchronise
dependent tasks. In this design, with a bus that grants at once, it takes
7 cycles:

* the PE pulses its response;
* the pulse is registered (1) and the task is marked finished (2);
* the ready vector is registered (3), the dependent task is selected (4) and
  its word is read (5);
* the write is presented (6) and accepted (7).

The sequence can add one cycle if the controller is between ANALYZE and
SELECT. Bus wait states add directly to this time. While a list has ready
tasks, tasks start at most once every four cycles.

## Interfaces of `drs`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `s_we`, `s_re` | in | 1 | slave write / read strobe (single-cycle) |
| `s_addr` | in | 16 | slave word address |
| `s_wdata` | in | 128 | slave write data |
| `s_rdata`, `s_rvalid` | out | 128, 1 | read data, valid one cycle after `s_re` |
| `m_req` | out | 1 | task start write pending |
| `m_addr` | out | 32 | `PE_BASE + pe * PE_STRIDE` |
| `m_wdata` | out | 128 | the task's address/configuration word |
| `m_gnt` | in | 1 | grant; the write completes in a cycle with `m_req && m_gnt` |
| `pe_resp` | in | `NUM_PE` | one-cycle finish pulse per PE (pulses from idle PEs are ignored) |
| `risc_resp` | out | 1 | a list finished (if enabled), held until acknowledged |

While `m_req` waits for `m_gnt`, the address and data do not change. An
assertion in `drs_bus_if` checks this.

Slave register map (word addresses):

| address | access | content |
|---|---|---|
| `0x0000 + i` | W | descriptor of shadow entry `i`: bits `[NUM_PE-1:0]` PE code, bits `[64 +: DEP_DEPTH]` dependency bits |
| `0x1000 + i` | W | address/configuration word of shadow entry `i` |
| `0x2000` | W | commit: bits `[15:0]` = number of entries |
| `0x2001` | R/W | bit 0: RISC response enable |
| `0x2002` | W | acknowledge: clears `risc_resp` |
| `0x2003` | R | bit 0 list executing, bit 1 shadow list loaded, bit 2 `risc_resp`, bits `[16 +: NUM_PE]` PE busy, bits `[63:32]` completed lists |
| `0x3000 + i` | R | bits `[1:0]` state of executing entry `i` (0 none, 1 waiting, 2 running, 3 finished) |

Host sequence per list:

1. Poll status until bit 1 is clear.
2. Write the descriptors and configuration words.
3. Write the commit.

Writes to the shadow buffer while bit 1 is set are ignored.

Parameters of `drs`: `LIST_LEN` (32), `DEP_DEPTH` (31, all preceding
entries), `NUM_PE` (4), `PE_BASE`, `PE_STRIDE`. The sizes can be changed:

* the register map allows up to 4096 entries;
* the descriptor format allows up to 64 PEs and 64 dependency bits.

The parallel dependency check grows as `LIST_LEN × DEP_DEPTH`.

## Files

| file | content |
|---|---|
| `rtl/drs_pkg.sv` | task state type, bus widths, register map |
| `rtl/drs.sv` | the scheduler unit (top) |
| `rtl/drs_bus_if.sv` | slave decode and read mux, master port |
| `rtl/drs_task_list.sv` | shadow/execute buffers, activation |
| `rtl/drs_cfg_sram.sv` | configuration word memory (1 write, 1 synchronous read port) |
| `rtl/drs_register_file.sv` | task states, PE busy, response configuration and flag |
| `rtl/drs_exec_ctrl.sv` | parallel conflict analysis, task selection and start |
| `rtl/drs_resp_ctrl.sv` | PE response scan, list completion |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_drs` end to end |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/drs_pkg.sv tb/tb_drs.sv --top-module tb_drs -o sim
./obj_dir/sim
```

Replace `tb_drs` with `tb_drs_exec_ctrl`, `tb_drs_register_file`, etc. for the
unit tests. The unit testbenches use small lists (8 entries). `tb_drs` runs the
unit at its default size. It has three roles:

* **host:** uploads lists, keeps the next list in the shadow buffer,
  acknowledges responses and reads status;
* **bus:** grants at once, or after random waits;
* **PEs:** four behavioural PEs that stay busy for the cycle count in bits
  `[15:0]` of the configuration word.

`tb_drs` runs these lists:

* the example list above;
* the same list with a bridging entry for a window of 2;
* a chain of 30 dependent short tasks, on which it measures the synchronisation
  time;
* eleven random lists.

A scoreboard checks every start write:

* correct PE and configuration word;
* no task started twice;
* dependencies finished;
* PE idle;
* lists kept in order.

It also counts each mechanism and fails if one never happened: shadow upload
during execution, automatic activation, dependency stall, resource stall,
out-of-order start, parallel PEs, bridging and empty entries, bus wait, and
RISC response. It runs in well under a second.

`tb_drs_sizes` builds the unit with 16-, 64- and 128-entry lists (dependency
windows 16, 64, 64) through the harness `tb/drs_env.sv`. It runs random
double-buffered lists on each, checked by the same scoreboard.

## Departures and choices

Taken from the original description:

* the block structure (bus interface; shadow/execute task list; register file
  with responses, resources and task status; task controller made of an
  execution controller and a response controller);
* the four task states;
* PE codes and dependencies kept in registers, configuration words kept in
  SRAM;
* one-hot PE codes and relative dependency bits;
* parallel analysis of all entries;
* automatic activation of the shadow list;
* one response to the RISC per list;
* the default sizes.

Chosen here, where the description is silent:

* **One configuration word per task.** Each task has one 128-bit
  address/configuration word, the width of the system bus. It is sent to the PE
  as one bus write.
* **List end.** The end of a list is given by a commit write with its length.
* **Handshakes.** PE responses are one-cycle pulses. `risc_resp` is a flag that
  stays set until the host clears it, gated by an enable bit.
* **Bus ports.** The bus protocol is a plain request/grant master and a
  single-cycle register slave. The real system bus is a 128-bit multi-layer bus
  whose protocol is not given.
* **Entries without a PE.** They are retired inside the scheduler, without a
  bus transfer.
* **Selection.** The controller picks the lowest ready list position and starts
  one task at a time.
* **Register map and counter.** The register map and the completed-list counter
  are this design's own.

Behaviour that differs from the published figures:

* **Task storage size.** The published unit uses 20 KB of block RAM for task
  storage, at every list size. This suggests a wider per-task record than the
  single 128-bit word used here. Here, two 32-entry buffers of 128-bit words
  take 1 KB. Widen `BUS_DW`, or change the word format, if a PE needs more
  start data.


* **Synchronisation time.** It is 7 cycles, against the published 10, because
  the bus model here has no arbitration delay.
* **Start rate.** Task starts are serialised: at most one every four cycles.
  The published unit's start rate is not given.

Not included:

* the PEs (2D FIR filter, thresholding, labeling, Hough transform);
* the system bus and its arbiter;
* the control unit;
* internal and external memories and their interfaces;
* the RISC.

The software layer that builds the lists is not included either. It tracks
data objects, derives dependency bits, sorts tasks and inserts bridging
entries. In `tb_drs`, the testbench plays its role.
