# Hardware process control for a multiprocessor executive

An executive routine spends much of its time moving processes between
states: waking them, stopping them, making them wait, dispatching them to a
processor, taking a processor back. This design takes that bookkeeping out of
software. Every process state change is one of eight primitive instructions.
A primitive is decided by a small sum-of-products network and carried out by
a fixed sequencer next to each processor. The sequencer reads and writes the
process's state in its process control block (PCB). What stays in software is
policy: keeping the ready list, choosing which process runs where, and
handling faults. The hardware reaches that software through a FIFO *trap
stack* that is served by one designated *trap processor*. The original
estimate is a couple of hundred gates per machine. It is set against about
490 words of executive code, and against roughly ten memory cycles per
primitive instead of several hundred.

The RTL is SystemVerilog and synthesizable. It is parameterised for
`NCPU` processors (default 3) and `NPROC` processes (default 16).

## Processes, primitives and the work variable

A process is in one of four states, held in two bits `ED` of its PCB:

| state   | ED |
|---------|----|
| idle    | 00 |
| ready   | 01 |
| running | 10 |
| waiting | 11 |

A terminated bit marks a process that has exited or been aborted.

The primitives are coded `CBA`:

| primitive | CBA | object | effect |
|---|---|---|---|
| STOP     | 000 | own process  | running: `w := w-1`; if `w` is now 0 the process goes idle and its processor stops, otherwise it loops back to its start entry |
| WAKE     | 001 | named        | `w := w+1`; idle becomes ready |
| WAIT     | 010 | own process  | running becomes waiting; the processor stops |
| CONTINUE | 011 | named        | waiting becomes ready |
| DISPATCH | 100 | named (privileged) | ready becomes running on a named processor |
| PREEMPT  | 101 | a processor (privileged) | running becomes ready; the processor stops |
| EXIT     | 110 | own process  | running becomes terminated; the processor stops |
| ABORT    | 111 | named        | any state becomes terminated |

`w`, the *work variable*, counts WAKEs that have not been serviced. A process
is written as a loop. Each STOP at the end of a pass consumes one WAKE. While
work is queued the process goes straight round again, without a trip through
the dispatcher. That decision, "test w after STOP", is the only one that
depends on data rather than on state. It is called the *Testing w* state,
and the next section returns to it.

Any other combination of primitive and state is an error:

* X (invalid): a hardware error, such as STOP on a process that is not running. It stacks HWFAULT.
* F (illogical): a software error, such as CONTINUE on a process that is not waiting. It stacks HSFAULT.

Both stop the processor. A primitive aimed at a terminated process is treated
as F.

## The logic network (`pc_logic_network`)

The network has 14 outputs. Each is a function of the five bits
`A B C D E`. Minterm number = A + 2B + 4C + 8D + 16E, and `'` is complement:

```
X = A'C'E' + AB'CE' + A'B'CD' + A'BE' + A'DE + B'CDE   invalid
F = BC'E' + ABC'D'                                     illogical
N = D'E' + B + C                                       state changes
G = C'E' + B'CE + BC'                                  new D
H = B'D + A'C'                                         new E
Y = A'B'C'                                             enter Testing w (raise L)
W = B'C'                                               change w
V = AC'                                                +1 (else -1)
S = C'D'E' + BDE' + BD'E + BC'                         ready list changes
M = C'E' + C'D                                         INSERT (else REMOVE)
T = A'CD'                                              EXIT: stack EXITI
R = ABC                                                ABORT: stack ABORTI
I = AC'D'E                                             WAKE of a running process: check L
J = CD'E + BD'E                                        stop the processor
```

The network is gated by a flip-flop:

* A start pulse `P` sets the flip-flop and enables the outputs.
* `P'` (the `ready` output) follows `SETTLE_CYCLES` clocks later and stands
  for the network's propagation delay.
* `R` (`net_reset`) clears the flip-flop.

The sequencer writes three values back into the held outputs:

* After a STOP finds `w = 0`: S, N, J := 1 and state := idle.
* After it finds `w > 0`: S, N, J := 0.
* J := 0 when a process aborts another process.

Two expressions differ from the printed originals:

* **W.** The printed expression would also change `w` on CONTINUE, which the
  work-variable rules forbid. `W = B'C'` follows the rules.
* **I.** It is true only for WAKE of a running process, as the output table
  has it.

## The control sequence (`pc_sequencer`)

Each processor has its own machine. The outputs take precedence in the order
X F I Y W V N G H S M T R J. The machine walks a fixed list of steps, and
each step is skipped when its variable is 0:

| step | action |
|---|---|
| 1 | read the object's state from the PCB |
| 2 | start the network, wait for `P'` |
| 3, 4 | X or F: stack HWFAULT or HSFAULT, go to 20 |
| 5 | I and L raised by another machine: wait, then start again at 1 |
| 6 | Y: raise L |
| 7–9 | W: `w := w ± 1` (one atomic PCB operation) |
| 10, 11 | STOP only: `w = 0` gives idle; `w > 0` asks the processor to restart the process |
| 12 | N: write the new state |
| 13–16 | S: stack INSERT (M) or REMOVE, then DISPATCHER |
| 17, 18 | T: stack EXITI; R: stack ABORTI |
| 19 | Y: lower L |
| 20 | X+F+S+T+R: set the trap control line |
| 21 | X+F+J·Z: stop this processor |
| 22 | reset the network; done |

`Z` is 0 when the machine was started by the processor's own state
controller while trap processing. It keeps a PREEMPT or DISPATCH issued by
the trap processor from stopping that processor.

A primitive makes at most 6 memory accesses: 3 to the PCB and 3 pushes on the
trap stack. The bound is 10.

### The Testing w line L and its interlock

* **The race.** A STOP on process *P* decrements and tests `w`. It must not
  interleave with a WAKE of *P* from another processor, or the wake can be
  lost.
* **The original answer.** A single shared line L is raised for the
  duration of the test (steps 6–19). A WAKE of a running process (`I = 1`)
  waits at step 5 while L is up, then re-reads the state.
* **The hole.** One shared line still allows two machines to race between
  the check at step 5 and the set at step 6.
* **The fix in this design.** Two extra lines per machine:
  * `l_pending`: "about to raise L". Other machines treat it as L.
  * `wake_busy`: "passed step 5 with I = 1, has not yet changed w". Other
    machines wait at step 6 while it is up.

  With these, one of the two always sees the other.
* **What stays exposed.** The single-line scheme keeps a known cost: a
  process can go idle and be woken straight back to ready.

### The process lock

L only orders a WAKE against a decrement of `w`. Step 1 (read the state) and
step 12 (store it) are separate accesses, so without more, two machines
working on the same process can both read it and both store it:

* two WAKEs of an idle process would each stack an INSERT;
* two DISPATCHes could both find the process ready and run it twice.

Each machine therefore takes a lock on its object process before step 1. It
holds the lock until its step-12 store is done, or until it goes to wait at
step 5.

* A machine asks with `lock_want` and holds with `lock_hold`.
* The top grants `lock_ok` when no other machine holds that process and no
  lower-numbered machine asks for it in the same cycle.
* A machine never waits for a lock while holding one, so the lock cannot
  deadlock.
* The cost is one clock per primitive.
* Machines working on different processes do not wait for each other.

## PCB state store (`pcb_store`)

A PCB normally lives in main memory. Only the fields the logic uses are held
here, in registers:

* the state bits;
* the terminated bit;
* `w` (`W_WIDTH` bits, saturating, `w_error` on saturation).

**Ports.** The machines share it through round-robin ports. Each access takes
one cycle and is acknowledged the next. `pcb_conflict` shows contention. A
construction port creates a process (idle, with a given `w`), and a monitor
port reads any process's state and `w`. Software can sample `w` as a measure
of backlog.

## Trap stack and trap designation (`trap_stack`, `trap_control`)

**Trap entries.** Whatever needs software, the machines push an entry
`{routine, processor, process}` onto a FIFO of `TRAP_DEPTH` entries. The
routines are:

* HWFAULT and HSFAULT;
* INSERT and REMOVE;
* DISPATCHER;
* EXITI and ABORTI.

**Which processor serves them.**

* Pushing sets the trap control line TCL. TCL stays up until the stack is
  empty.
* Exactly one processor holds the trap designator bit TDR. At an
  instruction boundary it ANDs TCL with TDR and enters a trap state.
* Only that processor, in a trap state, may pop.
* The dispatcher can move the designation with `tds_valid`/`tds_cpu`. The
  trap processing line TPL (any processor in a trap state) then keeps the
  newly designated processor out until the old one returns. This keeps the
  stack in FIFO order.

**Full stack and lock-out.**

* A push in the same cycle as a pop is held off (`trap_lockout`).
* Pushes wait while the stack is full.

## Processor states and the d / p lines (`cpu_state_ctl`, `pd_lines`)

A processor is executing (`e`) or stopped (`s`). Each of these has trap
companions:

* `te`: will resume its process afterwards.
* `ts`: will stop afterwards.
* `tp`: preempted while trap processing; stops afterwards.
* `td`: dispatched while trap processing; starts the process afterwards.

Events are recognised at instruction boundaries, in the order p, d, TCL·TDR.
Return from trap (`rft`) is taken at once:

| event    | e  | te | s | ts | tp | td |
|----------|----|----|---|----|----|----|
| d        | –  | –  | e | td | td | –  |
| p        | s  | tp | – | –  | –  | tp |
| rft      | –  | e  | · | s  | s  | e  |
| TCL·TDR  | te | ·  | ts| ·  | ·  | ·  |

In the table, – is illegal (`cpu_illegal`) and · means nothing happens. At
`rft`, if TCL·TDR is still 1, te and td go to te, and ts and tp go to ts.
Work left on the stack is served without a break.

**DISPATCH and PREEMPT.** These are privileged: only a processor in a trap
state may execute them, and anywhere else they are illegal (`pd_illegal`).
They raise the d or p line of the named processor, which may be the issuer
itself. When that processor recognises the line, it:

* acknowledges it;
* pulses `dispatch_cycle` (load registers, return address) or
  `preempt_cycle` (save registers) to the processor;
* starts the DISPATCH or PREEMPT primitive on its own machine.

A processor dispatched while in a trap state runs its dispatch cycle at
return from trap. Step 21 of a machine ("stop this processor") moves `e` to
`s`.

## Breakpoints (`breakpoint_unit`)

Each dispatched process may carry an instruction breakpoint address and an
operand breakpoint address. Both are loaded during the dispatch cycle. In
debug mode:

* A fetch at the first address traps to `BPA_TRAP_ADDR`.
* An operand access at the second traps to `BPO_TRAP_ADDR`.

The trap request comes one cycle after the address. If both match in the
same cycle, the instruction breakpoint wins.

## Top level (`pcx_top`)

`pcx_top` connects:

* per processor: a sequencer (with its network), a state controller and a
  breakpoint unit;
* shared: the PCB store, trap stack, trap control and d/p lines;
* the L line: the OR of every machine's share;
* the grant logic of the process lock.

Everything a processor, the memory or the support software would drive is a
port. The ports are grouped, and each group is explained at the top of the
file:

* primitives;
* DISPATCH/PREEMPT;
* processor events;
* trap stack;
* designation;
* construction and monitoring;
* breakpoints.

A machine takes requests from its processor's state controller before
requests from the instruction stream.

## Files

| file | contents |
|---|---|
| `rtl/pcx_pkg.sv` | encodings and shared types |
| `rtl/pc_logic_network.sv` | control-variable network |
| `rtl/pc_sequencer.sv` | control sequence, L interlock, process lock |
| `rtl/pcb_store.sv` | process state and `w` |
| `rtl/trap_stack.sv` | FIFO trap stack, TCL, lock-out |
| `rtl/trap_control.sv` | TDR, TDS, TPL |
| `rtl/cpu_state_ctl.sv` | processor state matrix |
| `rtl/pd_lines.sv` | dispatch and preempt lines |
| `rtl/breakpoint_unit.sv` | breakpoint compare |
| `rtl/pcx_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_pcx_top \
    rtl/pcx_pkg.sv rtl/*.sv tb/tb_pcx_top.sv -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_pcx_top` with any other testbench name.

**`tb_pcx_top`** runs the whole design at its default size. It plays the
processes, the support software and the processors' instruction streams:

* Its software keeps a ready list. It dispatches to stopped processors, or
  to itself, and preempts when no processor is free.
* A reference model of every PCB is checked after each primitive of the
  directed phase, together with the exact trap entries popped and the
  stop, restart and fault pulses.
* A random phase then runs all processors at once, often on the same
  processes. It checks that `w` never wraps, that the ready list holds only
  ready processes, and that no running process sits on two processors.
* It counts about thirty mechanisms and fails if any of them never
  occurred, among them every trap routine, every processor state, an L
  stall, stack full and lock-out, a PCB conflict, a designation move with
  TPL hold-off, both breakpoints and both illegal cases.

The unit testbenches compare each block with a model of their own. The
logic network is checked for all 32 input combinations against the state
rules, not against the equations.

## Limits and departures

* **Outside the RTL.** The processor, main memory and the support procedures
  are not included. The processor side covers decode, the register
  save/restore of the dispatch and preempt cycles, and the mapping of a
  trap routine to an entry address. The support procedures are HWFAULT,
  HSFAULT, INSERT, REMOVE, DISPATCHER, EXITI and ABORTI.
* **Debugging primitives.** SUSPEND/RELEASE and the suspended states are not
  implemented. They sit outside the eight-primitive encoding.
* **Trap stack.** It is a register FIFO, not a list in main memory. Its
  entries name a routine rather than holding an address.
* **Design choices not in the original.** These are:
  * the L interlock and the process lock;
  * atomic `w` updates;
  * the terminated bit and the treatment of primitives on terminated
    processes;
  * the stop event in the processor state matrix;
  * the event priorities;
  * the reset state (all processors stopped, processor 0 designated);
  * round-robin arbitration.
* **Return addresses.** These belong to the processor and memory. The
  hardware pulses `restart` when a STOP finds more work. It does not copy a
  process's start entry into its return address on a WAKE from idle.
* **Termination.** EXIT and ABORT both leave a process in one terminated
  state. The routine stacked, EXITI or ABORTI, tells the software whether
  to unload the process or to examine it after death first.
* **Faults in the trap processor.** A fault found by a primitive the trap
  processor runs while trap processing is stacked like any other. It does
  not stop that processor. What should happen in that case is open.
* **Abort of a running process.** When a process aborts another that is
  running, the other processor is not stopped by the hardware. The ABORTI
  routine must preempt it.
* **Default sizes.** Process count, stack depth, `w` width and the trap
  addresses are parameters. Their defaults are this design's own.
