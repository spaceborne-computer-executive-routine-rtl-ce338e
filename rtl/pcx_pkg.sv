// pcx_pkg: types and encodings shared by the process-control nucleus.
//
// The primitive code is the three-bit input {C,B,A} of the expanded transition
// matrix (STOP 000 ... ABORT 111) and the process state is the two-bit
// {E,D} pair (idle 00, ready 01, running 10, waiting 11); both encodings are
// the document's. A third PCB state bit marks a terminated process; the
// document only says that EXIT and ABORT "set state to indicate terminated",
// so the extra bit is this design's choice. The trap-routine numbering and the
// processor state encoding are also this design's own.
package pcx_pkg;

  // Primitive, bits {C,B,A}.
  typedef enum logic [2:0] {
    PRIM_STOP     = 3'b000,
    PRIM_WAKE     = 3'b001,
    PRIM_WAIT     = 3'b010,
    PRIM_CONTINUE = 3'b011,
    PRIM_DISPATCH = 3'b100,
    PRIM_PREEMPT  = 3'b101,
    PRIM_EXIT     = 3'b110,
    PRIM_ABORT    = 3'b111
  } prim_e;

  // Process state, bits {E,D}.
  typedef enum logic [1:0] {
    PS_IDLE    = 2'b00,
    PS_READY   = 2'b01,
    PS_RUNNING = 2'b10,
    PS_WAITING = 2'b11
  } pstate_e;

  // State held in a PCB: terminated flag plus {E,D}.
  typedef struct packed {
    logic    term;
    pstate_e st;
  } pcb_state_t;

  // Control variables of the logic network (Table 6b names).
  typedef struct packed {
    logic x;  // invalid combination: hardware error
    logic f;  // illogical combination: hardware/software error
    logic n;  // state change
    logic g;  // new D when N = 1
    logic h;  // new E when N = 1
    logic y;  // entering "testing w": set the L line
    logic w;  // change the work variable
    logic v;  // 1 = increment, 0 = decrement w
    logic s;  // activate the dispatcher
    logic m;  // 1 = insert, 0 = remove a ready-list entry
    logic t;  // stack EXITI, mark terminated
    logic r;  // stack ABORTI, mark terminated
    logic i;  // check the L line (WAKE on a running process)
    logic j;  // stop this processor
  } ctl_vars_t;

  // Support procedures placed on the trap stack.
  typedef enum logic [2:0] {
    TR_HWFAULT    = 3'd0,
    TR_HSFAULT    = 3'd1,
    TR_INSERT     = 3'd2,
    TR_REMOVE     = 3'd3,
    TR_DISPATCHER = 3'd4,
    TR_EXITI      = 3'd5,
    TR_ABORTI     = 3'd6
  } trap_routine_e;

  // Processor states of the processor state diagram.
  typedef enum logic [2:0] {
    CS_E  = 3'd0,  // executing a process
    CS_S  = 3'd1,  // stopped
    CS_TE = 3'd2,  // trap processing, interrupted process resumes after
    CS_TS = 3'd3,  // trap processing, processor stops after
    CS_TP = 3'd4,  // trap processing, preempted: stops after
    CS_TD = 3'd5   // trap processing, dispatched: executes after
  } cpu_state_e;

  // Operations of the PCB store port.
  typedef enum logic [1:0] {
    PCB_RD_STATE = 2'd0,  // read state and w
    PCB_WR_STATE = 2'd1,  // write state
    PCB_INC_W    = 2'd2,  // w := w + 1, return new w
    PCB_DEC_W    = 2'd3   // w := w - 1, return new w
  } pcb_op_e;

endpackage
