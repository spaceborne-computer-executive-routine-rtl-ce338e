// pcx_top: hardware process-control nucleus for a multiprocessor.
//
// Processes are controlled by eight primitives (STOP, WAKE, WAIT, CONTINUE,
// DISPATCH, PREEMPT, EXIT, ABORT) that move a process between the idle,
// ready, running and waiting states and count unserviced WAKEs in its work
// variable w. This top wires, for NCPU processors:
//   * one process-control machine per processor (pc_sequencer with its
//     pc_logic_network), which runs a primitive through the ordered control
//     sequence;
//   * one PCB store (pcb_store) with the state and w of NPROC processes,
//     shared by the machines;
//   * the FIFO trap stack and trap control line (trap_stack), on which the
//     machines place entries for the software support procedures (HWFAULT,
//     HSFAULT, INSERT, REMOVE, DISPATCHER, EXITI, ABORTI);
//   * the trap designator registers and trap processing line (trap_control);
//   * the dispatch and preempt control lines between processors (pd_lines);
//   * one processor state controller per processor (cpu_state_ctl), which
//     turns recognised d/p lines into dispatch/preempt cycles and into
//     DISPATCH/PREEMPT primitives for the machine;
//   * one breakpoint compare unit per processor (breakpoint_unit);
//   * the shared "testing w" control line L, the OR of every machine's share;
//   * the grant logic of the per-process lock (this design's addition), which
//     keeps two machines from updating one process's state at the same time.
// The processors themselves, main memory and the support procedures are
// outside: the ports below are what a processor sees.
//
// Processor-side protocol (per processor k, all active high, synchronous):
//   prim_valid/prim_code/prim_pid, held until prim_ready: a primitive executed
//     by processor k. STOP, WAIT and EXIT act on the processor's own process
//     (cur_pid) and ignore prim_pid. prim_done pulses when its sequence ends.
//   pd_valid/pd_is_d/pd_cpu/pd_pid: a DISPATCH or PREEMPT primitive executed
//     by processor k (legal only while trap processing).
//   boundary: end of an instruction sequence, where d, p and TCL.TDR are
//     recognised; rft: the return-from-trap instruction.
//   trap_pop: the trap processor takes trap_entry off the stack.
//   tds_valid/tds_cpu: the dispatcher designates the trap processor.
// The priority between the two request sources of a machine (the processor
// state controller first) and the reading of trap entries as
// {routine, cpu, pid} are this design's choices.
// Lint note: SYNCASYNCNET on rst_n comes from the submodules' assertions
// ("disable iff" reads the asynchronous reset synchronously); it is intended.
module pcx_top
  import pcx_pkg::*;
#(
  parameter int unsigned NCPU          = 3,
  parameter int unsigned NPROC         = 16,
  parameter int unsigned W_WIDTH       = 8,
  parameter int unsigned TRAP_DEPTH    = 16,
  parameter int unsigned ADDR_W        = 18,
  parameter int unsigned SETTLE_CYCLES = 1,
  localparam int unsigned PID_W        = (NPROC < 2) ? 1 : $clog2(NPROC),
  localparam int unsigned CPU_W        = (NCPU < 2) ? 1 : $clog2(NCPU)
) (
  input  logic               clk,
  input  logic               rst_n,
  // primitives executed by each processor
  input  logic [NCPU-1:0]    prim_valid,
  input  prim_e              prim_code      [NCPU],
  input  logic [PID_W-1:0]   prim_pid       [NCPU],
  output logic [NCPU-1:0]    prim_ready,
  output logic [NCPU-1:0]    prim_done,
  output logic [NCPU-1:0]    restart,        // process loops to its start entry
  output logic [NCPU-1:0]    fault_x,
  output logic [NCPU-1:0]    fault_f,
  // DISPATCH / PREEMPT primitives
  input  logic [NCPU-1:0]    pd_valid,
  input  logic [NCPU-1:0]    pd_is_d,
  input  logic [CPU_W-1:0]   pd_cpu         [NCPU],
  input  logic [PID_W-1:0]   pd_pid         [NCPU],
  output logic [NCPU-1:0]    pd_illegal,
  output logic [NCPU-1:0]    pd_busy,
  // processor state
  input  logic [NCPU-1:0]    boundary,
  input  logic [NCPU-1:0]    rft,
  output cpu_state_e         cpu_state      [NCPU],
  output logic [PID_W-1:0]   cur_pid        [NCPU],
  output logic [NCPU-1:0]    cur_valid,
  output logic [NCPU-1:0]    dispatch_cycle,
  output logic [NCPU-1:0]    preempt_cycle,
  output logic [NCPU-1:0]    trap_enter,
  output logic [NCPU-1:0]    cpu_illegal,
  // trap stack, trap designation
  input  logic [NCPU-1:0]    trap_pop,
  output trap_routine_e      trap_routine,
  output logic [CPU_W-1:0]   trap_cpu,
  output logic [PID_W-1:0]   trap_pid,
  output logic               trap_empty,
  output logic               trap_full,
  output logic               trap_lockout,
  output logic [$clog2(TRAP_DEPTH+1)-1:0] trap_count,
  output logic               tcl,
  input  logic               tds_valid,
  input  logic [CPU_W-1:0]   tds_cpu,
  output logic [NCPU-1:0]    tdr,
  output logic               tpl,
  output logic               l_line,
  output logic [NCPU-1:0]    l_stall,
  // process construction and monitoring of w
  input  logic               con_valid,
  input  logic [PID_W-1:0]   con_pid,
  input  logic [W_WIDTH-1:0] con_w,
  input  logic [PID_W-1:0]   mon_pid,
  output pcb_state_t         mon_state,
  output logic [W_WIDTH-1:0] mon_w,
  output logic               w_error,
  output logic               pcb_conflict,
  // breakpoints (debug mode)
  input  logic [NCPU-1:0]    debug_mode,
  input  logic [NCPU-1:0]    bpa_valid,
  input  logic [ADDR_W-1:0]  bpa            [NCPU],
  input  logic [NCPU-1:0]    bpo_valid,
  input  logic [ADDR_W-1:0]  bpo            [NCPU],
  input  logic [NCPU-1:0]    fetch_valid,
  input  logic [ADDR_W-1:0]  fetch_addr     [NCPU],
  input  logic [NCPU-1:0]    opnd_valid,
  input  logic [ADDR_W-1:0]  opnd_addr      [NCPU],
  output logic [NCPU-1:0]    bp_trap,
  output logic [ADDR_W-1:0]  bp_trap_addr   [NCPU],
  output logic [NCPU-1:0]    bp_is_operand
);

  localparam int unsigned ENTRY_W = 3 + CPU_W + PID_W;

  // PCB store wiring
  logic [NCPU-1:0]    pcb_req, pcb_ack;
  pcb_op_e            pcb_op     [NCPU];
  logic [PID_W-1:0]   pcb_pid    [NCPU];
  pcb_state_t         pcb_wstate [NCPU];
  pcb_state_t         pcb_rstate;
  logic [W_WIDTH-1:0] pcb_rw;

  // trap stack wiring
  logic [NCPU-1:0]    push_valid, push_ready, tcl_set;
  trap_routine_e      push_routine [NCPU];
  logic [PID_W-1:0]   push_pid     [NCPU];
  logic [ENTRY_W-1:0] push_entry   [NCPU];
  logic [ENTRY_W-1:0] pop_entry;
  logic               pop;


  // L line and interlock
  logic [NCPU-1:0] l_hold, l_pending, wake_busy;
  logic [NCPU-1:0] lock_want, lock_hold, lock_ok;

  // Process lock: a machine may start on its object process when no other
  // machine holds that process and no lower-numbered machine asks for it in
  // the same cycle.
  always_comb begin
    for (int unsigned k = 0; k < NCPU; k++) begin
      lock_ok[k] = 1'b1;
      for (int unsigned j = 0; j < NCPU; j++) begin
        if (j != k && pcb_pid[j] == pcb_pid[k] &&
            (lock_hold[j] || (lock_want[j] && j < k)))
          lock_ok[k] = 1'b0;
      end
    end
  end

  // processor state controller wiring
  logic [NCPU-1:0]  p_line, d_line, p_ack, d_ack, trap_active, trap_take;
  logic [PID_W-1:0] d_pid [NCPU];
  logic [NCPU-1:0]  pc_req, pc_z, pc_ack, stop_cpu;
  prim_e            pc_prim [NCPU];
  logic [PID_W-1:0] pc_pid  [NCPU];

  // machine request mux
  logic [NCPU-1:0]  sq_valid, sq_ready, sq_z, sq_self;
  prim_e            sq_prim [NCPU];
  logic [PID_W-1:0] sq_pid  [NCPU];

  assign l_line = |(l_hold | l_pending);

  for (genvar k = 0; k < NCPU; k++) begin : g_cpu
    logic             implied;
    logic [PID_W-1:0] obj_pid;
    logic             unused_busy, unused_went_idle;
    ctl_vars_t        unused_vars;

    // STOP, WAIT and EXIT name no process: they act on the invoker's own.
    assign implied = (prim_code[k] == PRIM_STOP) || (prim_code[k] == PRIM_WAIT) ||
                     (prim_code[k] == PRIM_EXIT);
    assign obj_pid = implied ? cur_pid[k] : prim_pid[k];

    always_comb begin
      if (pc_req[k]) begin
        sq_valid[k] = 1'b1;
        sq_prim[k]  = pc_prim[k];
        sq_pid[k]   = pc_pid[k];
        sq_z[k]     = pc_z[k];
        sq_self[k]  = 1'b1;
      end else begin
        sq_valid[k] = prim_valid[k];
        sq_prim[k]  = prim_code[k];
        sq_pid[k]   = obj_pid;
        sq_z[k]     = 1'b1;
        sq_self[k]  = cur_valid[k] && (cur_pid[k] == obj_pid);
      end
    end
    assign pc_ack[k]     = pc_req[k] && sq_ready[k];
    assign prim_ready[k] = sq_ready[k] && !pc_req[k];

    pc_sequencer #(
      .NPROC(NPROC), .W_WIDTH(W_WIDTH), .SETTLE_CYCLES(SETTLE_CYCLES)
    ) u_seq (
      .clk             (clk),
      .rst_n           (rst_n),
      .req_valid       (sq_valid[k]),
      .req_prim        (sq_prim[k]),
      .req_pid         (sq_pid[k]),
      .req_z           (sq_z[k]),
      .req_self        (sq_self[k]),
      .req_ready       (sq_ready[k]),
      .pcb_req         (pcb_req[k]),
      .pcb_op          (pcb_op[k]),
      .pcb_pid         (pcb_pid[k]),
      .pcb_wstate      (pcb_wstate[k]),
      .pcb_ack         (pcb_ack[k]),
      .pcb_rstate      (pcb_rstate),
      .pcb_rw          (pcb_rw),
      .push_valid      (push_valid[k]),
      .push_routine    (push_routine[k]),
      .push_pid        (push_pid[k]),
      .push_ready      (push_ready[k]),
      .tcl_set         (tcl_set[k]),
      .l_hold          (l_hold[k]),
      .l_pending       (l_pending[k]),
      .wake_busy       (wake_busy[k]),
      .l_others        (|((l_hold | l_pending) & ~(NCPU'(1) << k))),
      .wake_busy_others(|(wake_busy & ~(NCPU'(1) << k))),
      .lock_want       (lock_want[k]),
      .lock_hold       (lock_hold[k]),
      .lock_ok         (lock_ok[k]),
      .done            (prim_done[k]),
      .stop_cpu        (stop_cpu[k]),
      .restart         (restart[k]),
      .went_idle       (unused_went_idle),
      .fault_x         (fault_x[k]),
      .fault_f         (fault_f[k]),
      .l_stall         (l_stall[k]),
      .busy            (unused_busy),
      .vars            (unused_vars)
    );

    assign push_entry[k] = {push_routine[k], CPU_W'(k), push_pid[k]};

    cpu_state_ctl #(.NPROC(NPROC)) u_cpu (
      .clk           (clk),
      .rst_n         (rst_n),
      .boundary      (boundary[k]),
      .p_line        (p_line[k]),
      .d_line        (d_line[k]),
      .d_pid         (d_pid[k]),
      .rft           (rft[k]),
      .trap_take     (trap_take[k]),
      .stop_req      (stop_cpu[k]),
      .state         (cpu_state[k]),
      .trap_active   (trap_active[k]),
      .cur_pid       (cur_pid[k]),
      .cur_valid     (cur_valid[k]),
      .p_ack         (p_ack[k]),
      .d_ack         (d_ack[k]),
      .dispatch_cycle(dispatch_cycle[k]),
      .preempt_cycle (preempt_cycle[k]),
      .trap_enter    (trap_enter[k]),
      .illegal       (cpu_illegal[k]),
      .pc_req        (pc_req[k]),
      .pc_prim       (pc_prim[k]),
      .pc_pid        (pc_pid[k]),
      .pc_z          (pc_z[k]),
      .pc_ack        (pc_ack[k])
    );

    // The breakpoint registers are loaded from the dispatched process's PCB
    // values, presented by the processor during its dispatch cycle.
    breakpoint_unit #(.ADDR_W(ADDR_W)) u_bp (
      .clk         (clk),
      .rst_n       (rst_n),
      .debug_mode  (debug_mode[k]),
      .load        (dispatch_cycle[k]),
      .bpa_valid_in(bpa_valid[k]),
      .bpa_in      (bpa[k]),
      .bpo_valid_in(bpo_valid[k]),
      .bpo_in      (bpo[k]),
      .fetch_valid (fetch_valid[k]),
      .fetch_addr  (fetch_addr[k]),
      .opnd_valid  (opnd_valid[k]),
      .opnd_addr   (opnd_addr[k]),
      .trap        (bp_trap[k]),
      .trap_addr   (bp_trap_addr[k]),
      .is_operand  (bp_is_operand[k])
    );
  end

  pcb_store #(.NPROC(NPROC), .NPORT(NCPU), .W_WIDTH(W_WIDTH)) u_pcb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (pcb_req),
    .op       (pcb_op),
    .pid      (pcb_pid),
    .wstate   (pcb_wstate),
    .ack      (pcb_ack),
    .rstate   (pcb_rstate),
    .rw       (pcb_rw),
    .w_error  (w_error),
    .conflict (pcb_conflict),
    .con_valid(con_valid),
    .con_pid  (con_pid),
    .con_w    (con_w),
    .mon_pid  (mon_pid),
    .mon_state(mon_state),
    .mon_w    (mon_w)
  );

  // Only the designated trap processor, while trap processing, may pop.
  assign pop = |(trap_pop & trap_active & tdr) && !trap_empty;

  trap_stack #(.DEPTH(TRAP_DEPTH), .NPUSH(NCPU), .ENTRY_W(ENTRY_W)) u_stack (
    .clk       (clk),
    .rst_n     (rst_n),
    .push_valid(push_valid),
    .push_entry(push_entry),
    .push_ready(push_ready),
    .tcl_set   (tcl_set),
    .pop       (pop),
    .pop_entry (pop_entry),
    .empty     (trap_empty),
    .full      (trap_full),
    .tcl       (tcl),
    .lockout   (trap_lockout),
    .count     (trap_count)
  );

  assign trap_routine = trap_routine_e'(pop_entry[ENTRY_W-1 -: 3]);
  assign trap_cpu     = pop_entry[PID_W +: CPU_W];
  assign trap_pid     = pop_entry[PID_W-1:0];

  trap_control #(.NCPU(NCPU)) u_trapctl (
    .clk        (clk),
    .rst_n      (rst_n),
    .tds_valid  (tds_valid),
    .tds_cpu    (tds_cpu),
    .tcl        (tcl),
    .trap_active(trap_active),
    .tdr        (tdr),
    .tpl        (tpl),
    .trap_take  (trap_take)
  );

  pd_lines #(.NCPU(NCPU), .NPROC(NPROC)) u_pd (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_valid(pd_valid),
    .cmd_is_d (pd_is_d),
    .cmd_cpu  (pd_cpu),
    .cmd_pid  (pd_pid),
    .src_trap (trap_active),
    .illegal  (pd_illegal),
    .busy     (pd_busy),
    .p_line   (p_line),
    .d_line   (d_line),
    .d_pid    (d_pid),
    .p_ack    (p_ack),
    .d_ack    (d_ack)
  );

endmodule
