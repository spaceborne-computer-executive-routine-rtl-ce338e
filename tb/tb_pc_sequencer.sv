// tb_pc_sequencer: drives one process-control machine through every
// primitive in its valid and invalid states, with a behavioural PCB store
// (acknowledges after a random delay) and a trap stack that accepts entries
// with random back-pressure. For each primitive the expected new state, work
// variable, list of stacked support procedures, trap-control-line request and
// processor stop are written out here by hand from the transition matrix and
// the control sequence. It also checks the L-line wait of a WAKE on a running
// process, the step-6 interlock, that no PCB access starts before the
// process lock is granted (lock_ok is withheld at random), and that one primitive costs no more than
// the document's bound of ten memory cycles (PCB accesses plus stack pushes).
`timescale 1ns/1ps
module tb_pc_sequencer;
  import pcx_pkg::*;

  localparam int unsigned NPROC = 16, W_WIDTH = 8;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_z = 1, req_self = 1;
  prim_e req_prim = PRIM_STOP;
  logic [3:0] req_pid = 0;
  logic req_ready;
  logic pcb_req;
  pcb_op_e pcb_op;
  logic [3:0] pcb_pid;
  pcb_state_t pcb_wstate;
  logic pcb_ack = 0;
  pcb_state_t pcb_rstate;
  logic [W_WIDTH-1:0] pcb_rw;
  logic push_valid, push_ready;
  trap_routine_e push_routine;
  logic [3:0] push_pid;
  logic tcl_set, l_hold, l_pending, wake_busy;
  logic l_others = 0, wake_busy_others = 0;
  logic lock_want, lock_hold, lock_ok = 0;
  int n_lock_wait = 0;
  logic done, stop_cpu, restart, went_idle, fault_x, fault_f, l_stall, busy;
  ctl_vars_t vars;

  pc_sequencer #(.NPROC(NPROC), .W_WIDTH(W_WIDTH), .SETTLE_CYCLES(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // process lock granted at random; no PCB access while still asking, and
  // the lock is held from the grant to the end of the state store
  always @(negedge clk) lock_ok <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n) begin
    if (lock_want && !lock_ok) n_lock_wait++;
    if (lock_want && pcb_req) begin
      failures++;
      $display("FAIL PCB access before the process lock");
    end
    if (pcb_req && !lock_hold) begin
      failures++;
      $display("FAIL PCB access without the process lock");
    end
  end

  // behavioural PCB
  pcb_state_t mst [NPROC];
  logic [W_WIDTH-1:0] mw [NPROC];
  int pcb_cycles;
  logic ack_pending = 0;

  always @(posedge clk) begin
    pcb_ack <= 1'b0;
    if (pcb_req && !pcb_ack && !ack_pending && ($urandom_range(0, 2) != 0)) begin
      ack_pending <= 1'b1;
      pcb_cycles++;
      unique case (pcb_op)
        PCB_RD_STATE: begin pcb_rstate <= mst[pcb_pid]; pcb_rw <= mw[pcb_pid]; end
        PCB_WR_STATE: begin mst[pcb_pid] <= pcb_wstate; pcb_rstate <= pcb_wstate; end
        PCB_INC_W: begin mw[pcb_pid] <= mw[pcb_pid] + 1; pcb_rw <= mw[pcb_pid] + 1; end
        PCB_DEC_W: begin mw[pcb_pid] <= mw[pcb_pid] - 1; pcb_rw <= mw[pcb_pid] - 1; end
      endcase
    end
    if (ack_pending) begin
      pcb_ack <= 1'b1;
      ack_pending <= 1'b0;
    end
  end

  // behavioural trap stack
  trap_routine_e pushed[$];
  logic [3:0] pushed_pid[$];
  int tcl_count, stop_count, restart_count, stall_cycles;
  assign push_ready = push_valid && ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (push_valid && push_ready) begin
      pushed.push_back(push_routine);
      pushed_pid.push_back(push_pid);
    end
    if (tcl_set) tcl_count++;
    if (stop_cpu) stop_count++;
    if (restart) restart_count++;
    if (l_stall) stall_cycles++;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic set_pcb(input int pid, input pstate_e s, input int w, input bit term = 0);
    mst[pid] = '{term: term, st: s};
    mw[pid]  = W_WIDTH'(w);
  endtask

  // Run one primitive and compare everything it did.
  task automatic run(input string name, input prim_e p, input int pid, input bit z, input bit self,
                     input pstate_e exp_st, input bit exp_term, input int exp_w,
                     input trap_routine_e exp_push[$], input bit exp_tcl, input bit exp_stop,
                     input bit exp_restart = 0);
    pushed.delete(); pushed_pid.delete();
    tcl_count = 0; stop_count = 0; restart_count = 0; pcb_cycles = 0;
    @(negedge clk);
    req_valid = 1; req_prim = p; req_pid = 4'(pid); req_z = z; req_self = self;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    chk({name, " state"}, mst[pid].st, exp_st);
    chk({name, " term"}, mst[pid].term, exp_term);
    chk({name, " w"}, mw[pid], exp_w);
    chk({name, " #pushes"}, pushed.size(), exp_push.size());
    for (int k = 0; k < exp_push.size() && k < pushed.size(); k++) begin
      chk({name, " push routine"}, pushed[k], exp_push[k]);
      chk({name, " push pid"}, pushed_pid[k], pid);
    end
    chk({name, " tcl"}, tcl_count, exp_tcl);
    chk({name, " stop"}, stop_count, exp_stop);
    chk({name, " restart"}, restart_count, exp_restart);
    chk({name, " L released"}, l_hold, 0);
    checks++;
    if (pcb_cycles + pushed.size() > 10) begin
      failures++;
      $display("FAIL %s: %0d memory cycles, bound is 10", name, pcb_cycles + pushed.size());
    end
  endtask

  initial begin
    trap_routine_e none[$];
    for (int k = 0; k < NPROC; k++) set_pcb(k, PS_IDLE, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // compute cycle: wake, dispatch, extra wake, stop (loops), stop (idles)
    run("WAKE idle", PRIM_WAKE, 3, 1, 0, PS_READY, 0, 1, '{TR_INSERT, TR_DISPATCHER}, 1, 0);
    run("DISPATCH", PRIM_DISPATCH, 3, 1, 1, PS_RUNNING, 0, 1, none, 0, 0);
    run("WAKE running", PRIM_WAKE, 3, 1, 0, PS_RUNNING, 0, 2, none, 0, 0);
    run("WAKE ready", PRIM_WAKE, 3, 1, 0, PS_RUNNING, 0, 3, none, 0, 0);
    run("STOP w>0", PRIM_STOP, 3, 1, 1, PS_RUNNING, 0, 2, none, 0, 0, 1);
    run("STOP w>0 again", PRIM_STOP, 3, 1, 1, PS_RUNNING, 0, 1, none, 0, 0, 1);
    run("STOP w=0", PRIM_STOP, 3, 1, 1, PS_IDLE, 0, 0, '{TR_REMOVE, TR_DISPATCHER}, 1, 1);
    // invalid and illogical
    run("STOP idle (X)", PRIM_STOP, 3, 1, 1, PS_IDLE, 0, 0, '{TR_HWFAULT}, 1, 1);
    run("CONTINUE idle (F)", PRIM_CONTINUE, 3, 1, 0, PS_IDLE, 0, 0, '{TR_HSFAULT}, 1, 1);
    run("DISPATCH idle (X)", PRIM_DISPATCH, 3, 1, 1, PS_IDLE, 0, 0, '{TR_HWFAULT}, 1, 1);
    // wait / continue
    set_pcb(5, PS_RUNNING, 1);
    run("WAIT", PRIM_WAIT, 5, 1, 1, PS_WAITING, 0, 1, '{TR_REMOVE, TR_DISPATCHER}, 1, 1);
    run("WAKE waiting", PRIM_WAKE, 5, 1, 0, PS_WAITING, 0, 2, none, 0, 0);
    run("CONTINUE", PRIM_CONTINUE, 5, 1, 0, PS_READY, 0, 2, '{TR_INSERT, TR_DISPATCHER}, 1, 0);
    run("CONTINUE ready (F)", PRIM_CONTINUE, 5, 1, 0, PS_READY, 0, 2, '{TR_HSFAULT}, 1, 1);
    // preempt with and without Z
    set_pcb(6, PS_RUNNING, 1);
    run("PREEMPT z=1", PRIM_PREEMPT, 6, 1, 1, PS_READY, 0, 1, none, 0, 1);
    set_pcb(6, PS_RUNNING, 1);
    run("PREEMPT z=0", PRIM_PREEMPT, 6, 0, 1, PS_READY, 0, 1, none, 0, 0);
    // exit and abort
    set_pcb(7, PS_RUNNING, 1);
    run("EXIT", PRIM_EXIT, 7, 1, 1, PS_IDLE, 1, 1, '{TR_REMOVE, TR_DISPATCHER, TR_EXITI}, 1, 1);
    run("WAKE terminated", PRIM_WAKE, 7, 1, 0, PS_IDLE, 1, 1, '{TR_HSFAULT}, 1, 1);
    set_pcb(8, PS_READY, 1);
    run("ABORT ready", PRIM_ABORT, 8, 1, 0, PS_IDLE, 1, 1, '{TR_REMOVE, TR_DISPATCHER, TR_ABORTI}, 1, 0);
    set_pcb(9, PS_RUNNING, 1);
    run("ABORT running self", PRIM_ABORT, 9, 1, 1, PS_IDLE, 1, 1, '{TR_REMOVE, TR_DISPATCHER, TR_ABORTI}, 1, 1);
    set_pcb(10, PS_RUNNING, 1);
    run("ABORT running other", PRIM_ABORT, 10, 1, 0, PS_IDLE, 1, 1, '{TR_REMOVE, TR_DISPATCHER, TR_ABORTI}, 1, 0);
    set_pcb(11, PS_WAITING, 1);
    run("ABORT waiting", PRIM_ABORT, 11, 1, 0, PS_IDLE, 1, 1, '{TR_ABORTI}, 1, 0);
    set_pcb(12, PS_IDLE, 0);
    run("ABORT idle", PRIM_ABORT, 12, 1, 0, PS_IDLE, 1, 0, '{TR_ABORTI}, 1, 0);

    // L line: a WAKE on a running process waits while another machine tests w
    set_pcb(4, PS_RUNNING, 1);
    l_others = 1;
    stall_cycles = 0;
    fork
      run("WAKE under L", PRIM_WAKE, 4, 1, 0, PS_RUNNING, 0, 2, none, 0, 0);
      begin
        repeat (30) @(posedge clk);
        chk("WAKE held while L up", mw[4], 1);
        @(negedge clk) l_others = 0;
      end
    join
    checks++;
    if (stall_cycles < 10) begin
      failures++;
      $display("FAIL L stall lasted only %0d cycles", stall_cycles);
    end

    // step-6 interlock: STOP waits while another machine's WAKE is in flight
    wake_busy_others = 1;
    fork
      run("STOP waits for wake", PRIM_STOP, 4, 1, 1, PS_RUNNING, 0, 1, none, 0, 0, 1);
      begin
        repeat (25) @(posedge clk);
        chk("w untouched during interlock", mw[4], 2);
        chk("L pending during interlock", l_pending, 1);
        @(negedge clk) wake_busy_others = 0;
      end
    join

    checks++;
    if (n_lock_wait == 0) begin failures++; $display("FAIL lock never withheld"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
