// tb_pcx_top: end-to-end test of the process-control nucleus at its default
// size (three processors, sixteen processes, sixteen-entry trap stack).
//
// The testbench plays the parts that are outside the hardware:
//   * the processes: directed code, and later a random agent per processor,
//     execute primitives on the processor they run on;
//   * the support procedures: a software agent runs on whichever processor
//     the trap designator names while it is in a trap state. It pops trap
//     entries, keeps a ready list (INSERT / REMOVE), dispatches ready
//     processes to stopped processors with DISPATCH, preempts a running
//     processor with PREEMPT when none is stopped, kills a process aborted
//     on another processor, moves the trap designation on request and ends
//     each session with return from trap;
//   * the processor instruction stream: random instruction boundaries,
//     fetch and operand addresses for the breakpoint compare.
// A reference model of every process's state and work variable, written
// here from the state tables, is advanced at the end of each primitive (the
// machine's latched request is read through the hierarchy). In the directed
// phase primitives are run one at a time; after each the testbench waits for
// the system to settle and compares every PCB, the trap entries popped, and
// the stop, restart and fault pulses with the model. The random phase runs
// all processors at once, often on the same processes. It checks that w never
// wraps, that the software ready list holds only ready processes, and that no
// running process is held by two processors. A processor whose process left
// the running state with nothing ready to dispatch idles in e. Every mechanism (dispatch and preempt cycles, all trap
// routines, all processor states, L stall, stack full and lock-out, PCB
// conflict, trap designation move and TPL hold-off, breakpoints, illegal
// primitives) is counted and a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_pcx_top;
  import pcx_pkg::*;

  localparam int unsigned NCPU = 3, NPROC = 16, W_WIDTH = 8, TRAP_DEPTH = 16, ADDR_W = 18;
  localparam int unsigned PID_W = 4, CPU_W = 2;

  logic clk = 0, rst_n = 0;
  logic [NCPU-1:0] prim_valid = '0;
  prim_e prim_code [NCPU];
  logic [PID_W-1:0] prim_pid [NCPU];
  logic [NCPU-1:0] prim_ready, prim_done, restart, fault_x, fault_f;
  logic [NCPU-1:0] pd_valid = '0, pd_is_d = '0;
  logic [CPU_W-1:0] pd_cpu [NCPU];
  logic [PID_W-1:0] pd_pid [NCPU];
  logic [NCPU-1:0] pd_illegal, pd_busy;
  logic [NCPU-1:0] boundary = '0, rft = '0;
  cpu_state_e cpu_state [NCPU];
  logic [PID_W-1:0] cur_pid [NCPU];
  logic [NCPU-1:0] cur_valid, dispatch_cycle, preempt_cycle, trap_enter, cpu_illegal;
  logic [NCPU-1:0] trap_pop = '0;
  trap_routine_e trap_routine;
  logic [CPU_W-1:0] trap_cpu;
  logic [PID_W-1:0] trap_pid;
  logic trap_empty, trap_full, trap_lockout, tcl;
  logic [$clog2(TRAP_DEPTH+1)-1:0] trap_count;
  logic tds_valid = 0;
  logic [CPU_W-1:0] tds_cpu = '0;
  logic [NCPU-1:0] tdr;
  logic tpl, l_line;
  logic [NCPU-1:0] l_stall;
  logic con_valid = 0;
  logic [PID_W-1:0] con_pid = '0, mon_pid = '0;
  logic [W_WIDTH-1:0] con_w = '0, mon_w;
  pcb_state_t mon_state;
  logic w_error, pcb_conflict;
  logic [NCPU-1:0] debug_mode = '1, bpa_valid = '1, bpo_valid = '1;
  logic [ADDR_W-1:0] bpa [NCPU], bpo [NCPU], fetch_addr [NCPU], opnd_addr [NCPU];
  logic [NCPU-1:0] fetch_valid = '0, opnd_valid = '0;
  logic [NCPU-1:0] bp_trap, bp_is_operand;
  logic [ADDR_W-1:0] bp_trap_addr [NCPU];

  pcx_top dut (.*);

  always #5 clk = ~clk;

  // Each process's breakpoints, presented during its dispatch cycle.
  for (genvar k = 0; k < NCPU; k++) begin : g_bp
    assign bpa[k] = ADDR_W'(18'h01000 + 18'(cur_pid[k]));
    assign bpo[k] = ADDR_W'(18'h02000 + 18'(cur_pid[k]));
  end

  int checks = 0, failures = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_con = 0, n_dcyc = 0, n_pcyc = 0, n_restart = 0, n_hwf = 0, n_hsf = 0;
  int n_ins = 0, n_rem = 0, n_disp = 0, n_exiti = 0, n_aborti = 0;
  int n_te = 0, n_ts = 0, n_tp = 0, n_td = 0, n_stop = 0, n_retake = 0;
  int n_lstall = 0, n_full = 0, n_lockout = 0, n_conflict = 0, n_tds = 0, n_tpl_hold = 0;
  int n_bpa = 0, n_bpo = 0, n_pd_illegal = 0, n_cpu_illegal = 0, n_term = 0, n_wake_run = 0;
  int n_random_prims = 0;
  bit idle_on [NCPU];
  bit rnd_on = 0;

  function automatic bit in_trap(cpu_state_e s);
    return s == CS_TE || s == CS_TS || s == CS_TP || s == CS_TD;
  endfunction

  always @(negedge clk) if (rst_n) begin
    n_dcyc     += $countones(dispatch_cycle);
    n_pcyc     += $countones(preempt_cycle);
    n_lstall   += $countones(l_stall);
    n_full     += int'(trap_full);
    n_lockout  += int'(trap_lockout);
    n_conflict += int'(pcb_conflict);
    for (int k = 0; k < NCPU; k++) begin
      if (cpu_state[k] == CS_TE) n_te++;
      if (cpu_state[k] == CS_TS) n_ts++;
      if (cpu_state[k] == CS_TP) n_tp++;
      if (cpu_state[k] == CS_TD) n_td++;
      if (tcl && tdr[k] && tpl && !in_trap(cpu_state[k])) n_tpl_hold++;
    end
    chk("no w overflow", !w_error);
  end

  // --------------------------------------------------- reference process model
  logic           m_term [NPROC];
  pstate_e        m_st   [NPROC];
  int unsigned    m_w    [NPROC];

  typedef struct {
    int k; prim_e p; int pid; bit self_; bit z;
    bit stop; bit rst; bit fx; bit ff;
  } op_t;
  op_t ops [$];
  int  popped [$];
  bit  seen_stop [NCPU], seen_rst [NCPU], seen_fx [NCPU], seen_ff [NCPU];

  function automatic int ent(trap_routine_e r, int k, int pid);
    return int'(r) * 256 + k * 16 + pid;
  endfunction

  // Record every finished primitive with the pulses it produced.
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NCPU; k++) begin
      if (stop_cpu_pulse(k)) seen_stop[k] = 1;
      if (restart[k]) seen_rst[k] = 1;
      if (fault_x[k]) seen_fx[k] = 1;
      if (fault_f[k]) seen_ff[k] = 1;
      if (dispatch_cycle[k]) idle_on[k] = 0;
      if (prim_done[k]) begin
        op_t o;
        o.k = k; o.p = seq_prim(k); o.pid = seq_pid(k); o.self_ = seq_self(k); o.z = seq_z(k);
        o.stop = seen_stop[k]; o.rst = seen_rst[k]; o.fx = seen_fx[k]; o.ff = seen_ff[k];
        ops.push_back(o);
        // the processor's own process left the running state: it now idles
        if (o.self_ && !o.rst && o.p inside {PRIM_STOP, PRIM_WAIT, PRIM_EXIT, PRIM_ABORT, PRIM_PREEMPT})
          idle_on[k] = 1;
        seen_stop[k] = 0; seen_rst[k] = 0; seen_fx[k] = 0; seen_ff[k] = 0;
        n_stop += int'(o.stop);
        n_restart += int'(o.rst);
      end
    end
  end

  // Read the machine's latched request (the request itself is not a port).
  function automatic prim_e seq_prim(int k);
    case (k)
      0: return dut.g_cpu[0].u_seq.prim_q;
      1: return dut.g_cpu[1].u_seq.prim_q;
      default: return dut.g_cpu[2].u_seq.prim_q;
    endcase
  endfunction
  function automatic int seq_pid(int k);
    case (k)
      0: return int'(dut.g_cpu[0].u_seq.pid_q);
      1: return int'(dut.g_cpu[1].u_seq.pid_q);
      default: return int'(dut.g_cpu[2].u_seq.pid_q);
    endcase
  endfunction
  function automatic bit seq_self(int k);
    case (k)
      0: return dut.g_cpu[0].u_seq.self_q;
      1: return dut.g_cpu[1].u_seq.self_q;
      default: return dut.g_cpu[2].u_seq.self_q;
    endcase
  endfunction
  function automatic bit seq_z(int k);
    case (k)
      0: return dut.g_cpu[0].u_seq.z_q;
      1: return dut.g_cpu[1].u_seq.z_q;
      default: return dut.g_cpu[2].u_seq.z_q;
    endcase
  endfunction
  function automatic bit stop_cpu_pulse(int k);
    case (k)
      0: return dut.g_cpu[0].u_seq.stop_cpu;
      1: return dut.g_cpu[1].u_seq.stop_cpu;
      default: return dut.g_cpu[2].u_seq.stop_cpu;
    endcase
  endfunction

  // Apply one primitive to the model; returns the expected trap entries.
  task automatic model_apply(op_t o, ref int exp_q [$]);
    bit stop, rst, fx, ff;
    int p;
    pstate_e s;
    p = o.pid; s = m_st[p];
    stop = 0; rst = 0; fx = 0; ff = 0;
    if (m_term[p]) begin
      ff = 1; stop = 1; n_term++;
      exp_q.push_back(ent(TR_HSFAULT, o.k, p));
    end else begin
      unique case (o.p)
        PRIM_STOP: if (s == PS_RUNNING) begin
          if (m_w[p] > 0) m_w[p]--;
          if (m_w[p] == 0) begin
            m_st[p] = PS_IDLE; stop = o.z;
            exp_q.push_back(ent(TR_REMOVE, o.k, p));
            exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
          end else rst = 1;
        end else fx = 1;
        PRIM_WAKE: begin
          if (m_w[p] < 255) m_w[p]++;
          if (s == PS_RUNNING) n_wake_run++;
          if (s == PS_IDLE) begin
            m_st[p] = PS_READY;
            exp_q.push_back(ent(TR_INSERT, o.k, p));
            exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
          end
        end
        PRIM_WAIT: if (s == PS_RUNNING) begin
          m_st[p] = PS_WAITING; stop = o.z;
          exp_q.push_back(ent(TR_REMOVE, o.k, p));
          exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
        end else fx = 1;
        PRIM_CONTINUE: if (s == PS_WAITING) begin
          m_st[p] = PS_READY;
          exp_q.push_back(ent(TR_INSERT, o.k, p));
          exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
        end else ff = 1;
        PRIM_DISPATCH: if (s == PS_READY) m_st[p] = PS_RUNNING;
                       else fx = 1;
        PRIM_PREEMPT: if (s == PS_RUNNING) begin
          m_st[p] = PS_READY; stop = o.z;
        end else fx = 1;
        PRIM_EXIT: if (s == PS_RUNNING) begin
          m_st[p] = PS_IDLE; m_term[p] = 1; stop = o.z;
          exp_q.push_back(ent(TR_REMOVE, o.k, p));
          exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
          exp_q.push_back(ent(TR_EXITI, o.k, p));
        end else fx = 1;
        PRIM_ABORT: begin
          if (s == PS_READY || s == PS_RUNNING) begin
            exp_q.push_back(ent(TR_REMOVE, o.k, p));
            exp_q.push_back(ent(TR_DISPATCHER, o.k, p));
          end
          exp_q.push_back(ent(TR_ABORTI, o.k, p));
          stop = o.z && o.self_ && s == PS_RUNNING;
          m_st[p] = PS_IDLE; m_term[p] = 1;
        end
      endcase
      if (fx) begin stop = 1; exp_q.push_back(ent(TR_HWFAULT, o.k, p)); end
      else if (ff) begin stop = 1; exp_q.push_back(ent(TR_HSFAULT, o.k, p)); end
    end
    chk($sformatf("cpu%0d %s pid %0d: stop", o.k, o.p.name(), p), o.stop == stop);
    chk($sformatf("cpu%0d %s pid %0d: restart", o.k, o.p.name(), p), o.rst == rst);
    chk($sformatf("cpu%0d %s pid %0d: X", o.k, o.p.name(), p), o.fx == fx);
    chk($sformatf("cpu%0d %s pid %0d: F", o.k, o.p.name(), p), o.ff == (ff && !fx));
  endtask

  // Compare the model with the hardware after the system has settled.
  task automatic check_model();
    int exp_q [$];
    while (ops.size() > 0) model_apply(ops.pop_front(), exp_q);
    chk($sformatf("trap entries: %0d popped, %0d expected", popped.size(), exp_q.size()),
        popped.size() == exp_q.size());
    for (int i = 0; i < exp_q.size() && i < popped.size(); i++)
      chk($sformatf("trap entry %0d: %0h expected %0h", i, popped[i], exp_q[i]), popped[i] == exp_q[i]);
    popped.delete();
    for (int p = 0; p < NPROC; p++) begin
      mon_pid = PID_W'(p);
      #1;
      chk($sformatf("pid %0d state %s expected %s term %0d", p, mon_state.st.name(), m_st[p].name(), m_term[p]),
          mon_state.st == m_st[p] && mon_state.term == m_term[p]);
      chk($sformatf("pid %0d w %0d expected %0d", p, mon_w, m_w[p]), int'(mon_w) == m_w[p]);
    end
  endtask

  // Load the model from the hardware (after concurrent activity).
  task automatic resync();
    ops.delete();
    popped.delete();
    for (int p = 0; p < NPROC; p++) begin
      mon_pid = PID_W'(p);
      #1;
      m_st[p] = mon_state.st; m_term[p] = mon_state.term; m_w[p] = int'(mon_w);
    end
  endtask

  // ------------------------------------------------------ software agent
  int  ready_list [$];
  bit  sw_pause = 0, sw_hold_rft = 0, sw_preempt = 1, sw_self_preempt = 0;
  int  sw_tds_to = -1;
  bit  disp_pend [NCPU];
  bit  kill_pend [NCPU];

  function automatic void rl_remove(int p);
    foreach (ready_list[i]) if (ready_list[i] == p) begin ready_list.delete(i); return; end
  endfunction
  function automatic bit rl_has(int p);
    foreach (ready_list[i]) if (ready_list[i] == p) return 1;
    return 0;
  endfunction

  always @(negedge clk)
    for (int k = 0; k < NCPU; k++) if (cpu_state[k] != CS_S && cpu_state[k] != CS_TS &&
                                       cpu_state[k] != CS_TP) disp_pend[k] = 0;

  task automatic issue_pd(int tk, bit is_d, int target, int pid);
    pd_valid[tk] = 1; pd_is_d[tk] = is_d; pd_cpu[tk] = CPU_W'(target); pd_pid[tk] = PID_W'(pid);
    @(negedge clk);
    chk("pd accepted", !pd_illegal[tk] && !pd_busy[tk]);
    pd_valid[tk] = 0;
  endtask

  // Dispatch ready processes: to a stopped processor, else to the trap
  // processor itself, else preempt a running processor to make room.
  task automatic sw_dispatch(int tk);
    int guard;
    bit preempted;
    preempted = 0;
    while (ready_list.size() > 0) begin
      int target;
      target = -1;
      for (int j = 0; j < NCPU; j++)
        if (j != tk && cpu_state[j] == CS_S && !disp_pend[j] && !kill_pend[j] && target < 0) target = j;
      if (target < 0 && (cpu_state[tk] == CS_TS || cpu_state[tk] == CS_TP) && !disp_pend[tk])
        target = tk;
      if (target < 0 && sw_preempt && !preempted) begin
        preempted = 1;
        for (int j = 0; j < NCPU; j++)
          if (j != tk && cpu_state[j] == CS_E && cur_valid[j] && !kill_pend[j] && target < 0) begin
            issue_pd(tk, 0, j, 0);
            guard = 0;
            while (cpu_state[j] != CS_S && guard < 200) begin @(negedge clk); guard++; end
            chk("preempted processor stops", cpu_state[j] == CS_S);
            // wait for its PREEMPT primitive before reusing the process
            guard = 0;
            while (dut.pc_req[j] !== 1'b0 || !prim_ready[j]) begin
              @(negedge clk);
              if (++guard > 200) break;
            end
            // the victim returns to the list through its INSERT entry
            target = j;
          end
      end
      if (target < 0) return;
      disp_pend[target] = 1;
      issue_pd(tk, 1, target, ready_list.pop_front());
    end
  endtask

  initial begin : software
    for (int k = 0; k < NCPU; k++) begin pd_cpu[k] = '0; pd_pid[k] = '0; disp_pend[k] = 0; kill_pend[k] = 0; end
    wait (rst_n);
    forever begin
      int tk;
      @(negedge clk);
      // processors left in a trap state without the designation return
      for (int j = 0; j < NCPU; j++)
        if (in_trap(cpu_state[j]) && !tdr[j] && !sw_hold_rft) begin
          rft[j] = 1; @(negedge clk); rft[j] = 0;
        end
      tk = -1;
      for (int j = 0; j < NCPU; j++) if (tdr[j] && in_trap(cpu_state[j])) tk = j;
      if (tk < 0 || sw_pause) continue;
      if (!trap_empty) begin
        trap_routine_e r; int c, p;
        r = trap_routine; c = int'(trap_cpu); p = int'(trap_pid);
        trap_pop[tk] = 1;
        @(negedge clk);
        trap_pop[tk] = 0;
        popped.push_back(ent(r, c, p));
        unique case (r)
          TR_HWFAULT:    n_hwf++;
          TR_HSFAULT:    n_hsf++;
          TR_INSERT:     begin n_ins++; if (!rl_has(p)) ready_list.push_back(p); end
          TR_REMOVE:     begin n_rem++; rl_remove(p); end
          TR_DISPATCHER: begin n_disp++; sw_dispatch(tk); end
          TR_EXITI:      begin n_exiti++; rl_remove(p); end
          TR_ABORTI: begin
            n_aborti++;
            rl_remove(p);
            // a process aborted while running elsewhere is taken off its processor
            for (int j = 0; j < NCPU; j++)
              if (j != tk && cur_valid[j] && int'(cur_pid[j]) == p && cpu_state[j] == CS_E) begin
                kill_pend[j] = 1;
                issue_pd(tk, 0, j, 0);
              end
          end
          default: ;
        endcase
      end else begin
        if (sw_self_preempt && cpu_state[tk] == CS_TE && cur_valid[tk]) begin
          int guard;
          issue_pd(tk, 0, tk, 0);
          guard = 0;
          while ((cpu_state[tk] != CS_TP || dut.pc_req[tk] !== 1'b0 || !prim_ready[tk]) && guard < 200) begin
            @(negedge clk); guard++;
          end
          chk("trap processor preempted while trap processing", cpu_state[tk] == CS_TP);
          sw_self_preempt = 0;
        end
        sw_dispatch(tk);
        if (sw_tds_to >= 0) begin
          tds_valid = 1; tds_cpu = CPU_W'(sw_tds_to);
          @(negedge clk);
          tds_valid = 0;
          n_tds++;
          sw_tds_to = -1;
        end
        if (!sw_hold_rft) begin
          // TCL.TDR still up at return from trap keeps the processor trapped
          if (tcl && tdr[tk]) n_retake++;
          rft[tk] = 1; @(negedge clk); rft[tk] = 0;
        end
      end
    end
  end

  always @(negedge clk)
    for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_S) kill_pend[k] = 0;

  // random instruction boundaries
  bit boundary_on = 1;
  always @(negedge clk) boundary = boundary_on ? NCPU'($urandom) : '0;

  // ------------------------------------------------------------ watchdog
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------- directed helpers
  task automatic settle();
    int quiet, guard;
    quiet = 0; guard = 0;
    while (quiet < 8) begin
      @(negedge clk);
      if (prim_ready == '1 && trap_empty && !tcl && !tpl && dut.u_pd.p_line == '0 &&
          dut.u_pd.d_line == '0 && prim_valid == '0 && pd_valid == '0)
        quiet++;
      else
        quiet = 0;
      if (++guard > 5000) begin chk("system settles", 0); return; end
    end
  endtask

  // Run one primitive on processor k and wait for it to finish.
  task automatic run_prim(int k, prim_e p, int pid);
    int guard;
    prim_code[k] = p; prim_pid[k] = PID_W'(pid); prim_valid[k] = 1;
    guard = 0;
    do begin @(posedge clk); guard++; end while (!prim_ready[k] && guard < 2000);
    @(negedge clk);
    prim_valid[k] = 0;
    guard = 0;
    while (!prim_done[k] && guard < 2000) begin @(negedge clk); guard++; end
  endtask

  task automatic step(int k, prim_e p, int pid);
    run_prim(k, p, pid);
    settle();
    check_model();
  endtask

  task automatic expect_running(int k, int pid);
    chk($sformatf("cpu%0d executing pid %0d (state %s pid %0d)", k, pid, cpu_state[k].name(), cur_pid[k]),
        cpu_state[k] == CS_E && cur_valid[k] && int'(cur_pid[k]) == pid);
  endtask

  task automatic construct_all();
    for (int p = 0; p < NPROC; p++) begin
      @(negedge clk);
      con_valid = 1; con_pid = PID_W'(p); con_w = '0;
      n_con++;
    end
    @(negedge clk);
    con_valid = 0;
    for (int p = 0; p < NPROC; p++) begin m_st[p] = PS_IDLE; m_term[p] = 0; m_w[p] = 0; end
    ready_list.delete();
  endtask

  // Construct again every terminated process that no processor holds.
  task automatic reconstruct_terminated();
    for (int p = 0; p < NPROC; p++) begin
      bit held;
      @(negedge clk);
      // not while the software still has entries or a list place for it
      held = !trap_empty || rl_has(p);
      for (int k = 0; k < NCPU; k++) if (cur_valid[k] && int'(cur_pid[k]) == p) held = 1;
      mon_pid = PID_W'(p);
      #1;
      // terminated, or left running by a processor that stopped on a fault
      if ((mon_state.term || mon_state.st == PS_RUNNING) && !held) begin
        con_valid = 1; con_pid = PID_W'(p); con_w = '0;
        @(negedge clk);
        con_valid = 0;
        n_con++;
      end
    end
  endtask

  // ------------------------------------------------------ random agents

  for (genvar k = 0; k < NCPU; k++) begin : g_proc
    initial begin
      wait (rst_n);
      forever begin
        @(negedge clk);
        if (rnd_on && cpu_state[k] == CS_E && cur_valid[k] && !prim_valid[k] && $urandom_range(0, 3) == 0) begin
          int r, guard;
          bit accepted;
          r = $urandom_range(0, 99);
          prim_code[k] = r < 40 ? PRIM_WAKE : r < 60 ? PRIM_STOP : r < 70 ? PRIM_WAIT :
                         r < 92 ? PRIM_CONTINUE : r < 96 ? PRIM_EXIT : PRIM_ABORT;
          // mostly sensible objects (a live process to WAKE, a waiting one to
          // CONTINUE), sometimes any process, which exercises the faults
          prim_pid[k] = PID_W'($urandom_range(0, NPROC - 1));
          if ($urandom_range(0, 9) != 0)
            for (int tries = 0; tries < 8; tries++) begin
              pcb_state_t ps;
              ps = dut.u_pcb.state_mem[prim_pid[k]];
              if (prim_code[k] == PRIM_CONTINUE ? (ps.st == PS_WAITING && !ps.term) : !ps.term) break;
              prim_pid[k] = PID_W'($urandom_range(0, NPROC - 1));
            end
          prim_valid[k] = 1;
          accepted = 0; guard = 0;
          while (!accepted && guard < 500) begin
            @(posedge clk);
            accepted = prim_ready[k];
            @(negedge clk);
            // a processor taken off its process drops an instruction not yet started
            if (!accepted && cpu_state[k] != CS_E) break;
            guard++;
          end
          prim_valid[k] = 0;
          if (accepted) begin
            n_random_prims++;
            guard = 0;
            while (!prim_done[k] && guard < 2000) begin @(negedge clk); guard++; end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ main
  initial begin : main
    int guard;
    for (int k = 0; k < NCPU; k++) begin
      prim_code[k] = PRIM_STOP; prim_pid[k] = '0; fetch_addr[k] = '0; opnd_addr[k] = '0;
      seen_stop[k] = 0; seen_rst[k] = 0; seen_fx[k] = 0; seen_ff[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NCPU; k++) chk("reset: processors stopped", cpu_state[k] == CS_S);
    chk("reset: cpu 0 designated", tdr == 3'b001);
    construct_all();
    check_model();

    // Start-up: processor 0 wakes three processes; the trap processor (0)
    // dispatches them to processors 1 and 2 and finally to itself.
    step(0, PRIM_WAKE, 1);
    expect_running(1, 1);
    step(0, PRIM_WAKE, 2);
    expect_running(2, 2);
    step(0, PRIM_WAKE, 3);
    expect_running(0, 3);              // dispatched while trap processing (td)

    // Breakpoints of the running processes.
    for (int k = 0; k < NCPU; k++) begin
      @(negedge clk);
      fetch_valid[k] = 1; fetch_addr[k] = ADDR_W'(18'h01000 + 18'(cur_pid[k]));
      @(negedge clk);
      fetch_valid[k] = 0;
      chk("instruction breakpoint", bp_trap[k] && bp_trap_addr[k] == 18'h00100 && !bp_is_operand[k]);
      n_bpa += int'(bp_trap[k]);
      opnd_valid[k] = 1; opnd_addr[k] = ADDR_W'(18'h02000 + 18'(cur_pid[k]));
      @(negedge clk);
      opnd_valid[k] = 0;
      chk("operand breakpoint", bp_trap[k] && bp_trap_addr[k] == 18'h00200 && bp_is_operand[k]);
      n_bpo += int'(bp_trap[k]);
      fetch_valid[k] = 1; fetch_addr[k] = ADDR_W'(18'h01000 + 18'(cur_pid[k]) + 1);
      @(negedge clk);
      fetch_valid[k] = 0;
      chk("no breakpoint elsewhere", !bp_trap[k]);
    end

    // WAKE of a running process, then STOP with work left (restart) and
    // STOP with none left (idle, processor stops).
    step(1, PRIM_WAKE, 1);
    step(1, PRIM_STOP, 0);
    expect_running(1, 1);
    // A STOP holding L while another processor WAKEs the same running
    // process: the WAKE waits at the L check.
    step(1, PRIM_WAKE, 1);
    step(1, PRIM_WAKE, 1);
    for (int d = 0; d < 6; d++) begin
      fork
        run_prim(1, PRIM_STOP, 0);
        begin repeat (d) @(negedge clk); run_prim(2, PRIM_WAKE, 1); end
      join
      settle();
      check_model();
    end
    step(1, PRIM_STOP, 0);
    step(1, PRIM_STOP, 0);
    expect_running(1, 1);
    step(1, PRIM_STOP, 0);
    chk("cpu1 stopped", cpu_state[1] == CS_S);

    // WAIT and CONTINUE.
    step(2, PRIM_WAIT, 0);
    chk("cpu2 stopped", cpu_state[2] == CS_S);
    step(0, PRIM_CONTINUE, 2);
    expect_running(1, 2);
    step(0, PRIM_WAKE, 4);
    expect_running(2, 4);

    // The trap processor preempts its own process while trap processing
    // (te -> tp) and then dispatches it back to itself (tp -> td -> e).
    sw_self_preempt = 1;
    step(1, PRIM_WAKE, 7);
    chk("self preempt done", !sw_self_preempt);

    // No processor free: the dispatcher preempts one.
    step(0, PRIM_WAKE, 5);
    chk("preempt happened", n_pcyc > 0);
    check_model();

    // EXIT and ABORT.
    for (int k = 0; k < NCPU; k++)
      if (cpu_state[k] == CS_E && cur_valid[k] && cur_pid[k] == 4'd5) step(k, PRIM_EXIT, 0);
    step(0, PRIM_ABORT, 6);
    step(1, PRIM_ABORT, 2);
    chk("cpu1 stopped by its own abort", cpu_state[1] == CS_S || cur_pid[1] != 4'd2);

    // Faults: X (dispatch of an idle process), F (continue of an idle
    // process) and a primitive on a terminated process.
    step(0, PRIM_DISPATCH, 8);
    step(0, PRIM_CONTINUE, 9);
    step(0, PRIM_WAKE, 6);

    // Illegal DISPATCH from a processor that is not trap processing, and an
    // illegal return from trap.
    guard = 0;
    while (cpu_state[0] == CS_S && guard < 10) begin @(negedge clk); guard++; end
    for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_E || cpu_state[k] == CS_S) begin
      pd_valid[k] = 1; pd_is_d[k] = 1; pd_cpu[k] = CPU_W'(k); pd_pid[k] = '0;
      #1;
      n_pd_illegal += int'(pd_illegal[k]);
      chk("DISPATCH outside trap processing illegal", pd_illegal[k]);
      @(negedge clk);
      pd_valid[k] = 0;
      break;
    end
    settle();
    begin
      int ek;
      ek = -1;
      for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_E && ek < 0) ek = k;
      if (ek < 0) begin
        step(0, PRIM_WAKE, 10);
        for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_E && ek < 0) ek = k;
      end
      if (ek >= 0) begin
        rft[ek] = 1;
        @(negedge clk);
        rft[ek] = 0;
        chk("rft while executing illegal", cpu_illegal[ek]);
        n_cpu_illegal += int'(cpu_illegal[ek]);
      end
    end
    settle();
    check_model();

    // Stack overflow: the trap processor holds off while eighteen faults
    // are stacked; the pushes past sixteen wait.
    sw_pause = 1;
    for (int i = 0; i < TRAP_DEPTH + 2; i++) begin
      if (i == TRAP_DEPTH) begin
        fork
          run_prim(0, PRIM_DISPATCH, 11);
          begin
            int tk;
            repeat (40) @(negedge clk);
            chk("push held while stack full", trap_full && !prim_done[0]);
            // return from trap with TCL.TDR still up keeps the processor trapped
            tk = -1;
            for (int j = 0; j < NCPU; j++) if (tdr[j] && in_trap(cpu_state[j])) tk = j;
            if (tk >= 0) begin
              cpu_state_e st0;
              st0 = cpu_state[tk];
              rft[tk] = 1;
              @(negedge clk);
              rft[tk] = 0;
              chk("rft with TCL.TDR stays trapped",
                  cpu_state[tk] == (st0 == CS_TD || st0 == CS_TE ? CS_TE : CS_TS));
              n_retake++;
            end
            sw_pause = 0;
          end
        join
      end else begin
        run_prim(0, PRIM_DISPATCH, 11);
      end
    end
    sw_pause = 0;
    settle();
    check_model();

    // Move the trap designation while trap processing; TPL holds the new
    // trap processor off until the old one returns.
    sw_tds_to = 2;
    sw_hold_rft = 1;
    run_prim(1, PRIM_DISPATCH, 12);     // X fault: sets TCL
    guard = 0;
    while (sw_tds_to >= 0 && guard < 2000) begin @(negedge clk); guard++; end
    run_prim(1, PRIM_DISPATCH, 12);
    repeat (20) @(negedge clk);
    chk("TPL holds new trap processor", n_tpl_hold > 0);
    sw_hold_rft = 0;
    settle();
    chk("trap designation moved", tdr == 3'b100);
    check_model();

    // Random phase: all processors run processes that execute primitives at
    // random; the L line, PCB conflicts and stack lock-out happen here.
    construct_all();
    for (int i = 0; i < NCPU; i++) run_prim(2, PRIM_WAKE, i + 4);
    rnd_on = 1;
    for (int round = 0; round < 100; round++) begin
      for (int sub = 0; sub < 20; sub++) begin
        repeat (50) @(negedge clk);
        // keep work in the system: a stopped processor wakes a process
        if (ready_list.size() == 0) begin
          for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_S && !prim_valid[k]) begin
            int p;
            pcb_state_t ps;
            p = $urandom_range(0, NPROC - 1);
            for (int tries = 0; tries < 16; tries++) begin
              ps = dut.u_pcb.state_mem[p];
              if (!ps.term && (ps.st == PS_IDLE || ps.st == PS_WAITING)) break;
              p = (p + 1) % NPROC;
            end
            run_prim(k, ps.st == PS_WAITING ? PRIM_CONTINUE : PRIM_WAKE, p);
            break;
          end
        end
      end
      if (round % 5 == 4) sw_tds_to = $urandom_range(0, NCPU - 1);
      begin
        // fresh processes now and then
        rnd_on = 0;
        settle();
        reconstruct_terminated();
        rnd_on = 1;
        for (int k = 0; k < NCPU; k++)
          run_prim(k, PRIM_WAKE, $urandom_range(0, NPROC - 1));
      end
    end
    rnd_on = 0;
    repeat (50) @(negedge clk);
    settle();
    // The software ready list and the PCBs agree.
    ops.delete();
    foreach (ready_list[i]) begin
      mon_pid = PID_W'(ready_list[i]);
      #1;
      chk($sformatf("ready-list pid %0d is ready in its PCB (%s term %b)", ready_list[i], mon_state.st.name(), mon_state.term), mon_state.st == PS_READY);
    end
    // A processor in E whose process left the running state with nothing
    // to dispatch idles; a running process is held by one processor only.
    for (int k = 0; k < NCPU; k++) if (cpu_state[k] == CS_E && cur_valid[k] && !idle_on[k]) begin
      mon_pid = cur_pid[k];
      #1;
      if (mon_state.st == PS_RUNNING && !mon_state.term)
        for (int j = k + 1; j < NCPU; j++)
          if (cpu_state[j] == CS_E && cur_valid[j] && !idle_on[j] && cur_pid[j] == cur_pid[k])
            chk($sformatf("pid %0d runs on cpu%0d and cpu%0d", cur_pid[k], k, j), 0);
    end

    // every mechanism must have happened
    begin
      int cnt [string];
      cnt["construct"] = n_con; cnt["dispatch cycle"] = n_dcyc; cnt["preempt cycle"] = n_pcyc;
      cnt["restart"] = n_restart; cnt["processor stop"] = n_stop; cnt["HWFAULT"] = n_hwf;
      cnt["HSFAULT"] = n_hsf; cnt["INSERT"] = n_ins; cnt["REMOVE"] = n_rem;
      cnt["DISPATCHER"] = n_disp; cnt["EXITI"] = n_exiti; cnt["ABORTI"] = n_aborti;
      cnt["state te"] = n_te; cnt["state ts"] = n_ts; cnt["state tp"] = n_tp; cnt["state td"] = n_td;
      cnt["TCL at rft"] = n_retake; cnt["L stall"] = n_lstall; cnt["stack full"] = n_full;
      cnt["stack lock-out"] = n_lockout; cnt["PCB conflict"] = n_conflict; cnt["TDS move"] = n_tds;
      cnt["TPL hold"] = n_tpl_hold; cnt["BPA trap"] = n_bpa; cnt["BPO trap"] = n_bpo;
      cnt["illegal d/p"] = n_pd_illegal; cnt["illegal rft"] = n_cpu_illegal;
      cnt["terminated object"] = n_term; cnt["WAKE running"] = n_wake_run;
      cnt["random primitives"] = n_random_prims;
      foreach (cnt[name]) begin
        $display("  %-18s %0d", name, cnt[name]);
        chk($sformatf("mechanism '%s' happened", name), cnt[name] > 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
