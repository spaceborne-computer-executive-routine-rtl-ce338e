// pc_sequencer: one process-control machine; runs a primitive through the
// ordered control sequence and drives the logic network.
//
// A request (primitive, object process, Z, "object is the invoking
// processor's own process") is accepted in the idle step. The machine then
// walks the document's steps in their order of precedence:
//    1  fetch the object's PCB state          2  start the logic network, wait P'
//    3  X: stack HWFAULT, go to 20            4  F: stack HSFAULT, go to 20
//    5  I: while the L line is up, wait, then start again at step 1
//    6  Y: raise L ("testing w")              7-9  W: w := w+1 (V) or w-1
//   10  w = 0 after decrement: S N J := 1, new state idle
//   11  w > 0 after decrement: S N J := 0 (process restarts at its start entry)
//   12  N: store the new state {H,G}         13  S = 0: go to 17
//   14  M: stack INSERT  15  else stack REMOVE   16  stack DISPATCHER
//   17  T: stack EXITI   18  R: stack ABORTI; J := 0 if the object is not
//       the invoking processor's own process   19  Y: lower L
//   20  X+F+S+T+R: set the trap control line
//   21  X+F+J.Z: stop this processor          22  reset the network, done
// Steps 10, 11 and 18 write their values back into the network's latches, as
// the document describes for N.
//
// The L line is shared by all machines. This machine's contribution is
// l_hold (L raised at step 6, lowered at 19) plus l_pending (waiting at step
// 6 to raise it); l_others is the OR of the other machines' contributions.
// To make the step-5 check and the step-6 set safe between machines, a
// machine waits at step 6 while another machine has passed step 5 with I = 1
// and not yet incremented w (wake_busy), and a machine at step 5 also treats
// another machine's l_pending as L = 1. This interlock is this design's
// addition to the document's single control line.
//
// Process lock (also this design's addition): the document's L line orders
// only a WAKE against a decrement of w, so two machines could otherwise both
// read one process's state at step 1 and both store at step 12 (two WAKEs of
// an idle process would both stack INSERT; two DISPATCHes could both find it
// ready). A machine therefore asks for its object process before the step-1
// fetch (lock_want) and holds it (lock_hold) from then until the step-12
// store is done, or until it goes to wait at step 5. lock_ok, formed outside
// from the other machines' lock_hold/lock_want and object numbers, grants it.
// This is the access-lock scheme the document describes for w, applied to
// the whole state update; it costs one cycle per primitive.
//
// Other choices of this design: the work variable is read and written by one
// atomic PCB operation (steps 7-9 merge into one access); a primitive whose
// object process is marked terminated is treated as illogical (stack HSFAULT,
// stop); a terminated process is stored as idle with its terminated bit set.
// Trap-stack pushes use a valid/ready handshake; the PCB port uses req/ack.
// Lint note: the assertion's "disable iff (!rst_n)" reads the asynchronous
// reset synchronously, which lint reports as SYNCASYNCNET; that use is only
// in the checker and is intended.
module pc_sequencer
  import pcx_pkg::*;
#(
  parameter int unsigned NPROC         = 16,
  parameter int unsigned W_WIDTH       = 8,
  parameter int unsigned SETTLE_CYCLES = 1,
  localparam int unsigned PID_W        = (NPROC < 2) ? 1 : $clog2(NPROC)
) (
  input  logic               clk,
  input  logic               rst_n,
  // request
  input  logic               req_valid,
  input  prim_e              req_prim,
  input  logic [PID_W-1:0]   req_pid,
  input  logic               req_z,
  input  logic               req_self,
  output logic               req_ready,
  // PCB store port
  output logic               pcb_req,
  output pcb_op_e            pcb_op,
  output logic [PID_W-1:0]   pcb_pid,
  output pcb_state_t         pcb_wstate,
  input  logic               pcb_ack,
  input  pcb_state_t         pcb_rstate,
  input  logic [W_WIDTH-1:0] pcb_rw,
  // trap stack port
  output logic               push_valid,
  output trap_routine_e      push_routine,
  output logic [PID_W-1:0]   push_pid,
  input  logic               push_ready,
  output logic               tcl_set,
  // testing-w control line
  output logic               l_hold,
  output logic               l_pending,
  output logic               wake_busy,
  input  logic               l_others,
  input  logic               wake_busy_others,
  // process lock
  output logic               lock_want,
  output logic               lock_hold,
  input  logic               lock_ok,
  // results and events (one-cycle pulses unless noted)
  output logic               done,
  output logic               stop_cpu,
  output logic               restart,     // STOP found w > 0
  output logic               went_idle,   // STOP found w = 0
  output logic               fault_x,
  output logic               fault_f,
  output logic               l_stall,     // level: waiting at step 5
  output logic               busy,        // level: not in the idle step
  output ctl_vars_t          vars
);

  typedef enum logic [4:0] {
    SQ_IDLE, SQ_FETCH, SQ_EVAL, SQ_HWF, SQ_HSF, SQ_LCHK, SQ_LWAIT, SQ_YSET,
    SQ_WORK, SQ_TESTW, SQ_STORE, SQ_SCHK, SQ_INSREM, SQ_DISP, SQ_EXIT,
    SQ_ABORT, SQ_CLRL, SQ_TCL, SQ_STOP, SQ_END
  } step_e;

  step_e            step;
  prim_e            prim_q;
  logic [PID_W-1:0] pid_q;
  logic             z_q, self_q, term_fault, fetch_go;
  pstate_e          st_q;
  logic [W_WIDTH-1:0] w_q;

  // logic network
  logic net_start, net_reset, net_ready, net_enabled;
  logic force_idle, force_loop, clear_j;

  pc_logic_network #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_net (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (net_start),
    .net_reset (net_reset),
    .prim      (prim_q),
    .st        (st_q),
    .force_idle(force_idle),
    .force_loop(force_loop),
    .clear_j   (clear_j),
    .ready     (net_ready),
    .enabled   (net_enabled),
    .v         (vars)
  );

  assign req_ready = (step == SQ_IDLE);
  assign busy      = (step != SQ_IDLE);
  assign net_start = (step == SQ_EVAL) && !net_enabled;
  assign net_reset = (step == SQ_END) || (step == SQ_LWAIT && !l_others);
  assign force_idle = (step == SQ_TESTW) && (w_q == '0);
  assign force_loop = (step == SQ_TESTW) && (w_q != '0);
  assign clear_j    = (step == SQ_ABORT) && vars.r && push_ready && !self_q;
  assign l_pending  = (step == SQ_YSET) && vars.y;
  assign wake_busy  = vars.i && ((step == SQ_YSET) || (step == SQ_WORK));
  assign l_stall    = (step == SQ_LWAIT);
  assign lock_want  = (step == SQ_FETCH) && !fetch_go;
  assign lock_hold  = fetch_go || (step inside {SQ_EVAL, SQ_HWF, SQ_HSF, SQ_LCHK,
                                                SQ_YSET, SQ_WORK, SQ_TESTW, SQ_STORE});

  // PCB port
  always_comb begin
    pcb_req    = 1'b0;
    pcb_op     = PCB_RD_STATE;
    pcb_wstate = '0;
    unique case (step)
      SQ_FETCH: pcb_req = fetch_go;
      SQ_WORK: begin
        pcb_req = vars.w;
        pcb_op  = vars.v ? PCB_INC_W : PCB_DEC_W;
      end
      SQ_STORE: begin
        pcb_req = vars.n;
        pcb_op  = PCB_WR_STATE;
        if (vars.t || vars.r) begin
          pcb_wstate.term = 1'b1;
          pcb_wstate.st   = PS_IDLE;
        end else begin
          pcb_wstate.term = 1'b0;
          pcb_wstate.st   = pstate_e'({vars.h, vars.g});
        end
      end
      default: ;
    endcase
  end
  assign pcb_pid = pid_q;

  // trap stack port
  always_comb begin
    push_valid   = 1'b0;
    push_routine = TR_HWFAULT;
    unique case (step)
      SQ_HWF:    push_valid = 1'b1;
      SQ_HSF: begin
        push_valid   = 1'b1;
        push_routine = TR_HSFAULT;
      end
      SQ_INSREM: begin
        push_valid   = 1'b1;
        push_routine = vars.m ? TR_INSERT : TR_REMOVE;
      end
      SQ_DISP: begin
        push_valid   = 1'b1;
        push_routine = TR_DISPATCHER;
      end
      SQ_EXIT: begin
        push_valid   = vars.t;
        push_routine = TR_EXITI;
      end
      SQ_ABORT: begin
        push_valid   = vars.r;
        push_routine = TR_ABORTI;
      end
      default: ;
    endcase
  end
  assign push_pid = pid_q;

  assign tcl_set = (step == SQ_TCL) &&
                   (vars.x || vars.f || vars.s || vars.t || vars.r || term_fault);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step       <= SQ_IDLE;
      prim_q     <= PRIM_STOP;
      pid_q      <= '0;
      z_q        <= 1'b1;
      self_q     <= 1'b0;
      term_fault <= 1'b0;
      fetch_go   <= 1'b0;
      st_q       <= PS_IDLE;
      w_q        <= '0;
      l_hold     <= 1'b0;
      done       <= 1'b0;
      stop_cpu   <= 1'b0;
      restart    <= 1'b0;
      went_idle  <= 1'b0;
      fault_x    <= 1'b0;
      fault_f    <= 1'b0;
    end else begin
      done      <= 1'b0;
      stop_cpu  <= 1'b0;
      restart   <= 1'b0;
      went_idle <= 1'b0;
      fault_x   <= 1'b0;
      fault_f   <= 1'b0;
      unique case (step)
        SQ_IDLE: if (req_valid) begin
          prim_q     <= req_prim;
          pid_q      <= req_pid;
          z_q        <= req_z;
          self_q     <= req_self;
          term_fault <= 1'b0;
          step       <= SQ_FETCH;
        end
        SQ_FETCH: if (!fetch_go) begin                       // lock
          fetch_go <= lock_ok;
        end else if (pcb_ack) begin                          // step 1
          fetch_go <= 1'b0;
          st_q     <= pcb_rstate.st;
          if (pcb_rstate.term) begin
            term_fault <= 1'b1;
            step       <= SQ_HSF;
          end else begin
            step <= SQ_EVAL;
          end
        end
        SQ_EVAL: if (net_ready) begin                        // step 2
          if (vars.x)      step <= SQ_HWF;
          else if (vars.f) step <= SQ_HSF;
          else             step <= SQ_LCHK;
        end
        SQ_HWF: if (push_ready) begin                        // step 3
          fault_x <= 1'b1;
          step    <= SQ_TCL;
        end
        SQ_HSF: if (push_ready) begin                        // step 4
          fault_f <= 1'b1;
          step    <= SQ_TCL;
        end
        SQ_LCHK: begin                                       // step 5
          if (vars.i && l_others) step <= SQ_LWAIT;
          else                    step <= SQ_YSET;
        end
        SQ_LWAIT: if (!l_others) step <= SQ_FETCH;
        SQ_YSET: begin                                       // step 6
          if (!vars.y) begin
            step <= SQ_WORK;
          end else if (!wake_busy_others) begin
            l_hold <= 1'b1;
            step   <= SQ_WORK;
          end
        end
        SQ_WORK: begin                                       // steps 7-9
          if (!vars.w) begin
            step <= SQ_STORE;
          end else if (pcb_ack) begin
            w_q  <= pcb_rw;
            step <= vars.v ? SQ_STORE : SQ_TESTW;
          end
        end
        SQ_TESTW: begin                                      // steps 10, 11
          if (w_q == '0) went_idle <= 1'b1;
          else           restart   <= 1'b1;
          step <= SQ_STORE;
        end
        SQ_STORE: begin                                      // step 12
          if (!vars.n || pcb_ack) step <= SQ_SCHK;
        end
        SQ_SCHK: step <= vars.s ? SQ_INSREM : SQ_EXIT;       // step 13
        SQ_INSREM: if (push_ready) step <= SQ_DISP;          // steps 14, 15
        SQ_DISP:   if (push_ready) step <= SQ_EXIT;          // step 16
        SQ_EXIT:   if (!vars.t || push_ready) step <= SQ_ABORT;  // step 17
        SQ_ABORT:  if (!vars.r || push_ready) step <= SQ_CLRL;   // step 18
        SQ_CLRL: begin                                       // step 19
          if (vars.y) l_hold <= 1'b0;
          step <= SQ_TCL;
        end
        SQ_TCL:  step <= SQ_STOP;                            // step 20
        SQ_STOP: begin                                       // step 21
          stop_cpu <= vars.x || vars.f || term_fault || (vars.j && z_q);
          step     <= SQ_END;
        end
        SQ_END: begin                                        // step 22
          done <= 1'b1;
          step <= SQ_IDLE;
        end
        default: step <= SQ_IDLE;
      endcase
    end
  end

  // The machine that raised L is the one that lowers it, and never while idle.
  a_l_released: assert property (@(posedge clk) disable iff (!rst_n)
                                 (step == SQ_IDLE) |-> !l_hold);

endmodule
