// tb_cpu_state_ctl: walks the processor state controller into each of its six
// states and applies each event there (d line, p line, return from trap with
// TCL.TDR low and high, TCL.TDR at a boundary, a stop order), comparing the
// new state, the illegal flag, the dispatch/preempt cycle pulses and the
// DISPATCH/PREEMPT request to the machine with a table written from the
// processor state matrix. The machine's acknowledge comes after a random
// delay, during which the controller must take no new event.
`timescale 1ns/1ps
module tb_cpu_state_ctl;
  import pcx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic boundary = 0, p_line = 0, d_line = 0, rft = 0, trap_take = 0, stop_req = 0;
  logic [3:0] d_pid = 0;
  cpu_state_e state;
  logic trap_active;
  logic [3:0] cur_pid;
  logic cur_valid, p_ack, d_ack, dispatch_cycle, preempt_cycle, trap_enter, illegal;
  logic pc_req, pc_z;
  prim_e pc_prim;
  logic [3:0] pc_pid;
  logic pc_ack = 0;

  cpu_state_ctl #(.NPROC(16)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_disp, n_pre, n_ill, n_req, n_trap;
  prim_e last_prim;
  logic last_z;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // machine model: acknowledge a request after 1..4 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (pc_req && !pc_ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        pc_ack <= 1'b1;
        @(posedge clk);
        pc_ack <= 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    if (dispatch_cycle) n_disp++;
    if (preempt_cycle) n_pre++;
    if (illegal) n_ill++;
    if (trap_enter) n_trap++;
    if (pc_req && pc_ack) begin n_req++; last_prim = pc_prim; last_z = pc_z; end
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef enum int {EV_D, EV_P, EV_RFT0, EV_RFT1, EV_TRAP, EV_STOP} ev_e;

  // apply one event for one cycle, then let any request be acknowledged
  task automatic apply(input ev_e ev);
    @(negedge clk);
    unique case (ev)
      EV_D:    begin d_line = 1; d_pid = 4'd9; boundary = 1; end
      EV_P:    begin p_line = 1; boundary = 1; end
      EV_RFT0: begin rft = 1; trap_take = 0; end
      EV_RFT1: begin rft = 1; trap_take = 1; end
      EV_TRAP: begin trap_take = 1; boundary = 1; end
      EV_STOP: stop_req = 1;
    endcase
    @(negedge clk);
    {d_line, p_line, rft, trap_take, boundary, stop_req} = '0;
    repeat (8) @(negedge clk);
  endtask

  task automatic goto_state(input cpu_state_e s);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    unique case (s)
      CS_S: ;
      CS_E: apply(EV_D);
      CS_TS: apply(EV_TRAP);
      CS_TE: begin apply(EV_D); apply(EV_TRAP); end
      CS_TP: begin apply(EV_D); apply(EV_TRAP); apply(EV_P); end
      CS_TD: begin apply(EV_TRAP); apply(EV_D); end
      default: ;
    endcase
    chk($sformatf("reached %s", s.name()), state, s);
    n_disp = 0; n_pre = 0; n_ill = 0; n_req = 0; n_trap = 0;
  endtask

  typedef struct {
    cpu_state_e nxt;
    bit ill, disp, pre, req, trap;
    prim_e prim;
    bit z;
  } exp_t;

  function automatic exp_t expected(cpu_state_e s, ev_e ev);
    exp_t e;
    e = '{nxt: s, ill: 0, disp: 0, pre: 0, req: 0, trap: 0, prim: PRIM_STOP, z: 0};
    unique case (ev)
      EV_D: unique case (s)
        CS_S:  begin e.nxt = CS_E;  e.disp = 1; e.req = 1; e.prim = PRIM_DISPATCH; e.z = 1; end
        CS_TS, CS_TP: begin e.nxt = CS_TD; e.req = 1; e.prim = PRIM_DISPATCH; e.z = 0; end
        default: e.ill = 1;
      endcase
      EV_P: unique case (s)
        CS_E:  begin e.nxt = CS_S;  e.pre = 1; e.req = 1; e.prim = PRIM_PREEMPT; e.z = 1; end
        CS_TE: begin e.nxt = CS_TP; e.pre = 1; e.req = 1; e.prim = PRIM_PREEMPT; e.z = 0; end
        CS_TD: begin e.nxt = CS_TP; e.req = 1; e.prim = PRIM_PREEMPT; e.z = 0; end
        default: e.ill = 1;
      endcase
      EV_RFT0, EV_RFT1: unique case (s)
        CS_E:  e.ill = 1;
        CS_S:  ;
        CS_TE: e.nxt = (ev == EV_RFT1) ? CS_TE : CS_E;
        CS_TS, CS_TP: e.nxt = (ev == EV_RFT1) ? CS_TS : CS_S;
        CS_TD: begin e.nxt = (ev == EV_RFT1) ? CS_TE : CS_E; e.disp = 1; end
        default: ;
      endcase
      EV_TRAP: unique case (s)
        CS_E: begin e.nxt = CS_TE; e.trap = 1; end
        CS_S: begin e.nxt = CS_TS; e.trap = 1; end
        default: ;
      endcase
      EV_STOP: if (s == CS_E) e.nxt = CS_S;
    endcase
    return e;
  endfunction

  initial begin
    exp_t e;
    cpu_state_e states[6] = '{CS_E, CS_S, CS_TE, CS_TS, CS_TP, CS_TD};
    for (int si = 0; si < 6; si++) begin
      for (int ev = 0; ev < 6; ev++) begin
        goto_state(states[si]);
        apply(ev_e'(ev));
        e = expected(states[si], ev_e'(ev));
        chk($sformatf("%s ev%0d next", states[si].name(), ev), state, e.nxt);
        chk($sformatf("%s ev%0d illegal", states[si].name(), ev), n_ill, e.ill);
        chk($sformatf("%s ev%0d dispatch cycle", states[si].name(), ev), n_disp, e.disp);
        chk($sformatf("%s ev%0d preempt cycle", states[si].name(), ev), n_pre, e.pre);
        chk($sformatf("%s ev%0d request", states[si].name(), ev), n_req, e.req);
        chk($sformatf("%s ev%0d trap enter", states[si].name(), ev), n_trap, e.trap);
        chk($sformatf("%s ev%0d trap_active", states[si].name(), ev), trap_active,
            (e.nxt != CS_E && e.nxt != CS_S));
        if (e.req) begin
          chk("request primitive", last_prim, e.prim);
          chk("request Z", last_z, e.z);
        end
        if (e.req && e.prim == PRIM_DISPATCH) begin
          chk("current process", cur_pid, 9);
          chk("current valid", cur_valid, 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
