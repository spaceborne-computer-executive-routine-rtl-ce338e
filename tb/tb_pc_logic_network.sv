// tb_pc_logic_network: checks the control-variable network against the
// process-control transition matrix, worked out here from the meaning of each
// primitive in each state (not from the network's equations).
// For all 32 combinations of primitive and state it checks X and F everywhere
// and every other variable where it matters (not under X or F, and not where
// the value depends on the work variable). It also checks that P' comes
// exactly SETTLE_CYCLES cycles after P, that R clears the outputs, and the
// feedback inputs used by sequencer steps 10, 11 and 18.
`timescale 1ns/1ps
module tb_pc_logic_network;
  import pcx_pkg::*;

  localparam int unsigned SETTLE = 2;

  logic clk = 0, rst_n = 0;
  logic start = 0, net_reset = 0, force_idle = 0, force_loop = 0, clear_j = 0;
  prim_e prim = PRIM_STOP;
  pstate_e st = PS_IDLE;
  logic ready, enabled;
  ctl_vars_t v;

  int checks = 0, failures = 0;

  pc_logic_network #(.SETTLE_CYCLES(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s prim=%s st=%s got=%0b exp=%0b", what, prim.name(), st.name(), got, exp);
    end
  endtask

  // Reference: transition matrix semantics.
  typedef struct {
    bit x, f, ydep;     // ydep: STOP in running, result depends on w
    bit n, term;
    pstate_e nxt;
    bit y, w, v, s, m, t, r, i, j;
  } ref_t;

  function automatic ref_t reference(prim_e p, pstate_e s);
    ref_t e;
    e = '{default: 0, nxt: PS_IDLE};
    unique case (p)
      PRIM_STOP: if (s == PS_RUNNING) begin e.ydep = 1; e.y = 1; e.w = 1; e.v = 0; end
                 else e.x = 1;
      PRIM_WAKE: begin
        e.w = 1; e.v = 1;
        if (s == PS_IDLE) begin e.n = 1; e.nxt = PS_READY; e.s = 1; e.m = 1; end
        if (s == PS_RUNNING) e.i = 1;
      end
      PRIM_WAIT: if (s == PS_RUNNING) begin
                   e.n = 1; e.nxt = PS_WAITING; e.s = 1; e.m = 0; e.j = 1;
                 end else e.x = 1;
      PRIM_CONTINUE: if (s == PS_WAITING) begin
                       e.n = 1; e.nxt = PS_READY; e.s = 1; e.m = 1;
                     end else e.f = 1;
      PRIM_DISPATCH: if (s == PS_READY) begin e.n = 1; e.nxt = PS_RUNNING; end
                     else e.x = 1;
      PRIM_PREEMPT: if (s == PS_RUNNING) begin e.n = 1; e.nxt = PS_READY; e.j = 1; end
                    else e.x = 1;
      PRIM_EXIT: if (s == PS_RUNNING) begin
                   e.n = 1; e.term = 1; e.t = 1; e.s = 1; e.m = 0; e.j = 1;
                 end else e.x = 1;
      PRIM_ABORT: begin
        e.n = 1; e.term = 1; e.r = 1;
        // the ready list holds ready and running processes
        if (s == PS_READY || s == PS_RUNNING) begin e.s = 1; e.m = 0; end
        if (s == PS_RUNNING) e.j = 1;
      end
    endcase
    return e;
  endfunction

  task automatic pulse_start();
    int n;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n = 1;
    while (!ready && n < 20) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != SETTLE + 1) begin
      failures++;
      $display("FAIL latency: P' after %0d cycles, expected %0d", n - 1, SETTLE);
    end
  endtask

  task automatic do_reset();
    @(negedge clk) net_reset = 1;
    @(negedge clk) net_reset = 0;
  endtask

  initial begin
    ref_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pi = 0; pi < 8; pi++) begin
      for (int si = 0; si < 4; si++) begin
        prim = prim_e'(pi);
        st   = pstate_e'(si);
        e    = reference(prim, st);
        pulse_start();
        chk("enabled", enabled, 1'b1);
        chk("X", v.x, e.x);
        if (!e.x) chk("F", v.f, e.f);
        if (!e.x && !e.f) begin
          chk("Y", v.y, e.y);
          chk("W", v.w, e.w);
          if (e.w) chk("V", v.v, e.v);
          chk("T", v.t, e.t);
          chk("R", v.r, e.r);
          chk("I", v.i, e.i);
          if (!e.ydep) begin
            chk("N", v.n, e.n);
            chk("S", v.s, e.s);
            if (e.s) chk("M", v.m, e.m);
            chk("J", v.j, e.j);
            if (e.n && !e.term) begin
              chk("G(new D)", v.g, e.nxt[0]);
              chk("H(new E)", v.h, e.nxt[1]);
            end
          end
        end
        do_reset();
        chk("R clears", |v, 1'b0);
        chk("R clears enable", enabled, 1'b0);
      end
    end
    // Step 10 / 11 / 18 feedback on a STOP in the running state.
    prim = PRIM_STOP; st = PS_RUNNING;
    pulse_start();
    @(negedge clk) force_idle = 1;
    @(negedge clk) force_idle = 0;
    chk("F10 S", v.s, 1); chk("F10 N", v.n, 1); chk("F10 J", v.j, 1);
    chk("F10 H", v.h, 0); chk("F10 G", v.g, 0);
    do_reset();
    pulse_start();
    @(negedge clk) force_loop = 1;
    @(negedge clk) force_loop = 0;
    chk("F11 S", v.s, 0); chk("F11 N", v.n, 0); chk("F11 J", v.j, 0);
    do_reset();
    prim = PRIM_ABORT; st = PS_RUNNING;
    pulse_start();
    chk("J before F18", v.j, 1);
    @(negedge clk) clear_j = 1;
    @(negedge clk) clear_j = 0;
    chk("F18 J", v.j, 0);
    chk("F18 R kept", v.r, 1);
    do_reset();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
