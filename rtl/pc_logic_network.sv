// pc_logic_network: the combinational "logic network for process control".
//
// Given the primitive being executed (inputs C,B,A) and the current state of
// the object process (inputs E,D), it produces the fourteen control variables
// X F N G H Y W V S M T R I J that steer the process-control sequencer. The
// equations are the document's sum-of-products expressions, read against its
// expanded standard basis (truth table), with don't-care minterms taken as 1:
//
//   X = A'C'E' + AB'CE' + A'B'CD' + A'BE' + A'DE + B'CDE
//   F = BC'E' + ABC'D'            N = D'E' + B + C
//   G = C'E' + B'CE + BC'         H = B'D + A'C'
//   Y = A'B'C'                    W = B'C'          V = AC'
//   S = C'D'E' + BDE' + BD'E + BC'                  M = C'E' + C'D
//   T = A'CD'    R = ABC          I = AC'D'E        J = CD'E + BD'E
//
// W is B'C' (work variable changes only for STOP and WAKE); the printed
// "AC' + B'C'" would also change w on CONTINUE, which the work-variable matrix
// forbids, so the matrix was followed.
//
// Timing follows the enable flip-flop scheme: a one-cycle start pulse P sets
// the enable flip-flop and samples A..E into the output latches; the ready
// pulse P' follows SETTLE_CYCLES cycles later (the delay element that models
// the network's settling time). The outputs hold until net_reset (the R
// input), which clears the enable flip-flop and every latch. While enabled,
// force_idle and force_loop feed back into the latches the values that
// sequencer steps 10 and 11 require after w has been tested (w = 0: S N J set,
// G H cleared; w > 0: S N J cleared), and clear_j clears J (step 18).
// Outputs read zero while the network is not enabled.
module pc_logic_network
  import pcx_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,       // P
  input  logic      net_reset,   // R
  input  prim_e     prim,        // {C,B,A}
  input  pstate_e   st,          // {E,D}
  input  logic      force_idle,  // step 10 feedback
  input  logic      force_loop,  // step 11 feedback
  input  logic      clear_j,     // step 18 feedback
  output logic      ready,       // P'
  output logic      enabled,     // Q of the enable flip-flop
  output ctl_vars_t v
);

  logic a, b, c, d, e;
  assign {c, b, a} = prim;
  assign {e, d}    = st;

  ctl_vars_t eval;

  always_comb begin
    eval.x = (!a && !c && !e) || (a && !b && c && !e) || (!a && !b && c && !d)
           || (!a && b && !e) || (!a && d && e) || (!b && c && d && e);
    eval.f = (b && !c && !e) || (a && b && !c && !d);
    eval.n = (!d && !e) || b || c;
    eval.g = (!c && !e) || (!b && c && e) || (b && !c);
    eval.h = (!b && d) || (!a && !c);
    eval.y = !a && !b && !c;
    eval.w = !b && !c;
    eval.v = a && !c;
    eval.s = (!c && !d && !e) || (b && d && !e) || (b && !d && e) || (b && !c);
    eval.m = (!c && !e) || (!c && d);
    eval.t = !a && c && !d;
    eval.r = a && b && c;
    eval.i = a && !c && !d && e;
    eval.j = (c && !d && e) || (b && !d && e);
  end

  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1) + 1;
  logic [CW-1:0] settle_cnt;
  logic          settling;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled    <= 1'b0;
      v          <= '0;
      settling   <= 1'b0;
      settle_cnt <= '0;
      ready      <= 1'b0;
    end else if (net_reset) begin
      enabled    <= 1'b0;
      v          <= '0;
      settling   <= 1'b0;
      settle_cnt <= '0;
      ready      <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (start && !enabled) begin
        enabled    <= 1'b1;
        v          <= eval;
        settling   <= 1'b1;
        settle_cnt <= CW'(SETTLE_CYCLES);
      end else if (settling) begin
        if (settle_cnt <= CW'(1)) begin
          settling <= 1'b0;
          ready    <= 1'b1;
        end else begin
          settle_cnt <= settle_cnt - CW'(1);
        end
      end
      if (enabled) begin
        if (force_idle) begin
          v.s <= 1'b1;
          v.n <= 1'b1;
          v.j <= 1'b1;
          v.h <= 1'b0;
          v.g <= 1'b0;
        end else if (force_loop) begin
          v.s <= 1'b0;
          v.n <= 1'b0;
          v.j <= 1'b0;
        end
        if (clear_j) v.j <= 1'b0;
      end
    end
  end

endmodule
