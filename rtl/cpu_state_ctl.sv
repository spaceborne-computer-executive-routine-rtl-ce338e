// cpu_state_ctl: processor state transition control for one processor.
//
// A processor is executing (e) or stopped (s), and each of these has trap
// processing companions: te (trapped out of e, resumes its process after),
// ts (trapped out of s, stops after), tp (preempted while trap processing,
// stops after) and td (dispatched while trap processing, executes after).
// The transitions are those of the document's processor state matrix:
//
//   event         e      te     s      ts     tp     td
//   d             x      x      e      td     td     x
//   p             s      tp     x      x      x      tp
//   rft           x      e*     -      s*     s*     e*
//   TCL.TDR       te     -      ts     -      -      -
//   (* "return from trap" goes to te/ts instead while TCL.TDR is still 1)
//
// d and p are the dispatch and preempt control lines, sampled when the
// processor signals the end of an instruction sequence (boundary), p before
// d before TCL.TDR; rft is the return-from-trap instruction, taken in the
// cycle it is given. An x entry raises illegal and leaves the state as it is.
// A recognised d or p also asks the process-control machine to run the
// DISPATCH or PREEMPT primitive (pc_req, held until pc_ack), for the
// dispatched process (d_pid) or the process this processor was running;
// pc_z is 0 when the processor is trap processing, which disables the stop
// the machine would otherwise order for a preempt. No new event is taken
// while that request is pending.
//
// Outputs dispatch_cycle and preempt_cycle are one-cycle pulses telling the
// processor to run its dispatch cycle (load registers and return address of
// cur_pid) or preempt cycle (save registers). The dispatch cycle of a
// processor dispatched while trap processing is deferred to its return from
// trap, as the document specifies. stop_req (a J, X or F stop ordered by the
// process-control machine) takes an executing processor to s; this transition
// is not in the document's matrix and is this design's reading of "stop this
// processor". Reset state is s.
module cpu_state_ctl
  import pcx_pkg::*;
#(
  parameter int unsigned NPROC = 16,
  localparam int unsigned PID_W = (NPROC < 2) ? 1 : $clog2(NPROC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             boundary,
  input  logic             p_line,
  input  logic             d_line,
  input  logic [PID_W-1:0] d_pid,
  input  logic             rft,
  input  logic             trap_take,     // TCL.TDR (masked by TPL)
  input  logic             stop_req,
  output cpu_state_e       state,
  output logic             trap_active,
  output logic [PID_W-1:0] cur_pid,
  output logic             cur_valid,
  output logic             p_ack,
  output logic             d_ack,
  output logic             dispatch_cycle,
  output logic             preempt_cycle,
  output logic             trap_enter,
  output logic             illegal,
  output logic             pc_req,
  output prim_e            pc_prim,
  output logic [PID_W-1:0] pc_pid,
  output logic             pc_z,
  input  logic             pc_ack
);

  assign trap_active = (state == CS_TE) || (state == CS_TS) ||
                       (state == CS_TP) || (state == CS_TD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CS_S;
      cur_pid        <= '0;
      cur_valid      <= 1'b0;
      p_ack          <= 1'b0;
      d_ack          <= 1'b0;
      dispatch_cycle <= 1'b0;
      preempt_cycle  <= 1'b0;
      trap_enter     <= 1'b0;
      illegal        <= 1'b0;
      pc_req         <= 1'b0;
      pc_prim        <= PRIM_STOP;
      pc_pid         <= '0;
      pc_z           <= 1'b1;
    end else begin
      p_ack          <= 1'b0;
      d_ack          <= 1'b0;
      dispatch_cycle <= 1'b0;
      preempt_cycle  <= 1'b0;
      trap_enter     <= 1'b0;
      illegal        <= 1'b0;
      if (pc_req && pc_ack) pc_req <= 1'b0;

      if (stop_req && state == CS_E) begin
        state     <= CS_S;
        cur_valid <= 1'b0;
      end else if (!pc_req) begin
        if (rft) begin
          unique case (state)
            CS_TE: state <= trap_take ? CS_TE : CS_E;
            CS_TS,
            CS_TP: state <= trap_take ? CS_TS : CS_S;
            CS_TD: begin
              state          <= trap_take ? CS_TE : CS_E;
              dispatch_cycle <= 1'b1;
            end
            CS_E:  illegal <= 1'b1;
            CS_S:  ;  // "-": nothing happens
            default: illegal <= 1'b1;
          endcase
        end else if (boundary) begin
          if (p_line) begin
            p_ack <= 1'b1;
            unique case (state)
              CS_E, CS_TE, CS_TD: begin
                state     <= (state == CS_E) ? CS_S : CS_TP;
                // a processor in td never started its process: nothing to save
                preempt_cycle <= (state != CS_TD);
                cur_valid <= 1'b0;
                pc_req    <= 1'b1;
                pc_prim   <= PRIM_PREEMPT;
                pc_pid    <= cur_pid;
                pc_z      <= (state == CS_E);
              end
              default: illegal <= 1'b1;
            endcase
          end else if (d_line) begin
            d_ack <= 1'b1;
            unique case (state)
              CS_S, CS_TS, CS_TP: begin
                state          <= (state == CS_S) ? CS_E : CS_TD;
                dispatch_cycle <= (state == CS_S);
                cur_pid        <= d_pid;
                cur_valid      <= 1'b1;
                pc_req         <= 1'b1;
                pc_prim        <= PRIM_DISPATCH;
                pc_pid         <= d_pid;
                pc_z           <= (state == CS_S);
              end
              default: illegal <= 1'b1;
            endcase
          end else if (trap_take) begin
            if (state == CS_E) begin
              state      <= CS_TE;
              trap_enter <= 1'b1;
            end else if (state == CS_S) begin
              state      <= CS_TS;
              trap_enter <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
