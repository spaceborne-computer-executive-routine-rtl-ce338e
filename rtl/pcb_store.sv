// pcb_store: the process-control fields of every process control block.
//
// For each of NPROC processes it keeps the PCB state (terminated flag plus
// the {E,D} process state) and the work variable w, the count of WAKEs not
// yet serviced. The other PCB fields (ring pointers, names, priority,
// addresses, saved registers) belong to main memory and to the processor and
// are not held here.
//
// NPORT process-control machines share one access port. Each machine holds
// req with op, pid and wstate until it sees its ack bit; a round-robin
// arbiter grants one machine per cycle, the operation is done in that cycle
// and ack plus the read data (rstate, rw: the state and w after the
// operation) follow one cycle later. Increment and decrement of w are done
// as one indivisible read-modify-write, which gives the "test and set"
// protection the document asks for around w. w saturates at its limits and
// raises w_error instead of wrapping (the document treats only non-negative
// w). The construction port (con_valid) has priority over the machines and
// puts a process in the idle state with its initial w, as process
// construction does. The monitor port reads any process's state and w
// combinationally, for the sampling of w the document proposes.
// Arbitration, saturation and the port protocol are this design's choices.
module pcb_store
  import pcx_pkg::*;
#(
  parameter int unsigned NPROC   = 16,
  parameter int unsigned NPORT   = 3,
  parameter int unsigned W_WIDTH = 8,
  localparam int unsigned PID_W  = (NPROC < 2) ? 1 : $clog2(NPROC)
) (
  input  logic               clk,
  input  logic               rst_n,
  // machine port
  input  logic [NPORT-1:0]   req,
  input  pcb_op_e            op     [NPORT],
  input  logic [PID_W-1:0]   pid    [NPORT],
  input  pcb_state_t         wstate [NPORT],
  output logic [NPORT-1:0]   ack,
  output pcb_state_t         rstate,
  output logic [W_WIDTH-1:0] rw,
  output logic               w_error,   // pulse: w saturated
  output logic               conflict,  // pulse: more than one requester this cycle
  // construction port
  input  logic               con_valid,
  input  logic [PID_W-1:0]   con_pid,
  input  logic [W_WIDTH-1:0] con_w,
  // monitor port
  input  logic [PID_W-1:0]   mon_pid,
  output pcb_state_t         mon_state,
  output logic [W_WIDTH-1:0] mon_w
);

  localparam int unsigned PTR_W = (NPORT < 2) ? 1 : $clog2(NPORT);

  pcb_state_t         state_mem [NPROC];
  logic [W_WIDTH-1:0] w_mem     [NPROC];

  logic [PTR_W-1:0] rr_ptr;
  logic             gnt_valid;
  logic [PTR_W-1:0] gnt;
  logic [NPORT-1:0] eligible;

  // A port whose ack is going out this cycle is not granted again.
  assign eligible = req & ~ack;

  always_comb begin
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int unsigned k = 0; k < NPORT; k++) begin
      logic [PTR_W-1:0] idx;
      idx = PTR_W'((32'(rr_ptr) + k) % NPORT);
      if (!gnt_valid && eligible[idx]) begin
        gnt_valid = 1'b1;
        gnt       = PTR_W'(idx);
      end
    end
  end

  logic [$clog2(NPORT+1)-1:0] n_req;
  always_comb begin
    n_req = '0;
    for (int unsigned k = 0; k < NPORT; k++) n_req += eligible[k];
  end

  assign mon_state = state_mem[mon_pid];
  assign mon_w     = w_mem[mon_pid];

  logic [PID_W-1:0]   g_pid;
  pcb_op_e            g_op;
  logic [W_WIDTH-1:0] g_w;
  assign g_pid = pid[gnt];
  assign g_op  = op[gnt];
  assign g_w   = w_mem[g_pid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NPROC; p++) begin
        state_mem[p] <= '0;
        w_mem[p]     <= '0;
      end
      rr_ptr   <= '0;
      ack      <= '0;
      rstate   <= '0;
      rw       <= '0;
      w_error  <= 1'b0;
      conflict <= 1'b0;
    end else begin
      ack      <= '0;
      w_error  <= 1'b0;
      conflict <= (n_req > 1);
      if (con_valid) begin
        state_mem[con_pid] <= '0;
        w_mem[con_pid]     <= con_w;
      end else if (gnt_valid) begin
        ack[gnt] <= 1'b1;
        rr_ptr   <= (32'(gnt) + 1 == NPORT) ? '0 : PTR_W'(32'(gnt) + 1);
        unique case (g_op)
          PCB_RD_STATE: begin
            rstate <= state_mem[g_pid];
            rw     <= g_w;
          end
          PCB_WR_STATE: begin
            state_mem[g_pid] <= wstate[gnt];
            rstate           <= wstate[gnt];
            rw               <= g_w;
          end
          PCB_INC_W: begin
            rstate <= state_mem[g_pid];
            if (g_w == '1) begin
              w_error <= 1'b1;
              rw      <= g_w;
            end else begin
              w_mem[g_pid] <= g_w + 1'b1;
              rw           <= g_w + 1'b1;
            end
          end
          PCB_DEC_W: begin
            rstate <= state_mem[g_pid];
            if (g_w == '0) begin
              w_error <= 1'b1;
              rw      <= g_w;
            end else begin
              w_mem[g_pid] <= g_w - 1'b1;
              rw           <= g_w - 1'b1;
            end
          end
        endcase
      end
    end
  end

endmodule
