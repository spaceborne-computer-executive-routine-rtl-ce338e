// pd_lines: the dispatch (d) and preempt (p) control lines between processors.
//
// The DISPATCH and PREEMPT primitives are privileged: a processor may execute
// them only while trap processing (src_trap high); anywhere else they are
// illegal instructions and raise illegal[src]. A legal primitive names the
// argument processor (cmd_cpu) and, for DISPATCH, the process to run
// (cmd_pid). The primitive raises that processor's p or d line, with the
// process number held beside the d line; the argument processor acknowledges
// (p_ack / d_ack) when its processor state control has recognised the line,
// which lowers it. When the argument processor is the executing processor
// itself the same line is used, so it recognises the primitive at its next
// instruction boundary, which the document treats as equivalent to the
// line being raised by another processor.
// When several processors issue primitives in one cycle the lowest-numbered
// wins and the others see busy and must retry (in practice only the trap
// processor issues them); processor 0 therefore never sees busy. Lines change
// one cycle after cmd_valid.
module pd_lines #(
  parameter int unsigned NCPU  = 3,
  parameter int unsigned NPROC = 16,
  localparam int unsigned CPU_W = (NCPU < 2) ? 1 : $clog2(NCPU),
  localparam int unsigned PID_W = (NPROC < 2) ? 1 : $clog2(NPROC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NCPU-1:0]  cmd_valid,
  input  logic [NCPU-1:0]  cmd_is_d,   // 1 = DISPATCH, 0 = PREEMPT
  input  logic [CPU_W-1:0] cmd_cpu [NCPU],
  input  logic [PID_W-1:0] cmd_pid [NCPU],
  input  logic [NCPU-1:0]  src_trap,
  output logic [NCPU-1:0]  illegal,
  output logic [NCPU-1:0]  busy,
  output logic [NCPU-1:0]  p_line,
  output logic [NCPU-1:0]  d_line,
  output logic [PID_W-1:0] d_pid [NCPU],
  input  logic [NCPU-1:0]  p_ack,
  input  logic [NCPU-1:0]  d_ack
);

  logic             win_valid;
  logic [CPU_W-1:0] win;

  always_comb begin
    win_valid = 1'b0;
    win       = '0;
    illegal   = '0;
    busy      = '0;
    for (int unsigned k = 0; k < NCPU; k++) begin
      if (cmd_valid[k]) begin
        if (!src_trap[k] || 32'(cmd_cpu[k]) >= NCPU) begin
          illegal[k] = 1'b1;
        end else if (!win_valid) begin
          win_valid = 1'b1;
          win       = CPU_W'(k);
        end else begin
          busy[k] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_line <= '0;
      d_line <= '0;
      for (int unsigned k = 0; k < NCPU; k++) d_pid[k] <= '0;
    end else begin
      p_line <= p_line & ~p_ack;
      d_line <= d_line & ~d_ack;
      if (win_valid) begin
        if (cmd_is_d[win]) begin
          d_line[cmd_cpu[win]] <= 1'b1;
          d_pid[cmd_cpu[win]]  <= cmd_pid[win];
        end else begin
          p_line[cmd_cpu[win]] <= 1'b1;
        end
      end
    end
  end

endmodule
