// tb_pd_lines: checks the dispatch/preempt control lines. A DISPATCH or
// PREEMPT from a processor that is not trap processing is illegal and
// changes nothing; a legal one raises the argument processor's d line (with
// the process number) or p line one cycle later, including the executing
// processor's own; the line stays up until acknowledged; simultaneous
// primitives let the lowest-numbered processor through and report busy to
// the others. Random stimulus against a model written here.
`timescale 1ns/1ps
module tb_pd_lines;

  localparam int unsigned NCPU = 3, NPROC = 16;

  logic clk = 0, rst_n = 0;
  logic [NCPU-1:0] cmd_valid = '0, cmd_is_d = '0, src_trap = '0;
  logic [1:0] cmd_cpu [NCPU];
  logic [3:0] cmd_pid [NCPU];
  logic [NCPU-1:0] illegal, busy, p_line, d_line;
  logic [3:0] d_pid [NCPU];
  logic [NCPU-1:0] p_ack = '0, d_ack = '0;

  pd_lines #(.NCPU(NCPU), .NPROC(NPROC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ill = 0, n_busy = 0, n_self = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCPU-1:0] mp, md, eill, ebusy;
    logic [3:0] mpid [NCPU];
    bit won;
    for (int k = 0; k < NCPU; k++) begin cmd_cpu[k] = 0; cmd_pid[k] = 0; mpid[k] = 0; end
    mp = '0; md = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < NCPU; k++) begin
        cmd_valid[k] = ($urandom_range(0, 3) == 0);
        cmd_is_d[k]  = $urandom_range(0, 1);
        cmd_cpu[k]   = 2'($urandom_range(0, NCPU - 1));
        cmd_pid[k]   = 4'($urandom);
        src_trap[k]  = ($urandom_range(0, 2) != 0);
        p_ack[k]     = p_line[k] && ($urandom_range(0, 2) == 0);
        d_ack[k]     = d_line[k] && ($urandom_range(0, 2) == 0);
      end
      #1;
      // model
      eill = '0; ebusy = '0; won = 0;
      for (int k = 0; k < NCPU; k++) begin
        if (cmd_valid[k]) begin
          if (!src_trap[k]) eill[k] = 1;
          else if (won) ebusy[k] = 1;
          else won = 1;
        end
      end
      checks++;
      if (illegal !== eill || busy !== ebusy) begin
        failures++; $display("FAIL illegal/busy %b %b expected %b %b", illegal, busy, eill, ebusy);
      end
      n_ill += $countones(eill);
      n_busy += $countones(ebusy);
      mp = mp & ~p_ack;
      md = md & ~d_ack;
      for (int k = 0; k < NCPU; k++) begin
        if (cmd_valid[k] && src_trap[k]) begin
          if (cmd_cpu[k] == k) n_self++;
          if (cmd_is_d[k]) begin md[cmd_cpu[k]] = 1; mpid[cmd_cpu[k]] = cmd_pid[k]; end
          else mp[cmd_cpu[k]] = 1;
          break;
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (p_line !== mp || d_line !== md) begin
        failures++; $display("FAIL lines p=%b d=%b expected p=%b d=%b", p_line, d_line, mp, md);
      end
      for (int k = 0; k < NCPU; k++) begin
        if (md[k]) begin
          checks++;
          if (d_pid[k] !== mpid[k]) begin failures++; $display("FAIL d_pid %0d", k); end
        end
      end
    end
    checks++;
    if (n_ill == 0 || n_busy == 0 || n_self == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
