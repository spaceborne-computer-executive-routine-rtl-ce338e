// tb_pcb_store: three ports issue random reads, writes, increments and
// decrements of the PCB state and work variable, holding each request until
// its ack, while process construction writes come in between. A reference
// copy of the store, updated in the order the operations are acknowledged,
// gives the expected read data. Also checked: one ack per granted request
// one cycle after the grant, round-robin fairness (no port waits more than
// NPORT grants), saturation of w with w_error, and the monitor port.
`timescale 1ns/1ps
module tb_pcb_store;
  import pcx_pkg::*;

  localparam int unsigned NPROC = 8, NPORT = 3, W_WIDTH = 4;

  logic clk = 0, rst_n = 0;
  logic [NPORT-1:0] req = '0;
  pcb_op_e op [NPORT];
  logic [2:0] pid [NPORT];
  pcb_state_t wstate [NPORT];
  logic [NPORT-1:0] ack;
  pcb_state_t rstate;
  logic [W_WIDTH-1:0] rw;
  logic w_error, conflict;
  logic con_valid = 0;
  logic [2:0] con_pid = 0;
  logic [W_WIDTH-1:0] con_w = 0;
  logic [2:0] mon_pid = 0;
  pcb_state_t mon_state;
  logic [W_WIDTH-1:0] mon_w;

  pcb_store #(.NPROC(NPROC), .NPORT(NPORT), .W_WIDTH(W_WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int conflicts = 0, saturations = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pcb_state_t rs [NPROC];
  logic [W_WIDTH-1:0] rwv [NPROC];

  // Reference model update: performed when the ack is seen, which is the
  // order in which the store performed the operations (one per cycle).
  function automatic void apply(input int k, output pcb_state_t es, output logic [W_WIDTH-1:0] ew,
                                output bit eerr);
    int p;
    p = pid[k];
    eerr = 0;
    unique case (op[k])
      PCB_RD_STATE: ;
      PCB_WR_STATE: rs[p] = wstate[k];
      PCB_INC_W: if (rwv[p] == '1) eerr = 1; else rwv[p]++;
      PCB_DEC_W: if (rwv[p] == '0) eerr = 1; else rwv[p]--;
    endcase
    es = rs[p];
    ew = rwv[p];
  endfunction

  int wait_cycles [NPORT];
  int max_wait = 0;

  initial begin
    pcb_state_t es;
    logic [W_WIDTH-1:0] ew;
    bit eerr;
    for (int p = 0; p < NPROC; p++) begin rs[p] = '0; rwv[p] = '0; end
    for (int k = 0; k < NPORT; k++) begin
      op[k] = PCB_RD_STATE; pid[k] = 0; wstate[k] = '0; wait_cycles[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // construction: give process 2 an initial w of 5
    @(negedge clk) begin con_valid = 1; con_pid = 2; con_w = 5; end
    @(negedge clk) con_valid = 0;
    rwv[2] = 5;
    mon_pid = 2;
    #1 checks++;
    if (mon_w !== 5 || mon_state !== '0) begin failures++; $display("FAIL monitor after construction"); end

    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // consume acks (they refer to the request presented during the grant)
      for (int k = 0; k < NPORT; k++) begin
        if (ack[k]) begin
          apply(k, es, ew, eerr);
          checks++;
          if (rstate !== es || rw !== ew) begin
            failures++;
            $display("FAIL port %0d op %s pid %0d: got st=%p w=%0d exp st=%p w=%0d",
                     k, op[k].name(), pid[k], rstate, rw, es, ew);
          end
          if (eerr) saturations++;
          checks++;
          if (w_error !== eerr) begin failures++; $display("FAIL w_error port %0d", k); end
          req[k] = 1'b0;
          if (wait_cycles[k] > max_wait) max_wait = wait_cycles[k];
          wait_cycles[k] = 0;
        end
      end
      if (conflict) conflicts++;
      // new requests
      for (int k = 0; k < NPORT; k++) begin
        if (!req[k] && $urandom_range(0, 3) != 0) begin
          req[k]    = 1'b1;
          op[k]     = pcb_op_e'($urandom_range(0, 3));
          pid[k]    = 3'($urandom_range(0, 3));   // few processes: many collisions
          wstate[k] = pcb_state_t'($urandom_range(0, 7));
        end else if (req[k]) begin
          wait_cycles[k]++;
        end
      end
      mon_pid = 3'($urandom_range(0, NPROC - 1));
      #1 checks++;
      if (mon_w !== rwv[mon_pid] || mon_state !== rs[mon_pid]) begin
        failures++; $display("FAIL monitor pid %0d", mon_pid);
      end
    end
    checks++;
    // with three ports and one grant per cycle no port waits more than 2*NPORT cycles
    if (max_wait > 2 * NPORT) begin failures++; $display("FAIL fairness: waited %0d cycles", max_wait); end
    checks++;
    if (conflicts == 0 || saturations == 0) begin
      failures++; $display("FAIL coverage: conflicts=%0d saturations=%0d", conflicts, saturations);
    end
    $display("conflicts=%0d saturations=%0d max_wait=%0d", conflicts, saturations, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
