// tb_trap_stack: three pushers and one popper exercise the trap stack at
// random against a queue model. Checked: entries come out first-in
// first-out; pushes are refused (lock-out) in every cycle with a pop; a full
// stack refuses pushes; only one push is accepted per cycle and the grant
// rotates; the trap control line rises only after a tcl_set and falls only
// when the stack has become empty.
`timescale 1ns/1ps
module tb_trap_stack;

  localparam int unsigned DEPTH = 4, NPUSH = 3, ENTRY_W = 8;

  logic clk = 0, rst_n = 0;
  logic [NPUSH-1:0] push_valid = '0;
  logic [ENTRY_W-1:0] push_entry [NPUSH];
  logic [NPUSH-1:0] push_ready;
  logic [NPUSH-1:0] tcl_set = '0;
  logic pop = 0;
  logic [ENTRY_W-1:0] pop_entry;
  logic empty, full, tcl, lockout;
  logic [$clog2(DEPTH+1)-1:0] count;

  trap_stack #(.DEPTH(DEPTH), .NPUSH(NPUSH), .ENTRY_W(ENTRY_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lockouts = 0, fulls = 0, pops = 0, pushes = 0;
  logic [ENTRY_W-1:0] model[$];
  bit tcl_model = 0;
  logic [7:0] serial = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    logic [NPUSH-1:0] acc;
    for (int k = 0; k < NPUSH; k++) push_entry[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // drive
      for (int k = 0; k < NPUSH; k++) begin
        if (!push_valid[k] && $urandom_range(0, 2) == 0) begin
          push_valid[k] = 1'b1;
          push_entry[k] = serial;
          serial++;
        end
      end
      tcl_set = '0;
      if ($urandom_range(0, 5) == 0) tcl_set[$urandom_range(0, NPUSH - 1)] = 1'b1;
      pop = !empty && ($urandom_range(0, 2) == 0);
      #1;
      // check combinational outputs
      checks++;
      if (count != model.size()) fail("count");
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)) fail("empty/full");
      if (!empty) begin
        checks++;
        if (pop_entry !== model[0]) fail($sformatf("head %0h expected %0h", pop_entry, model[0]));
      end
      checks++;
      if ($countones(push_ready) > 1) fail("more than one push accepted");
      checks++;
      if ((push_ready & ~push_valid) != '0) fail("ready without valid");
      if (pop && push_valid != '0) begin
        lockouts++;
        checks++;
        if (push_ready != '0 || !lockout) fail("push accepted during pop");
      end
      if (full && !pop && push_valid != '0) begin
        fulls++;
        checks++;
        if (push_ready != '0) fail("push accepted when full");
      end
      if (!full && !pop && push_valid != '0) begin
        checks++;
        if (push_ready == '0) fail("push refused without cause");
      end
      checks++;
      if (tcl !== tcl_model) fail("tcl");
      // update model at the edge with what was accepted before it
      acc = push_ready;
      @(posedge clk);
      #1;
      if (pop) begin void'(model.pop_front()); pops++; end
      for (int k = 0; k < NPUSH; k++) begin
        if (acc[k]) begin
          model.push_back(push_entry[k]);
          push_valid[k] = 1'b0;
          pushes++;
        end
      end
      tcl_model = (tcl_model || tcl_set != '0) && model.size() != 0;
    end
    checks++;
    if (lockouts == 0 || fulls == 0 || pops < 100) fail("coverage");
    $display("pushes=%0d pops=%0d lockouts=%0d fulls=%0d", pushes, pops, lockouts, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
