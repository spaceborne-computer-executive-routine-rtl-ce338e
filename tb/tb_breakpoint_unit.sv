// tb_breakpoint_unit: loads breakpoint registers as a dispatch would, then
// presents random fetch and operand addresses (often equal to the
// breakpoints) and checks that a trap to the right location is requested one
// cycle after each match in debug mode, that instruction breakpoints win a
// tie, and that nothing traps outside debug mode or for an unloaded register.
`timescale 1ns/1ps
module tb_breakpoint_unit;

  localparam int unsigned ADDR_W = 18;
  localparam logic [17:0] BPA_T = 18'h00100, BPO_T = 18'h00200;

  logic clk = 0, rst_n = 0;
  logic debug_mode = 0, load = 0, bpa_valid_in = 0, bpo_valid_in = 0;
  logic [ADDR_W-1:0] bpa_in = 0, bpo_in = 0;
  logic fetch_valid = 0, opnd_valid = 0;
  logic [ADDR_W-1:0] fetch_addr = 0, opnd_addr = 0;
  logic trap, is_operand;
  logic [ADDR_W-1:0] trap_addr;

  breakpoint_unit #(.ADDR_W(ADDR_W), .BPA_TRAP_ADDR(BPA_T), .BPO_TRAP_ADDR(BPO_T)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_a = 0, n_o = 0, n_nodebug = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ma_v, mo_v;
    logic [ADDR_W-1:0] ma, mo;
    bit ha, ho;
    ma_v = 0; mo_v = 0; ma = 0; mo = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      load = ($urandom_range(0, 50) == 0);
      bpa_valid_in = $urandom_range(0, 3) != 0;
      bpo_valid_in = $urandom_range(0, 3) != 0;
      bpa_in = ADDR_W'($urandom_range(0, 15));
      bpo_in = ADDR_W'($urandom_range(0, 15));
      debug_mode = ($urandom_range(0, 4) != 0);
      fetch_valid = $urandom_range(0, 1);
      opnd_valid = $urandom_range(0, 1);
      fetch_addr = ADDR_W'($urandom_range(0, 15));
      opnd_addr = ADDR_W'($urandom_range(0, 15));
      ha = debug_mode && ma_v && fetch_valid && fetch_addr == ma;
      ho = debug_mode && mo_v && opnd_valid && opnd_addr == mo;
      if (!debug_mode && ((ma_v && fetch_valid && fetch_addr == ma) || (mo_v && opnd_valid && opnd_addr == mo)))
        n_nodebug++;
      @(posedge clk);
      #1;
      checks++;
      if (trap !== (ha || ho)) begin failures++; $display("FAIL trap %b expected %b", trap, ha || ho); end
      if (ha) begin
        n_a++;
        checks++;
        if (trap_addr !== BPA_T || is_operand) begin failures++; $display("FAIL BPA trap"); end
      end else if (ho) begin
        n_o++;
        checks++;
        if (trap_addr !== BPO_T || !is_operand) begin failures++; $display("FAIL BPO trap"); end
      end
      if (load) begin ma_v = bpa_valid_in; mo_v = bpo_valid_in; ma = bpa_in; mo = bpo_in; end
    end
    checks++;
    if (n_a == 0 || n_o == 0 || n_nodebug == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
