// tb_trap_control: checks the trap designator registers and the trap
// processing line. After reset the reset trap processor holds the
// designation; a TDS order moves it, one-hot, to the named processor; TPL is
// the OR of the trap states; TCL.TDR reaches the designated processor only,
// and a newly designated processor is held off while another is still trap
// processing. Random stimulus against a model written here.
`timescale 1ns/1ps
module tb_trap_control;

  localparam int unsigned NCPU = 3;

  logic clk = 0, rst_n = 0;
  logic tds_valid = 0;
  logic [1:0] tds_cpu = 0;
  logic tcl = 0;
  logic [NCPU-1:0] trap_active = '0;
  logic [NCPU-1:0] tdr;
  logic tpl;
  logic [NCPU-1:0] trap_take;

  trap_control #(.NCPU(NCPU), .RESET_TRAP_CPU(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, held_off = 0, moves = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCPU-1:0] m_tdr;
    logic [NCPU-1:0] exp_take;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_tdr = 3'b010;
    #1 checks++;
    if (tdr !== m_tdr) begin failures++; $display("FAIL reset designation %b", tdr); end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      tds_valid   = ($urandom_range(0, 7) == 0);
      tds_cpu     = 2'($urandom_range(0, 3));    // 3 is not a processor: ignored
      tcl         = $urandom_range(0, 1);
      trap_active = '0;
      if ($urandom_range(0, 1)) trap_active[$urandom_range(0, NCPU - 1)] = 1'b1;
      #1;
      checks++;
      if (tpl !== |trap_active) begin failures++; $display("FAIL tpl"); end
      for (int k = 0; k < NCPU; k++)
        exp_take[k] = tcl && m_tdr[k] && (trap_active[k] || trap_active == '0);
      if (tcl && (m_tdr & ~trap_active) != '0 && trap_active != '0) held_off++;
      checks++;
      if (trap_take !== exp_take) begin
        failures++;
        $display("FAIL trap_take %b expected %b (tdr %b active %b)", trap_take, exp_take, m_tdr, trap_active);
      end
      @(posedge clk);
      if (tds_valid && tds_cpu < NCPU) begin m_tdr = 3'b001 << tds_cpu; moves++; end
      #1 checks++;
      if (tdr !== m_tdr) begin failures++; $display("FAIL tdr %b expected %b", tdr, m_tdr); end
    end
    checks++;
    if (held_off == 0 || moves == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
