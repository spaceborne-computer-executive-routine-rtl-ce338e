// trap_control: trap designator registers and the trap processing line.
//
// Each processor has a one-bit trap designator register (TDR); exactly one is
// set at a time, naming the trap processor. The dispatcher moves the
// designation with the trap designator set line (tds_valid with tds_cpu), which
// sets the named TDR and clears the others. The trap processing line (TPL) is
// high while any processor is in one of its trap states; it keeps a newly
// designated processor from starting trap processing while the previous trap
// processor is still working, so that the stack is served in order.
// trap_take[k] is the product TCL.TDR for processor k, masked by TPL when
// another processor is the one trap processing; a processor already in a trap
// state sees its own TCL.TDR (it needs it at "return from trap").
// After reset processor RESET_TRAP_CPU holds the designation (this design's
// choice; the document leaves start-up open). Timing: TDR changes one cycle
// after tds_valid; trap_take and tpl are combinational.
// Lint note: the assertion's "disable iff (!rst_n)" reads the asynchronous
// reset synchronously, which lint reports as SYNCASYNCNET; that use is only
// in the checker and is intended.
module trap_control #(
  parameter int unsigned NCPU           = 3,
  parameter int unsigned RESET_TRAP_CPU = 0,
  localparam int unsigned CPU_W         = (NCPU < 2) ? 1 : $clog2(NCPU)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tds_valid,
  input  logic [CPU_W-1:0] tds_cpu,
  input  logic             tcl,
  input  logic [NCPU-1:0]  trap_active,  // processor k is in a trap state
  output logic [NCPU-1:0]  tdr,
  output logic             tpl,
  output logic [NCPU-1:0]  trap_take
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdr <= NCPU'(1) << RESET_TRAP_CPU;
    end else if (tds_valid && 32'(tds_cpu) < NCPU) begin
      tdr <= NCPU'(1) << tds_cpu;
    end
  end

  assign tpl = |trap_active;

  always_comb begin
    for (int unsigned k = 0; k < NCPU; k++) begin
      trap_take[k] = tcl && tdr[k] && (trap_active[k] || !tpl);
    end
  end

  a_tdr_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tdr));

endmodule
