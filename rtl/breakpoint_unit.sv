// breakpoint_unit: breakpoint address and breakpoint operand compare for one
// processor in debug mode.
//
// When a process is dispatched, its PCB's Breakpointaddress and
// Breakpointoperand are loaded into two compare registers (load, with a valid
// bit for each so that a process can have neither, one or both). In debug
// mode every instruction fetch address is compared with the first and every
// operand effective address with the second; a match traps the processor to
// a predetermined location, BPA_TRAP_ADDR for an instruction breakpoint and
// BPO_TRAP_ADDR for an operand breakpoint. Outside debug mode nothing traps,
// as the document restricts these values to debug mode.
// Timing: the compare is combinational and the trap request (trap, trap_addr,
// is_operand) is registered, one cycle after the matching address. When both
// match in one cycle the instruction breakpoint is reported. Address width
// and the two trap locations are parameters; their values are this design's.
module breakpoint_unit #(
  parameter int unsigned     ADDR_W        = 18,
  parameter logic [17:0]     BPA_TRAP_ADDR = 18'h00100,
  parameter logic [17:0]     BPO_TRAP_ADDR = 18'h00200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              debug_mode,
  input  logic              load,
  input  logic              bpa_valid_in,
  input  logic [ADDR_W-1:0] bpa_in,
  input  logic              bpo_valid_in,
  input  logic [ADDR_W-1:0] bpo_in,
  input  logic              fetch_valid,
  input  logic [ADDR_W-1:0] fetch_addr,
  input  logic              opnd_valid,
  input  logic [ADDR_W-1:0] opnd_addr,
  output logic              trap,
  output logic [ADDR_W-1:0] trap_addr,
  output logic              is_operand
);

  logic              bpa_valid, bpo_valid;
  logic [ADDR_W-1:0] bpa, bpo;
  logic              hit_a, hit_o;

  assign hit_a = debug_mode && bpa_valid && fetch_valid && (fetch_addr == bpa);
  assign hit_o = debug_mode && bpo_valid && opnd_valid  && (opnd_addr  == bpo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bpa_valid  <= 1'b0;
      bpo_valid  <= 1'b0;
      bpa        <= '0;
      bpo        <= '0;
      trap       <= 1'b0;
      trap_addr  <= '0;
      is_operand <= 1'b0;
    end else begin
      if (load) begin
        bpa_valid <= bpa_valid_in;
        bpa       <= bpa_in;
        bpo_valid <= bpo_valid_in;
        bpo       <= bpo_in;
      end
      trap       <= hit_a || hit_o;
      is_operand <= !hit_a && hit_o;
      if (hit_a)      trap_addr <= ADDR_W'(BPA_TRAP_ADDR);
      else if (hit_o) trap_addr <= ADDR_W'(BPO_TRAP_ADDR);
    end
  end

endmodule
