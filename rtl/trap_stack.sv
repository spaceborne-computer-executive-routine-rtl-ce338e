// trap_stack: the first-in first-out trap stack and the trap control line.
//
// Process-control machines place support-procedure entries (routine number,
// requesting processor, object process) on the stack; the designated trap
// processor takes them off in the order they were placed. The document keeps
// this list in memory with its fill pointer in the first word; here it is a
// circular buffer of DEPTH entries with read and write pointers and a count.
//
// Push side: NPUSH ports, valid/ready handshake, one entry accepted per cycle
// by a round-robin arbiter; push_ready is combinational. A full stack holds
// the pushers off. Pop side: pop takes the head entry (pop_entry, valid while
// !empty) at the clock edge. While pop is high every push is refused: this is
// the document's lock-out of other processors while the trap processor
// removes an entry.
//
// The trap control line (tcl) is set by a tcl_set pulse from any machine
// (sequencer step 20, after all its entries are on the stack) and is reset
// only when the stack has become empty, as the document requires (a set
// that finds the stack already emptied leaves the line low).
// Lint note: the assertion's "disable iff (!rst_n)" reads the asynchronous
// reset synchronously, which lint reports as SYNCASYNCNET; that use is only
// in the checker and is intended.
module trap_stack #(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned NPUSH   = 3,
  parameter int unsigned ENTRY_W = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NPUSH-1:0]   push_valid,
  input  logic [ENTRY_W-1:0] push_entry [NPUSH],
  output logic [NPUSH-1:0]   push_ready,
  input  logic [NPUSH-1:0]   tcl_set,
  input  logic               pop,
  output logic [ENTRY_W-1:0] pop_entry,
  output logic               empty,
  output logic               full,
  output logic               tcl,
  output logic               lockout,   // pushes refused because of a pop
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW    = (DEPTH < 2) ? 1 : $clog2(DEPTH);
  localparam int unsigned PTR_W = (NPUSH < 2) ? 1 : $clog2(NPUSH);

  logic [ENTRY_W-1:0] mem [DEPTH];
  logic [AW-1:0]      rd_ptr, wr_ptr;
  logic [PTR_W-1:0]   rr_ptr;
  logic               gnt_valid;
  logic [PTR_W-1:0]   gnt;
  logic               do_pop, do_push;

  assign empty     = (count == '0);
  assign full      = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign pop_entry = mem[rd_ptr];
  assign do_pop    = pop && !empty;
  assign lockout   = pop && (push_valid != '0);

  always_comb begin
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int unsigned k = 0; k < NPUSH; k++) begin
      logic [PTR_W-1:0] idx;
      idx = PTR_W'((32'(rr_ptr) + k) % NPUSH);
      if (!gnt_valid && push_valid[idx]) begin
        gnt_valid = 1'b1;
        gnt       = PTR_W'(idx);
      end
    end
  end

  assign do_push = gnt_valid && !full && !pop;

  logic [$clog2(DEPTH+1)-1:0] count_next;
  assign count_next = count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);

  always_comb begin
    push_ready = '0;
    if (do_push) push_ready[gnt] = 1'b1;
  end

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) + 1 == DEPTH) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      rr_ptr <= '0;
      tcl    <= 1'b0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= push_entry[gnt];
        wr_ptr      <= next_ptr(wr_ptr);
        rr_ptr      <= (32'(gnt) + 1 == NPUSH) ? '0 : PTR_W'(32'(gnt) + 1);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count_next;
      tcl   <= (tcl || tcl_set != '0) && count_next != '0;
    end
  end

  // The trap processor never pops an empty stack.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
