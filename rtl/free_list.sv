// free_list: the free list (FL) of the pointer-based renaming scheme.
//
// One "free" bit per physical register. The decode stage allocates the
// lowest-numbered free register through a priority encoder; the commit stage
// returns a register (the previous mapping of the committed destination) by
// setting its bit again. Both can happen in the same cycle; an allocation
// only sees registers that were free at the start of the cycle.
//
// Reset: registers 0..NUM_INIT_MAPPED-1 hold the initial architectural
// mappings (x1->p0, x2->p1, ...) and start allocated, all others start free.
//
// The free bits and the priority encoder are those of the described scheme;
// the reset state and same-cycle behaviour are this design's choice.
//
// Interface/timing: alloc_ok/alloc_preg are combinational from the state;
// alloc_req and free_req take effect at the next rising clock edge.
module free_list #(
  parameter int unsigned NUM_PREGS       = 64,
  parameter int unsigned NUM_INIT_MAPPED = 31,
  localparam int unsigned PW = $clog2(NUM_PREGS)
) (
  input  logic          clk,
  input  logic          rst,
  // allocation (D stage)
  input  logic          alloc_req,
  output logic          alloc_ok,     // at least one register is free
  output logic [PW-1:0] alloc_preg,   // lowest-numbered free register
  // deallocation (C stage)
  input  logic          free_req,
  input  logic [PW-1:0] free_preg
);

  logic [NUM_PREGS-1:0] free_q;

  // priority encoder: first free register
  always_comb begin
    alloc_ok   = 1'b0;
    alloc_preg = '0;
    for (int i = NUM_PREGS - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        alloc_ok   = 1'b1;
        alloc_preg = PW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PREGS; i++) free_q[i] <= (i >= NUM_INIT_MAPPED);
    end else begin
      if (alloc_req && alloc_ok) free_q[alloc_preg] <= 1'b0;
      if (free_req)              free_q[free_preg]  <= 1'b1;
    end
  end

  // a register returned to the list must have been allocated
  a_no_double_free: assert property (@(posedge clk) disable iff (rst)
    free_req |-> !free_q[free_preg]);

endmodule
