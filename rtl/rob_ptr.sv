// rob_ptr: reorder buffer (ROB) of the pointer-based scheme.
//
// A circular buffer of NENT entries, allocated in program order by decode and
// retired in program order by commit. Besides the valid bit v and the pending
// bit p (result not yet written back), each entry holds three pointers:
//   preg  - the physical register that will hold the result,
//   areg  - the architectural register to copy it into at commit,
//   ppreg - the physical register areg mapped to before this instruction;
//           it is returned to the free list when this instruction commits,
//           because no younger instruction can still read it.
// Writeback clears p of the entry it names. The head entry commits in the
// cycle it is valid and not pending; cm_* shows it and it is removed at the
// edge. Decode may allocate while commit retires; full is computed from the
// occupancy at the start of the cycle.
// The fields are those of the described scheme; one commit per cycle and the
// full/empty bookkeeping are this design's choice.
module rob_ptr #(
  parameter int unsigned NENT      = 4,
  parameter int unsigned NUM_PREGS = 64,
  parameter int unsigned NUM_AREGS = 32,
  localparam int unsigned IW = $clog2(NENT),
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned AW = $clog2(NUM_AREGS)
) (
  input  logic          clk,
  input  logic          rst,
  // allocation (D)
  input  logic          alloc_val,
  input  logic [PW-1:0] alloc_preg,
  input  logic [AW-1:0] alloc_areg,
  input  logic [PW-1:0] alloc_ppreg,
  output logic          full,
  output logic [IW-1:0] tail,
  output logic [IW-1:0] head,
  // writeback (W)
  input  logic          wb_val,
  input  logic [IW-1:0] wb_idx,
  // commit (C)
  output logic          cm_val,
  output logic [PW-1:0] cm_preg,
  output logic [AW-1:0] cm_areg,
  output logic [PW-1:0] cm_ppreg
);

  typedef struct packed {
    logic          v;
    logic          p;
    logic [PW-1:0] preg;
    logic [AW-1:0] areg;
    logic [PW-1:0] ppreg;
  } rob_entry_t;

  rob_entry_t      rob_q [NENT];
  logic [IW-1:0]   head_q, tail_q;
  logic [IW:0]     count_q;

  assign full     = (count_q == (IW+1)'(NENT));
  assign tail     = tail_q;
  assign head     = head_q;
  assign cm_val   = rob_q[head_q].v && !rob_q[head_q].p;
  assign cm_preg  = rob_q[head_q].preg;
  assign cm_areg  = rob_q[head_q].areg;
  assign cm_ppreg = rob_q[head_q].ppreg;

  logic do_alloc;
  assign do_alloc = alloc_val && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NENT; i++) rob_q[i] <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (wb_val) rob_q[wb_idx].p <= 1'b0;
      if (cm_val) begin
        rob_q[head_q].v <= 1'b0;
        head_q <= (head_q == IW'(NENT - 1)) ? '0 : head_q + 1'b1;
      end
      if (do_alloc) begin
        rob_q[tail_q] <= '{v: 1'b1, p: 1'b1, preg: alloc_preg, areg: alloc_areg, ppreg: alloc_ppreg};
        tail_q <= (tail_q == IW'(NENT - 1)) ? '0 : tail_q + 1'b1;
      end
      count_q <= count_q + (IW+1)'(do_alloc) - (IW+1)'(cm_val);
    end
  end

  a_wb_live: assert property (@(posedge clk) disable iff (rst)
    wb_val |-> rob_q[wb_idx].v && rob_q[wb_idx].p);

endmodule
