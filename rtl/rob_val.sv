// rob_val: reorder buffer (ROB) of the value-based scheme.
//
// A circular buffer of NENT entries that also serves as the storage for
// results not yet committed: the slot number is the "physical register" name.
// Each entry has a valid bit v, a pending bit p (result not yet written back),
// the result value and areg, the architectural register to copy it into at
// commit. Decode allocates at the tail and reads result values of completed
// but uncommitted producers through two read ports. Writeback stores the
// value and clears p. The head entry commits in the cycle it is valid and not
// pending (cm_* shows it) and is removed at the edge. full is computed from
// the occupancy at the start of the cycle.
// The fields are those of the described scheme; one commit per cycle and the
// read ports for decode are this design's choice.
module rob_val #(
  parameter int unsigned NENT      = 4,
  parameter int unsigned XLEN      = 32,
  parameter int unsigned NUM_AREGS = 32,
  localparam int unsigned IW = $clog2(NENT),
  localparam int unsigned AW = $clog2(NUM_AREGS)
) (
  input  logic                   clk,
  input  logic                   rst,
  // allocation (D)
  input  logic                   alloc_val,
  input  logic [AW-1:0]          alloc_areg,
  output logic                   full,
  output logic [IW-1:0]          tail,
  output logic [IW-1:0]          head,
  // value reads (D)
  input  logic [1:0][IW-1:0]     rd_idx,
  output logic [1:0][XLEN-1:0]   rd_value,
  // writeback (W)
  input  logic                   wb_val,
  input  logic [IW-1:0]          wb_idx,
  input  logic [XLEN-1:0]        wb_value,
  // commit (C)
  output logic                   cm_val,
  output logic [IW-1:0]          cm_idx,
  output logic [AW-1:0]          cm_areg,
  output logic [XLEN-1:0]        cm_value
);

  typedef struct packed {
    logic            v;
    logic            p;
    logic [XLEN-1:0] value;
    logic [AW-1:0]   areg;
  } rob_entry_t;

  rob_entry_t      rob_q [NENT];
  logic [IW-1:0]   head_q, tail_q;
  logic [IW:0]     count_q;

  assign full     = (count_q == (IW+1)'(NENT));
  assign tail     = tail_q;
  assign head     = head_q;
  assign cm_val   = rob_q[head_q].v && !rob_q[head_q].p;
  assign cm_idx   = head_q;
  assign cm_areg  = rob_q[head_q].areg;
  assign cm_value = rob_q[head_q].value;

  always_comb begin
    for (int r = 0; r < 2; r++) rd_value[r] = rob_q[rd_idx[r]].value;
  end

  logic do_alloc;
  assign do_alloc = alloc_val && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NENT; i++) rob_q[i] <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (wb_val) begin
        rob_q[wb_idx].p     <= 1'b0;
        rob_q[wb_idx].value <= wb_value;
      end
      if (cm_val) begin
        rob_q[head_q].v <= 1'b0;
        head_q <= (head_q == IW'(NENT - 1)) ? '0 : head_q + 1'b1;
      end
      if (do_alloc) begin
        rob_q[tail_q] <= '{v: 1'b1, p: 1'b1, value: '0, areg: alloc_areg};
        tail_q <= (tail_q == IW'(NENT - 1)) ? '0 : tail_q + 1'b1;
      end
      count_q <= count_q + (IW+1)'(do_alloc) - (IW+1)'(cm_val);
    end
  end

  a_wb_live: assert property (@(posedge clk) disable iff (rst)
    wb_val |-> rob_q[wb_idx].v && rob_q[wb_idx].p);

endmodule
