// issue_queue: issue queue (IQ) shared by both renaming schemes.
//
// NENT entries, each with the fields of the notes' IQ drawing: op, v/imm,
// v/dest, and for each of the two sources a valid bit v (the instruction reads
// it), a pending bit p and a source field. Each entry also records its
// reorder-buffer slot, which orders entries by age and tells writeback which
// ROB entry to complete.
//
// What a source field holds depends on CAPTURE_VALUE:
//   0 (pointer-based): always the physical register specifier; the operand is
//     read from the PRF at issue.
//   1 (value-based):   the ROB slot being waited on while p is set, the
//     operand value once p is clear. On a writeback the matching pending
//     sources take the broadcast value.
//
// Decode writes a new entry into the lowest free slot. Each cycle the oldest
// entry (closest to the ROB head) whose sources are all available is issued
// and removed: a source is available when it is not read, not pending, or
// its producer is in X, Y3 or W (bypass_ok from the scoreboard). An entry
// may only issue if the writeback slot its latency needs is free. Issue is
// therefore out of program order. iss_src_p tells the issue stage which
// operands must come from the bypass network.
// The entry fields and the value capture follow the described schemes; the
// oldest-first selection and the lowest-free-slot allocation are this
// design's choice.
module issue_queue
  import rr_pkg::*;
#(
  parameter int unsigned NENT          = 4,
  parameter int unsigned TAG_W         = 6,
  parameter int unsigned SRC_W         = 6,
  parameter int unsigned ROB_NENT      = 4,
  parameter bit          CAPTURE_VALUE = 1'b0,
  localparam int unsigned NTAGS = 2 ** TAG_W,
  localparam int unsigned RW    = $clog2(ROB_NENT)
) (
  input  logic                   clk,
  input  logic                   rst,
  // allocation (D)
  input  logic                   alloc_val,
  input  op_e                    alloc_op,
  input  logic                   alloc_imm_v,
  input  logic [XLEN-1:0]        alloc_imm,
  input  logic                   alloc_dest_v,
  input  logic [TAG_W-1:0]       alloc_dest,
  input  logic [1:0]             alloc_src_v,
  input  logic [1:0]             alloc_src_p,
  input  logic [1:0][SRC_W-1:0]  alloc_src,
  input  logic [RW-1:0]          alloc_rob,
  output logic                   full,
  // wakeup (W)
  input  logic                   wb_val,
  input  logic [TAG_W-1:0]       wb_tag,
  input  logic [SRC_W-1:0]       wb_value,
  // issue conditions (SB, ROB)
  input  logic [NTAGS-1:0]       bypass_ok,
  input  logic                   x_slot_free,
  input  logic                   y_slot_free,
  input  logic [RW-1:0]          rob_head,
  // issue (I)
  output logic                   iss_val,
  output op_e                    iss_op,
  output logic                   iss_imm_v,
  output logic [XLEN-1:0]        iss_imm,
  output logic                   iss_dest_v,
  output logic [TAG_W-1:0]       iss_dest,
  output logic [1:0]             iss_src_v,
  output logic [1:0]             iss_src_p,
  output logic [1:0][SRC_W-1:0]  iss_src,
  output logic [RW-1:0]          iss_rob,
  output logic                   wport_stall,  // an entry had its sources but not its W slot
  output logic                   iss_ooo       // an older entry is left waiting
);
  localparam int unsigned QW = (NENT > 1) ? $clog2(NENT) : 1;

  typedef struct packed {
    logic                  v;
    op_e                   op;
    logic                  imm_v;
    logic [XLEN-1:0]       imm;
    logic                  dest_v;
    logic [TAG_W-1:0]      dest;
    logic [1:0]            src_v;
    logic [1:0]            src_p;
    logic [1:0][SRC_W-1:0] src;
    logic [RW-1:0]         rob;
  } iq_entry_t;

  iq_entry_t       iq_q [NENT];
  logic [NENT-1:0] ready, srcs_ok;
  logic [QW-1:0]   sel, free_slot;
  logic            any_free;

  function automatic logic [RW-1:0] age(input logic [RW-1:0] rob, input logic [RW-1:0] head);
    return (rob >= head) ? RW'(rob - head) : RW'(int'(rob) + ROB_NENT - int'(head));
  endfunction

  always_comb begin
    for (int e = 0; e < NENT; e++) begin
      srcs_ok[e] = iq_q[e].v;
      for (int s = 0; s < 2; s++) begin
        if (iq_q[e].src_v[s] && iq_q[e].src_p[s] && !bypass_ok[iq_q[e].src[s][TAG_W-1:0]])
          srcs_ok[e] = 1'b0;
      end
      ready[e] = srcs_ok[e] && (iq_q[e].op == OP_MUL ? y_slot_free : x_slot_free);
    end
    wport_stall = |(srcs_ok & ~ready);
  end

  always_comb begin
    // oldest ready entry
    iss_val = 1'b0;
    sel     = '0;
    for (int e = 0; e < NENT; e++) begin
      if (ready[e] && (!iss_val || age(iq_q[e].rob, rob_head) < age(iq_q[sel].rob, rob_head))) begin
        iss_val = 1'b1;
        sel     = QW'(e);
      end
    end
  end

  always_comb begin
    iss_ooo = 1'b0;
    for (int e = 0; e < NENT; e++) begin
      if (iss_val && iq_q[e].v && age(iq_q[e].rob, rob_head) < age(iq_q[sel].rob, rob_head))
        iss_ooo = 1'b1;
    end
  end

  always_comb begin
    // lowest free slot
    any_free  = 1'b0;
    free_slot = '0;
    for (int e = NENT - 1; e >= 0; e--) begin
      if (!iq_q[e].v) begin
        any_free  = 1'b1;
        free_slot = QW'(e);
      end
    end
  end

  assign full       = !any_free;
  assign iss_op     = iq_q[sel].op;
  assign iss_imm_v  = iq_q[sel].imm_v;
  assign iss_imm    = iq_q[sel].imm;
  assign iss_dest_v = iq_q[sel].dest_v;
  assign iss_dest   = iq_q[sel].dest;
  assign iss_src_v  = iq_q[sel].src_v;
  assign iss_src_p  = iq_q[sel].src_p;
  assign iss_src    = iq_q[sel].src;
  assign iss_rob    = iq_q[sel].rob;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < NENT; e++) iq_q[e] <= '0;
    end else begin
      // wakeup
      if (wb_val) begin
        for (int e = 0; e < NENT; e++) begin
          for (int s = 0; s < 2; s++) begin
            if (iq_q[e].v && iq_q[e].src_p[s] && iq_q[e].src[s][TAG_W-1:0] == wb_tag) begin
              iq_q[e].src_p[s] <= 1'b0;
              if (CAPTURE_VALUE) iq_q[e].src[s] <= wb_value;
            end
          end
        end
      end
      if (iss_val) iq_q[sel].v <= 1'b0;
      if (alloc_val && any_free) begin
        iq_q[free_slot] <= '{v: 1'b1, op: alloc_op, imm_v: alloc_imm_v, imm: alloc_imm,
                             dest_v: alloc_dest_v, dest: alloc_dest, src_v: alloc_src_v,
                             src_p: alloc_src_p, src: alloc_src, rob: alloc_rob};
      end
    end
  end

  a_no_alloc_full: assert property (@(posedge clk) disable iff (rst) alloc_val |-> any_free);

endmodule
