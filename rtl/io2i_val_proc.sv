// io2i_val_proc: single-issue IO2I processor with value-based register
// renaming.
//
// Same pipeline as the pointer-based machine (F, D, I, X or Y0..Y3, W, C),
// but results that are not yet committed live in the reorder buffer itself,
// so a "physical register" is simply a ROB slot number and no free list is
// needed: names are handed out and returned by ROB allocation and commit.
//   D  looks up both sources in the rename table (RT). A source whose entry
//      is invalid reads the architectural register file (ARF); a valid,
//      completed one reads its value from the ROB (or from W in the cycle it
//      is written); a still pending one puts the ROB slot it waits on into the
//      issue queue (IQ). The destination is renamed to the ROB tail slot.
//      D stalls when the IQ or the ROB is full.
//   I  issues the oldest ready IQ entry (scoreboard, SB, indexed by ROB slot,
//      gives bypass availability and the writeback slot). Operands come from
//      the IQ entry or are bypassed from the end of X, the end of Y3, or W.
//   W  writes the value into the ROB, clears the pending bits in ROB and RT,
//      and broadcasts the value to the IQ, whose waiting sources capture it.
//   C  copies the ROB head's value into the ARF and clears the RT entry's
//      valid bit if it still names that slot.
//
// The structures and where they are read and written follow the described
// scheme; the same choices as in io2i_ptr_proc (bypass points, oldest-first
// issue, writeback-port reservation, stalls, encodings) are made here, and
// the worked example's commit cycles are reproduced.
//
// Interface: as io2i_ptr_proc (imem_addr/imem_data combinational fetch,
// commit_* trace, dbg_areg/dbg_data committed-state read, ev events).
// Instructions with destination x0 or an unsupported encoding are dropped in
// D. Reset is synchronous and active high; all registers start at zero.
module io2i_val_proc
  import rr_pkg::*;
#(
  parameter int unsigned ROB_NENT = 4,
  parameter int unsigned IQ_NENT  = 4,
  localparam int unsigned TW = $clog2(ROB_NENT)
) (
  input  logic              clk,
  input  logic              rst,
  output logic [31:0]       imem_addr,
  input  logic [31:0]       imem_data,
  output logic              commit_val,
  output logic [AREG_W-1:0] commit_areg,
  output logic [XLEN-1:0]   commit_data,
  input  logic [AREG_W-1:0] dbg_areg,
  output logic [XLEN-1:0]   dbg_data,
  output events_t           ev
);

  // ------------------------------------------------------------------ F
  logic [31:0] pc_q, fd_inst_q;
  logic        fd_val_q;
  logic        stall_d;

  assign imem_addr = pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q      <= '0;
      fd_val_q  <= 1'b0;
      fd_inst_q <= '0;
    end else if (!stall_d) begin
      pc_q      <= pc_q + 32'd4;
      fd_val_q  <= 1'b1;
      fd_inst_q <= imem_data;
    end
  end

  // ------------------------------------------------------------------ D
  dec_t dec;
  logic need_d, do_d;
  logic rob_full, iq_full;
  logic [1:0]           rt_v, rt_p;
  logic [1:0][TW-1:0]   rt_tag;
  logic [1:0][XLEN-1:0] rob_rdata;
  logic [TW-1:0]        rob_tail, rob_head;
  logic [2:0][XLEN-1:0] arf_rdata;

  typedef struct packed {
    logic            val;
    logic [TW-1:0]   tag;
    logic [XLEN-1:0] value;
  } wb_t;
  wb_t w_q;

  assign dec     = decode(fd_inst_q);
  assign need_d  = fd_val_q && dec.valid;
  assign stall_d = need_d && (rob_full || iq_full);
  assign do_d    = need_d && !stall_d;

  logic              cm_val;
  logic [TW-1:0]     cm_idx;
  logic [AREG_W-1:0] cm_areg;
  logic [XLEN-1:0]   cm_value;

  rename_table_val #(.NTAGS(ROB_NENT), .NUM_AREGS(NUM_AREGS)) u_rt (
    .clk, .rst,
    .rs({dec.rs2, dec.rs1}), .rs_v(rt_v), .rs_p(rt_p), .rs_tag(rt_tag),
    .ren_val(do_d), .ren_areg(dec.rd), .ren_tag(rob_tail),
    .wb_val(w_q.val), .wb_tag(w_q.tag),
    .cm_val(cm_val), .cm_tag(cm_idx)
  );

  rob_val #(.NENT(ROB_NENT), .XLEN(XLEN), .NUM_AREGS(NUM_AREGS)) u_rob (
    .clk, .rst,
    .alloc_val(do_d), .alloc_areg(dec.rd), .full(rob_full), .tail(rob_tail), .head(rob_head),
    .rd_idx(rt_tag), .rd_value(rob_rdata),
    .wb_val(w_q.val), .wb_idx(w_q.tag), .wb_value(w_q.value),
    .cm_val(cm_val), .cm_idx(cm_idx), .cm_areg(cm_areg), .cm_value(cm_value)
  );

  // ARF read ports 0,1 = decode operands, 2 = debug
  regfile #(.NREGS(NUM_AREGS), .NREAD(3), .XLEN(XLEN), .ZERO_REG0(1'b1)) u_arf (
    .clk, .rst, .raddr({dbg_areg, dec.rs2, dec.rs1}), .rdata(arf_rdata),
    .wen(cm_val), .waddr(cm_areg), .wdata(cm_value)
  );

  // source operand: value from ARF, ROB or W, or the ROB slot to wait on
  logic [1:0]           d_src_v, d_src_p;
  logic [1:0][XLEN-1:0] d_src;
  always_comb begin
    d_src_v = {dec.rs2_v, dec.rs1_v};
    for (int s = 0; s < 2; s++) begin
      d_src_p[s] = 1'b0;
      if (!d_src_v[s])                              d_src[s] = '0;
      else if (!rt_v[s])                            d_src[s] = arf_rdata[s];
      else if (w_q.val && w_q.tag == rt_tag[s])     d_src[s] = w_q.value;
      else if (!rt_p[s])                            d_src[s] = rob_rdata[s];
      else begin
        d_src_p[s] = 1'b1;
        d_src[s]   = XLEN'(rt_tag[s]);
      end
    end
  end

  // ------------------------------------------------------------------ I
  logic [ROB_NENT-1:0] bypass_ok;
  logic x_free, y_free;
  logic                 iss_val, iss_imm_v, iss_dest_v;
  op_e                  iss_op;
  logic [XLEN-1:0]      iss_imm;
  logic [TW-1:0]        iss_dest;
  logic [1:0]           iss_src_v, iss_src_p;
  logic [1:0][XLEN-1:0] iss_src;
  logic [TW-1:0]        iss_rob;
  logic                 iss_ooo, wport_stall;

  issue_queue #(.NENT(IQ_NENT), .TAG_W(TW), .SRC_W(XLEN), .ROB_NENT(ROB_NENT),
                .CAPTURE_VALUE(1'b1)) u_iq (
    .clk, .rst,
    .alloc_val(do_d), .alloc_op(dec.op), .alloc_imm_v(dec.op == OP_ADDI), .alloc_imm(dec.imm),
    .alloc_dest_v(1'b1), .alloc_dest(rob_tail),
    .alloc_src_v(d_src_v), .alloc_src_p(d_src_p), .alloc_src(d_src),
    .alloc_rob(rob_tail), .full(iq_full),
    .wb_val(w_q.val), .wb_tag(w_q.tag), .wb_value(w_q.value),
    .bypass_ok(bypass_ok), .x_slot_free(x_free), .y_slot_free(y_free), .rob_head(rob_head),
    .iss_val, .iss_op, .iss_imm_v, .iss_imm, .iss_dest_v, .iss_dest,
    .iss_src_v, .iss_src_p, .iss_src, .iss_rob, .wport_stall, .iss_ooo
  );

  scoreboard #(.NTAGS(ROB_NENT), .X_LAT(X_LAT), .Y_LAT(Y_LAT)) u_sb (
    .clk, .rst,
    .issue_val(iss_val && iss_dest_v), .issue_tag(iss_dest), .issue_long(iss_op == OP_MUL),
    .x_slot_free(x_free), .y_slot_free(y_free), .bypass_ok(bypass_ok)
  );

  typedef struct packed {
    logic            val;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    logic [TW-1:0]   tag;
  } x_t;
  x_t x_q;
  logic [XLEN-1:0] x_result;
  logic            y3_val;
  logic [XLEN-1:0] y3_result;
  logic [TW-1:0]   y3_tag;

  assign x_result = x_q.a + x_q.b;

  logic [1:0][XLEN-1:0] opnd;
  logic [1:0]           opnd_byp;
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      opnd_byp[s] = 1'b0;
      if (!iss_src_v[s]) begin
        opnd[s] = '0;
      end else if (iss_src_p[s]) begin
        opnd_byp[s] = 1'b1;
        if (x_q.val && x_q.tag == iss_src[s][TW-1:0])      opnd[s] = x_result;
        else if (y3_val && y3_tag == iss_src[s][TW-1:0])   opnd[s] = y3_result;
        else                                               opnd[s] = w_q.value;
      end else begin
        opnd[s] = iss_src[s];
      end
    end
  end

  logic [XLEN-1:0] opnd_b;
  assign opnd_b = iss_imm_v ? iss_imm : opnd[1];

  // ------------------------------------------------------------------ X, Y0..Y3
  always_ff @(posedge clk) begin
    if (rst) x_q <= '0;
    else     x_q <= '{val: iss_val && iss_op != OP_MUL, a: opnd[0], b: opnd_b, tag: iss_rob};
  end

  mul_pipe #(.XLEN(XLEN), .TAG_W(TW)) u_mul (
    .clk, .rst,
    .in_val(iss_val && iss_op == OP_MUL), .in_a(opnd[0]), .in_b(opnd_b), .in_tag(iss_rob),
    .y3_val(y3_val), .y3_result(y3_result), .y3_tag(y3_tag)
  );

  // ------------------------------------------------------------------ W
  always_ff @(posedge clk) begin
    if (rst)          w_q <= '0;
    else if (x_q.val) w_q <= '{val: 1'b1, tag: x_q.tag, value: x_result};
    else if (y3_val)  w_q <= '{val: 1'b1, tag: y3_tag, value: y3_result};
    else              w_q <= '0;
  end

  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(x_q.val && y3_val));

  // ------------------------------------------------------------------ C
  assign commit_val  = cm_val;
  assign commit_areg = cm_areg;
  assign commit_data = cm_value;
  assign dbg_data    = arf_rdata[2];

  always_comb begin
    ev = '0;
    ev.d_stall_rob   = need_d && rob_full;
    ev.d_stall_iq    = need_d && iq_full;
    ev.i_issue       = iss_val;
    ev.i_ooo         = iss_ooo;
    ev.i_bypass      = iss_val && |(opnd_byp);
    ev.i_wport_stall = wport_stall;
    ev.c_commit      = cm_val;
  end

endmodule
