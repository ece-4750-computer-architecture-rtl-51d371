// io2i_ptr_proc: single-issue IO2I processor with pointer-based register
// renaming.
//
// IO2I: in-order fetch/decode, out-of-order issue from an issue queue,
// out-of-order writeback, in-order commit through a reorder buffer. The
// pipeline is F, D, I, then either X (add, addi; one cycle) or Y0..Y3 (mul;
// four cycles), then a shared W and finally C.
//
// Renaming removes WAW and WAR name hazards by giving every result its own
// physical register:
//   D  decodes, looks up both sources in the rename table (RT), takes the
//      lowest free physical register from the free list (FL) for the
//      destination, records the destination's previous mapping, and writes
//      the issue queue (IQ) and the reorder buffer (ROB). It stalls when the
//      FL is empty or the IQ or ROB is full.
//   I  issues the oldest IQ entry whose operands are available and whose
//      writeback slot is free (scoreboard, SB, indexed by physical register).
//      Operands are read from the physical register file (PRF) or bypassed
//      from the end of X, the end of Y3, or W; nothing reads the ARF.
//   W  writes the PRF, clears the pending bits in ROB, RT and IQ (wakeup).
//   C  retires the ROB head once written back: copies its value from the PRF
//      into the architectural register file (ARF), and returns the previous
//      physical register of that architectural register to the FL. Only then
//      is it certain that no read of it is still in flight.
//
// UNIFIED=1 selects the unified-register-file variant: the PRF then is the
// only register file (URF), the ARF is replaced by an architectural rename
// table (ART), and C only copies the preg pointer into the ART.
//
// The structures, their pipeline stages and the freeing rule follow the
// described scheme. Bypass points (end of X, end of Y3, W), oldest-first issue,
// the writeback-port reservation, the stall conditions, the RV32 encodings
// and the ROB slot carried in the IQ are this design's choices; with them
// the four-instruction renaming example commits in the same cycles as the
// worked example.
//
// Interface: imem_addr is the byte address of the instruction fetched in this
// cycle and imem_data must return it combinationally. Each committed
// instruction appears for one cycle on commit_*. dbg_areg/dbg_data read the
// committed value of an architectural register. ev reports per-cycle events.
// Instructions with destination x0 or an unsupported encoding are dropped in
// D. Reset is synchronous and active high; all registers start at zero.
module io2i_ptr_proc
  import rr_pkg::*;
#(
  parameter int unsigned NUM_PREGS = 64,
  parameter int unsigned ROB_NENT  = 4,
  parameter int unsigned IQ_NENT   = 4,
  parameter bit          UNIFIED   = 1'b0,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned RW = $clog2(ROB_NENT)
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
  logic fl_ok, rob_full, iq_full;
  logic [PW-1:0] fl_preg, old_preg;
  logic [1:0]          rt_p;
  logic [1:0][PW-1:0]  rt_preg;
  logic [RW-1:0] rob_tail, rob_head;

  // W stage register
  typedef struct packed {
    logic            val;
    logic [PW-1:0]   dest;
    logic [RW-1:0]   rob;
    logic [XLEN-1:0] value;
  } wb_t;
  wb_t w_q;

  assign dec     = decode(fd_inst_q);
  assign need_d  = fd_val_q && dec.valid;
  assign stall_d = need_d && (!fl_ok || rob_full || iq_full);
  assign do_d    = need_d && !stall_d;

  logic cm_val;
  logic [PW-1:0]     cm_preg, cm_ppreg;
  logic [AREG_W-1:0] cm_areg;

  free_list #(.NUM_PREGS(NUM_PREGS), .NUM_INIT_MAPPED(NUM_AREGS - 1)) u_fl (
    .clk, .rst,
    .alloc_req(do_d), .alloc_ok(fl_ok), .alloc_preg(fl_preg),
    .free_req(cm_val), .free_preg(cm_ppreg)
  );

  rename_table_ptr #(.NUM_PREGS(NUM_PREGS), .NUM_AREGS(NUM_AREGS)) u_rt (
    .clk, .rst,
    .rs({dec.rs2, dec.rs1}), .rs_p(rt_p), .rs_preg(rt_preg),
    .ren_val(do_d), .ren_areg(dec.rd), .ren_preg(fl_preg), .old_preg(old_preg),
    .wb_val(w_q.val), .wb_preg(w_q.dest)
  );

  rob_ptr #(.NENT(ROB_NENT), .NUM_PREGS(NUM_PREGS), .NUM_AREGS(NUM_AREGS)) u_rob (
    .clk, .rst,
    .alloc_val(do_d), .alloc_preg(fl_preg), .alloc_areg(dec.rd), .alloc_ppreg(old_preg),
    .full(rob_full), .tail(rob_tail), .head(rob_head),
    .wb_val(w_q.val), .wb_idx(w_q.rob),
    .cm_val(cm_val), .cm_preg(cm_preg), .cm_areg(cm_areg), .cm_ppreg(cm_ppreg)
  );

  // ------------------------------------------------------------------ I
  logic [2**PW-1:0] bypass_ok;
  logic x_free, y_free;
  logic              iss_val, iss_imm_v, iss_dest_v;
  op_e               iss_op;
  logic [XLEN-1:0]   iss_imm;
  logic [PW-1:0]     iss_dest;
  logic [1:0]        iss_src_v, iss_src_p;
  logic [1:0][PW-1:0] iss_src;
  logic [RW-1:0]     iss_rob;
  logic              iss_ooo, wport_stall;

  issue_queue #(.NENT(IQ_NENT), .TAG_W(PW), .SRC_W(PW), .ROB_NENT(ROB_NENT),
                .CAPTURE_VALUE(1'b0)) u_iq (
    .clk, .rst,
    .alloc_val(do_d), .alloc_op(dec.op), .alloc_imm_v(dec.op == OP_ADDI), .alloc_imm(dec.imm),
    .alloc_dest_v(1'b1), .alloc_dest(fl_preg),
    .alloc_src_v({dec.rs2_v, dec.rs1_v}), .alloc_src_p(rt_p), .alloc_src(rt_preg),
    .alloc_rob(rob_tail), .full(iq_full),
    .wb_val(w_q.val), .wb_tag(w_q.dest), .wb_value(w_q.dest),
    .bypass_ok(bypass_ok), .x_slot_free(x_free), .y_slot_free(y_free), .rob_head(rob_head),
    .iss_val, .iss_op, .iss_imm_v, .iss_imm, .iss_dest_v, .iss_dest,
    .iss_src_v, .iss_src_p, .iss_src, .iss_rob, .wport_stall, .iss_ooo
  );

  scoreboard #(.NTAGS(2**PW), .X_LAT(X_LAT), .Y_LAT(Y_LAT)) u_sb (
    .clk, .rst,
    .issue_val(iss_val && iss_dest_v), .issue_tag(iss_dest), .issue_long(iss_op == OP_MUL),
    .x_slot_free(x_free), .y_slot_free(y_free), .bypass_ok(bypass_ok)
  );

  // register files: PRF read ports 0,1 = issue operands, 2 = commit, 3 = debug (URF)
  logic [3:0][PW-1:0]   prf_raddr;
  logic [3:0][XLEN-1:0] prf_rdata;
  logic [PW-1:0]        art_preg;

  regfile #(.NREGS(NUM_PREGS), .NREAD(4), .XLEN(XLEN), .ZERO_REG0(1'b0)) u_prf (
    .clk, .rst, .raddr(prf_raddr), .rdata(prf_rdata),
    .wen(w_q.val), .waddr(w_q.dest), .wdata(w_q.value)
  );

  assign prf_raddr = {art_preg, cm_preg, iss_src[1], iss_src[0]};

  // X stage register and the multiplier's Y3 stage, used for bypassing
  typedef struct packed {
    logic            val;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    logic [PW-1:0]   dest;
    logic [RW-1:0]   rob;
  } x_t;
  x_t x_q;
  logic [XLEN-1:0] x_result;
  logic            y3_val;
  logic [XLEN-1:0] y3_result;
  logic [PW+RW-1:0] y3_tag;

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
        if (x_q.val && x_q.dest == iss_src[s])                opnd[s] = x_result;
        else if (y3_val && y3_tag[PW+RW-1:RW] == iss_src[s])  opnd[s] = y3_result;
        else                                                  opnd[s] = w_q.value;
      end else begin
        opnd[s] = prf_rdata[s];
      end
    end
  end

  logic [XLEN-1:0] opnd_b;
  assign opnd_b = iss_imm_v ? iss_imm : opnd[1];

  // ------------------------------------------------------------------ X, Y0..Y3
  always_ff @(posedge clk) begin
    if (rst) x_q <= '0;
    else     x_q <= '{val: iss_val && iss_op != OP_MUL, a: opnd[0], b: opnd_b,
                      dest: iss_dest, rob: iss_rob};
  end

  mul_pipe #(.XLEN(XLEN), .TAG_W(PW + RW)) u_mul (
    .clk, .rst,
    .in_val(iss_val && iss_op == OP_MUL), .in_a(opnd[0]), .in_b(opnd_b),
    .in_tag({iss_dest, iss_rob}),
    .y3_val(y3_val), .y3_result(y3_result), .y3_tag(y3_tag)
  );

  // ------------------------------------------------------------------ W
  always_ff @(posedge clk) begin
    if (rst)         w_q <= '0;
    else if (x_q.val) w_q <= '{val: 1'b1, dest: x_q.dest, rob: x_q.rob, value: x_result};
    else if (y3_val)  w_q <= '{val: 1'b1, dest: y3_tag[PW+RW-1:RW], rob: y3_tag[RW-1:0],
                               value: y3_result};
    else              w_q <= '0;
  end

  a_one_writer: assert property (@(posedge clk) disable iff (rst) !(x_q.val && y3_val));

  // ------------------------------------------------------------------ C
  assign commit_val  = cm_val;
  assign commit_areg = cm_areg;
  assign commit_data = prf_rdata[2];

  generate
    if (UNIFIED) begin : g_urf
      arch_rename_table #(.NUM_PREGS(NUM_PREGS), .NUM_AREGS(NUM_AREGS)) u_art (
        .clk, .rst, .cm_val(cm_val), .cm_areg(cm_areg), .cm_preg(cm_preg),
        .rd_areg(dbg_areg), .rd_preg(art_preg)
      );
      assign dbg_data = (dbg_areg == '0) ? '0 : prf_rdata[3];
    end else begin : g_arf
      logic [0:0][XLEN-1:0] arf_rdata;
      assign art_preg = '0;
      regfile #(.NREGS(NUM_AREGS), .NREAD(1), .XLEN(XLEN), .ZERO_REG0(1'b1)) u_arf (
        .clk, .rst, .raddr(dbg_areg), .rdata(arf_rdata),
        .wen(cm_val), .waddr(cm_areg), .wdata(prf_rdata[2])
      );
      assign dbg_data = arf_rdata[0];
    end
  endgenerate

  // ------------------------------------------------------------------ events
  always_comb begin
    ev = '0;
    ev.d_stall_fl    = need_d && !fl_ok;
    ev.d_stall_rob   = need_d && rob_full;
    ev.d_stall_iq    = need_d && iq_full;
    ev.i_issue       = iss_val;
    ev.i_ooo         = iss_ooo;
    ev.i_bypass      = iss_val && |(opnd_byp);
    ev.i_wport_stall = wport_stall;
    ev.c_commit      = cm_val;
  end

endmodule
