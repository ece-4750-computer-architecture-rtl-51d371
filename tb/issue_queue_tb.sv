// issue_queue_tb: random allocation, wakeup and issue conditions against a
// model of the value-capturing issue queue (4 entries, 8 tags, 8-slot ROB).
// Every cycle it checks the full flag and that the queue issues exactly the
// oldest entry (by distance from the ROB head) whose sources are not read,
// not pending, or bypassable, and whose writeback slot is free; that the
// issued entry carries its fields, with woken sources holding the captured
// value; and the out-of-order and writeback-port-wait indications.
module issue_queue_tb;
  import rr_pkg::*;
  localparam int NE = 4, NT = 8, NR = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_ooo = 0, n_wake = 0;

  logic                  alloc_val, alloc_imm_v, alloc_dest_v, full;
  op_e                   alloc_op, iss_op;
  logic [31:0]           alloc_imm, iss_imm, wb_value;
  logic [2:0]            alloc_dest, alloc_rob, wb_tag, rob_head, iss_dest, iss_rob;
  logic [1:0]            alloc_src_v, alloc_src_p, iss_src_v, iss_src_p;
  logic [1:0][31:0]      alloc_src, iss_src;
  logic                  wb_val, x_slot_free, y_slot_free, iss_val, iss_imm_v, iss_dest_v;
  logic                  wport_stall, iss_ooo;
  logic [NT-1:0]         bypass_ok;

  issue_queue #(.NENT(NE), .TAG_W(3), .SRC_W(32), .ROB_NENT(NR), .CAPTURE_VALUE(1'b1)) dut (.*);

  typedef struct {
    op_e         op;
    logic [31:0] imm;
    logic [2:0]  dest;
    logic [1:0]  sv, sp;
    logic [31:0] s [2];
    logic [2:0]  rob;
  } ment_t;
  ment_t q [$];

  function automatic int age(input logic [2:0] r);
    return (int'(r) - int'(rob_head) + NR) % NR;
  endfunction

  initial begin
    #(10 * 40000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   best, k;
    logic ok, sok, e_wport, e_ooo, used;
    ment_t n;
    alloc_val = 0; wb_val = 0; rob_head = '0;
    alloc_op = OP_ADD; alloc_imm_v = 0; alloc_imm = '0; alloc_dest_v = 1; alloc_dest = '0;
    alloc_src_v = '0; alloc_src_p = '0; alloc_src = '0; alloc_rob = '0;
    wb_tag = '0; wb_value = '0; bypass_ok = '0; x_slot_free = 1; y_slot_free = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 6000; c++) begin
      if (c % 400 == 0) rob_head = 3'($urandom);
      // stimulus
      alloc_val   = $urandom_range(0, 2) != 0 && q.size() < NE;
      alloc_op    = op_e'($urandom_range(0, 2));
      alloc_imm_v = (alloc_op == OP_ADDI);
      alloc_imm   = $urandom;
      alloc_dest  = 3'($urandom);
      for (int s = 0; s < 2; s++) begin
        alloc_src_v[s] = $urandom_range(0, 3) != 0;
        alloc_src_p[s] = $urandom_range(0, 1) != 0;
        alloc_src[s]   = alloc_src_p[s] ? 32'($urandom_range(0, NT - 1)) : $urandom;
      end
      // a rob slot not in use
      for (int t = 0; t < NR; t++) begin
        alloc_rob = 3'($urandom);
        used = 0;
        foreach (q[i]) if (q[i].rob == alloc_rob) used = 1;
        if (!used) break;
      end
      if (used) alloc_val = 0;
      wb_val = $urandom_range(0, 1) != 0; wb_tag = 3'($urandom); wb_value = $urandom;
      bypass_ok = NT'($urandom) & NT'($urandom);
      x_slot_free = $urandom_range(0, 3) != 0;
      y_slot_free = $urandom_range(0, 3) != 0;
      #1;
      // expected selection
      best = -1; e_wport = 0; e_ooo = 0;
      foreach (q[i]) begin
        sok = 1;
        for (int s = 0; s < 2; s++)
          if (q[i].sv[s] && q[i].sp[s] && !bypass_ok[q[i].s[s][2:0]]) sok = 0;
        ok = sok && (q[i].op == OP_MUL ? y_slot_free : x_slot_free);
        if (sok && !ok) e_wport = 1;
        if (ok && (best < 0 || age(q[i].rob) < age(q[best].rob))) best = i;
      end
      if (best >= 0) foreach (q[i]) if (age(q[i].rob) < age(q[best].rob)) e_ooo = 1;
      checks++;
      if (full != (q.size() == NE) || iss_val != (best >= 0) || wport_stall != e_wport ||
          iss_ooo != e_ooo) begin
        failures++; $display("FAIL cycle %0d: iss %0b full %0b", c, iss_val, full);
      end else if (best >= 0) begin
        checks++;
        if (iss_rob != q[best].rob || iss_op != q[best].op || iss_dest != q[best].dest ||
            iss_src_v != q[best].sv || iss_src_p != q[best].sp ||
            (iss_op == OP_ADDI && iss_imm != q[best].imm) ||
            (q[best].sv[0] && iss_src[0] != q[best].s[0]) ||
            (q[best].sv[1] && iss_src[1] != q[best].s[1])) begin
          failures++; $display("FAIL cycle %0d: issued rob %0d expected %0d", c, iss_rob, q[best].rob);
        end
        if (e_ooo) n_ooo++;
      end
      @(posedge clk);
      // model update: wakeup, issue, allocation
      if (wb_val) foreach (q[i]) for (int s = 0; s < 2; s++)
        if (q[i].sp[s] && q[i].s[s][2:0] == wb_tag) begin
          q[i].sp[s] = 0; q[i].s[s] = wb_value; n_wake++;
        end
      if (best >= 0) q.delete(best);
      if (alloc_val) begin
        n.op = alloc_op; n.imm = alloc_imm; n.dest = alloc_dest; n.sv = alloc_src_v;
        n.sp = alloc_src_p; n.s[0] = alloc_src[0]; n.s[1] = alloc_src[1]; n.rob = alloc_rob;
        q.push_back(n);
      end
      #1;
    end
    checks++;
    if (n_ooo == 0 || n_wake == 0) begin failures++; $display("FAIL no ooo issue or wakeup"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
