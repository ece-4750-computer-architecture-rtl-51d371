// rob_ptr_tb: random allocation, out-of-order writeback and in-order commit
// against a queue model. Checks every cycle the full flag, the tail slot, and
// that exactly the oldest entry commits, with its preg, areg and ppreg, once
// it has been written back and not before.
module rob_ptr_tb;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_commit = 0;

  logic       alloc_val, full, wb_val, cm_val;
  logic [5:0] alloc_preg, alloc_ppreg, cm_preg, cm_ppreg;
  logic [4:0] alloc_areg, cm_areg;
  logic [1:0] tail, head, wb_idx;

  rob_ptr #(.NENT(N), .NUM_PREGS(64), .NUM_AREGS(32)) dut (.*);

  // model: slot contents and pending bits, queue of slots in order
  logic [16:0] ent [N];   // {preg, areg, ppreg}
  logic        pend [N];
  int          q [$];
  int          mtail;

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int j;
    logic exp_cm;
    alloc_val = 0; wb_val = 0; wb_idx = '0; alloc_preg = '0; alloc_areg = '0; alloc_ppreg = '0;
    mtail = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      alloc_val   = 1'($urandom_range(0, 1));
      alloc_preg  = 6'($urandom); alloc_areg = 5'($urandom); alloc_ppreg = 6'($urandom);
      wb_val = 0;
      if (q.size() > 0 && $urandom_range(0, 1) != 0) begin
        j = q[$urandom_range(0, q.size() - 1)];
        if (pend[j]) begin wb_val = 1; wb_idx = 2'(j); end
      end
      #1;
      exp_cm = q.size() > 0 && !pend[q[0]];
      checks++;
      if (full != (q.size() == N) || tail != 2'(mtail) || cm_val != exp_cm ||
          (exp_cm && (head != 2'(q[0]) || {cm_preg, cm_areg, cm_ppreg} != ent[q[0]]))) begin
        failures++; $display("FAIL cycle %0d full=%0b cm=%0b", c, full, cm_val);
      end
      @(posedge clk);
      if (exp_cm) begin void'(q.pop_front()); n_commit++; end
      if (wb_val) pend[wb_idx] = 0;
      if (alloc_val && !(q.size() + (exp_cm ? 1 : 0) == N)) begin
        ent[mtail] = {alloc_preg, alloc_areg, alloc_ppreg};
        pend[mtail] = 1;
        q.push_back(mtail);
        mtail = (mtail + 1) % N;
      end
      #1;
    end
    checks++;
    if (n_commit < 100) begin failures++; $display("FAIL only %0d commits", n_commit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
