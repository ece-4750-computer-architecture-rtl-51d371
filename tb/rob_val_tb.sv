// rob_val_tb: random allocation, out-of-order writeback of values and in-order
// commit against a queue model. Checks every cycle the full flag, the tail
// slot, the commit of exactly the oldest written-back entry with its areg and
// value, and the two value read ports used by decode.
module rob_val_tb;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_commit = 0;

  logic             alloc_val, full, wb_val, cm_val;
  logic [4:0]       alloc_areg, cm_areg;
  logic [1:0]       tail, head, wb_idx, cm_idx;
  logic [1:0][1:0]  rd_idx;
  logic [1:0][31:0] rd_value;
  logic [31:0]      wb_value, cm_value;

  rob_val #(.NENT(N), .XLEN(32), .NUM_AREGS(32)) dut (.*);

  logic [4:0]  areg [N];
  logic [31:0] val  [N];
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
    for (int i = 0; i < N; i++) begin val[i] = '0; pend[i] = 0; areg[i] = '0; end
    alloc_val = 0; wb_val = 0; wb_idx = '0; wb_value = '0; alloc_areg = '0; rd_idx = '0;
    mtail = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      alloc_val  = 1'($urandom_range(0, 1));
      alloc_areg = 5'($urandom);
      rd_idx[0] = 2'($urandom); rd_idx[1] = 2'($urandom);
      wb_val = 0; wb_value = $urandom;
      if (q.size() > 0 && $urandom_range(0, 1) != 0) begin
        j = q[$urandom_range(0, q.size() - 1)];
        if (pend[j]) begin wb_val = 1; wb_idx = 2'(j); end
      end
      #1;
      exp_cm = q.size() > 0 && !pend[q[0]];
      checks++;
      if (full != (q.size() == N) || tail != 2'(mtail) || cm_val != exp_cm ||
          (exp_cm && (cm_idx != 2'(q[0]) || cm_areg != areg[q[0]] || cm_value != val[q[0]]))) begin
        failures++; $display("FAIL cycle %0d full=%0b cm=%0b", c, full, cm_val);
      end
      for (int r = 0; r < 2; r++) begin
        checks++;
        if (rd_value[r] != val[rd_idx[r]]) begin failures++; $display("FAIL read port %0d", r); end
      end
      @(posedge clk);
      if (exp_cm) begin void'(q.pop_front()); n_commit++; end
      if (wb_val) begin pend[wb_idx] = 0; val[wb_idx] = wb_value; end
      if (alloc_val && !(q.size() + (exp_cm ? 1 : 0) == N)) begin
        areg[mtail] = alloc_areg; pend[mtail] = 1; val[mtail] = '0;
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
