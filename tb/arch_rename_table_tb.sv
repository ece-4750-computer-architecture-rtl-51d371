// arch_rename_table_tb: checks the reset mapping (x<i> -> p<i-1>), then random
// commits of preg pointers against an array model; x0 is never written.
module arch_rename_table_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cm_val;
  logic [4:0] cm_areg, rd_areg;
  logic [5:0] cm_preg, rd_preg;
  logic [5:0] m [32];

  arch_rename_table #(.NUM_PREGS(64), .NUM_AREGS(32)) dut (.*);

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cm_val = 0; cm_areg = '0; cm_preg = '0; rd_areg = '0;
    for (int a = 0; a < 32; a++) m[a] = 6'(a == 0 ? 0 : a - 1);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      cm_val  = 1'($urandom_range(0, 1));
      cm_areg = 5'($urandom);
      cm_preg = 6'($urandom);
      rd_areg = (c < 32) ? 5'(c) : 5'($urandom);
      #1;
      checks++;
      if (rd_preg != m[rd_areg]) begin failures++; $display("FAIL x%0d -> p%0d", rd_areg, rd_preg); end
      @(posedge clk);
      if (cm_val && cm_areg != 0) m[cm_areg] = cm_preg;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
