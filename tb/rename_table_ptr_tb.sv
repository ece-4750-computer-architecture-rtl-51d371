// rename_table_ptr_tb: random renames and writebacks against a model of the
// table. Checks the reset mapping, every cycle's source lookups (including a
// writeback in the same cycle clearing the pending bit seen by a lookup) and
// the previous mapping returned for the renamed destination.
module rename_table_ptr_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fwd = 0;

  logic [1:0][4:0] rs;
  logic [1:0]      rs_p;
  logic [1:0][5:0] rs_preg;
  logic            ren_val, wb_val;
  logic [4:0]      ren_areg;
  logic [5:0]      ren_preg, old_preg, wb_preg;
  logic [5:0]      mp [32];
  logic            mpend [32];

  rename_table_ptr #(.NUM_PREGS(64), .NUM_AREGS(32)) dut (.*);

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep;
    ren_val = 0; wb_val = 0; ren_areg = 5'd1; ren_preg = '0; wb_preg = '0; rs = '0;
    for (int a = 0; a < 32; a++) begin mp[a] = 6'(a == 0 ? 0 : a - 1); mpend[a] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      ren_val  = 1'($urandom_range(0, 1));
      ren_areg = 5'($urandom_range(1, 31));
      ren_preg = 6'($urandom);
      rs[0] = 5'($urandom_range(1, 31));
      rs[1] = 5'($urandom_range(1, 31));
      // write back the register a random source currently maps to
      wb_val  = 1'($urandom_range(0, 1));
      wb_preg = ($urandom_range(0, 2) != 0) ? mp[rs[$urandom_range(0, 1)]] : 6'($urandom);
      #1;
      for (int s = 0; s < 2; s++) begin
        ep = mpend[rs[s]] && !(wb_val && wb_preg == mp[rs[s]]);
        if (mpend[rs[s]] && !ep) fwd++;
        checks++;
        if (rs_preg[s] != mp[rs[s]] || rs_p[s] != ep) begin
          failures++; $display("FAIL cycle %0d lookup x%0d", c, rs[s]);
        end
      end
      checks++;
      if (old_preg != mp[ren_areg]) begin failures++; $display("FAIL old mapping"); end
      @(posedge clk);
      for (int a = 1; a < 32; a++) begin
        if (ren_val && ren_areg == 5'(a)) begin mp[a] = ren_preg; mpend[a] = 1; end
        else if (wb_val && mp[a] == wb_preg) mpend[a] = 0;
      end
      #1;
    end
    checks++;
    if (fwd == 0) begin failures++; $display("FAIL no same-cycle writeback seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
