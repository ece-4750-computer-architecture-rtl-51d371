// rename_table_val_tb: random renames, writebacks and commits against a model
// of the value-based rename table (valid, pending, ROB slot per register).
// Checks every cycle's source lookups, including a same-cycle writeback, and
// that commit clears only entries that still name the committing slot.
module rename_table_val_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0][4:0] rs;
  logic [1:0]      rs_v, rs_p;
  logic [1:0][1:0] rs_tag;
  logic            ren_val, wb_val, cm_val;
  logic [4:0]      ren_areg;
  logic [1:0]      ren_tag, wb_tag, cm_tag;
  logic            mv [32], mpd [32];
  logic [1:0]      mt [32];

  rename_table_val #(.NTAGS(4), .NUM_AREGS(32)) dut (.*);

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren_val = 0; wb_val = 0; cm_val = 0; ren_areg = 5'd1; ren_tag = '0; wb_tag = '0;
    cm_tag = '0; rs = '0;
    for (int a = 0; a < 32; a++) begin mv[a] = 0; mpd[a] = 0; mt[a] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      ren_val  = 1'($urandom_range(0, 1));
      ren_areg = 5'($urandom_range(1, 7));
      ren_tag  = 2'($urandom);
      rs[0] = 5'($urandom_range(0, 7));
      rs[1] = 5'($urandom_range(0, 7));
      wb_val = 1'($urandom_range(0, 1)); wb_tag = 2'($urandom);
      cm_val = 1'($urandom_range(0, 2) == 0); cm_tag = 2'($urandom);
      #1;
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (rs_v[s] != (rs[s] != 0 && mv[rs[s]]) ||
            (rs_v[s] && (rs_tag[s] != mt[rs[s]] ||
                         rs_p[s] != (mpd[rs[s]] && !(wb_val && wb_tag == mt[rs[s]]))))) begin
          failures++; $display("FAIL cycle %0d lookup x%0d", c, rs[s]);
        end
      end
      @(posedge clk);
      for (int a = 1; a < 32; a++) begin
        if (ren_val && ren_areg == 5'(a)) begin mv[a] = 1; mpd[a] = 1; mt[a] = ren_tag; end
        else begin
          if (wb_val && mv[a] && mt[a] == wb_tag) mpd[a] = 0;
          if (cm_val && mv[a] && mt[a] == cm_tag) mv[a] = 0;
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
