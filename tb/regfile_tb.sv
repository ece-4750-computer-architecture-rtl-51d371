// regfile_tb: random writes and reads of a 64-entry, 3-read-port file and of
// a 32-entry file whose entry 0 is hard-wired to zero, against array models.
// A read in the cycle of a write to the same entry must return the old value.
module regfile_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0][5:0]  ra;
  logic [2:0][31:0] rd;
  logic             we;
  logic [5:0]       wa;
  logic [31:0]      wd;
  logic [0:0][4:0]  za;
  logic [0:0][31:0] zd;
  logic             zwe;
  logic [4:0]       zwa;
  logic [31:0]      zwd;
  logic [31:0] m [64];
  logic [31:0] z [32];

  regfile #(.NREGS(64), .NREAD(3), .XLEN(32), .ZERO_REG0(1'b0)) dut (
    .clk, .rst, .raddr(ra), .rdata(rd), .wen(we), .waddr(wa), .wdata(wd));
  regfile #(.NREGS(32), .NREAD(1), .XLEN(32), .ZERO_REG0(1'b1)) dutz (
    .clk, .rst, .raddr(za), .rdata(zd), .wen(zwe), .waddr(zwa), .wdata(zwd));

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = '0;
    foreach (z[i]) z[i] = '0;
    we = 0; zwe = 0; wa = '0; wd = '0; zwa = '0; zwd = '0; ra = '0; za = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      we = 1'($urandom_range(0, 1)); wa = 6'($urandom); wd = $urandom;
      zwe = 1'($urandom_range(0, 1)); zwa = 5'($urandom); zwd = $urandom;
      for (int r = 0; r < 3; r++) ra[r] = (r == 0) ? wa : 6'($urandom);
      za[0] = (c % 2 == 0) ? zwa : 5'($urandom);
      #1;
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (rd[r] != m[ra[r]]) begin failures++; $display("FAIL read %0d", ra[r]); end
      end
      checks++;
      if (zd[0] != (za[0] == 0 ? 32'h0 : z[za[0]])) begin failures++; $display("FAIL zero-file read"); end
      @(posedge clk);
      if (we) m[wa] = wd;
      if (zwe && zwa != 0) z[zwa] = zwd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
