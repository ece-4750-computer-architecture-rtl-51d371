// mul_pipe_tb: feeds a random operation (or a bubble) into Y0 every cycle and
// checks that each leaves Y3 exactly four cycles later with the low 32 bits of
// the product and its tag; bubbles must leave as bubbles.
module mul_pipe_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_val, y3_val;
  logic [31:0] in_a, in_b, y3_result;
  logic [7:0]  in_tag, y3_tag;
  logic        hv [$];
  logic [31:0] hp [$];
  logic [7:0]  ht [$];

  mul_pipe #(.XLEN(32), .TAG_W(8)) dut (.*);

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_val = 0; in_a = '0; in_b = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      in_val = $urandom_range(0, 3) != 0;
      in_a   = (c % 7 == 0) ? 32'hffff_ffff : $urandom;
      in_b   = (c % 5 == 0) ? 32'h8000_0001 : $urandom;
      in_tag = 8'($urandom);
      // history of what entered Y0 in each cycle; Y3 in cycle c shows cycle c-4's input
      if (hv.size() >= 4) begin
        checks++;
        if (y3_val != hv[hv.size() - 4] ||
            (y3_val && (y3_result != hp[hp.size() - 4] || y3_tag != ht[ht.size() - 4]))) begin
          failures++;
          $display("FAIL cycle %0d: %0b %h %h", c, y3_val, y3_result, y3_tag);
        end
      end
      @(posedge clk);
      hv.push_back(in_val); hp.push_back(in_a * in_b); ht.push_back(in_tag);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
