// scoreboard_tb: issues random short (add/addi, 2 cycles to W) and long
// (mul, 5 cycles to W) operations whenever the scoreboard allows it, and checks
// against a model that records each in-flight operation's issue cycle:
//   - bypass_ok[t] is set exactly in the cycle its producer is in the last
//     execute stage and the cycle it is in W,
//   - x_slot_free is clear exactly when a short operation issued now would
//     reach W together with an earlier long one.
// It also checks that such conflicts actually occurred.
module scoreboard_tb;
  localparam int NT = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, conflicts = 0;

  logic          issue_val, issue_long, x_slot_free, y_slot_free;
  logic [3:0]    issue_tag;
  logic [NT-1:0] bypass_ok;

  scoreboard #(.NTAGS(NT), .X_LAT(2), .Y_LAT(5)) dut (.*);

  int  t_issue [NT];   // cycle of issue, -100 when idle
  int  lat     [NT];

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_x_free;
    int   k, pick;
    foreach (t_issue[i]) begin t_issue[i] = -100; lat[i] = 0; end
    issue_val = 0; issue_long = 0; issue_tag = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 5000; c++) begin
      // model checks for the current cycle
      exp_x_free = 1'b1;
      for (int t = 0; t < NT; t++) begin
        k = c - t_issue[t];
        checks++;
        if (bypass_ok[t] != (k >= 1 && (k == lat[t] - 1 || k == lat[t]))) begin
          failures++; $display("FAIL cycle %0d tag %0d bypass_ok=%0b k=%0d", c, t, bypass_ok[t], k);
        end
        if (k >= 1 && k < lat[t] && t_issue[t] + lat[t] == c + 2) exp_x_free = 1'b0;
      end
      checks++;
      if (x_slot_free != exp_x_free || !y_slot_free) begin
        failures++; $display("FAIL cycle %0d slot free %0b", c, x_slot_free);
      end
      if (!exp_x_free) conflicts++;
      // choose an idle tag and an operation the scoreboard accepts
      issue_val = 0;
      pick = $urandom_range(0, NT - 1);
      for (int j = 0; j < NT; j++) begin
        k = (pick + j) % NT;
        if (c - t_issue[k] > lat[k]) begin
          issue_tag  = 4'(k);
          issue_long = 1'($urandom_range(0, 1));
          issue_val  = ($urandom_range(0, 3) != 0) && (issue_long ? y_slot_free : x_slot_free);
          break;
        end
      end
      @(posedge clk);
      if (issue_val) begin t_issue[issue_tag] = c; lat[issue_tag] = issue_long ? 5 : 2; end
      #1;
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no writeback conflicts seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
