// free_list_tb: random allocate/free traffic against a bit-vector model.
// Checks every cycle that the list offers the lowest-numbered free register
// and reports empty exactly when the model has no free register; checks the
// reset state (registers 0..30 mapped, 31 first to be handed out).
module free_list_tb;
  localparam int N = 64, INIT = 31;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_req, alloc_ok, free_req;
  logic [5:0] alloc_preg, free_preg;
  logic [N-1:0] model;

  free_list #(.NUM_PREGS(N), .NUM_INIT_MAPPED(INIT)) dut (.*);

  function automatic int lowest_free();
    for (int i = 0; i < N; i++) if (model[i]) return i;
    return -1;
  endfunction

  initial begin
    #(10 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lf, pick;
    alloc_req = 0; free_req = 0; free_preg = '0;
    for (int i = 0; i < N; i++) model[i] = (i >= INIT);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (!alloc_ok || alloc_preg != 6'd31) begin failures++; $display("FAIL reset state"); end
    for (int c = 0; c < 5000; c++) begin
      // bias towards allocation in the first half, freeing in the second
      alloc_req = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 80 : 30));
      free_req  = 0;
      if ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 30 : 80)) begin
        pick = $urandom_range(0, N - 1);
        for (int k = 0; k < N; k++) begin
          if (!model[(pick + k) % N]) begin
            free_req = 1; free_preg = 6'((pick + k) % N); break;
          end
        end
      end
      #1;
      lf = lowest_free();
      checks++;
      if (alloc_ok != (lf >= 0) || (lf >= 0 && alloc_preg != 6'(lf))) begin
        failures++;
        $display("FAIL cycle %0d: ok=%0b preg=%0d expected %0d", c, alloc_ok, alloc_preg, lf);
      end
      @(posedge clk);
      if (alloc_req && lf >= 0) model[lf] = 1'b0;
      if (free_req) model[free_preg] = 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
