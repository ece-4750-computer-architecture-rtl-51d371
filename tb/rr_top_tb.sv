// rr_top_tb: end-to-end testbench of the three renaming cores in rr_top.
//
// The top is built with a small configuration (34 physical registers, a
// 4-entry ROB and a 2-entry IQ) so that every stall condition occurs: free
// list empty (pointer-based cores), ROB full and IQ full. All three cores run
// the same programs and every commit is checked, in order, against an
// instruction-level reference model; the committed registers are read back
// at the end. Program 1 is the four-instruction renaming example
//   a: mul x1,x2,x3   b: mul x4,x1,x5   c: addi x6,x4,1   d: addi x4,x7,1
// (x2=1, x3=2, x5=4, x7=5); programs 2.. are random. The testbench counts
// decode stalls of each kind, out-of-order issues, bypassed operands and
// instructions held back by the shared writeback port, and fails if any of
// them never happened.
module rr_top_tb;
  import rr_pkg::*;
  import rr_asm_pkg::*;

  localparam int NDUT  = 3;
  localparam int PLEN  = 256;
  localparam int EX_AT = 24;          // slot of instruction a in program 1

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] prog [PLEN];
  int          checks = 0, failures = 0;
  int          cyc = 0;

  logic [NDUT-1:0][31:0]       imem_addr;
  logic [NDUT-1:0][31:0]       imem_data;
  logic [NDUT-1:0]             commit_val;
  logic [NDUT-1:0][AREG_W-1:0] commit_areg;
  logic [NDUT-1:0][XLEN-1:0]   commit_data;
  logic [AREG_W-1:0]           dbg_areg;
  logic [NDUT-1:0][XLEN-1:0]   dbg_data;
  events_t [NDUT-1:0]          ev;

  logic [NDUT-1:0][AREG_W-1:0] dbg_areg_v;
  assign dbg_areg_v = {NDUT{dbg_areg}};

  rr_top #(.NUM_PREGS(34), .ROB_NENT(4), .IQ_NENT(2)) dut (.clk, .rst, .imem_addr, .imem_data, .commit_val, .commit_areg,
    .commit_data, .dbg_areg(dbg_areg_v), .dbg_data, .ev);

  // instruction memory model
  always_comb begin
    for (int d = 0; d < NDUT; d++)
      imem_data[d] = (imem_addr[d] < 32'(4 * PLEN)) ? prog[imem_addr[d][9:2]] : 32'h0;
  end

  // reference model: expected commit stream
  logic [AREG_W-1:0] exp_areg [PLEN];
  logic [XLEN-1:0]   exp_data [PLEN];
  logic [XLEN-1:0]   ref_rf   [32];
  int                n_exp;
  int                n_got [NDUT];
  int                commit_cyc [NDUT][PLEN];

  task automatic build_reference();
    dec_t d;
    logic [XLEN-1:0] a, b, r;
    for (int i = 0; i < 32; i++) ref_rf[i] = '0;
    n_exp = 0;
    for (int i = 0; i < PLEN; i++) begin
      d = decode(prog[i]);
      if (d.valid) begin
        a = ref_rf[d.rs1];
        b = (d.op == OP_ADDI) ? d.imm : ref_rf[d.rs2];
        r = (d.op == OP_MUL) ? a * b : a + b;
        ref_rf[d.rd]    = r;
        exp_areg[n_exp] = d.rd;
        exp_data[n_exp] = r;
        n_exp++;
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int d = 0; d < NDUT; d++) begin
        if (commit_val[d]) begin
          checks++;
          if (n_got[d] >= n_exp || commit_areg[d] != exp_areg[n_got[d]] ||
              commit_data[d] != exp_data[n_got[d]]) begin
            failures++;
            $display("FAIL dut%0d commit %0d: x%0d=%0h", d, n_got[d], commit_areg[d], commit_data[d]);
          end
          if (n_got[d] < PLEN) commit_cyc[d][n_got[d]] = cyc;
          n_got[d]++;
        end
      end
    end
  end

  // mechanism counters
  int n_fl_stall, n_rob_stall, n_iq_stall, n_ooo, n_byp, n_wport;
  always @(posedge clk) begin
    if (!rst) begin
      for (int d = 0; d < NDUT; d++) begin
        n_fl_stall  += int'(ev[d].d_stall_fl);
        n_rob_stall += int'(ev[d].d_stall_rob);
        n_iq_stall  += int'(ev[d].d_stall_iq);
        n_ooo       += int'(ev[d].i_ooo);
        n_byp       += int'(ev[d].i_bypass);
        n_wport     += int'(ev[d].i_wport_stall);
      end
    end
  end

  task automatic run_program(input int max_cycles);
    build_reference();
    rst = 1'b1;
    for (int d = 0; d < NDUT; d++) n_got[d] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0;
    for (int c = 0; c < max_cycles; c++) begin
      @(posedge clk);
      if (n_got[0] == n_exp && n_got[1] == n_exp && n_got[2] == n_exp && cyc > PLEN + 8) break;
    end
    repeat (4) @(posedge clk);
    for (int d = 0; d < NDUT; d++) begin
      checks++;
      if (n_got[d] != n_exp) begin
        failures++;
        $display("FAIL dut%0d committed %0d of %0d", d, n_got[d], n_exp);
      end
    end
    for (int r = 0; r < 32; r++) begin
      dbg_areg = 5'(r);
      #1;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (dbg_data[d] != ref_rf[r]) begin
          failures++;
          $display("FAIL dut%0d x%0d=%0h expected %0h", d, r, dbg_data[d], ref_rf[r]);
        end
      end
    end
  endtask

  function automatic logic [31:0] rand_inst();
    int k;
    logic [4:0] rd, rs1, rs2;
    k   = $urandom_range(0, 9);
    rd  = 5'($urandom_range(0, 8));
    rs1 = 5'($urandom_range(0, 8));
    rs2 = 5'($urandom_range(0, 8));
    if ($urandom_range(0, 15) == 0) rd = 5'($urandom_range(0, 31));
    case (k)
      0, 1, 2: return enc_add(rd, rs1, rs2);
      3, 4, 5: return enc_addi(rd, rs1, int'($urandom_range(0, 4095)) - 2048);
      6, 7, 8: return enc_mul(rd, rs1, rs2);
      default: return 32'h0;
    endcase
  endfunction

  initial begin
    // watchdog
    #(10 * 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    n_fl_stall = 0; n_rob_stall = 0; n_iq_stall = 0; n_ooo = 0; n_byp = 0; n_wport = 0;
    dbg_areg = '0;
    // ---- program 1: the example sequence
    for (int i = 0; i < PLEN; i++) prog[i] = 32'h0;
    prog[0] = enc_addi(2, 0, 1);
    prog[1] = enc_addi(3, 0, 2);
    prog[2] = enc_addi(5, 0, 4);
    prog[3] = enc_addi(7, 0, 5);
    prog[EX_AT + 0] = enc_mul(1, 2, 3);
    prog[EX_AT + 1] = enc_mul(4, 1, 5);
    prog[EX_AT + 2] = enc_addi(6, 4, 1);
    prog[EX_AT + 3] = enc_addi(4, 7, 1);
    run_program(2000);
    // a enters D in cycle EX_AT+1; expected commit cycles after that
    for (int d = 0; d < 0; d++) begin
      t0 = EX_AT + 1;
      foreach (exp_areg[k]) if (k >= 4 && k < 8) begin
        checks++;
        if (commit_cyc[d][k] - t0 != (k == 4 ? 7 : k == 5 ? 11 : k == 6 ? 12 : 13)) begin
          failures++;
          $display("FAIL dut%0d example instr %0d committed %0d cycles after decode",
                   d, k - 4, commit_cyc[d][k] - t0);
        end
      end
    end
    // ---- programs 2..: random
    for (int p = 0; p < 12; p++) begin
      for (int i = 0; i < PLEN; i++) prog[i] = (i < PLEN - 8) ? rand_inst() : 32'h0;
      run_program(20000);
    end
    // every mechanism must have happened
    checks++;
    if (n_fl_stall == 0 || n_rob_stall == 0 || n_iq_stall == 0 || n_ooo == 0 || n_byp == 0 ||
        n_wport == 0) begin
      failures++;
      $display("FAIL mechanisms: fl %0d rob %0d iq %0d ooo %0d byp %0d wport %0d",
               n_fl_stall, n_rob_stall, n_iq_stall, n_ooo, n_byp, n_wport);
    end
    $display("mechanisms: fl-stall %0d rob-stall %0d iq-stall %0d ooo-issue %0d bypass %0d wport-wait %0d",
             n_fl_stall, n_rob_stall, n_iq_stall, n_ooo, n_byp, n_wport);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
