// scoreboard: issue-stage scoreboard (SB), indexed by physical register.
//
// For every physical register (a PRF entry in the pointer-based machine, a
// reorder-buffer slot in the value-based one) it records whether a write is
// in flight in the execute pipelines (pending) and how many cycles remain
// until that write reaches W (cnt). From this it tells the issue queue which
// registers can be bypassed to an instruction issuing now: those whose
// producer is in the last execute stage (X or Y3, cnt = 1) or in W (cnt = 0).
//
// It also keeps a reservation vector for the single writeback port: bit k set
// means W is taken k cycles from now. An add/addi (W X_LAT cycles after issue)
// may only issue if that slot is free; a mul has the longest latency, so its
// slot is never taken. A pending entry clears itself when its producer
// leaves W.
//
// The scheme only says that the scoreboard is indexed by physical register;
// its contents (pending bit, countdown, reservation vector) are this design's
// choice.
//
// Timing: issue_* is the instruction leaving I this cycle; all outputs are
// combinational from the registered state.
module scoreboard #(
  parameter int unsigned NTAGS = 64,
  parameter int unsigned X_LAT = 2,
  parameter int unsigned Y_LAT = 5,
  localparam int unsigned TW = $clog2(NTAGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             issue_val,
  input  logic [TW-1:0]    issue_tag,
  input  logic             issue_long,   // goes through Y0..Y3 (mul)
  output logic             x_slot_free,  // an add/addi may issue this cycle
  output logic             y_slot_free,  // a mul may issue this cycle
  output logic [NTAGS-1:0] bypass_ok     // value of this register is on a bypass path now
);

  logic [NTAGS-1:0] pend_q;
  logic [2:0]       cnt_q [NTAGS];
  logic [Y_LAT:1]   res_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q <= '0;
      res_q  <= '0;
      for (int t = 0; t < NTAGS; t++) cnt_q[t] <= '0;
    end else begin
      for (int t = 0; t < NTAGS; t++) begin
        if (pend_q[t]) begin
          if (cnt_q[t] == '0) pend_q[t] <= 1'b0;   // leaves W
          else                cnt_q[t]  <= cnt_q[t] - 3'd1;
        end
      end
      if (issue_val) begin
        pend_q[issue_tag] <= 1'b1;
        cnt_q[issue_tag]  <= issue_long ? 3'(Y_LAT - 1) : 3'(X_LAT - 1);
      end
      for (int k = 1; k < Y_LAT; k++)
        res_q[k] <= res_q[k+1] | (issue_val && ((issue_long ? Y_LAT : X_LAT) == k + 1));
      res_q[Y_LAT] <= 1'b0;
    end
  end

  assign x_slot_free = !res_q[X_LAT];
  assign y_slot_free = !res_q[Y_LAT];

  always_comb begin
    for (int t = 0; t < NTAGS; t++) bypass_ok[t] = pend_q[t] && (cnt_q[t] <= 3'd1);
  end

  // the issue stage must respect the writeback reservation
  a_wport: assert property (@(posedge clk) disable iff (rst)
    issue_val |-> (issue_long ? y_slot_free : x_slot_free));

endmodule
