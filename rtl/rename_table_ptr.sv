// rename_table_ptr: rename table (RT, "map table") of the pointer-based scheme.
//
// One entry per architectural register x1..x31 holding the physical register
// it currently maps to (preg) and a pending bit p, set while the write to that
// physical register is still in flight. Entries are always valid: at reset
// x<i> maps to p<i-1>, not pending, matching the initial state of the example
// in the notes (x1->p0, x2->p1, ...). x0 has no entry.
//
// Decode reads the mappings of both sources and the old mapping of the
// destination (which becomes the ROB's ppreg field), then writes the new
// mapping with p set. Writeback clears p in the entry that still maps to the
// written physical register. A writeback in the same cycle is forwarded to
// the source reads, so a source is never reported pending after its value
// has reached the PRF. The decode write wins over a writeback clear.
//
// Fields and initial mapping follow the described scheme; the same-cycle
// forwarding is this design's choice.
//
// Timing: reads are combinational; writes take effect at the clock edge.
module rename_table_ptr #(
  parameter int unsigned NUM_PREGS = 64,
  parameter int unsigned NUM_AREGS = 32,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned AW = $clog2(NUM_AREGS)
) (
  input  logic                clk,
  input  logic                rst,
  // source lookups (D)
  input  logic [1:0][AW-1:0]  rs,
  output logic [1:0]          rs_p,
  output logic [1:0][PW-1:0]  rs_preg,
  // destination rename (D)
  input  logic                ren_val,
  input  logic [AW-1:0]       ren_areg,
  input  logic [PW-1:0]       ren_preg,
  output logic [PW-1:0]       old_preg,   // previous mapping of ren_areg
  // writeback (W)
  input  logic                wb_val,
  input  logic [PW-1:0]       wb_preg
);

  typedef struct packed {
    logic          p;
    logic [PW-1:0] preg;
  } rt_entry_t;

  rt_entry_t rt_q [NUM_AREGS];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      rs_preg[s] = rt_q[rs[s]].preg;
      rs_p[s]    = rt_q[rs[s]].p && !(wb_val && wb_preg == rt_q[rs[s]].preg);
    end
    old_preg = rt_q[ren_areg].preg;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < NUM_AREGS; a++) rt_q[a] <= '{p: 1'b0, preg: PW'(a == 0 ? 0 : a - 1)};
    end else begin
      for (int a = 1; a < NUM_AREGS; a++) begin
        if (ren_val && ren_areg == AW'(a))
          rt_q[a] <= '{p: 1'b1, preg: ren_preg};
        else if (wb_val && rt_q[a].preg == wb_preg)
          rt_q[a].p <= 1'b0;
      end
    end
  end

endmodule
