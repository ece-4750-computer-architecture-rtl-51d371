// rename_table_val: rename table (RT) of the value-based scheme.
//
// One entry per architectural register x1..x31 with a valid bit v, a pending
// bit p and preg, which here is a reorder-buffer slot number. An entry is only
// valid while an instruction writing that register is in flight: v=0 means the
// committed value in the ARF is current. Decode renames a destination by
// writing {v=1, p=1, slot}. Writeback clears p in the entry that still maps
// to the written slot (the value now sits in the ROB). Commit clears v in the
// entry that still maps to the committing slot (the value now sits in the
// ARF). A decode write wins over both clears.
//
// Fields follow the described scheme. The scheme clears entries at commit
// and also shows a rename-table write in W; both are done here (p in W, v in
// C).
//
// Source reads are combinational and see a writeback of the same cycle (p
// reported clear). Reset: all entries invalid.
module rename_table_val #(
  parameter int unsigned NTAGS     = 4,
  parameter int unsigned NUM_AREGS = 32,
  localparam int unsigned TW = $clog2(NTAGS),
  localparam int unsigned AW = $clog2(NUM_AREGS)
) (
  input  logic                clk,
  input  logic                rst,
  // source lookups (D)
  input  logic [1:0][AW-1:0]  rs,
  output logic [1:0]          rs_v,
  output logic [1:0]          rs_p,
  output logic [1:0][TW-1:0]  rs_tag,
  // destination rename (D)
  input  logic                ren_val,
  input  logic [AW-1:0]       ren_areg,
  input  logic [TW-1:0]       ren_tag,
  // writeback (W)
  input  logic                wb_val,
  input  logic [TW-1:0]       wb_tag,
  // commit (C)
  input  logic                cm_val,
  input  logic [TW-1:0]       cm_tag
);

  typedef struct packed {
    logic          v;
    logic          p;
    logic [TW-1:0] tag;
  } rt_entry_t;

  rt_entry_t rt_q [NUM_AREGS];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      rs_v[s]   = rt_q[rs[s]].v && (rs[s] != '0);
      rs_tag[s] = rt_q[rs[s]].tag;
      rs_p[s]   = rt_q[rs[s]].p && !(wb_val && wb_tag == rt_q[rs[s]].tag);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < NUM_AREGS; a++) rt_q[a] <= '0;
    end else begin
      for (int a = 1; a < NUM_AREGS; a++) begin
        if (ren_val && ren_areg == AW'(a)) begin
          rt_q[a] <= '{v: 1'b1, p: 1'b1, tag: ren_tag};
        end else begin
          if (wb_val && rt_q[a].v && rt_q[a].tag == wb_tag) rt_q[a].p <= 1'b0;
          if (cm_val && rt_q[a].v && rt_q[a].tag == cm_tag) rt_q[a].v <= 1'b0;
        end
      end
    end
  end

endmodule
