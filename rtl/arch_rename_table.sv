// arch_rename_table: architectural rename table (ART) of the unified
// physical/architectural register file variant.
//
// With a unified register file (URF) there is no separate ARF. Instead the
// ART holds, for each architectural register x1..x31, the physical register
// that holds its committed value. Commit does not copy a value: it writes the
// committing instruction's preg pointer into the ART entry of its areg. At
// reset x<i> maps to p<i-1>, the same initial mapping as the rename table.
// One combinational read port (x0 reads as mapping 0 and must be treated as
// zero by the user); the commit write takes effect at the clock edge.
// Function as described for the unified register file; reset mapping and
// port shape are this design's choice.
module arch_rename_table #(
  parameter int unsigned NUM_PREGS = 64,
  parameter int unsigned NUM_AREGS = 32,
  localparam int unsigned PW = $clog2(NUM_PREGS),
  localparam int unsigned AW = $clog2(NUM_AREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cm_val,
  input  logic [AW-1:0] cm_areg,
  input  logic [PW-1:0] cm_preg,
  input  logic [AW-1:0] rd_areg,
  output logic [PW-1:0] rd_preg
);

  logic [PW-1:0] art_q [NUM_AREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < NUM_AREGS; a++) art_q[a] <= PW'(a == 0 ? 0 : a - 1);
    end else if (cm_val && cm_areg != '0) begin
      art_q[cm_areg] <= cm_preg;
    end
  end

  assign rd_preg = art_q[rd_areg];

endmodule
