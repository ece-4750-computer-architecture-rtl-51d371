// regfile: register file used as the physical register file (PRF) and as the
// architectural register file (ARF).
//
// NREGS words of XLEN bits, NREAD asynchronous read ports and one write port
// written at the rising clock edge. A read in the cycle of a write returns the
// old value; the processors bypass around that themselves. With ZERO_REG0 set,
// entry 0 always reads as zero and ignores writes (used for the ARF, where
// entry 0 is x0). All entries reset to zero, so the machine starts with every
// architectural register equal to zero.
// Asynchronous reads and zero reset are this design's choice.
module regfile #(
  parameter int unsigned NREGS     = 64,
  parameter int unsigned NREAD     = 3,
  parameter int unsigned XLEN      = 32,
  parameter bit          ZERO_REG0 = 1'b0,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NREAD-1:0][AW-1:0]  raddr,
  output logic [NREAD-1:0][XLEN-1:0] rdata,
  input  logic                      wen,
  input  logic [AW-1:0]             waddr,
  input  logic [XLEN-1:0]           wdata
);

  logic [XLEN-1:0] mem [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) mem[i] <= '0;
    end else if (wen && !(ZERO_REG0 && waddr == '0)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int r = 0; r < NREAD; r++) begin
      rdata[r] = (ZERO_REG0 && raddr[r] == '0) ? '0 : mem[raddr[r]];
    end
  end

endmodule
