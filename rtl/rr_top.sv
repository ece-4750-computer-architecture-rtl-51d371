// rr_top: the register-renaming processors side by side.
//
// Three independent single-issue IO2I cores, each with its own instruction
// fetch port, commit trace, debug read port and event outputs:
//   core 0  pointer-based renaming, separate PRF and ARF (io2i_ptr_proc)
//   core 1  pointer-based renaming, unified register file with an
//           architectural rename table (io2i_ptr_proc, UNIFIED=1)
//   core 2  value-based renaming, results held in the ROB (io2i_val_proc)
// Feeding the same program to all three must give the same committed
// results; only their internal naming differs. Port arrays are indexed by
// the core numbers above. Timing per core is described in its own module.
// The value-based core has no free list, so its ev.d_stall_fl bit is always
// zero.
module rr_top
  import rr_pkg::*;
#(
  parameter int unsigned NUM_PREGS = 64,
  parameter int unsigned ROB_NENT  = 4,
  parameter int unsigned IQ_NENT   = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic [2:0][31:0]       imem_addr,
  input  logic [2:0][31:0]       imem_data,
  output logic [2:0]             commit_val,
  output logic [2:0][AREG_W-1:0] commit_areg,
  output logic [2:0][XLEN-1:0]   commit_data,
  input  logic [2:0][AREG_W-1:0] dbg_areg,
  output logic [2:0][XLEN-1:0]   dbg_data,
  output events_t [2:0]          ev
);

  io2i_ptr_proc #(.NUM_PREGS(NUM_PREGS), .ROB_NENT(ROB_NENT), .IQ_NENT(IQ_NENT),
                  .UNIFIED(1'b0)) u_ptr (
    .clk, .rst, .imem_addr(imem_addr[0]), .imem_data(imem_data[0]),
    .commit_val(commit_val[0]), .commit_areg(commit_areg[0]), .commit_data(commit_data[0]),
    .dbg_areg(dbg_areg[0]), .dbg_data(dbg_data[0]), .ev(ev[0])
  );

  io2i_ptr_proc #(.NUM_PREGS(NUM_PREGS), .ROB_NENT(ROB_NENT), .IQ_NENT(IQ_NENT),
                  .UNIFIED(1'b1)) u_urf (
    .clk, .rst, .imem_addr(imem_addr[1]), .imem_data(imem_data[1]),
    .commit_val(commit_val[1]), .commit_areg(commit_areg[1]), .commit_data(commit_data[1]),
    .dbg_areg(dbg_areg[1]), .dbg_data(dbg_data[1]), .ev(ev[1])
  );

  io2i_val_proc #(.ROB_NENT(ROB_NENT), .IQ_NENT(IQ_NENT)) u_val (
    .clk, .rst, .imem_addr(imem_addr[2]), .imem_data(imem_data[2]),
    .commit_val(commit_val[2]), .commit_areg(commit_areg[2]), .commit_data(commit_data[2]),
    .dbg_areg(dbg_areg[2]), .dbg_data(dbg_data[2]), .ev(ev[2])
  );

endmodule
