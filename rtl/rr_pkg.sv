// rr_pkg: types, constants and the instruction decoder shared by the two
// register-renaming processors (pointer-based and value-based).
//
// Both machines are single issue and execute only three instructions:
// add, addi and mul. They use the RV32I/RV32M encodings of those three
// (the notes only give the assembly syntax, so the binary encoding is this
// design's choice). Anything else, and any of the three whose destination is
// x0, has no architectural effect and is dropped in the decode stage.
//
// Latencies follow the pipeline drawing: one X stage for add/addi, four
// stages Y0..Y3 for mul, then a single shared writeback stage W.
package rr_pkg;

  parameter int unsigned XLEN      = 32;  // data width (RV32)
  parameter int unsigned NUM_AREGS = 32;  // x0..x31; x0 is hard-wired to zero
  parameter int unsigned AREG_W    = 5;

  parameter int unsigned X_LAT = 2;  // cycles from issue (I) to writeback (W) through X
  parameter int unsigned Y_LAT = 5;  // cycles from issue (I) to writeback (W) through Y0..Y3

  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_ADDI = 2'd1,
    OP_MUL  = 2'd2
  } op_e;

  typedef struct packed {
    logic              valid;    // supported instruction with a non-zero destination
    op_e               op;
    logic [AREG_W-1:0] rd;
    logic [AREG_W-1:0] rs1;
    logic [AREG_W-1:0] rs2;
    logic              rs1_v;    // instruction reads a non-zero rs1
    logic              rs2_v;    // instruction reads a non-zero rs2
    logic [XLEN-1:0]   imm;      // sign-extended I-type immediate
  } dec_t;

  // Per-cycle events of a processor, brought out for performance counting.
  typedef struct packed {
    logic d_stall_fl;    // decode stalled: free list empty
    logic d_stall_rob;   // decode stalled: reorder buffer full
    logic d_stall_iq;    // decode stalled: issue queue full
    logic i_issue;       // an instruction issued
    logic i_ooo;         // it was not the oldest instruction in flight
    logic i_bypass;      // one of its operands came from X, Y3 or W
    logic i_wport_stall; // an instruction with ready operands waited for the W port
    logic c_commit;      // an instruction committed
  } events_t;

  // RV32 encodings: add  = funct7 0000000, funct3 000, opcode 0110011
  //                 mul  = funct7 0000001, funct3 000, opcode 0110011
  //                 addi =                 funct3 000, opcode 0010011
  function automatic dec_t decode(input logic [31:0] inst);
    dec_t d;
    d       = '0;
    d.rd    = inst[11:7];
    d.rs1   = inst[19:15];
    d.rs2   = inst[24:20];
    d.imm   = {{(XLEN-12){inst[31]}}, inst[31:20]};
    d.op    = OP_ADD;
    if (inst[6:0] == 7'b0110011 && inst[14:12] == 3'b000 && inst[31:25] == 7'b0000000) begin
      d.valid = 1'b1;  d.op = OP_ADD;  d.rs2_v = (d.rs2 != '0);
    end else if (inst[6:0] == 7'b0110011 && inst[14:12] == 3'b000 && inst[31:25] == 7'b0000001) begin
      d.valid = 1'b1;  d.op = OP_MUL;  d.rs2_v = (d.rs2 != '0);
    end else if (inst[6:0] == 7'b0010011 && inst[14:12] == 3'b000) begin
      d.valid = 1'b1;  d.op = OP_ADDI;
    end
    d.rs1_v = d.valid && (d.rs1 != '0);
    if (d.rd == '0) d.valid = 1'b0;
    return d;
  endfunction

endpackage
