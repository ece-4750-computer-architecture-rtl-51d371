// rr_asm_pkg: tiny assembler for the three instructions the processors
// execute (RV32 add, addi, mul), used by the testbenches to build programs.
package rr_asm_pkg;
  function automatic logic [31:0] enc_add(input logic [4:0] rd, input logic [4:0] rs1, input logic [4:0] rs2);
    return {7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_mul(input logic [4:0] rd, input logic [4:0] rs1, input logic [4:0] rs2);
    return {7'b0000001, rs2, rs1, 3'b000, rd, 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_addi(input logic [4:0] rd, input logic [4:0] rs1, input int imm);
    return {12'(imm), rs1, 3'b000, rd, 7'b0010011};
  endfunction

endpackage
