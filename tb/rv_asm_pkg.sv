// rv_asm_pkg: instruction encoders for the testbenches.
//
// Each function packs register numbers and an immediate into a 32-bit
// RV32I (or RV64 ld/sd) instruction word following the base-ISA formats
// R, I, S, B, U and J. The testbenches build their programs with these.
package rv_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:0], 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3, input logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), f3, v[4:0], op};
  endfunction

  function automatic logic [31:0] enc_b(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), f3, v[4:1], v[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input int imm20, input int rd, input logic [6:0] op);
    logic [31:0] v = 32'(imm20);
    return {v[19:0], 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_j(input int imm, input int rd);
    logic [31:0] v = 32'(imm);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  // Common mnemonics.
  function automatic logic [31:0] ADDI(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] ADD(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] SUB(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] LOAD(input logic [2:0] f3, input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, f3, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] STORE(input logic [2:0] f3, input int rs2, input int rs1, input int imm);
    return enc_s(imm, rs2, rs1, f3, 7'b0100011);
  endfunction
  function automatic logic [31:0] BR(input logic [2:0] f3, input int rs1, input int rs2, input int off);
    return enc_b(off, rs2, rs1, f3);
  endfunction
  function automatic logic [31:0] JAL(input int rd, input int off);
    return enc_j(off, rd);
  endfunction
  function automatic logic [31:0] JALR(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] LUI(input int rd, input int imm20);
    return enc_u(imm20, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] AUIPC(input int rd, input int imm20);
    return enc_u(imm20, rd, 7'b0010111);
  endfunction

endpackage
