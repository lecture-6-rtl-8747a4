// ph_main_control: main control unit of the simple six-signal datapath.
//
// Decodes the opcode into six 1-bit controls and the 2-bit ALUOp:
//   instruction  ALUSrc MemtoReg RegWrite MemRead MemWrite Branch ALUOp
//   R-format       0       0        1        0       0       0     10
//   ld             1       1        1        1       0       0     00
//   sd             1       X        0        0       1       0     00
//   beq            0       X        0        0       0       1     01
// The table is the lecture's. Its "X" (don't care) entries are driven to 0
// here, and every other opcode gets all controls 0 (a no-op), which is this
// design's choice. Combinational.
module ph_main_control (
  input  logic [6:0] opcode,
  output logic       alu_src,     // 1: second ALU operand is the immediate
  output logic       mem_to_reg,  // 1: write data comes from data memory
  output logic       reg_write,
  output logic       mem_read,
  output logic       mem_write,
  output logic       branch,
  output logic [1:0] alu_op
);

  always_comb begin
    {alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_op} = 8'b0;
    unique case (opcode)
      7'b0110011: {alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_op} = 8'b0_0_1_0_0_0_10;
      7'b0000011: {alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_op} = 8'b1_1_1_1_0_0_00;
      7'b0100011: {alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_op} = 8'b1_0_0_0_1_0_00;
      7'b1100011: {alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch, alu_op} = 8'b0_0_0_0_0_1_01;
      default: ;
    endcase
  end

endmodule
