// ph_alu_control: turns ALUOp and the instruction's funct fields into the
// 4-bit ALU operation of ph_alu.
//
// ALU operation codes (from the lecture): 0000 and, 0001 or, 0010 add,
// 0110 subtract, 0111 set on less than, 1100 nor. The lecture gives
// ALUOp = 00 for ld/sd (address add), 01 for beq (compare by subtracting)
// and 10 for R-format (look at funct). The funct mapping for R-format is
// the usual RISC-V one: funct3 000 with inst[30] = 0 add, with inst[30] = 1
// sub; 111 and; 110 or; 010 slt. Other R-format funct3 values, which this
// ALU cannot perform, fall back to add (this design's choice).
// Combinational.
module ph_alu_control (
  input  logic [1:0] alu_op,
  input  logic       funct7_b5,   // inst[30]
  input  logic [2:0] funct3,      // inst[14:12]
  output logic [3:0] alu_ctrl
);

  always_comb begin
    unique casez (alu_op)
      2'b00: alu_ctrl = 4'b0010;           // add
      2'b01: alu_ctrl = 4'b0110;           // subtract
      default: begin
        unique case (funct3)
          3'b000:  alu_ctrl = funct7_b5 ? 4'b0110 : 4'b0010;
          3'b111:  alu_ctrl = 4'b0000;
          3'b110:  alu_ctrl = 4'b0001;
          3'b010:  alu_ctrl = 4'b0111;
          default: alu_ctrl = 4'b0010;
        endcase
      end
    endcase
  end

endmodule
