// alu: the datapath ALU.
//
// Combinational. Computes alu = A op B with op chosen by ALUSel. The lecture
// uses ALUSel = Add (addresses, PC+imm) and ALUSel = B (lui passes the
// immediate through); the remaining operations are those RV32I R- and
// I-format arithmetic needs: sub, and, or, xor, sll, srl, sra, slt, sltu.
// Shift amounts use B[4:0]. The ALUSel encoding is this design's own
// (rv_pkg::alu_sel_e).
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    alu_sel,
  output logic [31:0] y
);

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = 32'($signed(a) >>> b[4:0]);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_B:    y = b;
      default:  y = '0;
    endcase
  end

endmodule
