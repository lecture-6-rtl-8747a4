// control: control logic of the single-cycle RV32I datapath.
//
// Combinational decoder from the instruction word inst[31:0] and the branch
// flags BrEq/BrLT to the datapath controls (rv_pkg::ctrl_t):
//   R-format     Bsel=0, ALUSel from funct3/funct7, RegWEn=1, WBSel=alu
//   I-format ALU ImmSel=I, Bsel=1, ALUSel from funct3 (funct7[5] for srai)
//   load         ImmSel=I, Bsel=1, ALUSel=Add, RegWEn=1, WBSel=mem
//   store        ImmSel=S, Bsel=1, ALUSel=Add, MemRW=write, RegWEn=0
//   branch       ImmSel=B, Asel=PC, Bsel=1, ALUSel=Add, BrUn=funct3[1],
//                PCSel=taken from BrEq/BrLT, RegWEn=0
//   jal          ImmSel=J, Asel=PC, Bsel=1, ALUSel=Add, PCSel=1, WBSel=pc+4
//   jalr         ImmSel=I, Asel=R[rs1], Bsel=1, ALUSel=Add, PCSel=1, WBSel=pc+4
//   lui          ImmSel=U, Bsel=1, ALUSel=B, WBSel=alu
//   auipc        ImmSel=U, Asel=PC, Bsel=1, ALUSel=Add, WBSel=alu
// These settings are the ones the lecture gives per instruction. Branch
// decisions: beq BrEq, bne !BrEq, blt/bltu BrLT, bge/bgeu !BrLT. Any other
// opcode (fence, ecall, ebreak, unknown) is executed as a no-op that writes
// neither registers nor memory; that choice is this design's. Fields that the
// lecture marks "don't care" are driven to fixed values here.
module control
  import rv_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        br_eq,
  input  logic        br_lt,
  output ctrl_t       ctrl
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       f7b5;       // inst[30]
  alu_sel_e   alu_op;     // arithmetic operation from funct3 / funct7
  logic       taken;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign f7b5   = inst[30];

  always_comb begin
    unique case (funct3)
      3'b000:  alu_op = (opcode == OP_REG && f7b5) ? ALU_SUB : ALU_ADD;
      3'b001:  alu_op = ALU_SLL;
      3'b010:  alu_op = ALU_SLT;
      3'b011:  alu_op = ALU_SLTU;
      3'b100:  alu_op = ALU_XOR;
      3'b101:  alu_op = f7b5 ? ALU_SRA : ALU_SRL;
      3'b110:  alu_op = ALU_OR;
      default: alu_op = ALU_AND;
    endcase
  end

  always_comb begin
    unique case (funct3)
      3'b000:        taken = br_eq;    // beq
      3'b001:        taken = !br_eq;   // bne
      3'b100, 3'b110: taken = br_lt;   // blt, bltu
      3'b101, 3'b111: taken = !br_lt;  // bge, bgeu
      default:       taken = 1'b0;
    endcase
  end

  always_comb begin
    // Defaults: a no-op that advances the PC.
    ctrl.pc_sel  = 1'b0;
    ctrl.imm_sel = IMM_I;
    ctrl.reg_wen = 1'b0;
    ctrl.br_un   = 1'b0;
    ctrl.a_sel   = 1'b0;
    ctrl.b_sel   = 1'b0;
    ctrl.alu_sel = ALU_ADD;
    ctrl.mem_rw  = 1'b0;
    ctrl.wb_sel  = WB_ALU;
    unique case (opcode)
      OP_REG: begin
        ctrl.reg_wen = 1'b1;
        ctrl.alu_sel = alu_op;
      end
      OP_IMM: begin
        ctrl.b_sel   = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.alu_sel = alu_op;
      end
      OP_LOAD: begin
        ctrl.b_sel   = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.wb_sel  = WB_MEM;
      end
      OP_STORE: begin
        ctrl.imm_sel = IMM_S;
        ctrl.b_sel   = 1'b1;
        ctrl.mem_rw  = 1'b1;
      end
      OP_BRANCH: begin
        ctrl.imm_sel = IMM_B;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.br_un   = funct3[1];
        ctrl.pc_sel  = taken;
      end
      OP_JAL: begin
        ctrl.imm_sel = IMM_J;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.pc_sel  = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.wb_sel  = WB_PC4;
      end
      OP_JALR: begin
        ctrl.b_sel   = 1'b1;
        ctrl.pc_sel  = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.wb_sel  = WB_PC4;
      end
      OP_LUI: begin
        ctrl.imm_sel = IMM_U;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = ALU_B;
        ctrl.reg_wen = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.imm_sel = IMM_U;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.reg_wen = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
