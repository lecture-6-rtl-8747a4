// rv_pkg: types and constants shared by the single-cycle RV32I datapath.
//
// The datapath is steered by a handful of control fields: PCSel picks the
// next PC, ImmSel the immediate format, Asel/Bsel the ALU operands, ALUSel the
// ALU operation, MemRW the data-memory direction and WBSel the write-back
// source. The select values of the muxes (Asel 0 = R[rs1], 1 = PC; Bsel
// 0 = R[rs2], 1 = imm; WBSel 0 = mem, 1 = alu, 2 = pc+4; PCSel 0 = pc+4,
// 1 = alu) are the ones printed on the datapath drawings. The numeric
// encodings of ImmSel and ALUSel are this design's own choice.
package rv_pkg;

  // Base opcodes (inst[6:0]) of RV32I.
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // Load funct3 values (lb, lh, lw, lbu, lhu).
  localparam logic [2:0] F3_LB  = 3'b000;
  localparam logic [2:0] F3_LH  = 3'b001;
  localparam logic [2:0] F3_LW  = 3'b010;
  localparam logic [2:0] F3_LBU = 3'b100;
  localparam logic [2:0] F3_LHU = 3'b101;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_J = 3'd3,
    IMM_U = 3'd4
  } imm_sel_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLL  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9,
    ALU_B    = 4'd10   // pass operand B through (lui)
  } alu_sel_e;

  typedef enum logic [1:0] {
    WB_MEM = 2'd0,
    WB_ALU = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  typedef struct packed {
    logic     pc_sel;   // 0: pc+4, 1: alu (taken branch / jump)
    imm_sel_e imm_sel;
    logic     reg_wen;  // RegWEn
    logic     br_un;    // BrUn: unsigned branch compare
    logic     a_sel;    // 0: R[rs1], 1: PC
    logic     b_sel;    // 0: R[rs2], 1: imm
    alu_sel_e alu_sel;
    logic     mem_rw;   // 0: read, 1: write
    wb_sel_e  wb_sel;
  } ctrl_t;

endpackage
