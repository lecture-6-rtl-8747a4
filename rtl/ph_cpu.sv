// ph_cpu: single-cycle 64-bit datapath steered by six 1-bit controls.
//
// Runs R-format arithmetic (add, sub, and, or, slt), ld, sd and beq in one
// cycle each. The PC addresses the instruction memory; the register file
// reads rs1 and rs2; ALUSrc picks R[rs2] or the sign-extended 12-bit
// immediate as the second ALU operand; the ALU operation comes from
// ph_alu_control (ALUOp plus funct fields); MemRead/MemWrite control the
// data memory; MemtoReg picks the data-memory output or the ALU result for
// the register write enabled by RegWrite. PCSrc = Branch AND Zero replaces
// the PC with the branch target PC + imm, otherwise with PC + 4. The
// controls and their effects follow the lecture's table; the immediate is
// taken from the I, S or B format according to the opcode, the memories'
// sizes, the load ports and PC reset are this design's choices.
//
// Interface: imem_load_* and dmem_load_* fill the memories while rst is
// held. The trace outputs show the instruction of the current cycle and the
// register/memory write it will commit on the next rising edge.
module ph_cpu #(
  parameter int          XLEN       = 64,
  parameter int          IMEM_DEPTH = 1024,
  parameter int          DMEM_DEPTH = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          imem_load_en,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_load_addr,
  input  logic [31:0]                   imem_load_data,
  input  logic                          dmem_load_en,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_load_addr,
  input  logic [XLEN-1:0]               dmem_load_data,
  output logic [XLEN-1:0]               pc,
  output logic [31:0]                   inst,
  output logic                          wb_en,
  output logic [4:0]                    wb_rd,
  output logic [XLEN-1:0]               wb_data,
  output logic                          st_en,
  output logic [XLEN-1:0]               st_addr,
  output logic [XLEN-1:0]               st_data,
  output logic                          pc_src
);

  import rv_pkg::*;

  localparam int OW = $clog2(XLEN / 8);

  logic            alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch;
  logic [1:0]      alu_op;
  logic [3:0]      alu_ctrl;
  logic [XLEN-1:0] br_target, rs1_v, rs2_v, imm, op_b, alu_y;
  logic [XLEN-1:0] mem_word, mem_data;
  logic            zero;
  imm_sel_e        imm_sel;
  logic            dm_we;
  logic [XLEN-1:0] dm_addr, dm_wdata;

  pc_unit #(.XLEN(XLEN), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .pc_sel  (pc_src),
    .alu     (br_target),
    .pc      (pc),
    .pc_plus4()   // PC + 4 is used only inside pc_unit here
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .addr     (pc[31:0]),
    .inst     (inst),
    .load_en  (imem_load_en),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

  ph_main_control u_ctrl (
    .opcode(inst[6:0]),
    .alu_src, .mem_to_reg, .reg_write, .mem_read, .mem_write, .branch, .alu_op
  );

  ph_alu_control u_aluc (
    .alu_op,
    .funct7_b5(inst[30]),
    .funct3   (inst[14:12]),
    .alu_ctrl
  );

  regfile #(.XLEN(XLEN)) u_rf (
    .clk,
    .reg_wen(reg_write && !rst),
    .rs_w   (inst[11:7]),
    .data_w (wb_data),
    .rs_r1  (inst[19:15]),
    .rs_r2  (inst[24:20]),
    .data_r1(rs1_v),
    .data_r2(rs2_v)
  );

  // Immediate format follows the opcode: S for stores, B for branches,
  // I otherwise (loads).
  always_comb begin
    unique case (inst[6:0])
      7'b0100011: imm_sel = IMM_S;
      7'b1100011: imm_sel = IMM_B;
      default:    imm_sel = IMM_I;
    endcase
  end

  imm_gen #(.XLEN(XLEN)) u_imm (
    .inst   (inst[31:7]),
    .imm_sel,
    .imm
  );

  assign op_b = alu_src ? imm : rs2_v;

  ph_alu #(.XLEN(XLEN)) u_alu (
    .a       (rs1_v),
    .b       (op_b),
    .alu_ctrl,
    .result  (alu_y),
    .zero
  );

  // Branch-target adder; the B-format immediate already holds the byte
  // offset (bit 0 is zero).
  assign br_target = pc + imm;
  assign pc_src    = branch && zero && !rst;

  always_comb begin
    if (rst) begin
      dm_we    = dmem_load_en;
      dm_addr  = XLEN'({dmem_load_addr, OW'(0)});
      dm_wdata = dmem_load_data;
    end else begin
      dm_we    = mem_write;
      dm_addr  = alu_y;
      dm_wdata = rs2_v;
    end
  end

  dmem #(.XLEN(XLEN), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .addr  (dm_addr),
    .we    (dm_we),
    .be    ('1),
    .data_w(dm_wdata),
    .data_r(mem_word)
  );

  assign mem_data = mem_read ? mem_word : '0;
  assign wb_data  = mem_to_reg ? mem_data : alu_y;

  // Control rules of the six-signal table: no instruction both writes
  // memory and a register, and a branch writes neither.
  a_no_store_and_write: assert property (@(posedge clk) disable iff (rst) !(mem_write && reg_write));
  a_branch_no_write:    assert property (@(posedge clk) disable iff (rst) !(branch && (mem_write || reg_write)));

  assign wb_en   = reg_write && !rst && inst[11:7] != 5'd0;
  assign wb_rd   = inst[11:7];
  assign st_en   = mem_write && !rst;
  assign st_addr = alu_y;
  assign st_data = rs2_v;

endmodule
