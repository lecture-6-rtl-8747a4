// rv32i_cpu: single-cycle RV32I processor datapath with its control logic.
//
// Every instruction completes in one clock cycle. During the cycle the PC
// addresses IMEM; the instruction's register fields inst[19:15] and
// inst[24:20] read R[rs1] and R[rs2]; Imm. Gen builds imm from inst[31:7];
// the branch comparator compares R[rs1] with R[rs2]; the Asel mux (R[rs1] or
// PC) and Bsel mux (R[rs2] or imm) feed the ALU; the ALU result addresses
// DMEM; the WBSel mux picks mem (after narrow-load extension), alu or pc+4
// for the register write. On the rising edge the PC takes pc+4 or the ALU
// output (PCSel), the register file writes rd = inst[11:7] if RegWEn, and
// DMEM writes R[rs2] if MemRW = write. This structure and these mux inputs
// are the ones of the lecture's full RV32I datapath drawing.
//
// Interface: imem_load_* writes the instruction memory (hold rst high while
// loading); dmem_load_* writes data-memory words the same way. The
// retire-trace outputs report, for the instruction executing this cycle,
// its PC and word, the register write (wb_*) and the memory write (st_*),
// all valid before the rising edge that commits them.
//
// Design choices not from the lecture: memory sizes, synchronous reset of
// the PC only, the load ports, no LSB clearing on jalr targets and no traps
// (unknown opcodes, fence and system instructions act as no-ops; misaligned
// accesses are not detected).
module rv32i_cpu
  import rv_pkg::*;
#(
  parameter int          IMEM_DEPTH = 1024,
  parameter int          DMEM_DEPTH = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  // program / data loading
  input  logic                          imem_load_en,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_load_addr,
  input  logic [31:0]                   imem_load_data,
  input  logic                          dmem_load_en,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_load_addr,
  input  logic [31:0]                   dmem_load_data,
  // retire trace
  output logic [31:0]                   pc,
  output logic [31:0]                   inst,
  output logic                          wb_en,
  output logic [4:0]                    wb_rd,
  output logic [31:0]                   wb_data,
  output logic                          st_en,
  output logic [31:0]                   st_addr,
  output logic [31:0]                   st_data,
  output logic [3:0]                    st_be,
  output logic                          br_taken
);

  ctrl_t       ctrl;
  logic [31:0] pc_plus4;
  logic [31:0] rs1_v, rs2_v, imm;
  logic [31:0] op_a, op_b, alu_y;
  logic        br_eq, br_lt;
  logic [31:0] mem_word, mem_data;
  logic [31:0] wdata;
  logic [31:0] dm_addr, dm_wdata;
  logic [3:0]  dm_be, st_be_i;
  logic        dm_we;

  pc_unit #(.XLEN(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .pc_sel  (ctrl.pc_sel),
    .alu     (alu_y),
    .pc      (pc),
    .pc_plus4(pc_plus4)
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .addr     (pc),
    .inst     (inst),
    .load_en  (imem_load_en),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

  control u_ctrl (
    .inst,
    .br_eq,
    .br_lt,
    .ctrl
  );

  regfile #(.XLEN(32)) u_rf (
    .clk,
    .reg_wen(ctrl.reg_wen && !rst),
    .rs_w   (inst[11:7]),
    .data_w (wb_data),
    .rs_r1  (inst[19:15]),
    .rs_r2  (inst[24:20]),
    .data_r1(rs1_v),
    .data_r2(rs2_v)
  );

  imm_gen #(.XLEN(32)) u_imm (
    .inst   (inst[31:7]),
    .imm_sel(ctrl.imm_sel),
    .imm
  );

  branch_comp #(.XLEN(32)) u_bc (
    .a    (rs1_v),
    .b    (rs2_v),
    .br_un(ctrl.br_un),
    .br_eq,
    .br_lt
  );

  // Operand muxes: Asel (0 = R[rs1], 1 = PC), Bsel (0 = R[rs2], 1 = imm).
  assign op_a = ctrl.a_sel ? pc  : rs1_v;
  assign op_b = ctrl.b_sel ? imm : rs2_v;

  alu u_alu (
    .a      (op_a),
    .b      (op_b),
    .alu_sel(ctrl.alu_sel),
    .y      (alu_y)
  );

  store_align u_sa (
    .data   (rs2_v),
    .addr_lo(alu_y[1:0]),
    .funct3 (inst[14:12]),
    .data_w (wdata),
    .be     (st_be_i)
  );

  // While reset is held the data-memory port serves the load interface.
  always_comb begin
    if (rst) begin
      dm_we    = dmem_load_en;
      dm_addr  = {{(30 - $clog2(DMEM_DEPTH)){1'b0}}, dmem_load_addr, 2'b00};
      dm_wdata = dmem_load_data;
      dm_be    = 4'b1111;
    end else begin
      dm_we    = ctrl.mem_rw;
      dm_addr  = alu_y;
      dm_wdata = wdata;
      dm_be    = st_be_i;
    end
  end

  dmem #(.XLEN(32), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .addr  (dm_addr),
    .we    (dm_we),
    .be    (dm_be),
    .data_w(dm_wdata),
    .data_r(mem_word)
  );

  load_extend u_le (
    .word   (mem_word),
    .addr_lo(alu_y[1:0]),
    .funct3 (inst[14:12]),
    .data   (mem_data)
  );

  // Write-back mux: WBSel 0 = mem, 1 = alu, 2 = pc+4.
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = mem_data;
      WB_PC4:  wb_data = pc_plus4;
      default: wb_data = alu_y;
    endcase
  end

  // Control rules of the instruction table: a store never writes the
  // register file, and a register write never comes from memory unless the
  // instruction is a load.
  a_store_no_regwrite: assert property (@(posedge clk) disable iff (rst)
                                        !(ctrl.mem_rw && ctrl.reg_wen));
  a_mem_wb_only_load:  assert property (@(posedge clk) disable iff (rst)
                                        !(ctrl.reg_wen && ctrl.wb_sel == WB_MEM) || inst[6:0] == OP_LOAD);

  assign wb_en    = ctrl.reg_wen && !rst && inst[11:7] != 5'd0;
  assign wb_rd    = inst[11:7];
  assign st_en    = ctrl.mem_rw && !rst;
  assign st_addr  = alu_y;
  assign st_data  = wdata;
  assign st_be    = st_be_i;
  assign br_taken = ctrl.pc_sel && !rst;

endmodule
