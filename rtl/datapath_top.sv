// datapath_top: the two single-cycle datapaths side by side.
//
// u_rv32i is the full RV32I datapath (PCSel, ImmSel, RegWEn, BrUn, Asel,
// Bsel, ALUSel, MemRW, WBSel control); u_ph is the simpler 64-bit datapath
// controlled by RegWrite, ALUSrc, PCSrc, MemRead, MemWrite, MemtoReg and a
// 4-bit ALU operation, running R-format, ld, sd and beq. They share only
// the clock and reset; each has its own memory-load ports and retire trace,
// prefixed rv_ and ph_. See rv32i_cpu and ph_cpu for the timing.
module datapath_top #(
  parameter int RV_IMEM_DEPTH = 1024,
  parameter int RV_DMEM_DEPTH = 1024,
  parameter int PH_IMEM_DEPTH = 1024,
  parameter int PH_DMEM_DEPTH = 1024
) (
  input  logic                             clk,
  input  logic                             rst,
  // RV32I datapath
  input  logic                             rv_imem_load_en,
  input  logic [$clog2(RV_IMEM_DEPTH)-1:0] rv_imem_load_addr,
  input  logic [31:0]                      rv_imem_load_data,
  input  logic                             rv_dmem_load_en,
  input  logic [$clog2(RV_DMEM_DEPTH)-1:0] rv_dmem_load_addr,
  input  logic [31:0]                      rv_dmem_load_data,
  output logic [31:0]                      rv_pc,
  output logic [31:0]                      rv_inst,
  output logic                             rv_wb_en,
  output logic [4:0]                       rv_wb_rd,
  output logic [31:0]                      rv_wb_data,
  output logic                             rv_st_en,
  output logic [31:0]                      rv_st_addr,
  output logic [31:0]                      rv_st_data,
  output logic [3:0]                       rv_st_be,
  output logic                             rv_br_taken,
  // six-signal 64-bit datapath
  input  logic                             ph_imem_load_en,
  input  logic [$clog2(PH_IMEM_DEPTH)-1:0] ph_imem_load_addr,
  input  logic [31:0]                      ph_imem_load_data,
  input  logic                             ph_dmem_load_en,
  input  logic [$clog2(PH_DMEM_DEPTH)-1:0] ph_dmem_load_addr,
  input  logic [63:0]                      ph_dmem_load_data,
  output logic [63:0]                      ph_pc,
  output logic [31:0]                      ph_inst,
  output logic                             ph_wb_en,
  output logic [4:0]                       ph_wb_rd,
  output logic [63:0]                      ph_wb_data,
  output logic                             ph_st_en,
  output logic [63:0]                      ph_st_addr,
  output logic [63:0]                      ph_st_data,
  output logic                             ph_pc_src
);

  rv32i_cpu #(.IMEM_DEPTH(RV_IMEM_DEPTH), .DMEM_DEPTH(RV_DMEM_DEPTH)) u_rv32i (
    .clk, .rst,
    .imem_load_en  (rv_imem_load_en),
    .imem_load_addr(rv_imem_load_addr),
    .imem_load_data(rv_imem_load_data),
    .dmem_load_en  (rv_dmem_load_en),
    .dmem_load_addr(rv_dmem_load_addr),
    .dmem_load_data(rv_dmem_load_data),
    .pc      (rv_pc),
    .inst    (rv_inst),
    .wb_en   (rv_wb_en),
    .wb_rd   (rv_wb_rd),
    .wb_data (rv_wb_data),
    .st_en   (rv_st_en),
    .st_addr (rv_st_addr),
    .st_data (rv_st_data),
    .st_be   (rv_st_be),
    .br_taken(rv_br_taken)
  );

  ph_cpu #(.XLEN(64), .IMEM_DEPTH(PH_IMEM_DEPTH), .DMEM_DEPTH(PH_DMEM_DEPTH)) u_ph (
    .clk, .rst,
    .imem_load_en  (ph_imem_load_en),
    .imem_load_addr(ph_imem_load_addr),
    .imem_load_data(ph_imem_load_data),
    .dmem_load_en  (ph_dmem_load_en),
    .dmem_load_addr(ph_dmem_load_addr),
    .dmem_load_data(ph_dmem_load_data),
    .pc     (ph_pc),
    .inst   (ph_inst),
    .wb_en  (ph_wb_en),
    .wb_rd  (ph_wb_rd),
    .wb_data(ph_wb_data),
    .st_en  (ph_st_en),
    .st_addr(ph_st_addr),
    .st_data(ph_st_data),
    .pc_src (ph_pc_src)
  );

endmodule
