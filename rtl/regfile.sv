// regfile: the register file Reg[].
//
// 32 registers of XLEN bits with two combinational read ports (rsR1 ->
// dataR1, rsR2 -> dataR2) and one write port (rsW, dataW). Writes are edge
// triggered: when RegWEn = 1 the register rsW takes dataW on the next rising
// clock edge, as the lecture states. Register x0 always reads as zero and
// ignores writes (RISC-V convention; not spelled out in the lecture). There
// is no reset: software initialises registers. A read of the register being
// written in the same cycle returns the old value.
module regfile #(
  parameter int XLEN  = 32,
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     reg_wen,   // RegWEn
  input  logic [$clog2(NREGS)-1:0] rs_w,      // inst[11:7]
  input  logic [XLEN-1:0]          data_w,
  input  logic [$clog2(NREGS)-1:0] rs_r1,     // inst[19:15]
  input  logic [$clog2(NREGS)-1:0] rs_r2,     // inst[24:20]
  output logic [XLEN-1:0]          data_r1,
  output logic [XLEN-1:0]          data_r2
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reg_wen && rs_w != '0) regs[rs_w] <= data_w;
  end

  assign data_r1 = (rs_r1 == '0) ? '0 : regs[rs_r1];
  assign data_r2 = (rs_r2 == '0) ? '0 : regs[rs_r2];

endmodule
