// pc_unit: program counter with its next-PC logic.
//
// Holds the 32-bit PC register, the "+4" adder that produces pc+4, and the
// PCSel mux in front of the register: PCSel = 0 loads pc+4 (the next
// sequential instruction), PCSel = 1 loads the ALU output (branch target
// PC+imm, jal target PC+imm or jalr target R[rs1]+imm). This follows the
// datapath drawings. The PC is updated on the rising clock edge. The
// synchronous active-high reset to RESET_PC is this design's choice; the
// lecture does not state a reset value.
//
// Timing: pc and pc_plus4 are valid during the whole cycle; the new PC
// appears after the next rising edge.
module pc_unit #(
  parameter int          XLEN     = 32,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            pc_sel,    // 0: pc+4, 1: alu
  input  logic [XLEN-1:0] alu,       // jump / branch target from the ALU
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pc_plus4
);

  logic [XLEN-1:0] pc_next;

  assign pc_plus4 = pc + XLEN'(4);
  assign pc_next  = pc_sel ? alu : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc <= XLEN'(RESET_PC);
    else     pc <= pc_next;
  end

endmodule
