// imm_gen: immediate generator (Imm. Gen).
//
// Builds the sign-extended immediate imm[XLEN-1:0] from inst[31:7] for the
// format chosen by ImmSel (which depends on the instruction format, not the
// instruction):
//   I: inst[31:20]                                  (ALU-immediate, loads, jalr)
//   S: inst[31:25], inst[11:7]                      (stores)
//   B: inst[31], inst[7], inst[30:25], inst[11:8], 0 (branches, 13-bit byte offset)
//   J: inst[31], inst[19:12], inst[20], inst[30:21], 0 (jal, 21-bit byte offset)
//   U: inst[31:12], 12 zeros                        (lui, auipc)
// inst[31] is always the sign bit. The I/S split, the B-format muxes for
// imm[11] (S: inst[31], B: inst[7]) and imm[0] (S: inst[7], B: 0) and the U
// format follow the lecture; the J bit order is the standard RV32I one.
// Purely combinational.
module imm_gen
  import rv_pkg::*;
#(
  parameter int XLEN = 32
) (
  input  logic [31:7]     inst,
  input  imm_sel_e        imm_sel,
  output logic [XLEN-1:0] imm
);

  logic [31:0] imm32;

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm32 = {{21{inst[31]}}, inst[30:20]};
      IMM_S:   imm32 = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm32 = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_J:   imm32 = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      IMM_U:   imm32 = {inst[31:12], 12'b0};
      default: imm32 = '0;
    endcase
  end

  // Sign-extend to the machine width (32 or 64 bits).
  assign imm = XLEN'(signed'(imm32));

endmodule
