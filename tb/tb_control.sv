// tb_control: checks the control word for every instruction class against
// the settings the datapath walk-throughs give (sw: RegWEn 0, Bsel 1,
// ImmSel S, ALUSel Add, MemRW write; jal: PCSel 1, ImmSel J, Asel 1, Bsel 1,
// WBSel 2; lui: ImmSel U, Bsel 1, ALUSel B; ...), the branch decision for
// all six branches under all BrEq/BrLT combinations, BrUn, and the ALU
// operation chosen by funct3/funct7.
module tb_control;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst;
  logic        eq, lt;
  ctrl_t       c;
  control dut (.inst, .br_eq(eq), .br_lt(lt), .ctrl(c));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Compare the fields that matter for the instruction ("don't care"
  // fields are skipped by passing check_* = 0).
  task automatic expect_ctrl(input string nm, input bit pcsel, input imm_sel_e is, input bit chk_imm,
                             input bit wen, input bit asel, input bit bsel, input alu_sel_e as,
                             input bit memw, input wb_sel_e wb, input bit chk_wb);
    #1;
    check(c.pc_sel == pcsel, {nm, " PCSel"});
    if (chk_imm) check(c.imm_sel == is, {nm, " ImmSel"});
    check(c.reg_wen == wen, {nm, " RegWEn"});
    check(c.a_sel == asel, {nm, " Asel"});
    check(c.b_sel == bsel, {nm, " Bsel"});
    check(c.alu_sel == as, {nm, " ALUSel"});
    check(c.mem_rw == memw, {nm, " MemRW"});
    if (chk_wb) check(c.wb_sel == wb, {nm, " WBSel"});
  endtask

  initial begin
    eq = 0; lt = 0;
    inst = ADD(3, 1, 2);                   expect_ctrl("add", 0, IMM_I, 0, 1, 0, 0, ALU_ADD, 0, WB_ALU, 1);
    inst = SUB(3, 1, 2);                   expect_ctrl("sub", 0, IMM_I, 0, 1, 0, 0, ALU_SUB, 0, WB_ALU, 1);
    inst = enc_r(7'h20, 2, 1, 3'b101, 3, 7'h33); expect_ctrl("sra", 0, IMM_I, 0, 1, 0, 0, ALU_SRA, 0, WB_ALU, 1);
    inst = enc_r(7'h00, 2, 1, 3'b011, 3, 7'h33); expect_ctrl("sltu", 0, IMM_I, 0, 1, 0, 0, ALU_SLTU, 0, WB_ALU, 1);
    inst = ADDI(3, 1, -1);                 expect_ctrl("addi", 0, IMM_I, 1, 1, 0, 1, ALU_ADD, 0, WB_ALU, 1);
    // addi with imm[10] set must still add, not subtract.
    inst = ADDI(3, 1, 1024);               expect_ctrl("addi 1024", 0, IMM_I, 1, 1, 0, 1, ALU_ADD, 0, WB_ALU, 1);
    inst = enc_i(12'h405, 1, 3'b101, 3, 7'h13); expect_ctrl("srai", 0, IMM_I, 1, 1, 0, 1, ALU_SRA, 0, WB_ALU, 1);
    inst = enc_i(3, 1, 3'b101, 3, 7'h13);  expect_ctrl("srli", 0, IMM_I, 1, 1, 0, 1, ALU_SRL, 0, WB_ALU, 1);
    inst = enc_i(3, 1, 3'b111, 3, 7'h13);  expect_ctrl("andi", 0, IMM_I, 1, 1, 0, 1, ALU_AND, 0, WB_ALU, 1);
    inst = LOAD(3'b010, 14, 2, 8);         expect_ctrl("lw", 0, IMM_I, 1, 1, 0, 1, ALU_ADD, 0, WB_MEM, 1);
    inst = STORE(3'b010, 14, 2, 36);       expect_ctrl("sw", 0, IMM_S, 1, 0, 0, 1, ALU_ADD, 1, WB_ALU, 0);
    inst = JAL(1, 16);                     expect_ctrl("jal", 1, IMM_J, 1, 1, 1, 1, ALU_ADD, 0, WB_PC4, 1);
    inst = JALR(1, 5, 4);                  expect_ctrl("jalr", 1, IMM_I, 1, 1, 0, 1, ALU_ADD, 0, WB_PC4, 1);
    inst = LUI(5, 20'h12345);              expect_ctrl("lui", 0, IMM_U, 1, 1, 0, 1, ALU_B, 0, WB_ALU, 1);
    inst = AUIPC(5, 1);                    expect_ctrl("auipc", 0, IMM_U, 1, 1, 1, 1, ALU_ADD, 0, WB_ALU, 1);
    inst = 32'h0000000f;                   expect_ctrl("fence", 0, IMM_I, 0, 0, 0, 0, ALU_ADD, 0, WB_ALU, 0);
    // Branches: every funct3 under every flag combination.
    for (int f = 0; f < 8; f++) begin
      if (f == 2 || f == 3) continue;
      for (int e = 0; e < 2; e++) for (int l = 0; l < 2; l++) begin
        bit tk;
        if (e && l) continue;   // A == B and A < B cannot both hold
        inst = BR(3'(f), 1, 2, -8); eq = e[0]; lt = l[0];
        case (f)
          0: tk = e;  1: tk = !e;  4, 6: tk = l;  default: tk = !l;
        endcase
        expect_ctrl($sformatf("branch f3=%0d eq=%0d lt=%0d", f, e, l), tk, IMM_B, 1, 0, 1, 1, ALU_ADD, 0, WB_ALU, 0);
        check(c.br_un == (f == 6 || f == 7), $sformatf("BrUn f3=%0d", f));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
