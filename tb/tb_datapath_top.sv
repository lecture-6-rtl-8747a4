// tb_datapath_top: end-to-end test of datapath_top at its default sizes.
//
// Loads the RV32I program of rv_prog_pkg into the RV32I datapath and the
// program of ph_prog_pkg into the six-signal datapath, releases reset and
// runs both to their halt loops. The RV32I side is compared every cycle
// with the reference model rv_ref (PC, register write, memory write, PCSel).
// The six-signal side is checked for its results and cycle count. Each
// mechanism of the two datapaths is counted and must occur at least once:
// PCSel = taken and not taken for branches, jal/jalr jumps, each WBSel
// source (mem, alu, pc+4), Asel = PC, Bsel = imm and Bsel = R[rs2],
// ALUSel = B (lui), narrow loads and stores; and for the six-signal side
// R-format, ld, sd, beq taken (PCSrc = 1) and beq not taken.
module tb_datapath_top;
  import rv_prog_pkg::*;
  import rv_ref_pkg::*;
  import ph_prog_pkg::build;
  import ph_prog_pkg::HALT_CYCLES;
  import ph_prog_pkg::K0F;

  localparam logic [31:0] PH_HALT = ph_prog_pkg::HALT;

  logic        clk = 0, rst = 1;
  logic        rv_imem_load_en = 0, rv_dmem_load_en = 0, ph_imem_load_en = 0, ph_dmem_load_en = 0;
  logic [9:0]  rv_imem_load_addr = '0, rv_dmem_load_addr = '0, ph_imem_load_addr = '0, ph_dmem_load_addr = '0;
  logic [31:0] rv_imem_load_data = '0, rv_dmem_load_data = '0, ph_imem_load_data = '0;
  logic [63:0] ph_dmem_load_data = '0;
  logic [31:0] rv_pc, rv_inst, rv_wb_data, rv_st_addr, rv_st_data;
  logic        rv_wb_en, rv_st_en, rv_br_taken;
  logic [4:0]  rv_wb_rd;
  logic [3:0]  rv_st_be;
  logic [63:0] ph_pc, ph_wb_data, ph_st_addr, ph_st_data;
  logic [31:0] ph_inst;
  logic        ph_wb_en, ph_st_en, ph_pc_src;
  logic [4:0]  ph_wb_rd;

  datapath_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask
  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen[string];
  localparam string MECH [19] = '{
    "rv PCSel taken (branch)", "rv PCSel not taken (branch)", "rv jal", "rv jalr",
    "rv WBSel mem", "rv WBSel alu", "rv WBSel pc+4", "rv Asel PC", "rv Bsel imm",
    "rv Bsel R[rs2]", "rv ALUSel B", "rv narrow load", "rv narrow store", "rv sw",
    "ph R-format", "ph ld (MemRead, MemtoReg)", "ph sd (MemWrite)", "ph PCSrc taken",
    "ph PCSrc not taken"};

  task automatic run_rv();
    rv_ref       ref_m = new(1024);
    logic [31:0] shadow [32];
    int          cyc = 0, n = 0;
    while (rv_inst != HALT && cyc < 100000) begin
      check(rv_pc == ref_m.pc, $sformatf("rv pc %h exp %h", rv_pc, ref_m.pc));
      ref_m.step(rv_inst);
      n++;
      case (ref_m.kind)
        "branch": seen[ref_m.taken ? "rv PCSel taken (branch)" : "rv PCSel not taken (branch)"]++;
        "jal":    begin seen["rv jal"]++; seen["rv WBSel pc+4"]++; seen["rv Asel PC"]++; end
        "jalr":   begin seen["rv jalr"]++; seen["rv WBSel pc+4"]++; end
        "load":   begin seen["rv WBSel mem"]++; if (rv_inst[13:12] != 2'b10) seen["rv narrow load"]++; end
        "store":  if (rv_inst[13:12] != 2'b10) seen["rv narrow store"]++; else seen["rv sw"]++;
        "lui":    begin seen["rv ALUSel B"]++; seen["rv WBSel alu"]++; end
        "auipc":  seen["rv Asel PC"]++;
        "rtype":  begin seen["rv Bsel R[rs2]"]++; seen["rv WBSel alu"]++; end
        "itype":  begin seen["rv Bsel imm"]++; seen["rv WBSel alu"]++; end
        default: ;
      endcase
      check(rv_wb_en == ref_m.wb_en, $sformatf("rv wb_en @%h", rv_pc));
      if (ref_m.wb_en) begin
        check(rv_wb_rd == ref_m.wb_rd && rv_wb_data == ref_m.wb_data, $sformatf("rv wb @%h", rv_pc));
        shadow[rv_wb_rd] = rv_wb_data;
      end
      check(rv_st_en == ref_m.st_en, $sformatf("rv st_en @%h", rv_pc));
      if (ref_m.st_en) begin
        check(rv_st_addr == ref_m.st_addr && rv_st_be == ref_m.st_be, $sformatf("rv st @%h", rv_pc));
        for (int k = 0; k < 4; k++)
          if (ref_m.st_be[k]) check(rv_st_data[8*k +: 8] == ref_m.st_word[8*k +: 8], "rv st byte");
      end
      check(rv_br_taken == ref_m.taken, $sformatf("rv PCSel @%h", rv_pc));
      @(negedge clk); #1;
      cyc++;
    end
    check(rv_inst == HALT, "rv reached halt");
    check(cyc == n, "rv one instruction per cycle");
    check(shadow[20] == 32'h12345678 && shadow[27] == 32'h05fdfffd, "rv loads");
    check(shadow[28] == 32'd12 && shadow[30] == 32'd6 && shadow[31] == 32'd0, "rv branches");
    $display("rv: %0d instructions in %0d cycles", n, cyc);
  endtask

  task automatic run_ph();
    logic [63:0] shadow [32];
    int          cyc = 0;
    while (ph_inst != PH_HALT && cyc < 100000) begin
      case (ph_inst[6:0])
        7'b0110011: seen["ph R-format"]++;
        7'b0000011: seen["ph ld (MemRead, MemtoReg)"]++;
        7'b0100011: seen["ph sd (MemWrite)"]++;
        7'b1100011: seen[ph_pc_src ? "ph PCSrc taken" : "ph PCSrc not taken"]++;
        default: ;
      endcase
      if (ph_wb_en) shadow[ph_wb_rd] = ph_wb_data;
      if (ph_st_en && ph_st_addr == 64'd40) check(ph_st_data == 64'd55, "ph sd sum");
      @(negedge clk); #1;
      cyc++;
    end
    check(cyc == HALT_CYCLES, $sformatf("ph cycles %0d", cyc));
    check(shadow[3] == 64'd55 && shadow[10] == 64'd55, "ph sum");
    check(shadow[6] == (-64'sd5 & K0F) && shadow[7] == (-64'sd5 | K0F), "ph and/or");
    check(shadow[8] == 64'd1 && shadow[9] == 64'd0, "ph slt");
  endtask

  initial begin
    logic [31:0] rp[$], pp[$];
    logic [63:0] pd[$];
    rv_prog_pkg::build(rp, 300);
    ph_prog_pkg::build(pp, pd);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      rv_imem_load_en = 1; rv_imem_load_addr = 10'(i); rv_imem_load_data = (i < rp.size()) ? rp[i] : HALT;
      rv_dmem_load_en = 1; rv_dmem_load_addr = 10'(i); rv_dmem_load_data = '0;
      ph_imem_load_en = 1; ph_imem_load_addr = 10'(i); ph_imem_load_data = (i < pp.size()) ? pp[i] : PH_HALT;
      ph_dmem_load_en = 1; ph_dmem_load_addr = 10'(i); ph_dmem_load_data = (i < pd.size()) ? pd[i] : '0;
    end
    @(negedge clk);
    rv_imem_load_en = 0; rv_dmem_load_en = 0; ph_imem_load_en = 0; ph_dmem_load_en = 0;
    @(negedge clk); rst = 0; #1;
    fork
      run_rv();
      run_ph();
    join
    foreach (MECH[i]) begin
      $display("  %-28s %0d", MECH[i], seen.exists(MECH[i]) ? seen[MECH[i]] : 0);
      check(seen.exists(MECH[i]), {"mechanism never happened: ", MECH[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
