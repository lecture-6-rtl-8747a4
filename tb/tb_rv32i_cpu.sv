// tb_rv32i_cpu: self-checking test of the single-cycle RV32I datapath.
//
// Loads the program of rv_prog_pkg into IMEM, clears DMEM through the load
// port, releases reset and then, every cycle, runs the same instruction on
// the reference model rv_ref and compares the PC, the register write
// (enable, rd, data) and the memory write (address, byte lanes, stored
// bytes) with the processor's retire trace. At the halt loop it checks the
// hand-computed results of the directed part, that each instruction took
// exactly one clock cycle, and that every instruction class occurred.
module tb_rv32i_cpu;
  import rv_asm_pkg::*;
  import rv_prog_pkg::*;
  import rv_ref_pkg::*;

  localparam int IDEPTH = 1024;
  localparam int DDEPTH = 1024;

  logic        clk = 0, rst = 1;
  logic        il_en = 0, dl_en = 0;
  logic [9:0]  il_addr = '0, dl_addr = '0;
  logic [31:0] il_data = '0, dl_data = '0;
  logic [31:0] pc, inst, wb_data, st_addr, st_data;
  logic        wb_en, st_en, br_taken;
  logic [4:0]  wb_rd;
  logic [3:0]  st_be;

  int checks = 0, failures = 0;

  rv32i_cpu #(.IMEM_DEPTH(IDEPTH), .DMEM_DEPTH(DDEPTH)) dut (
    .clk, .rst,
    .imem_load_en(il_en), .imem_load_addr(il_addr), .imem_load_data(il_data),
    .dmem_load_en(dl_en), .dmem_load_addr(dl_addr), .dmem_load_data(dl_data),
    .pc, .inst, .wb_en, .wb_rd, .wb_data, .st_en, .st_addr, .st_data, .st_be, .br_taken
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog[$];
  logic [31:0] shadow [32];
  int          counts[string];
  int          cycles, executed;

  initial begin
    rv_ref ref_m = new(DDEPTH);
    build(prog, 300);
    // Load IMEM (rest of it with the halt word) and clear DMEM.
    for (int i = 0; i < IDEPTH; i++) begin
      @(negedge clk);
      il_en = 1; il_addr = 10'(i); il_data = (i < prog.size()) ? prog[i] : HALT;
      dl_en = 1; dl_addr = 10'(i); dl_data = '0;
    end
    @(negedge clk);
    il_en = 0; dl_en = 0;
    @(negedge clk);
    rst = 0;
    #1;
    cycles = 0; executed = 0;
    forever begin
      // Mid-cycle: the combinational datapath has settled.
      check(pc == ref_m.pc, $sformatf("pc %h exp %h", pc, ref_m.pc));
      if (inst == HALT) break;
      ref_m.step(inst);
      counts[ref_m.kind]++;
      if (ref_m.kind == "branch") counts[ref_m.taken ? "br_taken" : "br_not_taken"]++;
      executed++;
      check(wb_en == ref_m.wb_en, $sformatf("wb_en @%h", pc));
      if (ref_m.wb_en) begin
        check(wb_rd == ref_m.wb_rd && wb_data == ref_m.wb_data,
              $sformatf("wb @%h x%0d=%h exp x%0d=%h", pc, wb_rd, wb_data, ref_m.wb_rd, ref_m.wb_data));
        shadow[wb_rd] = wb_data;
      end
      check(st_en == ref_m.st_en, $sformatf("st_en @%h", pc));
      if (ref_m.st_en) begin
        check(st_addr == ref_m.st_addr && st_be == ref_m.st_be, $sformatf("st addr/be @%h", pc));
        for (int k = 0; k < 4; k++)
          if (ref_m.st_be[k])
            check(st_data[8*k +: 8] == ref_m.st_word[8*k +: 8], $sformatf("st byte %0d @%h", k, pc));
      end
      check(br_taken == (ref_m.taken), $sformatf("pcsel @%h", pc));
      @(negedge clk);
      cycles++;
    end
    // One instruction per clock.
    check(cycles == executed, $sformatf("cycles %0d for %0d instructions", cycles, executed));
    // Hand-computed results of the directed part.
    check(shadow[20] == 32'h12345678, "lw");
    check(shadow[21] == 32'hfffffffd, "lh");
    check(shadow[22] == 32'h0000fffd, "lhu");
    check(shadow[23] == 32'hfffffffd, "lb");
    check(shadow[24] == 32'h000000fd, "lbu");
    check(shadow[25] == 32'h00000005, "lb positive");
    check(shadow[26] == 32'h000005fd, "lh at offset 2");
    check(shadow[27] == 32'h05fdfffd, "lw of bytes");
    check(shadow[28] == 32'd12, "loop");
    check(shadow[30] == 32'd6, "not-taken branches");
    check(shadow[31] == 32'd0, "no poison executed");
    foreach (counts[k]) $display("  %-14s %0d", k, counts[k]);
    check(counts.exists("rtype") && counts.exists("itype") && counts.exists("load") &&
          counts.exists("store") && counts.exists("br_taken") && counts.exists("br_not_taken") &&
          counts.exists("jal") && counts.exists("jalr") && counts.exists("lui") &&
          counts.exists("auipc"), "every instruction class executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
