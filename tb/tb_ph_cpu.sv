// tb_ph_cpu: runs the ph_prog_pkg program on the six-signal 64-bit
// datapath and checks the register and memory writes it commits, the
// number of clock cycles to the halt loop (one per instruction), and that
// R-format, ld, sd, beq taken and beq not taken all occurred.
module tb_ph_cpu;
  import ph_prog_pkg::*;

  logic        clk = 0, rst = 1;
  logic        il_en = 0, dl_en = 0;
  logic [9:0]  il_addr = '0, dl_addr = '0;
  logic [31:0] il_data = '0, inst;
  logic [63:0] dl_data = '0, pc, wb_data, st_addr, st_data;
  logic        wb_en, st_en, pc_src;
  logic [4:0]  wb_rd;

  ph_cpu dut (
    .clk, .rst,
    .imem_load_en(il_en), .imem_load_addr(il_addr), .imem_load_data(il_data),
    .dmem_load_en(dl_en), .dmem_load_addr(dl_addr), .dmem_load_data(dl_data),
    .pc, .inst, .wb_en, .wb_rd, .wb_data, .st_en, .st_addr, .st_data, .pc_src
  );

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
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog[$];
  logic [63:0] data[$];
  logic [63:0] shadow [32];
  logic [63:0] stored [int];
  int n_r = 0, n_ld = 0, n_sd = 0, n_bt = 0, n_bn = 0, cycles = 0;

  initial begin
    build(prog, data);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      il_en = 1; il_addr = 10'(i); il_data = (i < prog.size()) ? prog[i] : HALT;
      dl_en = 1; dl_addr = 10'(i); dl_data = (i < data.size()) ? data[i] : '0;
    end
    @(negedge clk); il_en = 0; dl_en = 0;
    @(negedge clk); rst = 0; #1;
    while (inst != HALT && cycles < 1000) begin
      case (inst[6:0])
        7'b0110011: n_r++;
        7'b0000011: n_ld++;
        7'b0100011: n_sd++;
        7'b1100011: if (pc_src) n_bt++; else n_bn++;
        default: ;
      endcase
      if (wb_en) shadow[wb_rd] = wb_data;
      if (st_en) stored[int'(st_addr)] = st_data;
      @(negedge clk); #1;
      cycles++;
    end
    check(cycles == HALT_CYCLES, $sformatf("cycles to halt %0d exp %0d", cycles, HALT_CYCLES));
    check(shadow[3] == 64'd55, "sum loop");
    check(shadow[6] == (-64'sd5 & K0F), "and");
    check(shadow[7] == (-64'sd5 | K0F), "or");
    check(shadow[8] == 64'd1, "slt true");
    check(shadow[9] == 64'd0, "slt false");
    check(shadow[10] == 64'd55, "ld after sd");
    check(stored.exists(40) && stored[40] == 64'd55, "sd sum");
    check(stored.exists(48) && stored[48] == (-64'sd5 & K0F), "sd and");
    check(n_r == 24, $sformatf("R-format count %0d", n_r));
    check(n_ld == 6 && n_sd == 2, "ld/sd counts");
    check(n_bt == 11 && n_bn == 10, $sformatf("beq taken %0d not taken %0d", n_bt, n_bn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
