// tb_pc_unit: checks the PC reset value, sequential PC+4 stepping and that
// PCSel = 1 loads the ALU target on the next rising edge.
module tb_pc_unit;
  logic        clk = 0, rst = 1, sel = 0;
  logic [31:0] alu = 0, pc, pc4, exp_pc;
  pc_unit #(.XLEN(32), .RESET_PC(32'h0000_0200)) dut (.clk, .rst, .pc_sel(sel), .alu, .pc, .pc_plus4(pc4));
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk); @(negedge clk);
    check(pc == 32'h200, "reset value");
    rst = 0; exp_pc = 32'h200;
    for (int k = 0; k < 1000; k++) begin
      sel = 1'($urandom); alu = $urandom; #1;
      check(pc4 == exp_pc + 4, "pc+4");
      @(negedge clk);
      exp_pc = sel ? alu : exp_pc + 4;
      check(pc == exp_pc, $sformatf("pc %h exp %h", pc, exp_pc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
