// tb_ph_main_control: checks the six 1-bit controls and ALUOp for
// R-format, ld, sd and beq against the control table (don't-care entries
// skipped), and that other opcodes write nothing.
module tb_ph_main_control;
  logic [6:0] op;
  logic       alu_src, m2r, rw, mr, mw, br;
  logic [1:0] aluop;
  ph_main_control dut (.opcode(op), .alu_src, .mem_to_reg(m2r), .reg_write(rw), .mem_read(mr),
                       .mem_write(mw), .branch(br), .alu_op(aluop));
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
  task automatic row(input string nm, input logic [6:0] o, input bit s, input bit m2r_e, input bit m2r_care,
                     input bit rw_e, input bit mr_e, input bit mw_e, input bit br_e, input logic [1:0] op_e);
    op = o; #1;
    check(alu_src == s, {nm, " ALUSrc"});
    if (m2r_care) check(m2r == m2r_e, {nm, " MemtoReg"});
    check(rw == rw_e, {nm, " RegWrite"});
    check(mr == mr_e, {nm, " MemRead"});
    check(mw == mw_e, {nm, " MemWrite"});
    check(br == br_e, {nm, " Branch"});
    check(aluop == op_e, {nm, " ALUOp"});
  endtask
  initial begin
    row("R-format", 7'b0110011, 0, 0, 1, 1, 0, 0, 0, 2'b10);
    row("ld",       7'b0000011, 1, 1, 1, 1, 1, 0, 0, 2'b00);
    row("sd",       7'b0100011, 1, 0, 0, 0, 0, 1, 0, 2'b00);
    row("beq",      7'b1100011, 0, 0, 0, 0, 0, 0, 1, 2'b01);
    for (int o = 0; o < 128; o++) begin
      if (o == 7'b0110011 || o == 7'b0000011 || o == 7'b0100011 || o == 7'b1100011) continue;
      op = 7'(o); #1;
      check(!rw && !mw && !br, $sformatf("opcode %b is a no-op", o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
