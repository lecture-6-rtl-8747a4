// tb_ph_alu_control: checks the 4-bit ALU operation for ALUOp 00 (add),
// 01 (subtract) and 10 with the R-format funct fields of add, sub, and, or
// and slt; codes 0010, 0110, 0000, 0001, 0111.
module tb_ph_alu_control;
  logic [1:0] aluop;
  logic       f7;
  logic [2:0] f3;
  logic [3:0] y;
  ph_alu_control dut (.alu_op(aluop), .funct7_b5(f7), .funct3(f3), .alu_ctrl(y));
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
  task automatic one(input logic [1:0] o, input bit s7, input logic [2:0] s3, input logic [3:0] e, input string nm);
    aluop = o; f7 = s7; f3 = s3; #1;
    check(y == e, $sformatf("%s: %b exp %b", nm, y, e));
  endtask
  initial begin
    for (int k = 0; k < 16; k++) begin
      one(2'b00, k[3], k[2:0], 4'b0010, "ld/sd add");
      one(2'b01, k[3], k[2:0], 4'b0110, "beq subtract");
    end
    one(2'b10, 0, 3'b000, 4'b0010, "add");
    one(2'b10, 1, 3'b000, 4'b0110, "sub");
    one(2'b10, 0, 3'b111, 4'b0000, "and");
    one(2'b10, 0, 3'b110, 4'b0001, "or");
    one(2'b10, 0, 3'b010, 4'b0111, "slt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
