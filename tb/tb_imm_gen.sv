// tb_imm_gen: encodes random immediates into I, S, B, J and U instruction
// words with the assembler of rv_asm_pkg and checks that the generator
// returns the same sign-extended value, at XLEN = 32 and XLEN = 64.
module tb_imm_gen;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] inst;
  imm_sel_e    sel;
  logic [31:0] imm32;
  logic [63:0] imm64;
  imm_gen #(.XLEN(32)) dut32 (.inst(inst[31:7]), .imm_sel(sel), .imm(imm32));
  imm_gen #(.XLEN(64)) dut64 (.inst(inst[31:7]), .imm_sel(sel), .imm(imm64));
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
  task automatic one(input imm_sel_e s, input logic [31:0] w, input longint exp_v);
    inst = w; sel = s; #1;
    check(imm32 == 32'(exp_v), $sformatf("sel %0d inst %h imm %h exp %h", s, w, imm32, 32'(exp_v)));
    check(imm64 == 64'(exp_v), $sformatf("sel %0d inst %h imm64 %h", s, w, imm64));
  endtask
  initial begin
    for (int k = 0; k < 500; k++) begin
      int v;
      v = int'($urandom_range(4095)) - 2048;
      one(IMM_I, enc_i(v, $urandom_range(31), 3'($urandom), $urandom_range(31), 7'h13), longint'(v));
      v = int'($urandom_range(4095)) - 2048;
      one(IMM_S, enc_s(v, $urandom_range(31), $urandom_range(31), 3'($urandom), 7'h23), longint'(v));
      v = (int'($urandom_range(4095)) - 2048) * 2;
      one(IMM_B, enc_b(v, $urandom_range(31), $urandom_range(31), 3'($urandom)), longint'(v));
      v = (int'($urandom_range(1048575)) - 524288) * 2;
      one(IMM_J, enc_j(v, $urandom_range(31)), longint'(v));
      v = int'($urandom_range(1048575));
      one(IMM_U, enc_u(v, $urandom_range(31), 7'h37), longint'(int'(v << 12)));
    end
    // Extremes.
    one(IMM_B, enc_b(-4096, 1, 2, 3'b000), -4096);
    one(IMM_B, enc_b(4094, 1, 2, 3'b000), 4094);
    one(IMM_J, enc_j(-1048576, 1), -1048576);
    one(IMM_J, enc_j(1048574, 1), 1048574);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
