// tb_branch_comp: checks BrEq and BrLT, signed and unsigned, on corner and
// random operand pairs, at XLEN = 32.
module tb_branch_comp;
  logic [31:0] a, b;
  logic        un, eq, lt;
  branch_comp #(.XLEN(32)) dut (.a, .b, .br_un(un), .br_eq(eq), .br_lt(lt));
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
  task automatic one(input logic [31:0] x, input logic [31:0] y, input bit u);
    bit exp_lt;
    a = x; b = y; un = u; #1;
    // Signed compare by flipping the sign bits and comparing unsigned.
    exp_lt = u ? (x < y) : ((x ^ 32'h8000_0000) < (y ^ 32'h8000_0000));
    check(eq == (x == y), $sformatf("eq %h %h", x, y));
    check(lt == exp_lt, $sformatf("lt %h %h un=%0d", x, y, u));
  endtask
  initial begin
    logic [31:0] c [5] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff};
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) for (int u = 0; u < 2; u++)
      one(c[i], c[j], u[0]);
    for (int k = 0; k < 1000; k++) begin
      logic [31:0] x = $urandom;
      one(x, ($urandom_range(3) == 0) ? x : $urandom, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
