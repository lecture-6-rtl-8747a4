// tb_alu: checks every ALUSel operation of the RV32I ALU on corner and
// random operands against expressions written directly from the ISA.
module tb_alu;
  import rv_pkg::*;
  logic [31:0] a, b, y;
  alu_sel_e    sel;
  alu dut (.a, .b, .alu_sel(sel), .y);
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
  function automatic logic [31:0] expect_y(logic [31:0] x, logic [31:0] z, alu_sel_e s);
    case (s)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SLL:  return x << z[4:0];
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  begin
        logic [63:0] e = {{32{x[31]}}, x};
        return 32'(e >> z[4:0]);
      end
      ALU_SLT:  return ((x[31] && !z[31]) || (x[31] == z[31] && x < z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_B:    return z;
      default:  return 0;
    endcase
  endfunction
  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'h1f};
    for (int s = 0; s <= 10; s++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          a = corner[i]; b = corner[j]; sel = alu_sel_e'(s); #1;
          check(y == expect_y(a, b, sel), $sformatf("op %0d a=%h b=%h y=%h", s, a, b, y));
        end
      for (int k = 0; k < 200; k++) begin
        a = $urandom; b = $urandom; sel = alu_sel_e'(s); #1;
        check(y == expect_y(a, b, sel), $sformatf("op %0d a=%h b=%h y=%h", s, a, b, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
