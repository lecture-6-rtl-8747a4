// tb_ph_alu: checks and, or, add, subtract, set on less than and nor with
// their 4-bit codes on corner and random 64-bit operands, and the Zero
// output.
module tb_ph_alu;
  logic [63:0] a, b, y;
  logic [3:0]  op;
  logic        zero;
  ph_alu #(.XLEN(64)) dut (.a, .b, .alu_ctrl(op), .result(y), .zero);
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
  function automatic logic [63:0] expect_y(logic [63:0] x, logic [63:0] z, logic [3:0] o);
    case (o)
      4'b0000: return x & z;
      4'b0001: return x | z;
      4'b0010: return x + z;
      4'b0110: return x - z;
      4'b0111: return ($signed(x) < $signed(z)) ? 64'd1 : 64'd0;
      4'b1100: return ~(x | z);
      default: return 'x;
    endcase
  endfunction
  initial begin
    logic [3:0]  ops [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0110, 4'b0111, 4'b1100};
    logic [63:0] c [5] = '{64'h0, 64'h1, 64'h7fffffffffffffff, 64'h8000000000000000, '1};
    foreach (ops[i]) begin
      foreach (c[m]) foreach (c[n]) begin
        a = c[m]; b = c[n]; op = ops[i]; #1;
        check(y == expect_y(a, b, op), $sformatf("op %b a=%h b=%h y=%h", op, a, b, y));
        check(zero == (expect_y(a, b, op) == 0), "zero");
      end
      for (int k = 0; k < 300; k++) begin
        a = {$urandom, $urandom}; b = ($urandom_range(4) == 0) ? a : {$urandom, $urandom}; op = ops[i]; #1;
        check(y == expect_y(a, b, op), $sformatf("op %b a=%h b=%h y=%h", op, a, b, y));
        check(zero == (expect_y(a, b, op) == 0), "zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
