// tb_load_extend: checks lb, lh, lw, lbu and lhu extraction and extension
// for every aligned offset on random words.
module tb_load_extend;
  logic [31:0] word, data;
  logic [1:0]  lo;
  logic [2:0]  f3;
  load_extend dut (.word, .addr_lo(lo), .funct3(f3), .data);
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
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] e;
      logic [7:0]  bv;
      logic [15:0] hv;
      word = $urandom;
      case ($urandom_range(4))
        0: f3 = 3'b000; 1: f3 = 3'b001; 2: f3 = 3'b010; 3: f3 = 3'b100; default: f3 = 3'b101;
      endcase
      lo = (f3[1:0] == 2'b01) ? {1'($urandom), 1'b0} : (f3 == 3'b010) ? 2'b00 : 2'($urandom);
      #1;
      case (lo) 0: bv = word[7:0]; 1: bv = word[15:8]; 2: bv = word[23:16]; default: bv = word[31:24]; endcase
      hv = lo[1] ? word[31:16] : word[15:0];
      case (f3)
        3'b000: e = bv[7] ? {24'hffffff, bv} : {24'h0, bv};
        3'b001: e = hv[15] ? {16'hffff, hv} : {16'h0, hv};
        3'b100: e = {24'h0, bv};
        3'b101: e = {16'h0, hv};
        default: e = word;
      endcase
      check(data == e, $sformatf("f3=%b lo=%0d word=%h data=%h exp=%h", f3, lo, word, data, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
