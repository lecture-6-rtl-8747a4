// tb_dmem: random word and byte-lane writes and combinational reads of the
// data memory against a shadow array; a write with we = 0 must not land.
module tb_dmem;
  localparam int D = 256;
  logic        clk = 0, we = 0;
  logic [3:0]  be;
  logic [31:0] addr, dw, dr;
  logic [31:0] shadow [D];
  dmem #(.XLEN(32), .DEPTH(D)) dut (.clk, .addr, .we, .be, .data_w(dw), .data_r(dr));
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
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; be = 4'hf; addr = 32'(i * 4); dw = $urandom; shadow[i] = dw;
    end
    for (int k = 0; k < 3000; k++) begin
      int w = $urandom_range(D - 1);
      @(negedge clk);
      we = 1'($urandom); be = 4'($urandom); dw = $urandom; addr = {22'h0, 8'(w), 2'($urandom)};
      #1;
      check(dr == shadow[w], $sformatf("read word %0d", w));
      @(posedge clk); #1;
      if (we) for (int b = 0; b < 4; b++) if (be[b]) shadow[w][8*b +: 8] = dw[8*b +: 8];
      check(dr == shadow[w], $sformatf("after write word %0d: %h exp %h", w, dr, shadow[w]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
