// tb_imem: fills the instruction memory through its load port and reads
// every word back by byte address (low two bits ignored).
module tb_imem;
  localparam int D = 256;
  logic        clk = 0, le = 0;
  logic [7:0]  la = 0;
  logic [31:0] ld = 0, addr = 0, inst;
  logic [31:0] shadow [D];
  imem #(.DEPTH(D)) dut (.clk, .addr, .inst, .load_en(le), .load_addr(la), .load_data(ld));
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
      @(negedge clk); le = 1; la = 8'(i); ld = $urandom; shadow[i] = ld;
    end
    @(negedge clk); le = 0;
    for (int k = 0; k < 2000; k++) begin
      int w = $urandom_range(D - 1);
      addr = {22'h0, 8'(w), 2'($urandom)}; #1;
      check(inst == shadow[w], $sformatf("word %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
