// tb_regfile: writes random values to random registers and reads them back
// on both ports against a shadow array; checks that x0 stays zero, that
// RegWEn = 0 blocks the write and that the write lands on the rising edge.
module tb_regfile;
  logic        clk = 0, we;
  logic [4:0]  rw, r1, r2;
  logic [31:0] dw, d1, d2;
  logic [31:0] shadow [32];
  regfile #(.XLEN(32)) dut (.clk, .reg_wen(we), .rs_w(rw), .data_w(dw), .rs_r1(r1), .rs_r2(r2),
                            .data_r1(d1), .data_r2(d2));
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
    // Initialise every register.
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; rw = 5'(i); dw = $urandom; shadow[i] = (i == 0) ? 0 : dw;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); dw = $urandom;
      r1 = rw; r2 = 5'($urandom); #1;
      // Before the edge the old value is still read.
      check(d1 == shadow[r1], $sformatf("pre-edge x%0d", r1));
      check(d2 == shadow[r2], $sformatf("x%0d=%h exp %h", r2, d2, shadow[r2]));
      @(posedge clk); #1;
      if (we && rw != 0) shadow[rw] = dw;
      check(d1 == shadow[r1], $sformatf("post-edge x%0d=%h exp %h", r1, d1, shadow[r1]));
    end
    r1 = 0; r2 = 0; #1;
    check(d1 == 0 && d2 == 0, "x0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
