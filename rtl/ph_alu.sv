// ph_alu: ALU with operand inversion, controlled by a 4-bit operation.
//
// The upper two control bits enable inversion of the inputs: bit 3 is
// "A invert", bit 2 is "B invert" (B negate: inverting B also sets the
// adder's carry-in, so add becomes subtract). The lower two bits drive the
// output mux: 00 and, 01 or, 10 add, 11 set on less than. This gives the
// lecture's operations and, or, add, subtract (0110), slt (0111) and
// nor (1100 = ~A & ~B). Set on less than returns 1 when the subtraction's
// sign, corrected for overflow, is negative (signed compare; the overflow
// correction is this design's choice). zero = 1 when the result is 0; beq
// uses it. Combinational.
module ph_alu #(
  parameter int XLEN = 64
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [3:0]      alu_ctrl,
  output logic [XLEN-1:0] result,
  output logic            zero
);

  logic [XLEN-1:0] aa, bb, sum;
  logic            ovf, less;

  assign aa   = alu_ctrl[3] ? ~a : a;
  assign bb   = alu_ctrl[2] ? ~b : b;
  assign sum  = aa + bb + XLEN'(alu_ctrl[2]);
  assign ovf  = (aa[XLEN-1] == bb[XLEN-1]) && (sum[XLEN-1] != aa[XLEN-1]);
  assign less = sum[XLEN-1] ^ ovf;

  always_comb begin
    unique case (alu_ctrl[1:0])
      2'b00:   result = aa & bb;
      2'b01:   result = aa | bb;
      2'b10:   result = sum;
      default: result = {{(XLEN-1){1'b0}}, less};
    endcase
  end

  assign zero = (result == '0);

endmodule
