// branch_comp: branch comparator (Branch Comp.).
//
// A combinational block comparing the two register-file outputs A = R[rs1]
// and B = R[rs2]. BrEq = 1 when A == B; BrLT = 1 when A < B, compared as
// unsigned numbers when the control bit BrUn ("Branch Unsigned") is 1 and as
// two's-complement signed numbers otherwise. The control logic turns the two
// flags into PCSel. Interface and function follow the lecture.
module branch_comp #(
  parameter int XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            br_un,
  output logic            br_eq,
  output logic            br_lt
);

  assign br_eq = (a == b);
  assign br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));

endmodule
