// rv_prog_pkg: the RV32I test program shared by the processor testbenches.
//
// build() returns a program that first clears x1..x31, then exercises every
// RV32I instruction class the datapath supports: R- and I-format
// arithmetic, lui/auipc, sw/sh/sb, lw/lh/lhu/lb/lbu, all six branches both
// taken and not taken (a taken branch skips a "poison" instruction that
// would increment x31; a not-taken one runs an increment of x30), a
// counted loop, jal and jalr. It then appends n_random random arithmetic
// instructions writing x12..x19 and ends in "jal x0, 0", a jump to itself.
// Expected results of the directed part (independent of any model):
//   x20 = 0x12345678  x21 = 0xfffffffd  x22 = 0x0000fffd  x23 = 0xfffffffd
//   x24 = 0x000000fd  x25 = 0x00000005  x26 = 0x000005fd  x27 = 0x05fdfffd
//   x28 = 12 (loop ran 4 times)  x30 = 6  x31 = 0
package rv_prog_pkg;
  import rv_asm_pkg::*;

  localparam logic [31:0] POISON = 32'h001f8f93;  // addi x31, x31, 1
  localparam logic [31:0] HALT   = 32'h0000006f;  // jal x0, 0

  function automatic void build(ref logic [31:0] p[$], input int n_random);
    logic [31:0] inc30 = ADDI(30, 30, 1);
    p.delete();
    for (int r = 1; r < 32; r++) p.push_back(ADDI(r, 0, 0));
    p.push_back(ADDI(1, 0, 5));
    p.push_back(ADDI(2, 0, -3));
    p.push_back(ADD(3, 1, 2));
    p.push_back(SUB(4, 1, 2));
    // R-format: and or xor sll srl sra slt sltu
    p.push_back(enc_r(7'h00, 2, 1, 3'b111, 11, 7'b0110011));
    p.push_back(enc_r(7'h00, 2, 1, 3'b110, 12, 7'b0110011));
    p.push_back(enc_r(7'h00, 2, 1, 3'b100, 13, 7'b0110011));
    p.push_back(enc_r(7'h00, 1, 2, 3'b001, 14, 7'b0110011));
    p.push_back(enc_r(7'h00, 1, 2, 3'b101, 15, 7'b0110011));
    p.push_back(enc_r(7'h20, 1, 2, 3'b101, 16, 7'b0110011));
    p.push_back(enc_r(7'h00, 1, 2, 3'b010, 17, 7'b0110011));
    p.push_back(enc_r(7'h00, 1, 2, 3'b011, 18, 7'b0110011));
    // I-format: andi ori xori slti sltiu slli srli srai
    p.push_back(enc_i(12'h0f0, 2, 3'b111, 11, 7'b0010011));
    p.push_back(enc_i(-2048, 1, 3'b110, 12, 7'b0010011));
    p.push_back(enc_i(2047, 2, 3'b100, 13, 7'b0010011));
    p.push_back(enc_i(-1, 2, 3'b010, 14, 7'b0010011));
    p.push_back(enc_i(-1, 1, 3'b011, 15, 7'b0010011));
    p.push_back(enc_i(31, 1, 3'b001, 16, 7'b0010011));
    p.push_back(enc_i(4, 2, 3'b101, 17, 7'b0010011));
    p.push_back(enc_i(12'h404, 2, 3'b101, 18, 7'b0010011));
    // Upper immediates.
    p.push_back(LUI(5, 20'h12345));
    p.push_back(ADDI(5, 5, 12'h678));
    p.push_back(AUIPC(6, 1));
    // Stores and loads.
    p.push_back(ADDI(7, 0, 12'h100));
    p.push_back(STORE(3'b010, 5, 7, 0));
    p.push_back(STORE(3'b001, 2, 7, 4));
    p.push_back(STORE(3'b000, 1, 7, 7));
    p.push_back(STORE(3'b000, 2, 7, 6));
    p.push_back(LOAD(3'b010, 20, 7, 0));
    p.push_back(LOAD(3'b001, 21, 7, 4));
    p.push_back(LOAD(3'b101, 22, 7, 4));
    p.push_back(LOAD(3'b000, 23, 7, 6));
    p.push_back(LOAD(3'b100, 24, 7, 6));
    p.push_back(LOAD(3'b000, 25, 7, 7));
    p.push_back(LOAD(3'b001, 26, 7, 6));
    p.push_back(LOAD(3'b010, 27, 7, 4));
    // Branches: x1 = 5, x2 = -3.
    p.push_back(BR(3'b000, 1, 1, 8)); p.push_back(POISON);   // beq taken
    p.push_back(BR(3'b000, 1, 2, 8)); p.push_back(inc30);    // beq not taken
    p.push_back(BR(3'b001, 1, 2, 8)); p.push_back(POISON);   // bne taken
    p.push_back(BR(3'b001, 1, 1, 8)); p.push_back(inc30);
    p.push_back(BR(3'b100, 2, 1, 8)); p.push_back(POISON);   // blt taken
    p.push_back(BR(3'b100, 1, 2, 8)); p.push_back(inc30);
    p.push_back(BR(3'b101, 1, 2, 8)); p.push_back(POISON);   // bge taken
    p.push_back(BR(3'b101, 2, 1, 8)); p.push_back(inc30);
    p.push_back(BR(3'b110, 1, 2, 8)); p.push_back(POISON);   // bltu taken
    p.push_back(BR(3'b110, 2, 1, 8)); p.push_back(inc30);
    p.push_back(BR(3'b111, 2, 1, 8)); p.push_back(POISON);   // bgeu taken
    p.push_back(BR(3'b111, 1, 2, 8)); p.push_back(inc30);
    // Counted loop: x28 += 3, four times (backward branch).
    p.push_back(ADDI(8, 0, 4));
    p.push_back(ADDI(28, 28, 3));
    p.push_back(ADDI(8, 8, -1));
    p.push_back(BR(3'b001, 8, 0, -8));
    // jal over a poison word, then jalr past another one.
    p.push_back(JAL(10, 8));
    p.push_back(POISON);
    p.push_back(JALR(11, 10, 12));
    p.push_back(POISON);
    // Random arithmetic.
    for (int k = 0; k < n_random; k++) begin
      int rd  = 12 + $urandom_range(7);
      int rs1 = $urandom_range(31);
      int rs2 = $urandom_range(31);
      logic [2:0] f3 = 3'($urandom_range(7));
      if ($urandom_range(1)) begin
        logic [6:0] f7 = ((f3 == 3'b000 || f3 == 3'b101) && $urandom_range(1)) ? 7'h20 : 7'h00;
        p.push_back(enc_r(f7, rs2, rs1, f3, rd, 7'b0110011));
      end else begin
        int imm = int'($urandom_range(4095)) - 2048;
        if (f3 == 3'b001) imm = imm & 31;
        if (f3 == 3'b101) imm = (imm & 31) | ($urandom_range(1) ? 12'h400 : 0);
        p.push_back(enc_i(imm, rs1, f3, rd, 7'b0010011));
      end
    end
    p.push_back(HALT);
  endfunction

endpackage
