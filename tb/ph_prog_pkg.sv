// ph_prog_pkg: test program for the six-signal 64-bit datapath.
//
// The datapath runs only R-format, ld, sd and beq, so the program takes its
// constants from data memory (words 0..4 = 10, 1, 0, -5, 0x0f0f...0f), sums
// 10 + 9 + ... + 1 into x3 in a loop closed by "beq x0, x0" (always taken)
// and left by "beq x1, x0" (taken once, not taken ten times), then runs
// and, or and slt, stores the sum and the and-result with sd, reads the sum
// back with ld and halts in "beq x0, x0, 0". Expected results:
//   x3 = 55, x6 = -5 & 0x0f0f0f0f0f0f0f0f, x7 = -5 | 0x0f0f0f0f0f0f0f0f,
//   x8 = 1 (-5 < 1), x9 = 0, x10 = 55; memory bytes 40 and 48 hold x3, x6.
// HALT_CYCLES = 53 instructions run before the halt word, one per clock.
package ph_prog_pkg;
  import rv_asm_pkg::*;

  localparam logic [31:0] HALT = 32'h00000063;   // beq x0, x0, 0
  localparam int          HALT_CYCLES = 53;
  localparam logic [63:0] K0F = 64'h0f0f0f0f0f0f0f0f;

  function automatic void build(ref logic [31:0] p[$], ref logic [63:0] d[$]);
    p.delete(); d.delete();
    d.push_back(64'd10); d.push_back(64'd1); d.push_back(64'd0);
    d.push_back(-64'sd5); d.push_back(K0F);
    p.push_back(LOAD(3'b011, 1, 0, 0));
    p.push_back(LOAD(3'b011, 2, 0, 8));
    p.push_back(LOAD(3'b011, 3, 0, 16));
    p.push_back(LOAD(3'b011, 4, 0, 24));
    p.push_back(LOAD(3'b011, 5, 0, 32));
    p.push_back(BR(3'b000, 1, 0, 16));        // 20: exit when x1 == 0
    p.push_back(ADD(3, 3, 1));                // 24
    p.push_back(SUB(1, 1, 2));                // 28
    p.push_back(BR(3'b000, 0, 0, -12));       // 32: back to 20
    p.push_back(enc_r(7'h00, 5, 4, 3'b111, 6, 7'b0110011));  // and x6, x4, x5
    p.push_back(enc_r(7'h00, 5, 4, 3'b110, 7, 7'b0110011));  // or  x7, x4, x5
    p.push_back(enc_r(7'h00, 2, 4, 3'b010, 8, 7'b0110011));  // slt x8, x4, x2
    p.push_back(enc_r(7'h00, 4, 2, 3'b010, 9, 7'b0110011));  // slt x9, x2, x4
    p.push_back(STORE(3'b011, 3, 0, 40));
    p.push_back(STORE(3'b011, 6, 0, 48));
    p.push_back(LOAD(3'b011, 10, 0, 40));
    p.push_back(HALT);
  endfunction

endpackage
