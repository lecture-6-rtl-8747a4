// load_extend: narrow-load extraction for lb, lh, lw, lbu, lhu.
//
// The data memory always returns the whole 32-bit word that holds the
// address. This block picks the addressed byte (addr[1:0]) or halfword
// (addr[1]) out of that word and sign-extends (lb, lh) or zero-extends
// (lbu, lhu) it to 32 bits; lw passes the word unchanged. This is the
// "additional logic" the lecture adds for narrow loads. funct3 values are
// the RV32I ones. Misaligned halfwords and words are not supported: the
// low address bits that a naturally aligned access leaves zero are ignored.
// Combinational.
module load_extend
  import rv_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] data
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;

  assign byte_v = word[8*addr_lo +: 8];
  assign half_v = addr_lo[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (funct3)
      F3_LB:   data = {{24{byte_v[7]}}, byte_v};
      F3_LH:   data = {{16{half_v[15]}}, half_v};
      F3_LBU:  data = {24'b0, byte_v};
      F3_LHU:  data = {16'b0, half_v};
      default: data = word;   // lw
    endcase
  end

endmodule
