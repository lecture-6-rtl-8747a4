// store_align: byte-lane placement for sb, sh and sw.
//
// Moves the low byte (sb), halfword (sh) or the whole word (sw) of R[rs2]
// to the byte lanes that the address selects and produces the matching
// byte-enable mask for the data memory. The lecture only walks through sw;
// supporting sb and sh this way is this design's choice, mirroring the
// narrow-load logic. Aligned accesses only. Combinational.
module store_align (
  input  logic [31:0] data,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,     // 000 sb, 001 sh, 010 sw
  output logic [31:0] data_w,
  output logic [3:0]  be
);

  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        data_w = {4{data[7:0]}};
        be     = 4'b0001 << addr_lo;
      end
      2'b01: begin
        data_w = {2{data[15:0]}};
        be     = addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        data_w = data;
        be     = 4'b1111;
      end
    endcase
  end

endmodule
