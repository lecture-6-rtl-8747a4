// dmem: data memory (DMEM).
//
// DEPTH words of XLEN bits. Reads are combinational: dataR = mem[addr] in
// the same cycle (the single-cycle datapath reads and writes back within one
// clock). Writes take place on the rising clock edge when MemRW = write
// (we = 1), one byte lane per bit of the byte-enable mask be, so narrow
// stores change only their bytes. Addresses are byte addresses; the low
// log2(XLEN/8) bits select the lane and are otherwise ignored, and
// addresses beyond DEPTH wrap. The lecture gives DMEM's ports (addr, dataW,
// dataR, clk) and the read/write control; size, byte lanes and asynchronous
// read are this design's choices. Memory contents are not reset.
module dmem #(
  parameter int XLEN  = 32,
  parameter int DEPTH = 1024
) (
  input  logic              clk,
  input  logic [XLEN-1:0]   addr,
  input  logic              we,        // MemRW: 1 = write
  input  logic [XLEN/8-1:0] be,        // byte lanes to write
  input  logic [XLEN-1:0]   data_w,
  output logic [XLEN-1:0]   data_r
);

  localparam int AW = $clog2(DEPTH);
  localparam int OW = $clog2(XLEN / 8);

  logic [XLEN-1:0] mem [DEPTH];
  logic [AW-1:0]   widx;

  assign widx   = addr[OW+AW-1:OW];
  assign data_r = mem[widx];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < XLEN / 8; i++) begin
        if (be[i]) mem[widx][8*i +: 8] <= data_w[8*i +: 8];
      end
    end
  end

endmodule
