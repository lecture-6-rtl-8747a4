// imem: instruction memory (IMEM).
//
// A word-organised memory of DEPTH 32-bit instructions, read
// combinationally: inst = mem[addr[..:2]] in the same cycle, which is what a
// single-cycle datapath needs. The lecture shows IMEM only as a block with
// an address input and an instruction output; its size, the load port and
// the asynchronous read are this design's choices. The load port
// (load_en/load_addr/load_data) writes one word per rising clock edge and is
// used to place a program before the processor runs. Address bits [1:0] are
// ignored (instructions are word aligned); addresses beyond DEPTH wrap.
module imem #(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              inst,
  input  logic                     load_en,
  input  logic [$clog2(DEPTH)-1:0] load_addr,  // word index
  input  logic [31:0]              load_data
);

  localparam int AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
