// rv_ref_pkg: instruction-level reference model of RV32I for the testbenches.
//
// rv_ref executes one instruction at a time on its own register and memory
// arrays, written straight from the ISA definition rather than from the
// RTL's datapath, and reports what the instruction commits: the register
// write, the memory write (byte lanes) and the next PC. Memory is
// DEPTH words, wrapping like the RTL's. jalr targets are not LSB-cleared,
// matching the datapath's PC = R[rs1] + imm.
package rv_ref_pkg;

  class rv_ref;
    int unsigned depth;
    logic [31:0] x [32];
    logic [31:0] mem [];
    logic [31:0] pc;
    // effects of the last step
    bit          wb_en;
    logic [4:0]  wb_rd;
    logic [31:0] wb_data;
    bit          st_en;
    logic [31:0] st_addr;
    logic [3:0]  st_be;
    logic [31:0] st_word;   // full memory word after the store
    bit          taken;
    string       kind;

    function new(int unsigned d);
      depth = d;
      mem = new[d];
      foreach (x[i]) x[i] = '0;
      foreach (mem[i]) mem[i] = '0;
      pc = '0;
    endfunction

    function automatic logic [31:0] rd_word(logic [31:0] a);
      return mem[(a >> 2) % depth];
    endfunction

    function automatic void step(logic [31:0] in);
      logic [6:0]  op  = in[6:0];
      logic [2:0]  f3  = in[14:12];
      logic [4:0]  rd  = in[11:7];
      logic [31:0] a   = x[in[19:15]];
      logic [31:0] b   = x[in[24:20]];
      logic [31:0] ii  = {{20{in[31]}}, in[31:20]};
      logic [31:0] si  = {{20{in[31]}}, in[31:25], in[11:7]};
      logic [31:0] bi  = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
      logic [31:0] ji  = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
      logic [31:0] ui  = {in[31:12], 12'h0};
      logic [31:0] res = '0, ea, w, nw;
      logic [31:0] npc = pc + 4;
      wb_en = 0; st_en = 0; taken = 0; st_be = '0; kind = "nop";
      case (op)
        7'b0110011, 7'b0010011: begin
          logic [31:0] bb = (op == 7'b0110011) ? b : ii;
          logic        alt = in[30] && (op == 7'b0110011 || f3 == 3'b101);
          case (f3)
            3'b000: res = alt ? a - bb : a + bb;
            3'b001: res = a << bb[4:0];
            3'b010: res = ($signed(a) < $signed(bb)) ? 1 : 0;
            3'b011: res = (a < bb) ? 1 : 0;
            3'b100: res = a ^ bb;
            3'b101: res = alt ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
            3'b110: res = a | bb;
            default: res = a & bb;
          endcase
          wb_en = 1; kind = (op == 7'b0110011) ? "rtype" : "itype";
        end
        7'b0000011: begin
          ea = a + ii;
          w  = rd_word(ea);
          case (f3)
            3'b000: begin logic [7:0] by = w >> (8*ea[1:0]); res = {{24{by[7]}}, by}; end
            3'b001: begin logic [15:0] h = w >> (16*ea[1]); res = {{16{h[15]}}, h}; end
            3'b100: begin logic [7:0] by = w >> (8*ea[1:0]); res = {24'h0, by}; end
            3'b101: begin logic [15:0] h = w >> (16*ea[1]); res = {16'h0, h}; end
            default: res = w;
          endcase
          wb_en = 1; kind = "load";
        end
        7'b0100011: begin
          ea = a + si;
          nw = rd_word(ea);
          case (f3)
            3'b000: begin st_be = 4'b1 << ea[1:0]; nw[8*ea[1:0] +: 8] = b[7:0]; end
            3'b001: begin st_be = ea[1] ? 4'b1100 : 4'b0011; nw[16*ea[1] +: 16] = b[15:0]; end
            default: begin st_be = 4'hf; nw = b; end
          endcase
          mem[(ea >> 2) % depth] = nw;
          st_en = 1; st_addr = ea; st_word = nw; kind = "store";
        end
        7'b1100011: begin
          case (f3)
            3'b000: taken = (a == b);
            3'b001: taken = (a != b);
            3'b100: taken = ($signed(a) < $signed(b));
            3'b101: taken = ($signed(a) >= $signed(b));
            3'b110: taken = (a < b);
            3'b111: taken = (a >= b);
            default: taken = 0;
          endcase
          if (taken) npc = pc + bi;
          kind = "branch";
        end
        7'b1101111: begin res = pc + 4; wb_en = 1; npc = pc + ji; taken = 1; kind = "jal"; end
        7'b1100111: begin res = pc + 4; wb_en = 1; npc = a + ii; taken = 1; kind = "jalr"; end
        7'b0110111: begin res = ui; wb_en = 1; kind = "lui"; end
        7'b0010111: begin res = pc + ui; wb_en = 1; kind = "auipc"; end
        default: ;
      endcase
      if (rd == 0) wb_en = 0;
      wb_rd = rd; wb_data = res;
      if (wb_en) x[rd] = res;
      pc = npc;
    endfunction
  endclass

endpackage
