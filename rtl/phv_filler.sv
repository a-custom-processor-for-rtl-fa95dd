// phv_filler: splits the header segment into PHV container writes.
//
// The PHV has seven banks that can be written in the same cycle: four of
// 8-bit entries, two of 16-bit entries and one of 32-bit entries. The filler
// breaks the incoming 1, 2 or 4-byte segment into 8/16/32-bit units whose
// sizes add up to the segment size and drives one bank write port per unit,
// at most four at once. Addresses come from the four PHV address fields of
// the instruction: address 0 feeds 8-bit bank 0, address 1 8-bit bank 1,
// address 2 8-bit bank 2, 16-bit bank 0 and the 32-bit bank, address 3 8-bit
// bank 3 and 16-bit bank 1. The filler itself knows no protocol.
//
// The 16 mode codes are this design's own table (parser_pkg::phv_mode_t):
// nine splits are defined, code 0 and codes 10..15 write nothing.
// Bank ports: index 0..3 8-bit banks, 4..5 16-bit banks, 6 the 32-bit bank.
// Combinational; the caller registers the result for the WB stage.
module phv_filler
  import parser_pkg::*;
(
  input  phv_mode_t   mode,
  input  logic [31:0] seg,
  input  logic [3:0]  a0,
  input  logic [3:0]  a1,
  input  logic [5:0]  a2,
  input  logic [5:0]  a3,
  output phv_wr_vec_t wr
);
  logic [7:0] b [4];
  always_comb begin
    for (int i = 0; i < 4; i++) b[i] = seg[31-8*i -: 8];
  end

  // one port write helper
  function automatic phv_wr_t w(logic [5:0] addr, logic [31:0] data);
    phv_wr_t r;
    r.we = 1'b1; r.addr = addr; r.data = data;
    return r;
  endfunction

  always_comb begin
    wr = '0;
    unique case (mode)
      PF_B:    wr[0] = w({2'b0, a0}, {24'b0, b[0]});
      PF_H:    wr[4] = w(a2, {16'b0, b[0], b[1]});
      PF_BB: begin
        wr[0] = w({2'b0, a0}, {24'b0, b[0]});
        wr[1] = w({2'b0, a1}, {24'b0, b[1]});
      end
      PF_W:    wr[6] = w(a2, seg);
      PF_HH: begin
        wr[4] = w(a2, {16'b0, b[0], b[1]});
        wr[5] = w(a3, {16'b0, b[2], b[3]});
      end
      PF_HBB: begin
        wr[4] = w(a2, {16'b0, b[0], b[1]});
        wr[0] = w({2'b0, a0}, {24'b0, b[2]});
        wr[1] = w({2'b0, a1}, {24'b0, b[3]});
      end
      PF_BHB: begin
        wr[0] = w({2'b0, a0}, {24'b0, b[0]});
        wr[4] = w(a2, {16'b0, b[1], b[2]});
        wr[1] = w({2'b0, a1}, {24'b0, b[3]});
      end
      PF_BBH: begin
        wr[0] = w({2'b0, a0}, {24'b0, b[0]});
        wr[1] = w({2'b0, a1}, {24'b0, b[1]});
        wr[5] = w(a3, {16'b0, b[2], b[3]});
      end
      PF_BBBB: begin
        wr[0] = w({2'b0, a0}, {24'b0, b[0]});
        wr[1] = w({2'b0, a1}, {24'b0, b[1]});
        wr[2] = w(a2, {24'b0, b[2]});
        wr[3] = w(a3, {24'b0, b[3]});
      end
      default: wr = '0;
    endcase
  end
endmodule
