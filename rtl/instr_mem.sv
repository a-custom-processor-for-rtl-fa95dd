// instr_mem: instruction memory of the parser (the parse program).
//
// 96-bit wide VLIW words, read synchronously in the fetch (FI) stage: the
// address presented with re high in cycle t gives the instruction in cycle
// t+1, where the FH stage uses it; with re low the output holds, which is how
// the FH stage stalls. Written word by word through the configuration port.
// The memory is not reset (it models an SRAM); the program must be loaded
// before the parser is released. Depth is this design's choice (256).
module instr_mem
  import parser_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata
);
  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
