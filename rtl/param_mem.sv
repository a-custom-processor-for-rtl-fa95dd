// param_mem: one parameter memory of the parser.
//
// Holds programmer-loaded parameters: comparand sets and their subroutine
// addresses for the next header resolve unit and the branch catalyst,
// reference values for the branch condition evaluator, and target values of
// the header and payload counters. One synchronous write port (configuration
// side) and one synchronous read port with read enable: data for the address
// presented in cycle t is on rdata in cycle t+1 and holds while re is low.
// The array is not reset (it models an SRAM): every entry a program uses
// must be written first. The read register is reset to zero.
module param_mem #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
