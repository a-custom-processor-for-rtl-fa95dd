// apc_stack: return-address stack of the Advanced Program Control unit.
//
// A parse program pushes the address of the current instruction, or of the
// one after it, when it starts a sub-header (for example one type-length-value
// option); when the payload counter holding the sub-header's size expires the
// top address is popped into the program counter, so the option dispatcher
// runs again for the next sub-header. Push and pop in one cycle replace the
// top. A push on a full stack is dropped and raises `overflow` for one cycle;
// `clear` empties it (end of header, new packet). Depth is this design's
// choice. Pop data (`top`) is valid whenever `empty` is low.
module apc_stack
  import parser_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   push,
  input  iaddr_t push_addr,
  input  logic   pop,
  output iaddr_t top,
  output logic   empty,
  output logic   overflow
);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  iaddr_t        mem [DEPTH];
  logic [PW-1:0] cnt;
  logic [IW-1:0] top_i, free_i;

  assign top_i  = IW'(cnt - 1'b1);
  assign free_i = IW'(cnt);

  assign empty = (cnt == '0);
  assign top   = empty ? '0 : mem[top_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      overflow <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (push && pop && !empty) begin
        mem[top_i] <= push_addr;
      end else if (pop && !empty) begin
        cnt <= cnt - 1'b1;
      end else if (push) begin
        if (cnt == PW'(DEPTH)) overflow <= 1'b1;
        else begin
          mem[free_i] <= push_addr;
          cnt      <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
