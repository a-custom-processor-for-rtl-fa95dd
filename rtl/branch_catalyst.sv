// branch_catalyst: the Branch Catalyst (BC) of the APC.
//
// Resolves multi-way branches on flag bits (e.g. the C/K/S flags of GRE or
// the flags of L2TP) in one step. Started in the EX stage of an instruction
// with a non-zero branch-catalyst extraction mode, it takes the extracted
// flags as key and reads one word of eight comparands and one word of eight
// instruction addresses at Address_1; in the next cycle all eight are
// compared at once and the first valid match gives the target. Unlike the
// NHRU only one word is ever read. Without a match `matched` is low and the
// APC falls through to the next instruction (this design's choice).
// Status and timing as in the NHRU: start at t, ready from t+2 until consumed.
module branch_catalyst
  import parser_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               consume,
  input  logic               start,
  input  logic [CMP_W-1:0]   key,
  input  logic [PMEM_AW-1:0] base,
  input  logic               cfg_we_cmp,
  input  logic               cfg_we_adr,
  input  logic [PMEM_AW-1:0] cfg_addr,
  input  logic [CFG_W-1:0]   cfg_wdata,
  output logic               busy,
  output logic               ready,
  output logic               matched,
  output iaddr_t             target
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_DONE} state_t;
  state_t           state;
  logic [CMP_W-1:0] key_q;
  cmp_word_t        cmp_w;
  addr_word_t       adr_w;
  logic             hit;
  iaddr_t           hit_addr;

  param_mem #(.WIDTH($bits(cmp_word_t)), .DEPTH(64)) u_cmp (
    .clk, .rst_n, .we(cfg_we_cmp), .waddr(cfg_addr), .wdata(cfg_wdata[$bits(cmp_word_t)-1:0]),
    .re(start), .raddr(base), .rdata(cmp_w));
  param_mem #(.WIDTH($bits(addr_word_t)), .DEPTH(64)) u_adr (
    .clk, .rst_n, .we(cfg_we_adr), .waddr(cfg_addr), .wdata(cfg_wdata[$bits(addr_word_t)-1:0]),
    .re(start), .raddr(base), .rdata(adr_w));

  always_comb begin
    hit      = 1'b0;
    hit_addr = '0;
    for (int s = int'(N_CMP) - 1; s >= 0; s--) begin
      if (cmp_w[s].valid && cmp_w[s].value == key_q) begin
        hit      = 1'b1;
        hit_addr = adr_w[s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      key_q   <= '0;
      matched <= 1'b0;
      target  <= '0;
    end else if (start) begin
      state <= S_LOOK;
      key_q <= key;
    end else if (clear) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_LOOK: begin
          state   <= S_DONE;
          matched <= hit;
          target  <= hit_addr;
        end
        S_DONE:  if (consume) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  assign busy  = start || state == S_LOOK;
  assign ready = !start && state == S_DONE;
endmodule
