// next_header_resolve: the Next Header Resolve Unit (NHRU) of the APC.
//
// Finds the subroutine that parses the next header. Started in the EX stage
// of an instruction with a non-zero next-header extraction mode, it takes the
// extracted field (e.g. EtherType, IPv4 Protocol) as a 16-bit key and reads
// the comparand memory and the address memory at Address_0; both give eight
// entries per word. In the next cycle eight comparators test the key against
// the eight comparands in parallel; the first valid match selects its
// subroutine address. Without a match the unit reads the following word, up
// to `iter` words in all (the iterations field), and then gives the default
// address from a configuration register. Status: `busy` (in progress) and
// `ready` with `target`/`matched`; the result stays until the APC consumes it
// or a new search starts. Timing: start in cycle t, ready from t+1+k for a
// match in the k-th word (k = 1..iter).
// Slot valid bits, the default register and 0 iterations meaning one word
// are this design's choices.
module next_header_resolve
  import parser_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 consume,
  input  logic                 start,
  input  logic [CMP_W-1:0]     key,
  input  logic [PMEM_AW-1:0]   base,
  input  logic [6:0]           iter,
  input  iaddr_t               default_addr,
  // configuration writes
  input  logic                 cfg_we_cmp,
  input  logic                 cfg_we_adr,
  input  logic [PMEM_AW-1:0]   cfg_addr,
  input  logic [CFG_W-1:0]     cfg_wdata,
  // status
  output logic                 busy,
  output logic                 ready,
  output logic                 matched,
  output iaddr_t               target
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_DONE} state_t;
  state_t               state;
  logic [CMP_W-1:0]     key_q;
  logic [PMEM_AW-1:0]   addr_q;
  logic [6:0]           left_q;
  logic                 re;
  logic [PMEM_AW-1:0]   raddr;
  cmp_word_t            cmp_w;
  addr_word_t           adr_w;
  logic                 hit;
  iaddr_t               hit_addr;

  param_mem #(.WIDTH($bits(cmp_word_t)), .DEPTH(64)) u_cmp (
    .clk, .rst_n, .we(cfg_we_cmp), .waddr(cfg_addr), .wdata(cfg_wdata[$bits(cmp_word_t)-1:0]),
    .re, .raddr, .rdata(cmp_w));
  param_mem #(.WIDTH($bits(addr_word_t)), .DEPTH(64)) u_adr (
    .clk, .rst_n, .we(cfg_we_adr), .waddr(cfg_addr), .wdata(cfg_wdata[$bits(addr_word_t)-1:0]),
    .re, .raddr, .rdata(adr_w));

  // eight comparators in parallel, lowest slot wins
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

  always_comb begin
    re    = 1'b0;
    raddr = base;
    if (start) begin
      re = 1'b1; raddr = base;
    end else if (state == S_LOOK && !hit && left_q > 7'd1) begin
      re = 1'b1; raddr = addr_q + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      key_q   <= '0;
      addr_q  <= '0;
      left_q  <= '0;
      matched <= 1'b0;
      target  <= '0;
    end else if (start) begin
      state  <= S_LOOK;
      key_q  <= key;
      addr_q <= base;
      left_q <= (iter == 7'd0) ? 7'd1 : iter;
    end else if (clear) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_LOOK: begin
          if (hit) begin
            state   <= S_DONE;
            matched <= 1'b1;
            target  <= hit_addr;
          end else if (left_q > 7'd1) begin
            addr_q <= addr_q + 1'b1;
            left_q <= left_q - 1'b1;
          end else begin
            state   <= S_DONE;
            matched <= 1'b0;
            target  <= default_addr;
          end
        end
        S_DONE:  if (consume) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  assign busy  = start || state == S_LOOK;
  assign ready = !start && state == S_DONE;
endmodule
