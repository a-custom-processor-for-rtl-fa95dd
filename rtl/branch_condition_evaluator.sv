// branch_condition_evaluator: the Branch Condition Evaluator (BCE) of the APC.
//
// Evaluates a two-way branch on a header field, e.g. "EtherType <= 1500 means
// a length, not a type". Started in the EX stage of an instruction with a
// non-zero BCE extraction mode, it latches the extracted field and the
// instruction's 3-bit branch condition and reads the reference value and the
// target address from its parameter memory at Address_1 (no instruction field
// is reserved for them, so this design shares the branch catalyst's address
// field). In the next cycle it compares and reports taken/not taken.
// Conditions (this design's encoding): always, ==, !=, <, <=, >, >=, and
// "all bits of the reference clear in the field" (e.g. MPLS bottom of stack
// not yet reached). Compares are unsigned, 16 bit.
// Status and timing as in the NHRU: start at t, ready from t+2 until consumed.
module branch_condition_evaluator
  import parser_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               consume,
  input  logic               start,
  input  logic [CMP_W-1:0]   key,
  input  cond_t              cond,
  input  logic [PMEM_AW-1:0] base,
  input  logic               cfg_we,
  input  logic [PMEM_AW-1:0] cfg_addr,
  input  logic [CFG_W-1:0]   cfg_wdata,
  output logic               busy,
  output logic               ready,
  output logic               taken,
  output iaddr_t             target
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_DONE} state_t;
  state_t           state;
  logic [CMP_W-1:0] key_q;
  cond_t            cond_q;
  bce_entry_t       ent;
  logic             res;

  param_mem #(.WIDTH($bits(bce_entry_t)), .DEPTH(64)) u_ref (
    .clk, .rst_n, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata[$bits(bce_entry_t)-1:0]),
    .re(start), .raddr(base), .rdata(ent));

  always_comb begin
    unique case (cond_q)
      C_ALWAYS: res = 1'b1;
      C_EQ:     res = key_q == ent.ref_val;
      C_NE:     res = key_q != ent.ref_val;
      C_LT:     res = key_q <  ent.ref_val;
      C_LE:     res = key_q <= ent.ref_val;
      C_GT:     res = key_q >  ent.ref_val;
      C_GE:     res = key_q >= ent.ref_val;
      C_CLR:    res = (key_q & ent.ref_val) == '0;
      default:  res = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      key_q  <= '0;
      cond_q <= C_ALWAYS;
      taken  <= 1'b0;
      target <= '0;
    end else if (start) begin
      state  <= S_LOOK;
      key_q  <= key;
      cond_q <= cond;
    end else if (clear) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_LOOK: begin
          state  <= S_DONE;
          taken  <= res;
          target <= ent.target;
        end
        S_DONE:  if (consume) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  assign busy  = start || state == S_LOOK;
  assign ready = !start && state == S_DONE;
endmodule
