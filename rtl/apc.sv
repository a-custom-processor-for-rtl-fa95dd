// apc: Advanced Program Control unit, the program-control half of the parser.
//
// Replaces the TCAM of a table-driven parser: instead of looking up the next
// state, it chooses the address of the next instruction. Every cycle it looks
// at the instruction in the FH stage and at the status of its units, in this
// priority order:
//   1. reset (and the start of each packet): fetch instruction 0;
//   2. header counter expiry: jump to the subroutine found by the next header
//      resolve unit (wait while it is in progress), or start payload
//      forwarding if no next header was looked up;
//   3. expiry of a sub-header payload counter: pop the return stack into the
//      program counter, or start payload forwarding if the stack is empty;
//   4. branch type of the FH instruction: sequential, or wait for the NHRU,
//      branch catalyst or branch condition evaluator and load its address.
// The fetch address is produced combinationally in the cycle of the decision
// and the instruction memory is synchronous, so a decision taken on the
// instruction in FH at cycle t places the chosen instruction in FH at t+1;
// branches that wait for a unit stop fetching until the unit is ready (the
// fetched-but-unused slot is the branch penalty).
//
// Contained units: header counter, four payload counters, return stack, NHRU,
// branch catalyst, branch condition evaluator, the two counter target-value
// memories and the five extraction engines, which work on the EX-stage
// segment. Parameter memories are read with the FH instruction's addresses so
// their data meets the instruction in EX.
//
// After parsing, the APC holds in S_DONE: it starts the payload forwarder,
// raises `hdr_done` once the last write has reached the PHV, and starts the
// next packet when forwarding has finished and `phv_ack` has accepted the
// PHV. The ack handshake, the S_DONE hold (no overlap of forwarding with the
// next header) and the status-wait scheme are this design's choices.
module apc
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // FH stage
  input  logic             fh_valid,
  input  instr_t           fh_ins,
  input  iaddr_t           fh_pc,
  input  logic             fh_can_read,
  output logic             fh_fire,
  // EX stage
  input  logic             ex_valid,
  input  instr_t           ex_ins,
  input  logic [31:0]      ex_seg,
  input  logic             wb_valid,
  // fetch
  output logic             fetch_en,
  output iaddr_t           fetch_addr,
  // packet sequencing
  output logic             pkt_start,
  output logic             pf_start,
  input  logic             pf_done,
  input  logic [5:0]       pf_bytes,
  output logic             pay_valid,
  output logic [CNT_W-1:0] pay_left,
  output logic             hdr_done,
  output logic             phv_valid,
  input  logic             phv_ack,
  // configuration
  input  logic             cfg_we,
  input  cfg_sel_t         cfg_sel,
  input  logic [7:0]       cfg_addr,
  input  logic [CFG_W-1:0] cfg_wdata,
  // events, for monitoring
  output logic             ev_hc_expire,
  output logic             ev_sub_return,
  output logic             ev_branch_taken,
  output logic             ev_stack_push,
  output logic             ev_stack_overflow,
  output logic             ev_nh_default
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_WAIT, S_WNH, S_DONE} state_t;

  state_t   state, state_n;
  branch_t  br_q;
  iaddr_t   fall_q;
  iaddr_t   pc_q;
  logic     pf_done_q, hdr_pend_q, phv_valid_q;

  // ---------------------------------------------------------------- units
  logic [31:0] f_nh, f_bc, f_bce, f_hc, f_pc;
  logic        a_nh, a_bc, a_bce, a_hc, a_pc;

  extraction_engine u_x_nh  (.mode(ex_ins.xm_nh),  .seg(ex_seg), .field(f_nh),  .active(a_nh));
  extraction_engine u_x_bc  (.mode(ex_ins.xm_bc),  .seg(ex_seg), .field(f_bc),  .active(a_bc));
  extraction_engine u_x_bce (.mode(ex_ins.xm_bce), .seg(ex_seg), .field(f_bce), .active(a_bce));
  extraction_engine u_x_hc  (.mode(ex_ins.xm_hc),  .seg(ex_seg), .field(f_hc),  .active(a_hc));
  extraction_engine u_x_pc  (.mode(ex_ins.xm_pc),  .seg(ex_seg), .field(f_pc),  .active(a_pc));

  logic [2:0] fh_bytes, ex_bytes;
  assign fh_bytes = fh_fire ? seg_bytes(fh_ins.seg) : 3'd0;
  assign ex_bytes = seg_bytes(ex_ins.seg);

  logic run_units;    // units take EX-stage work only while parsing
  assign run_units = ex_valid && (state != S_IDLE);

  // configuration decode
  logic cfg_hc, cfg_pc, cfg_nh_c, cfg_nh_a, cfg_bc_c, cfg_bc_a, cfg_bce;
  always_comb begin
    cfg_hc   = cfg_we && cfg_sel == CFG_HC;
    cfg_pc   = cfg_we && cfg_sel == CFG_PC;
    cfg_nh_c = cfg_we && cfg_sel == CFG_NH_CMP;
    cfg_nh_a = cfg_we && cfg_sel == CFG_NH_ADR;
    cfg_bc_c = cfg_we && cfg_sel == CFG_BC_CMP;
    cfg_bc_a = cfg_we && cfg_sel == CFG_BC_ADR;
    cfg_bce  = cfg_we && cfg_sel == CFG_BCE;
  end

  iaddr_t nh_default_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nh_default_q <= '0;
    else if (cfg_we && cfg_sel == CFG_NH_DEF) nh_default_q <= cfg_wdata[IMEM_AW-1:0];
  end

  // counter target-value memories, read with the FH instruction's address
  cnt_entry_t hc_ent, pc_ent;
  param_mem #(.WIDTH($bits(cnt_entry_t)), .DEPTH(64)) u_hc_mem (
    .clk, .rst_n, .we(cfg_hc), .waddr(cfg_addr[PMEM_AW-1:0]),
    .wdata(cfg_wdata[$bits(cnt_entry_t)-1:0]),
    .re(fh_fire), .raddr(fh_ins.a_hc), .rdata(hc_ent));
  param_mem #(.WIDTH($bits(cnt_entry_t)), .DEPTH(64)) u_pc_mem (
    .clk, .rst_n, .we(cfg_pc), .waddr(cfg_addr[PMEM_AW-1:0]),
    .wdata(cfg_wdata[$bits(cnt_entry_t)-1:0]),
    .re(fh_fire), .raddr(fh_ins.a_pc), .rdata(pc_ent));

  logic unit_clear, clear_sub;
  logic hc_expire, hc_active;
  logic [CNT_W-1:0] hc_count;
  logic sub_expire;

  header_counter u_hc (
    .clk, .rst_n, .clear(unit_clear), .load(run_units && a_hc), .entry(hc_ent),
    .field(f_hc), .ex_bytes, .fh_bytes, .active(hc_active), .count(hc_count),
    .expire(hc_expire));

  // the instruction in EX when the header counter expired belongs to the
  // finished header: it may not open a new sub-header
  logic hdr_end_q;
  payload_counters u_pcnt (
    .clk, .rst_n, .clear(unit_clear), .clear_sub,
    .load(run_units && a_pc && !(hdr_end_q && pc_ent.pc_sub)),
    .entry(pc_ent), .field(f_pc), .ex_bytes, .fh_bytes, .pf_bytes,
    .sub_expire, .pay_valid, .pay_left);

  logic   stk_push, stk_pop, stk_empty, stk_ovf, stk_clear;
  iaddr_t stk_top, stk_data;
  apc_stack u_stack (
    .clk, .rst_n, .clear(stk_clear), .push(stk_push), .push_addr(stk_data),
    .pop(stk_pop), .top(stk_top), .empty(stk_empty), .overflow(stk_ovf));

  logic   nh_busy, nh_ready, nh_matched, nh_consume;
  iaddr_t nh_target;
  next_header_resolve u_nhru (
    .clk, .rst_n, .clear(unit_clear), .consume(nh_consume),
    .start(run_units && a_nh), .key(f_nh[CMP_W-1:0]), .base(ex_ins.a_nh),
    .iter(ex_ins.nh_iter), .default_addr(nh_default_q),
    .cfg_we_cmp(cfg_nh_c), .cfg_we_adr(cfg_nh_a), .cfg_addr(cfg_addr[PMEM_AW-1:0]),
    .cfg_wdata, .busy(nh_busy), .ready(nh_ready), .matched(nh_matched),
    .target(nh_target));

  logic   bc_busy, bc_ready, bc_matched, bc_consume;
  iaddr_t bc_target;
  branch_catalyst u_bc (
    .clk, .rst_n, .clear(unit_clear), .consume(bc_consume),
    .start(run_units && a_bc), .key(f_bc[CMP_W-1:0]), .base(ex_ins.a_bc),
    .cfg_we_cmp(cfg_bc_c), .cfg_we_adr(cfg_bc_a), .cfg_addr(cfg_addr[PMEM_AW-1:0]),
    .cfg_wdata, .busy(bc_busy), .ready(bc_ready), .matched(bc_matched),
    .target(bc_target));

  logic   bce_busy, bce_ready, bce_taken, bce_consume;
  iaddr_t bce_target;
  branch_condition_evaluator u_bce (
    .clk, .rst_n, .clear(unit_clear), .consume(bce_consume),
    .start(run_units && a_bce), .key(f_bce[CMP_W-1:0]), .cond(ex_ins.br_cond),
    .base(ex_ins.a_bc), .cfg_we(cfg_bce), .cfg_addr(cfg_addr[PMEM_AW-1:0]),
    .cfg_wdata, .busy(bce_busy), .ready(bce_ready), .taken(bce_taken),
    .target(bce_target));

  // ------------------------------------------------------- next address
  logic parsing;
  assign parsing = (state == S_RUN) || (state == S_WAIT) || (state == S_WNH);
  assign fh_fire = (state == S_RUN) && fh_valid && fh_can_read;

  always_comb begin
    state_n         = state;
    fetch_en        = 1'b0;
    fetch_addr      = pc_q;
    pkt_start       = 1'b0;
    nh_consume      = 1'b0;
    bc_consume      = 1'b0;
    bce_consume     = 1'b0;
    stk_push        = 1'b0;
    stk_pop         = 1'b0;
    stk_data        = fh_ins.stk_next ? fh_pc + 1'b1 : fh_pc;
    stk_clear       = 1'b0;
    clear_sub       = 1'b0;
    ev_branch_taken = 1'b0;
    ev_nh_default   = 1'b0;

    if (parsing && hc_expire) begin
      // header over: next header subroutine, or payload forwarding
      clear_sub = 1'b1;
      stk_clear = 1'b1;
      if (nh_ready) begin
        fetch_en      = 1'b1;
        fetch_addr    = nh_target;
        nh_consume    = 1'b1;
        ev_nh_default = !nh_matched;
        state_n       = S_RUN;
      end else if (nh_busy || (fh_fire && fh_ins.xm_nh != 5'd0)) begin
        state_n = S_WNH;
      end else begin
        state_n = S_DONE;
      end
    end else if (parsing && sub_expire) begin
      if (!stk_empty) begin
        stk_pop    = 1'b1;
        fetch_en   = 1'b1;
        fetch_addr = stk_top;
        state_n    = S_RUN;
      end else begin
        state_n = S_DONE;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (run) begin
            pkt_start  = 1'b1;
            fetch_en   = 1'b1;
            fetch_addr = '0;
            state_n    = S_RUN;
          end
        end
        S_RUN: begin
          if (fh_fire) begin
            stk_push = fh_ins.stk_push;
            if (fh_ins.br_type == BR_SEQ) begin
              fetch_en   = 1'b1;
              fetch_addr = fh_pc + 1'b1;
            end else begin
              state_n = S_WAIT;
            end
          end else if (!fh_valid) begin
            fetch_en   = 1'b1;
            fetch_addr = pc_q;
          end
        end
        S_WAIT: begin
          unique case (br_q)
            BR_NH: begin
              if (nh_ready) begin
                fetch_en        = 1'b1;
                fetch_addr      = nh_target;
                nh_consume      = 1'b1;
                ev_branch_taken = 1'b1;
                ev_nh_default   = !nh_matched;
                state_n         = S_RUN;
              end else if (!nh_busy) begin
                state_n = S_DONE;
              end
            end
            BR_BC: begin
              if (bc_ready || !bc_busy) begin
                fetch_en        = 1'b1;
                fetch_addr      = (bc_ready && bc_matched) ? bc_target : fall_q;
                ev_branch_taken = bc_ready && bc_matched;
                bc_consume      = 1'b1;
                state_n         = S_RUN;
              end
            end
            default: begin // BR_BCE
              if (bce_ready || !bce_busy) begin
                fetch_en        = 1'b1;
                fetch_addr      = (bce_ready && bce_taken) ? bce_target : fall_q;
                ev_branch_taken = bce_ready && bce_taken;
                bce_consume     = 1'b1;
                state_n         = S_RUN;
              end
            end
          endcase
        end
        S_WNH: begin
          if (nh_ready) begin
            fetch_en      = 1'b1;
            fetch_addr    = nh_target;
            nh_consume    = 1'b1;
            ev_nh_default = !nh_matched;
            state_n       = S_RUN;
          end else if (!nh_busy) begin
            state_n = S_DONE;
          end
        end
        default: begin // S_DONE
          if (pf_done_q && !hdr_pend_q && !phv_valid_q && run) begin
            pkt_start  = 1'b1;
            fetch_en   = 1'b1;
            fetch_addr = '0;
            state_n    = S_RUN;
          end
        end
      endcase
    end
  end

  assign unit_clear = pkt_start;
  assign pf_start   = (state != S_DONE) && (state_n == S_DONE);
  assign hdr_done   = (state == S_DONE) && hdr_pend_q && !ex_valid && !wb_valid;
  assign phv_valid  = phv_valid_q;

  assign ev_hc_expire      = parsing && hc_expire;
  assign ev_sub_return     = parsing && !hc_expire && sub_expire && !stk_empty;
  assign ev_stack_push     = stk_push;
  assign ev_stack_overflow = stk_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
 
      state       <= S_IDLE;
      hdr_end_q   <= 1'b0;
      br_q        <= BR_SEQ;
      fall_q      <= '0;
      pc_q        <= '0;
      pf_done_q   <= 1'b0;
      hdr_pend_q  <= 1'b0;
      phv_valid_q <= 1'b0;
    end else begin
      state <= state_n;
      hdr_end_q <= parsing && hc_expire;
      if (fetch_en) pc_q <= fetch_addr + 1'b1;
      if (state == S_RUN && fh_fire && fh_ins.br_type != BR_SEQ) begin
        br_q   <= fh_ins.br_type;
        fall_q <= fh_pc + 1'b1;
      end
      if (pf_start) begin
        pf_done_q  <= 1'b0;
        hdr_pend_q <= 1'b1;
      end else begin
        if (pf_done)  pf_done_q  <= 1'b1;
        if (hdr_done) hdr_pend_q <= 1'b0;
      end
      if (hdr_done)     phv_valid_q <= 1'b1;
      else if (phv_ack) phv_valid_q <= 1'b0;
    end
  end

  // a unit result is only consumed when it is there
  assert property (@(posedge clk) disable iff (!rst_n) nh_consume |-> nh_ready);
endmodule
