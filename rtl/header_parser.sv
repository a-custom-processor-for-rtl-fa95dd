// header_parser: the instruction pipeline that parses packet headers.
//
// Four single-cycle stages:
//   FI  fetch instruction: the APC gives the address, the instruction memory
//       is read synchronously;
//   FH  fetch header: the instruction names a segment size of 0, 1, 2 or 4
//       bytes, which is taken from the head of the incoming packets' buffer
//       (the stage waits while the buffer holds fewer bytes); branches are
//       resolved here by the APC;
//   EX  extraction: the PHV filler splits the segment into containers and the
//       extraction engines of the APC units pick their fields;
//   WB  writeback: containers are written into the PHV banks.
// Instructions need no decoding: every field drives its unit directly.
// The block also records whether the end-of-packet byte has already been
// consumed as header, so the payload forwarder knows there is no payload.
//
// Interfaces: buffer window (first 32 bytes, per-byte end marks, fill count)
// and pop request; PHV write ports; payload forwarder hand-off; configuration
// port for the instruction memory and the APC's parameter memories.
module header_parser
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // incoming packets' buffer
  input  logic [255:0]     win_data,
  input  logic [31:0]      win_eop,
  input  logic [8:0]       avail,
  output logic             hp_pop,
  output logic [5:0]       hp_pop_n,
  output logic             eop_seen,
  // PHV
  output phv_wr_vec_t      phv_wr,
  output logic             pkt_start,
  output logic             hdr_done,
  output logic             phv_valid,
  input  logic             phv_ack,
  // payload forwarder
  output logic             pf_start,
  input  logic             pf_done,
  input  logic [5:0]       pf_bytes,
  output logic             pay_valid,
  output logic [CNT_W-1:0] pay_left,
  // configuration
  input  logic             cfg_we,
  input  cfg_sel_t         cfg_sel,
  input  logic [7:0]       cfg_addr,
  input  logic [CFG_W-1:0] cfg_wdata,
  // events
  output logic             ev_fh_stall,
  output logic             ev_hc_expire,
  output logic             ev_sub_return,
  output logic             ev_branch_taken,
  output logic             ev_stack_push,
  output logic             ev_stack_overflow,
  output logic             ev_nh_default
);
  // ------------------------------------------------------------ FI / FH
  logic   fetch_en;
  iaddr_t fetch_addr;
  instr_t fh_ins;
  logic   fh_valid;
  iaddr_t fh_pc;
  logic   fh_fire, fh_can_read;

  instr_mem #(.DEPTH(1 << IMEM_AW)) u_imem (
    .clk, .we(cfg_we && cfg_sel == CFG_IMEM), .waddr(cfg_addr[IMEM_AW-1:0]),
    .wdata(cfg_wdata[INSTR_W-1:0]), .re(fetch_en), .raddr(fetch_addr), .rdata(fh_ins));

  logic [2:0]  fh_n;
  logic [31:0] fh_seg;
  always_comb begin
    fh_n        = seg_bytes(fh_ins.seg);
    fh_can_read = avail >= 9'(fh_n);
    fh_seg      = win_data[255 -: 32];
    unique case (fh_n)
      3'd0:    fh_seg = '0;
      3'd1:    fh_seg = {fh_seg[31:24], 24'b0};
      3'd2:    fh_seg = {fh_seg[31:16], 16'b0};
      default: ;
    endcase
  end

  assign hp_pop      = fh_fire && fh_n != 3'd0;
  assign hp_pop_n    = 6'(fh_n);
  assign ev_fh_stall = fh_valid && !fh_can_read && !pf_start;

  // ----------------------------------------------------------- EX / WB
  logic        ex_valid, wb_valid;
  instr_t      ex_ins;
  logic [31:0] ex_seg;
  phv_wr_vec_t ex_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fh_valid <= 1'b0;
      fh_pc    <= '0;
      ex_valid <= 1'b0;
      ex_ins   <= '0;
      ex_seg   <= '0;
      wb_valid <= 1'b0;
      phv_wr   <= '0;
      eop_seen <= 1'b0;
    end else begin
      if (fetch_en) begin
        fh_valid <= 1'b1;
        fh_pc    <= fetch_addr;
      end else if (fh_fire) begin
        fh_valid <= 1'b0;
      end
      ex_valid <= fh_fire;
      if (fh_fire) begin
        ex_ins <= fh_ins;
        ex_seg <= fh_seg;
      end
      wb_valid <= ex_valid;
      phv_wr   <= ex_valid ? ex_wr : '0;
      if (pkt_start) eop_seen <= 1'b0;
      else if (hp_pop && (win_eop[31 -: 4] & ~(4'hf >> fh_n)) != 4'b0) eop_seen <= 1'b1;
    end
  end

  phv_filler u_filler (
    .mode(ex_ins.phv_mode), .seg(ex_seg), .a0(ex_ins.phv_a0), .a1(ex_ins.phv_a1),
    .a2(ex_ins.phv_a2), .a3(ex_ins.phv_a3), .wr(ex_wr));

  apc u_apc (
    .clk, .rst_n, .run,
    .fh_valid, .fh_ins, .fh_pc, .fh_can_read, .fh_fire,
    .ex_valid, .ex_ins, .ex_seg, .wb_valid,
    .fetch_en, .fetch_addr,
    .pkt_start, .pf_start, .pf_done, .pf_bytes, .pay_valid, .pay_left,
    .hdr_done, .phv_valid, .phv_ack,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .ev_hc_expire, .ev_sub_return, .ev_branch_taken, .ev_stack_push,
    .ev_stack_overflow, .ev_nh_default);
endmodule
