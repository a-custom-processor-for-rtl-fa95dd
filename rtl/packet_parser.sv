// packet_parser: programmable, protocol-independent packet parser (top).
//
// A packet enters the incoming packets' buffer; the header parser, a
// four-stage VLIW pipeline steered by the Advanced Program Control unit, reads
// its headers in 1/2/4-byte segments and places the fields into the Packet
// Header Vector; then the payload forwarder streams the rest of the packet out
// in units of up to 32 bytes. What to extract and how to move from header to
// header is entirely software: the instruction memory and the parameter
// memories (comparand sets, branch references, counter targets) are written
// through the configuration port before `run` is raised.
//
// Per packet: the APC starts at instruction 0; when parsing ends it raises
// `hdr_done` for one cycle, after which `phv_valid` stays high and the PHV
// can be read through the rd_* port until `phv_ack`; the next packet is
// parsed once the payload has been forwarded and the PHV acknowledged.
// The event outputs pulse when the named mechanism acts (for monitoring).
module packet_parser
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // packet input
  input  logic             in_valid,
  input  logic [255:0]     in_data,
  input  logic [5:0]       in_nbytes,
  input  logic             in_eop,
  output logic             in_ready,
  // configuration port
  input  logic             cfg_we,
  input  cfg_sel_t         cfg_sel,
  input  logic [7:0]       cfg_addr,
  input  logic [CFG_W-1:0] cfg_wdata,
  // packet header vector
  output logic             hdr_done,
  output logic             phv_valid,
  input  logic             phv_ack,
  input  logic [2:0]       phv_rd_bank,
  input  logic [5:0]       phv_rd_addr,
  output logic [31:0]      phv_rd_data,
  output logic             phv_rd_valid,
  // payload output
  output logic             out_valid,
  output logic [255:0]     out_data,
  output logic [5:0]       out_nbytes,
  output logic             out_last,
  // events
  output logic             ev_fh_stall,
  output logic             ev_hc_expire,
  output logic             ev_sub_return,
  output logic             ev_branch_taken,
  output logic             ev_stack_push,
  output logic             ev_stack_overflow,
  output logic             ev_nh_default,
  output logic             ev_pf_drop
);
  logic [255:0] win_data;
  logic [31:0]  win_eop;
  logic [8:0]   avail;
  logic         hp_pop, pf_pop;
  logic [5:0]   hp_pop_n, pf_pop_n;
  logic         eop_seen, pkt_start, pf_start, pf_done, pf_busy, pay_valid;
  logic [5:0]   pf_bytes;
  logic [CNT_W-1:0] pay_left;
  phv_wr_vec_t  phv_wr;

  incoming_packets_buffer #(.DEPTH(256), .IN_BYTES(32), .RD_BYTES(32)) u_ipb (
    .clk, .rst_n, .in_valid, .in_data, .in_nbytes, .in_eop, .in_ready,
    .win_data, .win_eop, .avail,
    .pop(hp_pop || pf_pop), .pop_n(hp_pop ? hp_pop_n : pf_pop_n));

  header_parser u_hp (
    .clk, .rst_n, .run, .win_data, .win_eop, .avail, .hp_pop, .hp_pop_n, .eop_seen,
    .phv_wr, .pkt_start, .hdr_done, .phv_valid, .phv_ack,
    .pf_start, .pf_done, .pf_bytes, .pay_valid, .pay_left,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .ev_fh_stall, .ev_hc_expire, .ev_sub_return, .ev_branch_taken, .ev_stack_push,
    .ev_stack_overflow, .ev_nh_default);

  phv u_phv (
    .clk, .rst_n, .clear(pkt_start), .wr(phv_wr),
    .rd_bank(phv_rd_bank), .rd_addr(phv_rd_addr), .rd_data(phv_rd_data),
    .rd_valid(phv_rd_valid));

  payload_forwarder u_pf (
    .clk, .rst_n, .start(pf_start), .eop_seen, .win_data, .win_eop, .avail,
    .pop(pf_pop), .pop_n(pf_pop_n), .pay_valid, .pay_left, .pf_bytes,
    .out_valid, .out_data, .out_nbytes, .out_last, .done(pf_done), .busy(pf_busy));

  assign ev_pf_drop = pf_pop && !out_valid;

  // the two readers of the buffer work in turn
  assert property (@(posedge clk) disable iff (!rst_n) !(hp_pop && pf_pop));
endmodule
