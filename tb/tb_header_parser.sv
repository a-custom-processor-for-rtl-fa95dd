// tb_header_parser: the header parser (and with it the APC and its units)
// on the four header stacks used as workloads: Ethernet/IPv4/TCP,
// Ethernet/IPv6/TCP, Ethernet/IPv6/ICMPv6 and Ethernet/MPLS x3/IPv6/UDP,
// followed by Ethernet/VLAN/IPv4 with options, Ethernet/IPv4 with an
// unknown protocol, VXLAN over UDP, and L2TP over UDP and GRE over IPv4
// with all eight combinations of their optional fields (branch catalyst
// dispatch). The time of each header is
// printed too: from the first issue of its subroutine's entry instruction
// to that of the next header's (or to hdr_done for the last one); GRE must
// stay within 12 cycles and L2TP within 13. Each packet is written completely into an
// incoming_packets_buffer while `run` is low, then `run` is raised and the
// cycles from pkt_start to hdr_done are counted, so the count does not
// depend on packet arrival. The PHV writes are collected in a testbench
// model of the banks and compared with the fields the packet builders
// expect. A payload_forwarder removes the payload so the next packet can
// start. The cycle counts are printed and must stay under a bound (60).
module tb_header_parser;
  import parser_pkg::*;
  import tb_prog_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic in_valid = 0, in_eop = 0, in_ready;
  logic [255:0] in_data = 0;
  logic [5:0]   in_nbytes = 0;
  logic [255:0] win_data;
  logic [31:0]  win_eop;
  logic [8:0]   avail;
  logic hp_pop, pf_pop, eop_seen, pkt_start, hdr_done, phv_valid, phv_ack = 0;
  logic [5:0] hp_pop_n, pf_pop_n, pf_bytes, out_nbytes;
  logic pf_start, pf_done, pay_valid, out_valid, out_last, pf_busy;
  logic [CNT_W-1:0] pay_left;
  logic [255:0] out_data;
  phv_wr_vec_t phv_wr;
  logic cfg_we = 0;
  cfg_sel_t cfg_sel = CFG_IMEM;
  logic [7:0] cfg_addr = 0;
  logic [CFG_W-1:0] cfg_wdata = 0;
  logic ev_fh_stall, ev_hc_expire, ev_sub_return, ev_branch_taken, ev_stack_push;
  logic ev_stack_overflow, ev_nh_default;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  incoming_packets_buffer ipb (.clk, .rst_n, .in_valid, .in_data, .in_nbytes, .in_eop, .in_ready,
                               .win_data, .win_eop, .avail, .pop(hp_pop | pf_pop),
                               .pop_n(hp_pop ? hp_pop_n : pf_pop_n));
  header_parser dut (.*);
  payload_forwarder pf (.clk, .rst_n, .start(pf_start), .eop_seen, .win_data, .win_eop, .avail,
                        .pop(pf_pop), .pop_n(pf_pop_n), .pay_valid, .pay_left, .pf_bytes,
                        .out_valid, .out_data, .out_nbytes, .out_last, .done(pf_done),
                        .busy(pf_busy));

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // testbench model of the PHV banks
  logic [31:0] phv_m [N_BANKS][64];
  bit          phv_v [N_BANKS][64];
  always @(posedge clk) begin
    if (pkt_start) foreach (phv_v[b, a]) phv_v[b][a] = 0;
    for (int b = 0; b < N_BANKS; b++)
      if (phv_wr[b].we) begin phv_m[b][phv_wr[b].addr] = phv_wr[b].data; phv_v[b][phv_wr[b].addr] = 1; end
  end

  int t_start = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (pkt_start) t_start = cyc;

  int last_cycles = 0, last_done = 0;
  int entry [256];
  always @(posedge clk) begin
    if (pkt_start) foreach (entry[a]) entry[a] = -1;
    else if (dut.fh_fire && entry[dut.fh_pc] < 0) entry[dut.fh_pc] = cyc;
  end

  task automatic hdr_time(string name, int bytes, int cycles, string paper);
    $display("header %-8s %2d bytes: %2d cycles (published %s)", name, bytes, cycles, paper);
  endtask
  task automatic one(string name, byte unsigned b[$], phv_exp_t e[$], int paper);
    int o = 0, t_done;
    while (o < b.size()) begin
      int n = (b.size() - o > 32) ? 32 : b.size() - o;
      @(negedge clk); in_valid = 1; in_nbytes = 6'(n); in_eop = (o + n == b.size());
      for (int j = 0; j < n; j++) in_data[255 - 8*j -: 8] = b[o + j];
      o += n;
    end
    @(negedge clk); in_valid = 0; run = 1;
    @(posedge clk iff hdr_done);
    t_done = cyc;
    @(negedge clk); run = 0;
    foreach (e[j])
      check(phv_v[e[j].bank][e[j].addr] && phv_m[e[j].bank][e[j].addr] == e[j].value,
            $sformatf("%s: bank %0d addr %0d", name, e[j].bank, e[j].addr));
    if (paper > 0)
      $display("workload %-28s header bytes %0d: %0d cycles (published figure %0d)", name,
               b.size() - 16, t_done - t_start, paper);
    last_cycles = t_done - t_start;
    last_done   = t_done;
    check(t_done - t_start < 60, $sformatf("%s took %0d cycles", name, t_done - t_start));
    phv_ack = 1; @(negedge clk); phv_ack = 0;
    wait (avail == 0 && !pf_busy);
  endtask

  initial begin
    cfg_t q[$];
    byte unsigned b[$];
    phv_exp_t e[$];
    int none[$];
    none = {};
    repeat (2) @(negedge clk);
    rst_n = 1;
    build_config(q);
    foreach (q[k]) begin
      @(negedge clk); cfg_we = 1; cfg_sel = q[k].sel; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk); cfg_we = 0;

    b = {}; e = {}; eth(b, e, 'h0800); void'(ipv4(b, e, 6, 36, none)); tcp(b, e, 0); rnd(b, 16);
    one("Ethernet/IPv4/TCP", b, e, 25);
    hdr_time("Ethernet", 14, entry[16] - entry[0], "7");
    hdr_time("IPv4", 20, entry[40] - entry[16], "8-18");
    hdr_time("TCP", 20, last_done - entry[40], "8-18");
    b = {}; e = {}; eth(b, e, 'h86dd); ipv6(b, e, 6, 36); tcp(b, e, 0); rnd(b, 16);
    one("Ethernet/IPv6/TCP", b, e, 28);
    hdr_time("IPv6", 40, entry[40] - entry[64], "13");
    b = {}; e = {}; eth(b, e, 'h86dd); ipv6(b, e, 58, 24); icmpv6(b, e); rnd(b, 16);
    one("Ethernet/IPv6/ICMPv6", b, e, 35);
    b = {}; e = {}; eth(b, e, 'h8847); mpls(b, e, 0, 0); mpls(b, e, 0, 0); mpls(b, e, 1, 1);
    ipv6(b, e, 17, 24); udp(b, e, 24); rnd(b, 16);
    one("Ethernet/MPLSx3/IPv6/UDP", b, e, 43);
    hdr_time("MPLS x3", 12, entry[64] - entry[63], "4 per label");
    b = {}; e = {}; eth(b, e, 'h8100); vlan(b, e, 'h0800);
    void'(ipv4(b, e, 17, 24, '{'h44, 6, 'h07, 4, 'h99, 2})); udp(b, e, 24); rnd(b, 16);
    one("VLAN/IPv4 options/UDP", b, e, 0);
    b = {}; e = {}; eth(b, e, 'h0800); void'(ipv4(b, e, 50, 16, none)); rnd(b, 16);
    one("IPv4 unknown protocol", b, e, 0);
    b = {}; e = {}; eth(b, e, 'h0800); void'(ipv4(b, e, 17, 8 + 8 + 16, none));
    udp(b, e, 8 + 8 + 16, 4789); vxlan(b, e); rnd(b, 16);
    one("Ethernet/IPv4/UDP/VXLAN", b, e, 0);
    hdr_time("VXLAN", 8, last_done - entry[116], "5");
    // L2TP over UDP, every combination of the L, S and O flags
    for (int f = 0; f < 8; f++) begin
      int llen;
      byte unsigned h[$];
      phv_exp_t he[$];
      h = {}; he = {};
      llen = l2tp(h, he, f);
      b = {}; e = {}; eth(b, e, 'h0800); void'(ipv4(b, e, 17, 8 + llen + 16, none));
      udp(b, e, 8 + llen + 16, 1701);
      b = {b, h}; e = {e, he}; rnd(b, 16);
      one($sformatf("L2TP flags LSO=%03b", f[2:0]), b, e, 0);
      hdr_time("L2TP", llen, entry[60] - entry[118], "10-13");
      check(entry[60] - entry[118] <= 13, "L2TP within the published longest time");
    end
    // GRE over IPv4, every flag combination; the GRE share is the time
    // beyond the same packet with an unknown IP protocol
    for (int f = 0; f < 8; f++) begin
      int glen;
      b = {}; e = {}; eth(b, e, 'h0800);
      glen = 4 + 4 * ((f & 1) + ((f >> 1) & 1) + ((f >> 2) & 1));
      void'(ipv4(b, e, 47, glen + 16, none));
      void'(gre(b, e, f, 'h6558)); rnd(b, 16);
      one($sformatf("GRE flags CKS=%03b", f[2:0]), b, e, 0);
      hdr_time("GRE", glen, entry[60] - entry[80], "4-12");
      check(entry[60] - entry[80] <= 12, "GRE within the published longest time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
