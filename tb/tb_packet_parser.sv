// tb_packet_parser: end-to-end test of the packet parser at its default sizes.
//
// Loads the parse program of tb_prog_pkg, then streams a mix of packets
// (Ethernet with IPv4 +/- options, VLAN, IPv6, MPLS stacks, TCP with and
// without options, UDP, ICMPv6, unknown EtherType and unknown IP protocol)
// into the parser in beats of random size with random gaps, so the header
// parser often waits for bytes. For every packet the testbench builds the
// expected PHV contents and payload itself from the bytes it generated, then
// reads the PHV after hdr_done and collects the forwarded payload.
// It counts how often each mechanism acted (buffer wait, header counter
// expiry, sub-header return through the stack, unit branches, stack pushes,
// NHRU default, multi-word NHRU search, padding drop, input backpressure) and
// fails if any never did.
module tb_packet_parser;
  import parser_pkg::*;
  import tb_prog_pkg::*;

  localparam int NPKT = 60;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_eop = 1'b0, in_ready;
  logic [255:0]     in_data = '0;
  logic [5:0]       in_nbytes = '0;
  logic             cfg_we = 1'b0;
  cfg_sel_t         cfg_sel = CFG_IMEM;
  logic [7:0]       cfg_addr = '0;
  logic [CFG_W-1:0] cfg_wdata = '0;
  logic             hdr_done, phv_valid, phv_ack = 1'b0;
  logic [2:0]       phv_rd_bank = '0;
  logic [5:0]       phv_rd_addr = '0;
  logic [31:0]      phv_rd_data;
  logic             phv_rd_valid;
  logic             out_valid, out_last;
  logic [255:0]     out_data;
  logic [5:0]       out_nbytes;
  logic ev_fh_stall, ev_hc_expire, ev_sub_return, ev_branch_taken, ev_stack_push;
  logic ev_stack_overflow, ev_nh_default, ev_pf_drop;

  packet_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ packets
  byte unsigned pkt   [NPKT][$];
  phv_exp_t     exp_e [NPKT][$];
  int           pay_off [NPKT], pay_len [NPKT];
  int           n_ipv4 = 0;

  function automatic void make(int k);
    byte unsigned b[$];
    phv_exp_t e[$];
    int kind = k % 9;
    int hl, plen, l4, tl;
    int opts[$];
    int none[$];
    b = {}; e = {}; none = {};
    plen = 1 + int'($urandom_range(0, 60));
    case (kind)
      0, 8: begin // Ethernet / IPv4 / TCP (+ IP options, + TCP options)
        eth(b, e, 'h0800);
        case ($urandom_range(0, 3))
          0: opts = none;
          1: opts = '{'h07, 4};
          2: opts = '{'h44, 6, 'h07, 4, 'h99, 4, 'h99, 2};
          default: opts = '{'h99, 3, 'h44, 6, 'h99, 3};
        endcase
        l4 = 20 + 4 * int'($urandom_range(0, 2));
        hl = ipv4(b, e, 6, l4 + plen, opts);
        tcp(b, e, (l4 - 20) / 4);
        n_ipv4++;
      end
      1: begin // Ethernet / IPv4 / UDP
        eth(b, e, 'h0800);
        hl = ipv4(b, e, 17, 8 + plen, none);
        udp(b, e, 8 + plen);
        n_ipv4++;
      end
      2: begin // Ethernet / VLAN / IPv4 / UDP
        eth(b, e, 'h8100);
        vlan(b, e, 'h0800);
        hl = ipv4(b, e, 17, 8 + plen, '{'h07, 4});
        udp(b, e, 8 + plen);
        n_ipv4++;
      end
      3: begin // Ethernet / IPv6 / TCP
        eth(b, e, 'h86dd);
        ipv6(b, e, 6, 20 + plen);
        tcp(b, e, 0);
      end
      4: begin // Ethernet / IPv6 / ICMPv6
        eth(b, e, 'h86dd);
        ipv6(b, e, 58, 8 + plen);
        icmpv6(b, e);
      end
      5: begin // Ethernet / MPLS x3 / IPv6 / UDP
        eth(b, e, 'h8847);
        mpls(b, e, 0, 0); mpls(b, e, 0, 0); mpls(b, e, 1, 1);
        ipv6(b, e, 17, 8 + plen);
        udp(b, e, 8 + plen);
      end
      6: begin // unknown EtherType: parsing ends after Ethernet
        eth(b, e, 'h88cc);
      end
      default: begin // IPv4 with an unknown protocol: NHRU default address
        eth(b, e, 'h0800);
        hl = ipv4(b, e, 50, plen, none);
        n_ipv4++;
      end
    endcase
    pay_off[k] = b.size();
    pay_len[k] = plen;
    rnd(b, plen);
    if (kind != 6) while (b.size() < 60) b.push_back(8'hee);   // Ethernet padding
    pkt[k]   = b;
    exp_e[k] = e;
  endfunction

  // --------------------------------------------------------- configuration
  task automatic configure();
    cfg_t q[$];
    build_config(q);
    foreach (q[k]) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = q[k].sel; cfg_addr = q[k].addr; cfg_wdata = q[k].data;
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // --------------------------------------------------------------- driver
  int backpressure = 0;
  task automatic drive();
    for (int k = 0; k < NPKT; k++) begin
      int o = 0;
      while (o < pkt[k].size()) begin
        int n = int'($urandom_range(1, 32));
        if (n > pkt[k].size() - o) n = pkt[k].size() - o;
        @(negedge clk);
        in_valid  = 1'b1;
        in_nbytes = 6'(n);
        in_eop    = (o + n == pkt[k].size());
        in_data   = '0;
        for (int j = 0; j < n; j++) in_data[255 - 8*j -: 8] = pkt[k][o + j];
        while (!in_ready) begin backpressure++; @(negedge clk); end
        @(posedge clk);
        o += n;
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
  endtask

  // ------------------------------------------------------------- monitors
  int n_hdr = 0, n_pay = 0;
  byte unsigned got[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int j = 0; j < int'(out_nbytes); j++) got.push_back(out_data[255 - 8*j -: 8]);
      if (out_last) begin
        bit ok = (got.size() == pay_len[n_pay]);
        for (int j = 0; j < got.size() && ok; j++)
          if (got[j] != pkt[n_pay][pay_off[n_pay] + j]) ok = 0;
        check(ok, $sformatf("payload of packet %0d (%0d bytes, want %0d)", n_pay, got.size(),
                            pay_len[n_pay]));
        got = {};
        n_pay++;
      end
    end
  end

  task automatic check_phv(int k);
    foreach (exp_e[k][j]) begin
      @(negedge clk);
      phv_rd_bank = 3'(exp_e[k][j].bank);
      phv_rd_addr = 6'(exp_e[k][j].addr);
      #1;
      check(phv_rd_valid && phv_rd_data == exp_e[k][j].value,
            $sformatf("pkt %0d (kind %0d) PHV bank %0d addr %0d: got %h/%0d want %h", k, k % 9,
                      exp_e[k][j].bank, exp_e[k][j].addr, phv_rd_data, phv_rd_valid,
                      exp_e[k][j].value));
    end
    // a header the packet does not have must leave its containers empty
    @(negedge clk);
    phv_rd_bank = 3'd6;
    phv_rd_addr = (k % 9 == 1 || k % 9 == 2) ? 6'd6 : 6'd10;  // TCP seq / none for UDP
    #1;
    if (k % 9 == 1 || k % 9 == 2) check(!phv_rd_valid, $sformatf("pkt %0d: TCP container set", k));
  endtask

  // ------------------------------------------------------- event counters
  int c_stall = 0, c_hc = 0, c_sub = 0, c_br = 0, c_push = 0, c_def = 0, c_drop = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      c_stall += int'(ev_fh_stall);
      c_hc    += int'(ev_hc_expire);
      c_sub   += int'(ev_sub_return);
      c_br    += int'(ev_branch_taken);
      c_push  += int'(ev_stack_push);
      c_def   += int'(ev_nh_default);
      c_drop  += int'(ev_pf_drop);
    end
  end

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d headers, %0d payloads", n_hdr, n_pay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NPKT; k++) make(k);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();
    @(negedge clk);
    run = 1'b1;
    fork
      drive();
      begin
        for (int k = 0; k < NPKT; k++) begin
          @(posedge clk iff hdr_done);
          check_phv(k);
          @(negedge clk);
          phv_ack = 1'b1;
          @(negedge clk);
          phv_ack = 1'b0;
          n_hdr++;
        end
      end
    join
    wait (n_pay == NPKT);
    repeat (5) @(negedge clk);
    check(n_pay == NPKT, "all payloads forwarded");
    $display("events: fh_stall=%0d hc_expire=%0d sub_return=%0d unit_branch=%0d push=%0d nh_default=%0d pad_drop=%0d backpressure=%0d ipv4_second_word=%0d",
             c_stall, c_hc, c_sub, c_br, c_push, c_def, c_drop, backpressure, n_ipv4);
    check(c_stall > 0, "buffer wait seen");
    check(c_hc > 0, "header counter expiry seen");
    check(c_sub > 0, "sub-header return seen");
    check(c_br > 0, "unit branch seen");
    check(c_push > 0, "stack push seen");
    check(c_def > 0, "NHRU default seen");
    check(c_drop > 0, "padding drop seen");
    check(n_ipv4 > 0, "multi-word NHRU search seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
