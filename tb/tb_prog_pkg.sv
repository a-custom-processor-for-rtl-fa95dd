// tb_prog_pkg: a parse program for the packet parser and packet builders,
// shared by the end-to-end testbenches.
//
// Program map (instruction addresses):
//   0  Ethernet (4 instructions, next header by the NHRU, 2 comparand words)
//   16 IPv4 (IHL -> header counter, Total Length -> payload counter 0,
//      Protocol -> NHRU, IHL > 5 -> options via the branch condition evaluator)
//   24 IPv4 option dispatcher: type/length, branch catalyst on type,
//      length -> sub-header payload counter 1, return address pushed
//   25 unknown option: skip one byte per pass until the sub-header ends
//   28 option type 0x44 (6 bytes), 32 option type 0x07 (4 bytes)
//   40 TCP (data offset -> header counter), 45 TCP options loop
//   48 UDP, 52 VLAN tag, 56 ICMPv6, 60 end of parsing (NHRU default)
//   63 MPLS label (loops while the bottom-of-stack bit is 0)
//   64 IPv6 (fixed 40 bytes, Next Header -> NHRU, Payload Length -> counter)
// PHV placement is listed with each packet builder below.
package tb_prog_pkg;
  import parser_pkg::*;

  typedef struct {
    int unsigned bank;
    int unsigned addr;
    int unsigned value;
  } phv_exp_t;

  // one configuration write
  typedef struct {
    cfg_sel_t         sel;
    logic [7:0]       addr;
    logic [CFG_W-1:0] data;
  } cfg_t;

  function automatic instr_t nop();
    instr_t i;
    i = '0;
    return i;
  endfunction

  function automatic cnt_entry_t cnt_e(logic [1:0] sel, logic sub, logic use_f,
                                       logic [1:0] sh, int off);
    cnt_entry_t e;
    e.pc_sel = sel; e.pc_sub = sub; e.use_field = use_f; e.shift = sh;
    e.offset = 16'(off);
    return e;
  endfunction

  function automatic void add_cmp(ref cfg_t q[$], input logic [5:0] a,
                                  input int vals[$], input int tgts[$]);
    cmp_word_t  c;
    addr_word_t t;
    c = '0; t = '0;
    foreach (vals[s]) begin
      c[s].valid = 1'b1; c[s].value = 16'(vals[s]); t[s] = iaddr_t'(tgts[s]);
    end
    q.push_back('{CFG_NH_CMP, 8'(a), CFG_W'(c)});
    q.push_back('{CFG_NH_ADR, 8'(a), CFG_W'(t)});
  endfunction

  function automatic void add_bc(ref cfg_t q[$], input logic [5:0] a,
                                 input int vals[$], input int tgts[$]);
    cmp_word_t  c;
    addr_word_t t;
    c = '0; t = '0;
    foreach (vals[s]) begin
      c[s].valid = 1'b1; c[s].value = 16'(vals[s]); t[s] = iaddr_t'(tgts[s]);
    end
    q.push_back('{CFG_BC_CMP, 8'(a), CFG_W'(c)});
    q.push_back('{CFG_BC_ADR, 8'(a), CFG_W'(t)});
  endfunction

  function automatic void add_bce(ref cfg_t q[$], input logic [5:0] a, input int r, input int tgt);
    bce_entry_t e;
    e.ref_val = 16'(r); e.target = iaddr_t'(tgt);
    q.push_back('{CFG_BCE, 8'(a), CFG_W'(e)});
  endfunction

  // The whole configuration: memories cleared, then program and parameters.
  function automatic void build_config(ref cfg_t q[$]);
    instr_t p [256];
    instr_t i;
    foreach (p[k]) p[k] = nop();

    // ---- Ethernet
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W;  i.phv_a2 = 0; p[0] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 0; i.phv_a3 = 0; p[1] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W;  i.phv_a2 = 1; p[2] = i;
    i = nop(); i.seg = SEG_2; i.phv_mode = PF_H;  i.phv_a2 = 1;
    i.xm_nh = 5'd13; i.a_nh = 0; i.nh_iter = 2; i.br_type = BR_NH; p[3] = i;
    // ---- IPv4
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_BBH; i.phv_a0 = 0; i.phv_a1 = 0; i.phv_a3 = 1;
    i.xm_hc = 5'd2; i.a_hc = 1;                 // IHL * 4
    i.xm_pc = 5'd15; i.a_pc = 0;                // Total Length
    i.xm_bce = 5'd2; i.br_cond = C_GT; i.a_bc = 0; // IHL > 5 ?
    p[16] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 2; i.phv_a3 = 2; p[17] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_BBH; i.phv_a0 = 1; i.phv_a1 = 1; i.phv_a3 = 3;
    i.xm_nh = 5'd10; i.a_nh = 2; i.nh_iter = 1; p[18] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 2; p[19] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 3; i.br_type = BR_BCE; p[20] = i;
    // ---- IPv4 options
    i = nop(); i.seg = SEG_2; i.phv_mode = PF_BB; i.phv_a0 = 2; i.phv_a1 = 2;
    i.xm_bc = 5'd9; i.a_bc = 1; i.xm_pc = 5'd10; i.a_pc = 1;
    i.stk_push = 1'b1; i.stk_next = 1'b0; i.br_type = BR_BC; p[24] = i;
    i = nop(); i.seg = SEG_1; i.xm_bce = 5'd31; i.br_cond = C_ALWAYS; i.a_bc = 2;
    i.br_type = BR_BCE; p[25] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 4; p[28] = i;
    i = nop(); i.seg = SEG_2; i.phv_mode = PF_H; i.phv_a2 = 5; p[32] = i;
    // ---- TCP
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 6; i.phv_a3 = 6; p[40] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 6; p[41] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 7; p[42] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_BBH; i.phv_a0 = 4; i.phv_a1 = 4; i.phv_a3 = 7;
    i.xm_hc = 5'd1; i.a_hc = 5; p[43] = i;      // data offset nibble
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 8; i.phv_a3 = 8; p[44] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 9;
    i.xm_bce = 5'd31; i.br_cond = C_ALWAYS; i.a_bc = 4; i.br_type = BR_BCE; p[45] = i;
    // ---- UDP
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 10; i.phv_a3 = 10;
    i.xm_hc = 5'd31; i.a_hc = 2;
    i.xm_nh = 5'd15; i.a_nh = 4; i.nh_iter = 1; p[48] = i;   // destination port
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 11; i.phv_a3 = 11; p[49] = i;
    // ---- VLAN
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 12; i.phv_a3 = 12;
    i.xm_nh = 5'd15; i.a_nh = 0; i.nh_iter = 2; i.br_type = BR_NH; p[52] = i;
    // ---- ICMPv6
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_BBH; i.phv_a0 = 6; i.phv_a1 = 6; i.phv_a3 = 13;
    i.xm_hc = 5'd31; i.a_hc = 2; p[56] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 13; p[57] = i;
    // ---- end of parsing
    i = nop(); i.xm_hc = 5'd31; i.a_hc = 3; p[60] = i;
    // ---- MPLS
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 30;
    i.xm_bce = 5'd14; i.br_cond = C_CLR; i.a_bc = 3; i.br_type = BR_BCE; p[63] = i;
    // ---- IPv6
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 20; i.xm_hc = 5'd31; i.a_hc = 4; p[64] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HBB; i.phv_a2 = 20; i.phv_a0 = 5; i.phv_a1 = 5;
    i.xm_nh = 5'd11; i.a_nh = 3; i.nh_iter = 1; i.xm_pc = 5'd13; i.a_pc = 2; p[65] = i;
    for (int k = 0; k < 8; k++) begin
      i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 6'(21 + k); p[66 + k] = i;
    end

    // ---- VXLAN (UDP port 4789): 32b[34]=flags word 32b[35]=VNI word
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 34; i.xm_hc = 5'd31; i.a_hc = 2;
    p[116] = i;
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 35; p[117] = i;
    // ---- L2TP (UDP port 1701): the first byte's L, S and O flags select one
    // of eight handlers at 120 + 4*f (f = {L,S,O}) through the branch
    // catalyst; each handler reads the fields present and ends with an
    // unconditional evaluator branch to the end of parsing.
    // 16b0[16]=flags/version 16b0[15]=length 32b[36]=tunnel/session IDs
    // 32b[37]=Ns/Nr 16b0[17]=offset size (offset padding assumed absent)
    i = nop(); i.seg = SEG_2; i.phv_mode = PF_H; i.phv_a2 = 16;
    i.xm_bc = 5'd9; i.a_bc = 6; i.br_type = BR_BC; p[118] = i;
    for (int f = 0; f < 8; f++) begin
      int n = 0;
      if (f[2]) begin
        i = nop(); i.seg = SEG_2; i.phv_mode = PF_H; i.phv_a2 = 15; p[120 + 4 * f + n] = i; n++;
      end
      i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 36; p[120 + 4 * f + n] = i; n++;
      if (f[1]) begin
        i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 37; p[120 + 4 * f + n] = i; n++;
      end
      if (f[0]) begin
        i = nop(); i.seg = SEG_2; i.phv_mode = PF_H; i.phv_a2 = 17; p[120 + 4 * f + n] = i; n++;
      end
      p[120 + 4 * f + n - 1].xm_bce  = 5'd31;
      p[120 + 4 * f + n - 1].br_cond = C_ALWAYS;
      p[120 + 4 * f + n - 1].a_bc    = 6;
      p[120 + 4 * f + n - 1].br_type = BR_BCE;
    end
    // ---- GRE: flags C,K,S select one of eight handlers through the branch
    // catalyst; the protocol type is resolved by the NHRU meanwhile and used
    // by the handler's last instruction. Handler for flags s at 84 + 4*s.
    i = nop(); i.seg = SEG_4; i.phv_mode = PF_HH; i.phv_a2 = 14; i.phv_a3 = 14;
    i.xm_bc = 5'd1; i.a_bc = 5; i.xm_nh = 5'd15; i.a_nh = 0; i.nh_iter = 2;
    i.br_type = BR_BC; p[80] = i;
    for (int f = 0; f < 8; f++) begin
      int n = 0;
      for (int k = 2; k >= 0; k--) begin
        if (f[k]) begin
          i = nop(); i.seg = SEG_4; i.phv_mode = PF_W; i.phv_a2 = 6'(31 + (2 - k));
          p[84 + 4 * f + n] = i;
          n++;
        end
      end
      if (n == 0) begin p[84 + 4 * f] = nop(); n = 1; end
      p[84 + 4 * f + n - 1].br_type = BR_NH;
    end

    q.delete();
    foreach (p[k]) q.push_back('{CFG_IMEM, 8'(k), CFG_W'(p[k])});
    for (int a = 0; a < 64; a++) begin
      q.push_back('{CFG_NH_CMP, 8'(a), '0});
      q.push_back('{CFG_BC_CMP, 8'(a), '0});
      q.push_back('{CFG_NH_ADR, 8'(a), '0});
      q.push_back('{CFG_BC_ADR, 8'(a), '0});
      q.push_back('{CFG_BCE,    8'(a), '0});
      q.push_back('{CFG_HC,     8'(a), '0});
      q.push_back('{CFG_PC,     8'(a), '0});
    end
    add_cmp(q, 0, '{'h86dd, 'h8100, 'h8847}, '{64, 52, 63});
    add_cmp(q, 1, '{'h0800}, '{16});
    add_cmp(q, 2, '{6, 17, 47}, '{40, 48, 80});
    add_cmp(q, 3, '{6, 17, 58}, '{40, 48, 56});
    add_cmp(q, 4, '{4789, 1701}, '{116, 118});
    add_bc(q, 6, '{'h00, 'h02, 'h08, 'h0a, 'h40, 'h42, 'h48, 'h4a},
              '{120, 124, 128, 132, 136, 140, 144, 148});
    add_bce(q, 6, 0, 60);
    q.push_back('{CFG_NH_DEF, 8'd0, CFG_W'(60)});
    add_bc(q, 1, '{'h44, 'h07}, '{28, 32});
    add_bc(q, 5, '{'h0, 'h1, 'h2, 'h3, 'h8, 'h9, 'ha, 'hb},
              '{84, 88, 92, 96, 100, 104, 108, 112});
    add_bce(q, 0, 5, 24);
    add_bce(q, 2, 0, 25);
    add_bce(q, 3, 1, 63);
    add_bce(q, 4, 0, 45);
    q.push_back('{CFG_HC, 8'd1, CFG_W'(cnt_e(0, 0, 1, 2, 0))});
    q.push_back('{CFG_HC, 8'd2, CFG_W'(cnt_e(0, 0, 0, 0, 8))});
    q.push_back('{CFG_HC, 8'd3, CFG_W'(cnt_e(0, 0, 0, 0, 0))});
    q.push_back('{CFG_HC, 8'd4, CFG_W'(cnt_e(0, 0, 0, 0, 40))});
    q.push_back('{CFG_HC, 8'd5, CFG_W'(cnt_e(0, 0, 1, 2, -12))});
    q.push_back('{CFG_PC, 8'd0, CFG_W'(cnt_e(0, 0, 1, 0, 0))});
    q.push_back('{CFG_PC, 8'd1, CFG_W'(cnt_e(1, 1, 1, 0, 0))});
    q.push_back('{CFG_PC, 8'd2, CFG_W'(cnt_e(0, 0, 1, 0, 36))});
  endfunction

  // ---------------------------------------------------------- packets
  function automatic void put16(ref byte unsigned b[$], input int v);
    b.push_back(8'(v >> 8)); b.push_back(8'(v));
  endfunction
  function automatic void put32(ref byte unsigned b[$], input int unsigned v);
    put16(b, int'(v >> 16)); put16(b, int'(v & 'hffff));
  endfunction
  function automatic int unsigned get(ref byte unsigned b[$], input int o, input int n);
    int unsigned v = 0;
    for (int k = 0; k < n; k++) v = (v << 8) | 32'(b[o + k]);
    return v;
  endfunction
  function automatic void rnd(ref byte unsigned b[$], input int n);
    for (int k = 0; k < n; k++) b.push_back(8'($urandom));
  endfunction

  // Ethernet: 32b[0]=dst[47:16] 16b0[0]=dst[15:0] 16b1[0]=src[47:32]
  // 32b[1]=src[31:0] 16b0[1]=EtherType
  function automatic void eth(ref byte unsigned b[$], ref phv_exp_t e[$], input int etype);
    int o = b.size();
    rnd(b, 12); put16(b, etype);
    e.push_back('{6, 0, get(b, o, 4)});
    e.push_back('{4, 0, get(b, o + 4, 2)});
    e.push_back('{5, 0, get(b, o + 6, 2)});
    e.push_back('{6, 1, get(b, o + 8, 4)});
    e.push_back('{4, 1, etype});
  endfunction

  // VLAN: 16b0[12]=TCI 16b1[12]=inner type
  function automatic void vlan(ref byte unsigned b[$], ref phv_exp_t e[$], input int etype);
    int tci = int'($urandom & 'hffff);
    put16(b, tci); put16(b, etype);
    e.push_back('{4, 12, tci});
    e.push_back('{5, 12, etype});
  endfunction

  // IPv4 with options (a list of {type,len}); returns header length
  function automatic int ipv4(ref byte unsigned b[$], ref phv_exp_t e[$], input int proto,
                              input int l4_and_payload, input int opts[$]);
    int o = b.size();
    int olen = 0, ihl, tl, p;
    int last_t = -1, last_l = 0;
    foreach (opts[k]) if (k % 2 == 1) olen += opts[k];
    ihl = 5 + (olen + 3) / 4;
    tl  = ihl * 4 + l4_and_payload;
    b.push_back(8'('h40 | ihl)); b.push_back(8'($urandom)); put16(b, tl);
    rnd(b, 4);
    b.push_back(8'($urandom)); b.push_back(8'(proto)); rnd(b, 2);
    rnd(b, 8);
    e.push_back('{0, 0, 'h40 | ihl});
    e.push_back('{1, 0, get(b, o + 1, 1)});
    e.push_back('{5, 1, tl});
    e.push_back('{4, 2, get(b, o + 4, 2)});
    e.push_back('{5, 2, get(b, o + 6, 2)});
    e.push_back('{0, 1, get(b, o + 8, 1)});
    e.push_back('{1, 1, proto});
    e.push_back('{5, 3, get(b, o + 10, 2)});
    e.push_back('{6, 2, get(b, o + 12, 4)});
    e.push_back('{6, 3, get(b, o + 16, 4)});
    for (int k = 0; k < opts.size(); k += 2) begin
      p = b.size();
      b.push_back(8'(opts[k])); b.push_back(8'(opts[k+1]));
      rnd(b, opts[k+1] - 2);
      last_t = opts[k]; last_l = opts[k+1];
      if (opts[k] == 'h44) e.push_back('{6, 4, get(b, p + 2, 4)});
      if (opts[k] == 'h07) e.push_back('{4, 5, get(b, p + 2, 2)});
    end
    if (last_t >= 0) begin
      e.push_back('{0, 2, last_t});
      e.push_back('{1, 2, last_l});
    end
    return ihl * 4;
  endfunction

  // IPv6: 32b[20]=word0 16b0[20]=payload length 8b0[5]=next header
  // 8b1[5]=hop limit 32b[21..28]=addresses
  function automatic void ipv6(ref byte unsigned b[$], ref phv_exp_t e[$], input int nh,
                               input int paylen);
    int o = b.size();
    put32(b, 32'h6000_0000 | ($urandom & 'h0fff_ffff));
    put16(b, paylen); b.push_back(8'(nh)); b.push_back(8'($urandom));
    rnd(b, 32);
    e.push_back('{6, 20, get(b, o, 4)});
    e.push_back('{4, 20, paylen});
    e.push_back('{0, 5, nh});
    e.push_back('{1, 5, get(b, o + 7, 1)});
    for (int k = 0; k < 8; k++) e.push_back('{6, 21 + k, get(b, o + 8 + 4*k, 4)});
  endfunction

  // TCP with nopt option words: 16b0[6]=sport 16b1[6]=dport 32b[6]=seq
  // 32b[7]=ack 8b0[4]=data offset 8b1[4]=flags 16b1[7]=window 16b0[8]=csum
  // 16b1[8]=urgent 32b[9]=last option word
  function automatic void tcp(ref byte unsigned b[$], ref phv_exp_t e[$], input int nopt);
    int o = b.size();
    rnd(b, 12);
    b.push_back(8'((5 + nopt) << 4)); b.push_back(8'($urandom)); rnd(b, 6);
    rnd(b, 4 * nopt);
    e.push_back('{4, 6, get(b, o, 2)});
    e.push_back('{5, 6, get(b, o + 2, 2)});
    e.push_back('{6, 6, get(b, o + 4, 4)});
    e.push_back('{6, 7, get(b, o + 8, 4)});
    e.push_back('{0, 4, get(b, o + 12, 1)});
    e.push_back('{1, 4, get(b, o + 13, 1)});
    e.push_back('{5, 7, get(b, o + 14, 2)});
    e.push_back('{4, 8, get(b, o + 16, 2)});
    e.push_back('{5, 8, get(b, o + 18, 2)});
    if (nopt > 0) e.push_back('{6, 9, get(b, o + 20 + 4*(nopt-1), 4)});
  endfunction

  // GRE with flags {C,K,S}: 16b0[14]=flags/version 16b1[14]=protocol type
  // 32b[31]=checksum word 32b[32]=key 32b[33]=sequence number
  function automatic int gre(ref byte unsigned b[$], ref phv_exp_t e[$], input int flags,
                             input int ptype);
    int w0 = (((flags >> 2) & 1) << 15) | (((flags >> 1) & 1) << 13) | ((flags & 1) << 12);
    int n = 4;
    put16(b, w0); put16(b, ptype);
    e.push_back('{4, 14, w0});
    e.push_back('{5, 14, ptype});
    for (int k = 2; k >= 0; k--) begin
      if ((flags >> k) & 1) begin
        int unsigned w = $urandom;
        put32(b, w);
        e.push_back('{6, 31 + (2 - k), w});
        n += 4;
      end
    end
    return n;
  endfunction

  // UDP: 16b0[10]=sport 16b1[10]=dport 16b0[11]=length 16b1[11]=csum
  // (a random destination port never equal to the VXLAN port, or dport >= 0)
  function automatic void udp(ref byte unsigned b[$], ref phv_exp_t e[$], input int len,
                              input int dport = -1);
    int o = b.size();
    int dp = (dport >= 0) ? dport : int'($urandom_range(0, 4000));
    put16(b, int'($urandom & 'hffff)); put16(b, dp); put16(b, len); rnd(b, 2);
    e.push_back('{4, 10, get(b, o, 2)});
    e.push_back('{5, 10, get(b, o + 2, 2)});
    e.push_back('{4, 11, len});
    e.push_back('{5, 11, get(b, o + 6, 2)});
  endfunction

  // VXLAN: 32b[34]=flags and reserved 32b[35]=VNI and reserved
  function automatic void vxlan(ref byte unsigned b[$], ref phv_exp_t e[$]);
    int unsigned w0 = 32'h0800_0000 | ($urandom & 'h00ff_ffff);
    int unsigned w1 = $urandom;
    put32(b, w0); put32(b, w1);
    e.push_back('{6, 34, w0});
    e.push_back('{6, 35, w1});
  endfunction

  // L2TP data message with flags f = {L,S,O}; returns its length
  function automatic int l2tp(ref byte unsigned b[$], ref phv_exp_t e[$], input int f);
    int o = b.size();
    int w0 = ((((f >> 2) & 1) << 6) | (((f >> 1) & 1) << 3) | ((f & 1) << 1)) << 8 | 2;
    int unsigned w;
    put16(b, w0);
    e.push_back('{4, 16, w0});
    if ((f >> 2) & 1) begin
      w = $urandom & 'hffff; put16(b, int'(w)); e.push_back('{4, 15, w});
    end
    w = $urandom; put32(b, w); e.push_back('{6, 36, w});
    if ((f >> 1) & 1) begin
      w = $urandom; put32(b, w); e.push_back('{6, 37, w});
    end
    if (f & 1) begin
      put16(b, 0); e.push_back('{4, 17, 0});
    end
    return b.size() - o;
  endfunction

  // ICMPv6: 8b0[6]=type 8b1[6]=code 16b1[13]=csum 32b[13]=second word
  function automatic void icmpv6(ref byte unsigned b[$], ref phv_exp_t e[$]);
    int o = b.size();
    b.push_back(8'd1); b.push_back(8'd3); rnd(b, 6);
    e.push_back('{0, 6, 1});
    e.push_back('{1, 6, 3});
    e.push_back('{5, 13, get(b, o + 2, 2)});
    e.push_back('{6, 13, get(b, o + 4, 4)});
  endfunction

  // MPLS label stack entry: 32b[30]=last entry
  function automatic void mpls(ref byte unsigned b[$], ref phv_exp_t e[$], input bit bos,
                               input bit last_written);
    int unsigned w = ($urandom & 'hffff_feff) | (bos ? 32'h100 : 0);
    put32(b, w);
    if (last_written) e.push_back('{6, 30, w});
  endfunction
endpackage
