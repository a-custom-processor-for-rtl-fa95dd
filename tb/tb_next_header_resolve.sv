// tb_next_header_resolve: loads the IPv4 protocol comparand set (one word)
// and an EtherType set spread over three words, then checks the resolved
// address, the matched flag, the default address when nothing matches, and
// the cycle of ready: start at t, ready at t+1+k for a match in word k.
module tb_next_header_resolve;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, consume = 0, start = 0;
  logic [15:0] key = 0;
  logic [5:0]  base = 0, cfg_addr = 0;
  logic [6:0]  iter = 0;
  iaddr_t      default_addr = 8'd200, target;
  logic        cfg_we_cmp = 0, cfg_we_adr = 0;
  logic [CFG_W-1:0] cfg_wdata = 0;
  logic busy, ready, matched;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  next_header_resolve dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [5:0] a, int vals[$], int tg[$]);
    cmp_word_t c = '0; addr_word_t t = '0;
    foreach (vals[s]) begin c[s].valid = 1; c[s].value = 16'(vals[s]); t[s] = iaddr_t'(tg[s]); end
    @(negedge clk); cfg_addr = a; cfg_wdata = CFG_W'(c); cfg_we_cmp = 1;
    @(negedge clk); cfg_we_cmp = 0; cfg_wdata = CFG_W'(t); cfg_we_adr = 1;
    @(negedge clk); cfg_we_adr = 0;
  endtask

  task automatic look(int k, int b, int it, int exp_t, bit exp_m, int exp_lat);
    int lat = 0;
    @(negedge clk); start = 1; key = 16'(k); base = 6'(b); iter = 7'(it);
    #1 check(busy && !ready, "busy during start");
    @(negedge clk); start = 0;
    while (!ready && lat < 50) begin lat++; #1; if (ready) break; check(busy, "busy while searching"); @(negedge clk); end
    lat++;
    check(ready && target == iaddr_t'(exp_t) && matched == exp_m,
          $sformatf("key %h: target %0d matched %0d, want %0d %0d", k, target, matched, exp_t, exp_m));
    check(lat == exp_lat, $sformatf("key %h: ready after %0d cycles, want %0d", k, lat, exp_lat));
    @(negedge clk); consume = 1;
    @(negedge clk); consume = 0; #1 check(!ready && !busy, "idle after consume");
  endtask

  initial begin
    int none[$];
    none = {};
    for (int a = 0; a < 64; a++) wr(6'(a), none, none);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(5, '{1, 2, 6, 9, 17, 41, 51, 115}, '{10, 11, 12, 13, 14, 15, 16, 17});
    wr(10, '{'h8100, 'h8847}, '{30, 31});
    wr(11, '{'h88a8}, '{32});
    wr(12, '{'h0800, 'h86dd}, '{33, 34});
    look(6, 5, 1, 12, 1, 2);
    look(115, 5, 1, 17, 1, 2);
    look(1, 5, 0, 10, 1, 2);
    look(99, 5, 1, 200, 0, 2);
    look('h8847, 10, 3, 31, 1, 2);
    look('h88a8, 10, 3, 32, 1, 3);
    look('h86dd, 10, 3, 34, 1, 4);
    look('h1234, 10, 3, 200, 0, 4);
    look('h86dd, 10, 2, 200, 0, 3);   // not reached within 2 words
    // clear abandons a search
    @(negedge clk); start = 1; key = 16'h86dd; base = 10; iter = 3;
    @(negedge clk); start = 0; clear = 1;
    @(negedge clk); clear = 0; #1 check(!busy && !ready, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
