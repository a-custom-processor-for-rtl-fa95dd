// tb_branch_catalyst: the eight GRE flag combinations (C, K, S present or
// not, read as the first nibble) each select their own handler in one
// memory access; a value with no comparand reports no match. Ready two
// cycles after start.
module tb_branch_catalyst;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, consume = 0, start = 0;
  logic [15:0] key = 0;
  logic [5:0]  base = 0, cfg_addr = 0;
  logic        cfg_we_cmp = 0, cfg_we_adr = 0;
  logic [CFG_W-1:0] cfg_wdata = 0;
  logic busy, ready, matched;
  iaddr_t target;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  branch_catalyst dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cmp_word_t c = '0; addr_word_t t = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // GRE first nibble C R K S with R = 0: values {C,0,K,S}
    for (int s = 0; s < 8; s++) begin
      c[s].valid = 1; c[s].value = 16'({s[2], 1'b0, s[1], s[0]});
      t[s] = iaddr_t'(100 + 3 * s);
    end
    @(negedge clk); cfg_addr = 7; cfg_wdata = CFG_W'(c); cfg_we_cmp = 1;
    @(negedge clk); cfg_we_cmp = 0; cfg_wdata = CFG_W'(t); cfg_we_adr = 1;
    @(negedge clk); cfg_we_adr = 0;
    for (int f = 0; f < 16; f++) begin
      @(negedge clk); start = 1; key = 16'(f); base = 7;
      @(negedge clk); start = 0; #1 check(busy && !ready, "one cycle in progress");
      @(negedge clk); #1;
      check(ready, "ready two cycles after start");
      if (f[2] == 0) begin
        int s;
        s = {f[3], f[1], f[0]};
        check(matched && target == iaddr_t'(100 + 3 * s), $sformatf("flags %b -> %0d", f[3:0], target));
      end else
        check(!matched, $sformatf("flags %b: reserved bit set, no match", f[3:0]));
      consume = 1;
      @(negedge clk); consume = 0; #1 check(!ready, "consumed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
