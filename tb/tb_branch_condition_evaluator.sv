// tb_branch_condition_evaluator: random fields and reference values under
// every condition code, compared with a reference; includes the EtherType
// "<= 1500 is a length" case. Ready two cycles after start.
module tb_branch_condition_evaluator;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, consume = 0, start = 0;
  logic [15:0] key = 0;
  cond_t cond = C_ALWAYS;
  logic [5:0]  base = 0, cfg_addr = 0;
  logic        cfg_we = 0;
  logic [CFG_W-1:0] cfg_wdata = 0;
  logic busy, ready, taken;
  iaddr_t target;
  int checks = 0, failures = 0;
  logic [15:0] refs [64];
  always #5 clk = ~clk;

  branch_condition_evaluator dut (.*);

  function automatic bit model(int c, logic [15:0] k, logic [15:0] r);
    case (c)
      0: return 1;
      1: return k == r;
      2: return k != r;
      3: return k < r;
      4: return k <= r;
      5: return k > r;
      6: return k >= r;
      default: return (k & r) == 0;
    endcase
  endfunction

  task automatic eval(int a, logic [15:0] k, int c);
    @(negedge clk); start = 1; key = k; cond = cond_t'(c); base = 6'(a);
    @(negedge clk); start = 0; #1;
    checks++; if (!busy || ready) begin failures++; $display("FAIL status"); end
    @(negedge clk); #1;
    checks++;
    if (!ready || taken !== model(c, k, refs[a]) || target !== iaddr_t'(a + 1)) begin
      failures++;
      $display("FAIL cond %0d key %h ref %h: taken %0d", c, k, refs[a], taken);
    end
    consume = 1; @(negedge clk); consume = 0;
  endtask

  initial begin
    bce_entry_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      refs[a] = (a == 0) ? 16'd1500 : 16'($urandom);
      e.ref_val = refs[a]; e.target = iaddr_t'(a + 1);
      @(negedge clk); cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = CFG_W'(e);
    end
    @(negedge clk); cfg_we = 0;
    eval(0, 16'd1500, 4);
    eval(0, 16'd1501, 4);
    eval(0, 16'h0800, 4);
    for (int n = 0; n < 400; n++) begin
      int a = int'($urandom_range(1, 63));
      eval(a, ($urandom_range(0, 3) == 0) ? refs[a] : 16'($urandom), int'($urandom_range(0, 7)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
