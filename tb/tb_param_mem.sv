// tb_param_mem: fills the memory, reads it back with one cycle of latency,
// and checks that the output holds while the read enable is low.
module tb_param_mem;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [5:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_m [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  param_mem #(.WIDTH(32), .DEPTH(64)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (rdata !== 0) begin failures++; $display("FAIL reset value"); end
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = $urandom; ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      int a = int'($urandom_range(0, 63));
      @(negedge clk); re = 1; raddr = 6'(a);
      @(negedge clk); re = 0; raddr = 6'($urandom);
      checks++;
      if (rdata !== ref_m[a]) begin failures++; $display("FAIL addr %0d", a); end
      @(negedge clk);
      checks++;
      if (rdata !== ref_m[a]) begin failures++; $display("FAIL hold addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
