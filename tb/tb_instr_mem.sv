// tb_instr_mem: writes a random program, reads it back in random order with
// one cycle of latency and checks the output holds while re is low (the FH
// stall).
module tb_instr_mem;
  import parser_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  instr_t wdata = '0, rdata;
  instr_t ref_m [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  instr_mem dut (.*);

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a);
      wdata = instr_t'({$urandom, $urandom, $urandom}); ref_m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      int a = int'($urandom_range(0, 255));
      @(negedge clk); re = 1; raddr = 8'(a);
      @(negedge clk); re = 0; raddr = 8'($urandom);
      checks++; if (rdata !== ref_m[a]) begin failures++; $display("FAIL addr %0d", a); end
      @(negedge clk);
      checks++; if (rdata !== ref_m[a]) begin failures++; $display("FAIL hold %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
