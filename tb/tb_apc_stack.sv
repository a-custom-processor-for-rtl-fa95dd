// tb_apc_stack: random pushes and pops against a queue model, including
// overflow (push on full is dropped and flagged), push+pop replacing the top
// and clear.
module tb_apc_stack;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  iaddr_t push_addr = 0, top;
  logic empty, overflow;
  iaddr_t model[$];
  bit exp_ovf;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apc_stack #(.DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || (model.size() > 0 && top !== model[$]) ||
          overflow !== exp_ovf) begin
        failures++;
        $display("FAIL size %0d empty %0d top %0d ovf %0d", model.size(), empty, top, overflow);
      end
      clear = ($urandom_range(0, 60) == 0);
      push = $urandom_range(0, 1); pop = $urandom_range(0, 1); push_addr = iaddr_t'($urandom);
      exp_ovf = 0;
      if (clear) model.delete();
      else if (push && pop && model.size() > 0) model[$] = push_addr;
      else if (pop && model.size() > 0) void'(model.pop_back());
      else if (push) begin
        if (model.size() == 4) exp_ovf = 1; else model.push_back(push_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
