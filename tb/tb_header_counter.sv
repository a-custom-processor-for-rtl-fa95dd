// tb_header_counter: loads the counter the way an IPv4 first word does
// (IHL * 4 with the loading word and the next word already read), then reads
// 4-byte segments and checks the cycle of expiry; also a constant-size header
// and a load that expires at once.
module tb_header_counter;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, load = 0;
  cnt_entry_t entry = '0;
  logic [31:0] field = 0;
  logic [2:0]  ex_bytes = 0, fh_bytes = 0;
  logic        active, expire;
  logic [15:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  header_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // returns the number of further 4-byte reads until expiry (expiry cycle included)
  task automatic run_case(int ihl_words, int fh_at_load, output int reads);
    @(negedge clk);
    load = 1; entry = '0; entry.use_field = 1; entry.shift = 2; field = 32'(ihl_words);
    ex_bytes = 4; fh_bytes = 3'(fh_at_load);
    #1;
    check(!expire || ihl_words * 4 <= 4 + fh_at_load, "no early expiry at load");
    @(negedge clk);
    load = 0;
    reads = 0;
    while (1) begin
      fh_bytes = 4; #1;
      reads++;
      if (expire) break;
      check(active, "active while counting");
      if (reads > 100) break;
      @(negedge clk);
    end
    @(negedge clk); fh_bytes = 0; #1;
    check(!active && !expire, "idle after expiry");
  endtask

  initial begin
    int r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ihl = 5; ihl <= 15; ihl++) begin
      run_case(ihl, 4, r);
      check(r == ihl - 2, $sformatf("IHL %0d expires after %0d more reads (got %0d)", ihl, ihl - 2, r));
    end
    // constant 14-byte header loaded by the first 4-byte word, FH idle
    @(negedge clk);
    load = 1; entry = '0; entry.offset = 16'd14; field = 32'hffff; ex_bytes = 4; fh_bytes = 0;
    @(negedge clk); load = 0; fh_bytes = 4; #1; check(!expire, "14: 6 left");
    check(count == 10, "count after load");
    @(negedge clk); fh_bytes = 4; #1; check(!expire, "14: 2 left");
    check(count == 6, "count before the third read");
    @(negedge clk); fh_bytes = 2; #1; check(expire, "14: expires on the last 2 bytes");
    // target 0 expires in the loading cycle
    @(negedge clk); fh_bytes = 0;
    load = 1; entry = '0; ex_bytes = 0; #1;
    check(expire, "zero target expires at once");
    @(negedge clk); load = 0; #1;
    check(!active, "idle after zero target");
    // clear
    @(negedge clk); load = 1; entry = '0; entry.offset = 16'd100; ex_bytes = 4;
    @(negedge clk); load = 0; clear = 1;
    @(negedge clk); clear = 0; #1;
    check(!active, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
