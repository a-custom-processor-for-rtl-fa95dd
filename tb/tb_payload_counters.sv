// tb_payload_counters: a payload-size counter loaded from an IPv4 Total
// Length (counted from the loading word) is reduced by header reads and by
// forwarded bytes and reports what is left; sub-header counters expire and
// raise sub_expire in the cycle their last byte is read; clear_sub drops
// only sub-header counters.
module tb_payload_counters;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, clear_sub = 0, load = 0;
  cnt_entry_t entry = '0;
  logic [31:0] field = 0;
  logic [2:0]  ex_bytes = 0, fh_bytes = 0;
  logic [5:0]  pf_bytes = 0;
  logic        sub_expire, pay_valid;
  logic [15:0] pay_left;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  payload_counters dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(!pay_valid, "nothing loaded after reset");
    // counter 2: payload kind, Total Length 100, loaded while the next word is read
    @(negedge clk);
    load = 1; entry = '0; entry.pc_sel = 2; entry.use_field = 1; field = 100;
    ex_bytes = 4; fh_bytes = 4;
    @(negedge clk); load = 0; fh_bytes = 0;
    #1 check(pay_valid && pay_left == 92, $sformatf("after load %0d", pay_left));
    repeat (3) begin @(negedge clk); fh_bytes = 4; end  // 3 more header words
    @(negedge clk); fh_bytes = 0;
    #1 check(pay_left == 80, $sformatf("after header %0d", pay_left));
    // counter 1: sub-header of 6 bytes loaded by its 2-byte type/length read
    @(negedge clk);
    load = 1; entry = '0; entry.pc_sel = 1; entry.pc_sub = 1; entry.use_field = 1; field = 6;
    ex_bytes = 2; fh_bytes = 0;
    #1 check(!sub_expire, "no sub expiry at load");
    @(negedge clk); load = 0; fh_bytes = 2; #1 check(!sub_expire, "2 of 4 left");
    @(negedge clk); fh_bytes = 2; #1 check(sub_expire, "sub-header expires on its last bytes");
    check(pay_left == 78, $sformatf("payload counter also counts header %0d", pay_left));
    @(negedge clk); fh_bytes = 0; #1 check(!sub_expire, "sub expiry is one event");
    // forwarding
    @(negedge clk); pf_bytes = 32;
    @(negedge clk); pf_bytes = 32;
    @(negedge clk); pf_bytes = 12;
    @(negedge clk); pf_bytes = 0;
    #1 check(pay_valid && pay_left == 0, $sformatf("forwarded all %0d", pay_left));
    // clear_sub keeps the payload counter
    @(negedge clk);
    load = 1; entry = '0; entry.pc_sel = 0; entry.pc_sub = 1; entry.offset = 16'd50; ex_bytes = 2;
    @(negedge clk); load = 0; clear_sub = 1;
    @(negedge clk); clear_sub = 0; fh_bytes = 4;
    repeat (20) begin #1 check(!sub_expire, "cleared sub counter never expires"); @(negedge clk); end
    fh_bytes = 0;
    check(pay_valid, "payload counter kept by clear_sub");
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0; #1 check(!pay_valid, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
