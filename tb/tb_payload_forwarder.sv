// tb_payload_forwarder: an incoming_packets_buffer is filled with packets
// whose first bytes stand for already parsed headers (popped by the
// testbench), then the forwarder is started. Covered: payload counter loaded
// (forward exactly pay_left bytes, drop the padding up to the end mark),
// no payload counter (forward up to the end mark), payload longer than 32
// bytes, and a packet already complete (done at once). The testbench models
// the payload counter by subtracting pf_bytes.
module tb_payload_forwarder;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_eop = 0, in_ready;
  logic [255:0] in_data = 0;
  logic [5:0]   in_nbytes = 0;
  logic [255:0] win_data;
  logic [31:0]  win_eop;
  logic [8:0]   avail;
  logic tb_pop = 0; logic [5:0] tb_pop_n = 0;
  logic pf_pop; logic [5:0] pf_pop_n;
  logic start = 0, eop_seen = 0, pay_valid = 0;
  logic [CNT_W-1:0] pay_left = 0;
  logic [5:0] pf_bytes, out_nbytes;
  logic out_valid, out_last, done, busy;
  logic [255:0] out_data;
  int checks = 0, failures = 0, drops = 0;
  byte unsigned got[$];
  always #5 clk = ~clk;

  incoming_packets_buffer ipb (.clk, .rst_n, .in_valid, .in_data, .in_nbytes, .in_eop, .in_ready,
                               .win_data, .win_eop, .avail, .pop(tb_pop | pf_pop),
                               .pop_n(tb_pop ? tb_pop_n : pf_pop_n));
  payload_forwarder dut (.clk, .rst_n, .start, .eop_seen, .win_data, .win_eop, .avail,
                         .pop(pf_pop), .pop_n(pf_pop_n), .pay_valid, .pay_left, .pf_bytes,
                         .out_valid, .out_data, .out_nbytes, .out_last, .done, .busy);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (out_valid) for (int j = 0; j < int'(out_nbytes); j++) got.push_back(out_data[255 - 8*j -: 8]);
    if (pay_valid) pay_left <= pay_left - CNT_W'(pf_bytes);
    if (pf_pop && !out_valid) drops++;
  end

  // one packet: hdr header bytes, pay payload bytes, pad padding bytes
  task automatic one(int hdr, int pay, int pad, bit counted);
    byte unsigned b[$];
    int o = 0, cyc = 0;
    bit saw_last = 0;
    for (int i = 0; i < hdr + pay + pad; i++) b.push_back(8'($urandom));
    while (o < b.size()) begin
      int n = (b.size() - o > 32) ? 32 : b.size() - o;
      @(negedge clk); in_valid = 1; in_nbytes = 6'(n); in_eop = (o + n == b.size());
      for (int j = 0; j < n; j++) in_data[255 - 8*j -: 8] = b[o + j];
      o += n;
    end
    @(negedge clk); in_valid = 0;
    // the header parser's share
    for (int h = hdr; h > 0; h -= 4) begin
      tb_pop = 1; tb_pop_n = 6'(h > 4 ? 4 : h); @(negedge clk);
    end
    tb_pop = 0;
    got = {};
    pay_valid = counted; pay_left = CNT_W'(pay);
    eop_seen = (pay + pad == 0);
    start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 100) begin
      if (out_valid && out_last) saw_last = 1;
      @(negedge clk); cyc++;
    end
    check(done, "done");
    check(got.size() == (counted ? pay : pay + pad), $sformatf("forwarded %0d bytes", got.size()));
    for (int j = 0; j < got.size(); j++) check(got[j] == b[hdr + j], $sformatf("byte %0d", j));
    if (got.size() > 0) check(saw_last, "out_last seen");
    check(avail == 0 && !busy, "buffer empty and idle afterwards");
    pay_valid = 0; eop_seen = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(14, 20, 26, 1);    // counted payload with Ethernet padding
    one(40, 100, 0, 1);    // long payload, no padding
    one(20, 7, 0, 0);      // to the end mark
    one(54, 0, 6, 1);      // no payload, padding only
    one(60, 0, 0, 1);      // headers reached the end: done at once
    for (int k = 0; k < 30; k++)
      one(4 * int'($urandom_range(1, 12)), int'($urandom_range(0, 90)), int'($urandom_range(0, 20)),
          $urandom_range(0, 3) != 0);
    check(drops > 0, "padding dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
