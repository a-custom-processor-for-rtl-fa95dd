// tb_incoming_packets_buffer: random beats (1..32 bytes, random end marks)
// against random pops of 1..32 bytes, compared with a byte queue model.
// Every cycle the window bytes below `avail`, their end marks and the fill
// count are checked; in_ready must follow the free space.
module tb_incoming_packets_buffer;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_eop = 0, pop = 0;
  logic [255:0] in_data = 0;
  logic [5:0]   in_nbytes = 0, pop_n = 0;
  logic         in_ready;
  logic [255:0] win_data;
  logic [31:0]  win_eop;
  logic [8:0]   avail;
  int checks = 0, failures = 0, pushed = 0;
  byte unsigned qd[$];
  bit           qe[$];
  always #5 clk = ~clk;

  incoming_packets_buffer dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check the present state
      check(int'(avail) == qd.size(), $sformatf("avail %0d model %0d", avail, qd.size()));
      check(in_ready == (qd.size() <= 256 - 32), "in_ready");
      for (int i = 0; i < 32 && i < qd.size(); i++)
        check(win_data[255 - 8*i -: 8] == qd[i] && win_eop[31 - i] == qe[i],
              $sformatf("window byte %0d", i));
      // drive this cycle: bias towards filling in the first half
      in_valid = ($urandom_range(0, 3) != 0) && (cyc < 1500 || $urandom_range(0, 1) == 0);
      in_nbytes = 6'($urandom_range(1, 32));
      in_eop = $urandom_range(0, 1);
      in_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pop = (qd.size() > 0) && ($urandom_range(0, 2) != 0) && (cyc >= 200);
      pop_n = pop ? 6'($urandom_range(1, qd.size() < 32 ? qd.size() : 32)) : 6'd0;
      @(posedge clk);
      for (int i = 0; i < int'(pop_n); i++) begin void'(qd.pop_front()); void'(qe.pop_front()); end
      if (in_valid && in_ready) begin
        for (int i = 0; i < int'(in_nbytes); i++) begin
          qd.push_back(in_data[255 - 8*i -: 8]);
          qe.push_back(in_eop && (i + 1 == int'(in_nbytes)));
        end
        pushed++;
      end
    end
    check(pushed > 500, "enough beats accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
