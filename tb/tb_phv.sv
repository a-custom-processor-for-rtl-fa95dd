// tb_phv: writes random containers through up to four bank ports at once,
// keeps a reference copy, reads every entry back (with width masking and
// the 16-entry depth of the first two 8-bit banks) and checks that clear
// invalidates all entries.
module tb_phv;
  import parser_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  phv_wr_vec_t wr = '0;
  logic [2:0]  rd_bank = 0;
  logic [5:0]  rd_addr = 0;
  logic [31:0] rd_data;
  logic        rd_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  phv dut (.*);

  int unsigned depth [7] = '{16, 16, 64, 64, 64, 64, 64};
  int unsigned mask  [7] = '{'hff, 'hff, 'hff, 'hff, 'hffff, 'hffff, 'hffffffff};
  int unsigned ref_d [7][64];
  bit          ref_v [7][64];

  task automatic read_all();
    for (int k = 0; k < 7; k++)
      for (int a = 0; a < 64; a++) begin
        rd_bank = 3'(k); rd_addr = 6'(a); #1;
        checks++;
        if (rd_valid !== ref_v[k][a] || (ref_v[k][a] && rd_data !== ref_d[k][a])) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %h/%0d want %h/%0d", k, a, rd_data, rd_valid,
                   ref_d[k][a], ref_v[k][a]);
        end
      end
  endtask

  initial begin
    foreach (ref_v[k, a]) ref_v[k][a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      wr = '0;
      for (int k = 0; k < 7; k++) if ($urandom_range(0, 2) == 0) begin
        wr[k].we = 1; wr[k].addr = 6'($urandom); wr[k].data = $urandom;
        if (wr[k].addr < depth[k]) begin
          ref_v[k][wr[k].addr] = 1; ref_d[k][wr[k].addr] = wr[k].data & mask[k];
        end
      end
    end
    @(negedge clk); wr = '0;
    read_all();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (ref_v[k, a]) ref_v[k][a] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
