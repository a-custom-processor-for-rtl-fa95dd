// tb_phv_filler: for every filler mode and random segments/addresses,
// compares the seven bank write ports with a table of expected splits.
module tb_phv_filler;
  import parser_pkg::*;
  phv_mode_t   mode;
  logic [31:0] seg;
  logic [3:0]  a0, a1;
  logic [5:0]  a2, a3;
  phv_wr_vec_t wr;
  int checks = 0, failures = 0;

  phv_filler dut (.*);

  // expected: per bank {we, addr, data}
  function automatic phv_wr_vec_t model(int m);
    phv_wr_vec_t x = '0;
    logic [7:0] b0 = seg[31:24], b1 = seg[23:16], b2 = seg[15:8], b3 = seg[7:0];
    case (m)
      1: x[0] = {1'b1, 2'b0, a0, 24'b0, b0};
      2: x[4] = {1'b1, a2, 16'b0, b0, b1};
      3: begin x[0] = {1'b1, 2'b0, a0, 24'b0, b0}; x[1] = {1'b1, 2'b0, a1, 24'b0, b1}; end
      4: x[6] = {1'b1, a2, seg};
      5: begin x[4] = {1'b1, a2, 16'b0, b0, b1}; x[5] = {1'b1, a3, 16'b0, b2, b3}; end
      6: begin x[4] = {1'b1, a2, 16'b0, b0, b1}; x[0] = {1'b1, 2'b0, a0, 24'b0, b2};
               x[1] = {1'b1, 2'b0, a1, 24'b0, b3}; end
      7: begin x[0] = {1'b1, 2'b0, a0, 24'b0, b0}; x[4] = {1'b1, a2, 16'b0, b1, b2};
               x[1] = {1'b1, 2'b0, a1, 24'b0, b3}; end
      8: begin x[0] = {1'b1, 2'b0, a0, 24'b0, b0}; x[1] = {1'b1, 2'b0, a1, 24'b0, b1};
               x[5] = {1'b1, a3, 16'b0, b2, b3}; end
      9: begin x[0] = {1'b1, 2'b0, a0, 24'b0, b0}; x[1] = {1'b1, 2'b0, a1, 24'b0, b1};
               x[2] = {1'b1, a2, 24'b0, b2}; x[3] = {1'b1, a3, 24'b0, b3}; end
      default: ;
    endcase
    return x;
  endfunction

  initial begin
    for (int m = 0; m < 16; m++) begin
      repeat (50) begin
        mode = phv_mode_t'(m);
        seg = $urandom; a0 = 4'($urandom); a1 = 4'($urandom); a2 = 6'($urandom); a3 = 6'($urandom);
        #1;
        checks++;
        if (wr !== model(m)) begin
          failures++;
          $display("FAIL mode %0d seg %h", m, seg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
