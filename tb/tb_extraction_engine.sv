// tb_extraction_engine: drives random segments through every extraction
// mode and compares with a reference that cuts the field out of a byte
// string (an independent formulation of the mode table).
module tb_extraction_engine;
  logic [4:0]  mode;
  logic [31:0] seg, field;
  logic        active;
  int checks = 0, failures = 0;

  extraction_engine dut (.*);

  function automatic logic [31:0] ref_f(logic [4:0] m, logic [31:0] s);
    // bit k of the segment counted from the first transmitted bit
    logic [31:0] r = 0;
    int start, width;
    if (m == 0 || m == 31) return 0;
    if (m <= 8)       begin start = 4 * (m - 1);  width = 4;  end
    else if (m <= 12) begin start = 8 * (m - 9);  width = 8;  end
    else if (m <= 15) begin start = 8 * (m - 13); width = 16; end
    else if (m == 16) begin start = 0;            width = 32; end
    else              begin start = m - 17;       width = 1;  end
    for (int k = 0; k < width; k++) r = (r << 1) | 32'(s[31 - start - k]);
    return r;
  endfunction

  initial begin
    repeat (2000) begin
      mode = 5'($urandom);
      seg  = $urandom;
      #1;
      checks++;
      if (field !== ref_f(mode, seg) || active !== (mode != 0)) begin
        failures++;
        $display("FAIL mode %0d seg %h: got %h want %h", mode, seg, field, ref_f(mode, seg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
