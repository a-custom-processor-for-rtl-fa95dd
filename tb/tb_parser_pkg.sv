// tb_parser_pkg: checks the shared definitions: the instruction word is 96
// bits with the fields in the published order, and the helper functions
// (segment sizes, field extraction, counter targets) give hand-worked values.
module tb_parser_pkg;
  import parser_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    instr_t i;
    cnt_entry_t e;
    check($bits(instr_t) == 96, "instruction is 96 bits");
    i = '0; i.br_type = BR_BCE;
    check(i[95:94] == 2'b11, "branch type in the top bits");
    i = '0; i.unused = '1;
    check(i[6:0] == 7'h7f && i[95:7] == '0, "unused field at the bottom");
    i = '0; i.seg = SEG_4;
    check(i[34:33] == 2'b11, "segment size position");
    check(seg_bytes(SEG_0) == 0 && seg_bytes(SEG_1) == 1 && seg_bytes(SEG_2) == 2 &&
          seg_bytes(SEG_4) == 4, "segment sizes");
    check(extract_field(5'd2, 32'h4500_0054) == 32'h5, "IHL nibble");
    check(extract_field(5'd10, 32'h4006_1234) == 32'h06, "protocol byte");
    check(extract_field(5'd13, 32'h86dd_0000) == 32'h86dd, "ethertype field");
    check(extract_field(5'd15, 32'h4500_0054) == 32'h0054, "total length");
    check(extract_field(5'd16, 32'hdead_beef) == 32'hdead_beef, "whole word");
    check(extract_field(5'd17, 32'h8000_0000) == 32'h1, "bit 31");
    check(extract_field(5'd18, 32'h8000_0000) == 32'h0, "bit 30");
    check(extract_field(5'd31, 32'hffff_ffff) == 32'h0, "constant mode");
    check(extract_field(5'd0, 32'hffff_ffff) == 32'h0, "idle mode");
    e = '0; e.use_field = 1; e.shift = 2; e.offset = 16'hfff4;  // *4 - 12
    check($signed(cnt_target(e, 32'd8)) == 20, "counter target 8*4-12");
    e.use_field = 0; e.offset = 16'd14;
    check(cnt_target(e, 32'd8) == 14, "constant target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
