// extraction_engine: pulls one field out of a 32-bit header segment.
//
// Each unit that looks at header contents (next header resolve unit, branch
// catalyst, branch condition evaluator, header counter, payload counters) has
// its own engine driven by its own 5-bit extraction-mode field of the
// instruction. The engine is purely combinational: the field is valid in the
// same cycle as the segment (the EX pipeline stage). The mode encoding (nibble,
// byte, 16-bit, 32-bit and single-bit selections counted from the first byte
// of the segment, see parser_pkg) is this design's own choice; mode 0 means
// the owning unit is idle, as in the published NOP definition.
//
// Ports: mode, seg (first byte in [31:24]) -> field (right aligned), active.
module extraction_engine
  import parser_pkg::*;
(
  input  logic [4:0]  mode,
  input  logic [31:0] seg,
  output logic [31:0] field,
  output logic        active
);
  always_comb begin
    field  = extract_field(mode, seg);
    active = (mode != 5'd0);
  end
endmodule
