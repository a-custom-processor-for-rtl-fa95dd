// parser_pkg: types and constants shared by the programmable packet parser.
//
// The parser is a small VLIW processor whose 96-bit instruction has one field
// per functional unit (branch control, five extraction engines, four
// parameter-memory addresses, segment size, PHV filler mode, four PHV
// addresses and stack control). The field list and widths follow the
// published instruction format; the order of the fields inside the word
// (first field in the most significant bits) and all encodings of modes,
// branch types and conditions are this design's own choices, defined here.
//
// Encodings chosen here:
//   extraction mode (5 bits): 0 idle, 1..8 nibble k-1, 9..12 byte k-9,
//     13..15 16-bit field at byte 0/1/2, 16 whole 32-bit segment,
//     17..30 single bit 31-(mode-17) of the segment, 31 active with field 0
//     (the unit runs with a constant-only target).
//   segment size (2 bits): 0, 1, 2 or 4 bytes.
//   branch type (2 bits): sequential, next-header unit, branch catalyst,
//     branch condition evaluator.
//   Header segments are left aligned: the first byte of the segment is in
//   bits [31:24] whatever its size.
package parser_pkg;

  localparam int unsigned INSTR_W  = 96;
  localparam int unsigned IMEM_AW  = 8;   // instruction address width
  localparam int unsigned PMEM_AW  = 6;   // parameter memory address width
  localparam int unsigned N_CMP    = 8;   // comparands per memory word
  localparam int unsigned CMP_W    = 16;  // comparand width
  localparam int unsigned CNT_W    = 16;  // counter width (bytes)
  localparam int unsigned N_PCNT   = 4;   // payload counters
  localparam int unsigned PF_BYTES = 32;  // payload forwarder read width

  typedef logic [IMEM_AW-1:0] iaddr_t;

  typedef enum logic [1:0] {
    BR_SEQ = 2'd0,   // fall through
    BR_NH  = 2'd1,   // address from the next header resolve unit
    BR_BC  = 2'd2,   // address from the branch catalyst
    BR_BCE = 2'd3    // conditional, from the branch condition evaluator
  } branch_t;

  typedef enum logic [2:0] {
    C_ALWAYS = 3'd0, C_EQ = 3'd1, C_NE = 3'd2, C_LT = 3'd3,
    C_LE     = 3'd4, C_GT = 3'd5, C_GE = 3'd6, C_CLR = 3'd7
  } cond_t;

  typedef enum logic [1:0] {
    SEG_0 = 2'd0, SEG_1 = 2'd1, SEG_2 = 2'd2, SEG_4 = 2'd3
  } seg_size_t;

  // PHV filler modes: how a segment is split into 8/16/32-bit units.
  typedef enum logic [3:0] {
    PF_NONE  = 4'd0,
    PF_B     = 4'd1,  // 1 byte  : 8
    PF_H     = 4'd2,  // 2 bytes : 16
    PF_BB    = 4'd3,  // 2 bytes : 8 8
    PF_W     = 4'd4,  // 4 bytes : 32
    PF_HH    = 4'd5,  // 4 bytes : 16 16
    PF_HBB   = 4'd6,  // 4 bytes : 16 8 8
    PF_BHB   = 4'd7,  // 4 bytes : 8 16 8
    PF_BBH   = 4'd8,  // 4 bytes : 8 8 16
    PF_BBBB  = 4'd9   // 4 bytes : 8 8 8 8
  } phv_mode_t;

  // The 96-bit instruction word (Table of instruction fields, in order).
  typedef struct packed {
    branch_t     br_type;     // 2
    cond_t       br_cond;     // 3
    logic [4:0]  xm_nh;       // extraction mode 0: next header resolve unit
    logic [4:0]  xm_bc;       // extraction mode 1: branch catalyst
    logic [4:0]  xm_bce;      // extraction mode 2: branch condition evaluator
    logic [4:0]  xm_hc;       // extraction mode 3: header counter
    logic [4:0]  xm_pc;       // extraction mode 4: payload counters
    logic [5:0]  a_nh;        // Address_0: next header comparands
    logic [6:0]  nh_iter;     // next header resolve iterations
    logic [5:0]  a_bc;        // Address_1: branch catalyst comparands
    logic [5:0]  a_hc;        // Address_2: header counter target value
    logic [5:0]  a_pc;        // Address_3: payload counters' target value
    seg_size_t   seg;         // 2
    phv_mode_t   phv_mode;    // 4
    logic [3:0]  phv_a0;      // 8-bit bank 0
    logic [3:0]  phv_a1;      // 8-bit bank 1
    logic [5:0]  phv_a2;      // 8-bit bank 2, 16-bit bank 0, 32-bit bank
    logic [5:0]  phv_a3;      // 8-bit bank 3, 16-bit bank 1
    logic        stk_next;    // push the following (1) or current (0) address
    logic        stk_push;    // push to the return stack
    logic [6:0]  unused;
  } instr_t;

  // Comparand memory word: 8 slots of {valid, 16-bit value}.
  typedef struct packed {
    logic             valid;
    logic [CMP_W-1:0] value;
  } cmp_slot_t;
  typedef cmp_slot_t [N_CMP-1:0] cmp_word_t;     // 136 bits
  typedef iaddr_t    [N_CMP-1:0] addr_word_t;    // 64 bits

  // Branch condition evaluator entry.
  typedef struct packed {
    logic [CMP_W-1:0] ref_val;
    iaddr_t           target;
  } bce_entry_t;                                 // 24 bits

  // Counter target value entry: target = (field << shift) + offset.
  typedef struct packed {
    logic [1:0]       pc_sel;     // payload counter index (payload counters only)
    logic             pc_sub;     // 1: sub-header size, 0: payload size
    logic             use_field;  // add the extracted field
    logic [1:0]       shift;      // field scale: x1, x2, x4, x8
    logic [CNT_W-1:0] offset;     // signed constant
  } cnt_entry_t;                               // 22 bits

  // One write port of the PHV.
  typedef struct packed {
    logic        we;
    logic [5:0]  addr;
    logic [31:0] data;
  } phv_wr_t;

  localparam int unsigned N_BANKS = 7;
  // bank indices: 0..3 8-bit banks, 4..5 16-bit banks, 6 the 32-bit bank
  typedef phv_wr_t [N_BANKS-1:0] phv_wr_vec_t;

  // Configuration port targets.
  typedef enum logic [3:0] {
    CFG_IMEM   = 4'd0,
    CFG_NH_CMP = 4'd1,
    CFG_NH_ADR = 4'd2,
    CFG_BC_CMP = 4'd3,
    CFG_BC_ADR = 4'd4,
    CFG_BCE    = 4'd5,
    CFG_HC     = 4'd6,
    CFG_PC     = 4'd7,
    CFG_NH_DEF = 4'd8
  } cfg_sel_t;

  localparam int unsigned CFG_W = 136;

  function automatic logic [2:0] seg_bytes(seg_size_t s);
    case (s)
      SEG_0:   return 3'd0;
      SEG_1:   return 3'd1;
      SEG_2:   return 3'd2;
      default: return 3'd4;
    endcase
  endfunction

  // Field selected by an extraction mode, right aligned.
  function automatic logic [31:0] extract_field(logic [4:0] mode, logic [31:0] seg);
    logic [31:0] f;
    f = '0;
    if (mode >= 5'd1 && mode <= 5'd8)
      f = 32'(seg[31 - 4*(int'(mode) - 1) -: 4]);
    else if (mode >= 5'd9 && mode <= 5'd12)
      f = 32'(seg[31 - 8*(int'(mode) - 9) -: 8]);
    else if (mode >= 5'd13 && mode <= 5'd15)
      f = 32'(seg[31 - 8*(int'(mode) - 13) -: 16]);
    else if (mode == 5'd16)
      f = seg;
    else if (mode >= 5'd17 && mode <= 5'd30)
      f = 32'(seg[31 - (int'(mode) - 17)]);
    return f;
  endfunction

  // Signed target computation of a counter entry.
  function automatic logic [CNT_W+1:0] cnt_target(cnt_entry_t e, logic [31:0] field);
    logic [CNT_W+1:0] t;
    t = {{2{e.offset[CNT_W-1]}}, e.offset};
    if (e.use_field) t = t + ((CNT_W+2)'(field[CNT_W-1:0]) << e.shift);
    return t;
  endfunction

endpackage
