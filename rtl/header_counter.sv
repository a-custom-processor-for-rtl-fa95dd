// header_counter: counts the bytes left in the header being parsed.
//
// An instruction whose header-counter extraction mode is non-zero loads the
// counter in its EX stage with the header size: (field << shift) + offset,
// with field taken by the counter's own extraction engine (e.g. IPv4 IHL) and
// shift/offset from the target-value memory entry selected by Address_2
// (e.g. shift 2 turns IHL into bytes; a fixed-size header uses the constant
// alone). The size counts from the first byte of the loading instruction's
// segment, so the bytes already read by that instruction and by the
// instruction in FH in the same cycle are subtracted at load. After loading
// the counter drops by the size of every segment read in FH. When it reaches
// zero (or would go below) `expire` is raised combinationally in that same
// cycle, so the APC can redirect the very next fetch; the counter then goes
// idle. Load formula and same-cycle expiry are this design's choices.
module header_counter
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             load,
  input  cnt_entry_t       entry,
  input  logic [31:0]      field,
  input  logic [2:0]       ex_bytes,
  input  logic [2:0]       fh_bytes,
  output logic             active,
  output logic [CNT_W-1:0] count,
  output logic             expire
);
  localparam int unsigned SW = CNT_W + 2;
  logic signed [SW-1:0] nxt;

  always_comb begin
    nxt    = '0;
    expire = 1'b0;
    if (load) begin
      nxt    = $signed(cnt_target(entry, field)) - $signed(SW'(ex_bytes)) - $signed(SW'(fh_bytes));
      expire = (nxt <= 0);
    end else if (active) begin
      nxt    = $signed({2'b00, count}) - $signed(SW'(fh_bytes));
      expire = (nxt <= 0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      count  <= '0;
    end else if (clear) begin
      active <= 1'b0;
      count  <= '0;
    end else if (load || active) begin
      active <= !expire;
      count  <= expire ? '0 : nxt[CNT_W-1:0];
    end
  end
endmodule
