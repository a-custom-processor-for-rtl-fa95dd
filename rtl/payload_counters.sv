// payload_counters: the four payload counters of the APC.
//
// Each counter is loaded, in the EX stage of an instruction with a non-zero
// payload-counter extraction mode, from the entry at Address_3, which selects
// the counter, its kind and the target (field << shift) + offset counted from
// the first byte of the loading segment (bytes read since then are subtracted
// as in the header counter). Two kinds:
//   sub-header: the size of an option/sub-header. It counts down on header
//     bytes read; on reaching zero `sub_expire` is raised in that cycle (the
//     APC then returns through the stack) and the counter goes idle.
//   payload: the size of the payload or of the whole packet (e.g. IPv4 Total
//     Length). It counts down on header bytes read and on bytes forwarded by
//     the payload forwarder, stops at zero and stays loaded; the lowest
//     numbered loaded payload counter is reported on `pay_valid/pay_left`.
// `clear_sub` drops sub-header counters (end of a header); `clear` drops all
// (new packet). Entry format and the two-kind split are this design's own.
module payload_counters
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             clear_sub,
  input  logic             load,
  input  cnt_entry_t       entry,
  input  logic [31:0]      field,
  input  logic [2:0]       ex_bytes,
  input  logic [2:0]       fh_bytes,
  input  logic [5:0]       pf_bytes,
  output logic             sub_expire,
  output logic             pay_valid,
  output logic [CNT_W-1:0] pay_left
);
  localparam int unsigned SW = CNT_W + 2;

  logic             act [N_PCNT];
  logic             sub [N_PCNT];
  logic [CNT_W-1:0] cnt [N_PCNT];

  logic signed [SW-1:0] nxt [N_PCNT];
  logic                 hit [N_PCNT];   // reaches zero this cycle

  always_comb begin
    sub_expire = 1'b0;
    for (int i = 0; i < int'(N_PCNT); i++) begin
      nxt[i] = '0;
      hit[i] = 1'b0;
      if (load && entry.pc_sel == 2'(i)) begin
        nxt[i] = $signed(cnt_target(entry, field)) - $signed(SW'(ex_bytes)) - $signed(SW'(fh_bytes));
        hit[i] = (nxt[i] <= 0);
        if (entry.pc_sub && hit[i]) sub_expire = 1'b1;
      end else if (act[i]) begin
        nxt[i] = $signed({2'b00, cnt[i]}) - $signed(SW'(fh_bytes))
                 - (sub[i] ? '0 : $signed(SW'(pf_bytes)));
        hit[i] = (nxt[i] <= 0);
        if (sub[i] && hit[i] && !clear_sub) sub_expire = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_PCNT); i++) begin
        act[i] <= 1'b0; sub[i] <= 1'b0; cnt[i] <= '0;
      end
    end else begin
      for (int i = 0; i < int'(N_PCNT); i++) begin
        if (clear || (clear_sub && sub[i] && !(load && entry.pc_sel == 2'(i)))) begin
          act[i] <= 1'b0;
          cnt[i] <= '0;
        end else if (load && entry.pc_sel == 2'(i)) begin
          sub[i] <= entry.pc_sub;
          act[i] <= !(entry.pc_sub && hit[i]);
          cnt[i] <= hit[i] ? '0 : nxt[i][CNT_W-1:0];
        end else if (act[i]) begin
          act[i] <= !(sub[i] && hit[i]);
          cnt[i] <= hit[i] ? '0 : nxt[i][CNT_W-1:0];
        end
      end
    end
  end

  always_comb begin
    pay_valid = 1'b0;
    pay_left  = '0;
    for (int i = int'(N_PCNT) - 1; i >= 0; i--) begin
      if (act[i] && !sub[i]) begin
        pay_valid = 1'b1;
        pay_left  = cnt[i];
      end
    end
  end
endmodule
