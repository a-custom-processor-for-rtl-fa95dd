// payload_forwarder: moves the payload from the incoming packets' buffer to
// the packet buffer once the headers are parsed.
//
// Started by the APC, it reads the buffer in units of up to 32 bytes (eight
// times the header parser's widest read). Each cycle it takes
// min(32, bytes available, bytes left by the payload counter, bytes up to the
// end-of-packet mark) and presents them on out_* while the same count is
// subtracted from the payload counter (pf_bytes). When the payload counter
// reaches zero, bytes still before the end-of-packet mark (e.g. Ethernet
// padding) are dropped; with no payload counter loaded it forwards up to the
// end-of-packet mark. `done` pulses once the packet's last byte has left the
// buffer (at once if the header parser already consumed it). Dropping of
// trailing bytes and the end-mark rule are this design's choices.
module payload_forwarder
  import parser_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             eop_seen,
  // buffer window
  input  logic [255:0]     win_data,
  input  logic [31:0]      win_eop,
  input  logic [8:0]       avail,
  output logic             pop,
  output logic [5:0]       pop_n,
  // payload counter
  input  logic             pay_valid,
  input  logic [CNT_W-1:0] pay_left,
  output logic [5:0]       pf_bytes,
  // output to the packet buffer
  output logic             out_valid,
  output logic [255:0]     out_data,
  output logic [5:0]       out_nbytes,
  output logic             out_last,
  output logic             done,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_DRAIN} state_t;
  state_t state;

  logic [5:0] to_eop;   // bytes up to and including the end mark, 0 if none
  logic [5:0] n_av, n;
  logic       has_eop, takes_eop;

  always_comb begin
    to_eop = '0;
    for (int i = 31; i >= 0; i--) begin
      if (win_eop[31-i] && 9'(i) < avail) to_eop = 6'(i + 1);
    end
    has_eop = (to_eop != '0);
    n_av    = (avail >= 9'd32) ? 6'd32 : avail[5:0];
    n       = n_av;
    if (has_eop && to_eop < n) n = to_eop;
  end

  logic [5:0] n_fwd;
  always_comb begin
    n_fwd = n;
    if (pay_valid && CNT_W'(n) > pay_left) n_fwd = pay_left[5:0];
    takes_eop = has_eop && (n_fwd == to_eop) && (state != S_IDLE);

    pop        = 1'b0;
    pop_n      = '0;
    pf_bytes   = '0;
    out_valid  = 1'b0;
    out_nbytes = '0;
    out_last   = 1'b0;
    out_data   = win_data;
    if (state == S_FWD && n_fwd != '0) begin
      pop        = 1'b1;
      pop_n      = n_fwd;
      pf_bytes   = n_fwd;
      out_valid  = 1'b1;
      out_nbytes = n_fwd;
      out_last   = takes_eop || (pay_valid && CNT_W'(n_fwd) == pay_left);
    end else if (state == S_DRAIN && n != '0) begin
      pop   = 1'b1;
      pop_n = n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (eop_seen) done <= 1'b1;
          else          state <= S_FWD;
        end
        S_FWD: begin
          if (out_valid && takes_eop) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (pay_valid && CNT_W'(n_fwd) == pay_left) begin
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (pop && has_eop && n == to_eop) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
