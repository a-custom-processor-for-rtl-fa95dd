// phv: the Packet Header Vector, where extracted header fields are placed.
//
// Seven independently writable banks so that the PHV filler can place up to
// four containers in one cycle: 8-bit banks 0..3 with 16, 16, 64 and 64
// entries, 16-bit banks 0..1 with 64 entries each and one 32-bit bank with 64
// entries (depth = 2^width of the PHV address field that reaches the bank).
// Each entry has a valid bit; `clear` (start of a packet) invalidates all.
// Writes happen at the WB stage on the clock edge. A combinational read port
// (bank index 0..6, entry address) serves the match-action stages and tests.
module phv
  import parser_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  phv_wr_vec_t wr,
  input  logic [2:0]  rd_bank,
  input  logic [5:0]  rd_addr,
  output logic [31:0] rd_data,
  output logic        rd_valid
);
  localparam int unsigned DEPTH [N_BANKS] = '{16, 16, 64, 64, 64, 64, 64};
  localparam int unsigned WIDTH [N_BANKS] = '{8, 8, 8, 8, 16, 16, 32};

  logic [31:0] data  [N_BANKS][64];
  logic        valid [N_BANKS][64];

  for (genvar k = 0; k < int'(N_BANKS); k++) begin : g_bank
    for (genvar e = 0; e < int'(DEPTH[k]); e++) begin : g_ent
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          data[k][e]  <= '0;
          valid[k][e] <= 1'b0;
        end else if (wr[k].we && wr[k].addr == 6'(e)) begin
          data[k][e]  <= wr[k].data & 32'((33'd1 << WIDTH[k]) - 33'd1);
          valid[k][e] <= 1'b1;
        end else if (clear) begin
          valid[k][e] <= 1'b0;
        end
      end
    end
    for (genvar e = int'(DEPTH[k]); e < 64; e++) begin : g_none
      assign data[k][e]  = '0;
      assign valid[k][e] = 1'b0;
    end
  end

  always_comb begin
    rd_data  = '0;
    rd_valid = 1'b0;
    if (rd_bank < 3'(N_BANKS)) begin
      rd_data  = data[rd_bank][rd_addr];
      rd_valid = valid[rd_bank][rd_addr];
    end
  end
endmodule
