// incoming_packets_buffer: byte FIFO in front of the parser.
//
// Packets arrive in beats of up to IN_BYTES bytes and are stored byte by
// byte in a circular buffer, each byte with an end-of-packet mark. The head
// of the buffer is shown as a window of RD_BYTES bytes (first byte in the
// most significant bits) with the marks and the fill count, so the header
// parser can take 1, 2 or 4 bytes and the payload forwarder up to 32 bytes
// per cycle; `pop` removes `pop_n` bytes at the clock edge. Parsing can begin
// before a packet is complete: the readers only wait for the bytes they need.
// Window bytes beyond `avail` are stale. `in_ready` is high while a full beat
// fits. Size, beat width and the per-byte mark are this design's choices.
module incoming_packets_buffer #(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned IN_BYTES = 32,
  parameter int unsigned RD_BYTES = 32,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned NW = $clog2(IN_BYTES + 1),
  localparam int unsigned PW = $clog2(RD_BYTES + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [8*IN_BYTES-1:0] in_data,
  input  logic [NW-1:0]         in_nbytes,
  input  logic                  in_eop,
  output logic                  in_ready,
  output logic [8*RD_BYTES-1:0] win_data,
  output logic [RD_BYTES-1:0]   win_eop,
  output logic [AW:0]           avail,
  input  logic                  pop,
  input  logic [PW-1:0]         pop_n
);
  logic [7:0]  mem [DEPTH];
  logic        eop [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          wr;
  logic [AW:0]   popped;

  assign in_ready = (cnt <= (AW+1)'(DEPTH - IN_BYTES));
  assign wr       = in_valid && in_ready;
  assign avail    = cnt;
  assign popped   = pop ? (AW+1)'(pop_n) : '0;

  always_comb begin
    for (int i = 0; i < int'(RD_BYTES); i++) begin
      win_data[8*RD_BYTES-1-8*i -: 8] = mem[rp + AW'(i)];
      win_eop[RD_BYTES-1-i]           = eop[rp + AW'(i)];
    end
  end

  // storage: not reset, bytes are only read once written
  always_ff @(posedge clk) begin
    if (wr) begin
      for (int i = 0; i < int'(IN_BYTES); i++) begin
        if (NW'(i) < in_nbytes) begin
          mem[wp + AW'(i)] <= in_data[8*IN_BYTES-1-8*i -: 8];
          eop[wp + AW'(i)] <= in_eop && (NW'(i + 1) == in_nbytes);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr) wp <= wp + AW'(in_nbytes);
      rp  <= rp + AW'(popped);
      cnt <= cnt + (wr ? (AW+1)'(in_nbytes) : '0) - popped;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> (AW+1)'(pop_n) <= cnt);
endmodule
