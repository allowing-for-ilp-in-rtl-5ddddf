// ibuffer: the 16-byte instruction buffer between fetch and decode.
//
// A queue of DEPTH bytes kept with the oldest byte at position 0. Each byte carries a
// 4-bit length, the length of the bytecode that would start at that byte, computed as
// the byte is written (predecode), and is valid when its position is below the fill
// count. The decoder sees the first RD_BYTES bytes with their lengths.
// Each cycle, in this order: the buffer drops the `shift` oldest bytes (the bytes the
// decode stage consumed), then appends `wr_n` bytes from wr_data (lane 0 first). The
// writer must only write when `wr_ready` was high, which guarantees room for WR_BYTES.
// `flush` empties the buffer and ignores that cycle's shift and write; it is used when
// the fetch stream is redirected.
// DEPTH 16, 8-byte writes and 7-byte reads follow the reference processor. The valid
// bit and length per byte are also from it; its per-byte dirty bit is not described
// further and is left out.
module ibuffer
  import jp_pkg::*;
#(
  parameter int DEPTH    = 16,
  parameter int WR_BYTES = 8,
  parameter int RD_BYTES = 7,
  localparam int CW      = $clog2(DEPTH + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,
  input  logic [$clog2(RD_BYTES+1)-1:0] shift,
  input  logic                        wr_en,
  input  logic [$clog2(WR_BYTES+1)-1:0] wr_n,
  input  logic [WR_BYTES-1:0][7:0]    wr_data,
  output logic                        wr_ready,
  output logic [CW-1:0]               count,
  output logic [RD_BYTES-1:0][7:0]    rd_bytes,
  output logic [RD_BYTES-1:0][3:0]    rd_len,
  output logic [RD_BYTES-1:0]         rd_valid
);
  logic [DEPTH-1:0][7:0] bytes_q;
  logic [DEPTH-1:0][3:0] len_q;
  logic [CW-1:0]         cnt_q;

  assign count    = cnt_q;
  assign wr_ready = cnt_q <= CW'(DEPTH - WR_BYTES);

  always_comb
    for (int i = 0; i < RD_BYTES; i++) begin
      rd_bytes[i] = bytes_q[i];
      rd_len[i]   = len_q[i];
      rd_valid[i] = CW'(i) < cnt_q;
    end

  logic [DEPTH-1:0][7:0] nb;
  logic [DEPTH-1:0][3:0] nl;
  logic [CW-1:0]         nc;

  // shift out, then append
  always_comb begin
    nb = bytes_q;
    nl = len_q;
    for (int i = 0; i < DEPTH; i++) begin
      if (i + int'(shift) < DEPTH) begin
        nb[i] = bytes_q[i + int'(shift)];
        nl[i] = len_q[i + int'(shift)];
      end
    end
    nc = cnt_q - CW'(shift);
    if (wr_en) begin
      for (int j = 0; j < WR_BYTES; j++)
        if (j < int'(wr_n) && int'(nc) + j < DEPTH) begin
          nb[int'(nc) + j] = wr_data[j];
          nl[int'(nc) + j] = {1'b0, bc_len(wr_data[j])};
        end
      nc = nc + CW'(wr_n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      bytes_q <= '0;
      len_q   <= '0;
    end else if (flush) begin
      cnt_q <= '0;
    end else begin
      bytes_q <= nb;
      len_q   <= nl;
      cnt_q   <= nc;
    end
  end

  // The decode stage never consumes bytes that are not there.
  assert property (@(posedge clk) disable iff (!rst_n) !flush |-> CW'(shift) <= cnt_q);
  assert property (@(posedge clk) disable iff (!rst_n) (wr_en && !flush) |-> wr_ready);
endmodule
