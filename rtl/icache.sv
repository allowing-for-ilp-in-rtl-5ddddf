// icache: instruction store feeding the fetch stage.
//
// Holds BYTES bytes of bytecode and returns one aligned block of FETCH_BYTES bytes per
// read, one cycle after the address is presented (rd_en at edge t, rd_data valid after
// edge t, i.e. during cycle t+1). The block is little-endian in the byte lanes:
// rd_data[8*i +: 8] is the byte at address {block, i}. A byte-wide write port loads the
// program.
//
// The 16 KB default is the largest instruction cache size of the core this design
// follows (0 to 16 KB). Its evaluation assumes a 100% hit ratio, so this block models
// the cache as a memory that always hits; tags, misses and the refill path to the
// memory interface are not described and are not built. Blocks are 8 bytes, the width
// written into the instruction buffer per cycle.
module icache #(
  parameter int BYTES       = 16384,
  parameter int FETCH_BYTES = 8
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [31:0]              rd_addr,     // low bits select the block, rest ignored
  output logic [8*FETCH_BYTES-1:0] rd_data,
  input  logic                     wr_en,
  input  logic [31:0]              wr_addr,
  input  logic [7:0]               wr_data
);
  localparam int AB = $clog2(BYTES);
  localparam int OB = $clog2(FETCH_BYTES);
  localparam int NB = BYTES / FETCH_BYTES;

  // Stored as blocks so that a read is one array access.
  logic [8*FETCH_BYTES-1:0] mem [NB];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AB-1:OB]][8*wr_addr[OB-1:0] +: 8] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr[AB-1:OB]];
  end
endmodule
