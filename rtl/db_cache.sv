// db_cache: the decoded bytecode cache (DB-Cache).
//
// ENTRIES lines, each holding up to five decoded or folded micro-ops of one basic block
// plus the address that follows the line (jp_pkg::line_t). The cache is looked up with
// the address of the next bytecode to issue: a line hits when it is valid and its tag,
// the address of its first bytecode, equals that address exactly. Lookup is
// combinational (hit and line in the same cycle); a line written at a rising edge is
// visible from the next cycle. The fill unit is the only writer. Valid bits clear on
// reset.
// The 64-entry default and the line contents follow the document (five decoded
// bytecodes, a next-address field and a branch address with its condition, which here
// sit in the branch micro-op). The document does not give the organisation: it is
// direct-mapped here, indexed by the low address bits, with the full address as tag.
module db_cache
  import jp_pkg::*;
#(
  parameter int ENTRIES = 64,
  localparam int IB     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] lookup_addr,
  output logic          hit,
  output line_t         line,
  input  logic          wr_en,
  input  line_t         wr_line
);
  line_t            mem   [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IB-1:0]    ridx, widx;

  assign ridx = lookup_addr[IB-1:0];
  assign widx = wr_line.tag[IB-1:0];
  assign line = mem[ridx];
  assign hit  = valid_q[ridx] && mem[ridx].tag == lookup_addr;

  always_ff @(posedge clk)
    if (wr_en) mem[widx] <= wr_line;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[widx] <= 1'b1;
endmodule
