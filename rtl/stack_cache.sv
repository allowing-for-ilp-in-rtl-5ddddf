// stack_cache: the register file that holds the top of the Java stack.
//
// ENTRIES words with random access, three asynchronous read ports and two write ports
// written at the rising clock edge. Both the local-variable area (addressed from VARS)
// and the operand stack (addressed from OPTOP) live here; addresses wrap modulo
// ENTRIES. When both write ports hit the same entry in one cycle, port 1 wins: the
// issue logic always gives port 1 to the later micro-op of a pair, so program order is
// kept. A value written at edge t is read from cycle t+1; there is no write-to-read
// bypass within a cycle (the issue logic never pairs such micro-ops).
// The size and port counts follow the reference processor (64 entries, 3 read and 2
// write ports). Spilling to and filling from the data cache is not described and is not
// built: a program's frame must fit in ENTRIES words. Contents are not reset.
module stack_cache #(
  parameter int ENTRIES = 64,
  parameter int XLEN    = 32,
  localparam int ABITS  = $clog2(ENTRIES)
) (
  input  logic                      clk,
  input  logic [2:0][ABITS-1:0]     ra,
  output logic [2:0][XLEN-1:0]      rd,
  input  logic [1:0]                we,
  input  logic [1:0][ABITS-1:0]     wa,
  input  logic [1:0][XLEN-1:0]      wd
);
  logic [XLEN-1:0] mem [ENTRIES];

  always_comb
    for (int p = 0; p < 3; p++) rd[p] = mem[ra[p]];

  always_ff @(posedge clk) begin
    if (we[0] && !(we[1] && wa[1] == wa[0])) mem[wa[0]] <= wd[0];
    if (we[1]) mem[wa[1]] <= wd[1];
  end
endmodule
