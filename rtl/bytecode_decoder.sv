// bytecode_decoder: the decode stage without folding logic.
//
// Looks at the first RD_BYTES bytes of the instruction buffer and decodes up to NINST
// bytecodes into micro-ops (jp_pkg::uop_t). The length decoder gives the cumulative
// lengths L0..L3; instruction k starts at byte 0, L0, L1 or L2. Instruction k is valid
// only if instruction k-1 is, and all of its bytes are in the window and valid in the
// buffer; the length of a byte that is not valid is never trusted. `ends[k]` is the
// number of bytes to shift out of the buffer when instructions 0..k are consumed.
// Purely combinational.
// This is the decode stage of the reference processor with pattern checking and folding
// taken out (folding moves to the fill unit), which the design proposes to shorten the
// critical path. The micro-op format is this design's own.
module bytecode_decoder
  import jp_pkg::*;
#(
  parameter int RD_BYTES = 7,
  parameter int NINST    = 4
) (
  input  logic [RD_BYTES-1:0][7:0] bytes,
  input  logic [RD_BYTES-1:0][3:0] len,
  input  logic [RD_BYTES-1:0]      bvalid,
  input  logic [AW-1:0]            pc,       // address of bytes[0]
  output uop_t [NINST-1:0]         uops,
  output logic [NINST-1:0][4:0]    ends
);
  logic [NINST-1:0][4:0] cum;

  length_decoder #(.NBYTES(RD_BYTES), .NINST(NINST)) u_len (.len(len), .cum(cum));

  assign ends = cum;

  always_comb begin
    logic prev_ok;
    int   start;
    prev_ok = 1'b1;
    for (int k = 0; k < NINST; k++) begin
      logic [4:0][7:0] b;
      start = (k == 0) ? 0 : int'(cum[k-1]);
      b = '0;
      for (int j = 0; j < 5; j++)
        if (start + j < RD_BYTES) b[j] = bytes[start + j];
      uops[k] = decode_bc(b, pc + AW'(start));
      // all bytes of the instruction present: its first byte is valid and its end is
      // inside the window and valid (lengths of bytes not yet in the buffer are stale)
      uops[k].valid = prev_ok && (k == 0 || cum[k-1] != 0) && cum[k] != 0 &&
                      start < RD_BYTES && bvalid[start] && int'(cum[k]) > start &&
                      int'(cum[k]) <= RD_BYTES && bvalid[int'(cum[k]) - 1];
      prev_ok = uops[k].valid;
    end
  end
endmodule
