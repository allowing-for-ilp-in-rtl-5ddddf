// length_decoder: cumulative lengths of the first NINST instructions in the I-buffer.
//
// Every byte position i of the decode window carries the length l_i of the bytecode
// that would start there (computed when the byte entered the I-buffer). An index adder
// per position forms a_i = i + l_i, the position just past that instruction. The end of
// the first instruction is L0 = l_0; each further end is chosen by a multiplexer from
// the index adders, L_k = a[L_(k-1)], so L_k is the sum of the lengths of the first k+1
// instructions. A selection that points past the window gives 0 and all later L are 0
// as well. This is the index-adder chain of the decode stage of the reference
// processor: the serial chain of multiplexers is its critical path. Purely
// combinational.
module length_decoder #(
  parameter int NBYTES = 7,
  parameter int NINST  = 4
) (
  input  logic [NBYTES-1:0][3:0] len,   // l_0 .. l_(NBYTES-1)
  output logic [NINST-1:0][4:0]  cum    // L_0 .. L_(NINST-1), 0 = not within the window
);
  logic [NBYTES-1:0][4:0] a;

  always_comb begin
    for (int i = 0; i < NBYTES; i++) a[i] = 5'(i) + 5'(len[i]);
    cum[0] = 5'(len[0]);
    for (int k = 1; k < NINST; k++) begin
      cum[k] = '0;
      for (int i = 1; i < NBYTES; i++)
        if (cum[k-1] == 5'(i)) cum[k] = a[i];
    end
  end
endmodule
