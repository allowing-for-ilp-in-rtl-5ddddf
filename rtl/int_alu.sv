// int_alu: integer datapath of one issue slot.
//
// Computes the micro-op's ALU function on operands a and b and evaluates its branch
// condition. Branches compare a with b, or with zero when the micro-op has no second
// operand (has_b = 0); goto is always taken. Shift amounts use the low five bits of b,
// as the JVM defines. Multiplication is a single product here; the core holds its
// result for MUL_LAT cycles before committing (see jcore_top). Purely combinational.
// The function set follows the bytecode subset of this design.
module int_alu
  import jp_pkg::*;
(
  input  alu_e            alu,
  input  br_e             br,
  input  logic            has_b,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            taken
);
  logic signed [XLEN-1:0] sa, sc;

  always_comb begin
    sa = signed'(a);
    sc = has_b ? signed'(b) : '0;
    unique case (alu)
      A_PASS:  y = a;
      A_ADD:   y = a + b;
      A_SUB:   y = a - b;
      A_MUL:   y = a * b;
      A_AND:   y = a & b;
      A_OR:    y = a | b;
      A_XOR:   y = a ^ b;
      A_SHL:   y = a << b[4:0];
      A_SHR:   y = XLEN'(sa >>> b[4:0]);
      A_USHR:  y = a >> b[4:0];
      A_NEG:   y = -a;
      default: y = a;
    endcase
    unique case (br)
      B_GOTO:  taken = 1'b1;
      B_EQ:    taken = sa == sc;
      B_NE:    taken = sa != sc;
      B_LT:    taken = sa <  sc;
      B_GE:    taken = sa >= sc;
      B_GT:    taken = sa >  sc;
      B_LE:    taken = sa <= sc;
      default: taken = 1'b0;
    endcase
  end
endmodule
