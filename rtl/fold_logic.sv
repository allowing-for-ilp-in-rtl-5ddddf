// fold_logic: pattern check and instruction folding.
//
// Examines up to four consecutive raw micro-ops in[0..3] (each one bytecode) and
// returns one micro-op `out` standing for the longest foldable pattern that starts at
// in[0], with `n` the number of bytecodes it replaces (1 when nothing folds). Patterns
// are checked longest first: four, then three, then two bytecodes, as the reference
// processor's decoder does. The bytecode classes are
//   LD  a push of a local variable or a constant (iload*, iconst*, bipush, sipush)
//   OP  a binary ALU bytecode that pops two and pushes one (iadd, isub, imul, ...)
//   ST  a pop into a local variable (istore*)
//   B1  a branch on one popped value (ifeq..ifle)
//   B2  a branch on two popped values (if_icmpeq..if_icmple)
// and the patterns, with the micro-op each becomes, are
//   LD LD OP ST  -> d_local <- a op b        LD OP ST -> d_local <- tos op a
//   LD LD OP     -> push(a op b)             LD LD B2 -> branch if a ? b
//   LD OP        -> push(pop op a)           OP ST    -> d_local <- pop op pop
//   LD ST        -> d_local <- a             LD B1    -> branch if a ? 0
// A pattern with two constants does not fold (a micro-op has one immediate field).
// Only `valid` inputs take part. Purely combinational.
// Longest-first checking, the four-bytecode limit and the example add c <- a, b follow
// the document; it names no further patterns, so the set above is this design's choice,
// drawn from the usual picoJava folding groups.
module fold_logic
  import jp_pkg::*;
(
  input  uop_t [3:0] in,
  output uop_t       out,
  output logic [2:0] n
);
  function automatic logic is_ld(input uop_t u);
    return u.valid && u.kd == D_STACK && u.alu == A_PASS && u.br == B_NONE &&
           (u.ka == K_LOCAL || u.ka == K_IMM) && u.kb == K_NONE;
  endfunction
  function automatic logic is_op(input uop_t u);
    return u.valid && u.kd == D_STACK && u.ka == K_STACK && u.kb == K_STACK &&
           u.br == B_NONE;
  endfunction
  function automatic logic is_st(input uop_t u);
    return u.valid && u.kd == D_LOCAL && u.ka == K_STACK && u.kb == K_NONE &&
           u.alu == A_PASS;
  endfunction
  function automatic logic is_b1(input uop_t u);
    return u.valid && u.br != B_NONE && u.br != B_GOTO && u.ka == K_STACK && u.kb == K_NONE;
  endfunction
  function automatic logic is_b2(input uop_t u);
    return u.valid && u.br != B_NONE && u.br != B_GOTO && u.ka == K_STACK && u.kb == K_STACK;
  endfunction

  logic two_imm;
  assign two_imm = in[0].ka == K_IMM && in[1].ka == K_IMM;

  always_comb begin
    out = in[0];
    n   = 3'd1;
    if (is_ld(in[0]) && is_ld(in[1]) && is_op(in[2]) && is_st(in[3]) && !two_imm) begin
      out     = in[2];
      out.ka  = in[0].ka;  out.ia = in[0].ia;
      out.kb  = in[1].ka;  out.ib = in[1].ia;
      out.imm = (in[0].ka == K_IMM) ? in[0].imm : in[1].imm;
      out.kd  = D_LOCAL;   out.id = in[3].id;
      n = 3'd4;
    end else if (is_ld(in[0]) && is_ld(in[1]) && is_op(in[2]) && !two_imm) begin
      out     = in[2];
      out.ka  = in[0].ka;  out.ia = in[0].ia;
      out.kb  = in[1].ka;  out.ib = in[1].ia;
      out.imm = (in[0].ka == K_IMM) ? in[0].imm : in[1].imm;
      n = 3'd3;
    end else if (is_ld(in[0]) && is_op(in[1]) && is_st(in[2])) begin
      out     = in[1];
      out.ka  = K_STACK;
      out.kb  = in[0].ka;  out.ib = in[0].ia;  out.imm = in[0].imm;
      out.kd  = D_LOCAL;   out.id = in[2].id;
      n = 3'd3;
    end else if (is_ld(in[0]) && is_ld(in[1]) && is_b2(in[2]) && !two_imm) begin
      out     = in[2];
      out.ka  = in[0].ka;  out.ia = in[0].ia;
      out.kb  = in[1].ka;  out.ib = in[1].ia;
      out.imm = (in[0].ka == K_IMM) ? in[0].imm : in[1].imm;
      n = 3'd3;
    end else if (is_ld(in[0]) && is_op(in[1])) begin
      out     = in[1];
      out.ka  = K_STACK;
      out.kb  = in[0].ka;  out.ib = in[0].ia;  out.imm = in[0].imm;
      n = 3'd2;
    end else if (is_op(in[0]) && is_st(in[1])) begin
      out     = in[0];
      out.kd  = D_LOCAL;   out.id = in[1].id;
      n = 3'd2;
    end else if (is_ld(in[0]) && is_st(in[1])) begin
      out     = in[0];
      out.kd  = D_LOCAL;   out.id = in[1].id;
      n = 3'd2;
    end else if (is_ld(in[0]) && is_b1(in[1])) begin
      out     = in[1];
      out.ka  = in[0].ka;  out.ia = in[0].ia;  out.imm = in[0].imm;
      n = 3'd2;
    end
    out.pc  = in[0].pc;
    out.nbc = n;
    out.len = '0;
    for (int i = 0; i < 4; i++) if (i < int'(n)) out.len = out.len + in[i].len;
  end
endmodule
