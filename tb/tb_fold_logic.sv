// tb_fold_logic: every folding pattern, longest first, plus cases that must not fold
// (two constants, a store without an operation, a non-matching start). Raw micro-ops
// are produced by the bytecode decode function of the package.
module tb_fold_logic;
  import jp_pkg::*;
  uop_t [3:0] in; uop_t out; logic [2:0] n;
  int checks = 0, failures = 0;

  fold_logic dut (.in, .out, .n);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // opcode + one operand byte; pc advances by the length
  task automatic seq(input byte unsigned o[4], input byte unsigned x[4], input int nv);
    int pc = 64;
    for (int i = 0; i < 4; i++) begin
      in[i] = decode_bc({8'h00, 8'h00, 8'h00, x[i], o[i]}, 32'(pc));
      pc += int'(in[i].len);
      if (i >= nv) in[i] = '0;
    end
    #1;
  endtask

  initial begin
    // iload 4; iload_1; isub; istore 7  ->  l7 <- l4 - l1
    seq('{8'h15, 8'h1b, 8'h64, 8'h36}, '{8'h04, 0, 0, 8'h07}, 4);
    chk(n == 4 && out.alu == A_SUB && out.ka == K_LOCAL && out.ia == 4 && out.kb == K_LOCAL &&
        out.ib == 1 && out.kd == D_LOCAL && out.id == 7 && out.nbc == 4 && out.len == 6 &&
        out.pc == 64, "LD LD OP ST");
    // same, only three valid -> LD LD OP
    seq('{8'h15, 8'h1b, 8'h64, 8'h36}, '{8'h04, 0, 0, 8'h07}, 3);
    chk(n == 3 && out.kd == D_STACK && out.ka == K_LOCAL && out.kb == K_LOCAL, "LD LD OP");
    // iconst_3 as second operand
    seq('{8'h1a, 8'h06, 8'h68, 8'h3c}, '{0, 0, 0, 0}, 4);
    chk(n == 4 && out.kb == K_IMM && out.imm == 3 && out.alu == A_MUL && out.id == 1, "LD IMM OP ST");
    // two constants do not fold into one micro-op
    seq('{8'h04, 8'h05, 8'h60, 8'h3c}, '{0, 0, 0, 0}, 4);
    chk(n == 1, "two immediates");
    // iload_2; iadd; istore_3 -> l3 <- pop + l2
    seq('{8'h1c, 8'h60, 8'h3e, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 3 && out.ka == K_STACK && out.kb == K_LOCAL && out.ib == 2 && out.kd == D_LOCAL &&
        out.id == 3, "LD OP ST");
    // iload_0; iload_1; if_icmpge
    seq('{8'h1a, 8'h1b, 8'ha2, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 3 && out.br == B_GE && out.ka == K_LOCAL && out.kb == K_LOCAL && out.ib == 1 &&
        out.kd == D_NONE, "LD LD B2");
    // bipush 7; ishl -> push(pop << 7)
    seq('{8'h10, 8'h78, 8'h00, 8'h00}, '{8'h07, 0, 0, 0}, 4);
    chk(n == 2 && out.ka == K_STACK && out.kb == K_IMM && out.imm == 7 && out.alu == A_SHL &&
        out.kd == D_STACK, "LD OP");
    // iand; istore 9
    seq('{8'h7e, 8'h36, 8'h00, 8'h00}, '{0, 8'h09, 0, 0}, 4);
    chk(n == 2 && out.alu == A_AND && out.ka == K_STACK && out.kb == K_STACK && out.kd == D_LOCAL &&
        out.id == 9, "OP ST");
    // iload_3; istore_0 -> l0 <- l3
    seq('{8'h1d, 8'h3b, 8'h00, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 2 && out.alu == A_PASS && out.ka == K_LOCAL && out.ia == 3 && out.kd == D_LOCAL &&
        out.id == 0, "LD ST");
    // iload_1; ifle
    seq('{8'h1b, 8'h9e, 8'h00, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 2 && out.br == B_LE && out.ka == K_LOCAL && out.kb == K_NONE && out.kd == D_NONE &&
        out.target == in[1].target, "LD B1");
    // nothing: istore_1 first; pop; ineg
    seq('{8'h3c, 8'h1a, 8'h60, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 1 && out == in[0] || (n == 1 && out.kd == D_LOCAL && out.nbc == 1), "no pattern at a store");
    seq('{8'h1a, 8'h74, 8'h3c, 8'h00}, '{0, 0, 0, 0}, 4);
    chk(n == 1, "unary op does not fold");
    seq('{8'h1a, 8'h1b, 8'h60, 8'h3c}, '{0, 0, 0, 0}, 1);
    chk(n == 1, "single valid micro-op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
