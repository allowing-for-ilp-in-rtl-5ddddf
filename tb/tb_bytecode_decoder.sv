// tb_bytecode_decoder: hand-built I-buffer windows with known bytecodes. Checks the
// decoded fields (operand kinds, local indices, immediates, ALU function, branch
// condition and target, lengths), the per-instruction valid bits when the window or the
// valid bytes end mid-instruction or stale lengths follow them, and the shift amounts.
module tb_bytecode_decoder;
  import jp_pkg::*;
  logic [6:0][7:0] bytes; logic [6:0][3:0] len; logic [6:0] bvalid;
  logic [31:0] pc; uop_t [3:0] uops; logic [3:0][4:0] ends;
  int checks = 0, failures = 0;

  bytecode_decoder dut (.bytes, .len, .bvalid, .pc, .uops, .ends);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // load a window; lengths per byte as the I-buffer would compute them
  task automatic load(input byte unsigned b[7], input int nvalid);
    for (int i = 0; i < 7; i++) begin
      bytes[i]  = b[i];
      case (b[i])
        8'h10, 8'h15, 8'h36: len[i] = 2;
        8'h11, 8'h84, 8'ha7: len[i] = 3;
        8'hc8: len[i] = 5;
        default: len[i] = (b[i] >= 8'h99 && b[i] <= 8'ha4) ? 3 : 1;
      endcase
      bvalid[i] = i < nvalid;
    end
    #1;
  endtask

  initial begin
    pc = 32'h100;
    // iload 5; iload_2; iadd; istore 9  (2+1+1+2 = 6 bytes)
    load('{8'h15, 8'h05, 8'h1c, 8'h60, 8'h36, 8'h09, 8'h00}, 7);
    chk(uops[0].valid && uops[0].ka == K_LOCAL && uops[0].ia == 5 && uops[0].kd == D_STACK &&
        uops[0].len == 2 && uops[0].pc == 32'h100, "iload 5");
    chk(uops[1].valid && uops[1].ka == K_LOCAL && uops[1].ia == 2 && uops[1].pc == 32'h102, "iload_2");
    chk(uops[2].valid && uops[2].alu == A_ADD && uops[2].ka == K_STACK && uops[2].kb == K_STACK &&
        uops[2].kd == D_STACK, "iadd");
    chk(uops[3].valid && uops[3].ka == K_STACK && uops[3].kd == D_LOCAL && uops[3].id == 9 &&
        uops[3].pc == 32'h104, "istore 9");
    chk(ends[0] == 2 && ends[1] == 3 && ends[2] == 4 && ends[3] == 6, "ends");
    // same window, only 5 bytes valid: istore 9 incomplete
    load('{8'h15, 8'h05, 8'h1c, 8'h60, 8'h36, 8'h09, 8'h00}, 5);
    chk(uops[2].valid && !uops[3].valid, "partial instruction not valid");
    // nothing valid
    load('{8'h15, 8'h05, 8'h1c, 8'h60, 8'h36, 8'h09, 8'h00}, 0);
    chk(!uops[0].valid && !uops[1].valid, "empty buffer");
    // sipush -2; bipush -3; iconst_m1; iconst_5 (3+2+1+1 = 7)
    load('{8'h11, 8'hff, 8'hfe, 8'h10, 8'hfd, 8'h02, 8'h08}, 7);
    chk(uops[0].ka == K_IMM && uops[0].imm == 16'hfffe, "sipush");
    chk(uops[1].ka == K_IMM && uops[1].imm == 16'hfffd, "bipush");
    chk(uops[2].ka == K_IMM && uops[2].imm == 16'hffff, "iconst_m1");
    chk(uops[3].valid && uops[3].ka == K_IMM && uops[3].imm == 16'd5, "iconst_5");
    // if_icmplt -16; ifne +8; (3+3) then istore_1
    load('{8'ha1, 8'hff, 8'hf0, 8'h9a, 8'h00, 8'h08, 8'h3c}, 7);
    chk(uops[0].br == B_LT && uops[0].kb == K_STACK && uops[0].target == 32'hf0, "if_icmplt");
    chk(uops[1].br == B_NE && uops[1].kb == K_NONE && uops[1].target == 32'h10b, "ifne");
    chk(uops[2].valid && uops[2].id == 1 && uops[2].kd == D_LOCAL, "istore_1");
    chk(!uops[3].valid, "window exhausted");
    // goto_w +0x20; iinc 3,-1 does not fit in the window
    load('{8'hc8, 8'h00, 8'h00, 8'h00, 8'h20, 8'h84, 8'h03}, 7);
    chk(uops[0].valid && uops[0].br == B_GOTO && uops[0].len == 5 && uops[0].target == 32'h120, "goto_w");
    chk(!uops[1].valid, "iinc past the window");
    // iinc 3,-1; imul; ineg; return
    load('{8'h84, 8'h03, 8'hff, 8'h68, 8'h74, 8'hb1, 8'hfe}, 7);
    chk(uops[0].ka == K_LOCAL && uops[0].kb == K_IMM && uops[0].imm == 16'hffff &&
        uops[0].kd == D_LOCAL && uops[0].id == 3 && uops[0].alu == A_ADD, "iinc");
    chk(uops[1].alu == A_MUL && uops[2].alu == A_NEG && uops[2].kb == K_NONE, "imul, ineg");
    chk(uops[3].valid && uops[3].halt && !uops[3].illegal, "return");
    // bytes beyond the valid ones carry stale lengths, here 0 (as after reset): the
    // instruction starting there must not be taken as valid
    load('{8'h36, 8'h0c, 8'h15, 8'h0c, 8'h00, 8'h00, 8'h00}, 2);
    len[2] = 0; len[3] = 0;
    #1;
    chk(uops[0].valid && !uops[1].valid && !uops[2].valid, "stale zero length after the valid bytes");
    load('{8'hfe, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}, 7);
    chk(uops[0].illegal, "illegal opcode");
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
