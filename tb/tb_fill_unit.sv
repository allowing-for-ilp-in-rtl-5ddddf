// tb_fill_unit: feeds issued micro-ops to the fill unit as the core would and checks
// the lines it writes: tag, entry count after folding, folded entries, next address
// (fall-through, goto target, or the first bytecode not stored), the five-bytecode
// limit, the rule that lines of one bytecode are dropped, exclusion of bytecodes longer
// than three bytes, and closing when the core switches to the DB-Cache.
module tb_fill_unit;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0, from_line = 0;
  logic [1:0] in_valid = 0; uop_t [1:0] in_uop;
  logic wr_en, busy, fold2, fold3, fold4; line_t wr_line;
  int checks = 0, failures = 0, nf2 = 0, nf3 = 0, nf4 = 0;
  line_t got [$];
  int pc;

  always #5 clk = ~clk;
  fill_unit dut (.clk, .rst_n, .in_valid, .in_uop, .from_line, .wr_en, .wr_line, .busy,
                 .fold2, .fold3, .fold4);

  always @(posedge clk) begin
    if (wr_en) got.push_back(wr_line);
    nf2 += fold2; nf3 += fold3; nf4 += fold4;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // issue one bytecode at pc (one per cycle), wait while the unit is busy first
  task automatic issue(input byte unsigned op, input byte unsigned x = 0, input byte unsigned y = 0);
    @(negedge clk);
    in_uop[0] = decode_bc({8'h00, 8'h00, y, x, op}, 32'(pc));
    in_valid = 2'b01;
    pc += int'(in_uop[0].len);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    in_uop = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1) iload_0 iload_1 iadd istore_2 iinc 0 1 -> 5 bytecodes, line closes at five
    pc = 100;
    issue(8'h1a); issue(8'h1b); issue(8'h60); issue(8'h3d); issue(8'h84, 0, 1);
    idle(6);
    chk(got.size() == 1, "line 1 written");
    if (got.size() >= 1) begin
      chk(got[0].tag == 100 && got[0].n == 2 && got[0].next_addr == 107, "line 1 tag/n/next");
      chk(got[0].e[0].nbc == 4 && got[0].e[0].kd == D_LOCAL && got[0].e[0].id == 2 &&
          got[0].e[0].ka == K_LOCAL && got[0].e[0].kb == K_LOCAL, "line 1 folded add");
      chk(got[0].e[1].alu == A_ADD && got[0].e[1].kb == K_IMM && got[0].e[1].nbc == 1, "line 1 iinc");
    end
    chk(nf4 == 1, "one 4-fold");
    // 2) iload_3 ifeq +10 -> closes at the branch, folded LD B1, next = fall-through
    got.delete();
    pc = 200;
    issue(8'h1d); issue(8'h99, 8'h00, 8'h0a);
    idle(5);
    chk(got.size() == 1 && got[0].tag == 200 && got[0].n == 1 && got[0].next_addr == 204 &&
        got[0].e[0].br == B_EQ && got[0].e[0].target == 211 && got[0].e[0].ka == K_LOCAL,
        "branch line");
    chk(nf2 == 1, "one 2-fold");
    // 3) iconst_1 goto -> next address is the goto target
    got.delete();
    pc = 300;
    issue(8'h04); issue(8'ha7, 8'hff, 8'hf0);
    idle(5);
    chk(got.size() == 1 && got[0].n == 2 && got[0].next_addr == 301 - 16 + 0 &&
        got[0].e[1].br == B_GOTO, "goto line");
    // 4) a single bytecode before a branch: dropped
    got.delete();
    pc = 400;
    issue(8'ha7, 8'h00, 8'h08);
    idle(5);
    chk(got.size() == 0, "one-bytecode line dropped");
    // 5) iload_0 iload_1 goto_w: goto_w (5 bytes) is not stored; next = its address
    got.delete();
    pc = 500;
    issue(8'h1a); issue(8'h1b);
    @(negedge clk);
    in_uop[0] = decode_bc({8'h00, 8'h00, 8'h00, 8'h00, 8'hc8}, 32'(pc)); in_valid = 2'b01;
    @(negedge clk); in_valid = 0;
    idle(5);
    chk(got.size() == 1 && got[0].n == 2 && got[0].next_addr == 502 && got[0].tag == 500,
        "long bytecode closes the line");
    // 6) two per cycle, then the core switches to the DB-Cache
    got.delete();
    @(negedge clk);
    in_uop[0] = decode_bc({8'h00, 8'h00, 8'h00, 8'h00, 8'h1a}, 32'd600);
    in_uop[1] = decode_bc({8'h00, 8'h00, 8'h00, 8'h00, 8'h60}, 32'd601);
    in_valid = 2'b11;
    @(negedge clk);
    in_uop[0] = decode_bc({8'h00, 8'h00, 8'h00, 8'h00, 8'h3c}, 32'd602);
    in_valid = 2'b01;
    @(negedge clk);
    in_valid = 0; from_line = 1;
    @(negedge clk);
    from_line = 0;
    idle(5);
    chk(got.size() == 1 && got[0].tag == 600 && got[0].n == 1 && got[0].next_addr == 603 &&
        got[0].e[0].nbc == 3 && got[0].e[0].id == 1, "from_line closes; LD OP ST folded");
    chk(nf3 == 1, "one 3-fold");
    // 7) address jump closes the line
    got.delete();
    pc = 700;
    issue(8'h04); issue(8'h05);
    pc = 800;
    issue(8'h06);
    idle(5);
    chk(got.size() == 1 && got[0].tag == 700 && got[0].n == 2 && got[0].next_addr == 702,
        "jump closes the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
