// tb_issue_unit: pairing decisions with stack disambiguation on and off, the port
// limit, branch and return rules, and the stack-cache addresses of both slots (read
// ports as used by the datapath, write addresses, new OPTOP), all worked out by hand.
module tb_issue_unit;
  import jp_pkg::*;
  uop_t u0, u1; logic sd_en; logic [5:0] optop, vars;
  logic [1:0] issue; logic [2:0][5:0] ra; logic [1:0][1:0] sel_a, sel_b;
  logic [1:0] we; logic [1:0][5:0] wa; logic [5:0] optop_next; logic dep_block, sd_pair;
  int checks = 0, failures = 0;

  issue_unit dut (.u0, .u1, .sd_en, .optop, .vars, .issue, .ra, .sel_a, .sel_b, .we, .wa,
                  .optop_next, .dep_block, .sd_pair);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic uop_t bc(input byte unsigned op, input byte unsigned x = 0);
    return decode_bc({8'h00, 8'h00, 8'h00, x, op}, 32'd0);
  endfunction

  task automatic pair(input uop_t a, input uop_t b, input bit sd, input bit exp_pair,
                      input string s);
    u0 = a; u1 = b; sd_en = sd; #1;
    chk(issue == {exp_pair, 1'b1}, $sformatf("%s sd=%0d issue=%b", s, sd, issue));
  endtask

  initial begin
    vars = 6'd2; optop = 6'd20;
    // iload_1 then iload_2: write OS, read LV -> pair only with disambiguation
    pair(bc(8'h1b), bc(8'h1c), 0, 0, "iload,iload");
    chk(dep_block && !sd_pair, "blocked without disambiguation");
    pair(bc(8'h1b), bc(8'h1c), 1, 1, "iload,iload");
    chk(sd_pair && !dep_block, "sd pair flagged");
    chk(ra[sel_a[0]] == 3 && ra[sel_a[1]] == 4, "local addresses VARS+i");
    chk(we == 2'b11 && wa[0] == 20 && wa[1] == 21 && optop_next == 22, "two pushes");
    // iload_1 then istore_2: true dependency through the operand stack
    pair(bc(8'h1b), bc(8'h3d), 1, 0, "iload,istore");
    chk(optop_next == 21 && we == 2'b01 && wa[0] == 20, "single push");
    // istore_1 then iload_1: LV write, LV read -> dependent in both modes
    pair(bc(8'h3c), bc(8'h1b), 1, 0, "istore,iload");
    // iadd then iconst: no reads by the second -> pair in both modes
    pair(bc(8'h60), bc(8'h04), 0, 1, "iadd,iconst");
    chk(ra[sel_a[0]] == 18 && ra[sel_b[0]] == 19 && wa[0] == 18 && wa[1] == 19 &&
        optop_next == 20, "iadd pops two, pushes one; iconst pushes after it");
    // iadd then istore_1: dependent (istore reads the sum)
    pair(bc(8'h60), bc(8'h3c), 1, 0, "iadd,istore");
    // istore_1 then iadd: LV write, OS read -> pair only with disambiguation
    pair(bc(8'h3c), bc(8'h60), 0, 0, "istore,iadd");
    pair(bc(8'h3c), bc(8'h60), 1, 1, "istore,iadd");
    chk(ra[sel_a[0]] == 19 && wa[0] == 3 && ra[sel_a[1]] == 17 && ra[sel_b[1]] == 18 &&
        wa[1] == 17 && optop_next == 18, "istore then iadd addresses");
    // port limit: iadd (2 reads) + iadd (2 reads) > 3
    pair(bc(8'h3c), bc(8'h60), 1, 1, "ports 1+2");
    begin
      uop_t f;
      f = bc(8'h60); f.ka = K_LOCAL; f.ia = 0; f.kb = K_LOCAL; f.ib = 1; f.kd = D_LOCAL; f.id = 5;
      pair(f, bc(8'h60), 1, 0, "ports 2+2");
      chk(!dep_block, "port limit is not a dependency");
    end
    // branch first never pairs; branch second may
    pair(bc(8'h99), bc(8'h04), 1, 0, "branch first");
    pair(bc(8'h04), bc(8'ha7), 0, 1, "goto second");
    // return never pairs
    pair(bc(8'h04), bc(8'hb1), 1, 0, "return second");
    pair(bc(8'hb1), bc(8'h04), 1, 0, "return first");
    // nothing valid
    u0 = '0; u1 = bc(8'h04); #1;
    chk(issue == 2'b00 && we == 2'b00 && optop_next == optop, "no issue");
    // wrap-around of stack addresses
    optop = 6'd1; u0 = bc(8'h60); u1 = '0; sd_en = 1; #1;
    chk(ra[sel_a[0]] == 63 && ra[sel_b[0]] == 0 && wa[0] == 63 && optop_next == 0, "wrap");
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
