// tb_int_alu: random operands through every ALU function and branch condition of the
// integer datapath, compared with values computed here from the JVM definitions.
module tb_int_alu;
  import jp_pkg::*;
  alu_e alu; br_e br; logic has_b;
  logic [31:0] a, b, y; logic taken;
  int checks = 0, failures = 0;

  int_alu dut (.alu, .br, .has_b, .a, .b, .y, .taken);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      int sa, sb, exp_y; bit exp_t;
      a = $urandom; b = (n % 4 == 0) ? a : $urandom;
      if (n % 7 == 0) b = 0;
      sa = int'(a); sb = int'(b);
      for (int f = 0; f <= 10; f++) begin
        alu = alu_e'(f); br = B_NONE; has_b = 1'b1;
        #1;
        case (f)
          0: exp_y = sa;           1: exp_y = sa + sb;      2: exp_y = sa - sb;
          3: exp_y = sa * sb;      4: exp_y = sa & sb;      5: exp_y = sa | sb;
          6: exp_y = sa ^ sb;      7: exp_y = sa << (sb & 31);
          8: exp_y = sa >>> (sb & 31);
          9: exp_y = int'(unsigned'(sa) >> (sb & 31));
          default: exp_y = -sa;
        endcase
        chk(int'(y) == exp_y && !taken, $sformatf("alu %0d a=%h b=%h y=%h", f, a, b, y));
      end
      for (int c = 1; c <= 7; c++) begin
        for (int hb = 0; hb < 2; hb++) begin
          int cmp;
          alu = A_PASS; br = br_e'(c); has_b = hb[0];
          cmp = hb ? sb : 0;
          #1;
          case (c)
            1: exp_t = 1;          2: exp_t = sa == cmp;  3: exp_t = sa != cmp;
            4: exp_t = sa < cmp;   5: exp_t = sa >= cmp;  6: exp_t = sa > cmp;
            default: exp_t = sa <= cmp;
          endcase
          chk(taken == exp_t, $sformatf("br %0d hb=%0d a=%h b=%h", c, hb, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
