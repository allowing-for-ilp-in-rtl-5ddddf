// tb_length_decoder: random byte lengths (1..5) in the 7-byte window; the cumulative
// lengths are recomputed here by walking the instructions one after another.
module tb_length_decoder;
  logic [6:0][3:0] len; logic [3:0][4:0] cum;
  int checks = 0, failures = 0;

  length_decoder dut (.len, .cum);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int pos, e;
      for (int i = 0; i < 7; i++) len[i] = (n % 3 == 0) ? 4'($urandom_range(1, 3)) : 4'($urandom_range(1, 5));
      #1;
      pos = 0;
      for (int k = 0; k < 4; k++) begin
        // end of instruction k, or 0 once the start has left the window
        if (pos < 7 && (k == 0 || pos != 0)) e = pos + int'(len[pos]); else e = 0;
        checks++;
        if (int'(cum[k]) != e) begin
          failures++; $display("FAIL: k=%0d len=%h cum=%0d exp=%0d", k, len, cum[k], e);
        end
        pos = e;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
