// tb_stack_cache: random traffic on the three read and two write ports of the stack
// cache against an array model; includes same-entry writes on both ports, where port 1
// must win, and checks that a write is seen from the next cycle on.
module tb_stack_cache;
  logic clk = 0;
  logic [2:0][5:0] ra; logic [2:0][31:0] rd;
  logic [1:0] we; logic [1:0][5:0] wa; logic [1:0][31:0] wd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  stack_cache dut (.clk, .ra, .rd, .we, .wa, .wd);

  initial begin
    we = '0; ra = '0; wa = '0; wd = '0;
    // fill every entry through alternating ports
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 2'b01 << (i % 2); wa[i % 2] = i; wd[i % 2] = 32'h1000 + i; model[i] = 32'h1000 + i;
    end
    @(negedge clk); we = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) ra[p] = $urandom_range(0, 63);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd[p] !== model[ra[p]]) begin
          failures++; $display("FAIL: port %0d addr %0d got %h exp %h", p, ra[p], rd[p], model[ra[p]]);
        end
      end
      we = 2'($urandom);
      wa[0] = $urandom_range(0, 63);
      wa[1] = (n % 5 == 0) ? wa[0] : 6'($urandom_range(0, 63));
      wd[0] = $urandom; wd[1] = $urandom;
      if (we[0]) model[wa[0]] = wd[0];
      if (we[1]) model[wa[1]] = wd[1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
