// tb_db_cache: lines written by tag are found again at exactly that address; other
// addresses, reset state, and a line evicted by a conflicting tag (same low bits) miss.
module tb_db_cache;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, hit;
  logic [31:0] lookup_addr = 0; line_t line, wr_line;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  db_cache dut (.clk, .rst_n, .lookup_addr, .hit, .line, .wr_en, .wr_line);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic line_t mk(input logic [31:0] tag);
    line_t l;
    l = '0; l.valid = 1; l.tag = tag; l.n = 3'(1 + tag % 5); l.next_addr = tag + 7;
    l.e[0].valid = 1; l.e[0].pc = tag; l.e[0].imm = tag[15:0];
    return l;
  endfunction

  logic [31:0] tags [$];

  initial begin
    wr_line = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) begin lookup_addr = a; #1; chk(!hit, "miss after reset"); end
    // fill 64 lines at distinct indices
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); wr_en = 1; wr_line = mk(32'(i) + 32'h100 * $urandom_range(0, 3) * 64 / 64);
      tags.push_back(wr_line.tag);
    end
    @(negedge clk); wr_en = 0;
    foreach (tags[i]) begin
      lookup_addr = tags[i]; #1;
      chk(hit && line == mk(tags[i]), $sformatf("hit at %h", tags[i]));
      lookup_addr = tags[i] + 32'h40; #1;
      chk(!hit, $sformatf("miss at %h", tags[i] + 32'h40));
    end
    // a conflicting line replaces the old one
    @(negedge clk); wr_en = 1; wr_line = mk(tags[3] + 32'h40);
    @(negedge clk); wr_en = 0;
    lookup_addr = tags[3]; #1; chk(!hit, "evicted line misses");
    lookup_addr = tags[3] + 32'h40; #1; chk(hit && line.next_addr == tags[3] + 32'h47, "new line hits");
    // a write is not visible before its edge
    wr_en = 1; wr_line = mk(32'h7777); lookup_addr = 32'h7777; #1; chk(!hit, "not before the edge");
    @(negedge clk); wr_en = 0; #1; chk(hit, "after the edge");
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
