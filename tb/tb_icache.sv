// tb_icache: writes random bytes through the byte port and reads them back as aligned
// 8-byte blocks one cycle after the address, against a byte-array model.
module tb_icache;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [31:0] rd_addr = 0, wr_addr = 0; logic [63:0] rd_data; logic [7:0] wr_data = 0;
  byte unsigned model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  icache dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 32'(i) + 32'h4000 * 0; wr_data = $urandom; model[i] = wr_data;
    end
    // the last block again at an address above the cache size: it wraps
    @(negedge clk); wr_addr = 32'h4000 + 5; wr_data = 8'h5a; model[5] = 8'h5a;
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(0, 1023);
      rd_en = 1; rd_addr = a;
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (rd_data[8*j +: 8] != model[(a & ~7) + j]) begin
          failures++; $display("FAIL: addr %0d lane %0d", a, j);
        end
      end
      // data holds while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_data[7:0] != model[a & ~7]) begin failures++; $display("FAIL: hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
