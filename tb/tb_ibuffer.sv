// tb_ibuffer: random shifts and writes (respecting wr_ready, as the fetch stage does)
// and occasional flushes, against a byte-queue model; checks the visible bytes, their
// valid bits, their predecoded lengths and the fill count every cycle.
module tb_ibuffer;
  import jp_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0;
  logic [2:0] shift = 0; logic [3:0] wr_n = 0; logic [7:0][7:0] wr_data = 0;
  logic wr_ready; logic [4:0] count;
  logic [6:0][7:0] rd_bytes; logic [6:0][3:0] rd_len; logic [6:0] rd_valid;
  byte unsigned q[$];
  byte unsigned ops [8] = '{8'h10, 8'h11, 8'h15, 8'h99, 8'hc8, 8'h60, 8'h84, 8'h1a};
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ibuffer dut (.clk, .rst_n, .flush, .shift, .wr_en, .wr_n, .wr_data, .wr_ready, .count,
               .rd_bytes, .rd_len, .rd_valid);

  function automatic int exp_len(byte unsigned b);
    case (b)
      8'h10, 8'h15, 8'h36: return 2;
      8'h11, 8'h84, 8'ha7: return 3;
      8'hc8: return 5;
      default: return (b >= 8'h99 && b <= 8'ha4) ? 3 : 1;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare the state
      checks++;
      if (int'(count) != q.size()) begin failures++; $display("FAIL: count %0d exp %0d", count, q.size()); end
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (rd_valid[i] != (i < q.size()) ||
            (i < q.size() && (rd_bytes[i] != q[i] || int'(rd_len[i]) != exp_len(q[i])))) begin
          failures++; $display("FAIL: byte %0d", i);
        end
      end
      checks++;
      if (wr_ready != (q.size() <= 8)) begin failures++; $display("FAIL: wr_ready"); end
      // next stimulus
      flush = ($urandom_range(0, 40) == 0);
      shift = $urandom_range(0, (q.size() < 7) ? q.size() : 7);
      wr_en = wr_ready && $urandom_range(0, 2) != 0;
      wr_n  = $urandom_range(1, 8);
      for (int j = 0; j < 8; j++) wr_data[j] = ($urandom_range(0, 1)) ? ops[$urandom_range(0, 7)] : 8'($urandom);
      if (flush) q.delete();
      else begin
        for (int s = 0; s < int'(shift); s++) void'(q.pop_front());
        if (wr_en) for (int j = 0; j < int'(wr_n); j++) q.push_back(wr_data[j]);
      end
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
