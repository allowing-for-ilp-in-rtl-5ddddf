// tb_jcore_top: end-to-end test of the bytecode core at its default parameters.
//
// Loads a small integer program (a counted loop with folding candidates, an imul, a
// goto_w, taken and untaken branches, straight-line code, then a short second loop
// headed by a four-bytecode pattern, ending in return) and runs it twice, once with
// stack disambiguation and once without. The bytecode interpreter of jvm_ref_pkg
// executes the same program; after each run the local variables in the stack cache,
// the final OPTOP and the number of bytecodes completed must match it. The test also
// requires that every mechanism of the core happened: DB-Cache line writes and hits,
// folds of 2, 3 and 4 bytecodes, multi-cycle stalls, dual issue, pairs blocked by
// dependencies, pairs enabled only by disambiguation (and none with it off), fetch
// redirects, and that disambiguation did not cost cycles. A watchdog ends a run that
// does not halt.
module tb_jcore_top;
  import jp_pkg::*;
  import jvm_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sd_en = 1'b0;
  logic prog_we = 1'b0;
  logic [31:0] prog_addr = '0;
  logic [7:0]  prog_data = '0;
  logic halted, illegal;
  logic [5:0] optop;
  perf_t perf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jcore_top dut (
    .clk, .rst_n, .sd_en, .boot_pc(32'd0), .frame_vars(6'd0), .frame_optop(6'd16),
    .prog_we, .prog_addr, .prog_data, .halted, .illegal, .optop, .perf);

  // ---------------------------------------------------------------- program
  byte unsigned prog[$] = '{
    8'h03, 8'h3b,                    //  0 iconst_0; istore_0          i = 0
    8'h04, 8'h3c,                    //  2 iconst_1; istore_1          acc = 1
    8'h10, 8'h0a, 8'h3d,             //  4 bipush 10; istore_2         n = 10
    8'h03, 8'h3e,                    //  7 iconst_0; istore_3          sum = 0
    8'h11, 8'h01, 8'h00, 8'h36, 8'h04, //  9 sipush 256; istore 4
    8'h03, 8'h36, 8'h05,             // 14 iconst_0; istore 5
    8'h03, 8'h36, 8'h06,             // 17 iconst_0; istore 6
    8'h03, 8'h36, 8'h07,             // 20 iconst_0; istore 7
    // loop (23)
    8'h1d, 8'h1a, 8'h60, 8'h3e,      // 23 sum += i
    8'h1b, 8'h06, 8'h68, 8'h3c,      // 27 acc = acc * 3
    8'h15, 8'h04, 8'h1a, 8'h82, 8'h36, 8'h04,  // 31 l4 ^= i
    8'h1a, 8'h1b, 8'h60, 8'h15, 8'h05, 8'h60, 8'h36, 8'h05, // 37 l5 = (i+acc)+l5
    8'h1a, 8'h05, 8'h78, 8'h36, 8'h06,         // 45 l6 = i << 2
    8'h84, 8'h00, 8'h01,             // 50 iinc 0 1
    8'h1a, 8'h1c, 8'ha1, 8'hff, 8'he0, // 53 iload_0; iload_2; if_icmplt 23 (at 55)
    8'hc8, 8'h00, 8'h00, 8'h00, 8'h07, // 58 goto_w 65
    8'h02, 8'hb1,                    // 63 (skipped)
    8'h1a, 8'h1b, 8'h64, 8'h74, 8'h36, 8'h07,  // 65 l7 = -(i - acc)
    8'h1c, 8'h05, 8'h7a, 8'h36, 8'h06,         // 71 l6 = n >> 2
    8'h15, 8'h04, 8'h1b, 8'h7e, 8'h1c, 8'h80, 8'h36, 8'h05, // 76 l5 = (l4 & acc) | n
    8'h10, 8'hfb, 8'h57, 8'h00,      // 84 bipush -5; pop; nop
    8'h02, 8'h1c, 8'h7c, 8'h15, 8'h07, 8'h60, 8'h36, 8'h07, // 88 l7 += -1 >>> n
    8'h1a, 8'h99, 8'h00, 8'h05,      // 96 iload_0; ifeq 102 (at 97, not taken)
    8'h04, 8'h3e,                    // 100 iconst_1; istore_3
    8'h1b, 8'h9a, 8'h00, 8'h04,      // 102 iload_1; ifne 107 (at 103, taken)
    8'h00,                           // 106 (skipped)
    8'h03, 8'h36, 8'h05,             // 107 iconst_0; istore 5         l5 = 0
    8'h1b, 8'h1c, 8'h60, 8'h3e,      // 110 l3 = acc + n   (second loop)
    8'h84, 8'h05, 8'h01,             // 114 iinc 5 1
    8'h15, 8'h05, 8'h10, 8'h06,      // 117 iload 5; bipush 6
    8'ha1, 8'hff, 8'hf5,             // 121 if_icmplt 110
    8'hb1                            // 124 return
  };

  // ---------------------------------------------------------------- reference model
  jvm_ref_pkg::result_t ref_r;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- one run
  perf_t p_sd, p_nosd;

  task automatic run(input bit sd, output perf_t p);
    int cyc = 0;
    rst_n = 1'b0;
    sd_en = sd;
    // keep the locals defined: the program initialises them, the stack cache is not reset
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!halted && cyc < 20000) begin
      @(posedge clk);
      cyc++;
    end
    @(negedge clk);
    p = perf;
    check(halted && cyc < 20000, $sformatf("sd=%0d: core halted", sd));
    check(!illegal, $sformatf("sd=%0d: no illegal stop", sd));
    for (int i = 0; i < 8; i++)
      check(dut.u_sc.mem[i] == ref_r.loc[i],
            $sformatf("sd=%0d: local %0d = %0d, expected %0d", sd, i,
                      int'(dut.u_sc.mem[i]), ref_r.loc[i]));
    check(int'(optop) == 16 + ref_r.depth,
          $sformatf("sd=%0d: optop %0d expected %0d", sd, optop, 16 + ref_r.depth));
    check(int'(p.bytecodes) == ref_r.count,
          $sformatf("sd=%0d: %0d bytecodes completed, expected %0d", sd, p.bytecodes, ref_r.count));
    $display("sd=%0d cycles=%0d bytecodes=%0d bundles=%0d dual=%0d line_bundles=%0d hits=%0d lines=%0d f2=%0d f3=%0d f4=%0d stalls=%0d depblk=%0d sdpairs=%0d redirects=%0d",
             sd, p.cycles, p.bytecodes, p.bundles, p.dual, p.line_bundles, p.line_hits,
             p.lines_written, p.fold2, p.fold3, p.fold4, p.stall_cycles, p.dep_blocks,
             p.sd_pairs, p.redirects);
  endtask

  initial begin
    ref_r = jvm_ref_pkg::run(prog, 100000);
    check(ref_r.ok, "reference interpreter finished");
    run(1'b1, p_sd);
    run(1'b0, p_nosd);
    // every mechanism happened
    check(p_sd.lines_written > 0, "fill unit wrote DB-Cache lines");
    check(p_sd.line_hits > 0,     "DB-Cache hits");
    check(p_sd.line_bundles > 0,  "bundles issued from the DB-Cache");
    check(p_sd.fold2 > 0,         "2-bytecode folds");
    check(p_sd.fold3 > 0,         "3-bytecode folds");
    check(p_sd.fold4 > 0,         "4-bytecode folds");
    check(p_sd.stall_cycles > 0,  "multi-cycle stalls");
    check(p_sd.dual > 0,          "dual issue");
    check(p_sd.dep_blocks > 0,    "pairs blocked by stack dependencies");
    check(p_sd.sd_pairs > 0,      "pairs enabled by stack disambiguation");
    check(p_nosd.sd_pairs == 0,   "no disambiguated pairs when it is off");
    check(p_sd.redirects > 0,     "fetch redirects");
    check(p_sd.dual > p_nosd.dual, "disambiguation pairs more micro-ops");
    check(p_sd.cycles <= p_nosd.cycles, "disambiguation costs no cycles");
    // the DB-Cache path completes more than one bytecode per bundle on average
    check(p_sd.bytecodes > p_sd.bundles, "more than one bytecode per bundle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
