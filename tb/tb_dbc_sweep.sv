// tb_dbc_sweep: DB-Cache size sweep on a generated integer workload.
//
// The same program runs on three copies of the core that differ only in the number of
// DB-Cache lines (64, 256 and 1024). The program is a loop whose body holds many short
// basic blocks of foldable load/op/store sequences, so its decoded form needs more
// lines than the smallest cache holds. Each copy must produce the same locals, OPTOP
// and bytecode count as the reference interpreter. Across sizes, a larger cache must
// not write more lines, must not issue fewer bundles from the DB-Cache and must not take
// more cycles; the smallest cache must be measurably worse than the largest. The
// bytecodes completed per cycle of each size are printed. A watchdog ends a hung run.
module tb_dbc_sweep;
  import jp_pkg::*;
  import jvm_ref_pkg::*;

  localparam int NBLK  = 120;  // basic blocks in the loop body
  localparam int ITERS = 4;    // loop iterations
  localparam int CNT   = 14;   // loop counter local

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [31:0] prog_addr = '0;
  logic [7:0]  prog_data = '0;
  logic [2:0]  halted, illegal;
  logic [5:0]  optop [3];
  perf_t       perf  [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jcore_top #(.DBC_LINES(64)) d64 (
    .clk, .rst_n, .sd_en(1'b1), .boot_pc(32'd0), .frame_vars(6'd0), .frame_optop(6'd16),
    .prog_we, .prog_addr, .prog_data, .halted(halted[0]), .illegal(illegal[0]),
    .optop(optop[0]), .perf(perf[0]));
  jcore_top #(.DBC_LINES(256)) d256 (
    .clk, .rst_n, .sd_en(1'b1), .boot_pc(32'd0), .frame_vars(6'd0), .frame_optop(6'd16),
    .prog_we, .prog_addr, .prog_data, .halted(halted[1]), .illegal(illegal[1]),
    .optop(optop[1]), .perf(perf[1]));
  jcore_top #(.DBC_LINES(1024)) d1024 (
    .clk, .rst_n, .sd_en(1'b1), .boot_pc(32'd0), .frame_vars(6'd0), .frame_optop(6'd16),
    .prog_we, .prog_addr, .prog_data, .halted(halted[2]), .illegal(illegal[2]),
    .optop(optop[2]), .perf(perf[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program generator
  byte unsigned prog[$];
  int unsigned seed = 32'h1234_5678;

  function automatic int rnd(input int n);
    seed = seed * 32'd1103515245 + 32'd12345;
    return int'((seed >> 16) % n);
  endfunction

  // load a local: short form for 0..3 half of the time
  function automatic void emit_load(input int l);
    if (l < 4 && rnd(2) == 0) prog.push_back(8'h1a + l);
    else begin prog.push_back(8'h15); prog.push_back(l); end
  endfunction

  function automatic void emit_store(input int l);
    if (l < 4 && rnd(2) == 0) prog.push_back(8'h3b + l);
    else begin prog.push_back(8'h36); prog.push_back(l); end
  endfunction

  function automatic void gen();
    byte unsigned ops [5] = '{8'h60, 8'h64, 8'h82, 8'h7e, 8'h80};
    int loop_pc, off;
    for (int l = 0; l < CNT; l++) begin
      prog.push_back(8'h10); prog.push_back(rnd(200) + 1);
      emit_store(l);
    end
    prog.push_back(8'h03); emit_store(CNT);
    loop_pc = prog.size();
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < 3; k++) begin
        emit_load(rnd(CNT));
        emit_load(rnd(CNT));
        prog.push_back(ops[rnd(5)]);
        emit_store(rnd(CNT));
      end
      // end the block with a branch to the next bytecode (taken or not, same path)
      emit_load(rnd(CNT));
      prog.push_back(rnd(2) ? 8'h99 : 8'h9a); prog.push_back(8'h00); prog.push_back(8'h03);
    end
    prog.push_back(8'h84); prog.push_back(CNT); prog.push_back(8'h01);
    emit_load(CNT);
    prog.push_back(8'h10); prog.push_back(ITERS);
    off = loop_pc - int'(prog.size());
    prog.push_back(8'ha1); prog.push_back(off[15:8]); prog.push_back(off[7:0]);
    prog.push_back(8'hb1);
  endfunction

  // ---------------------------------------------------------------- run
  jvm_ref_pkg::result_t ref_r;
  string names [3] = '{"64", "256", "1024"};

  function automatic int loc_of(input int d, input int i);
    case (d)
      0:       return int'(d64.u_sc.mem[i]);
      1:       return int'(d256.u_sc.mem[i]);
      default: return int'(d1024.u_sc.mem[i]);
    endcase
  endfunction

  initial begin
    automatic int cyc = 0;
    gen();
    ref_r = jvm_ref_pkg::run(prog, 1000000);
    check(ref_r.ok, "reference interpreter finished");
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!(&halted) && cyc < 200000) begin
      @(posedge clk);
      cyc++;
    end
    @(negedge clk);
    for (int d = 0; d < 3; d++) begin
      check(halted[d] && !illegal[d], $sformatf("%s lines: core halted normally", names[d]));
      for (int i = 0; i <= CNT; i++)
        check(loc_of(d, i) == ref_r.loc[i],
              $sformatf("%s lines: local %0d = %0d, expected %0d", names[d], i,
                        loc_of(d, i), ref_r.loc[i]));
      check(int'(optop[d]) == 16 + ref_r.depth,
            $sformatf("%s lines: optop %0d", names[d], optop[d]));
      check(int'(perf[d].bytecodes) == ref_r.count,
            $sformatf("%s lines: %0d bytecodes, expected %0d", names[d], perf[d].bytecodes,
                      ref_r.count));
      $display("lines=%s cycles=%0d bytecodes=%0d bc_per_cycle_x1000=%0d line_bundles=%0d hits=%0d lines_written=%0d dual=%0d",
               names[d], perf[d].cycles, perf[d].bytecodes,
               (perf[d].bytecodes * 1000) / perf[d].cycles, perf[d].line_bundles,
               perf[d].line_hits, perf[d].lines_written, perf[d].dual);
    end
    for (int d = 1; d < 3; d++) begin
      check(perf[d].lines_written <= perf[d-1].lines_written,
            $sformatf("%s lines writes no more lines than %s", names[d], names[d-1]));
      check(perf[d].line_bundles >= perf[d-1].line_bundles,
            $sformatf("%s lines issues no fewer DB-Cache bundles than %s", names[d], names[d-1]));
      check(perf[d].cycles <= perf[d-1].cycles,
            $sformatf("%s lines takes no more cycles than %s", names[d], names[d-1]));
    end
    check(perf[0].lines_written > perf[2].lines_written, "smallest cache rewrites lines");
    check(perf[0].cycles > perf[2].cycles, "smallest cache is slower");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
