// jcore_top: a picoJava-II style bytecode core with a fill unit, a decoded bytecode
// cache (DB-Cache), in-order dual issue and stack disambiguation.
//
// Two paths supply micro-ops to one issue stage:
//  * the normal path: the instruction cache fills the 16-byte instruction buffer
//    (8 bytes per fetch) and the decode stage, which has no folding logic, decodes up to
//    four bytecodes from its top 7 bytes;
//  * the DB-Cache path: when the address of the next bytecode hits a DB-Cache line, the
//    line's decoded and already folded micro-ops are issued instead, and the fetch unit
//    starts prefetching at the line's next address at once.
// The issue stage takes one or two micro-ops per cycle in program order (issue_unit),
// reads the stack cache, computes in two integer datapaths and writes back, all in the
// same cycle. A bundle holding an imul is held MUL_LAT cycles before it commits, so a
// pair waits for its slower member. Micro-ops issued from the normal path also go to
// the fill unit, which builds and folds DB-Cache lines from them for later reuse.
// Stack disambiguation applies only to pairs issued from a DB-Cache line: the area
// marks it needs are stored with the line, so the decode path needs no extra logic.
// Branches resolve at issue. Static prediction: the fetch stream continues at the
// fall-through address (or, inside a DB-Cache line ending in goto, at its target); a
// taken conditional branch flushes the instruction buffer and refetches. A return stops
// the core (halted), an unimplemented bytecode stops it with `illegal`.
//
// Interface: asynchronous active-low reset. The program is written through prog_*
// (normally while the core is held in reset). In the first cycle after reset the core
// loads the frame: boot_pc (first bytecode), frame_vars (VARS, the entry of local
// variable 0) and frame_optop (OPTOP, the first free operand-stack entry). sd_en
// switches stack disambiguation on. perf counts the events of jp_pkg::perf_t.
//
// The block structure (fill unit, DB-Cache, its 64 lines of five bytecodes with a next
// address, decode without folding, dual in-order issue, stack disambiguation, 64-entry
// stack cache with 3 read/2 write ports, 16 KB instruction cache, 16-byte buffer)
// follows the document. Collapsing register read, execute, cache and write-back into
// one issue stage, the micro-op format, MUL_LAT and the stopping rules are this
// design's own. The data cache, floating point unit, microcode, traps and stack
// spilling of the reference processor are not part of it.
module jcore_top
  import jp_pkg::*;
#(
  parameter int IC_BYTES   = 16384,
  parameter int DBC_LINES  = 64,
  parameter int SC_ENTRIES = 64,
  parameter int MUL_LAT    = 3,
  localparam int SB        = $clog2(SC_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sd_en,
  input  logic [AW-1:0] boot_pc,
  input  logic [SB-1:0] frame_vars,
  input  logic [SB-1:0] frame_optop,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [7:0]    prog_data,
  output logic          halted,
  output logic          illegal,
  output logic [SB-1:0] optop,
  output perf_t         perf
);
  // ------------------------------------------------------------ state
  logic [AW-1:0] pc_q;          // next bytecode to issue (head of the buffer off-line)
  logic [AW-1:0] fetch_pc_q;    // next byte to fetch
  logic          f_pend_q;      // a fetch block arrives this cycle
  logic [2:0]    f_off_q;       // first useful byte in that block
  logic          line_mode_q;   // issuing from line_q
  line_t         line_q;
  logic [2:0]    idx_q;
  logic [SB-1:0] optop_q, vars_q;
  logic [2:0]    ex_cnt_q;
  logic          halted_q, illegal_q;
  logic          started_q;     // frame loaded from the ports
  perf_t         perf_q;

  // ------------------------------------------------------------ fetch and buffer
  logic [63:0]        ic_data;
  logic               f_req, redirect;
  logic [AW-1:0]      redirect_pc;
  logic [2:0]         ib_shift;
  logic               ib_ready;
  logic [4:0]         ib_count;
  logic [6:0][7:0]    ib_bytes;
  logic [6:0][3:0]    ib_len;
  logic [6:0]         ib_valid;
  logic [7:0][7:0]    ib_wdata;

  assign f_req     = started_q && !halted_q && !redirect &&
                     (f_pend_q ? ib_count == 0 : ib_ready);

  icache #(.BYTES(IC_BYTES), .FETCH_BYTES(8)) u_ic (
    .clk, .rd_en(f_req), .rd_addr(fetch_pc_q), .rd_data(ic_data),
    .wr_en(prog_we), .wr_addr(prog_addr), .wr_data(prog_data));

  assign ib_wdata = 64'(ic_data >> (8 * f_off_q));

  ibuffer #(.DEPTH(16), .WR_BYTES(8), .RD_BYTES(7)) u_ib (
    .clk, .rst_n, .flush(redirect), .shift(ib_shift),
    .wr_en(f_pend_q), .wr_n(4'(8 - int'(f_off_q))), .wr_data(ib_wdata),
    .wr_ready(ib_ready), .count(ib_count),
    .rd_bytes(ib_bytes), .rd_len(ib_len), .rd_valid(ib_valid));

  // ------------------------------------------------------------ decode
  uop_t [3:0]      dec;
  logic [3:0][4:0] dec_ends;

  bytecode_decoder #(.RD_BYTES(7), .NINST(4)) u_dec (
    .bytes(ib_bytes), .len(ib_len), .bvalid(ib_valid), .pc(pc_q),
    .uops(dec), .ends(dec_ends));

  // ------------------------------------------------------------ DB-Cache and fill unit
  logic  db_hit, fu_wr, fu_busy, fu_f2, fu_f3, fu_f4;
  line_t db_line, fu_line;
  logic [1:0] fu_valid;

  db_cache #(.ENTRIES(DBC_LINES)) u_dbc (
    .clk, .rst_n, .lookup_addr(pc_q), .hit(db_hit), .line(db_line),
    .wr_en(fu_wr), .wr_line(fu_line));

  // ------------------------------------------------------------ issue window
  logic       use_hit, from_line, go, commit;
  line_t      cur_line;
  logic [2:0] cidx;
  uop_t       w0, w1;

  always_comb begin
    use_hit   = !line_mode_q && db_hit;
    from_line = line_mode_q || use_hit;
    cur_line  = line_mode_q ? line_q : db_line;
    cidx      = line_mode_q ? idx_q : 3'd0;
    if (from_line) begin
      w0 = (cidx < cur_line.n) ? cur_line.e[cidx] : '0;
      w1 = (cidx + 3'd1 < cur_line.n) ? cur_line.e[cidx + 3'd1] : '0;
    end else begin
      w0 = dec[0];
      w1 = dec[1];
    end
  end

  logic [1:0]           iss;
  logic [2:0][SB-1:0]   ra;
  logic [1:0][1:0]      sel_a, sel_b;
  logic [1:0]           iu_we;
  logic [1:0][SB-1:0]   wa;
  logic [SB-1:0]        optop_n;
  logic                 dep_block, sd_pair;

  issue_unit #(.ENTRIES(SC_ENTRIES), .RD_PORTS(3)) u_iss (
    .u0(w0), .u1(w1), .sd_en(sd_en && from_line), .optop(optop_q), .vars(vars_q),
    .issue(iss), .ra, .sel_a, .sel_b, .we(iu_we), .wa, .optop_next(optop_n),
    .dep_block, .sd_pair);

  // ------------------------------------------------------------ datapath
  logic [2:0][XLEN-1:0] rd;
  logic [1:0][XLEN-1:0] opa, opb, res;
  logic [1:0]           taken;
  logic [2:0]           lat;

  stack_cache #(.ENTRIES(SC_ENTRIES), .XLEN(XLEN)) u_sc (
    .clk, .ra, .rd, .we(iu_we & {2{commit}}), .wa, .wd(res));

  function automatic logic [XLEN-1:0] operand(input src_e k, input logic [XLEN-1:0] port,
                                              input logic [15:0] imm);
    unique case (k)
      K_STACK, K_LOCAL: return port;
      K_IMM:            return {{(XLEN-16){imm[15]}}, imm};
      default:          return '0;
    endcase
  endfunction

  always_comb begin
    opa[0] = operand(w0.ka, rd[sel_a[0]], w0.imm);
    opb[0] = operand(w0.kb, rd[sel_b[0]], w0.imm);
    opa[1] = operand(w1.ka, rd[sel_a[1]], w1.imm);
    opb[1] = operand(w1.kb, rd[sel_b[1]], w1.imm);
  end

  int_alu u_alu0 (.alu(w0.alu), .br(w0.br), .has_b(w0.kb != K_NONE),
                  .a(opa[0]), .b(opb[0]), .y(res[0]), .taken(taken[0]));
  int_alu u_alu1 (.alu(w1.alu), .br(w1.br), .has_b(w1.kb != K_NONE),
                  .a(opa[1]), .b(opb[1]), .y(res[1]), .taken(taken[1]));

  // ------------------------------------------------------------ commit control
  logic          br_taken;
  logic [AW-1:0] br_target;
  logic [2:0]    nidx;
  logic [AW-1:0] after_line;
  logic          leave_line;

  always_comb begin
    lat = 3'd1;
    if ((iss[0] && w0.alu == A_MUL) || (iss[1] && w1.alu == A_MUL)) lat = 3'(MUL_LAT);
    go     = started_q && !halted_q && iss[0];
    commit = go && (ex_cnt_q + 3'd1 >= lat);

    br_taken  = 1'b0;
    br_target = w0.target;
    if (iss[0] && w0.br != B_NONE && taken[0]) br_taken = 1'b1;
    if (iss[1] && w1.br != B_NONE && taken[1]) begin br_taken = 1'b1; br_target = w1.target; end

    nidx       = cidx + (iss[1] ? 3'd2 : 3'd1);
    leave_line = from_line && nidx >= cur_line.n;
    after_line = br_taken ? br_target : cur_line.next_addr;

    redirect    = 1'b0;
    redirect_pc = br_target;
    if (commit) begin
      if (from_line) begin
        if (leave_line && (use_hit || after_line != cur_line.next_addr)) begin
          redirect = 1'b1; redirect_pc = after_line;
        end else if (use_hit) begin
          redirect = 1'b1; redirect_pc = cur_line.next_addr;
        end
      end else if (br_taken) begin
        redirect = 1'b1; redirect_pc = br_target;
      end
    end
    ib_shift = (commit && !from_line) ? 3'(dec_ends[iss[1] ? 1 : 0]) : 3'd0;
  end

  // ------------------------------------------------------------ fill unit
  assign fu_valid = (commit && !from_line) ? iss : 2'b00;

  fill_unit #(.MAX_LEN(3)) u_fill (
    .clk, .rst_n, .in_valid(fu_valid), .in_uop({w1, w0}), .from_line(commit && from_line),
    .wr_en(fu_wr), .wr_line(fu_line), .busy(fu_busy),
    .fold2(fu_f2), .fold3(fu_f3), .fold4(fu_f4));

  // ------------------------------------------------------------ sequential
 always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= '0;
      fetch_pc_q  <= '0;
      f_pend_q    <= 1'b0;
      f_off_q     <= '0;
      line_mode_q <= 1'b0;
      line_q      <= '0;
      idx_q       <= '0;
      optop_q     <= '0;
      vars_q      <= '0;
      started_q   <= 1'b0;
      ex_cnt_q    <= '0;
      halted_q    <= 1'b0;
      illegal_q   <= 1'b0;
      perf_q      <= '0;
    end else if (!started_q) begin
      // first cycle after reset: load the frame
      pc_q       <= boot_pc;
      fetch_pc_q <= boot_pc;
      optop_q    <= frame_optop;
      vars_q     <= frame_vars;
      started_q  <= 1'b1;
    end else begin
      // fetch
      if (redirect) begin
        fetch_pc_q <= redirect_pc;
        f_pend_q   <= 1'b0;
      end else begin
        f_pend_q <= f_req;
        if (f_req) begin
          f_off_q    <= fetch_pc_q[2:0];
          fetch_pc_q <= {fetch_pc_q[AW-1:3], 3'b000} + AW'(8);
        end
      end
      // multi-cycle hold
      ex_cnt_q <= (go && !commit) ? ex_cnt_q + 3'd1 : 3'd0;
      if (commit) begin
        optop_q <= optop_n;
        if (w0.halt)    halted_q  <= 1'b1;
        if (w0.illegal) begin halted_q <= 1'b1; illegal_q <= 1'b1; end
        if (from_line) begin
          if (leave_line) begin
            line_mode_q <= 1'b0;
            pc_q        <= after_line;
          end else begin
            line_mode_q <= 1'b1;
            idx_q       <= nidx;
            if (use_hit) begin
              line_q <= db_line;
              pc_q   <= db_line.next_addr;
            end
          end
        end else begin
          pc_q <= br_taken ? br_target : pc_q + AW'(ib_shift);
        end
      end
      // counters
      if (!halted_q && started_q) perf_q.cycles <= perf_q.cycles + 1;
      if (commit) begin
        perf_q.bytecodes <= perf_q.bytecodes + 32'(w0.nbc) + (iss[1] ? 32'(w1.nbc) : 32'd0);
        perf_q.bundles   <= perf_q.bundles + 1;
        if (iss[1])    perf_q.dual         <= perf_q.dual + 1;
        if (from_line) perf_q.line_bundles <= perf_q.line_bundles + 1;
        if (use_hit)   perf_q.line_hits    <= perf_q.line_hits + 1;
        if (dep_block) perf_q.dep_blocks   <= perf_q.dep_blocks + 1;
        if (sd_pair)   perf_q.sd_pairs     <= perf_q.sd_pairs + 1;
      end
      if (redirect)          perf_q.redirects     <= perf_q.redirects + 1;
      if (go && !commit)     perf_q.stall_cycles  <= perf_q.stall_cycles + 1;
      if (!go && !halted_q && started_q) perf_q.fetch_wait    <= perf_q.fetch_wait + 1;
      if (fu_wr)             perf_q.lines_written <= perf_q.lines_written + 1;
      if (fu_f2)             perf_q.fold2         <= perf_q.fold2 + 1;
      if (fu_f3)             perf_q.fold3         <= perf_q.fold3 + 1;
      if (fu_f4)             perf_q.fold4         <= perf_q.fold4 + 1;
    end
  end

  assign halted  = halted_q;
  assign illegal = illegal_q;
  assign optop   = optop_q;
  assign perf    = perf_q;
endmodule
