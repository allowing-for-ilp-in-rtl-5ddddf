// fill_unit: collects decoded bytecodes into DB-Cache lines and folds them.
//
// The fill unit watches the micro-ops the core issues from the normal decode path, up
// to two per cycle in program order (in_valid/in_uop), and works in three phases.
//  COLLECT  Appends each micro-op whose address continues the line being collected.
//           The line is closed when it holds LINE_INSTS bytecodes, when a branch is
//           appended (the branch is the line's last entry), when a bytecode longer
//           than MAX_LEN bytes or a return or illegal bytecode arrives (it is left out),
//           when the address stream jumps, or when the core starts issuing from the
//           DB-Cache (from_line). A closed line with fewer than two bytecodes is
//           dropped; otherwise its next address is recorded: the address after the last
//           bytecode, or the target of a closing goto.
//  FOLD     One output entry per cycle: fold_logic looks at the next four collected
//           bytecodes and emits either one folded micro-op or the first bytecode as is.
//           A pattern is only found inside one line.
//  WRITE    Writes the line (tag = address of its first bytecode) into the DB-Cache.
// Micro-ops that arrive while the unit folds or writes are not collected.
// fold2/fold3/fold4 pulse for each pattern of that size written into a line.
// Line size, the 3-byte limit, stopping at branches, the two-bytecode minimum, the
// next-address field and folding in the fill unit follow the document. The three-phase
// sequencing, one fold per cycle and dropping input while busy are this design's
// choices; the document only requires that the fill unit be off the critical path.
module fill_unit
  import jp_pkg::*;
#(
  parameter int MAX_LEN    = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_valid,
  input  uop_t [1:0] in_uop,
  input  logic       from_line,   // the core issued from the DB-Cache this cycle
  output logic       wr_en,
  output line_t      wr_line,
  output logic       busy,
  output logic       fold2,
  output logic       fold3,
  output logic       fold4
);
  typedef enum logic [1:0] {S_COLLECT, S_FOLD, S_WRITE} state_e;

  state_e                state_q;
  uop_t [LINE_INSTS-1:0] raw_q;
  logic [2:0]            cnt_q;
  logic [AW-1:0]         exp_q;      // address following the last collected bytecode
  logic [AW-1:0]         next_q;     // next address of the closed line
  logic [2:0]            fi_q;       // fold: next raw index
  logic [2:0]            fo_q;       // fold: next output index
  uop_t [LINE_INSTS-1:0] out_q;

  // ---- collection step (combinational, two inputs in order)
  uop_t [LINE_INSTS-1:0] raw_n;
  logic [2:0]            cnt_n;
  logic [AW-1:0]         exp_n, next_n;
  logic                  close_n;

  always_comb begin
    logic stop;
    raw_n   = raw_q;
    cnt_n   = cnt_q;
    exp_n   = exp_q;
    next_n  = next_q;
    close_n = 1'b0;
    stop    = 1'b0;
    for (int s = 0; s < 2; s++) begin
      uop_t u;
      u = in_uop[s];
      if (in_valid[s] && !stop) begin
        // a jump in the address stream closes what was collected
        if (cnt_n != 0 && u.pc != exp_n) begin
          if (cnt_n >= 2) begin close_n = 1'b1; next_n = exp_n; stop = 1'b1; end
          else cnt_n = '0;
        end
        if (!stop) begin
          if (int'(u.len) > MAX_LEN || u.halt || u.illegal) begin
            if (cnt_n >= 2) begin close_n = 1'b1; next_n = exp_n; stop = 1'b1; end
            else cnt_n = '0;
          end else begin
            raw_n[cnt_n] = u;
            cnt_n        = cnt_n + 3'd1;
            exp_n        = u.pc + AW'(u.len);
            if (u.br != B_NONE || int'(cnt_n) == LINE_INSTS) begin
              if (cnt_n >= 2) begin
                close_n = 1'b1;
                next_n  = (u.br == B_GOTO) ? u.target : exp_n;
              end else cnt_n = '0;
              stop = 1'b1;
            end
          end
        end
      end
    end
    if (from_line && !stop) begin
      if (cnt_n >= 2) begin close_n = 1'b1; next_n = exp_n; end
      else cnt_n = '0;
    end
  end

  // ---- folding step
  uop_t [3:0] fwin;
  uop_t       fout;
  logic [2:0] fn;

  always_comb
    for (int k = 0; k < 4; k++) begin
      fwin[k] = '0;
      if (int'(fi_q) + k < int'(cnt_q)) fwin[k] = raw_q[int'(fi_q) + k];
    end

  fold_logic u_fold (.in(fwin), .out(fout), .n(fn));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_COLLECT;
      cnt_q   <= '0;
      raw_q   <= '0;
      exp_q   <= '0;
      next_q  <= '0;
      fi_q    <= '0;
      fo_q    <= '0;
      out_q   <= '0;
    end else begin
      unique case (state_q)
        S_COLLECT: begin
          raw_q  <= raw_n;
          cnt_q  <= cnt_n;
          exp_q  <= exp_n;
          next_q <= next_n;
          if (close_n) begin
            state_q <= S_FOLD;
            fi_q    <= '0;
            fo_q    <= '0;
            out_q   <= '0;
          end
        end
        S_FOLD: begin
          out_q[fo_q] <= fout;
          fo_q        <= fo_q + 3'd1;
          fi_q        <= fi_q + fn;
          if (fi_q + fn >= cnt_q) state_q <= S_WRITE;
        end
        default: begin   // S_WRITE
          state_q <= S_COLLECT;
          cnt_q   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    busy              = state_q != S_COLLECT;
    wr_en             = state_q == S_WRITE;
    wr_line.valid     = 1'b1;
    wr_line.tag       = raw_q[0].pc;
    wr_line.n         = fo_q;
    wr_line.e         = out_q;
    wr_line.next_addr = next_q;
    fold2 = state_q == S_FOLD && fn == 3'd2;
    fold3 = state_q == S_FOLD && fn == 3'd3;
    fold4 = state_q == S_FOLD && fn == 3'd4;
  end
endmodule
