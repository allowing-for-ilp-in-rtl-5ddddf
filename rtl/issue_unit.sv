// issue_unit: in-order dual issue with optional stack disambiguation.
//
// Takes the next two micro-ops in program order (u0, u1) and decides whether u0 issues
// alone or together with u1. It also computes every stack-cache address the bundle
// uses and assigns the read ports, so the datapath only has to read, compute and write.
//
// u1 pairs with u0 when both are valid, u0 is not a branch, return or illegal micro-op,
// u1 is not a return or illegal micro-op, the two need at most RD_PORTS reads together,
// and u1 does not depend on u0. A dependency is judged by area, never by address:
//   sd_en = 0: u0 writes the stack (either area) and u1 reads the stack (either area);
//   sd_en = 1: u0 writes the operand stack and u1 reads it, or u0 writes the local
//              variable area and u1 reads it (stack disambiguation).
// Reads happen before writes in a cycle, so anti dependences never block a pair; for
// two writes to one entry the stack cache lets u1 (write port 1) win.
//
// Addressing: local variable i is at VARS+i. OPTOP is the first free entry above the
// operand stack. A micro-op with two stack sources reads a = OPTOP-2 and b = OPTOP-1;
// with one, that source is OPTOP-1. A push writes at OPTOP minus the pops. u1 is
// addressed from u0's resulting OPTOP. Purely combinational.
// Dependency rules, pairing of two and the three-read/two-write register file follow
// the document; limiting pairs by port count and the address arithmetic are this
// design's choices (the stack grows upward here).
module issue_unit
  import jp_pkg::*;
#(
  parameter int ENTRIES  = 64,
  parameter int RD_PORTS = 3,
  localparam int ABITS   = $clog2(ENTRIES)
) (
  input  uop_t                      u0,
  input  uop_t                      u1,
  input  logic                      sd_en,
  input  logic [ABITS-1:0]          optop,
  input  logic [ABITS-1:0]          vars,
  output logic [1:0]                issue,      // bit s: slot s issues
  output logic [2:0][ABITS-1:0]     ra,         // read port addresses
  output logic [1:0][1:0]           sel_a,      // read port that feeds operand a of slot s
  output logic [1:0][1:0]           sel_b,      // read port that feeds operand b of slot s
  output logic [1:0]                we,
  output logic [1:0][ABITS-1:0]     wa,
  output logic [ABITS-1:0]          optop_next,
  output logic                      dep_block,  // u1 held back by a dependency
  output logic                      sd_pair     // pair possible only thanks to disambiguation
);
  logic dep_naive, dep_sd, dep, ports_ok, can_pair;
  logic [ABITS-1:0] op1;   // OPTOP after u0

  always_comb begin
    dep_naive = (writes_os(u0) || writes_lv(u0)) && (reads_os(u1) || reads_lv(u1));
    dep_sd    = (writes_os(u0) && reads_os(u1)) || (writes_lv(u0) && reads_lv(u1));
    dep       = sd_en ? dep_sd : dep_naive;
    ports_ok  = n_reads(u0) + n_reads(u1) <= RD_PORTS;
    can_pair  = u0.valid && u1.valid && u0.br == B_NONE && !u0.halt && !u0.illegal &&
                !u1.halt && !u1.illegal && ports_ok;
    issue[0]  = u0.valid;
    issue[1]  = can_pair && !dep;
    dep_block = can_pair && dep;
    sd_pair   = issue[1] && sd_en && dep_naive;
  end

  // Per-slot addresses.
  function automatic void addr_of(input uop_t u, input logic [ABITS-1:0] top,
                                  input logic [ABITS-1:0] vb,
                                  output logic [ABITS-1:0] aa, output logic [ABITS-1:0] ab,
                                  output logic [ABITS-1:0] ad, output logic [ABITS-1:0] top_n);
    logic [ABITS-1:0] pops;
    pops = ABITS'(n_pops(u));
    if (u.ka == K_STACK) aa = (u.kb == K_STACK) ? top - 2 : top - 1;
    else                 aa = vb + ABITS'(u.ia);
    if (u.kb == K_STACK) ab = top - 1;
    else                 ab = vb + ABITS'(u.ib);
    if (u.kd == D_STACK) ad = top - pops;
    else                 ad = vb + ABITS'(u.id);
    top_n = top - pops + ((u.kd == D_STACK) ? ABITS'(1) : ABITS'(0));
  endfunction

  logic [1:0][ABITS-1:0] aa, ab, ad;
  logic [ABITS-1:0] op2;

  always_comb begin
    int p;
    addr_of(u0, optop, vars, aa[0], ab[0], ad[0], op1);
    addr_of(u1, op1,   vars, aa[1], ab[1], ad[1], op2);
    optop_next = issue[1] ? op2 : (issue[0] ? op1 : optop);
    // Read ports are handed out in order: slot 0 a, slot 0 b, slot 1 a, slot 1 b.
    ra    = '0;
    sel_a = '0;
    sel_b = '0;
    p = 0;
    for (int s = 0; s < 2; s++) begin
      uop_t u;
      u = (s == 0) ? u0 : u1;
      if ((u.ka == K_STACK || u.ka == K_LOCAL) && p < 3) begin
        ra[p] = aa[s]; sel_a[s] = 2'(p); p++;
      end
      if ((u.kb == K_STACK || u.kb == K_LOCAL) && p < 3) begin
        ra[p] = ab[s]; sel_b[s] = 2'(p); p++;
      end
    end
    we[0] = issue[0] && u0.kd != D_NONE;
    we[1] = issue[1] && u1.kd != D_NONE;
    wa    = {ad[1], ad[0]};
  end
endmodule
