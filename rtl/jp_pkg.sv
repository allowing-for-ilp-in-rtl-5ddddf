// jp_pkg: types, constants and decode functions shared by the Java bytecode core.
//
// The core never executes raw bytecodes. The decoder turns every bytecode into one
// micro-op (uop_t) of a three-operand, register-style form: two sources, one
// destination, an ALU function and an optional branch. A source is the operand stack
// (popped), a local variable (read at VARS+index), an immediate, or nothing; the
// destination is the operand stack (pushed), a local variable, or nothing. Folding,
// done later by the fill unit, merges a short run of such micro-ops into one micro-op
// of the same form, e.g. iload a; iload b; iadd; istore c becomes add c <- a, b.
// Because each operand names the area it touches (operand stack or local variables),
// the micro-op also carries the mark that stack disambiguation needs.
//
// The bytecode subset decoded here is the integer core of the JVM instruction set
// (constants, iload/istore, integer ALU, iinc, pop, conditional branches, goto,
// goto_w, return). Everything else decodes as illegal; the core stops on it, as it
// would trap to software. Opcode values are the standard JVM ones. The micro-op format,
// the subset and the handling of return (end of program) are choices of this design.
package jp_pkg;

  localparam int XLEN = 32;   // Java int
  localparam int AW   = 32;   // bytecode address width (4-byte address fields in a line)

  // ---------------------------------------------------------------- opcodes
  localparam logic [7:0] OP_NOP       = 8'h00;
  localparam logic [7:0] OP_ICONST_M1 = 8'h02;
  localparam logic [7:0] OP_ICONST_5  = 8'h08;
  localparam logic [7:0] OP_BIPUSH    = 8'h10;
  localparam logic [7:0] OP_SIPUSH    = 8'h11;
  localparam logic [7:0] OP_ILOAD     = 8'h15;
  localparam logic [7:0] OP_ILOAD_0   = 8'h1a;
  localparam logic [7:0] OP_ILOAD_3   = 8'h1d;
  localparam logic [7:0] OP_ISTORE    = 8'h36;
  localparam logic [7:0] OP_ISTORE_0  = 8'h3b;
  localparam logic [7:0] OP_ISTORE_3  = 8'h3e;
  localparam logic [7:0] OP_POP       = 8'h57;
  localparam logic [7:0] OP_IADD      = 8'h60;
  localparam logic [7:0] OP_ISUB      = 8'h64;
  localparam logic [7:0] OP_IMUL      = 8'h68;
  localparam logic [7:0] OP_INEG      = 8'h74;
  localparam logic [7:0] OP_ISHL      = 8'h78;
  localparam logic [7:0] OP_ISHR      = 8'h7a;
  localparam logic [7:0] OP_IUSHR     = 8'h7c;
  localparam logic [7:0] OP_IAND      = 8'h7e;
  localparam logic [7:0] OP_IOR       = 8'h80;
  localparam logic [7:0] OP_IXOR      = 8'h82;
  localparam logic [7:0] OP_IINC      = 8'h84;
  localparam logic [7:0] OP_IFEQ      = 8'h99;   // ifeq..ifle       0x99..0x9e
  localparam logic [7:0] OP_IFLE      = 8'h9e;
  localparam logic [7:0] OP_IF_ICMPEQ = 8'h9f;   // if_icmpeq..le    0x9f..0xa4
  localparam logic [7:0] OP_IF_ICMPLE = 8'ha4;
  localparam logic [7:0] OP_GOTO      = 8'ha7;
  localparam logic [7:0] OP_RETURN    = 8'hb1;
  localparam logic [7:0] OP_GOTO_W    = 8'hc8;

  // ---------------------------------------------------------------- micro-op
  typedef enum logic [1:0] {K_NONE, K_STACK, K_LOCAL, K_IMM} src_e;
  typedef enum logic [1:0] {D_NONE, D_STACK, D_LOCAL} dst_e;
  typedef enum logic [3:0] {
    A_PASS, A_ADD, A_SUB, A_MUL, A_AND, A_OR, A_XOR, A_SHL, A_SHR, A_USHR, A_NEG
  } alu_e;
  // Branch compares operand a with operand b, or with zero when b is K_NONE.
  typedef enum logic [2:0] {B_NONE, B_GOTO, B_EQ, B_NE, B_LT, B_GE, B_GT, B_LE} br_e;

  typedef struct packed {
    logic          valid;
    logic          halt;      // return: end of the program
    logic          illegal;   // bytecode outside the implemented subset
    alu_e          alu;
    src_e          ka;
    logic [7:0]    ia;        // local index of operand a
    src_e          kb;
    logic [7:0]    ib;        // local index of operand b
    logic [15:0]   imm;       // sign-extended immediate (at most one per micro-op)
    dst_e          kd;
    logic [7:0]    id;        // local index of the destination
    br_e           br;
    logic [AW-1:0] target;    // absolute branch target
    logic [AW-1:0] pc;        // address of the first bytecode represented
    logic [3:0]    len;       // bytes of the bytecodes represented
    logic [2:0]    nbc;       // number of bytecodes represented (1..4)
  } uop_t;

  localparam int LINE_INSTS = 5;

  // One DB-Cache line: up to five micro-ops of one basic block.
  typedef struct packed {
    logic                  valid;
    logic [AW-1:0]         tag;        // address of the first bytecode of the line
    logic [2:0]            n;          // micro-ops held (1..5)
    uop_t [LINE_INSTS-1:0] e;
    logic [AW-1:0]         next_addr;  // fall-through (branch untaken) address
  } line_t;

  // Event counters of the core, all counting from reset.
  typedef struct packed {
    logic [31:0] cycles;        // cycles until the core stopped
    logic [31:0] bytecodes;     // bytecodes completed (a folded micro-op counts all it holds)
    logic [31:0] bundles;       // issue bundles completed
    logic [31:0] dual;          // bundles of two micro-ops
    logic [31:0] line_bundles;  // bundles issued from the DB-Cache
    logic [31:0] line_hits;     // DB-Cache lines entered
    logic [31:0] lines_written; // lines written by the fill unit
    logic [31:0] fold2;         // folded patterns written, by size
    logic [31:0] fold3;
    logic [31:0] fold4;
    logic [31:0] stall_cycles;  // cycles spent waiting for a multi-cycle micro-op
    logic [31:0] dep_blocks;    // cycles a pair was prevented by a stack dependency
    logic [31:0] sd_pairs;      // pairs allowed only by stack disambiguation
    logic [31:0] redirects;     // fetch redirections (taken branches, line exits)
    logic [31:0] fetch_wait;    // cycles with nothing to issue
  } perf_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic [2:0] bc_len(input logic [7:0] op);
    if (op == OP_BIPUSH || op == OP_ILOAD || op == OP_ISTORE) return 3'd2;
    if (op == OP_SIPUSH || op == OP_IINC || op == OP_GOTO) return 3'd3;
    if (op >= OP_IFEQ && op <= OP_IF_ICMPLE) return 3'd3;
    if (op == OP_GOTO_W) return 3'd5;
    return 3'd1;
  endfunction

  function automatic int unsigned n_reads(input uop_t u);
    return ((u.ka == K_STACK || u.ka == K_LOCAL) ? 1 : 0) +
           ((u.kb == K_STACK || u.kb == K_LOCAL) ? 1 : 0);
  endfunction

  function automatic int unsigned n_pops(input uop_t u);
    return ((u.ka == K_STACK) ? 1 : 0) + ((u.kb == K_STACK) ? 1 : 0);
  endfunction

  function automatic logic reads_os(input uop_t u);
    return u.ka == K_STACK || u.kb == K_STACK;
  endfunction
  function automatic logic reads_lv(input uop_t u);
    return u.ka == K_LOCAL || u.kb == K_LOCAL;
  endfunction
  function automatic logic writes_os(input uop_t u);
    return u.kd == D_STACK;
  endfunction
  function automatic logic writes_lv(input uop_t u);
    return u.kd == D_LOCAL;
  endfunction

  // Decode one bytecode whose bytes start at b[0].
  function automatic uop_t decode_bc(input logic [4:0][7:0] b, input logic [AW-1:0] pc);
    uop_t u;
    logic [7:0] op;
    op = b[0];
    u = '0;
    u.valid = 1'b1;
    u.pc    = pc;
    u.len   = {1'b0, bc_len(op)};
    u.nbc   = 3'd1;
    if (op == OP_NOP) begin
      // nothing
    end else if (op >= OP_ICONST_M1 && op <= OP_ICONST_5) begin
      u.ka = K_IMM; u.imm = 16'(signed'({1'b0, op}) - 16'sd3); u.kd = D_STACK;
    end else if (op == OP_BIPUSH) begin
      u.ka = K_IMM; u.imm = {{8{b[1][7]}}, b[1]}; u.kd = D_STACK;
    end else if (op == OP_SIPUSH) begin
      u.ka = K_IMM; u.imm = {b[1], b[2]}; u.kd = D_STACK;
    end else if (op == OP_ILOAD) begin
      u.ka = K_LOCAL; u.ia = b[1]; u.kd = D_STACK;
    end else if (op >= OP_ILOAD_0 && op <= OP_ILOAD_3) begin
      u.ka = K_LOCAL; u.ia = op - OP_ILOAD_0; u.kd = D_STACK;
    end else if (op == OP_ISTORE) begin
      u.ka = K_STACK; u.kd = D_LOCAL; u.id = b[1];
    end else if (op >= OP_ISTORE_0 && op <= OP_ISTORE_3) begin
      u.ka = K_STACK; u.kd = D_LOCAL; u.id = op - OP_ISTORE_0;
    end else if (op == OP_POP) begin
      u.ka = K_STACK;
    end else if (op == OP_INEG) begin
      u.ka = K_STACK; u.alu = A_NEG; u.kd = D_STACK;
    end else if (op == OP_IADD || op == OP_ISUB || op == OP_IMUL || op == OP_ISHL ||
                 op == OP_ISHR || op == OP_IUSHR || op == OP_IAND || op == OP_IOR ||
                 op == OP_IXOR) begin
      u.ka = K_STACK; u.kb = K_STACK; u.kd = D_STACK;
      case (op)
        OP_IADD:  u.alu = A_ADD;
        OP_ISUB:  u.alu = A_SUB;
        OP_IMUL:  u.alu = A_MUL;
        OP_ISHL:  u.alu = A_SHL;
        OP_ISHR:  u.alu = A_SHR;
        OP_IUSHR: u.alu = A_USHR;
        OP_IAND:  u.alu = A_AND;
        OP_IOR:   u.alu = A_OR;
        default:  u.alu = A_XOR;
      endcase
    end else if (op == OP_IINC) begin
      u.ka = K_LOCAL; u.ia = b[1]; u.kb = K_IMM; u.imm = {{8{b[2][7]}}, b[2]};
      u.alu = A_ADD; u.kd = D_LOCAL; u.id = b[1];
    end else if (op >= OP_IFEQ && op <= OP_IF_ICMPLE) begin
      u.ka = K_STACK;
      if (op >= OP_IF_ICMPEQ) u.kb = K_STACK;
      case ((op >= OP_IF_ICMPEQ) ? op - OP_IF_ICMPEQ : op - OP_IFEQ)
        8'd0:    u.br = B_EQ;
        8'd1:    u.br = B_NE;
        8'd2:    u.br = B_LT;
        8'd3:    u.br = B_GE;
        8'd4:    u.br = B_GT;
        default: u.br = B_LE;
      endcase
      u.target = pc + AW'(signed'({b[1], b[2]}));
    end else if (op == OP_GOTO) begin
      u.br = B_GOTO; u.target = pc + AW'(signed'({b[1], b[2]}));
    end else if (op == OP_GOTO_W) begin
      u.br = B_GOTO; u.target = pc + {b[1], b[2], b[3], b[4]};
    end else if (op == OP_RETURN) begin
      u.halt = 1'b1;
    end else begin
      u.illegal = 1'b1;
    end
    return u;
  endfunction

endpackage
