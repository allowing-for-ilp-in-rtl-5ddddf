// jvm_ref_pkg: a plain bytecode interpreter used by the core testbenches as the
// reference. It executes the same integer bytecode subset as the core, straight from
// the JVM definitions, and returns the local variables, the final operand-stack depth
// and the number of bytecodes executed. It shares no code with the design.
package jvm_ref_pkg;

  localparam int NLOC = 16;

  typedef struct {
    int loc [NLOC];
    int depth;
    int count;
    bit ok;
  } result_t;

  function automatic int s16(input byte unsigned hi, input byte unsigned lo);
    return int'(shortint'({hi, lo}));
  endfunction

  function automatic result_t run(input byte unsigned prog[$], input int max_steps);
    result_t r;
    int pc = 0, sp = 0, a, b;
    int stk [64];
    bit done = 0;
    r.count = 0;
    r.ok    = 1;
    foreach (r.loc[i]) r.loc[i] = 0;
    while (!done && r.count < max_steps) begin
      byte unsigned op;
      int npc;
      op  = prog[pc];
      npc = pc + 1;
      r.count++;
      if (op >= 8'h02 && op <= 8'h08) stk[sp++] = int'(op) - 3;
      else if (op == 8'h10) begin stk[sp++] = int'(byte'(prog[pc+1])); npc = pc + 2; end
      else if (op == 8'h11) begin stk[sp++] = s16(prog[pc+1], prog[pc+2]); npc = pc + 3; end
      else if (op == 8'h15) begin stk[sp++] = r.loc[prog[pc+1] % NLOC]; npc = pc + 2; end
      else if (op >= 8'h1a && op <= 8'h1d) stk[sp++] = r.loc[op - 8'h1a];
      else if (op == 8'h36) begin r.loc[prog[pc+1] % NLOC] = stk[--sp]; npc = pc + 2; end
      else if (op >= 8'h3b && op <= 8'h3e) r.loc[op - 8'h3b] = stk[--sp];
      else if (op == 8'h57) sp--;
      else if (op == 8'h00) ;
      else if (op == 8'h74) stk[sp-1] = -stk[sp-1];
      else if (op == 8'h84) begin
        r.loc[prog[pc+1] % NLOC] += int'(byte'(prog[pc+2])); npc = pc + 3;
      end
      else if (op >= 8'h99 && op <= 8'ha4) begin
        bit t;
        if (op >= 8'h9f) begin b = stk[--sp]; a = stk[--sp]; end
        else begin a = stk[--sp]; b = 0; end
        case ((op >= 8'h9f) ? op - 8'h9f : op - 8'h99)
          0: t = a == b;  1: t = a != b;  2: t = a < b;
          3: t = a >= b;  4: t = a > b;   default: t = a <= b;
        endcase
        npc = t ? pc + s16(prog[pc+1], prog[pc+2]) : pc + 3;
      end
      else if (op == 8'ha7) npc = pc + s16(prog[pc+1], prog[pc+2]);
      else if (op == 8'hc8) npc = pc + int'({prog[pc+1], prog[pc+2], prog[pc+3], prog[pc+4]});
      else if (op == 8'hb1) done = 1;
      else begin
        b = stk[--sp]; a = stk[--sp];
        case (op)
          8'h60: stk[sp++] = a + b;
          8'h64: stk[sp++] = a - b;
          8'h68: stk[sp++] = a * b;
          8'h78: stk[sp++] = a << (b & 31);
          8'h7a: stk[sp++] = a >>> (b & 31);
          8'h7c: stk[sp++] = int'(unsigned'(a) >> (b & 31));
          8'h7e: stk[sp++] = a & b;
          8'h80: stk[sp++] = a | b;
          8'h82: stk[sp++] = a ^ b;
          default: begin r.ok = 0; done = 1; end
        endcase
      end
      pc = npc;
    end
    if (!done) r.ok = 0;
    r.depth = sp;
    return r;
  endfunction

endpackage
