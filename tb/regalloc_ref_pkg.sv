// regalloc_ref_pkg: reference model and program builders for the allocator testbenches.
//
// The functions here compute, in plain procedural code, what the hardware should produce:
// the liveness table (last index at which each virtual register appears, scanning the
// program from its end), the allocation map (first-fit over 13 registers, a register free
// again once the current index is past its holder's last use, stack slots otherwise) and
// the cycle counts of both state machines. They also build the test programs: the gcd
// function in the ARM-like instruction form the allocator takes, and random programs.
package regalloc_ref_pkg;
  import regalloc_pkg::*;

  localparam int MAXN = 256;   // largest program / register count the model handles

  typedef instr_t prog_t [MAXN];
  typedef int     tab_t  [MAXN];

  function automatic operand_t v(int n);   return mk_op(RK_VIRT, n);  endfunction
  function automatic operand_t p(int n);   return mk_op(RK_PHYS, n);  endfunction
  function automatic operand_t none();     return mk_op(RK_NONE, 0);  endfunction

  function automatic instr_t ins(opcode_e o, operand_t d, operand_t s1, operand_t s2,
                                 int imm = 0, int tgt = 0);
    instr_t i;
    i.opcode = o; i.dst = d; i.src1 = s1; i.src2 = s2;
    i.imm = 32'(imm); i.target = 32'(tgt);
    return i;
  endfunction

  // Word w (0..11) of the 48-byte record of instruction i.
  function automatic logic [31:0] word_of(instr_t i, int w);
    case (w)
      W_OPCODE: return 32'(i.opcode);
      W_DST:    return i.dst;
      W_SRC1:   return i.src1;
      W_SRC2:   return i.src2;
      W_IMM:    return i.imm;
      W_TARGET: return i.target;
      default:  return 32'd0;
    endcase
  endfunction

  // gcd(a, b): if (b == 0) return a; else return gcd(b, a % b);
  // written with virtual registers v0..v5; r0/r1 carry arguments and the result.
  function automatic int gcd_program(output prog_t pr);
    int n = 0;
    pr[n++] = ins(OP_MOV,   v(0),   p(0),   none());          // v0 = a
    pr[n++] = ins(OP_MOV,   v(1),   p(1),   none());          // v1 = b
    pr[n++] = ins(OP_CMP,   none(), v(1),   none(), 0);       // b == 0 ?
    pr[n++] = ins(OP_BCOND, none(), none(), none(), 0, 12);   // beq else
    pr[n++] = ins(OP_SDIV,  v(2),   v(0),   v(1));            // q = a / b
    pr[n++] = ins(OP_MUL,   v(3),   v(2),   v(1));            // q * b
    pr[n++] = ins(OP_SUB,   v(4),   v(0),   v(3));            // a % b
    pr[n++] = ins(OP_MOV,   p(0),   v(1),   none());          // arg 0 = b
    pr[n++] = ins(OP_MOV,   p(1),   v(4),   none());          // arg 1 = a % b
    pr[n++] = ins(OP_BL,    none(), none(), none(), 0, 0);    // call gcd
    pr[n++] = ins(OP_MOV,   v(5),   p(0),   none());          // result
    pr[n++] = ins(OP_B,     none(), none(), none(), 0, 13);   // b end
    pr[n++] = ins(OP_MOV,   v(5),   v(0),   none());          // else: result = a
    pr[n++] = ins(OP_MOV,   p(0),   v(5),   none());          // end: return value
    pr[n++] = ins(OP_RET,   none(), none(), none());
    return n;
  endfunction

  // The same gcd as an unoptimised compiler emits it: arguments and the result go
  // through stack slots (sp = r13 is not allocatable, so it is written as a physical
  // operand numbered 13), with loads, stores, compare, branches, divide, multiply, sub.
  function automatic int gcd_stack_program(output prog_t pr);
    int n = 0;
    pr[n++] = ins(OP_SUB,   p(13),  p(13),  none(), 16);      // sub sp, sp, #16
    pr[n++] = ins(OP_STR,   none(), p(0),   p(13),  8);       // str r0, [sp, #8]
    pr[n++] = ins(OP_STR,   none(), p(1),   p(13),  4);       // str r1, [sp, #4]
    pr[n++] = ins(OP_LDR,   v(0),   p(13),  none(), 4);       // ldr v0, [sp, #4]
    pr[n++] = ins(OP_CMP,   none(), v(0),   none(), 0);       // cmp v0, #0
    pr[n++] = ins(OP_BCOND, none(), none(), none(), 0, 9);    // bne else
    pr[n++] = ins(OP_LDR,   v(1),   p(13),  none(), 8);       // ldr v1, [sp, #8]
    pr[n++] = ins(OP_STR,   none(), v(1),   p(13),  12);      // str v1, [sp, #12]
    pr[n++] = ins(OP_B,     none(), none(), none(), 0, 20);   // b end
    pr[n++] = ins(OP_LDR,   v(2),   p(13),  none(), 4);       // else: ldr v2, [sp, #4]
    pr[n++] = ins(OP_LDR,   v(3),   p(13),  none(), 8);       // ldr v3, [sp, #8]
    pr[n++] = ins(OP_LDR,   v(4),   p(13),  none(), 4);       // ldr v4, [sp, #4]
    pr[n++] = ins(OP_SDIV,  v(5),   v(3),   v(4));            // sdiv v5, v3, v4
    pr[n++] = ins(OP_MUL,   v(6),   v(5),   v(4));            // mul v6, v5, v4
    pr[n++] = ins(OP_SUB,   v(7),   v(3),   v(6));            // sub v7, v3, v6
    pr[n++] = ins(OP_MOV,   p(0),   v(2),   none());          // mov r0, v2
    pr[n++] = ins(OP_MOV,   p(1),   v(7),   none());          // mov r1, v7
    pr[n++] = ins(OP_BL,    none(), none(), none(), 0, 0);    // bl gcd
    pr[n++] = ins(OP_STR,   none(), p(0),   p(13),  12);      // str r0, [sp, #12]
    pr[n++] = ins(OP_B,     none(), none(), none(), 0, 20);   // b end
    pr[n++] = ins(OP_LDR,   v(8),   p(13),  none(), 12);      // end: ldr v8, [sp, #12]
    pr[n++] = ins(OP_MOV,   p(0),   v(8),   none());          // mov r0, v8
    pr[n++] = ins(OP_ADD,   p(13),  p(13),  none(), 16);      // add sp, sp, #16
    pr[n++] = ins(OP_RET,   none(), none(), none());          // bx lr
    return n;
  endfunction

  // A random operand: mostly virtual registers below nv, some physical, some absent.
  function automatic operand_t rand_op(int nv);
    int k = $urandom_range(0, 9);
    if (k < 2) return none();
    if (k < 3) return p($urandom_range(0, 12));
    return v($urandom_range(0, nv - 1));
  endfunction

  function automatic int random_program(int n, int nv, output prog_t pr);
    for (int i = 0; i < n; i++)
      pr[i] = ins(opcode_e'($urandom_range(1, 12)), rand_op(nv), rand_op(nv), rand_op(nv),
                  int'($urandom), $urandom_range(0, n - 1));
    return n;
  endfunction

  // Many long, overlapping live ranges: every register is written once at the start and
  // read again near the end, so more than 13 are live together and some must spill.
  function automatic int pressure_program(int nv, output prog_t pr);
    int n = 0;
    for (int r = 0; r < nv; r++) pr[n++] = ins(OP_LDR, v(r), p(11), none(), 4 * r);
    for (int r = 0; r + 1 < nv; r += 2) pr[n++] = ins(OP_ADD, v(r), v(r), v(r + 1));
    return n;
  endfunction

  function automatic bit is_vop(operand_t o, int maxv);
    return o.kind == RK_VIRT && int'(o.num) < maxv;
  endfunction

  // Liveness: last index at which each virtual register appears (valid = appears at all).
  function automatic void ref_liveness(prog_t pr, int n, int maxv,
                                       output tab_t valid, output tab_t last);
    for (int r = 0; r < MAXN; r++) begin valid[r] = 0; last[r] = 0; end
    for (int i = 0; i < n; i++) begin
      operand_t ops[3] = '{pr[i].dst, pr[i].src1, pr[i].src2};
      foreach (ops[k])
        if (is_vop(ops[k], maxv)) begin valid[ops[k].num] = 1; last[ops[k].num] = i; end
    end
  endfunction

  // Allocation: returns the map as kind/num tables and counts the events seen.
  function automatic void ref_alloc(prog_t pr, int n, int maxv, int nphys,
                                    tab_t valid, tab_t last,
                                    output tab_t kind, output tab_t num,
                                    output int spills, output int allocs,
                                    output int hits, output int reuses);
    int busy_to [MAXN];
    bit used  [MAXN];
    spills = 0; allocs = 0; hits = 0; reuses = 0;
    for (int r = 0; r < MAXN; r++) begin
      kind[r] = int'(RK_NONE); num[r] = 0; busy_to[r] = -1; used[r] = 0;
    end
    for (int i = 0; i < n; i++) begin
      operand_t ops[3] = '{pr[i].dst, pr[i].src1, pr[i].src2};
      foreach (ops[k]) begin
        int vr, pick;
        if (!is_vop(ops[k], maxv)) continue;
        vr = int'(ops[k].num);
        if (kind[vr] != int'(RK_NONE)) begin hits++; continue; end
        pick = -1;
        for (int r = 0; r < nphys; r++)
          if (pick < 0 && busy_to[r] < i) pick = r;
        if (pick < 0) begin
          kind[vr] = int'(RK_STACK); num[vr] = spills; spills++;
        end else begin
          kind[vr] = int'(RK_PHYS); num[vr] = pick;
          busy_to[pick] = valid[vr] ? last[vr] : i;
          if (used[pick]) reuses++;
          used[pick] = 1;
          allocs++;
        end
      end
    end
  endfunction

  function automatic int vops_in(prog_t pr, int n, int maxv);
    int c = 0;
    for (int i = 0; i < n; i++)
      c += int'(is_vop(pr[i].dst, maxv)) + int'(is_vop(pr[i].src1, maxv))
         + int'(is_vop(pr[i].src2, maxv));
    return c;
  endfunction

  // Cycle counts, start cycle to done cycle, worked out from the state sequences.
  function automatic int live_cycles(prog_t pr, int n, int maxv);
    return 2 + 4 * n + vops_in(pr, n, maxv) + maxv;
  endfunction

  function automatic int alloc_cycles(prog_t pr, int n, int maxv, int spills, int allocs);
    return 1 + maxv + 4 * n + 2 * vops_in(pr, n, maxv) + 2 * spills + 3 * allocs;
  endfunction

endpackage
