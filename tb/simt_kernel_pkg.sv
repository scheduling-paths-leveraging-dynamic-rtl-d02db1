// simt_kernel_pkg: a small kernel model used by the scheduler testbenches.
//
// It stands in for the instruction memory and the ALU/branch unit of a SIMT
// core. A kernel is a list of instructions over four per-thread registers:
//   OP_CLR  r      r = 0
//   OP_INC  r      r = r + 1
//   OP_COND tgt    branch to tgt when cond(tid, r0, salt) holds (data dependent)
//   OP_LT   r,imm  branch to tgt when r < imm (imm < 0: r < (tid % 4) + 2)
//   OP_JMP  tgt    unconditional branch
//   OP_EXIT        the thread ends
// exec() runs one instruction for one thread; run_thread() runs a whole
// thread alone, which gives the reference results a scheduler must reproduce.
//
// Kernels:
//   K_IFELSE   loop of 6 iterations around a two-sided if (if then A else B)
//   K_NESTED   outer loop with a divergent if, around a uniform inner loop
//   K_OVERLAP  two loops whose address ranges overlap without nesting
//   K_UNIFORM  loop with no divergence at all
//   K_TERM     loop whose trip count differs between threads
//   K_CONFLICT two loops whose backward branches share a loop-table slot
package simt_kernel_pkg;

  typedef enum int { OP_CLR, OP_INC, OP_COND, OP_LT, OP_JMP, OP_EXIT } op_e;

  typedef struct {
    op_e op;
    int  r;
    int  imm;
    int  tgt;
  } instr_t;

  typedef enum int { K_IFELSE = 0, K_NESTED = 1, K_OVERLAP = 2, K_UNIFORM = 3,
                     K_TERM = 4, K_CONFLICT = 5 } kernel_e;

  typedef struct {
    int regs [4];
  } tstate_t;

  function automatic instr_t I(op_e op, int r = 0, int imm = 0, int tgt = 0);
    instr_t x;
    x.op = op; x.r = r; x.imm = imm; x.tgt = tgt;
    return x;
  endfunction

  function automatic instr_t fetch(int k, int pc);
    case (k)
      K_IFELSE: case (pc)
        0: return I(OP_CLR, 0);
        1: return I(OP_COND, 0, 0, 4);     // not Cond -> B
        2: return I(OP_INC, 2);            // A()
        3: return I(OP_JMP, 0, 0, 5);
        4: return I(OP_INC, 3);            // B()
        5: return I(OP_INC, 0);            // i++
        6: return I(OP_LT, 0, 6, 1);       // loop back while i < 6
        default: return I(OP_EXIT);
      endcase
      K_NESTED: case (pc)
        0: return I(OP_CLR, 0);
        1: return I(OP_CLR, 1);
        2: return I(OP_COND, 0, 0, 4);
        3: return I(OP_INC, 2);
        4: return I(OP_INC, 1);
        5: return I(OP_LT, 1, 3, 4);       // inner loop [4,5]
        6: return I(OP_INC, 0);
        7: return I(OP_LT, 0, 4, 1);       // outer loop [1,7]
        default: return I(OP_EXIT);
      endcase
      K_OVERLAP: case (pc)
        0: return I(OP_CLR, 0);
        1: return I(OP_INC, 0);
        2: return I(OP_COND, 0, 0, 4);
        3: return I(OP_INC, 2);
        4: return I(OP_LT, 0, 3, 1);       // loop A [1,4]
        5: return I(OP_INC, 1);
        6: return I(OP_CLR, 0);
        7: return I(OP_LT, 1, 2, 3);       // loop B [3,7], overlaps A
        default: return I(OP_EXIT);
      endcase
      K_UNIFORM: case (pc)
        0: return I(OP_CLR, 0);
        1: return I(OP_INC, 2);
        2: return I(OP_INC, 0);
        3: return I(OP_LT, 0, 5, 1);
        default: return I(OP_EXIT);
      endcase
      K_TERM: case (pc)
        0: return I(OP_CLR, 0);
        1: return I(OP_INC, 2);
        2: return I(OP_INC, 0);
        3: return I(OP_LT, 0, -1, 1);      // trip count (tid % 4) + 2
        default: return I(OP_EXIT);
      endcase
      default: case (pc)                   // K_CONFLICT
        0:  return I(OP_CLR, 0);
        1:  return I(OP_INC, 0);
        2:  return I(OP_LT, 0, 3, 1);      // loop [1,2]
        3:  return I(OP_CLR, 1);
        4:  return I(OP_INC, 1);
        5, 6, 7, 8, 9, 10: return I(OP_INC, 3);
        11: return I(OP_LT, 1, 3, 4);      // loop [4,11]
        default: return I(OP_EXIT);
      endcase
    endcase
  endfunction

  // data-dependent condition, about half true
  function automatic bit cond(int tid, int it, int salt);
    int unsigned h;
    h = (tid * 32'd2654435761) ^ (it * 32'd40503) ^ (salt * 32'd97);
    h = h ^ (h >> 13);
    h = h * 32'd1103515245;
    return h[20];
  endfunction

  // One instruction of one thread: returns its next pc, whether it branched
  // and whether it exited.
  function automatic void exec(int k, int salt, int tid, int pc, ref tstate_t s,
                               output int next_pc, output bit taken, output bit done);
    instr_t x;
    int lim;
    x = fetch(k, pc);
    next_pc = pc + 1;
    taken = 0;
    done = 0;
    case (x.op)
      OP_CLR:  s.regs[x.r] = 0;
      OP_INC:  s.regs[x.r] = s.regs[x.r] + 1;
      OP_COND: taken = !cond(tid, s.regs[0], salt);
      OP_LT: begin
        lim = (x.imm < 0) ? (tid % 4) + 2 : x.imm;
        taken = s.regs[x.r] < lim;
      end
      OP_JMP:  taken = 1;
      default: done = 1;
    endcase
    if (taken) next_pc = x.tgt;
  endfunction

  function automatic bit is_branch(int k, int pc);
    op_e o;
    o = fetch(k, pc).op;
    return o == OP_COND || o == OP_LT || o == OP_JMP;
  endfunction

  // whole thread alone: reference result
  function automatic tstate_t run_thread(int k, int salt, int tid);
    tstate_t s;
    int pc, npc;
    bit tk, d;
    foreach (s.regs[i]) s.regs[i] = 0;
    pc = 0;
    for (int n = 0; n < 10000; n++) begin
      exec(k, salt, tid, pc, s, npc, tk, d);
      if (d) break;
      pc = npc;
    end
    return s;
  endfunction

endpackage
