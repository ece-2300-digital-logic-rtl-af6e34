// tb_isa_pkg: assembler helpers and an instruction-level reference model of
// the 16-bit pipelined processor's ISA, for the processor testbenches.
//
// The reference model executes one instruction at a time with the ISA's
// rules (branch delay slot, target = address of branch + 2 + SE(imm), word
// accesses at (address >> 1) modulo the memory size) and knows nothing of
// the pipeline, so a pipelined run that matches it is independently checked.
package tb_isa_pkg;
  import cpu_pkg::*;

  function automatic word_t enc_r(funct_e fn, int rd, int rs, int rt);
    return {OP_RTYPE, 3'(rs), 3'(rt), 3'(rd), fn};
  endfunction
  function automatic word_t enc_i(opcode_e op, int rt, int rs, int imm);
    return {op, 3'(rs), 3'(rt), 6'(imm)};
  endfunction
  function automatic word_t ADD(int rd, int rs, int rt); return enc_r(FN_ADD, rd, rs, rt); endfunction
  function automatic word_t SUB(int rd, int rs, int rt); return enc_r(FN_SUB, rd, rs, rt); endfunction
  function automatic word_t AND(int rd, int rs, int rt); return enc_r(FN_AND, rd, rs, rt); endfunction
  function automatic word_t OR (int rd, int rs, int rt); return enc_r(FN_OR,  rd, rs, rt); endfunction
  function automatic word_t ADDI(int rt, int rs, int imm); return enc_i(OP_ADDI, rt, rs, imm); endfunction
  // LW rt, imm(rs) / SW rt, imm(rs)
  function automatic word_t LW(int rt, int imm, int rs); return enc_i(OP_LW, rt, rs, imm); endfunction
  function automatic word_t SW(int rt, int imm, int rs); return enc_i(OP_SW, rt, rs, imm); endfunction
  function automatic word_t BEQ(int rs, int rt, int off); return enc_i(OP_BEQ, rt, rs, off); endfunction
  function automatic word_t BNE(int rs, int rt, int off); return enc_i(OP_BNE, rt, rs, off); endfunction
  function automatic word_t BGEZ(int rs, int off); return enc_i(OP_BGEZ, 0, rs, off); endfunction
  function automatic word_t BLTZ(int rs, int off); return enc_i(OP_BLTZ, 0, rs, off); endfunction
  function automatic word_t NOP(); return NOP_INSTR; endfunction

  function automatic bit is_branch_op(word_t ins);
    return ins[15:12] inside {OP_BEQ, OP_BNE, OP_BGEZ, OP_BLTZ};
  endfunction

  class isa_model;
    word_t regs [8];
    word_t dmem [];
    word_t imem [];
    int    pc, npc;
    int    executed;
    // Bubbles the ISA's pipeline rules require, found from the dynamic
    // instruction stream: a consumer must be at least 2 slots behind a load
    // (3 if the consumer is a branch) and 2 behind an ALU result it branches
    // on; every other dependence is covered by forwarding.
    bit    p1_wr, p1_load, p2_wr, p2_load;
    int    p1_dr, p2_dr, b1;
    int    bubbles;
    // The last step's fetch address and data access (0 none, 1 load, 2 store).
    int    last_pc, mem_kind, mem_addr;

    function new(int imem_words, int dmem_words);
      imem = new[imem_words];
      dmem = new[dmem_words];
      foreach (regs[i]) regs[i] = '0;
      pc = 0; npc = 2; executed = 0;
      p1_wr = 0; p2_wr = 0; p1_load = 0; p2_load = 0; p1_dr = 0; p2_dr = 0; b1 = 0; bubbles = 0;
    endfunction

    function void step();
      word_t ins, a, b, imm, y;
      int    rs, rt, rd, target;
      bit    taken;
      ins = imem[(pc >> 1) % imem.size()];
      rs = ins[11:9]; rt = ins[8:6]; rd = ins[5:3];
      imm = {{10{ins[5]}}, ins[5:0]};
      a = regs[rs]; b = regs[rt];
      taken = 0;
      last_pc = pc; mem_kind = 0; mem_addr = 0;
      target = (pc + 2 + int'(imm)) & 16'hFFFF;
      begin : timing
        bit ua, ub, br, wr, ld, m1, m2;
        int need1, need2, b, dr;
        ua = ins[15:12] inside {OP_RTYPE, OP_ADDI, OP_LW, OP_SW, OP_BEQ, OP_BNE, OP_BGEZ, OP_BLTZ};
        ub = ins[15:12] inside {OP_RTYPE, OP_SW, OP_BEQ, OP_BNE};
        br = is_branch_op(ins);
        wr = ins[15:12] inside {OP_RTYPE, OP_ADDI, OP_LW};
        ld = ins[15:12] == OP_LW;
        dr = (ins[15:12] == OP_RTYPE) ? rd : rt;
        m1 = p1_wr && ((ua && rs == p1_dr) || (ub && rt == p1_dr));
        m2 = p2_wr && ((ua && rs == p2_dr) || (ub && rt == p2_dr));
        need1 = !m1 ? 1 : (p1_load ? (br ? 3 : 2) : (br ? 2 : 1));
        need2 = (m2 && p2_load && br) ? 3 : 1;
        b = 0;
        if (need1 - 1 > b) b = need1 - 1;
        if (need2 - 2 - b1 > b) b = need2 - 2 - b1;
        bubbles += b;
        p2_wr = p1_wr; p2_load = p1_load; p2_dr = p1_dr;
        p1_wr = wr; p1_load = ld; p1_dr = dr; b1 = b;
      end
      case (ins[15:12])
        OP_RTYPE: case (ins[2:0])
          FN_ADD: regs[rd] = a + b;
          FN_SUB: regs[rd] = a - b;
          FN_AND: regs[rd] = a & b;
          FN_OR:  regs[rd] = a | b;
          default: ;
        endcase
        OP_ADDI: regs[rt] = a + imm;
        OP_LW:   begin y = a + imm; mem_kind = 1; mem_addr = int'(y); regs[rt] = dmem[(y >> 1) % dmem.size()]; end
        OP_SW:   begin y = a + imm; mem_kind = 2; mem_addr = int'(y); dmem[(y >> 1) % dmem.size()] = b; end
        OP_BEQ:  taken = (a == b);
        OP_BNE:  taken = (a != b);
        OP_BGEZ: taken = !a[15];
        OP_BLTZ: taken = a[15];
        default: ;
      endcase
      pc  = npc;
      npc = taken ? target : ((npc + 2) & 16'hFFFF);
      executed++;
    endfunction
  endclass

endpackage
