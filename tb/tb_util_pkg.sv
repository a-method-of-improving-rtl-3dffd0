// tb_util_pkg: helpers shared by the testbenches: building instruction words of
// the toy x86-like encoding, the worked example basic block, an in-order
// (unscheduled) reference grouping, a random instruction generator, and an
// independent model of which instruction pairs must keep their order.
package tb_util_pkg;
  import cr_pkg::*;

  function automatic cisc_code_t enc(cisc_op_e op, opnd_kind_e dk, logic [3:0] did,
                                     opnd_kind_e sk, logic [3:0] sid, logic [13:0] imm = '0);
    cisc_code_t c;
    c.opc = op; c.dk = dk; c.did = did; c.sk = sk; c.sid = sid; c.imm = imm;
    return c;
  endfunction

  // The example basic block: PUSH MEM_1 / ADD CX,MEM_2 / SUB MEM_3,CX / MOV BX,AX /
  // SHR MEM_3,1 / ADD AX,MEM_3 / XOR DL,MEM_4 / DEC CL / LODSB STRING / CMP AX,BX /
  // JNE LABEL
  function automatic cisc_code_t example(int i);
    unique case (i)
      0:  return enc(OP_PUSH,  K_NONE, 4'd0, K_MEM, 4'd1);
      1:  return enc(OP_ADD,   K_REG,  R_CX, K_MEM, 4'd2);
      2:  return enc(OP_SUB,   K_MEM,  4'd3, K_REG, R_CX);
      3:  return enc(OP_MOV,   K_REG,  R_BX, K_REG, R_AX);
      4:  return enc(OP_SHR,   K_MEM,  4'd3, K_IMM, 4'd0, 14'd1);
      5:  return enc(OP_ADD,   K_REG,  R_AX, K_MEM, 4'd3);
      6:  return enc(OP_XOR,   K_REG,  R_DX, K_MEM, 4'd4);
      7:  return enc(OP_DEC,   K_REG,  R_CX, K_NONE, 4'd0);
      8:  return enc(OP_LODSB, K_NONE, 4'd0, K_MEM, 4'd5);
      9:  return enc(OP_CMP,   K_REG,  R_AX, K_REG, R_BX);
      default: return enc(OP_JCC, K_NONE, 4'd5, K_NONE, 4'd0, 14'h3fd4);
    endcase
  endfunction

  // microinstruction counts of the example, as the document lists them
  function automatic int example_ucnt(int i);
    int t[11] = '{3, 2, 3, 1, 3, 2, 2, 1, 4, 1, 1};
    return t[i];
  endfunction

  // Can a set of instructions with these counts go through 1S+1G+1C together?
  // Worked out by trying every assignment to distinct translators.
  function automatic bit ref_fits(int u[$]);
    int cap[3] = '{1, 2, 3};
    if (u.size() == 1) return 1;
    if (u.size() > 3) return 0;
    foreach (u[i]) if (u[i] >= 4) return 0;
    if (u.size() == 2) begin
      for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++)
        if (a != b && u[0] <= cap[a] && u[1] <= cap[b]) return 1;
      return 0;
    end
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) for (int c = 0; c < 3; c++)
      if (a != b && b != c && a != c && u[0] <= cap[a] && u[1] <= cap[b] && u[2] <= cap[c])
        return 1;
    return 0;
  endfunction

  // Number of dispatch cycles without scheduling: the longest translatable prefix
  // is taken each cycle; a basic block end (branch) closes a group.
  function automatic int inorder_groups(int u[$], bit br[$]);
    int i = 0, g = 0;
    while (i < u.size()) begin
      int q[$];
      q = {u[i]};
      if (!br[i]) begin
        for (int k = i + 1; k < u.size() && k < i + 3; k++) begin
          q.push_back(u[k]);
          if (!ref_fits(q)) begin q.pop_back(); break; end
          if (br[k]) break;
        end
      end
      i += q.size();
      g++;
    end
    return g;
  endfunction

  // Random instruction with a given mix of microinstruction counts (percent of
  // 1, 2, 3 and 4+); registers and memory ids from a small pool so that
  // dependences occur.
  function automatic cisc_code_t rand_instr(int p1, int p2, int p3, bit allow_branch);
    int r = $urandom_range(99);
    logic [3:0] rg = 4'($urandom_range(7));
    logic [3:0] rs = 4'($urandom_range(7));
    logic [3:0] mm = 4'($urandom_range(15));
    cisc_op_e alu[7] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_SHL};
    cisc_op_e a = alu[$urandom_range(6)];
    if (rg == R_SP) rg = R_BX;
    if (r < p1) begin
      unique case ($urandom_range(4))
        0: return enc(OP_MOV, K_REG, rg, K_REG, rs);
        1: return enc(OP_MOV, K_REG, rg, K_MEM, mm);
        2: return enc(a, K_REG, rg, K_REG, rs);
        3: return enc(OP_CMP, K_REG, rg, K_IMM, 4'd0, 14'(r));
        default: return allow_branch ? enc(OP_INC, K_REG, rg, K_NONE, 4'd0)
                                     : enc(OP_DEC, K_REG, rg, K_NONE, 4'd0);
      endcase
    end else if (r < p1 + p2) begin
      unique case ($urandom_range(2))
        0: return enc(a, K_REG, rg, K_MEM, mm);
        1: return enc(OP_PUSH, K_NONE, 4'd0, K_REG, rs);
        default: return enc(OP_CMP, K_REG, rg, K_MEM, mm);
      endcase
    end else if (r < p1 + p2 + p3) begin
      unique case ($urandom_range(1))
        0: return enc(a, K_MEM, mm, K_REG, rs);
        default: return enc(OP_PUSH, K_NONE, 4'd0, K_MEM, mm);
      endcase
    end else begin
      unique case ($urandom_range(3))
        0: return enc(OP_LODSB, K_NONE, 4'd0, K_MEM, mm);
        1: return enc(OP_MOVSB, K_MEM, mm, K_MEM, 4'(mm + 1));
        2: return enc(OP_PUSHA, K_NONE, 4'd0, K_NONE, 4'd0);
        default: return enc(OP_POPA, K_NONE, 4'd0, K_NONE, 4'd0);
      endcase
    end
  endfunction

  // Independent dependence model, worked out from the instruction definitions
  // (not from the RTL): must instruction a stay before the later instruction b?
  function automatic bit rd_reg(cisc_code_t c, int r);
    bit rd = 0;
    if (c.sk == K_REG && int'(c.sid[2:0]) == r) rd = 1;
    if (c.dk == K_REG && int'(c.did[2:0]) == r &&
        c.opc inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_SHL, OP_INC, OP_DEC, OP_CMP}) rd = 1;
    return rd;
  endfunction
  function automatic bit wr_reg(cisc_code_t c, int r);
    return c.dk == K_REG && int'(c.did[2:0]) == r && !(c.opc inside {OP_CMP, OP_PUSH, OP_JCC});
  endfunction
  function automatic bit rd_mem(cisc_code_t c, int m);
    return (c.sk == K_MEM && int'(c.sid) == m) ||
           (c.dk == K_MEM && int'(c.did) == m && !(c.opc inside {OP_MOV, OP_MOVSB, OP_STOSB, OP_POP}));
  endfunction
  function automatic bit wr_mem(cisc_code_t c, int m);
    return c.dk == K_MEM && int'(c.did) == m && c.opc != OP_CMP;
  endfunction
  function automatic bit sets_fl(cisc_code_t c);
    return c.opc inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_SHL, OP_INC, OP_DEC, OP_CMP};
  endfunction
  function automatic bit must_order(cisc_code_t a, cisc_code_t b);  // a earlier than b
    for (int r = 0; r < 8; r++) if (wr_reg(a, r) && rd_reg(b, r)) return 1;
    for (int m = 0; m < 16; m++)
      if ((wr_mem(a, m) && (rd_mem(b, m) || wr_mem(b, m))) || (rd_mem(a, m) && wr_mem(b, m))) return 1;
    if (sets_fl(a) && b.opc == OP_JCC) return 1;
    if (a.opc == OP_JCC && sets_fl(b)) return 1;
    if (b.opc inside {OP_JCC, OP_JMP}) return 1;
    return 0;
  endfunction

  function automatic int cap(tnum_e t);
    return t == T_S ? 1 : t == T_G ? 2 : t == T_C ? 3 : 99;
  endfunction

endpackage
