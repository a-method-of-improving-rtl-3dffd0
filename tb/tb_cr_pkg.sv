// tb_cr_pkg: checks the shared functions of cr_pkg against independent models.
//
//  - group_fits against a brute-force search over translator assignments
//    (tb_util_pkg::ref_fits) for every group of 1 to 3 instructions needing
//    1 to 5 microinstructions each;
//  - mix_type against the five instruction-mix types defined from that search:
//    4 when the first needs four or more, 5 when the window holds one instruction,
//    1 when the first two cannot go together, 2 when only the first two can, 3
//    when all three can;
//  - pick_translator: for every group that fits, members assigned in program order
//    land on distinct translators that can hold them;
//  - predecode against the microinstruction templates (crack) for every opcode and
//    operand-kind combination: each of the first ucnt templates is a real
//    operation, flag setting and reading, memory loads and stores agree with the
//    predecode bits. Only the operand forms the instruction set encodes are
//    checked (legal below); for example NOP with a memory source is not an
//    instruction, and the predecoder's answer for it is a don't-care;
//  - res_reads / res_writes against the dependence model of tb_util_pkg.
// There is no clock: every check runs at time zero. The translator abilities
// (S one, G up to two, C up to three microinstructions) and the five mix types
// follow the design description; the instruction set, its legal operand forms and
// the templates being checked are this design's own.
module tb_cr_pkg;
  import cr_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit fits_of(int u[$]);
    int n2 = 0, n3 = 0, n4 = 0;
    foreach (u[i]) begin
      n2 += int'(u[i] >= 2 && u[i] < 4);
      n3 += int'(u[i] == 3);
      n4 += int'(u[i] >= 4);
    end
    return group_fits(u.size(), n2, n3, n4);
  endfunction

  function automatic int cap(tnum_e t);
    return t == T_S ? 1 : t == T_G ? 2 : t == T_C ? 3 : 99;
  endfunction

  // operand forms the instruction set encodes
  function automatic bit legal(cisc_op_e op, opnd_kind_e dk, opnd_kind_e sk);
    bit d_ok = dk inside {K_REG, K_MEM};
    bit s_ok = sk inside {K_REG, K_MEM, K_IMM};
    bit two  = d_ok && s_ok && !(dk == K_MEM && sk == K_MEM);
    unique case (op)
      OP_MOV, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_CMP, OP_SHR, OP_SHL: return two;
      OP_INC, OP_DEC, OP_POP: return d_ok && sk == K_NONE;
      OP_PUSH: return dk == K_NONE && s_ok;
      default: return sk == K_NONE;
    endcase
  endfunction

  initial begin
    // ---------------------------------------------------- group_fits, mix_type
    for (int a = 1; a <= 5; a++) begin
      check(fits_of('{a}) == ref_fits('{a}), $sformatf("fits (%0d)", a));
      check(mix_type(1, 4'(a), 4'(1), 4'(1)) == (a >= 4 ? 3'd4 : 3'd5), $sformatf("mix of (%0d) alone", a));
      for (int b = 1; b <= 5; b++) begin
        automatic int exp2;
        check(fits_of('{a, b}) == ref_fits('{a, b}), $sformatf("fits (%0d,%0d)", a, b));
        exp2 = a >= 4 ? 4 : !ref_fits('{a, b}) ? 1 : 2;
        check(int'(mix_type(2, 4'(a), 4'(b), 4'(1))) == exp2, $sformatf("mix of (%0d,%0d)", a, b));
        for (int c = 1; c <= 5; c++) begin
          automatic int exp3;
          check(fits_of('{a, b, c}) == ref_fits('{a, b, c}), $sformatf("fits (%0d,%0d,%0d)", a, b, c));
          exp3 = a >= 4 ? 4 : !ref_fits('{a, b}) ? 1 : !ref_fits('{a, b, c}) ? 2 : 3;
          check(int'(mix_type(3, 4'(a), 4'(b), 4'(c))) == exp3, $sformatf("mix of (%0d,%0d,%0d)", a, b, c));
          // translator choice for every group that fits
          for (int n = 1; n <= 3; n++) begin
            automatic int u [3] = '{a, b, c};
            automatic int q [$] = {};
            for (int j = 0; j < n; j++) q.push_back(u[j]);
            if (ref_fits(q) && (n == 1 || (a < 4 && b < 4 && c < 4))) begin
              automatic logic [2:0] busy = '0;
              automatic bit ok = 1;
              for (int j = 0; j < n; j++) begin
                automatic tnum_e t = pick_translator(4'(u[j]), busy);
                if (t == T_SEQ) ok &= (u[j] >= 4 && n == 1);
                else begin
                  ok &= !busy[t] && u[j] <= cap(t);
                  busy[t] = 1'b1;
                end
              end
              check(ok, $sformatf("translators for (%0d,%0d,%0d) first %0d", a, b, c, n));
            end
          end
        end
      end
    end

    // ------------------------------------------------ predecode against crack
    for (int op = 0; op <= int'(OP_POPA); op++)
      for (int dk = 0; dk < 4; dk++)
        for (int sk = 0; sk < 4; sk++) begin
          automatic cisc_code_t c = enc(cisc_op_e'(op), opnd_kind_e'(dk), 4'd2, opnd_kind_e'(sk), 4'd3, 14'd5);
          automatic predecode_t p = predecode(c);
          automatic bit sf = 0, rf = 0, ld = 0, st = 0, real_ops = 1;
          if (!legal(cisc_op_e'(op), opnd_kind_e'(dk), opnd_kind_e'(sk))) continue;
          check(p.valid && p.ucnt >= 1 && p.ucnt <= 9, $sformatf("%s count %0d", c.opc.name(), p.ucnt));
          for (int k = 0; k < int'(p.ucnt); k++) begin
            automatic uop_t u = crack(c, 4'(k));
            real_ops &= (u.op != U_NOP) || (c.opc == OP_NOP);
            sf |= u.sets_flags;
            rf |= u.reads_flags;
            ld |= (u.op == U_LD);
            st |= (u.op == U_ST);
          end
          check(real_ops, $sformatf("%s %0d/%0d: templates defined", c.opc.name(), dk, sk));
          check(sf == p.sets_flags, $sformatf("%s %0d/%0d: flag setting agrees", c.opc.name(), dk, sk));
          check(rf == p.reads_flags, $sformatf("%s %0d/%0d: flag reading agrees", c.opc.name(), dk, sk));
          if (p.mem_rd) check(ld, $sformatf("%s %0d/%0d: memory read has a load", c.opc.name(), dk, sk));
          if (p.mem_wr) check(st, $sformatf("%s %0d/%0d: memory write has a store", c.opc.name(), dk, sk));
          check(p.is_branch == (c.opc inside {OP_JCC, OP_JMP}), "branch bit");
        end
    // the worked example's counts
    for (int i = 0; i < 11; i++)
      check(int'(predecode(example(i)).ucnt) == example_ucnt(i), $sformatf("example %0d count", i));

    // --------------------------------------- resource masks against the model
    for (int n = 0; n < 3000; n++) begin
      automatic cisc_code_t c = rand_instr(30, 30, 20, 1'b1);
      automatic qentry_t e;
      automatic logic [NRES-1:0] rd, wr;
      e.addr = '0; e.code = c; e.pd = predecode(c);
      rd = res_reads(e);
      wr = res_writes(e);
      for (int r = 0; r < 8; r++) begin
        check(rd[r] == rd_reg(c, r), $sformatf("%s reads register %0d", c.opc.name(), r));
        check(wr[r] == wr_reg(c, r), $sformatf("%s writes register %0d", c.opc.name(), r));
      end
      for (int m = 0; m < 16; m++) begin
        check(rd[8 + m] == rd_mem(c, m), $sformatf("%s reads memory %0d", c.opc.name(), m));
        check(wr[8 + m] == wr_mem(c, m), $sformatf("%s writes memory %0d", c.opc.name(), m));
      end
      check(e.pd.sets_flags == sets_fl(c), $sformatf("%s sets flags", c.opc.name()));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
