// tb_scheduler: checks the scheduler against the worked example and against the
// rules it must keep on random code.
//
// Part 1 feeds the eleven-instruction example basic block (ending in JNE) and
// expects the five dispatch groups of the worked example: {PUSH, ADD, MOV},
// {SUB, XOR, DEC}, {SHR, ADD, CMP}, {LODSB}, {JNE}, with the window mix types
// 2, 1, 2, 4, 5, the translator numbers of each member, and 5 groups against the
// 6 of in-order dispatch (11/5 = 2.2 against 11/6 = 1.83 instructions per cycle).
// Part 2 feeds random basic blocks and checks every group: each instruction comes
// out once, groups fit 1S+1G+1C, translator numbers match the counts, no group
// spans two basic blocks, and every dependence (register/memory read after write,
// memory write after read or write, flag set/check order, branch last) keeps its
// order, and the rename tag is set exactly on instructions moved ahead of one
// that reads or writes the register they write. The dependences are worked out
// from the instruction definitions (tb_util_pkg), not from the RTL.
module tb_scheduler;
  import cr_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned SWS = 6;
  localparam int NRAND = 600;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] enq_n;
  qentry_t    enq [4];
  logic [3:0] enq_room;
  logic       fetch_stopped;
  logic [1:0] grp_n;
  mentry_t    grp [AW];
  logic       fire, rearranged;
  logic [2:0] mix;
  logic [3:0] q_count;

  int checks = 0, failures = 0;
  int cycles = 0;

  scheduler #(.SWS(SWS), .FW(4)) dut (
    .clk, .rst_n, .flush(1'b0), .enq_n, .enq, .enq_room, .fetch_stopped,
    .mt_free(5'd16), .grp_n, .grp, .fire, .mix, .rearranged, .q_count);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // program being fed
  cisc_code_t prog [$];
  int         blk  [$];
  int         fed;
  // what came out
  int         out_idx [$];
  int         out_grp [$];
  tnum_e      out_t   [$];
  int         out_mix [$];
  int         out_rearr [$];
  bit         out_rn    [$];
  int         ngroups;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // feeder: as many as there is room for, up to 4 per cycle
  always_comb begin
    int n;
    n = prog.size() - fed;
    if (n > 4) n = 4;
    if (n > int'(enq_room)) n = int'(enq_room);
    if (n < 0) n = 0;
    enq_n = 3'(n);
    for (int j = 0; j < 4; j++) begin
      if (fed + j < prog.size()) begin
        enq[j].addr = 32'(4 * (fed + j));
        enq[j].code = prog[fed + j];
        enq[j].pd   = predecode(prog[fed + j]);
      end else enq[j] = '0;
    end
    fetch_stopped = (fed == prog.size());
  end

  always @(posedge clk) if (rst_n) begin
    fed <= fed + int'(enq_n);
    if (grp_n != 0) begin
      for (int j = 0; j < int'(grp_n); j++) begin
        out_idx.push_back(int'(grp[j].addr) / 4);
        out_grp.push_back(ngroups);
        out_t.push_back(grp[j].tnum);
        out_rn.push_back(grp[j].rn);
        check(grp[j].d == (j == 0), "D bit marks the first member only");
      end
      out_mix.push_back(int'(mix));
      out_rearr.push_back(int'(rearranged));
      ngroups <= ngroups + 1;
    end
  end

  task automatic run_prog();
    rst_n = 1'b0;
    fed = 0; ngroups = 0;
    out_idx.delete(); out_grp.delete(); out_t.delete(); out_mix.delete(); out_rearr.delete(); out_rn.delete();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (out_idx.size() < prog.size()) @(posedge clk);
    @(posedge clk);
    check(q_count == 0, "queue empty at the end");
  endtask

  initial begin
    int exp_grp [11] = '{0, 0, 1, 0, 2, 2, 1, 1, 3, 2, 4};
    tnum_e exp_t [11] = '{T_C, T_G, T_C, T_S, T_C, T_G, T_G, T_S, T_SEQ, T_S, T_S};
    int exp_mix [5] = '{2, 1, 2, 4, 5};
    int exp_rearr [5] = '{1, 1, 1, 0, 0};
    int exp_order [11] = '{0, 1, 3, 2, 6, 7, 4, 5, 9, 8, 10};
    int u [$];
    bit br [$];

    // ------------------------------------------------------------ part 1
    for (int i = 0; i < 11; i++) begin
      prog.push_back(example(i));
      check(int'(predecode(example(i)).ucnt) == example_ucnt(i), $sformatf("predecoded count of instruction %0d", i));
      u.push_back(example_ucnt(i));
      br.push_back(i == 10);
    end
    run_prog();
    check(ngroups == 5, $sformatf("example: %0d groups, expected 5", ngroups));
    check(inorder_groups(u, br) == 6, "example: 6 groups without scheduling");
    for (int k = 0; k < 11 && k < out_idx.size(); k++) begin
      check(out_idx[k] == exp_order[k], $sformatf("example order %0d: got i+%0d expected i+%0d", k, out_idx[k], exp_order[k]));
      check(out_grp[k] == exp_grp[out_idx[k]], $sformatf("example: i+%0d in group %0d", out_idx[k], out_grp[k]));
      check(out_t[k] == exp_t[out_idx[k]], $sformatf("example: translator of i+%0d is %s", out_idx[k], out_t[k].name()));
      check(!out_rn[k], $sformatf("example: i+%0d needs no rename tag", out_idx[k]));
    end
    for (int g = 0; g < 5 && g < out_mix.size(); g++) begin
      check(out_mix[g] == exp_mix[g], $sformatf("example: group %0d mix type %0d expected %0d", g, out_mix[g], exp_mix[g]));
      check(out_rearr[g] == exp_rearr[g], $sformatf("example: group %0d rearranged flag", g));
    end
    $display("example: %0d groups with scheduling, %0d without", ngroups, inorder_groups(u, br));

    // ------------------------------------------------------------ part 2
    begin
      int pos [$];
      int b = 0, left = 0, inord = 0, seen [$];
      prog.delete(); blk.delete(); u.delete(); br.delete();
      for (int i = 0; i < NRAND; i++) begin
        if (left == 0) left = $urandom_range(3, 14);
        left--;
        if (left == 0 || i == NRAND - 1) prog.push_back(enc(OP_JCC, K_NONE, 4'd5, K_NONE, 4'd0, 14'd8));
        else prog.push_back(rand_instr(45, 40, 10, 1'b1));
        blk.push_back(b);
        u.push_back(int'(predecode(prog[i]).ucnt));
        br.push_back(prog[i].opc == OP_JCC);
        if (prog[i].opc == OP_JCC) b++;
      end
      run_prog();
      inord = inorder_groups(u, br);
      pos = {};
      for (int i = 0; i < NRAND; i++) begin pos.push_back(-1); seen.push_back(0); end
      foreach (out_idx[k]) begin
        pos[out_idx[k]] = k;
        seen[out_idx[k]]++;
      end
      foreach (seen[i]) check(seen[i] == 1, $sformatf("instruction %0d emitted %0d times", i, seen[i]));
      // groups
      for (int k = 0; k < out_idx.size(); ) begin
        automatic int q [$] = {};
        automatic int m = k;
        while (m < out_idx.size() && out_grp[m] == out_grp[k]) begin
          q.push_back(u[out_idx[m]]);
          check(blk[out_idx[m]] == blk[out_idx[k]], "group within one basic block");
          check(u[out_idx[m]] <= cap(out_t[m]) && (u[out_idx[m]] >= 4) == (out_t[m] == T_SEQ),
                "translator number matches the count");
          for (int n = k; n < m; n++) check(out_t[n] != out_t[m], "distinct translators in a group");
          m++;
        end
        check(ref_fits(q), $sformatf("group at %0d fits 1S+1G+1C", k));
        k = m;
      end
      // dependences
      for (int a = 0; a < NRAND; a++)
        for (int c = a + 1; c < NRAND && blk[c] == blk[a]; c++)
          if (must_order(prog[a], prog[c]))
            check(pos[a] < pos[c], $sformatf("dependence %0d -> %0d kept", a, c));
      // rename tags: set exactly when an instruction was moved ahead of an earlier
      // one that reads or writes the register it writes
      begin
        automatic int ntag = 0;
        for (int a = 0; a < NRAND; a++) begin
          automatic bit exp_rn = 0;
          for (int c = a - 1; c >= 0 && blk[c] == blk[a]; c--)
            if (pos[c] > pos[a])
              for (int r = 0; r < 8; r++)
                if (wr_reg(prog[a], r) && (rd_reg(prog[c], r) || wr_reg(prog[c], r))) exp_rn = 1;
          check(out_rn[pos[a]] == exp_rn, $sformatf("rename tag of instruction %0d is %0d", a, exp_rn));
          ntag += int'(exp_rn);
        end
        check(ntag > 0, "random code produced rename tags");
        $display("random: %0d instructions carry a rename tag", ntag);
      end
      check(ngroups < inord, $sformatf("random: %0d groups scheduled vs %0d in order", ngroups, inord));
      $display("random (45,40,10,5), SWS=%0d: %0d instr, %0d groups scheduled (%.3f/cycle), %0d in order (%.3f/cycle)",
               SWS, NRAND, ngroups, real'(NRAND) / ngroups, inord, real'(NRAND) / inord);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
