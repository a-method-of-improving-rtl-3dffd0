// tb_dispatch: checks that one D-delimited group leaves the mapping table per
// cycle, that each member goes to the translator its number names (or the
// sequencer), that nothing moves while the decoder is not ready, and that a group
// never runs into the next one. A random part then compares 3000 mapping-table
// heads (random fill, D bits, translator numbers, ready) with a model of the rule.
module tb_dispatch;
  import cr_pkg::*;

  mentry_t    mt_e [AW];
  logic [4:0] mt_count;
  logic       dec_ready;
  logic [1:0] pop_n, grp_n;
  logic       tr_valid [3];
  mentry_t    tr_e [3];
  logic [1:0] tr_slot [3];
  logic       seq_valid;
  mentry_t    seq_e;
  mentry_t    grp [AW];
  int checks = 0, failures = 0;

  dispatch dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic mentry_t me(int a, tnum_e t, bit d);
    mentry_t m;
    m = '0; m.addr = 32'(a); m.tnum = t; m.d = d;
    m.pd.ucnt = (t == T_SEQ) ? 4'd5 : 4'(int'(t) + 1);
    return m;
  endfunction

  initial begin
    // full group C, G, S
    mt_e = '{me(0, T_C, 1), me(4, T_G, 0), me(8, T_S, 0)}; mt_count = 5'd5; dec_ready = 1'b1;
    #1;
    check(pop_n == 3 && grp_n == 3, "group of three popped");
    check(tr_valid[T_C] && tr_e[T_C].addr == 0 && tr_slot[T_C] == 0, "C gets slot 0");
    check(tr_valid[T_G] && tr_e[T_G].addr == 4 && tr_slot[T_G] == 1, "G gets slot 1");
    check(tr_valid[T_S] && tr_e[T_S].addr == 8 && tr_slot[T_S] == 2, "S gets slot 2");
    check(!seq_valid, "sequencer idle");
    // not ready
    dec_ready = 1'b0; #1;
    check(pop_n == 0 && !tr_valid[0] && !tr_valid[1] && !tr_valid[2], "nothing while not ready");
    // group of two followed by a new group
    dec_ready = 1'b1;
    mt_e = '{me(0, T_S, 1), me(4, T_C, 0), me(8, T_S, 1)}; #1;
    check(pop_n == 2 && tr_valid[T_S] && tr_valid[T_C] && !tr_valid[T_G] && tr_e[T_S].addr == 0, "group of two stops at the next D");
    // group of one
    mt_e = '{me(0, T_G, 1), me(4, T_C, 1), me(8, T_S, 0)}; #1;
    check(pop_n == 1 && tr_valid[T_G] && !tr_valid[T_C], "group of one");
    // sequencer instruction
    mt_e = '{me(0, T_SEQ, 1), me(4, T_S, 1), me(8, T_G, 0)}; #1;
    check(pop_n == 1 && seq_valid && seq_e.addr == 0 && !tr_valid[T_S], "sequencer alone");
    // only part of the table filled
    mt_e = '{me(0, T_C, 1), me(4, T_G, 0), me(8, T_S, 0)}; mt_count = 5'd2; #1;
    check(pop_n == 2, "group limited to what is held");
    mt_count = 5'd0; #1;
    check(pop_n == 0 && !seq_valid, "empty table");
    // random heads: D bits, group members on distinct translators, or a SEQ alone
    for (int n = 0; n < 3000; n++) begin
      automatic int    cnt = $urandom_range(0, 5);
      automatic int    exp_len = 0;
      automatic bit    exp_v [4] = '{0, 0, 0, 0};
      automatic int    exp_slot [4] = '{-1, -1, -1, -1};
      automatic tnum_e perm [3] = '{T_S, T_G, T_C};
      automatic bit    rdy = ($urandom_range(3) != 0);
      // shuffle the translator numbers
      for (int i = 2; i > 0; i--) begin
        automatic int k = $urandom_range(i);
        automatic tnum_e t = perm[i];
        perm[i] = perm[k]; perm[k] = t;
      end
      for (int j = 0; j < 3; j++) begin
        automatic bit d = (j == 0) || ($urandom_range(2) == 0);
        mt_e[j] = me(100 * n + 4 * j, perm[j], d);
      end
      if ($urandom_range(4) == 0) mt_e[0] = me(100 * n, T_SEQ, 1);
      mt_count = 5'(cnt);
      dec_ready = rdy;
      // expected group: the head plus following entries without D, up to three
      if (cnt > 0) begin
        exp_len = 1;
        if (mt_e[0].tnum != T_SEQ)
          for (int j = 1; j < 3 && j < cnt && !mt_e[j].d; j++) exp_len++;
      end
      if (!rdy) exp_len = 0;
      for (int j = 0; j < exp_len; j++) begin
        exp_v[int'(mt_e[j].tnum)] = 1;
        exp_slot[int'(mt_e[j].tnum)] = j;
      end
      #1;
      check(int'(pop_n) == exp_len && int'(grp_n) == exp_len,
            $sformatf("random %0d: pops %0d expected %0d", n, pop_n, exp_len));
      check(seq_valid == exp_v[3] && (!seq_valid || seq_e.addr == mt_e[0].addr),
            $sformatf("random %0d: sequencer", n));
      for (int t = 0; t < 3; t++)
        check(tr_valid[t] == exp_v[t] &&
              (!exp_v[t] || (int'(tr_slot[t]) == exp_slot[t] && tr_e[t] == mt_e[exp_slot[t]])),
              $sformatf("random %0d: translator %0d", n, t));
      for (int j = 0; j < exp_len; j++)
        check(grp[j] == mt_e[j], $sformatf("random %0d: group member %0d passed on", n, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
