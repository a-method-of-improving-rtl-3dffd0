// tb_decoder: checks the lane map of the decoder (lane 0 simple, 1-2 general,
// 3-5 complex), the sequencer's lanes taking over all six, the group record for
// the translation table appearing with the lanes, and holding while adv is low.
// A random part sends 2000 groups of random instructions with random stalls and
// checks every lane (operation, destination, index, last, group slot, rename tag)
// and the group record against a model built from the translators' definition.
module tb_decoder;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b1;
  logic tr_valid [3];
  mentry_t tr_e [3];
  logic [1:0] tr_slot [3];
  logic [1:0] grp_n;
  mentry_t grp [AW];
  uop_t seq_lane [NLANES];
  uop_t lane [NLANES];
  logic [1:0] tt_n;
  mentry_t tt_e [AW];
  logic err;
  int checks = 0, failures = 0;

  decoder dut (.clk, .rst_n, .flush(1'b0), .adv, .tr_valid, .tr_e, .tr_slot, .grp_n, .grp,
               .seq_lane, .lane, .tt_n, .tt_e, .err);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic mentry_t mk(int i, tnum_e t, bit d);
    mentry_t m;
    m = '0; m.addr = 32'(4 * i); m.code = example(i); m.pd = predecode(example(i)); m.tnum = t; m.d = d;
    return m;
  endfunction

  task automatic idle_inputs();
    for (int t = 0; t < 3; t++) begin tr_valid[t] = 1'b0; tr_e[t] = '0; tr_slot[t] = '0; end
    grp_n = '0;
    for (int j = 0; j < 3; j++) grp[j] = '0;
    for (int k = 0; k < NLANES; k++) seq_lane[k] = '0;
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // group {PUSH MEM_1 -> C, ADD CX,MEM_2 -> G, MOV BX,AX -> S}
    @(negedge clk);
    grp = '{mk(0, T_C, 1), mk(1, T_G, 0), mk(3, T_S, 0)}; grp_n = 2'd3;
    tr_valid = '{1'b1, 1'b1, 1'b1};
    tr_e[T_S] = mk(3, T_S, 0); tr_slot[T_S] = 2'd2;
    tr_e[T_G] = mk(1, T_G, 0); tr_slot[T_G] = 2'd1;
    tr_e[T_C] = mk(0, T_C, 1); tr_slot[T_C] = 2'd0;
    @(negedge clk);
    idle_inputs();
    check(lane[0].valid && lane[0].addr == 12 && lane[0].op == U_MOV && lane[0].slot == 2, "lane 0: MOV from S");
    check(lane[1].valid && lane[2].valid && lane[1].addr == 4 && lane[2].op == U_ADD, "lanes 1-2: ADD from G");
    check(lane[3].valid && lane[4].valid && lane[5].valid && lane[3].addr == 0 && lane[5].op == U_ST, "lanes 3-5: PUSH from C");
    check(tt_n == 3 && tt_e[0].addr == 0 && tt_e[1].addr == 4 && tt_e[2].addr == 12, "group record with the lanes");
    @(negedge clk);
    check(tt_n == 0 && !lane[0].valid && !lane[3].valid, "recorded once, lanes cleared");
    // hold: a group enters, adv low next cycle
    grp = '{mk(7, T_S, 1), mk(0, T_C, 0), mk(0, T_C, 0)}; grp_n = 2'd1;
    tr_valid[T_S] = 1'b1; tr_e[T_S] = mk(7, T_S, 1);
    @(negedge clk);
    idle_inputs();
    adv = 1'b0;
    check(lane[0].valid && lane[0].addr == 28 && tt_n == 1, "DEC CL on lane 0");
    @(negedge clk);
    check(lane[0].valid && lane[0].addr == 28 && tt_n == 0, "lane held, record not repeated");
    adv = 1'b1;
    // sequencer lanes override
    @(negedge clk);
    for (int k = 0; k < NLANES; k++) begin
      seq_lane[k] = crack(example(8), 4'(k));
      seq_lane[k].valid = (k < 4);
      seq_lane[k].addr = 32'd32;
    end
    #1;
    for (int k = 0; k < NLANES; k++) check(lane[k].valid == (k < 4) && (k >= 4 || lane[k].addr == 32), $sformatf("sequencer lane %0d", k));
    check(!err, "no error");
    // random groups on random translators, random adv: every lane against a model
    for (int k = 0; k < NLANES; k++) seq_lane[k] = '0;
    begin
      automatic uop_t    exp_lane [NLANES];
      automatic int      exp_tt_n = 0;
      automatic mentry_t exp_tt [3];
      for (int k = 0; k < NLANES; k++) exp_lane[k] = '0;
      for (int j = 0; j < 3; j++) exp_tt[j] = '0;
      @(negedge clk);
      for (int n = 0; n < 2000; n++) begin
        automatic bit a_now = ($urandom_range(3) != 0);
        automatic int cap [3] = '{1, 2, 3};
        automatic int base [3] = '{0, 1, 3};
        automatic int m = 0;
        idle_inputs();
        for (int t = 0; t < 3; t++) begin
          if ($urandom_range(2) != 0) begin
            automatic cisc_code_t c;
            do c = rand_instr(40, 35, 25, 1'b1); while (int'(predecode(c).ucnt) > cap[t]);
            tr_valid[t] = 1'b1;
            tr_e[t] = '0;
            tr_e[t].addr = 32'(1000 * n + 4 * t);
            tr_e[t].code = c;
            tr_e[t].pd = predecode(c);
            tr_e[t].tnum = tnum_e'(t);
            tr_e[t].rn = ($urandom_range(3) == 0);
            tr_slot[t] = 2'(m);
            grp[m] = tr_e[t];
            m++;
          end
        end
        grp_n = 2'(m);
        grp[0].d = (m > 0);
        adv = a_now;
        #1;
        // outputs of the previous step
        for (int k = 0; k < NLANES; k++)
          check(lane[k].valid == exp_lane[k].valid &&
                (!exp_lane[k].valid || (lane[k].op == exp_lane[k].op && lane[k].addr == exp_lane[k].addr &&
                 lane[k].idx == exp_lane[k].idx && lane[k].slot == exp_lane[k].slot &&
                 lane[k].last == exp_lane[k].last && lane[k].dst == exp_lane[k].dst &&
                 lane[k].rn == exp_lane[k].rn)),
                $sformatf("random %0d: lane %0d", n, k));
        check(int'(tt_n) == exp_tt_n, $sformatf("random %0d: record count", n));
        for (int j = 0; j < exp_tt_n; j++) check(tt_e[j] == exp_tt[j], $sformatf("random %0d: record %0d", n, j));
        check(!err, "no error");
        // model of this step
        if (a_now) begin
          for (int t = 0; t < 3; t++)
            for (int k = 0; k < cap[t]; k++) begin
              automatic uop_t u = crack(tr_e[t].code, 4'(k));
              u.valid = tr_valid[t] && k < int'(tr_e[t].pd.ucnt);
              u.last  = (k + 1 == int'(tr_e[t].pd.ucnt));
              u.slot  = tr_slot[t];
              u.addr  = tr_e[t].addr;
              u.rn    = tr_e[t].rn && u.dst == tr_e[t].code.did;
              exp_lane[base[t] + k] = u;
            end
          exp_tt_n = m;
          for (int j = 0; j < 3; j++) exp_tt[j] = grp[j];
        end else exp_tt_n = 0;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
