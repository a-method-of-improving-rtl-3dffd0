// tb_sequencer: checks the sequencer on LODSB (4 microinstructions, one cycle),
// PUSHA (9, two cycles with busy high in between) and MOVSB (5), including holding
// while adv is low. Expected operations are written out here by hand. A random
// part then runs 300 long instructions back to back with random stalls and checks
// every lane against the templates and the cycle count of each.
module tb_sequencer;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, start = 1'b0;
  mentry_t e;
  uop_t lane [NLANES];
  logic busy;
  int checks = 0, failures = 0;

  sequencer dut (.clk, .rst_n, .flush(1'b0), .adv, .start, .in_e(e), .lane, .busy);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(cisc_code_t c, uop_op_e ops [$], bit hold);
    int got = 0, cyc = 0;
    @(negedge clk);
    e = '0; e.code = c; e.pd = predecode(c); e.addr = 32'h40; e.tnum = T_SEQ; e.d = 1'b1;
    start = 1'b1; adv = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (hold) begin
      adv = 1'b0;
      @(negedge clk);
      check(lane[0].valid && lane[0].idx == 0, "holds first chunk");
      adv = 1'b1;
    end
    forever begin
      cyc++;
      for (int k = 0; k < NLANES; k++)
        if (lane[k].valid) begin
          check(got < ops.size() && lane[k].op == ops[got], $sformatf("%s uop %0d op %s", c.opc.name(), got, lane[k].op.name()));
          check(int'(lane[k].idx) == got && lane[k].last == (got == ops.size() - 1), "idx/last");
          got++;
        end
      if (!busy) break;
      @(negedge clk);
    end
    check(got == ops.size(), $sformatf("%s: %0d microinstructions", c.opc.name(), got));
    check(cyc == (ops.size() + 5) / 6, $sformatf("%s: %0d cycles", c.opc.name(), cyc));
    @(negedge clk);
    check(!lane[0].valid, "idle after the sequence");
  endtask

  initial begin
    uop_op_e pusha [$];
    for (int i = 0; i < 8; i++) pusha.push_back(U_ST);
    pusha.push_back(U_SUB);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(example(8), '{U_LD, U_MOVB, U_RDDF, U_ADD}, 1'b0);
    run(enc(OP_PUSHA, K_NONE, 0, K_NONE, 0), pusha, 1'b0);
    run(enc(OP_PUSHA, K_NONE, 0, K_NONE, 0), pusha, 1'b1);
    run(enc(OP_MOVSB, K_MEM, 4'd1, K_MEM, 4'd2), '{U_LD, U_ST, U_RDDF, U_ADD, U_ADD}, 1'b0);
    run(enc(OP_POPA, K_NONE, 0, K_NONE, 0), '{U_LD, U_LD, U_LD, U_LD, U_LD, U_LD, U_LD, U_ADD}, 1'b0);
    // random: 300 long instructions back to back, started whenever the sequencer
    // is free (as dispatch does), with random stalls; every lane against the
    // templates, and held lanes must not change
    begin
      automatic cisc_code_t kinds [4] = '{example(8), enc(OP_PUSHA, K_NONE, 0, K_NONE, 0),
                                           enc(OP_MOVSB, K_MEM, 4'd3, K_MEM, 4'd4),
                                           enc(OP_POPA, K_NONE, 0, K_NONE, 0)};
      automatic cisc_code_t cur_c;
      automatic int cur_n = 0, got = 0, adv_cycles = 0, done_n = 0;
      automatic uop_t prev [NLANES];
      automatic bit prev_adv = 0;
      @(negedge clk);
      for (int k = 0; k < NLANES; k++) prev[k] = lane[k];
      for (int cyc = 0; cyc < 3000 && done_n < 300; cyc++) begin
        // lanes produced by the previous edge
        if (prev_adv) begin
          for (int k = 0; k < NLANES; k++)
            if (lane[k].valid) begin
              check(got < cur_n && lane[k].op == crack(cur_c, 4'(got)).op &&
                    int'(lane[k].idx) == got && lane[k].last == (got == cur_n - 1) &&
                    lane[k].addr == 32'(4 * done_n),
                    $sformatf("random instruction %0d uop %0d", done_n, got));
              got++;
            end
          if (cur_n != 0 && got == cur_n) begin
            check(!busy, "free after the last microinstructions");
            check(adv_cycles == (cur_n + 5) / 6, $sformatf("random instruction %0d: %0d cycles", done_n, adv_cycles));
            done_n++;
            cur_n = 0;
          end
        end else
          for (int k = 0; k < NLANES; k++) check(lane[k] == prev[k], "lanes hold while adv is low");
        for (int k = 0; k < NLANES; k++) prev[k] = lane[k];
        // drive the next edge
        start = 1'b0;
        adv = ($urandom_range(3) != 0);
        if (!busy && cur_n == 0 && $urandom_range(1) == 0) begin
          cur_c = kinds[$urandom_range(3)];
          cur_n = int'(predecode(cur_c).ucnt);
          got = 0; adv_cycles = 0;
          e = '0; e.code = cur_c; e.pd = predecode(cur_c); e.addr = 32'(4 * done_n); e.tnum = T_SEQ; e.d = 1'b1;
          start = 1'b1;
          adv = 1'b1;
        end
        if (adv && (busy || start)) adv_cycles++;
        prev_adv = adv;
        @(negedge clk);
      end
      start = 1'b0;
      check(done_n == 300, $sformatf("random: %0d instructions completed", done_n));
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
