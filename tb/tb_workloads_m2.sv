// tb_workloads_m2: runs the scheduler with two simple and one complex translator
// (TSET = 1) on the workloads of the evaluation's second comparison machine, and
// reports the translation rate (instructions per dispatch group) for each.
//
// Three schedulers are built side by side with search windows of 1, 3 and 6
// entries. Each workload is a stream of random basic blocks from one instruction
// mix, given as percent of instructions needing 1, 2, 3, 4 and 5 or more
// microinstructions: (25,25,25,15,10), (35,35,20,5,5), (45,40,5,5,5) and
// (55,15,15,10,5), and one dependency ratio DEP (0, 20, 40, 60, 80 %). The last two
// classes are generated together as instructions of four or more, which here go
// alone to the sequencer; with two simple translators and one complex one, each
// group holds at most one instruction needing two or more either way. The stream
// generator and DEP are those of tb_workloads (DEP's definition is not given by the
// design description and is this testbench's own).
//
// Checks per workload and window size: every instruction comes out exactly once,
// each group fits 2S+1C (one-microinstruction instructions on the S and second S
// slot, at most one larger instruction) and stays in one basic block, and every
// dependence keeps its order. Rates must come within TOL = 10 % of the published
// rates for this machine. Each group is one translation cycle.
module tb_workloads_m2;
  import cr_pkg::*;
  import tb_util_pkg::*;

  localparam int NINSTR = 8000;
  localparam real TOL   = 0.10;   // allowed distance from the published rates
  localparam int NW     = 3;   // windows 1, 3, 6

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // the current workload, shared by the three schedulers
  cisc_code_t prog [$];
  int         blk  [$];
  int         u    [$];
  bit         br   [$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int cap(tnum_e t);
    return t == T_S ? 1 : t == T_G ? 1 : t == T_C ? 3 : 99;   // T_G is the second simple translator
  endfunction

  // a group fits two simple and one complex translator
  function automatic bit m2_fits(int q[$]);
    int big = 0;
    foreach (q[i]) begin
      big += int'(q[i] >= 2);
      if (q[i] >= 4 && q.size() != 1) return 0;
    end
    return q.size() >= 1 && q.size() <= 3 && big <= 1;
  endfunction

  logic [NW-1:0] done;

  for (genvar k = 0; k < NW; k++) begin : g
    localparam int unsigned S = (k == 0) ? 1 : (k == 1) ? 3 : 6;
    logic [2:0] enq_n;
    qentry_t    enq [4];
    logic [3:0] enq_room;
    logic       fetch_stopped;
    logic [1:0] grp_n;
    mentry_t    grp [AW];
    logic       fire, rearranged;
    logic [2:0] mix;
    logic [3:0] q_count;
    int         fed;
    int         ngroups;
    int         out_idx [$];
    int         out_grp [$];
    tnum_e      out_t   [$];

    scheduler #(.SWS(S), .FW(4), .TSET(1'b1)) dut (
      .clk, .rst_n, .flush(1'b0), .enq_n, .enq, .enq_room, .fetch_stopped,
      .mt_free(5'd16), .grp_n, .grp, .fire, .mix, .rearranged, .q_count);

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
      done[k] = (out_idx.size() == prog.size()) && (q_count == 0);
    end

    always @(posedge clk) begin
      if (!rst_n) begin
        fed <= 0;
        ngroups <= 0;
        out_idx.delete(); out_grp.delete(); out_t.delete();
      end else begin
        fed <= fed + int'(enq_n);
        for (int j = 0; j < int'(grp_n); j++) begin
          out_idx.push_back(int'(grp[j].addr) / 4);
          out_grp.push_back(ngroups);
          out_t.push_back(grp[j].tnum);
        end
        if (grp_n != 0) ngroups <= ngroups + 1;
      end
    end

    // check the finished run; gives the number of groups
    task automatic evaluate(string tag, output int groups);
      int pos [$], seen [$];
      for (int i = 0; i < prog.size(); i++) begin pos.push_back(-1); seen.push_back(0); end
      for (int m = 0; m < out_idx.size(); m++) begin
        pos[out_idx[m]] = m;
        seen[out_idx[m]]++;
      end
      for (int i = 0; i < seen.size(); i++)
        if (seen[i] != 1) check(0, $sformatf("%s SWS=%0d: instruction %0d emitted %0d times", tag, S, i, seen[i]));
      checks++;
      for (int m = 0; m < out_idx.size(); ) begin
        automatic int q [$] = {};
        automatic int e = m;
        while (e < out_idx.size() && out_grp[e] == out_grp[m]) begin
          q.push_back(u[out_idx[e]]);
          check(blk[out_idx[e]] == blk[out_idx[m]] &&
                u[out_idx[e]] <= cap(out_t[e]) && (u[out_idx[e]] >= 4) == (out_t[e] == T_SEQ),
                $sformatf("%s SWS=%0d: group member %0d in block, on a fitting translator", tag, S, e));
          e++;
        end
        check(m2_fits(q), $sformatf("%s SWS=%0d: group at %0d fits 2S+1C", tag, S, m));
        m = e;
      end
      for (int a = 0; a < prog.size(); a++)
        for (int c = a + 1; c < prog.size() && blk[c] == blk[a]; c++)
          if (must_order(prog[a], prog[c]) && !(pos[a] < pos[c]))
            check(0, $sformatf("%s SWS=%0d: dependence %0d -> %0d broken", tag, S, a, c));
      checks++;
      groups = ngroups;
    endtask
  end

  // ------------------------------------------------------------ workload stream
  // registers and memory words written inside the current basic block
  int wr_regs [$];
  int wr_mems [$];
  int dep_count, dep_cand;

  function automatic logic [3:0] ro_reg();
    logic [3:0] t[3] = '{R_BP, R_SI, R_DI};
    return t[$urandom_range(2)];
  endfunction

  function automatic logic [3:0] wreg();   // AX..DX
    return 4'($urandom_range(3));
  endfunction

  function automatic cisc_code_t gen(int p1, int p2, int p3, int dep);
    int  r = $urandom_range(99);
    bit  d = ($urandom_range(99) < dep);
    logic [3:0] ro_mem = 4'($urandom_range(8, 15));
    cisc_op_e alu[5] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR};
    cisc_op_e a = alu[$urandom_range(4)];
    cisc_code_t c;
    if (r >= p1 + p2 + p3) begin
      // four or more: no explicit register dependence
      c = ($urandom_range(1) == 0) ? enc(OP_LODSB, K_NONE, 4'd0, K_MEM, ro_mem)
                                   : enc(OP_PUSHA, K_NONE, 4'd0, K_NONE, 4'd0);
      return c;
    end
    dep_cand++;
    if (r < p1) begin
      if (d && wr_regs.size() != 0) begin
        dep_count++;
        c = enc(OP_MOV, K_REG, wreg(), K_REG, 4'(wr_regs[$urandom_range(wr_regs.size() - 1)]));
      end else
        c = enc(OP_MOV, K_REG, wreg(), K_REG, ro_reg());
      wr_regs.push_back(int'(c.did));
    end else if (r < p1 + p2) begin
      if (d && wr_regs.size() != 0) begin
        dep_count++;
        c = enc(a, K_REG, 4'(wr_regs[$urandom_range(wr_regs.size() - 1)]), K_MEM, ro_mem);
        wr_regs.push_back(int'(c.did));
      end else
        c = ($urandom_range(1) == 0) ? enc(OP_PUSH, K_NONE, 4'd0, K_REG, ro_reg())
                                     : enc(OP_CMP, K_REG, ro_reg(), K_MEM, ro_mem);
    end else begin
      if (d && wr_mems.size() != 0) begin
        dep_count++;
        c = enc(OP_PUSH, K_NONE, 4'd0, K_MEM, 4'(wr_mems[$urandom_range(wr_mems.size() - 1)]));
      end else if (d && wr_regs.size() != 0) begin
        dep_count++;
        c = enc(a, K_MEM, 4'($urandom_range(7)), K_REG, 4'(wr_regs[$urandom_range(wr_regs.size() - 1)]));
        wr_mems.push_back(int'(c.did));
      end else if ($urandom_range(1) == 0 && wr_mems.size() < 8) begin
        // a memory word not yet touched in this block
        int m;
        do m = $urandom_range(7); while (m inside {wr_mems});
        c = enc(a, K_MEM, 4'(m), K_REG, ro_reg());
        wr_mems.push_back(m);
      end else
        c = enc(OP_PUSH, K_NONE, 4'd0, K_MEM, ro_mem);
    end
    return c;
  endfunction

  task automatic build(int p1, int p2, int p3, int dep);
    int left = 0, b = 0;
    prog.delete(); blk.delete(); u.delete(); br.delete();
    wr_regs.delete(); wr_mems.delete();
    dep_count = 0; dep_cand = 0;
    for (int i = 0; i < NINSTR; i++) begin
      if (left == 0) left = $urandom_range(5, 15);
      left--;
      if (left == 0 || i == NINSTR - 1) prog.push_back(enc(OP_JCC, K_NONE, 4'd5, K_NONE, 4'd0, 14'd8));
      else prog.push_back(gen(p1, p2, p3, dep));
      blk.push_back(b);
      u.push_back(int'(predecode(prog[i]).ucnt));
      br.push_back(prog[i].opc == OP_JCC);
      if (prog[i].opc == OP_JCC) begin
        b++;
        wr_regs.delete(); wr_mems.delete();
      end
    end
  endtask

  initial begin
    int mixes [4][5] = '{'{25, 25, 25, 15, 10}, '{35, 35, 20, 5, 5}, '{45, 40, 5, 5, 5}, '{55, 15, 15, 10, 5}};
    int deps  [5]    = '{0, 20, 40, 60, 80};
    int ng [NW];
    // published rates [window 1/3/6][DEP 0..80][mix]
    real pub [3][5][4] = '{
      '{'{1.349, 1.564, 1.822, 2.110}, '{1.337, 1.553, 1.820, 2.088}, '{1.336, 1.539, 1.814, 2.057},
        '{1.336, 1.535, 1.801, 2.031}, '{1.328, 1.527, 1.804, 2.030}},
      '{'{1.348, 1.560, 1.840, 2.150}, '{1.354, 1.570, 1.845, 2.145}, '{1.349, 1.566, 1.826, 2.113},
        '{1.347, 1.547, 1.834, 2.088}, '{1.341, 1.552, 1.817, 2.067}},
      '{'{1.355, 1.571, 1.841, 2.157}, '{1.354, 1.570, 1.853, 2.145}, '{1.348, 1.572, 1.844, 2.144},
        '{1.353, 1.570, 1.858, 2.132}, '{1.346, 1.564, 1.833, 2.092}}};
    real worst = 0.0;
    $display("mix(1,2,3,4,5+)    DEP  measured  SWS=1  SWS=3  SWS=6   (instructions per group)");
    for (int mi = 0; mi < 4; mi++) begin
      for (int di = 0; di < 5; di++) begin
        string tag;
        tag = $sformatf("(%0d,%0d,%0d,%0d,%0d) DEP=%0d", mixes[mi][0], mixes[mi][1], mixes[mi][2],
                        mixes[mi][3], mixes[mi][4], deps[di]);
        build(mixes[mi][0], mixes[mi][1], mixes[mi][2], deps[di]);
        rst_n = 1'b0;
        repeat (2) @(posedge clk);
        rst_n = 1'b1;
        while (done != '1) @(posedge clk);
        g[0].evaluate(tag, ng[0]);
        g[1].evaluate(tag, ng[1]);
        g[2].evaluate(tag, ng[2]);
        for (int k = 0; k < NW; k++) begin
          real r, e;
          r = real'(NINSTR) / ng[k];
          e = (r - pub[k][di][mi]) / pub[k][di][mi];
          if (e < 0) e = -e;
          if (e > worst) worst = e;
          check(e <= TOL, $sformatf("%s window %0d: %.3f per group, published %.3f", tag, k, r, pub[k][di][mi]));
        end
        $display("(%2d,%2d,%2d,%2d,%2d)  %3d%%  %6.1f%%   %6.3f %6.3f %6.3f",
                 mixes[mi][0], mixes[mi][1], mixes[mi][2], mixes[mi][3], mixes[mi][4], deps[di],
                 dep_cand == 0 ? 0.0 : 100.0 * dep_count / dep_cand,
                 real'(NINSTR) / ng[0], real'(NINSTR) / ng[1], real'(NINSTR) / ng[2]);
      end
    end
    $display("largest distance from the published rates: %.1f%%", 100.0 * worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
