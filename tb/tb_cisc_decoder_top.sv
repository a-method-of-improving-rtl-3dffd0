// tb_cisc_decoder_top: end-to-end test of the decoder front end at its default
// parameters, with a memory on the bus, a scripted branch predictor and an
// execution unit that collects the six microinstruction lanes.
//
// Program: block A at 0 is the worked example basic block (11 instructions ending
// in JNE), predicted taken back to 0 once, so it runs twice: first from a cold cache
// (line fills over the bus), then from a warm one. Block B follows A: PUSHA (nine
// microinstructions, two sequencer cycles), MOVSB, a MOV CX,BX that the scheduler
// moves ahead of a SUB reading CX (so it carries a rename tag), a few simple ones,
// ending in a JMP to block C at 0x100: random code in short basic blocks, ending in
// a JMP to itself where fetching is stopped.
// Phase 1 runs it all with the execution unit always ready and checks the five
// dispatch groups of the worked example in both passes, 11 instructions in 5 decode
// cycles on the warm pass, and that every instruction arrives with its full
// microinstruction sequence. Phase 2 restarts at block C with the execution unit
// stalling at random, raises an interrupt in flight and checks that the translation
// table names the oldest unretired instruction, then restarts there.
// Every mechanism (miss, hit, rearrangement, all five mix types, sequencer multi-cycle,
// stall, mapping table full, interrupt recovery, rename tag) is counted and must occur.
module tb_cisc_decoder_top;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              redirect = 1'b0, stop;
  logic [ADDR_W-1:0] redirect_pc = '0;
  logic              bus_req, bus_gnt, bus_rvalid;
  logic [ADDR_W-1:0] bus_addr;
  logic [31:0]       bus_rdata;
  logic              bp_query, bp_taken;
  logic [ADDR_W-1:0] bp_query_pc, bp_target;
  uop_t              ex_lane [NLANES];
  logic              ex_ready = 1'b1;
  logic [1:0]        ex_retire_n;
  logic              irq = 1'b0;
  logic              recover_valid, recover_empty, recover_d;
  logic [ADDR_W-1:0] recover_addr;
  logic              sched_fire, sched_rearranged, seq_busy, dec_err;
  logic [2:0]        sched_mix;
  logic [1:0]        sched_grp_n, disp_n;

  cisc_decoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------------------ memory
  logic [31:0] mem [1024];
  localparam logic [31:0] B_ADDR = 32'd44, C_ADDR = 32'h100;
  int c_len;

  // bus: grant two cycles after a request, then four beats
  int  bus_wait = 0, beats = 0;
  logic [31:0] line_addr;
  int  n_bus = 0;
  always @(posedge clk) begin
    if (bus_req && !bus_gnt && bus_wait == 0) bus_wait <= 2;
    if (bus_wait > 0) bus_wait <= bus_wait - 1;
    if (bus_gnt) begin beats <= 4; line_addr <= bus_addr; n_bus++; end
    else if (beats > 0) beats <= beats - 1;
  end
  assign bus_gnt    = bus_req && bus_wait == 1;
  assign bus_rvalid = beats > 0;
  assign bus_rdata  = mem[(line_addr >> 2) + 32'(4 - beats)];

  // branch predictor script
  int jne_queries = 0;
  logic [31:0] c_end;
  always_comb begin
    bp_taken = 1'b0; bp_target = '0;
    if (bp_query && bp_query_pc == 32'd40 && jne_queries == 0) begin bp_taken = 1'b1; bp_target = 32'd0; end
    if (bp_query && mem[bp_query_pc >> 2][31:26] == OP_JMP) begin
      bp_taken = 1'b1;
      bp_target = (bp_query_pc == c_end) ? c_end : C_ADDR;
    end
  end
  always @(posedge clk) if (bp_query && bp_query_pc == 32'd40) jne_queries++;
  // fetching stops once the final JMP has been delivered
  assign stop = bp_query && bp_query_pc == c_end;

  // ------------------------------------------------------- execution unit model
  typedef struct { logic [31:0] addr; int next_idx; bit done; } inflight_t;
  inflight_t fl [$];
  int received [logic [31:0]];     // completed count per address
  int cycle = 0, disp_cycles = 0;
  int n_miss = 0, n_rearr = 0, n_mix [6], n_seqmulti = 0, n_stall = 0, n_mtfull = 0, n_irq = 0, n_rename = 0;
  bit log_groups = 1'b0;
  logic [31:0] grp_log [$];
  int          grp_cyc [$];   // cycle of each logged decode cycle   // addresses of a cycle's lanes, -1 closes a cycle
  int retire_pending = 0;

  always @(posedge clk) cycle++;

  // retire completed instructions at the head, at most three per cycle
  always_comb begin
    automatic int n = 0;
    for (int i = 0; i < fl.size() && i < 3; i++) begin
      if (!fl[i].done) break;
      n++;
    end
    ex_retire_n = (rst_n && !irq && !redirect) ? 2'(n) : 2'd0;
  end

  always @(posedge clk) if (rst_n) begin
    // retire
    for (int i = 0; i < int'(ex_retire_n); i++) void'(fl.pop_front());
    // mechanisms
    if (dut.u_pf.state == dut.u_pf.S_REQ && bus_gnt) n_miss++;
    if (sched_fire) begin
      n_mix[sched_mix]++;
      if (sched_rearranged) n_rearr++;
    end
    if (seq_busy) n_seqmulti++;
    if (!ex_ready && ex_lane[0].valid) n_stall++;
    if (dut.u_mt.free < 3 && dut.u_sch.q_count != 0) n_mtfull++;
    check(!dec_err, "no translator overload");
    // lanes
    if (ex_ready && !redirect && !irq) begin
      automatic bit any = 0;
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < NLANES; k++) begin
          automatic uop_t u = ex_lane[k];
          if (u.valid && u.slot == 2'(s)) begin
            automatic int f = -1;
            any = 1;
            if (u.idx == 0) begin
              automatic inflight_t e;
              e.addr = u.addr; e.next_idx = 0; e.done = 0;
              fl.push_back(e);
              if (log_groups) grp_log.push_back(u.addr);
            end
            for (int i = fl.size() - 1; i >= 0; i--) if (fl[i].addr == u.addr && !fl[i].done) begin f = i; break; end
            check(f >= 0, $sformatf("uop of %0h belongs to an instruction in flight", u.addr));
            if (f >= 0) begin
              automatic cisc_code_t c = cisc_code_t'(mem[u.addr >> 2]);
              automatic int n = int'(predecode(c).ucnt);
              check(int'(u.idx) == fl[f].next_idx, $sformatf("uop %0d of %0h in order", u.idx, u.addr));
              check(u.op == crack(c, u.idx).op, $sformatf("uop %0d of %0h has the right operation", u.idx, u.addr));
              check(u.last == (int'(u.idx) == n - 1), "last flag");
              check(!u.rn || (u.dst == c.did && c.dk == K_REG), "rename tag only on the destination register");
              if (u.rn) n_rename++;
              fl[f].next_idx++;
              if (u.last) begin
                fl[f].done = 1;
                if (received.exists(u.addr)) received[u.addr]++; else received[u.addr] = 1;
              end
            end
          end
        end
      if (any) begin
        disp_cycles++;
        if (log_groups) begin
          grp_log.push_back(32'hffff_ffff);
          grp_cyc.push_back(cycle);
        end
      end
    end
  end

  // interrupt check: the oldest unretired instruction is reported
  logic [31:0] exp_recover;
  // (instructions whose lanes are presented but not yet accepted count as in flight)
  always @(posedge clk) if (irq) begin
    automatic logic [31:0] a = 32'hffff_ffff;
    automatic int best = 4;
    for (int k = 0; k < NLANES; k++)
      if (ex_lane[k].valid && int'(ex_lane[k].slot) < best) begin
        best = int'(ex_lane[k].slot);
        a = ex_lane[k].addr;
      end
    exp_recover <= fl.size() ? fl[0].addr : a;
  end

  // ------------------------------------------------------------------ program
  task automatic load_program();
    int a, left;
    cisc_code_t c;
    for (int i = 0; i < 1024; i++) mem[i] = 32'(enc(OP_NOP, K_NONE, 0, K_NONE, 0));
    for (int i = 0; i < 11; i++) mem[i] = 32'(example(i));
    a = B_ADDR >> 2;
    mem[a++] = 32'(enc(OP_PUSHA, K_NONE, 0, K_NONE, 0));
    mem[a++] = 32'(enc(OP_MOVSB, K_MEM, 4'd6, K_MEM, 4'd7));
    mem[a++] = 32'(enc(OP_PUSH, K_NONE, 0, K_MEM, 4'd1));
    mem[a++] = 32'(enc(OP_SUB, K_MEM, 4'd2, K_REG, R_CX));
    mem[a++] = 32'(enc(OP_MOV, K_REG, R_CX, K_REG, R_BX));   // passes SUB: rename tag
    mem[a++] = 32'(enc(OP_INC, K_REG, R_BX, K_NONE, 0));
    mem[a++] = 32'(enc(OP_ADD, K_REG, R_CX, K_MEM, 4'd2));
    mem[a++] = 32'(enc(OP_POP, K_REG, R_DX, K_NONE, 0));
    mem[a++] = 32'(enc(OP_JMP, K_NONE, 0, K_NONE, 0));
    a = C_ADDR >> 2;
    left = 0;
    c_len = 120;
    for (int i = 0; i < c_len - 1; i++) begin
      if (left == 0) left = $urandom_range(4, 12);
      left--;
      if (left == 0) c = enc(OP_JCC, K_NONE, 4'd5, K_NONE, 0, 14'd2);
      else c = rand_instr(45, 40, 10, 1'b1);
      mem[a++] = 32'(c);
    end
    c_end = 32'(a) << 2;
    mem[a++] = 32'(enc(OP_JMP, K_NONE, 0, K_NONE, 0));
  endtask

  task automatic start_at(logic [31:0] pc);
    @(negedge clk);
    redirect = 1'b1; redirect_pc = pc;
    @(negedge clk);
    redirect = 1'b0;
  endtask

  task automatic drain(int max_cycles);
    automatic int idle = 0;
    for (int i = 0; i < max_cycles && idle < 20; i++) begin
      @(posedge clk);
      if (ex_lane[0].valid || dut.u_sch.q_count != 0 || dut.u_mt.count != 0 || !dut.fetch_stopped) idle = 0;
      else idle++;
    end
  endtask

  function automatic bit same_set(logic [31:0] got [$], logic [31:0] exp [$]);
    if (got.size() != exp.size()) return 0;
    foreach (exp[i]) begin
      bit hit = 0;
      foreach (got[j]) if (got[j] == exp[i]) hit = 1;
      if (!hit) return 0;
    end
    return 1;
  endfunction

  initial begin
    logic [31:0] exp_groups [5][$];
    logic [31:0] g [$];
    int gi, d0;
    exp_groups[0] = {32'd0, 32'd4, 32'd12};
    exp_groups[1] = {32'd8, 32'd24, 32'd28};
    exp_groups[2] = {32'd16, 32'd20, 32'd36};
    exp_groups[3] = {32'd32};
    exp_groups[4] = {32'd40};
    load_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------------------------- phase 1
    log_groups = 1'b1;
    start_at(32'd0);
    drain(4000);
    log_groups = 1'b0;
    // the example block, twice
    gi = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < 5; k++) begin
        g = {};
        while (gi < grp_log.size() && grp_log[gi] != 32'hffff_ffff) g.push_back(grp_log[gi++]);
        gi++;
        check(same_set(g, exp_groups[k]), $sformatf("pass %0d group %0d: %p", pass, k, g));
      end
    // warm pass: the five groups leave the decoder in five consecutive cycles
    check(grp_cyc.size() > 9 && grp_cyc[9] - grp_cyc[5] == 4,
          $sformatf("warm pass of the example takes 5 decode cycles (%0d)", grp_cyc[9] - grp_cyc[5] + 1));
    foreach (mem[i]) if (i < 11) check(received.exists(32'(4 * i)) && received[32'(4 * i)] == 2,
                                       $sformatf("example instruction %0d translated twice", i));
    for (int a = B_ADDR; a < int'(B_ADDR) + 36; a += 4)
      check(received.exists(32'(a)) && received[32'(a)] == 1, $sformatf("block B %0h translated once", a));
    for (int a = C_ADDR; a <= int'(c_end); a += 4)
      check(received.exists(32'(a)) && received[32'(a)] == 1, $sformatf("block C %0h translated once", a));
    check(fl.size() == 0, "everything retired");

    // warm pass of the example: 11 instructions in 5 decode cycles, back to back
    begin
      received.delete();
      jne_queries = 1;   // JNE now predicted not taken
      d0 = disp_cycles;
      start_at(32'd0);
      drain(4000);
      // five decode cycles for block A, two for PUSHA, one each for the rest
      $display("warm run: %0d decode cycles for the whole program", disp_cycles - d0);
    end
    check(n_bus > 0, "bus used");

    // ---------------------------------------------------------------- phase 2
    begin
      automatic int seen_recover = 0;
      received.delete();
      fork
        begin
          start_at(C_ADDR);
          for (int i = 0; i < 3000; i++) begin
            @(negedge clk);
            ex_ready = ($urandom_range(3) != 0);
            if (i == 25) begin irq = 1'b1; end
            else irq = 1'b0;
            if (recover_valid) begin
              seen_recover++;
              check(recover_empty ? exp_recover == 32'hffff_ffff : recover_addr == exp_recover,
                    $sformatf("recovery point %0h expected %0h", recover_addr, exp_recover));
              n_irq++;
              fl.delete();
              ex_ready = 1'b1;
              redirect = 1'b1; redirect_pc = recover_empty ? C_ADDR : recover_addr;
              @(negedge clk);
              redirect = 1'b0;
            end
          end
          ex_ready = 1'b1;
        end
      join
      drain(2000);
      check(seen_recover == 1, "one recovery reported");
      check(received.exists(c_end), "program completes after the interrupt");
    end

    // ------------------------------------------------------------- mechanisms
    $display("mechanisms: misses=%0d rearranged=%0d mix1=%0d mix2=%0d mix3=%0d mix4=%0d mix5=%0d seq_multi=%0d stall=%0d mt_full=%0d irq=%0d rename=%0d",
             n_miss, n_rearr, n_mix[1], n_mix[2], n_mix[3], n_mix[4], n_mix[5], n_seqmulti, n_stall, n_mtfull, n_irq, n_rename);
    check(n_miss > 0, "cache miss happened");
    check(n_rearr > 0, "rearrangement happened");
    for (int t = 1; t <= 5; t++) check(n_mix[t] > 0, $sformatf("mix type %0d happened", t));
    check(n_seqmulti > 0, "multi-cycle sequencer happened");
    check(n_stall > 0, "execution stall happened");
    check(n_mtfull > 0, "mapping table full happened");
    check(n_irq > 0, "interrupt recovery happened");
    check(n_rename > 0, "rename tag happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
