// scheduler: instruction queue, instruction-mix classification and rearrangement.
//
// The queue holds AW + SWS predecoded instructions in program order (after earlier
// rearrangements). Its first AW = 3 entries are the arrangement window, the next SWS
// the search window. In a scheduling cycle the scheduler picks a dispatch group of at
// most three instructions that the 1S+1G+1C translators can take in one cycle, writes
// it to the mapping table (D bit on the first member, a translator number on each)
// and removes it from the queue; the rest close up in order and new instructions from
// the instruction cache are appended behind them.
//
// Group selection scans the queue from the head, inside the current basic block, and
// takes an instruction when (a) the group still fits the translators (at most one
// needing three microinstructions, at most two needing two or more, an instruction of
// four or more only alone and only from the head) and (b) moving it ahead of the
// instructions it passes keeps the program correct:
//   - it reads no register or memory location that a passed instruction writes
//     (true dependence; register anti/output dependences are left to renaming),
//   - it writes no memory location that a passed instruction reads or writes
//     (memory is not renamed),
//   - it reads no flags a passed instruction sets, and it sets no flags while a
//     passed instruction still reads them (set/check pairs stay coupled),
//   - a branch is never passed and is itself taken only in program order.
// An instruction taken past a passed instruction that reads or writes the register
// it writes (anti or output dependence) gets the rename tag rn in its entry: its
// destination must receive a new register tag. The tag is all this stage does for
// renaming; assigning physical registers is left to the stage behind the decoder.
// When the window already is of mix type 3, 4 or 5 this scan returns exactly the
// window's dispatchable prefix; for types 1 and 2 it pulls instructions from later in
// the window or the search window, which is the exchange the design describes.
//
// With SCHED = 0 the scan stops at the first instruction it cannot take, so groups
// are the in-order prefixes of the window: the decoder without a scheduler that the
// evaluation uses as its baseline. That baseline needs no mapping table; here the
// groups still pass through it, which changes no group (own choice).
//
// With TSET = 1 the translator set is two simple and one complex translator, the
// other comparison machine of the evaluation: the general translator's slot (T_G)
// is used as the second simple one and takes only one-microinstruction
// instructions, so a group holds at most one instruction needing two or more. The
// mix-type output keeps the 1S+1G+1C classification.
//
// A scheduling cycle happens when the queue is full, when it holds the end of a basic
// block (a branch), or when fetching has stopped, and when the mapping table has room
// for three entries. The design's description of the exchange steps is followed; the
// trigger rule, the queue compaction and the single in-order scan are this design's
// own choices.
//
// Interface: enq_n instructions (enq_n <= enq_room) enter per cycle; enq_room counts
// the slots free after this cycle's removal. Group out: grp_n, grp[] (combinational,
// written by the mapping table at the same clock edge). Stats: mix_type of the window
// before rearrangement and whether the group differs from the window's prefix.
module scheduler
  import cr_pkg::*;
#(
  parameter int unsigned SWS = 6,   // search window size
  parameter int unsigned FW  = 4,   // instructions accepted per cycle
  parameter bit          SCHED = 1'b1, // 0: no rearranging, groups in program order
  parameter bit          TSET  = 1'b0  // translators: 0 = 1S+1G+1C, 1 = 2S+1C
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // from the instruction cache
  input  logic [2:0]        enq_n,
  input  qentry_t           enq [FW],
  output logic [3:0]        enq_room,
  input  logic              fetch_stopped,
  // to the mapping table
  input  logic [4:0]        mt_free,
  output logic [1:0]        grp_n,
  output mentry_t           grp [AW],
  // statistics
  output logic              fire,
  output logic [2:0]        mix,
  output logic              rearranged,
  output logic [3:0]        q_count
);
  localparam int unsigned QD = AW + SWS;

  qentry_t          q [QD];
  logic [3:0]       cnt;
  logic [QD-1:0]    sel;
  logic [QD-1:0]    rnq;              // selected and needs a rename tag
  logic             go;
  logic             has_branch;

  assign q_count = cnt;

  always_comb begin
    has_branch = 1'b0;
    for (int i = 0; i < QD; i++)
      if (i < int'(cnt) && q[i].pd.is_branch) has_branch = 1'b1;
  end

  assign go = (cnt != 0) && (mt_free >= 5'(AW)) &&
              (int'(cnt) == QD || has_branch || fetch_stopped);

  // ---------------------------------------------------------------- selection
  always_comb begin
    logic [NRES-1:0] unsel_wr, unsel_rd_mem, unsel_wr_mem, rd, wr;
    logic            unsel_sets, unsel_reads, unsel_any, past_branch, ready, fits, take;
    int              n, n2, n3;
    logic [3:0]      u;
    logic            first4;
    sel = '0;
    rnq = '0;
    unsel_wr = '0; unsel_rd_mem = '0; unsel_wr_mem = '0;
    unsel_sets = 1'b0; unsel_reads = 1'b0; unsel_any = 1'b0; past_branch = 1'b0;
    n = 0; n2 = 0; n3 = 0; first4 = 1'b0;
    u = '0; rd = '0; wr = '0; ready = 1'b0; fits = 1'b0; take = 1'b0;
    for (int i = 0; i < QD; i++) begin
      if (i < int'(cnt) && !past_branch) begin
        u  = q[i].pd.ucnt;
        rd = res_reads(q[i]);
        wr = res_writes(q[i]);
        ready = ((rd & unsel_wr) == '0) &&
                ((wr[NRES-1:8] & (unsel_rd_mem[NRES-1:8] | unsel_wr_mem[NRES-1:8])) == '0) &&
                !(q[i].pd.reads_flags && unsel_sets) &&
                !(q[i].pd.sets_flags && unsel_reads) &&
                !(q[i].pd.is_branch && unsel_any);
        if (n == 0) fits = 1'b1;
        else        fits = !first4 && (u < 4) && (n < 3) &&
                           (TSET ? (n2 + int'(u >= 2) <= 1)
                                 : group_fits(n + 1, n2 + int'(u >= 2), n3 + int'(u == 3), 0));
        take = ready && fits && (SCHED || !unsel_any);
        if (take) begin
          sel[i] = 1'b1;
          // anti/output dependence on a register it passes: tag for renaming
          rnq[i] = (wr[7:0] & (unsel_rd_mem[7:0] | unsel_wr[7:0])) != '0;
          if (n == 0 && u >= 4) first4 = 1'b1;
          n  = n + 1;
          n2 = n2 + int'(u >= 2);
          n3 = n3 + int'(u == 3);
        end else begin
          unsel_wr     = unsel_wr | wr;
          unsel_rd_mem = unsel_rd_mem | rd;
          unsel_wr_mem = unsel_wr_mem | wr;
          unsel_sets   = unsel_sets | q[i].pd.sets_flags;
          unsel_reads  = unsel_reads | q[i].pd.reads_flags;
          unsel_any    = 1'b1;
        end
        if (q[i].pd.is_branch) past_branch = 1'b1;
      end
    end
  end

  // ------------------------------------------------- group, translator numbers
  always_comb begin
    int         k;
    logic [2:0] busy;
    tnum_e      t;
    k = 0; busy = '0; t = T_S;
    for (int j = 0; j < int'(AW); j++) grp[j] = '0;
    for (int i = 0; i < QD; i++) begin
      if (sel[i] && k < int'(AW)) begin
        if (!TSET)                  t = pick_translator(q[i].pd.ucnt, busy);
        else if (q[i].pd.ucnt >= 4) t = T_SEQ;
        else if (q[i].pd.ucnt >= 2) t = T_C;
        else                        t = !busy[T_S] ? T_S : !busy[T_G] ? T_G : T_C;
        if (t != T_SEQ) busy[t] = 1'b1;
        grp[k].addr = q[i].addr;
        grp[k].code = q[i].code;
        grp[k].pd   = q[i].pd;
        grp[k].tnum = t;
        grp[k].d    = (k == 0);
        grp[k].rn   = rnq[i];
        k = k + 1;
      end
    end
    grp_n = go ? 2'(k) : 2'd0;
  end

  // ------------------------------------------------------- statistics outputs
  always_comb begin
    int v;
    logic [QD-1:0] prefix;
    v = 0;
    for (int i = 0; i < int'(AW); i++)
      if (i < int'(cnt) && (i == 0 || !q[i-1].pd.is_branch) && v == i) v = i + 1;
    mix = mix_type(v, q[0].pd.ucnt, q[1].pd.ucnt, q[2].pd.ucnt);
    prefix = '0;
    unique case (mix)
      3'd3:    prefix[2:0] = 3'b111;
      3'd2:    prefix[1:0] = 2'b11;
      default: prefix[0]   = 1'b1;
    endcase
    fire       = go;
    rearranged = go && (sel != prefix);
  end

  // ------------------------------------------------------------ queue update
  always_comb begin
    int nsel;
    nsel = 0;
    for (int i = 0; i < QD; i++) if (go && sel[i]) nsel++;
    enq_room = 4'(QD - int'(cnt) + nsel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else if (flush) begin
      cnt <= '0;
    end else begin
      automatic int idx = 0;
      automatic qentry_t nq [QD];
      for (int i = 0; i < QD; i++) nq[i] = q[i];
      for (int i = 0; i < QD; i++)
        if (i < int'(cnt) && !(go && sel[i])) begin
          nq[idx] = q[i];
          idx++;
        end
      for (int j = 0; j < int'(FW); j++)
        if (j < int'(enq_n) && idx < int'(QD)) begin
          nq[idx] = enq[j];
          idx++;
        end
      for (int i = 0; i < QD; i++) q[i] <= nq[i];
      cnt <= 4'(idx);
    end
  end

  // the instruction cache never offers more than there is room for
  always_ff @(posedge clk)
    if (rst_n && !flush) assert (4'(enq_n) <= enq_room)
      else $error("scheduler: %0d instructions offered, room for %0d", enq_n, enq_room);

endmodule
