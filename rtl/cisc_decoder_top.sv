// cisc_decoder_top: decoder front end of a CISC/RISC hybrid processor.
//
// CISC instructions come from memory over the bus, are predecoded on the way into
// the instruction cache, and enter the scheduler's instruction queue. The scheduler
// rearranges them inside each basic block so that each cycle's dispatch group keeps
// the simple (S), general (G) and complex (C) translators busy, and writes the groups
// to the mapping table. The dispatch unit sends one group per cycle to the
// translators, or an instruction of four or more microinstructions alone to the
// sequencer. The six microinstruction lanes go to the execution unit, and the
// translation table records which CISC instructions are in flight.
//
//   bus -> prefetch_predecode -> icache -> scheduler -> mapping_table -> dispatch
//       -> decoder (S, G, C) / sequencer -> lanes to the execution unit
//                               \-> translation_table
//
// Blocks outside this design have their signals brought out: the bus (a line
// request/grant with data beats), branch prediction (asked about every branch the
// cache delivers, answering in the same cycle) and the execution unit (six lanes,
// ready, number of CISC instructions retired, interrupt, and a redirect that
// restarts fetching and clears the front end).
//
// The block structure follows the design description; sizes other than the
// three translators and the default search window of 6 are this design's choices.
module cisc_decoder_top
  import cr_pkg::*;
#(
  parameter int unsigned SWS      = 6,
  parameter int unsigned NLINES   = 64,
  parameter int unsigned LW       = 4,
  parameter int unsigned MT_DEPTH = 16,
  parameter int unsigned TT_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch control from the execution unit
  input  logic              redirect,
  input  logic [ADDR_W-1:0] redirect_pc,
  input  logic              stop,
  // bus
  output logic              bus_req,
  output logic [ADDR_W-1:0] bus_addr,
  input  logic              bus_gnt,
  input  logic              bus_rvalid,
  input  logic [31:0]       bus_rdata,
  // branch prediction
  output logic              bp_query,
  output logic [ADDR_W-1:0] bp_query_pc,
  input  logic              bp_taken,
  input  logic [ADDR_W-1:0] bp_target,
  // execution unit
  output uop_t              ex_lane [NLANES],
  input  logic              ex_ready,
  input  logic [1:0]        ex_retire_n,
  input  logic              irq,
  output logic              recover_valid,
  output logic              recover_empty,
  output logic [ADDR_W-1:0] recover_addr,
  output logic              recover_d,
  // observation
  output logic              sched_fire,
  output logic [2:0]        sched_mix,
  output logic              sched_rearranged,
  output logic [1:0]        sched_grp_n,
  output logic [1:0]        disp_n,
  output logic              seq_busy,
  output logic              dec_err
);
  // prefetch <-> cache
  logic              miss_req, fill_valid;
  logic [ADDR_W-1:0] miss_addr, fill_addr;
  cisc_code_t        fill_code [LW];
  predecode_t        fill_pd   [LW];
  // cache -> scheduler
  logic [2:0]        enq_n;
  qentry_t           enq [LW];
  logic [3:0]        enq_room;
  logic              fetch_stopped;
  // scheduler -> mapping table -> dispatch
  mentry_t           sgrp [AW];
  mentry_t           mt_e [AW];
  logic [4:0]        mt_count, mt_free;
  logic [1:0]        pop_n;
  logic [3:0]        q_count;
  // dispatch -> decoder / sequencer
  logic              tr_valid [3];
  mentry_t           tr_e     [3];
  logic [1:0]        tr_slot  [3];
  logic              seq_valid;
  mentry_t           seq_e;
  logic [1:0]        dgrp_n;
  mentry_t           dgrp [AW];
  uop_t              seq_lane [NLANES];
  logic              dec_ready;
  // decoder -> translation table
  logic [1:0]        tt_n;
  mentry_t           tt_e [AW];
  logic [4:0]        tt_count, tt_free;
  mentry_t           tt_oldest;
  tnum_e             recover_tnum;

  prefetch_predecode #(.LW(LW)) u_pf (
    .clk, .rst_n, .miss_req, .miss_addr,
    .bus_req, .bus_addr, .bus_gnt, .bus_rvalid, .bus_rdata,
    .fill_valid, .fill_addr, .fill_code, .fill_pd);

  icache #(.NLINES(NLINES), .LW(LW)) u_ic (
    .clk, .rst_n, .redirect, .redirect_pc, .stop,
    .q_room(enq_room), .enq_n, .enq, .fetch_stopped,
    .bp_query, .bp_query_pc, .bp_taken, .bp_target,
    .miss_req, .miss_addr, .fill_valid, .fill_addr, .fill_code, .fill_pd);

  scheduler #(.SWS(SWS), .FW(LW)) u_sch (
    .clk, .rst_n, .flush(redirect),
    .enq_n, .enq, .enq_room, .fetch_stopped,
    .mt_free, .grp_n(sched_grp_n), .grp(sgrp),
    .fire(sched_fire), .mix(sched_mix), .rearranged(sched_rearranged), .q_count);

  mapping_table #(.DEPTH(MT_DEPTH)) u_mt (
    .clk, .rst_n, .flush(redirect),
    .wr_n(sched_grp_n), .wr_e(sgrp), .pop_n, .rd_e(mt_e), .count(mt_count), .free(mt_free));

  assign dec_ready = ex_ready && !seq_busy && (int'(tt_free) >= 2 * int'(AW)) && !redirect;

  dispatch u_dp (
    .mt_e, .mt_count, .dec_ready, .pop_n,
    .tr_valid, .tr_e, .tr_slot, .seq_valid, .seq_e, .grp_n(dgrp_n), .grp(dgrp));

  assign disp_n = pop_n;

  sequencer u_seq (
    .clk, .rst_n, .flush(redirect), .adv(ex_ready), .start(seq_valid), .in_e(seq_e),
    .lane(seq_lane), .busy(seq_busy));

  decoder u_dec (
    .clk, .rst_n, .flush(redirect), .adv(ex_ready),
    .tr_valid, .tr_e, .tr_slot, .grp_n(dgrp_n), .grp(dgrp), .seq_lane,
    .lane(ex_lane), .tt_n, .tt_e, .err(dec_err));

  translation_table #(.DEPTH(TT_DEPTH)) u_tt (
    .clk, .rst_n, .flush(redirect),
    .wr_n(tt_n), .wr_e(tt_e), .retire_n(ex_retire_n), .irq,
    .count(tt_count), .free(tt_free), .oldest(tt_oldest),
    .recover_valid, .recover_empty, .recover_addr, .recover_d, .recover_tnum);

endmodule
