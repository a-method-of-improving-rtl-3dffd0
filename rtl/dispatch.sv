// dispatch: sends one dispatch group per cycle from the mapping table to the
// translators or to the sequencer.
//
// A group starts at the oldest mapping-table entry (D = 1) and extends over the
// following entries whose D bit is 0, up to three. When the decoder can accept work
// (dec_ready: execution unit ready, translation table has room, sequencer idle) the
// whole group is popped. A member whose translator number is S, G or C is routed to
// that translator; an instruction needing four or more microinstructions (translator
// number SEQ) is always a group of its own and goes to the sequencer. The group is
// also passed on in order (grp/grp_n) so the decoder can record it in the translation
// table and tag each microinstruction with its position in the group.
//
// The routing rule follows the design description; the ready handshake is this
// design's choice. Timing: purely combinational, the pop takes effect at the clock
// edge and the translators register their outputs at the same edge.
module dispatch
  import cr_pkg::*;
(
  input  mentry_t    mt_e [AW],
  input  logic [4:0] mt_count,
  input  logic       dec_ready,
  output logic [1:0] pop_n,
  // per translator: valid, entry and position in the group
  output logic       tr_valid [3],   // index: T_S, T_G, T_C
  output mentry_t    tr_e     [3],
  output logic [1:0] tr_slot  [3],
  output logic       seq_valid,
  output mentry_t    seq_e,
  output logic [1:0] grp_n,
  output mentry_t    grp [AW]
);
  logic [1:0] glen;

  always_comb begin
    glen = 2'd0;
    if (mt_count != 0) begin
      glen = 2'd1;
      if (mt_e[0].tnum != T_SEQ && mt_count > 1 && !mt_e[1].d) begin
        glen = 2'd2;
        if (mt_count > 2 && !mt_e[2].d) glen = 2'd3;
      end
    end
  end

  always_comb begin
    pop_n     = dec_ready ? glen : 2'd0;
    grp_n     = pop_n;
    seq_valid = 1'b0;
    seq_e     = mt_e[0];
    for (int t = 0; t < 3; t++) begin
      tr_valid[t] = 1'b0;
      tr_e[t]     = '0;
      tr_slot[t]  = '0;
    end
    for (int j = 0; j < int'(AW); j++) begin
      grp[j] = mt_e[j];
      if (j < int'(pop_n)) begin
        if (mt_e[j].tnum == T_SEQ) seq_valid = 1'b1;
        else begin
          tr_valid[mt_e[j].tnum] = 1'b1;
          tr_e[mt_e[j].tnum]     = mt_e[j];
          tr_slot[mt_e[j].tnum]  = 2'(j);
        end
      end
    end
  end

endmodule
