// decoder: the three translators (1 simple, 1 general, 1 complex) and the six
// microinstruction lanes to the execution unit.
//
// Lane 0 is the simple translator's, lanes 1-2 the general translator's and lanes
// 3-5 the complex translator's. When the sequencer issues (an instruction of four or
// more microinstructions, alone in its cycle) its six lanes replace the translators'.
// Each microinstruction carries the address of its CISC instruction, its index in
// that instruction's sequence and the instruction's position in its dispatch group,
// so the execution unit can put the lanes back in program order.
//
// The decoder also hands the group it is translating to the translation table, in
// group order and in the same cycle as its microinstructions appear (tt_n, tt_e).
//
// Translator types and lane counts follow the design description; the lane-sharing
// with the sequencer is this design's choice. Timing: one register stage inside the
// translators; adv (execution unit ready) high advances it, low holds the lanes.
module decoder
  import cr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       adv,
  input  logic       tr_valid [3],
  input  mentry_t    tr_e     [3],
  input  logic [1:0] tr_slot  [3],
  input  logic [1:0] grp_n,
  input  mentry_t    grp [AW],
  input  uop_t       seq_lane [NLANES],
  output uop_t       lane [NLANES],
  output logic [1:0] tt_n,
  output mentry_t    tt_e [AW],
  output logic       err
);
  uop_t s_lane [1];
  uop_t g_lane [2];
  uop_t c_lane [3];
  logic s_err, g_err, c_err;

  translator #(.MAXU(1)) u_s (.clk, .rst_n, .flush, .adv, .in_valid(tr_valid[T_S]),
    .in_e(tr_e[T_S]), .in_slot(tr_slot[T_S]), .lane(s_lane), .err(s_err));
  translator #(.MAXU(2)) u_g (.clk, .rst_n, .flush, .adv, .in_valid(tr_valid[T_G]),
    .in_e(tr_e[T_G]), .in_slot(tr_slot[T_G]), .lane(g_lane), .err(g_err));
  translator #(.MAXU(3)) u_c (.clk, .rst_n, .flush, .adv, .in_valid(tr_valid[T_C]),
    .in_e(tr_e[T_C]), .in_slot(tr_slot[T_C]), .lane(c_lane), .err(c_err));

  assign err = s_err | g_err | c_err;

  always_comb begin
    if (seq_lane[0].valid) begin
      for (int k = 0; k < int'(NLANES); k++) lane[k] = seq_lane[k];
    end else begin
      lane[0] = s_lane[0];
      lane[1] = g_lane[0];
      lane[2] = g_lane[1];
      lane[3] = c_lane[0];
      lane[4] = c_lane[1];
      lane[5] = c_lane[2];
    end
  end

  // group record for the translation table, aligned with the lanes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tt_n <= '0;
      for (int j = 0; j < int'(AW); j++) tt_e[j] <= '0;
    end else if (flush) begin
      tt_n <= '0;
    end else if (adv) begin
      tt_n <= grp_n;
      for (int j = 0; j < int'(AW); j++) tt_e[j] <= grp[j];
    end else begin
      tt_n <= '0;   // recorded once, in the cycle the group entered
    end
  end

endmodule
