// translator: turns one CISC instruction into up to MAXU microinstructions per cycle.
//
// Three instances form the decoder: the simple translator (MAXU = 1), the general
// translator (MAXU = 2) and the complex translator (MAXU = 3). Each has MAXU output
// lanes; lane k carries the k-th microinstruction of the instruction when k is below
// the instruction's microinstruction count (from the predecode bits), and the lane of
// the last one is flagged. An instruction that needs more microinstructions than
// MAXU must never reach it: this is checked by an assertion and reported on err.
// The entry's rename tag is passed on to the microinstruction that writes the
// instruction's destination register.
//
// The capability of each translator follows the design description; the
// microinstruction templates (cr_pkg::crack) are this design's own. Timing: one
// register stage; when adv is high the lanes load the translation of the input
// (or go empty when in_valid is low), otherwise they hold.
module translator
  import cr_pkg::*;
#(
  parameter int unsigned MAXU = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       adv,
  input  logic       in_valid,
  input  mentry_t    in_e,
  input  logic [1:0] in_slot,
  output uop_t       lane [MAXU],
  output logic       err
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(MAXU); k++) lane[k] <= '0;
      err <= 1'b0;
    end else if (flush) begin
      for (int k = 0; k < int'(MAXU); k++) lane[k] <= '0;
      err <= 1'b0;
    end else if (adv) begin
      err <= in_valid && (int'(in_e.pd.ucnt) > int'(MAXU));
      for (int k = 0; k < int'(MAXU); k++) begin
        automatic uop_t u = crack(in_e.code, 4'(k));
        u.valid = in_valid && (k < int'(in_e.pd.ucnt));
        u.last  = (k + 1 == int'(in_e.pd.ucnt));
        u.slot  = in_slot;
        u.addr  = in_e.addr;
        u.rn    = in_e.rn && (u.dst == in_e.code.did);
        lane[k] <= u;
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !flush && adv && in_valid)
      assert (int'(in_e.pd.ucnt) <= int'(MAXU) && in_e.pd.ucnt != 0)
        else $error("translator(%0d): instruction needs %0d microinstructions", MAXU, in_e.pd.ucnt);

endmodule
