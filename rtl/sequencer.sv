// sequencer: translates instructions that need four or more microinstructions.
//
// Such an instruction is dispatched alone (mix type 4), so all six decoder output
// lanes are free while the sequencer works; it issues up to NLANES = 6
// microinstructions per cycle, in order, over ceil(ucnt/6) cycles. While more remain
// after the current cycle, busy is high and the dispatch unit holds back the next
// group. The entry's rename tag goes to the microinstruction that writes the
// instruction's destination register, as in the translators.
//
// That such instructions go to a sequencer follows the design description; the
// six-lane issue and the templates in cr_pkg::crack are this design's choices.
// Timing: start is accepted when adv is high and the sequencer is idle; the first
// lanes appear one cycle later, like a translator's. adv low holds everything.
module sequencer
  import cr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    adv,
  input  logic    start,
  input  mentry_t in_e,
  output uop_t    lane [NLANES],
  output logic    busy
);
  mentry_t    cur;
  logic [3:0] pos;     // index of the next microinstruction to issue

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= '0;
      pos  <= '0;
      busy <= 1'b0;
      for (int k = 0; k < int'(NLANES); k++) lane[k] <= '0;
    end else if (flush) begin
      busy <= 1'b0;
      for (int k = 0; k < int'(NLANES); k++) lane[k] <= '0;
    end else if (adv) begin
      automatic mentry_t e    = busy ? cur : in_e;
      automatic logic    act  = busy || start;
      automatic int      base = busy ? int'(pos) : 0;
      for (int k = 0; k < int'(NLANES); k++) begin
        automatic uop_t u = crack(e.code, 4'(base + k));
        u.valid = act && (base + k < int'(e.pd.ucnt));
        u.last  = (base + k + 1 == int'(e.pd.ucnt));
        u.slot  = 2'd0;
        u.addr  = e.addr;
        u.rn    = e.rn && (u.dst == e.code.did);
        lane[k] <= u;
      end
      if (act) begin
        cur  <= e;
        pos  <= 4'(base + int'(NLANES));
        busy <= (base + int'(NLANES) < int'(e.pd.ucnt));
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !flush && adv && start)
      assert (!busy) else $error("sequencer: started while busy");

endmodule
