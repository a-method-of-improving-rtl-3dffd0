// translation_table: record of translated instructions not yet retired by the
// execution unit.
//
// Every dispatch group the decoder translates is written here in group order
// (tt_n entries of the four-field format: instruction address, instruction code,
// translator number, D bit marking the first member of a group). The execution unit
// retires the oldest instructions (retire_n per cycle, 0..3) as it completes them.
// Because the scheduler reorders instructions inside a basic block, this record -
// not the instruction addresses - tells which CISC instructions are in flight and
// in what order they were issued, which is what an interrupt needs. On irq the table
// reports the oldest unretired entry (recover_valid for one cycle with its address,
// D bit and translator number; recover_empty when nothing was in flight) and
// empties itself.
//
// The entry format and its two purposes follow the design description. The full
// recovery procedure is not reproduced here: the table only supplies the oldest
// in-flight instruction, and the restart itself belongs to the execution core.
// The depth (16) and the retire interface are this design's choices.
// Timing: writes, retires and irq act at the clock edge; free is registered state.
module translation_table
  import cr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic [1:0]        wr_n,
  input  mentry_t           wr_e [AW],
  input  logic [1:0]        retire_n,
  input  logic              irq,
  output logic [4:0]        count,
  output logic [4:0]        free,
  output mentry_t           oldest,
  output logic              recover_valid,
  output logic              recover_empty,
  output logic [ADDR_W-1:0] recover_addr,
  output logic              recover_d,
  output tnum_e             recover_tnum
);
  localparam int unsigned PW = $clog2(DEPTH);

  mentry_t       mem [DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;

  assign count  = 5'(cnt);
  assign free   = 5'(DEPTH - int'(cnt));
  assign oldest = mem[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; cnt <= '0;
      recover_valid <= 1'b0; recover_empty <= 1'b0;
      recover_addr <= '0; recover_d <= 1'b0; recover_tnum <= T_S;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      recover_valid <= 1'b0;
      if (irq) begin
        recover_valid <= 1'b1;
        recover_empty <= (cnt == 0);
        recover_addr  <= mem[head].addr;
        recover_d     <= mem[head].d;
        recover_tnum  <= mem[head].tnum;
        head <= '0; tail <= '0; cnt <= '0;
      end else if (flush) begin
        head <= '0; tail <= '0; cnt <= '0;
      end else begin
        for (int j = 0; j < int'(AW); j++)
          if (j < int'(wr_n)) mem[PW'(int'(tail) + j)] <= wr_e[j];
        tail <= PW'(int'(tail) + int'(wr_n));
        head <= PW'(int'(head) + int'(retire_n));
        cnt  <= (PW+1)'(int'(cnt) + int'(wr_n) - int'(retire_n));
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !flush && !irq) begin
      assert (int'(retire_n) <= int'(cnt)) else $error("translation_table: retiring %0d of %0d", retire_n, cnt);
      assert (int'(wr_n) + int'(cnt) - int'(retire_n) <= DEPTH) else $error("translation_table overflow");
    end

endmodule
