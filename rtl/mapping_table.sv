// mapping_table: buffer of scheduled instructions waiting to be dispatched.
//
// A circular buffer of DEPTH entries of the four-field format (instruction address,
// instruction code with its predecode bits, translator number, D bit). The scheduler
// writes a whole dispatch group (1 to 3 entries, D set on the first) in one cycle;
// the dispatch unit sees the three oldest entries and pops a whole group (1 to 3
// entries) per cycle. Both may happen in the same cycle. free counts empty entries;
// the scheduler only writes when free >= 3, so a group is never split.
//
// The entry format follows the design description; the depth (16) and the
// write/read widths are this design's choices. Writes and pops take effect at the
// clock edge; the head view (rd_e, count) is read straight from registers.
module mapping_table
  import cr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic [1:0] wr_n,
  input  mentry_t    wr_e [AW],
  input  logic [1:0] pop_n,
  output mentry_t    rd_e [AW],
  output logic [4:0] count,
  output logic [4:0] free
);
  localparam int unsigned PW = $clog2(DEPTH);

  mentry_t         mem [DEPTH];
  logic [PW-1:0]   head, tail;
  logic [PW:0]     cnt;

  assign count = 5'(cnt);
  assign free  = 5'(DEPTH - int'(cnt));

  always_comb
    for (int j = 0; j < int'(AW); j++) rd_e[j] = mem[PW'(int'(head) + j)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; cnt <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (flush) begin
      head <= '0; tail <= '0; cnt <= '0;
    end else begin
      for (int j = 0; j < int'(AW); j++)
        if (j < int'(wr_n)) mem[PW'(int'(tail) + j)] <= wr_e[j];
      tail <= PW'(int'(tail) + int'(wr_n));
      head <= PW'(int'(head) + int'(pop_n));
      cnt  <= (PW+1)'(int'(cnt) + int'(wr_n) - int'(pop_n));
    end
  end

  // a write never overflows and a pop never takes more than is held
  always_ff @(posedge clk)
    if (rst_n && !flush) begin
      assert (int'(wr_n) <= DEPTH - int'(cnt) + int'(pop_n)) else $error("mapping_table overflow");
      assert (pop_n <= 2'(cnt) || cnt >= 3) else $error("mapping_table underflow");
    end

endmodule
