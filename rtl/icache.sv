// icache: instruction cache holding each instruction word with its predecode bits,
// and the fetch address that feeds the scheduler's instruction queue.
//
// Direct mapped, NLINES lines of LW 32-bit words; every word keeps its 12 predecode
// bits beside it (3 bits per byte, so the data array grows by 3/8). On a hit the
// cache delivers, in one cycle, the words from the fetch address to the end of the
// line, stopping after the first branch and never more than the queue has room for.
// When a branch is delivered the fetch address continues from the branch
// prediction answer (bp_taken/bp_target, queried with bp_query_pc in the same cycle);
// otherwise it continues sequentially. On a miss it raises miss_req with the line
// address until the prefetch/predecode unit writes the line through the fill port.
//
// Fetching starts, or restarts after a misprediction or interrupt, on redirect and
// stops on stop (fetch_stopped then tells the scheduler that no more instructions
// will come). Storing predecode bits in the cache and the 3/8 growth follow the
// design description; organisation, sizes and the fetch rule are this design's
// choices. Timing: lookup and delivery are combinational from registered state;
// the fetch address and the fill update at the clock edge.
module icache
  import cr_pkg::*;
#(
  parameter int unsigned NLINES = 64,
  parameter int unsigned LW     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              redirect,
  input  logic [ADDR_W-1:0] redirect_pc,
  input  logic              stop,
  // to the scheduler
  input  logic [3:0]        q_room,
  output logic [2:0]        enq_n,
  output qentry_t           enq [LW],
  output logic              fetch_stopped,
  // branch prediction
  output logic              bp_query,
  output logic [ADDR_W-1:0] bp_query_pc,
  input  logic              bp_taken,
  input  logic [ADDR_W-1:0] bp_target,
  // to / from the prefetch/predecode unit
  output logic              miss_req,
  output logic [ADDR_W-1:0] miss_addr,
  input  logic              fill_valid,
  input  logic [ADDR_W-1:0] fill_addr,
  input  cisc_code_t        fill_code [LW],
  input  predecode_t        fill_pd   [LW]
);
  localparam int unsigned OW = $clog2(LW);
  localparam int unsigned IW = $clog2(NLINES);
  localparam int unsigned TW = ADDR_W - IW - OW - 2;

  cisc_code_t      code_mem [NLINES][LW];
  predecode_t      pd_mem   [NLINES][LW];
  logic [TW-1:0]   tag_mem  [NLINES];
  logic [NLINES-1:0] vld;

  logic [ADDR_W-1:0] pc;
  logic              running;

  logic [IW-1:0] idx;
  logic [OW-1:0] off;
  logic [TW-1:0] tag;
  logic          hit;

  assign off = pc[OW+1:2];
  assign idx = pc[IW+OW+1:OW+2];
  assign tag = pc[ADDR_W-1:IW+OW+2];
  assign hit = vld[idx] && (tag_mem[idx] == tag);

  assign fetch_stopped = !running;
  assign miss_req      = running && !hit;
  assign miss_addr     = {pc[ADDR_W-1:OW+2], {(OW+2){1'b0}}};

  always_comb begin
    int  n;
    logic done;
    n = 0; done = 1'b0;
    bp_query = 1'b0;
    bp_query_pc = '0;
    for (int j = 0; j < int'(LW); j++) begin
      enq[j].addr = pc + ADDR_W'(4 * j);
      enq[j].code = code_mem[idx][OW'(int'(off) + j)];
      enq[j].pd   = pd_mem[idx][OW'(int'(off) + j)];
      if (running && hit && !done && int'(off) + j < int'(LW) && j < int'(q_room)) begin
        n = j + 1;
        if (enq[j].pd.is_branch) begin
          done = 1'b1;
          bp_query = 1'b1;
          bp_query_pc = enq[j].addr;
        end
      end
    end
    enq_n = 3'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      running <= 1'b0;
      vld <= '0;
    end else begin
      if (fill_valid) begin
        vld[fill_addr[IW+OW+1:OW+2]]     <= 1'b1;
        tag_mem[fill_addr[IW+OW+1:OW+2]] <= fill_addr[ADDR_W-1:IW+OW+2];
        for (int j = 0; j < int'(LW); j++) begin
          code_mem[fill_addr[IW+OW+1:OW+2]][j] <= fill_code[j];
          pd_mem[fill_addr[IW+OW+1:OW+2]][j]   <= fill_pd[j];
        end
      end
      if (redirect) begin
        pc <= redirect_pc;
        running <= 1'b1;
      end else if (stop) begin
        running <= 1'b0;
      end else if (enq_n != 0) begin
        if (bp_query && bp_taken) pc <= bp_target;
        else                      pc <= pc + ADDR_W'(4 * int'(enq_n));
      end
    end
  end

endmodule
