// prefetch_predecode: fetches a missing cache line from the bus, predecodes its
// instructions as they arrive and writes the line with its predecode bits into the
// instruction cache.
//
// The predecoder (cr_pkg::predecode) works out for each instruction the number of
// microinstructions it needs, whether it sets or reads the flags, whether it ends a
// basic block, and which of its operands it reads and writes: the information the
// scheduler and dispatch unit use later without decoding the instruction again.
//
// Bus protocol (this design's choice): bus_req with bus_addr (line address) is held
// until bus_gnt; then LW data beats follow, one per cycle with bus_rvalid, in address
// order. One cycle after the last beat the line is written to the cache (fill_valid).
// Predecoding at fill time, with the result stored in the cache, follows the design
// description; the line size, the bus handshake and fetching only on a miss are
// this design's choices.
module prefetch_predecode
  import cr_pkg::*;
#(
  parameter int unsigned LW = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              miss_req,
  input  logic [ADDR_W-1:0] miss_addr,
  // bus
  output logic              bus_req,
  output logic [ADDR_W-1:0] bus_addr,
  input  logic              bus_gnt,
  input  logic              bus_rvalid,
  input  logic [31:0]       bus_rdata,
  // cache fill
  output logic              fill_valid,
  output logic [ADDR_W-1:0] fill_addr,
  output cisc_code_t        fill_code [LW],
  output predecode_t        fill_pd   [LW]
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_DATA, S_FILL} state_e;

  localparam int unsigned BW = $clog2(LW + 1);

  state_e        state;
  logic [BW-1:0] beat;

  assign bus_req    = (state == S_REQ);
  assign bus_addr   = fill_addr;
  assign fill_valid = (state == S_FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      beat  <= '0;
      fill_addr <= '0;
      for (int j = 0; j < int'(LW); j++) begin
        fill_code[j] <= '0;
        fill_pd[j]   <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (miss_req) begin
          fill_addr <= miss_addr;
          beat      <= '0;
          state     <= S_REQ;
        end
        S_REQ: if (bus_gnt) state <= S_DATA;
        S_DATA: if (bus_rvalid) begin
          fill_code[beat[$clog2(LW)-1:0]] <= cisc_code_t'(bus_rdata);
          fill_pd[beat[$clog2(LW)-1:0]]   <= predecode(cisc_code_t'(bus_rdata));
          beat <= beat + 1'b1;
          if (int'(beat) == int'(LW) - 1) state <= S_FILL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
