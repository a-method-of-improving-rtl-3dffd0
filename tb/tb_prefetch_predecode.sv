// tb_prefetch_predecode: a missing line is fetched over the bus (request held
// until grant, four beats) and written to the cache with predecode bits. The
// microinstruction counts of the worked example (3,2,3,1 / 3,2,2,1 / 4,1,1) and the
// flag and branch bits are checked against values written out here.
module tb_prefetch_predecode;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, miss_req = 1'b0;
  logic [ADDR_W-1:0] miss_addr = '0, bus_addr, fill_addr;
  logic bus_req, bus_gnt, bus_rvalid, fill_valid;
  logic [31:0] bus_rdata;
  cisc_code_t fill_code [4];
  predecode_t fill_pd [4];
  int checks = 0, failures = 0;
  logic [31:0] mem [16];
  int gnt_delay = 0, beats = 0;
  logic [31:0] laddr;

  prefetch_predecode #(.LW(4)) dut (.*);

  always #5 clk = ~clk;

  assign bus_gnt = bus_req && gnt_delay == 3;
  assign bus_rvalid = beats > 0;
  assign bus_rdata = mem[(laddr >> 2) + 32'(4 - beats)];
  always @(posedge clk) begin
    gnt_delay <= bus_req && !bus_gnt ? gnt_delay + 1 : 0;
    if (bus_gnt) begin beats <= 4; laddr <= bus_addr; end
    else if (beats > 0) beats <= beats - 1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int exp_u [12] = '{3, 2, 3, 1, 3, 2, 2, 1, 4, 1, 1, 1};
    bit exp_sf [12] = '{0, 1, 1, 0, 1, 1, 1, 1, 0, 1, 0, 0};
    for (int i = 0; i < 16; i++) mem[i] = (i < 11) ? 32'(example(i)) : 32'(enc(OP_NOP, K_NONE, 0, K_NONE, 0));
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 3; l++) begin
      int t = 0;
      @(negedge clk);
      miss_req = 1'b1; miss_addr = 32'(16 * l);
      while (!fill_valid && t < 50) begin @(negedge clk); t++; end
      miss_req = 1'b0;
      check(fill_valid && fill_addr == 32'(16 * l), $sformatf("line %0d filled", l));
      check(t >= 8, "fill waits for grant and four beats");
      for (int j = 0; j < 4; j++) begin
        check(fill_code[j] == cisc_code_t'(mem[4 * l + j]), "code stored");
        check(int'(fill_pd[j].ucnt) == exp_u[4 * l + j], $sformatf("count of word %0d", 4 * l + j));
        check(fill_pd[j].sets_flags == exp_sf[4 * l + j], $sformatf("flags of word %0d", 4 * l + j));
        check(fill_pd[j].is_branch == (4 * l + j == 10), "branch bit");
        check(fill_pd[j].valid, "valid bit");
      end
      @(negedge clk);
      check(!fill_valid && !bus_req, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
