// tb_icache: miss request for an empty cache, fill, then delivery: words from the
// fetch address to the end of the line, stopping after a branch, limited by the
// queue's room; a taken prediction moves the fetch address to the target, a not
// taken one continues after the branch; stop ends fetching. A random run then
// compares every cycle with a model over 4 KB of code: misses and their line
// address, words delivered, predictor queries and the next fetch address.
module tb_icache;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, redirect = 1'b0, stop = 1'b0;
  logic [ADDR_W-1:0] redirect_pc = '0;
  logic [3:0] q_room = 4'd9;
  logic [2:0] enq_n;
  qentry_t enq [4];
  logic fetch_stopped, bp_query, bp_taken = 1'b0, miss_req, fill_valid = 1'b0;
  logic [ADDR_W-1:0] bp_query_pc, bp_target = '0, miss_addr, fill_addr = '0;
  cisc_code_t fill_code [4];
  predecode_t fill_pd [4];
  int checks = 0, failures = 0;

  icache #(.NLINES(64), .LW(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic fill(logic [31:0] a);
    @(negedge clk);
    fill_valid = 1'b1; fill_addr = a;
    for (int j = 0; j < 4; j++) begin
      automatic int i = (int'(a) / 4 + j) % 11;
      fill_code[j] = example(i);
      fill_pd[j] = predecode(example(i));
    end
    @(negedge clk);
    fill_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(fetch_stopped && !miss_req && enq_n == 0, "stopped after reset");
    fill(32'h10);
    fill(32'h20);
    #1;
    check(fetch_stopped && enq_n == 0, "nothing delivered while stopped");
    redirect = 1'b1; redirect_pc = 32'h4;
    @(negedge clk);
    redirect = 1'b0;
    #1;
    check(!fetch_stopped && miss_req && miss_addr == 32'h0 && enq_n == 0, "miss on line 0");
    fill(32'h0);
    #1;
    // fetch address 4: words 1..3 of line 0
    check(!miss_req && enq_n == 3 && enq[0].addr == 4 && enq[2].addr == 12, "delivers to the end of the line");
    check(enq[0].code == example(1) && enq[0].pd.ucnt == 2, "word and predecode bits");
    @(posedge clk); #1;
    q_room = 4'd2;
    @(negedge clk); #1;
    check(enq_n == 2 && enq[0].addr == 32'h10 && enq[1].addr == 32'h14, $sformatf("limited by queue room %0d %0h", enq_n, enq[0].addr));
    @(posedge clk); #1;
    q_room = 4'd9;
    @(negedge clk); #1;
    check(enq_n == 2 && enq[0].addr == 32'h18, "continues after the partial delivery");
    bp_taken = 1'b1; bp_target = 32'h4;
    @(negedge clk); #1;
    // line 2: words 8 (LODSB), 9 (CMP), 10 (JNE) -> stops after the branch
    check(enq_n == 3 && bp_query && bp_query_pc == 32'h28, "stops after the branch and asks the predictor");
    @(negedge clk); #1;
    bp_taken = 1'b0;
    check(enq_n == 3 && enq[0].addr == 32'h4, "taken prediction redirects fetch");
    @(negedge clk); #1;
    check(enq_n == 4 && enq[0].addr == 32'h10, "whole line 1");
    @(negedge clk); #1;
    check(bp_query && bp_query_pc == 32'h28, "branch again");
    @(negedge clk); #1;
    check(enq_n == 1 && enq[0].addr == 32'h2c, "not taken: continues after the branch");
    @(negedge clk); #1;
    check(enq_n == 0 && miss_req && miss_addr == 32'h30, "miss on line 3");
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    #1;
    check(fetch_stopped && !miss_req && enq_n == 0, "stopped");

    // random run against a model: 4 KB of random code (about one branch in six)
    // over a 1 KB cache, random queue room, random predictions, fills after a
    // random delay, occasional redirects
    begin
      automatic cisc_code_t prog [1024];
      automatic logic [31:0] mpc = '0;
      automatic logic [21:0] mtag [64];
      automatic bit          mvld [64];
      automatic int          wait_fill = -1;
      automatic int          delivered = 0, misses = 0, redirects = 0, taken = 0;
      for (int i = 0; i < 1024; i++)
        prog[i] = ($urandom_range(5) == 0) ? enc(OP_JCC, K_NONE, 4'd5, K_NONE, 4'd0, 14'd4)
                                           : rand_instr(45, 40, 10, 1'b1);
      for (int l = 0; l < 64; l++) mvld[l] = 0;   // the lines filled above hold other code
      for (int cyc = 0; cyc < 4000; cyc++) begin
        automatic bit rd = (cyc == 0) || ($urandom_range(60) == 0);
        @(negedge clk);
        fill_valid = 1'b0;
        q_room = 4'($urandom_range(0, 9));
        bp_taken = ($urandom_range(1) == 0);
        bp_target = 32'(4 * $urandom_range(1023));
        redirect = rd;
        redirect_pc = 32'(4 * $urandom_range(1023));
        #1;
        if (!rd) begin
          automatic int l = int'(mpc[7:4]) | (int'(mpc[9:8]) << 4);
          automatic bit mhit = mvld[l] && mtag[l] == 22'(mpc >> 10);
          automatic int exp_n = 0;
          automatic bit br = 0;
          for (int j = 0; j < 4; j++)
            if (!br && int'(mpc[3:2]) + j < 4 && j < int'(q_room) && mhit) begin
              exp_n = j + 1;
              br = prog[(int'(mpc) >> 2) % 1024 + j].opc == OP_JCC;
            end
          check(miss_req == !mhit && (!miss_req || miss_addr == {mpc[31:4], 4'h0}),
                $sformatf("random %0d: miss request for %0h", cyc, mpc));
          check(int'(enq_n) == exp_n, $sformatf("random %0d: %0d delivered, expected %0d at %0h", cyc, enq_n, exp_n, mpc));
          for (int j = 0; j < exp_n && j < int'(enq_n); j++)
            check(enq[j].addr == mpc + 32'(4 * j) &&
                  enq[j].code == prog[(int'(mpc) >> 2) % 1024 + j] &&
                  enq[j].pd == predecode(prog[(int'(mpc) >> 2) % 1024 + j]),
                  $sformatf("random %0d: word %0d", cyc, j));
          check(bp_query == (br && exp_n > 0) &&
                (!bp_query || bp_query_pc == mpc + 32'(4 * (exp_n - 1))), $sformatf("random %0d: predictor query", cyc));
          delivered += exp_n;
          if (!mhit) begin
            if (wait_fill < 0) begin wait_fill = $urandom_range(0, 3); misses++; end
            if (wait_fill == 0) begin
              fill_valid = 1'b1;
              fill_addr = {mpc[31:4], 4'h0};
              for (int j = 0; j < 4; j++) begin
                fill_code[j] = prog[(int'(mpc) >> 2) / 4 * 4 % 1024 + j];
                fill_pd[j] = predecode(fill_code[j]);
              end
              mvld[l] = 1; mtag[l] = 22'(mpc >> 10);
            end
            wait_fill--;
          end else wait_fill = -1;
          if (exp_n > 0) begin
            if (br && bp_taken) begin mpc = bp_target; taken++; end
            else mpc = mpc + 32'(4 * exp_n);
          end
        end else begin
          mpc = redirect_pc;
          redirects++;
          wait_fill = -1;
        end
      end
      @(negedge clk);
      redirect = 1'b0; fill_valid = 1'b0;
      check(delivered > 2000 && misses > 50 && taken > 50,
            $sformatf("random run: %0d delivered, %0d misses, %0d taken, %0d redirects", delivered, misses, taken, redirects));
      $display("random run: %0d words delivered, %0d misses, %0d taken branches, %0d redirects", delivered, misses, taken, redirects);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
