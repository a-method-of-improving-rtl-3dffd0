// tb_mapping_table: random writes of whole groups and pops against a queue model.
// Checks the three-entry head view, count and free after every cycle, that a full
// table refuses nothing it promised (writes only when free >= 3), and that the
// entries' four fields come back unchanged.
module tb_mapping_table;
  import cr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] wr_n = '0, pop_n = '0;
  mentry_t wr_e [AW];
  mentry_t rd_e [AW];
  logic [4:0] count, free;
  int checks = 0, failures = 0, nfull = 0;
  mentry_t model [$];

  mapping_table #(.DEPTH(16)) dut (.clk, .rst_n, .flush(1'b0), .wr_n, .wr_e, .pop_n, .rd_e, .count, .free);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      check(int'(count) == model.size() && int'(free) == 16 - model.size(), "count/free");
      for (int j = 0; j < 3 && j < model.size(); j++) check(rd_e[j] == model[j], $sformatf("head entry %0d", j));
      if (model.size() > 13) nfull++;
      // pop
      pop_n = 2'($urandom_range(c % 200 < 100 ? 1 : 3));
      if (int'(pop_n) > model.size()) pop_n = 2'(model.size());
      // write a group
      wr_n = (free >= 3) ? 2'($urandom_range(3)) : 2'd0;
      for (int j = 0; j < 3; j++) begin
        wr_e[j] = mentry_t'({$urandom, $urandom, $urandom});
        wr_e[j].d = (j == 0);
      end
      @(posedge clk);
      for (int j = 0; j < int'(pop_n); j++) void'(model.pop_front());
      for (int j = 0; j < int'(wr_n); j++) model.push_back(wr_e[j]);
    end
    check(nfull > 0, "table ran nearly full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
