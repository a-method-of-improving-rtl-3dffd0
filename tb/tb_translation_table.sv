// tb_translation_table: random group writes and retires against a queue model,
// then interrupts: the oldest unretired entry must be reported and the table
// emptied, and an interrupt on an empty table must say so.
module tb_translation_table;
  import cr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0;
  logic [1:0] wr_n = '0, retire_n = '0;
  mentry_t wr_e [AW];
  logic [4:0] count, free;
  mentry_t oldest;
  logic recover_valid, recover_empty, recover_d;
  logic [ADDR_W-1:0] recover_addr;
  tnum_e recover_tnum;
  int checks = 0, failures = 0, nrec = 0;
  mentry_t model [$];

  translation_table #(.DEPTH(16)) dut (.clk, .rst_n, .flush(1'b0), .wr_n, .wr_e, .retire_n, .irq,
    .count, .free, .oldest, .recover_valid, .recover_empty, .recover_addr, .recover_d, .recover_tnum);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    mentry_t exp;
    bit exp_empty;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(oldest == model[0], "oldest entry");
      irq = (c % 97 == 50) || c == 3;
      retire_n = 2'($urandom_range(3));
      if (int'(retire_n) > model.size()) retire_n = 2'(model.size());
      wr_n = (free >= 6) ? 2'($urandom_range(3)) : 2'd0;
      for (int j = 0; j < 3; j++) begin
        wr_e[j] = mentry_t'({$urandom, $urandom, $urandom});
        wr_e[j].d = (j == 0);
      end
      exp_empty = (model.size() == 0);
      if (!exp_empty) exp = model[0];
      @(posedge clk);
      if (irq) model.delete();
      else begin
        for (int j = 0; j < int'(retire_n); j++) void'(model.pop_front());
        for (int j = 0; j < int'(wr_n); j++) model.push_back(wr_e[j]);
      end
      @(negedge clk);
      if (irq) begin
        nrec++;
        check(recover_valid && recover_empty == exp_empty, "recovery reported");
        if (!exp_empty)
          check(recover_addr == exp.addr && recover_d == exp.d && recover_tnum == exp.tnum, "recovery names the oldest entry");
        check(count == 0, "emptied on interrupt");
      end else check(!recover_valid, "no recovery without interrupt");
      irq = 1'b0; wr_n = '0; retire_n = '0;
    end
    check(nrec > 5, "interrupts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
