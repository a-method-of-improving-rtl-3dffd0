// tb_translator: checks the simple (1 lane) and complex (3 lane) translators.
//
// The complex translator gets every instruction of the worked example that needs
// at most three microinstructions; for each the expected operations of its
// microinstructions (written out here by hand from the templates' definition),
// the count of valid lanes and the last flag are checked one cycle later. The
// simple translator gets the one-microinstruction ones. Holding (adv low) must
// keep the lanes, and an empty cycle must clear them. An entry's rename tag must
// reach only the microinstruction that writes the destination register.
module tb_translator;
  import cr_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, v3 = 1'b0, v1 = 1'b0;
  mentry_t e3, e1;
  uop_t l3 [3];
  uop_t l1 [1];
  logic err3, err1;
  int checks = 0, failures = 0;

  translator #(.MAXU(3)) dut_c (.clk, .rst_n, .flush(1'b0), .adv, .in_valid(v3), .in_e(e3),
                                .in_slot(2'd2), .lane(l3), .err(err3));
  translator #(.MAXU(1)) dut_s (.clk, .rst_n, .flush(1'b0), .adv, .in_valid(v1), .in_e(e1),
                                .in_slot(2'd1), .lane(l1), .err(err1));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic mentry_t mk(int i);
    mentry_t m;
    m = '0;
    m.addr = 32'(4 * i);
    m.code = example(i);
    m.pd = predecode(example(i));
    return m;
  endfunction

  initial begin
    uop_op_e exp_ops [11][$];
    exp_ops[0] = {U_LD, U_SUB, U_ST};  // PUSH MEM_1
    exp_ops[1] = {U_LD, U_ADD};         // ADD CX, MEM_2
    exp_ops[2] = {U_LD, U_SUB, U_ST};  // SUB MEM_3, CX
    exp_ops[3] = {U_MOV};               // MOV BX, AX
    exp_ops[4] = {U_LD, U_SHR, U_ST};  // SHR MEM_3, 1
    exp_ops[5] = {U_LD, U_ADD};         // ADD AX, MEM_3
    exp_ops[6] = {U_LD, U_XOR};         // XOR DL, MEM_4
    exp_ops[7] = {U_SUB};               // DEC CL
    exp_ops[9] = {U_SUB};               // CMP AX, BX
    exp_ops[10] = {U_BR};               // JNE
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 11; i++) begin
      if (i == 8) continue;
      @(negedge clk);
      adv = 1'b1; v3 = 1'b1; e3 = mk(i);
      v1 = (example_ucnt(i) == 1); e1 = mk(i);
      @(negedge clk);
      adv = 1'b0; v3 = 1'b0; v1 = 1'b0;
      for (int k = 0; k < 3; k++) begin
        check(l3[k].valid == (k < exp_ops[i].size()), $sformatf("i+%0d lane %0d valid", i, k));
        if (k < exp_ops[i].size()) begin
          check(l3[k].op == exp_ops[i][k], $sformatf("i+%0d lane %0d op %s", i, k, l3[k].op.name()));
          check(l3[k].last == (k == exp_ops[i].size() - 1), "last flag");
          check(l3[k].addr == 32'(4 * i) && l3[k].slot == 2'd2 && int'(l3[k].idx) == k, "tags");
        end
      end
      if (example_ucnt(i) == 1)
        check(l1[0].valid && l1[0].op == exp_ops[i][0] && l1[0].last, $sformatf("simple translator i+%0d", i));
      else check(!l1[0].valid, "simple translator idle");
      check(!err3 && !err1, "no error");
      // hold
      @(negedge clk);
      check(l3[0].valid && l3[0].addr == 32'(4 * i), "lanes hold while adv is low");
    end
    // operand details
    @(negedge clk); adv = 1'b1; v3 = 1'b1; e3 = mk(1);    // ADD CX, MEM_2
    @(negedge clk); adv = 1'b0; v3 = 1'b0;
    check(l3[0].dst == R_T0 && l3[0].imm == 16'd2, "ADD CX,MEM_2 loads MEM_2 into T0");
    check(l3[1].dst == R_CX && l3[1].src1 == R_CX && l3[1].src2 == R_T0 && l3[1].sets_flags, "ADD CX,CX,T0");
    check(!l3[0].rn && !l3[1].rn, "no rename tag when the entry has none");
    // rename tag: only the microinstruction writing CX carries it
    @(negedge clk); adv = 1'b1; v3 = 1'b1; e3 = mk(1); e3.rn = 1'b1;
    @(negedge clk); adv = 1'b0; v3 = 1'b0;
    check(!l3[0].rn && l3[1].rn, "rename tag on the write of CX only, not on the load into T0");
    @(negedge clk); adv = 1'b1; v3 = 1'b1; e3 = mk(9);    // CMP AX, BX
    @(negedge clk); adv = 1'b1; v3 = 1'b0;
    check(l3[0].dst == R_ZERO && l3[0].src1 == R_AX && l3[0].src2 == R_BX && l3[0].sets_flags, "CMP discards the result");
    @(negedge clk); adv = 1'b0;
    check(!l3[0].valid && !l3[1].valid && !l3[2].valid, "empty cycle clears the lanes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
