// tb_fmi_ss_response: self-checking test of the FMI slave status generator.
// Every combination of the five control lines is compared, in address and
// data cycles and with the EOB arming set and clear, against the priority
// written out in the bench (SET_SS3, BUSY, delayed EOB, NOT_VALID). Directed
// checks cover EOB arming on one block cycle and disarming by a non-block
// cycle or an address cycle.
module tb_fmi_ss_response;
  logic clk = 0, rst_n = 0;
  logic address_cycle = 0, block_mode = 0, cycle_end = 0;
  logic busy = 0, wt_en = 0, not_valid = 0, reject = 0, eob = 0, set_ss3 = 0;
  logic [2:0] ss;
  logic wt, eob_armed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmi_ss_response dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic end_cycle(input logic addr, input logic blk, input logic e);
    @(negedge clk); address_cycle = addr; block_mode = blk; eob = e; cycle_end = 1;
    @(negedge clk); cycle_end = 0; eob = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int armed = 0; armed < 2; armed++) begin
      if (armed == 1) end_cycle(1'b0, 1'b1, 1'b1);
      check(eob_armed == armed[0], "EOB arming state");
      for (int v = 0; v < 256; v++) begin
        logic [2:0] ess;
        logic ewt;
        {address_cycle, block_mode, busy, wt_en, not_valid, reject, set_ss3} = 7'(v);
        #1;
        ess = 0; ewt = 0;
        if (!address_cycle && set_ss3) ess = 3;
        else if (busy) begin if (wt_en) ewt = 1; else ess = 1; end
        else if (!address_cycle && block_mode && armed) ess = 2;
        else if (not_valid) ess = reject ? 6 : 7;
        if (ss != ess || wt != ewt) err++;
      end
    end
    check(err == 0, $sformatf("priority table (%0d mismatches)", err));
    {address_cycle, block_mode, busy, wt_en, not_valid, reject, set_ss3} = 0;
    end_cycle(1'b0, 1'b0, 1'b0);
    check(!eob_armed, "non-block cycle disarms EOB");
    end_cycle(1'b0, 1'b1, 1'b1);
    check(eob_armed, "EOB on a block cycle arms");
    end_cycle(1'b1, 1'b0, 1'b0);
    check(!eob_armed, "address cycle disarms EOB");
    end_cycle(1'b0, 1'b1, 1'b0);
    check(!eob_armed, "block cycle without EOB leaves it clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
