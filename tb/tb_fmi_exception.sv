// tb_fmi_exception: self-checking test of exception filtering, encoding and
// the interrupt/acknowledge handshake. A reference function in the bench
// computes the expected code from the encoding table; random cycle reports
// are compared against it in both list and processor modes. Directed checks
// cover the sequencer errors, list termination, history requests, the
// interrupt handshake (one interrupt per exception, the next only after the
// acknowledge is released) and queue overflow.
module tb_fmi_exception;
  import fmi_pkg::*;
  localparam int QD = 4;
  logic clk = 0, rst_n = 0, list_mode = 0;
  logic cyc_done = 0, cyc_addr = 0, cyc_arb = 0, to_wt = 0, to_akdk = 0, to_arb = 0, par_err = 0;
  logic [2:0] ss = 0, to_filter = 0;
  logic [6:0] ss_filter = 0;
  logic par_filter = 0, arb_filter = 0, overflow = 0, stack_space = 0, illegal = 0;
  logic int_enable = 1, int_ack = 0, exc_interrupt, raise, terminate_list, hist_req, lost;
  logic [5:0] last_code;
  logic [2:0] hist_ss;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmi_exception #(.QDEPTH(QD)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected encoding, written from the table
  function automatic logic [6:0] expect_code();   // {take, code}
    bit pass_all;
    pass_all = !list_mode;
    if (illegal) return {1'b1, 6'h16};
    if (stack_space) return {1'b1, 6'h15};
    if (overflow) return {1'b1, 6'h14};
    if (!cyc_done) return 7'd0;
    if (cyc_arb) return (to_arb && (arb_filter || pass_all)) ? {1'b1, 6'h12} : 7'd0;
    if (ss != 0 && (ss_filter[ss - 1] || pass_all)) return {1'b1, (cyc_addr ? 6'h0 : 6'h8) + 6'(ss)};
    if (to_wt && (to_filter[2] || pass_all)) return {1'b1, 6'h13};
    if (to_akdk && ((cyc_addr ? to_filter[1] : to_filter[0]) || pass_all))
      return {1'b1, cyc_addr ? 6'h08 : 6'h10};
    if (par_err && !cyc_addr && (par_filter || pass_all)) return {1'b1, 6'h11};
    return 7'd0;
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random sweep of the combinational encoder; the interrupt side is kept
    // from popping so the queue fills and is then flushed by reset
    int_enable = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [6:0] e;
      {cyc_done, cyc_addr, cyc_arb, to_wt, to_akdk, to_arb, par_err} = 7'($urandom);
      ss = 3'($urandom); ss_filter = 7'($urandom); to_filter = 3'($urandom);
      par_filter = 1'($urandom); arb_filter = 1'($urandom); list_mode = 1'($urandom);
      overflow = ($urandom % 16) == 0; stack_space = ($urandom % 16) == 0;
      illegal = ($urandom % 16) == 0;
      #1;
      e = expect_code();
      if (raise != e[6] || (e[6] && dut.code != e[5:0]) || terminate_list != (e[6] && list_mode))
        err++;
      if (hist_req != (list_mode && cyc_done && !cyc_arb && (ss != 0 || to_wt || to_akdk))) err++;
      @(negedge clk);
    end
    check(err == 0, $sformatf("random encoder sweep (%0d mismatches)", err));
    {cyc_done, cyc_addr, cyc_arb, to_wt, to_akdk, to_arb, par_err} = 0;
    ss = 0; overflow = 0; stack_space = 0; illegal = 0;
    rst_n = 0; @(negedge clk); rst_n = 1; int_enable = 1;
    // directed: list-mode data cycle SS=3 filtered in
    list_mode = 1; ss_filter = 7'b0000100;
    @(negedge clk); cyc_done = 1; ss = 3; #1;
    check(raise && terminate_list && hist_req && hist_ss == 3, "filtered SS=3 raises and ends list");
    @(negedge clk); cyc_done = 0; ss = 0;
    @(negedge clk);
    check(exc_interrupt && last_code == 6'h0B, $sformatf("interrupt with code 0B (%h)", last_code));
    // two more exceptions while the first is pending
    @(negedge clk); illegal = 1; @(negedge clk); illegal = 0;
    @(negedge clk); overflow = 1; @(negedge clk); overflow = 0;
    check(exc_interrupt && last_code == 6'h0B, "pending interrupt unchanged");
    int_ack = 1; @(negedge clk); @(negedge clk);
    check(!exc_interrupt, "interrupt dropped on acknowledge");
    repeat (3) @(negedge clk);
    check(!exc_interrupt, "next interrupt waits for acknowledge release");
    int_ack = 0; @(negedge clk); @(negedge clk);
    check(exc_interrupt && last_code == 6'h16, "second exception: illegal command");
    int_ack = 1; @(negedge clk); @(negedge clk); int_ack = 0; @(negedge clk); @(negedge clk);
    check(exc_interrupt && last_code == 6'h14, "third exception: overflow");
    int_ack = 1; @(negedge clk); @(negedge clk); int_ack = 0; @(negedge clk); @(negedge clk);
    check(!exc_interrupt, "queue empty");
    // unfiltered SS in a list: history only
    ss_filter = 0;
    @(negedge clk); cyc_done = 1; ss = 2; #1;
    check(!raise && hist_req, "unfiltered SS: history only");
    @(negedge clk); cyc_done = 0; ss = 0;
    // processor mode: everything raises, list not terminated
    list_mode = 0;
    @(negedge clk); cyc_done = 1; par_err = 1; #1;
    check(raise && !terminate_list && !hist_req && dut.code == 6'h11, "processor parity error");
    @(negedge clk); cyc_done = 0; par_err = 0;
    @(negedge clk);
    check(exc_interrupt && last_code == 6'h11, "parity interrupt");
    int_ack = 1; @(negedge clk); @(negedge clk); int_ack = 0; @(negedge clk);
    // queue overflow: hold the acknowledge so nothing pops
    int_ack = 1;
    for (int i = 0; i < QD + 2; i++) begin
      @(negedge clk); illegal = 1; #1;
      if (i >= QD) check(lost, $sformatf("exception %0d lost when the queue is full", i));
      @(negedge clk); illegal = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
