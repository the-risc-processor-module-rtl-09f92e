// tb_fmi_segment_driver: self-checking test of the FMI master cycle sequencer
// against a bench model of the segment: a timing control that answers AR with
// AG, and one slave that answers AS with AK and follows DS with DK, can hold
// WT, returns a chosen SS and read data with parity, and can stay silent.
// Checks: arbitration to mastership and the arbitration timeout; address cycle
// AD/MS/EG/parity, AS set-up, SS at AK, AK timeout; single write and read
// data cycles with DS toggling, latched read data, parity error detection;
// WT hold and WT timeout; DK timeout; block write of 3 words from the
// transfer words with seg_word per word; early block stop on SS; hold-AS and
// hold-GK release; commands without mastership; SS=1 retries of address and
// data cycles up to the retry count.
module tb_fmi_segment_driver;
  import frpm_pkg::*;
  import fmi_pkg::*;
  localparam int SKEW = 2;
  logic clk = 0, rst_n = 0;
  logic seg_reset = 0, start = 0;
  fmi_cmd_t cmd;
  logic [31:0] block_words = 0, xfer_wdata, rdata;
  logic seg_word, rvalid, cyc_done, cyc_addr, cyc_arb, to_wt, to_akdk, to_arb, par_err, master;
  logic [2:0] cyc_ss;
  fb_bus_t bus;
  fb_master_drive_t mdrv;
  int checks = 0, failures = 0;

  // segment model
  logic ag = 0, ak = 0, dk = 0, wt = 0, grant_on = 1, ak_on = 1, dk_on = 1;
  logic bad_par = 0;
  logic [2:0] ss = 0;
  logic [31:0] slave_data = 32'hC0DE_0001, last_write = 0;
  logic [31:0] words [4];
  logic cnt_addr = 0, busy_ans = 0;
  int widx = 0, nwrites = 0, agc = 0, busy_n = 0, ak_edges = 0, dk_edges = 0;
  always_comb begin
    bus = '0;
    bus.ar = mdrv.ar; bus.ag = ag; bus.al = mdrv.al; bus.gk = mdrv.gk;
    bus.as_ = mdrv.as_; bus.ds = mdrv.ds; bus.ms = mdrv.ms; bus.eg = mdrv.eg; bus.rd = mdrv.rd;
    bus.ak = ak; bus.dk = dk; bus.wt = wt; bus.ss = (cnt_addr ? busy_n > 0 : busy_ans) ? 3'd1 : ((ak || dk) ? ss : 3'd0);
    bus.ad = mdrv.ad | ((mdrv.rd && mdrv.as_) ? slave_data : 32'd0);
    bus.pe = mdrv.pe | (mdrv.rd && mdrv.as_);
    bus.pa = mdrv.pe ? mdrv.pa : ((mdrv.rd && mdrv.as_) ? (fb_parity(slave_data, 1'b1) ^ bad_par) : 1'b0);
  end
  always @(posedge clk) begin
    // AG held for 6 clocks per arbitration, then 3 clocks low
    if (agc != 0) agc <= agc - 1;
    else if (grant_on && mdrv.ar && !mdrv.gk) agc <= 9;
    ag <= agc > 3;
    ak <= ak_on && mdrv.as_;
    if (ak_on && mdrv.as_ && !ak) ak_edges++;
    if (!mdrv.as_ && ak && busy_n > 0 && cnt_addr) busy_n--;
    if (dk_on && !wt && dk != mdrv.ds && mdrv.as_) begin
      dk <= mdrv.ds;
      dk_edges++;
      busy_ans <= busy_n > 0;
      if (busy_n > 0 && !cnt_addr) busy_n--;
      if (!mdrv.rd) begin last_write <= mdrv.ad; nwrites++; end
    end
    if (!mdrv.as_) dk <= 1'b0;
    if (seg_word) widx <= widx + 1;
  end
  assign xfer_wdata = words[widx[1:0]];

  always #5 clk = ~clk;
  fmi_segment_driver #(.SKEW_CYCLES(SKEW), .SETTLE_CYCLES(2), .ARB_TIMEOUT(60),
                       .AK_TIMEOUT(20), .DK_TIMEOUT(20), .WT_TIMEOUT(40)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic fmi_cmd_t mk(input fmi_op_e op, input logic [2:0] ms, input logic rd,
                                  input logic has, input logic hgk, input logic [31:0] d);
    fmi_cmd_t x;
    x = '0; x.op = op; x.ms = ms; x.eg_rd = rd; x.gen_parity = 1; x.hold_as = has;
    x.hold_gk = hgk; x.ref_data = d; x.arb_level = 8'd17;
    return x;
  endfunction
  int nwords;
  always @(posedge clk) if (seg_word) nwords++;
  // run one command, wait for cyc_done, return clocks taken
  task automatic run(input fmi_cmd_t x, output int n);
    @(negedge clk); cmd = x; start = 1;
    @(negedge clk); start = 0; n = 1;
    while (!cyc_done && n < 500) begin @(negedge clk); n++; end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  logic as_seen_early;
  initial begin
    words[0] = 32'h1111_0000; words[1] = 32'h2222_0001; words[2] = 32'h3333_0002; words[3] = 32'h4444_0003;
    cmd = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // commands before arbitration
    run(mk(OP_ADDR, 3'd0, 0, 1, 1, 32'h0), n);
    check(cyc_done && to_akdk && cyc_addr, "address without mastership ends with timeout");
    // arbitration
    run(mk(OP_ARB, 3'd0, 0, 0, 1, 32'h0), n);
    check(cyc_done && cyc_arb && !to_arb && master, "arbitration gives mastership");
    check(mdrv.gk, "GK held");
    // address cycle with AS held
    ss = 3'd0;
    fork
      begin
        @(posedge mdrv.ad_en);
        as_seen_early = mdrv.as_;
        check(mdrv.ad == 32'h0000_1234 && mdrv.ms == 3'd2 && mdrv.eg, "address, MS, EG on the bus");
        check(mdrv.pe && mdrv.pa == fb_parity(32'h1234, 1'b1), "address parity");
      end
      begin
        fmi_cmd_t a;
        a = mk(OP_ADDR, 3'd2, 1, 1, 1, 32'h1234);
        run(a, n);
      end
    join
    check(!as_seen_early, "AS after AD set-up");
    check(cyc_done && cyc_addr && cyc_ss == 0 && !to_akdk && mdrv.as_, "address cycle ends at AK with AS held");
    // write single word
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hABCD_0042), n);
    check(cyc_done && last_write == 32'hABCD_0042 && cyc_ss == 0, "write data cycle");
    check(mdrv.ds == 1'b1, "DS toggled up");
    // read single word, DS toggles back
    slave_data = 32'h5A5A_0F0F;
    run(mk(OP_DATA, 3'd0, 1, 1, 1, 32'h0), n);
    check(rdata == 32'h5A5A_0F0F && !par_err, "read data latched at DK");
    check(mdrv.ds == 1'b0, "DS toggled down");
    // parity error from slave
    bad_par = 1;
    run(mk(OP_DATA, 3'd0, 1, 1, 1, 32'h0), n);
    check(par_err, "slave parity error detected");
    bad_par = 0;
    // SS on a data cycle
    ss = 3'd3;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'h7), n);
    check(cyc_ss == 3'd3, "data-cycle SS sampled");
    ss = 3'd0;
    // WT holds the cycle, then releases
    fork
      begin wt = 1; repeat (10) @(posedge clk); wt = 0; end
      run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'h9), n);
    join
    check(!to_wt && n > 10 && last_write == 32'h9, "WT stretches the cycle");
    // WT timeout
    wt = 1;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hA), n);
    check(to_wt, "WT timeout");
    wt = 0;
    repeat (2) @(negedge clk);   // the slave completes the stretched cycle
    // DK timeout
    dk_on = 0;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hB), n);
    check(to_akdk && !cyc_addr, "DK timeout");
    dk_on = 1;
    // release AS: the held DS returns to 0 with AS
    run(mk(OP_DATA, 3'd0, 0, 0, 1, 32'hC), n);
    @(negedge clk);
    check(!mdrv.as_ && !mdrv.ds, "AS and DS released without hold-AS");
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hD), n);
    check(to_akdk, "data command without AS ends with timeout");
    // SS=1 retry on an address cycle
    busy_n = 1; cnt_addr = 1; ak_edges = 0;
    run(mk(OP_ADDR, 3'd0, 0, 1, 1, 32'h77), n);
    check(cyc_addr && cyc_ss == 3'd0 && ak_edges == 2, $sformatf("address cycle retried on SS=1 (%0d AK edges)", ak_edges));
    busy_n = 0; cnt_addr = 0;
    // AK timeout
    ak_on = 0;
    run(mk(OP_ADDR, 3'd0, 0, 1, 1, 32'h55), n);
    check(to_akdk && cyc_addr, "AK timeout");
    @(negedge clk);
    check(!mdrv.as_, "AS dropped after AK timeout");
    ak_on = 1;
    // block write of three words
    run(mk(OP_ADDR, 3'd0, 0, 1, 1, 32'h66), n);
    // SS=1 retries on a data cycle: two busy answers, then success
    busy_n = 2; cnt_addr = 0; dk_edges = 0; nwrites = 0;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hE1), n);
    check(cyc_ss == 3'd0 && dk_edges == 3 && last_write == 32'hE1, $sformatf("data cycle retried on SS=1 (%0d DK edges)", dk_edges));
    // more busy answers than retries: SS=1 reported after 1+3 tries
    busy_n = 9; dk_edges = 0;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hE2), n);
    check(cyc_ss == 3'd1 && dk_edges == 4, $sformatf("SS=1 after the retries run out (%0d)", dk_edges));
    busy_n = 0;
    run(mk(OP_DATA, 3'd0, 0, 1, 1, 32'hE3), n);   // slave answers SS=0 again
    nwords = 0; widx = 0; nwrites = 0; block_words = 3;
    run(mk(OP_DATA, 3'd1, 0, 1, 1, 32'h0), n);
    @(negedge clk);
    check(nwords == 3 && nwrites == 3, $sformatf("block moved 3 words (%0d, %0d)", nwords, nwrites));
    check(last_write == 32'h3333_0002, "block words taken from the transfer words in order");
    // block stops early on SS
    nwords = 0; widx = 0; nwrites = 0; ss = 3'd2;
    run(mk(OP_DATA, 3'd1, 0, 1, 1, 32'h0), n);
    check(nwrites == 1 && cyc_ss == 3'd2, "block stops on SS=2");
    ss = 3'd0;
    // release bus
    run(mk(OP_DATA, 3'd0, 0, 0, 0, 32'h1), n);
    repeat (3) @(negedge clk);
    check(!master && !mdrv.gk && !mdrv.as_, "bus released without hold-GK");
    // arbitration timeout
    grant_on = 0;
    run(mk(OP_ARB, 3'd0, 0, 0, 1, 32'h0), n);
    check(to_arb && cyc_arb && !master, "arbitration timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
