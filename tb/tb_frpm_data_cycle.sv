// tb_frpm_data_cycle: self-checking test of the master data cycles and the
// two-register data port. A bench slave follows DS with DK after a delay and
// supplies read data with PA/PE. Checks: single-word write (AD set-up before
// DS, AD value, parity, PE from the enable bit), single-word read with latch at
// DK(u) and the read/hold selection of register 5, slave parity-error
// detection, block read where every toggle of bit 7 moves one word, SS capture,
// dk_edge count and the busy flag.
module tb_frpm_data_cycle;
  localparam int SKEW = 2;
  logic clk = 0, rst_n = 0, io_reset = 0, master = 1, pe_en = 0;
  logic ctl_wr = 0, data_wr = 0;
  logic [7:0] ctl_wdata = 0, ctl_rdata;
  logic [31:0] data_wdata = 0, data_rdata, ad, bus_ad = 0;
  logic bus_dk = 0, bus_pa = 0, bus_pe = 0, bus_wt = 0;
  logic [2:0] bus_ss = 0, ms, ss_at_dk;
  logic ds, rd, ad_en, pa, pe, dk_edge, wt_at_dk, parity_err, busy;
  int checks = 0, failures = 0, dk_edges = 0;
  int delay = 3;
  logic [31:0] slave_word = 0;
  bit bad_parity = 0;

  always #5 clk = ~clk;
  frpm_data_cycle #(.SKEW_CYCLES(SKEW)) dut (.*);

  // bench slave: DK follows DS after `delay` clocks
  always @(posedge clk) begin
    if (ds != bus_dk) begin
      repeat (delay) @(posedge clk);
      bus_ad <= slave_word;
      bus_pa <= (^slave_word) ^ 1'b1 ^ bad_parity;
      bus_pe <= 1'b1;
      bus_dk <= ds;
    end
  end
  always @(posedge clk) if (dk_edge) dk_edges++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wctl(input logic [7:0] v);
    @(negedge clk); ctl_wdata = v; ctl_wr = 1;
    @(negedge clk); ctl_wr = 0;
  endtask
  task automatic wait_done();
    int n = 0;
    @(posedge clk);
    while ((busy || ds != ctl_wdata[7]) && n < 100) begin @(posedge clk); n++; end
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pe_en = 1;
    // ---- single-word write, MS=0, odd parity
    @(negedge clk); data_wdata = 32'hCAFE_0001; data_wr = 1;
    @(negedge clk); data_wr = 0;
    check(data_rdata == 32'hCAFE_0001, "register 5 reads the holding register after a write");
    wctl(8'b1001_0000);
    check(ad_en && ad == 32'hCAFE_0001 && !ds, "AD driven before DS");
    check(pa == ~(^32'hCAFE_0001) && pe, "write parity and PE");
    n = 0;
    while (!ds && n < 20) begin @(posedge clk); #1; n++; end
    check(n == SKEW + 1, $sformatf("DS after set-up (got %0d)", n));
    check(busy, "busy while DS != DK");
    bus_ss = 3'd0;
    wait_done();
    check(!busy && bus_dk, "DK(u) ended the write");
    wctl(8'b0001_0000);
    wait_done();
    check(!ds && !bus_dk, "DS(d)/DK(d) closed the cycle");
    // ---- single-word read, MS=0
    slave_word = 32'h1234_5678;
    bus_ss = 3'd3;
    wctl(8'b1001_1000);
    wait_done();
    check(data_rdata == 32'h1234_5678, "read latch at DK(u)");
    check(ss_at_dk == 3'd3, "SS captured");
    check(!parity_err, "good parity accepted");
    check(rd && !ad_en, "RD driven, AD not driven on reads");
    slave_word = 32'hDEAD_BEEF;             // slave changes AD before DS(d)
    wctl(8'b0001_1000);
    wait_done();
    check(data_rdata == 32'h1234_5678, "no latch at DK(d) for MS=0");
    // ---- parity error
    bad_parity = 1; slave_word = 32'h0F0F_0001; bus_ss = 0;
    wctl(8'b1001_1000);
    wait_done();
    check(parity_err, "slave parity error detected");
    wctl(8'b0001_1000);
    wait_done();
    bad_parity = 0;
    // ---- block read, MS=1: four words on four DS transitions
    n = dk_edges;
    for (int i = 0; i < 4; i++) begin
      slave_word = 32'hB000_0000 + i;
      wctl({(i % 2 == 0) ? 1'b1 : 1'b0, 7'b001_1001});
      wait_done();
      check(data_rdata == 32'hB000_0000 + i, $sformatf("block word %0d", i));
    end
    check(dk_edges - n == 4, "one DK transition per block word");
    // end block with MS=0, bit 7 already 0
    wctl(8'b0001_1000);
    repeat (3) @(posedge clk);
    @(negedge clk); data_wdata = 32'h5; data_wr = 1;
    @(negedge clk); data_wr = 0;
    check(data_rdata == 32'h5, "SBus write of register 5 reselects the holding register");
    check(ctl_rdata[6] == bus_dk, "DK read back in bit 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
