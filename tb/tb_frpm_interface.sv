// tb_frpm_interface: self-checking test of the FRPM FASTBUS interface on its
// own, with short timing parameters. The bench builds a small segment: the
// interface's drives, an arbitration timing control that grants AG whenever AR
// is seen, and a bench slave at slot 4 holding four words. A host task uses
// the PBus registers. Checks: becoming master, an address cycle with AK and
// the AK/DK interrupt, a write and a read data cycle, the SS value in the
// status register, the register-5 read latch, a loopback read of the module's
// own CSR0 through the segment, and release of the bus.
module tb_frpm_interface;
  import frpm_pkg::*;
  localparam logic [4:0] GA = 5'd2, SLOT = 5'd4;
  logic clk = 0, rst_n = 0;
  logic pb_sel = 0, pb_wr = 0;
  logic [2:0] pb_addr = 0;
  logic [31:0] pb_wdata = 0, pb_rdata;
  fb_bus_t bus;
  fb_master_drive_t mdrv;
  fb_slave_drive_t sdrv;
  logic [2:0] irq;
  logic led_slave, led_master, srst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frpm_interface #(.SETTLE_CYCLES(2), .SKEW_CYCLES(1), .CLK_HZ(1000), .STRETCH_CYCLES(8))
    dut (.ga(GA), .*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // segment
  logic ag = 0, s_ak = 0, s_dk = 0, s_den = 0;
  logic [31:0] s_ad = 0;
  logic [2:0] s_ss = 0;
  always_comb begin
    bus = '0;
    bus.ar = mdrv.ar; bus.ag = ag; bus.al = mdrv.al; bus.gk = mdrv.gk;
    bus.as_ = mdrv.as_; bus.ds = mdrv.ds; bus.eg = mdrv.eg; bus.ms = mdrv.ms;
    bus.rd = mdrv.rd; bus.rb = mdrv.rb;
    bus.ak = sdrv.ak | s_ak; bus.dk = sdrv.dk | s_dk; bus.ss = sdrv.ss | s_ss;
    bus.pa = mdrv.pa | sdrv.pa; bus.pe = mdrv.pe | sdrv.pe;
    bus.ad = (mdrv.ad_en ? mdrv.ad : 0) | (sdrv.ad_en ? sdrv.ad : 0) | (s_den ? s_ad : 0);
  end
  always @(posedge clk) begin
    if (bus.ar && !ag) begin ag <= 1; repeat (6) @(posedge clk); ag <= 0; end
  end
  logic [31:0] smem [4] = '{32'h10, 32'h20, 32'h30, 32'h40};
  int sptr = 0;
  bit sat = 0, as_q = 0, ds_q = 0;
  always @(posedge clk) begin
    as_q <= bus.as_; ds_q <= bus.ds;
    if (bus.as_ && !as_q && bus.eg && bus.ad[4:0] == SLOT) begin
      sat <= 1; sptr <= 0; s_ak <= 1;
    end else if (!bus.as_ && as_q) begin
      sat <= 0; s_ak <= 0; s_dk <= 0; s_den <= 0; s_ss <= 0;
    end else if (sat && bus.ds != ds_q) begin
      if (bus.rd) begin s_ad <= smem[sptr]; s_den <= 1; end
      else begin smem[sptr] = bus.ad; s_den <= 0; end
      sptr  <= (sptr + 1) % 4;
      s_ss  <= bus.rd ? 3'd4 : 3'd0;
      s_dk  <= bus.ds;
    end
  end

  task automatic pwr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); pb_sel = 1; pb_wr = 1; pb_addr = a; pb_wdata = d;
    @(negedge clk); pb_sel = 0; pb_wr = 0;
  endtask
  task automatic prd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); pb_sel = 1; pb_addr = a; #1 d = pb_rdata;
    @(negedge clk); pb_sel = 0;
  endtask
  task automatic dcyc(input logic go, input logic rd, input logic [2:0] ms);
    logic [31:0] r;
    int n = 0;
    pwr(3'd4, {24'd0, go, 2'b00, 1'b1, rd, ms});
    do begin prd(3'd0, r); n++; end while ((r[ST_DK] != go || r[ST_DATA_BUSY]) && n < 50);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pwr(3'd0, (32'h7 << ST_IE_SS) | (32'h1 << ST_IE_SBUS));
    pwr(3'd1, {16'd0, 1'b1, 7'd0, 8'd9});
    n = 0;
    do begin prd(3'd0, r); n++; end while (!r[ST_MASTER] && n < 50);
    check(r[ST_MASTER] && mdrv.gk, "master with GK");
    check(led_master, "master LED");
    pwr(3'd3, {27'd0, SLOT});
    pwr(3'd2, 32'h89);                           // go, EG, MS=1
    n = 0;
    do begin prd(3'd2, r); n++; end while (!r[6] && n < 50);
    check(r[6] && irq[2], "AK seen, AK/DK interrupt");
    pwr(3'd0, (32'h7 << ST_IE_SS) | (32'h1 << ST_IE_SBUS));   // clear requests
    pwr(3'd5, 32'hFACE_0001);
    dcyc(1'b1, 1'b0, 3'd0);
    dcyc(1'b0, 1'b0, 3'd0);
    check(smem[0] == 32'hFACE_0001, "write data reached the slave");
    dcyc(1'b1, 1'b1, 3'd0);
    prd(3'd5, r);
    // the bench slave steps its pointer on every DS edge: write used 0 and 1
    check(r == 32'h30, $sformatf("read data %h", r));
    prd(3'd0, r);
    check(r[ST_SS_LSB+:3] == 3'd4 && irq[0], "SS=4 in status and SS interrupt");
    dcyc(1'b0, 1'b1, 3'd0);
    pwr(3'd2, 32'h0);
    repeat (3) @(negedge clk);
    // loopback to own CSR0
    pwr(3'd3, {27'd0, GA});
    pwr(3'd2, 32'h89);
    n = 0;
    do begin prd(3'd2, r); n++; end while (!r[6] && n < 50);
    check(led_slave, "slave LED on own slave access");
    dcyc(1'b1, 1'b1, 3'd0);
    prd(3'd5, r);
    check(r[31:16] == FRPM_MODULE_ID, $sformatf("own CSR0 ID %h", r[31:16]));
    dcyc(1'b0, 1'b1, 3'd0);
    pwr(3'd2, 32'h0);
    pwr(3'd1, 32'd0);
    repeat (3) @(negedge clk);
    prd(3'd0, r);
    check(!r[ST_MASTER] && !mdrv.gk && !mdrv.as_, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
