// tb_frpm_slave_port: self-checking test of the geographical slave port. The
// bench plays the FASTBUS master with direct control of the bus lines.
// Checks: attach on a geographical address match with AK; no AK for another
// slot; CSR0 read with the module ID in the upper half; NTA write and read-back;
// CSR8 and CSR9 reads; CSR0 set/clear write and SRST on bit 30; SS=7 for an
// unsupported NTA and for bad write parity (which also sets CSR0 bit 14); SS=6
// for an unsupported MS code in the address and data cycles; release at AS(d);
// RB with BH resets the port; host load of CSR0 bits.
module tb_frpm_slave_port;
  import frpm_pkg::*;
  localparam logic [4:0] GA = 5'd11;
  logic clk = 0, rst_n = 0;
  logic [4:0] ga = GA;
  fb_bus_t bus;
  logic [7:0] csr8 = 8'h5A;
  logic [3:0] csr9_hi = 4'hC, host_csr0 = 0, csr0_bits;
  logic host_csr0_wr = 0, attached, srst;
  fb_slave_drive_t drv;
  int checks = 0, failures = 0, srst_count = 0;

  always #5 clk = ~clk;
  frpm_slave_port dut (.*);
  always @(posedge clk) if (srst) srst_count++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic connect(input logic [4:0] slot, input logic [2:0] ms);
    @(negedge clk);
    bus.eg = 1; bus.ms = ms; bus.ad = {27'd0, slot};
    bus.pa = fb_parity(bus.ad, 1'b1); bus.pe = 1;
    @(negedge clk); bus.as_ = 1;
    repeat (2) @(negedge clk);
    bus.pe = 0;
  endtask
  task automatic disconnect();
    @(negedge clk); bus.as_ = 0; bus.eg = 0;
    repeat (2) @(negedge clk);
  endtask
  // one data cycle: toggles DS, waits for DK to follow
  task automatic dcycle(input logic [2:0] ms, input logic rd, input logic [31:0] wdat,
                        input bit badpar, output logic [31:0] rdat, output logic [2:0] ss);
    int n;
    @(negedge clk);
    bus.ms = ms; bus.rd = rd;
    bus.ad = rd ? 32'd0 : wdat;
    bus.pa = rd ? 1'b0 : fb_parity(wdat, 1'b1) ^ badpar;
    bus.pe = !rd;
    @(negedge clk); bus.ds = !bus.ds;
    n = 0;
    while (drv.dk != bus.ds && n < 20) begin @(negedge clk); n++; end
    rdat = drv.ad; ss = drv.ss;
    bus.pe = 0; bus.rd = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [2:0] ss;
    bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // another slot: no response
    connect(5'd3, 3'd1);
    check(!drv.ak && !attached, "no AK for another slot");
    disconnect();
    // our slot
    connect(GA, 3'd1);
    check(drv.ak && attached && drv.ss == 0, "attached with AK and SS=0");
    dcycle(3'd0, 1'b1, 0, 0, r, ss);
    check(r[31:16] == FRPM_MODULE_ID && ss == 0, $sformatf("CSR0 read ID %h", r[31:16]));
    check(drv.pe && drv.pa == fb_parity(drv.ad, 1'b1), "read parity supplied");
    dcycle(3'd2, 1'b0, 32'd8, 0, r, ss);
    check(ss == 0, "NTA write");
    dcycle(3'd2, 1'b1, 0, 0, r, ss);
    check(r == 32'd8, "NTA read back");
    dcycle(3'd0, 1'b1, 0, 0, r, ss);
    check(r == 32'h5A, "CSR8 read");
    dcycle(3'd2, 1'b0, 32'd9, 0, r, ss);
    dcycle(3'd0, 1'b1, 0, 0, r, ss);
    check(r == 32'hC0, "CSR9 read");
    dcycle(3'd2, 1'b0, 32'd0, 0, r, ss);
    dcycle(3'd0, 1'b0, 32'h0000_4005, 0, r, ss);
    check(csr0_bits == 4'b1101, "CSR0 set bits 14,2,0");
    dcycle(3'd0, 1'b0, 32'h0001_0000, 0, r, ss);
    check(csr0_bits == 4'b1100, "CSR0 clear bit 0 via bit 16");
    dcycle(3'd0, 1'b0, 32'h4000_0000, 0, r, ss);
    check(csr0_bits == 4'b0100 && srst_count == 1, "CSR0 bit 30 clears bit 14 and pulses SRST");
    // unsupported NTA
    dcycle(3'd2, 1'b0, 32'd5, 0, r, ss);
    dcycle(3'd0, 1'b1, 0, 0, r, ss);
    check(ss == 3'd7, "unsupported CSR gives SS=7");
    // bad parity
    dcycle(3'd2, 1'b0, 32'd1, 1, r, ss);
    check(ss == 3'd7 && csr0_bits[3], "write parity error gives SS=7 and CSR0 bit 14");
    // unsupported data MS
    dcycle(3'd5, 1'b1, 0, 0, r, ss);
    check(ss == 3'd6, "unsupported data MS gives SS=6");
    disconnect();
    check(!attached && !drv.ak, "released at AS(d)");
    // unsupported address MS
    connect(GA, 3'd3);
    check(drv.ak && drv.ss == 3'd6, "unsupported address MS gives SS=6");
    disconnect();
    // host load and RB/BH reset
    @(negedge clk); host_csr0 = 4'b0110; host_csr0_wr = 1;
    @(negedge clk); host_csr0_wr = 0;
    check(csr0_bits == 4'b0110, "host load of CSR0 bits");
    @(negedge clk); bus.rb = 1; bus.bh = 1;
    @(negedge clk); bus.rb = 0; bus.bh = 0;
    check(csr0_bits == 4'b0000, "RB with BH resets CSR0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
