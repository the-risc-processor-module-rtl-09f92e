// tb_frpm_addr_cycle: self-checking test of the master address cycle.
// A bench slave answers AS(u) with AK after a delay and a chosen SS code.
// Checks: writes ignored while not master; MS/EG/AD/PA driven and AS raised
// after the set-up time; parity for odd and even selection; AK read-back in
// register 2 bit 6; SS/WT captured at AK(u); ak_rise pulse; AS dropped by a
// write with bit 7 clear.
module tb_frpm_addr_cycle;
  localparam int SKEW = 2;
  logic clk = 0, rst_n = 0, io_reset = 0, master = 0, ctl_wr = 0;
  logic [7:0] ctl_wdata = 0, ctl_rdata;
  logic [31:0] address = 0, ad;
  logic bus_ak = 0, bus_wt = 0;
  logic [2:0] bus_ss = 0, ms, ss_at_ak;
  logic as_, eg, ad_en, pa, ak_rise, wt_at_ak, active;
  int checks = 0, failures = 0, ak_pulses = 0;

  always #5 clk = ~clk;
  frpm_addr_cycle #(.SKEW_CYCLES(SKEW)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] v);
    @(negedge clk); ctl_wdata = v; ctl_wr = 1;
    @(negedge clk); ctl_wr = 0;
  endtask

  always @(posedge clk) if (ak_rise) ak_pulses++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    address = 32'h0000_0013;
    wr(8'h8B);
    check(!as_ && !active, "write ignored while not master");
    master = 1;
    // MS=1, EG=1, odd parity, go
    wr(8'b1001_1001);
    n = 0;
    while (!as_ && n < 20) begin @(posedge clk); #1; n++; end
    check(n == SKEW + 1, $sformatf("AS after %0d set-up clocks (got %0d)", SKEW + 1, n));
    check(ms == 3'd1 && eg && ad_en && ad == 32'h13, "MS, EG, AD driven");
    check(pa == ~(^32'h13), "odd parity bit");
    check(ctl_rdata[7] && !ctl_rdata[6] && ctl_rdata[3:0] == 4'b1001, "read-back before AK");
    // slave answers with SS=2 and WT
    bus_ss = 3'd2; bus_wt = 1;
    @(negedge clk); bus_ak = 1;
    @(posedge clk); #1;
    check(ss_at_ak == 3'd2 && wt_at_ak, "SS and WT captured at AK(u)");
    check(ctl_rdata[6], "AK read back in bit 6");
    check(!ad_en, "AD released after AK");
    check(as_, "AS held until bit 7 cleared");
    // drop AS
    wr(8'h01);
    check(!as_, "AS dropped by bit 7 = 0");
    bus_ak = 0; bus_ss = 0; bus_wt = 0;
    check(ak_pulses == 1, "one ak_rise pulse");
    // even parity variant, logical address
    address = 32'h0000_0003;
    wr(8'b1000_0000);
    repeat (SKEW + 1) @(posedge clk); #1;
    check(as_ && !eg && pa == (^32'h3), "even parity, EG=0");
    // losing mastership ends the cycle
    master = 0;
    @(posedge clk); #1;
    check(!as_, "AS dropped with mastership");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
