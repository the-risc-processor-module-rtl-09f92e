// tb_frpm_pbus_regs: self-checking test of the PBus port-1 register file.
// Checks: write strobes for each register; register 1 arbitration level and
// arbitrate bit; register 3 address; the writable status bits and their
// read-back; the write-only bits 17-19 read as 0; composed status bits from
// the live inputs; pass-through reads of registers 2, 4 and 5.
module tb_frpm_pbus_regs;
  import frpm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pb_sel = 0, pb_wr = 0;
  logic [2:0] pb_addr = 0;
  logic [31:0] pb_wdata = 0, pb_rdata;
  logic status_wr, addr_ctl_wr, data_ctl_wr, data_wr;
  logic arb_en, io_reset, rb, sbus_irq_en, pe_en;
  logic [7:0] csr8;
  logic [31:0] address;
  logic [3:0] csr9_hi;
  logic [2:0] irq_enable;
  logic [3:0] csr0_bits = 4'hA;
  logic [7:0] addr_ctl_rdata = 8'h81, data_ctl_rdata = 8'h42;
  logic [31:0] data_rdata = 32'h1357_9BDF;
  logic bus_rb = 0, bus_bh = 1, bus_sr = 1, cur_wt = 0, cur_ak = 1, cur_dk = 0;
  logic parity_err = 1, slave_active = 0, data_busy = 1, master = 1;
  logic [2:0] cur_ss = 3'd5;
  int checks = 0, failures = 0;
  int strobes [4];

  always #5 clk = ~clk;
  frpm_pbus_regs dut (.*);

  always @(posedge clk) begin
    if (status_wr)   strobes[0]++;
    if (addr_ctl_wr) strobes[1]++;
    if (data_ctl_wr) strobes[2]++;
    if (data_wr)     strobes[3]++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); pb_sel = 1; pb_wr = 1; pb_addr = a; pb_wdata = d;
    @(negedge clk); pb_sel = 0; pb_wr = 0;
  endtask
  // combinational read port
  function automatic logic [31:0] rd(input logic [2:0] a);
    unique case (a)
      3'd0: return rd_q[0];
      3'd1: return rd_q[1];
      3'd2: return rd_q[2];
      3'd3: return rd_q[3];
      3'd4: return rd_q[4];
      default: return rd_q[5];
    endcase
  endfunction
  logic [31:0] rd_q [6];
  task automatic sample();
    for (int i = 0; i < 6; i++) begin pb_addr = 3'(i); #1; rd_q[i] = pb_rdata; end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    foreach (strobes[i]) strobes[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(3'd1, 32'h0000_8025);
    check(arb_en && csr8 == 8'h25, "register 1 arbitrate bit and level");
    @(negedge clk); sample();
    check(rd(3'd1) == 32'h0000_8025, "register 1 read-back");
    wr(3'd3, 32'hC000_0010);
    check(address == 32'hC000_0010, "register 3 address");
    @(negedge clk); sample();
    check(rd(3'd3) == 32'hC000_0010, "register 3 read-back");
    wr(3'd0, 32'h001F_E2F0 | (32'h1 << ST_PE_EN));
    check(csr9_hi == 4'hF && irq_enable == 3'b111 && sbus_irq_en && pe_en, "status enables");
    check(!io_reset && rb, "status RB stored, I/O reset clear");
    @(negedge clk); sample();
    s = rd(3'd0);
    check(s[3:0] == 4'hA && s[7:4] == 4'hF, "status CSR0 and CSR9 fields");
    check(s[19:17] == 3'b000, "write-only bits read 0");
    check(s[ST_SS_LSB+:3] == 3'd5 && s[ST_AK] && !s[ST_DK] && s[ST_SR], "status cycle fields");
    check(s[ST_PERR] && s[ST_DATA_BUSY] && s[ST_MASTER] && s[ST_BH_FB] && !s[ST_RB_FB],
          "status live bits");
    check(rd(3'd2) == 32'h81 && rd(3'd4) == 32'h42 && rd(3'd5) == 32'h1357_9BDF,
          "registers 2, 4, 5 read");
    wr(3'd2, 32'h80); wr(3'd4, 32'h80); wr(3'd5, 32'h1);
    check(strobes[0] == 1 && strobes[1] == 1 && strobes[2] == 1 && strobes[3] == 1,
          "one write strobe per register write");
    wr(3'd0, 32'h100);
    check(io_reset && !rb && irq_enable == 0, "I/O reset bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
