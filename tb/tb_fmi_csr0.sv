// tb_fmi_csr0: self-checking test of the FMI on-chip CSR0 bits. A bench model
// of the set/clear rules is updated alongside the block from random loads and
// random user events and compared every clock; directed checks cover
// CLEAR_ERROR, RESET, CLEAR_DATA, POWER_UP and the SR request.
module tb_fmi_csr0;
  logic clk = 0, rst_n = 0;
  logic load = 0, power_up = 0, reset_bus = 0, set_error_flag = 0, set_halt = 0;
  logic set_sr = 0, parity_event = 0, active = 0;
  logic [31:0] wdata = 0;
  logic [15:0] csr0;
  logic clear_error, reset, clear_data, logical_addr_en, running, sr_flag, parity_error, sr_request;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmi_csr0 dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bench model state: {err, la, run, alloc, sren, srflag, perr}
  logic m_err = 0, m_la = 0, m_run = 0, m_alloc = 0, m_sren = 0, m_srf = 0, m_perr = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] e;
      load = 1'($urandom); wdata = $urandom & ~(32'h1 << 30);
      if (($urandom % 64) == 0) wdata[30] = 1'b1;
      set_halt = ($urandom % 8) == 0; set_sr = ($urandom % 8) == 0;
      parity_event = ($urandom % 8) == 0; reset_bus = ($urandom % 16) == 0;
      set_error_flag = 1'($urandom); active = 1'($urandom);
      #1;
      if (clear_error != (load && wdata[16]) || clear_data != (load && wdata[31]) ||
          reset != (load && wdata[30]))
        err++;
      @(posedge clk);
      // model update, same clock
      if (load && wdata[30]) begin
        {m_err, m_la, m_run, m_alloc, m_sren, m_srf, m_perr} = 0;
      end else begin
        if (load) begin
          if (wdata[0]) m_err = 1;
          if (wdata[1]) m_la = 1;
          if (wdata[17]) m_la = 0;
          if (wdata[2]) m_run = 1;
          if (wdata[18]) m_run = 0;
          if (wdata[3]) m_alloc = 1;
          if (wdata[19]) m_alloc = 0;
          if (wdata[4]) m_sren = 1;
          if (wdata[20]) m_sren = 0;
          if (wdata[21]) m_srf = 0;
          if (wdata[14]) m_perr = 1;
          if (wdata[16]) begin m_err = 0; m_perr = 0; end
        end
        if (set_halt) m_run = 0;
        if (set_sr) m_srf = 1;
        if (parity_event) m_perr = 1;
        if (reset_bus) begin m_la = 0; m_run = 0; end
      end
      @(negedge clk);
      load = 0; set_halt = 0; set_sr = 0; parity_event = 0; reset_bus = 0;
      #1;
      e = 0;
      e[0] = m_err | set_error_flag; e[1] = m_la; e[2] = m_run; e[3] = m_alloc;
      e[4] = m_sren; e[5] = m_srf; e[14] = m_perr; e[15] = active;
      if (csr0 != e || sr_request != (m_srf & m_sren)) err++;
    end
    check(err == 0, $sformatf("random load/event sweep (%0d mismatches)", err));
    // directed
    set_error_flag = 0; active = 0;
    @(negedge clk); load = 1; wdata = 32'h0000_4035; @(negedge clk); load = 0;
    check(csr0[0] && csr0[2] && csr0[4] && csr0[5] == m_srf && csr0[14], "set bits 0, 2, 4, 14");
    @(negedge clk); load = 1; wdata = 32'h0001_0000; #1;
    check(clear_error, "CLEAR_ERROR output");
    @(negedge clk); load = 0;
    check(!csr0[0] && !csr0[14], "CLEAR_ERROR clears bits 0 and 14");
    @(negedge clk); set_sr = 1; @(negedge clk); set_sr = 0;
    check(sr_request, "SR requested with SR enable set");
    @(negedge clk); load = 1; wdata = 32'h0020_0000; @(negedge clk); load = 0;
    check(!sr_request && !sr_flag, "bit 21 clears the SR flag");
    @(negedge clk); load = 1; wdata = 32'h8000_0000; #1;
    check(clear_data && !reset, "CLEAR_DATA output");
    @(negedge clk); load = 0;
    @(negedge clk); power_up = 1; #1;
    check(reset, "POWER_UP asserts RESET");
    @(negedge clk); power_up = 0;
    check(csr0 == 16'd0, "RESET returns all bits to zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
