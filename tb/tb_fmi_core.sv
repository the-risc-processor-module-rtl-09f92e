// tb_fmi_core: self-checking test of the FMI command sequencer on its own.
// The bench plays the processor, the memory holding command lists and status
// history, the segment driver (reporting the SS code and timeout chosen for
// each command) and the user lines of the FMI slave. Checks: control commands
// (reset bus, receiver enable, write parameter), the illegal-command exception,
// unmasked exceptions in processor mode, a list with a history entry, block
// DMA addresses and terminate, a filtered exception ending a list early, the
// history overflow exception, CSR0 loads with the SR request, the slave
// status responses, FIM and SR receiver interrupts with SS=1 from a busy
// receiver block, and the status register fields.
module tb_fmi_core;
  import fmi_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        cmd_valid = 0, cmd_ready, int_enable = 1, int_ack = 0;
  logic [63:0] cmd_data = 0;
  logic        exc_interrupt, exc_lost, list_mode;
  logic [5:0]  exc_code;
  logic        mem_rd, mem_rvalid = 0, mem_wr;
  logic [31:0] mem_addr;
  logic [63:0] mem_rdata = 0, mem_wdata;
  logic        seg_start, seg_word = 0, cyc_done = 0, cyc_addr = 0;
  logic        cyc_arb = 0, to_wt = 0, to_akdk = 0, to_arb = 0, par_err = 0;
  logic [2:0]  cyc_ss = 0;
  fmi_cmd_t    seg_cmd;
  logic [31:0] xfer_addr;
  logic        reset_bus, irq_rcv_reset, irq_rcv_en, sr_rcv_reset, sr_rcv_en;
  logic        param_wr, param_rd;
  logic [7:0]  param_offset;
  logic [31:0] param_data;
  logic        power_up = 0, csr0_load = 0, set_error_flag = 0, set_halt = 0;
  logic        set_sr = 0, slv_parity_err = 0, active = 0;
  logic [31:0] csr0_wdata = 0;
  logic [15:0] csr0;
  logic        clear_error, csr0_reset, clear_data, sr_request;
  logic        slv_address_cycle = 0, slv_block_mode = 0, slv_cycle_end = 0;
  logic        busy = 0, wt_en = 0, not_valid = 0, reject = 0, eob = 0;
  logic        set_ss3 = 0;
  logic [2:0]  slv_ss;
  logic        irb_select = 0, irb_write = 0, slv_as_fall = 0, fim_ack = 0;
  logic [3:0]  irb_block = 0, fim_block;
  logic        fim_interrupt, sr_line = 0, sr_ack = 0, sr_interrupt;
  logic [31:0] status;
  logic [5:0]  reg_addr = 0;
  logic [31:0] reg_rdata, param_rdata;
  logic [15:0] retry_count, arb_timeout;
  logic        slv_wt;

  fmi_core #(.QDEPTH(2)) dut (.*);
  // ---------------------------------------------------------- FMI side
  logic [63:0] fmem [64];
  int          seg_ss [$];
  int          seg_to [$];          // 0 none, 1 WT, 2 AK/DK, 3 arbitration
  int m_proc_cmd = 0, m_list = 0, m_hist = 0, m_block_dma = 0, m_illegal = 0, m_exc_int = 0;
  int m_overflow = 0, m_filtered = 0, m_ss_wt = 0, m_ss1 = 0, m_ss6 = 0, m_ss7 = 0;
  int m_ss2_eob = 0, m_ss3 = 0, m_csr0 = 0, m_reset_bus = 0, m_rcv_en = 0, m_param = 0;
  int m_param_reg = 0;
  int m_fim = 0, m_fim_busy = 0, m_sr_rcv = 0;
  int m_arb_to = 0, m_sr_req = 0, m_list_end = 0;
  logic [31:0] hist_seen_addr [$];
  logic [63:0] hist_seen_data [$];
  logic [31:0] xfer_seen [$];

  // memory: two clocks read latency, one-clock writes
  always @(posedge clk) begin
    if (mem_rd) begin
      logic [31:0] a;
      a = mem_addr;
      @(posedge clk);
      mem_rdata  <= fmem[a[8:3]];
      mem_rvalid <= 1;
      @(posedge clk);
      mem_rvalid <= 0;
    end
    if (mem_wr) begin
      fmem[mem_addr[8:3]] = mem_wdata;
      hist_seen_addr.push_back(mem_addr);
      hist_seen_data.push_back(mem_wdata);
    end
  end

  // segment driver model
  always @(posedge clk) begin
    if (seg_start) begin
      fmi_cmd_t c;
      int       s, t, words;
      c = seg_cmd;
      s = seg_ss.size() ? seg_ss.pop_front() : 0;
      t = seg_to.size() ? seg_to.pop_front() : 0;
      words = (c.op == OP_DATA && c.ms[0]) ? 4 : 0;
      repeat (3) @(posedge clk);
      for (int i = 0; i < words; i++) begin
        xfer_seen.push_back(xfer_addr);
        seg_word <= 1;
        @(posedge clk);
        seg_word <= 0;
        @(posedge clk);
      end
      cyc_done <= 1;
      cyc_addr <= c.op == OP_ADDR;
      cyc_arb  <= c.op == OP_ARB;
      cyc_ss   <= 3'(s);
      to_wt    <= t == 1;
      to_akdk  <= t == 2;
      to_arb   <= t == 3;
      @(posedge clk);
      cyc_done <= 0; cyc_ss <= 0; to_wt <= 0; to_akdk <= 0; to_arb <= 0;
    end
  end

  function automatic logic [63:0] cyc_cmd(input logic [1:0] op, input logic [2:0] ms,
      input logic eg_rd, input logic [6:0] ss_filter, input logic [2:0] to_filter,
      input logic [1:0] refm, input logic [31:0] data);
    return {op, ms, eg_rd, 4'b0000, ss_filter, to_filter, 1'b0, 9'd0, refm, data};
  endfunction
  function automatic logic [63:0] ctl_cmd(input logic [7:0] fn, input logic [21:0] mid,
                                          input logic [1:0] refm, input logic [31:0] data);
    return {2'b00, fn, mid[21:2], (mid[1:0] | refm), data};
  endfunction

  task automatic send_cmd(input logic [63:0] w);
    int n = 0;
    @(negedge clk);
    while (!cmd_ready && n < 200) begin @(negedge clk); n++; end
    cmd_data = w; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    m_proc_cmd++;
  endtask
  task automatic wait_idle();
    int n = 0;
    repeat (3) @(negedge clk);
    while ((!cmd_ready || list_mode) && n < 2000) begin @(negedge clk); n++; end
  endtask
  task automatic take_exception(input logic [5:0] expect_code, input string what);
    int n = 0;
    while (!exc_interrupt && n < 200) begin @(negedge clk); n++; end
    check(exc_interrupt, {what, ": interrupt raised"});
    check(exc_code == expect_code,
          $sformatf("%s: exception code %h (expected %h)", what, exc_code, expect_code));
    if (exc_interrupt) m_exc_int++;
    int_ack = 1;
    n = 0;
    while (exc_interrupt && n < 50) begin @(negedge clk); n++; end
    check(!exc_interrupt, {what, ": interrupt dropped on acknowledge"});
    int_ack = 0;
    @(negedge clk);
  endtask


  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int t;
    for (int i = 0; i < 64; i++) fmem[i] = 64'd0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // ================= FMI: processor-directed commands ===================
    send_cmd(ctl_cmd(FN_RESET_BUS, 0, 0, 0));
    fork
      begin t = 0; while (!reset_bus && t < 20) begin @(posedge clk); t++; end end
    join
    if (reset_bus) m_reset_bus++;
    wait_idle();
    send_cmd(ctl_cmd(FN_ENABLE_IRQRCV, 22'h200000, 0, 0));   // bit 53 = enable
    wait_idle();
    check(irq_rcv_en, "interrupt receiver enabled");
    if (irq_rcv_en) m_rcv_en++;
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'h2A, 14'd0}, 2'd0, 32'h1234));
    wait_idle();
    check(param_offset == 8'h2A && param_data == 32'h1234, "write parameter fields");
    // parameter registers: retry count, arbitration timeout, CSR8
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd12, 14'd0}, 2'd0, 32'h0005));
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd14, 14'd0}, 2'd0, 32'h0123));
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd40, 14'd0}, 2'd0, 32'h0091));
    wait_idle();
    reg_addr = 6'd12; #1;
    check(reg_rdata == 32'h0123_0005 && retry_count == 16'd5 && arb_timeout == 16'h123,
          "retry count and arbitration timeout registers");
    reg_addr = 6'd40; #1;
    check(reg_rdata[7:0] == 8'h91, "CSR8 arbitration level register");
    reg_addr = 6'd8; #1;
    check(reg_rdata == status, "status register at displacement 8");
    if (retry_count == 16'd5) m_param_reg++;
    m_param++;
    // illegal command: undefined control function
    send_cmd(ctl_cmd(8'h20, 0, 0, 0));
    take_exception(EXC_ILLEGAL, "illegal command");
    m_illegal++;
    // processor data cycle with SS=5: never masked in processor mode
    seg_ss.push_back(5); seg_to.push_back(0);
    send_cmd(cyc_cmd(OP_DATA, 3'd0, 1'b0, 7'd0, 3'd0, 2'd0, 32'h55));
    take_exception(EXC_DATA_SS_BASE + 6'd5, "processor data cycle SS=5");
    // arbitration timeout
    seg_ss.push_back(0); seg_to.push_back(3);
    send_cmd(cyc_cmd(OP_ARB, 3'd0, 1'b0, 7'd0, 3'd0, 2'd0, 32'h14));
    take_exception(EXC_ARB_TIMEOUT, "arbitration timeout");
    m_arb_to++;

    // ================= FMI: list-directed I/O =============================
    // list at 0x000: addr cycle; write (slave SS=2, not filtered); block read
    // (two words); terminate. History at 0x100, room for 2 entries.
    fmem[0] = cyc_cmd(OP_ADDR, 3'd1, 1'b1, 7'd0, 3'd0, 2'd0, 32'd7);
    fmem[1] = cyc_cmd(OP_DATA, 3'd0, 1'b0, 7'd0, 3'd0, 2'd0, 32'hBEEF);
    fmem[2] = cyc_cmd(OP_DATA, 3'd1, 1'b1, 7'd0, 3'd0, 2'd1, 32'h0000_0400);
    fmem[3] = {32'd0, 32'd4};                     // block of 4 words
    fmem[4] = ctl_cmd(FN_TERMINATE, 0, 0, 0);
    seg_ss = {0, 2, 0}; seg_to = {0, 0, 0};
    hist_seen_addr = {}; hist_seen_data = {}; xfer_seen = {};
    send_cmd(ctl_cmd(FN_EXECUTE_LIST, 22'd10, 0, 32'h0));
    send_cmd({32'd4, 32'h100});
    t = 0;
    while (!list_mode && t < 50) begin @(negedge clk); t++; end
    check(list_mode, "list mode entered");
    check(!cmd_ready, "processor port closed during the list");
    wait_idle();
    check(!list_mode && !exc_interrupt, "list ended by terminate, no exception");
    if (!list_mode && !exc_interrupt) m_list_end++;
    m_list++;
    check(hist_seen_addr.size() == 1, $sformatf("one history entry (%0d)", hist_seen_addr.size()));
    if (hist_seen_addr.size() == 1) begin
      check(hist_seen_addr[0] == 32'h100, "history address");
      check(hist_seen_data[0] == {32'd2, 32'h8}, $sformatf("history entry %h", hist_seen_data[0]));
      m_hist++;
    end
    check(xfer_seen.size() == 4 && xfer_seen[0] == 32'h400 && xfer_seen[3] == 32'h40C,
          "block DMA addresses step by 4");
    if (xfer_seen.size() == 4) m_block_dma++;
    // filtered SS=2 ends the list with exception 0Ah; the next command never runs
    fmem[8]  = cyc_cmd(OP_DATA, 3'd0, 1'b1, 7'b0000010, 3'd0, 2'd1, 32'h0);
    fmem[9]  = cyc_cmd(OP_ADDR, 3'd1, 1'b1, 7'd0, 3'd0, 2'd0, 32'd7);
    fmem[10] = ctl_cmd(FN_TERMINATE, 0, 0, 0);
    seg_ss = {2, 0}; seg_to = {0, 0};
    send_cmd(ctl_cmd(FN_EXECUTE_LIST, 22'd6, 0, 32'h40));
    send_cmd({32'd4, 32'h180});
    take_exception(EXC_DATA_SS_BASE + 6'd2, "filtered SS=2 in a list");
    wait_idle();
    check(seg_ss.size() == 1, "list stopped at the exception");
    if (seg_ss.size() == 1) m_filtered++;
    // history overflow: no room for an entry
    fmem[16] = cyc_cmd(OP_DATA, 3'd0, 1'b0, 7'd0, 3'd0, 2'd0, 32'h0);
    fmem[17] = ctl_cmd(FN_TERMINATE, 0, 0, 0);
    seg_ss = {3}; seg_to = {0};
    send_cmd(ctl_cmd(FN_EXECUTE_LIST, 22'd4, 0, 32'h80));
    send_cmd({32'd0, 32'h1C0});
    take_exception(EXC_OVERFLOW, "status history overflow");
    m_overflow++;
    wait_idle();

    // ================= FMI slave: CSR0 and SS responses ====================
    @(negedge clk); csr0_load = 1; csr0_wdata = 32'h0000_0016;   // LA, run, SR enable
    @(negedge clk); csr0_load = 0;
    check(csr0[1] && csr0[2] && csr0[4], "CSR0 set bits");
    @(negedge clk); set_sr = 1; @(negedge clk); set_sr = 0;
    check(sr_request, "SR requested");
    if (sr_request) m_sr_req++;
    @(negedge clk); csr0_load = 1; csr0_wdata = 32'h0026_0000;   // clear SR flag, run, LA
    @(negedge clk); csr0_load = 0;
    check(!sr_request && !csr0[2] && !csr0[1], "CSR0 clear bits");
    if (!csr0[2]) m_csr0++;
    // SS responses
    busy = 1; wt_en = 1; #1;
    check(slv_wt && slv_ss == 0, "BUSY with WT enable gives WT");
    if (slv_wt) m_ss_wt++;
    wt_en = 0; #1;
    check(slv_ss == 3'd1, "BUSY gives SS=1");
    if (slv_ss == 3'd1) m_ss1++;
    busy = 0; not_valid = 1; reject = 1; #1;
    check(slv_ss == 3'd6, "NOT_VALID with REJECT gives SS=6");
    if (slv_ss == 3'd6) m_ss6++;
    reject = 0; #1;
    check(slv_ss == 3'd7, "NOT_VALID gives SS=7");
    if (slv_ss == 3'd7) m_ss7++;
    not_valid = 0;
    set_ss3 = 1; #1;
    check(slv_ss == 3'd3, "SET_SS3 gives SS=3");
    if (slv_ss == 3'd3) m_ss3++;
    set_ss3 = 0;
    // EOB on one block cycle gives SS=2 on the next
    @(negedge clk); slv_block_mode = 1; eob = 1; slv_cycle_end = 1;
    @(negedge clk); eob = 0; slv_cycle_end = 0; #1;
    check(slv_ss == 3'd2, "EOB gives SS=2 on the following block cycle");
    if (slv_ss == 3'd2) m_ss2_eob++;
    slv_block_mode = 0;

    // FIM receiver: write to receiver block 6, AS(d) gives a FIM interrupt
    send_cmd(ctl_cmd(FN_ENABLE_IRQRCV, 22'h200000, 0, 0));
    send_cmd(ctl_cmd(FN_ENABLE_SRRCV, 22'h200000, 0, 0));
    wait_idle();
    check(status[21] && status[20], "status: FIM and SR receivers enabled");
    @(negedge clk); irb_select = 1; irb_block = 4'd6; irb_write = 1;
    @(negedge clk); irb_write = 0; irb_select = 0;
    @(negedge clk); slv_as_fall = 1;
    @(negedge clk); slv_as_fall = 0; #1;
    check(fim_interrupt && fim_block == 4'd6, "FIM interrupt names block 6");
    check(status[24] && status[15:12] == 4'd6, "status: FIM requesting, block 6");
    if (fim_interrupt) m_fim++;
    irb_select = 1; #1;
    check(slv_ss == 3'd1, "busy receiver block answers SS=1");
    if (slv_ss == 3'd1) m_fim_busy++;
    irb_select = 0;
    @(negedge clk); fim_ack = 1;
    @(negedge clk); fim_ack = 0; #1;
    check(!fim_interrupt && !status[24], "FIM acknowledge frees the block");
    // SR receiver
    @(negedge clk); sr_line = 1;
    @(negedge clk); #1;
    check(sr_interrupt && status[23], "SR(u) gives the SR interrupt");
    if (sr_interrupt) m_sr_rcv++;
    sr_line = 0;
    @(negedge clk); sr_ack = 1;
    @(negedge clk); sr_ack = 0; #1;
    check(!sr_interrupt, "SR acknowledge");
    check(status[5:0] == exc_code && status[19] == int_enable, "status: exception fields");

    check(m_fim > 0 && m_fim_busy > 0 && m_sr_rcv > 0, "receiver mechanisms");
    check(m_param_reg > 0, "parameter registers");
    check(m_reset_bus > 0 && m_rcv_en > 0 && m_param > 0 && m_illegal > 0, "control commands");
    check(m_list > 0 && m_hist > 0 && m_block_dma > 0 && m_filtered > 0 && m_overflow > 0,
          "list mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
