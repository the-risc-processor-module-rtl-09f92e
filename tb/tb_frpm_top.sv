// tb_frpm_top: end-to-end test of the whole design at its default parameters.
//
// The bench builds a FASTBUS segment around the processor module: the line
// levels are the OR of the module's master and slave drives, a second
// (bench) slave at slot 7 with an eight-word memory, a competing master with
// its own arbitration level, and an arbitration timing control that raises AG
// when AR is seen. A host task drives the PBus port-1 registers the way the
// driver software would. The module's own slave port, at slot 11, is reached
// through the segment by addressing it from the module's master side.
//
// On the FMI side the bench plays the processor (command port and interrupt
// acknowledge), the memory holding command lists and status history, the
// segment driver (reporting SS codes and timeouts chosen per command) and the
// user application lines of the FMI slave, including interrupt messages to
// a receiver block, SR(u) and status register reads. The FMI segment driver
// gets its own small segment model (AG for AR, AK following AS, DK following
// DS, slave read data) and runs arbitration, address, write, read and block
// cycles on it.
//
// Each mechanism is counted when it is seen; one that never happens is a
// failure. Expected values are worked out in the bench from the FASTBUS and
// FMI rules, not read from the design.
module tb_frpm_top;
  import frpm_pkg::*;
  import fmi_pkg::*;

  localparam logic [4:0] MY_GA    = 5'd11;
  localparam logic [4:0] BS_SLOT  = 5'd7;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;   // 25 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------------ DUT
  logic             pb_sel = 0, pb_wr = 0;
  logic [2:0]       pb_addr = 0;
  logic [31:0]      pb_wdata = 0, pb_rdata;
  fb_bus_t          bus;
  fb_master_drive_t mdrv;
  fb_slave_drive_t  sdrv;
  logic [2:0]       irq;
  logic             led_slave, led_master, srst;

  logic        fmi_cmd_valid = 0, fmi_cmd_ready, fmi_int_enable = 1, fmi_int_ack = 0;
  logic [63:0] fmi_cmd_data = 0;
  logic        fmi_interrupt, fmi_exc_lost, fmi_list_mode;
  logic [5:0]  fmi_exc_code;
  logic        fmi_mem_rd, fmi_mem_rvalid = 0, fmi_mem_wr;
  logic [31:0] fmi_mem_addr;
  logic [63:0] fmi_mem_rdata = 0, fmi_mem_wdata;
  logic        fmi_seg_start, fmi_seg_word = 0, fmi_cyc_done = 0, fmi_cyc_addr = 0;
  logic        fmi_cyc_arb = 0, fmi_to_wt = 0, fmi_to_akdk = 0, fmi_to_arb = 0, fmi_par_err = 0;
  logic [2:0]  fmi_cyc_ss = 0;
  fmi_cmd_t    fmi_seg_cmd;
  logic [31:0] fmi_xfer_addr;
  logic        fmi_reset_bus, fmi_irq_rcv_reset, fmi_irq_rcv_en, fmi_sr_rcv_reset, fmi_sr_rcv_en;
  logic        fmi_param_wr, fmi_param_rd;
  logic [7:0]  fmi_param_offset;
  logic [31:0] fmi_param_data;
  logic        fmi_power_up = 0, fmi_csr0_load = 0, fmi_set_error_flag = 0, fmi_set_halt = 0;
  logic        fmi_set_sr = 0, fmi_slv_parity_err = 0, fmi_active = 0;
  logic [31:0] fmi_csr0_wdata = 0;
  logic [15:0] fmi_csr0;
  logic        fmi_clear_error, fmi_csr0_reset, fmi_clear_data, fmi_sr_request;
  logic        fmi_slv_address_cycle = 0, fmi_slv_block_mode = 0, fmi_slv_cycle_end = 0;
  logic        fmi_busy = 0, fmi_wt_en = 0, fmi_not_valid = 0, fmi_reject = 0, fmi_eob = 0;
  logic        fmi_set_ss3 = 0;
  logic [2:0]  fmi_slv_ss;
  logic        fmi_irb_select = 0, fmi_irb_write = 0, fmi_slv_as_fall = 0, fmi_fim_ack = 0;
  logic [3:0]  fmi_irb_block = 0, fmi_fim_block;
  logic        fmi_fim_interrupt, fmi_sr_line = 0, fmi_sr_ack = 0, fmi_sr_interrupt;
  logic [31:0] fmi_status;
  logic [5:0]  fmi_reg_addr = 0;
  logic [31:0] fmi_reg_rdata, fmi_param_rdata;
  logic [15:0] fmi_retry_count, fmi_arb_timeout;
  // FMI segment driver and its own segment model
  logic        fmi_drv_reset = 0, fmi_drv_start = 0;
  fmi_cmd_t    fmi_drv_cmd = '0;
  logic [31:0] fmi_drv_block_words = 0, fmi_drv_xfer_wdata, fmi_drv_rdata;
  logic        fmi_drv_seg_word, fmi_drv_rvalid, fmi_drv_cyc_done, fmi_drv_cyc_addr, fmi_drv_cyc_arb;
  logic [2:0]  fmi_drv_cyc_ss;
  logic        fmi_drv_to_wt, fmi_drv_to_akdk, fmi_drv_to_arb, fmi_drv_par_err, fmi_drv_master;
  fb_bus_t          fmi_bus;
  fb_master_drive_t fmi_mdrv;
  logic        f_ag = 0, f_ak = 0, f_dk = 0;
  int          f_agc = 0, f_widx = 0, f_nwrites = 0;
  logic [31:0] f_last_write = 0, f_slave_data = 32'h0BAD_F00D;
  logic [31:0] f_words [2] = '{32'hFEED_0000, 32'hFEED_0001};
  always_comb begin
    fmi_bus = '0;
    fmi_bus.ar = fmi_mdrv.ar; fmi_bus.ag = f_ag; fmi_bus.al = fmi_mdrv.al; fmi_bus.gk = fmi_mdrv.gk;
    fmi_bus.as_ = fmi_mdrv.as_; fmi_bus.ds = fmi_mdrv.ds; fmi_bus.ms = fmi_mdrv.ms;
    fmi_bus.rd = fmi_mdrv.rd; fmi_bus.ak = f_ak; fmi_bus.dk = f_dk;
    fmi_bus.ad = fmi_mdrv.ad | ((fmi_mdrv.rd && fmi_mdrv.as_) ? f_slave_data : 32'd0);
  end
  always @(posedge clk) begin
    if (f_agc != 0) f_agc <= f_agc - 1;
    else if (fmi_mdrv.ar && !fmi_mdrv.gk) f_agc <= 9;
    f_ag <= f_agc > 3;
    f_ak <= fmi_mdrv.as_;
    if (fmi_mdrv.as_ && f_dk != fmi_mdrv.ds) begin
      f_dk <= fmi_mdrv.ds;
      if (!fmi_mdrv.rd) begin f_last_write <= fmi_mdrv.ad; f_nwrites++; end
    end
    if (!fmi_mdrv.as_) f_dk <= 1'b0;
    if (fmi_drv_seg_word) f_widx <= f_widx + 1;
  end
  assign fmi_drv_xfer_wdata = f_words[f_widx[0]];
  logic        fmi_slv_wt;

  frpm_top dut (.ga(MY_GA), .*);

  // ------------------------------------------------------- FASTBUS segment
  // bench slave drive
  logic        bs_ak = 0, bs_dk = 0, bs_wt = 0, bs_pa = 0, bs_pe = 0, bs_ad_en = 0;
  logic [2:0]  bs_ss = 0;
  logic [31:0] bs_ad = 0;
  // competitor and timing control
  logic        ag = 0, comp_req = 0, comp_gk = 0, prev_gk = 0, sr_line = 0, bh_line = 0;
  logic [5:0]  comp_level = 0, comp_al;

  always_comb begin
    logic b;
    b = 0;
    for (int i = 5; i >= 0; i--) begin
      comp_al[i] = comp_req & ag & comp_level[i] & ~b;
      if (bus.al[i] & ~comp_level[i]) b = 1;
    end
  end

  always_comb begin
    bus     = '0;
    bus.ar  = mdrv.ar | comp_req;
    bus.ag  = ag;
    bus.al  = mdrv.al | comp_al;
    bus.gk  = mdrv.gk | comp_gk | prev_gk;
    bus.as_ = mdrv.as_;
    bus.ds  = mdrv.ds;
    bus.eg  = mdrv.eg;
    bus.ms  = mdrv.ms;
    bus.rd  = mdrv.rd;
    bus.rb  = mdrv.rb;
    bus.bh  = bh_line;
    bus.sr  = sr_line;
    bus.ak  = sdrv.ak | bs_ak;
    bus.dk  = sdrv.dk | bs_dk;
    bus.wt  = sdrv.wt | bs_wt;
    bus.ss  = sdrv.ss | bs_ss;
    bus.pa  = mdrv.pa | sdrv.pa | bs_pa;
    bus.pe  = mdrv.pe | sdrv.pe | bs_pe;
    bus.ad  = (mdrv.ad_en ? mdrv.ad : 32'd0) | (sdrv.ad_en ? sdrv.ad : 32'd0) |
              (bs_ad_en ? bs_ad : 32'd0);
  end

  // mechanism counters
  int m_arb_win = 0, m_arb_loss = 0, m_addr = 0, m_write = 0, m_read = 0, m_block = 0;
  int m_irq_ss = 0, m_irq_sr = 0, m_irq_akdk = 0, m_perr = 0, m_slave_id = 0;
  int m_slave_ss7 = 0, m_slave_ss6 = 0, m_srst = 0, m_led_stretch = 0, m_rb = 0;
  int m_comp_master = 0;

  // arbitration timing control: AG for 10 clocks whenever AR is asserted and
  // no grant is in progress
  int ag_hold = 0;
  always @(posedge clk) begin
    if (ag) begin
      ag_hold <= ag_hold - 1;
      if (ag_hold == 1) begin
        ag <= 0;
        if (comp_req && bus.al == comp_level) begin
          comp_req <= 0;
          comp_gk  <= 1;
          m_comp_master++;
        end
      end
    end else if (bus.ar && !ag && !comp_gk) begin
      ag      <= 1;
      ag_hold <= 10;
    end
  end
  // competitor keeps the bus for 20 clocks once it has won
  int comp_t = 0;
  always @(posedge clk) begin
    if (comp_gk) begin
      comp_t <= comp_t + 1;
      if (comp_t == 20) begin comp_gk <= 0; comp_t <= 0; end
    end
  end

  // bench slave at slot BS_SLOT
  logic [31:0] bs_mem [8];
  int          bs_ptr = 0;
  bit          bs_attached = 0, bs_bad_parity = 0, as_q = 0, ds_q = 0;
  logic [2:0]  bs_next_ss = 0;
  always @(posedge clk) begin
    as_q <= bus.as_;
    ds_q <= bus.ds;
    if (bus.as_ && !as_q && bus.eg && bus.ad[4:0] == BS_SLOT) begin
      bs_attached <= 1;
      bs_ptr      <= 0;
      repeat (2) @(posedge clk);
      bs_ss <= 3'd0;
      bs_ak <= 1;
    end else if (!bus.as_ && as_q && bs_attached) begin
      bs_attached <= 0; bs_ak <= 0; bs_dk <= 0; bs_ss <= 0; bs_ad_en <= 0; bs_pe <= 0;
      bs_pa <= 0;
    end else if (bs_attached && bus.ds != ds_q) begin
      logic dsv;
      dsv = bus.ds;
      repeat (2) @(posedge clk);
      if (bus.rd) begin
        bs_ad    <= bs_mem[bs_ptr];
        bs_pa    <= fb_parity(bs_mem[bs_ptr], 1'b1) ^ bs_bad_parity;
        bs_pe    <= 1;
        bs_ad_en <= 1;
      end else begin
        bs_mem[bs_ptr] = bus.ad;
        bs_ad_en <= 0; bs_pe <= 0; bs_pa <= 0;
      end
      bs_ptr <= (bs_ptr + 1) % 8;
      bs_ss  <= bs_next_ss;
      bs_dk  <= dsv;
    end
  end

  // ------------------------------------------------------------- host side
  task automatic pwr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); pb_sel = 1; pb_wr = 1; pb_addr = a; pb_wdata = d;
    @(negedge clk); pb_sel = 0; pb_wr = 0;
  endtask
  task automatic prd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); pb_sel = 1; pb_wr = 0; pb_addr = a;
    #1 d = pb_rdata;
    @(negedge clk); pb_sel = 0;
  endtask

  logic [31:0] status_base = 0;     // enables kept by the host
  task automatic wstatus(input logic [31:0] extra);
    pwr(3'd0, status_base | extra);
  endtask

  task automatic wait_master(output bit ok);
    logic [31:0] s;
    int n = 0;
    ok = 0;
    do begin prd(3'd0, s); n++; end while (!s[ST_MASTER] && n < 200);
    ok = s[ST_MASTER];
  endtask

  task automatic addr_cycle(input logic [4:0] slot, input logic [2:0] ms, output logic [2:0] ss);
    logic [31:0] r;
    int n = 0;
    pwr(3'd3, {27'd0, slot});
    pwr(3'd2, {24'd0, 1'b1, 2'b00, 1'b1, 1'b1, ms});
    do begin prd(3'd2, r); n++; end while (!r[6] && n < 100);
    check(r[6], "AK seen");
    prd(3'd0, r);
    ss = r[ST_SS_LSB+:3];
    m_addr++;
  endtask
  task automatic release_addr();
    pwr(3'd2, 32'h0);
    repeat (3) @(negedge clk);
  endtask

  // one data cycle: writes register 4 with bit 7 = go and waits for DK to follow
  task automatic data_cycle(input logic go, input logic rd, input logic [2:0] ms,
                            output logic [31:0] rdat, output logic [2:0] ss);
    logic [31:0] r;
    int n = 0;
    pwr(3'd4, {24'd0, go, 2'b00, 1'b1, rd, ms});
    do begin prd(3'd4, r); n++; end while (r[6] != go && n < 100);
    check(r[6] == go, "DK followed DS");
    do begin prd(3'd0, r); n++; end while (r[ST_DATA_BUSY] && n < 100);
    ss = r[ST_SS_LSB+:3];
    prd(3'd5, rdat);
  endtask
  // single-word cycle: DS up then down
  task automatic single(input logic rd, input logic [2:0] ms, input logic [31:0] wdat,
                        output logic [31:0] rdat, output logic [2:0] ss);
    logic [31:0] dummy;
    logic [2:0]  ss2;
    if (!rd) pwr(3'd5, wdat);
    data_cycle(1'b1, rd, ms, rdat, ss);
    data_cycle(1'b0, rd, ms, dummy, ss2);
  endtask

  // ---------------------------------------------------------- FMI side
  logic [63:0] fmem [64];
  int          seg_ss [$];
  int          seg_to [$];          // 0 none, 1 WT, 2 AK/DK, 3 arbitration
  int m_proc_cmd = 0, m_list = 0, m_hist = 0, m_block_dma = 0, m_illegal = 0, m_exc_int = 0;
  int m_overflow = 0, m_filtered = 0, m_ss_wt = 0, m_ss1 = 0, m_ss6 = 0, m_ss7 = 0;
  int m_ss2_eob = 0, m_ss3 = 0, m_csr0 = 0, m_reset_bus = 0, m_rcv_en = 0, m_param = 0;
  int m_drv_arb = 0, m_drv_addr = 0, m_drv_data = 0, m_drv_block = 0;
  int m_param_reg = 0;
  int m_fim = 0, m_fim_busy = 0, m_sr_rcv = 0;
  int m_arb_to = 0, m_sr_req = 0, m_list_end = 0;
  logic [31:0] hist_seen_addr [$];
  logic [63:0] hist_seen_data [$];
  logic [31:0] xfer_seen [$];

  // memory: two clocks read latency, one-clock writes
  always @(posedge clk) begin
    if (fmi_mem_rd) begin
      logic [31:0] a;
      a = fmi_mem_addr;
      @(posedge clk);
      fmi_mem_rdata  <= fmem[a[8:3]];
      fmi_mem_rvalid <= 1;
      @(posedge clk);
      fmi_mem_rvalid <= 0;
    end
    if (fmi_mem_wr) begin
      fmem[fmi_mem_addr[8:3]] = fmi_mem_wdata;
      hist_seen_addr.push_back(fmi_mem_addr);
      hist_seen_data.push_back(fmi_mem_wdata);
    end
  end

  // segment driver model
  always @(posedge clk) begin
    if (fmi_seg_start) begin
      fmi_cmd_t c;
      int       s, t, words;
      c = fmi_seg_cmd;
      s = seg_ss.size() ? seg_ss.pop_front() : 0;
      t = seg_to.size() ? seg_to.pop_front() : 0;
      words = (c.op == OP_DATA && c.ms[0]) ? 4 : 0;
      repeat (3) @(posedge clk);
      for (int i = 0; i < words; i++) begin
        xfer_seen.push_back(fmi_xfer_addr);
        fmi_seg_word <= 1;
        @(posedge clk);
        fmi_seg_word <= 0;
        @(posedge clk);
      end
      fmi_cyc_done <= 1;
      fmi_cyc_addr <= c.op == OP_ADDR;
      fmi_cyc_arb  <= c.op == OP_ARB;
      fmi_cyc_ss   <= 3'(s);
      fmi_to_wt    <= t == 1;
      fmi_to_akdk  <= t == 2;
      fmi_to_arb   <= t == 3;
      @(posedge clk);
      fmi_cyc_done <= 0; fmi_cyc_ss <= 0; fmi_to_wt <= 0; fmi_to_akdk <= 0; fmi_to_arb <= 0;
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

  task automatic drv_run(input fmi_cmd_t x, output int n);
    @(negedge clk); fmi_drv_cmd = x; fmi_drv_start = 1;
    @(negedge clk); fmi_drv_start = 0; n = 1;
    while (!fmi_drv_cyc_done && n < 3000) begin @(negedge clk); n++; end
    @(negedge clk);
  endtask
  task automatic send_cmd(input logic [63:0] w);
    int n = 0;
    @(negedge clk);
    while (!fmi_cmd_ready && n < 200) begin @(negedge clk); n++; end
    fmi_cmd_data = w; fmi_cmd_valid = 1;
    @(negedge clk); fmi_cmd_valid = 0;
    m_proc_cmd++;
  endtask
  task automatic wait_idle();
    int n = 0;
    repeat (3) @(negedge clk);
    while ((!fmi_cmd_ready || fmi_list_mode) && n < 2000) begin @(negedge clk); n++; end
  endtask
  task automatic take_exception(input logic [5:0] expect_code, input string what);
    int n = 0;
    while (!fmi_interrupt && n < 200) begin @(negedge clk); n++; end
    check(fmi_interrupt, {what, ": interrupt raised"});
    check(fmi_exc_code == expect_code,
          $sformatf("%s: exception code %h (expected %h)", what, fmi_exc_code, expect_code));
    if (fmi_interrupt) m_exc_int++;
    fmi_int_ack = 1;
    n = 0;
    while (fmi_interrupt && n < 50) begin @(negedge clk); n++; end
    check(!fmi_interrupt, {what, ": interrupt dropped on acknowledge"});
    fmi_int_ack = 0;
    @(negedge clk);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    logic [31:0] r, rdat;
    logic [2:0]  ss;
    bit          ok;
    int          t;
    for (int i = 0; i < 8; i++) bs_mem[i] = 32'hA500_0000 + i;
    for (int i = 0; i < 64; i++) fmem[i] = 64'd0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ================= FRPM: arbitration =================================
    status_base = (32'h1 << ST_IE_SS) | (32'h1 << ST_IE_SR) | (32'h1 << ST_IE_AKDK) |
                  (32'h1 << ST_IE_SBUS) | (32'h1 << ST_PE_EN);
    wstatus(0);
    // a competitor with a higher level requests at the same time
    comp_level = 6'd50; comp_req = 1;
    pwr(3'd1, {16'd0, 1'b1, 7'd0, 8'd20});
    t = 0;
    while (!comp_gk && t < 200) begin @(negedge clk); t++; end
    prd(3'd0, r);
    if (comp_gk && !r[ST_MASTER]) m_arb_loss++;
    check(comp_gk && !r[ST_MASTER], "higher competitor wins, module waits");
    wait_master(ok);
    check(ok, "module becomes master after the competitor releases");
    if (ok) m_arb_win++;
    check(led_master, "master LED lit");

    // ================= FRPM: cycles to the bench slave ===================
    addr_cycle(BS_SLOT, 3'd0, ss);
    check(ss == 0, "address cycle SS=0");
    check(irq[2], "AK interrupt");
    if (irq[2]) m_irq_akdk++;
    wstatus(0);                              // clear requests
    // single-word write then read back
    bs_next_ss = 0;
    single(1'b0, 3'd0, 32'h1111_2222, rdat, ss);
    check(bs_mem[0] == 32'h1111_2222, "write reached the slave");
    if (bs_mem[0] == 32'h1111_2222) m_write++;
    single(1'b1, 3'd0, 0, rdat, ss);
    check(rdat == 32'hA500_0002, $sformatf("single read %h", rdat));
    if (rdat == 32'hA500_0002) m_read++;
    // slave answers SS=2 on a read: SS interrupt
    wstatus(0);
    bs_next_ss = 3'd2;
    single(1'b1, 3'd0, 0, rdat, ss);
    check(ss == 3'd2, "SS=2 reported in the status register");
    check(irq[0], "SS interrupt");
    if (irq[0] && ss == 3'd2) m_irq_ss++;
    bs_next_ss = 0;
    wstatus(0);
    // parity error on a read
    bs_bad_parity = 1;
    single(1'b1, 3'd0, 0, rdat, ss);
    prd(3'd0, r);
    check(r[ST_PERR], "parity error flagged");
    if (r[ST_PERR]) m_perr++;
    bs_bad_parity = 0;
    release_addr();
    // block read: four words, one per DS transition
    addr_cycle(BS_SLOT, 3'd0, ss);
    begin
      bit blk_ok = 1;
      for (int i = 0; i < 4; i++) begin
        data_cycle(i % 2 == 0, 1'b1, 3'd1, rdat, ss);
        if (rdat != bs_mem[i]) blk_ok = 0;
      end
      pwr(3'd4, {24'd0, 8'b0001_1000});     // end block, DS already low
      check(blk_ok, "block read words in order");
      if (blk_ok) m_block++;
    end
    release_addr();
    // SR line
    wstatus(0);
    @(negedge clk); sr_line = 1;
    repeat (3) @(negedge clk);
    check(irq[1], "SR interrupt");
    if (irq[1]) m_irq_sr++;
    sr_line = 0;
    wstatus(0);

    // ================= FRPM: own slave port through the segment ==========
    addr_cycle(MY_GA, 3'd1, ss);
    check(ss == 0, "own slave attached in CSR space");
    check(led_slave, "slave LED lit");
    single(1'b1, 3'd0, 0, rdat, ss);           // NTA is 0 after attach? read CSR0
    check(rdat[31:16] == FRPM_MODULE_ID, $sformatf("CSR0 module ID %h", rdat[31:16]));
    if (rdat[31:16] == FRPM_MODULE_ID) m_slave_id++;
    single(1'b0, 3'd2, 32'd3, rdat, ss);       // NTA = 3: not provided
    single(1'b1, 3'd0, 0, rdat, ss);
    check(ss == 3'd7, "unprovided CSR gives SS=7");
    if (ss == 3'd7) m_slave_ss7++;
    single(1'b1, 3'd5, 0, rdat, ss);
    check(ss == 3'd6, "unsupported MS gives SS=6");
    if (ss == 3'd6) m_slave_ss6++;
    single(1'b0, 3'd2, 32'd0, rdat, ss);
    single(1'b0, 3'd0, 32'h4000_0000, rdat, ss);   // CSR0 bit 30: reset
    release_addr();
    addr_cycle(MY_GA, 3'd3, ss);
    check(ss == 3'd6, "unsupported address MS gives SS=6");
    if (ss == 3'd6) m_slave_ss6++;
    release_addr();
    wstatus(0);
    // reset bus: RB held by the host also keeps GK
    wstatus(32'h1 << ST_RB);
    repeat (2) @(negedge clk);
    check(bus.rb, "RB driven");
    if (bus.rb) m_rb++;
    wstatus(0);
    // release the bus
    pwr(3'd1, {16'd0, 1'b0, 7'd0, 8'd20});
    repeat (4) @(negedge clk);
    prd(3'd0, r);
    check(!r[ST_MASTER] && !mdrv.gk, "bus released");
    // LED stretch: still lit well after the last activity, dark later
    repeat (1000) @(negedge clk);
    check(led_slave && led_master, "LEDs stretched");
    t = 0;
    while ((led_slave || led_master) && t < 600_000) begin @(negedge clk); t++; end
    check(!led_slave && !led_master, "LEDs go dark after the stretch");
    if (!led_slave && !led_master) m_led_stretch++;

    // ================= FMI: processor-directed commands ===================
    send_cmd(ctl_cmd(FN_RESET_BUS, 0, 0, 0));
    fork
      begin t = 0; while (!fmi_reset_bus && t < 20) begin @(posedge clk); t++; end end
    join
    if (fmi_reset_bus) m_reset_bus++;
    wait_idle();
    send_cmd(ctl_cmd(FN_ENABLE_IRQRCV, 22'h200000, 0, 0));   // bit 53 = enable
    wait_idle();
    check(fmi_irq_rcv_en, "interrupt receiver enabled");
    if (fmi_irq_rcv_en) m_rcv_en++;
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'h2A, 14'd0}, 2'd0, 32'h1234));
    wait_idle();
    check(fmi_param_offset == 8'h2A && fmi_param_data == 32'h1234, "write parameter fields");
    // parameter registers: retry count, arbitration timeout, CSR8
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd12, 14'd0}, 2'd0, 32'h0005));
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd14, 14'd0}, 2'd0, 32'h0123));
    send_cmd(ctl_cmd(FN_WRITE_PARAM, {8'd40, 14'd0}, 2'd0, 32'h0091));
    wait_idle();
    fmi_reg_addr = 6'd12; #1;
    check(fmi_reg_rdata == 32'h0123_0005 && fmi_retry_count == 16'd5 && fmi_arb_timeout == 16'h123,
          "retry count and arbitration timeout registers");
    fmi_reg_addr = 6'd40; #1;
    check(fmi_reg_rdata[7:0] == 8'h91, "CSR8 arbitration level register");
    fmi_reg_addr = 6'd8; #1;
    check(fmi_reg_rdata == fmi_status, "status register at displacement 8");
    if (fmi_retry_count == 16'd5) m_param_reg++;
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
    while (!fmi_list_mode && t < 50) begin @(negedge clk); t++; end
    check(fmi_list_mode, "list mode entered");
    check(!fmi_cmd_ready, "processor port closed during the list");
    wait_idle();
    check(!fmi_list_mode && !fmi_interrupt, "list ended by terminate, no exception");
    if (!fmi_list_mode && !fmi_interrupt) m_list_end++;
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
    @(negedge clk); fmi_csr0_load = 1; fmi_csr0_wdata = 32'h0000_0016;   // LA, run, SR enable
    @(negedge clk); fmi_csr0_load = 0;
    check(fmi_csr0[1] && fmi_csr0[2] && fmi_csr0[4], "CSR0 set bits");
    @(negedge clk); fmi_set_sr = 1; @(negedge clk); fmi_set_sr = 0;
    check(fmi_sr_request, "SR requested");
    if (fmi_sr_request) m_sr_req++;
    @(negedge clk); fmi_csr0_load = 1; fmi_csr0_wdata = 32'h0026_0000;   // clear SR flag, run, LA
    @(negedge clk); fmi_csr0_load = 0;
    check(!fmi_sr_request && !fmi_csr0[2] && !fmi_csr0[1], "CSR0 clear bits");
    if (!fmi_csr0[2]) m_csr0++;
    // SS responses
    fmi_busy = 1; fmi_wt_en = 1; #1;
    check(fmi_slv_wt && fmi_slv_ss == 0, "BUSY with WT enable gives WT");
    if (fmi_slv_wt) m_ss_wt++;
    fmi_wt_en = 0; #1;
    check(fmi_slv_ss == 3'd1, "BUSY gives SS=1");
    if (fmi_slv_ss == 3'd1) m_ss1++;
    fmi_busy = 0; fmi_not_valid = 1; fmi_reject = 1; #1;
    check(fmi_slv_ss == 3'd6, "NOT_VALID with REJECT gives SS=6");
    if (fmi_slv_ss == 3'd6) m_ss6++;
    fmi_reject = 0; #1;
    check(fmi_slv_ss == 3'd7, "NOT_VALID gives SS=7");
    if (fmi_slv_ss == 3'd7) m_ss7++;
    fmi_not_valid = 0;
    fmi_set_ss3 = 1; #1;
    check(fmi_slv_ss == 3'd3, "SET_SS3 gives SS=3");
    if (fmi_slv_ss == 3'd3) m_ss3++;
    fmi_set_ss3 = 0;
    // EOB on one block cycle gives SS=2 on the next
    @(negedge clk); fmi_slv_block_mode = 1; fmi_eob = 1; fmi_slv_cycle_end = 1;
    @(negedge clk); fmi_eob = 0; fmi_slv_cycle_end = 0; #1;
    check(fmi_slv_ss == 3'd2, "EOB gives SS=2 on the following block cycle");
    if (fmi_slv_ss == 3'd2) m_ss2_eob++;
    fmi_slv_block_mode = 0;

    // FIM receiver: write to receiver block 6, AS(d) gives a FIM interrupt
    send_cmd(ctl_cmd(FN_ENABLE_IRQRCV, 22'h200000, 0, 0));
    send_cmd(ctl_cmd(FN_ENABLE_SRRCV, 22'h200000, 0, 0));
    wait_idle();
    check(fmi_status[21] && fmi_status[20], "status: FIM and SR receivers enabled");
    @(negedge clk); fmi_irb_select = 1; fmi_irb_block = 4'd6; fmi_irb_write = 1;
    @(negedge clk); fmi_irb_write = 0; fmi_irb_select = 0;
    @(negedge clk); fmi_slv_as_fall = 1;
    @(negedge clk); fmi_slv_as_fall = 0; #1;
    check(fmi_fim_interrupt && fmi_fim_block == 4'd6, "FIM interrupt names block 6");
    check(fmi_status[24] && fmi_status[15:12] == 4'd6, "status: FIM requesting, block 6");
    if (fmi_fim_interrupt) m_fim++;
    fmi_irb_select = 1; #1;
    check(fmi_slv_ss == 3'd1, "busy receiver block answers SS=1");
    if (fmi_slv_ss == 3'd1) m_fim_busy++;
    fmi_irb_select = 0;
    @(negedge clk); fmi_fim_ack = 1;
    @(negedge clk); fmi_fim_ack = 0; #1;
    check(!fmi_fim_interrupt && !fmi_status[24], "FIM acknowledge frees the block");
    // SR receiver
    @(negedge clk); fmi_sr_line = 1;
    @(negedge clk); #1;
    check(fmi_sr_interrupt && fmi_status[23], "SR(u) gives the SR interrupt");
    if (fmi_sr_interrupt) m_sr_rcv++;
    fmi_sr_line = 0;
    @(negedge clk); fmi_sr_ack = 1;
    @(negedge clk); fmi_sr_ack = 0; #1;
    check(!fmi_sr_interrupt, "SR acknowledge");
    check(fmi_status[5:0] == fmi_exc_code && fmi_status[19] == fmi_int_enable, "status: exception fields");

    // FMI segment driver on its own segment: arbitrate, address, write, read,
    // a two-word block write, then release the bus
    begin
      fmi_cmd_t dc;
      int n;
      dc = '0; dc.op = OP_ARB; dc.hold_gk = 1; dc.arb_level = 8'd12;
      drv_run(dc, n);
      check(fmi_drv_cyc_arb && !fmi_drv_to_arb && fmi_drv_master, "FMI driver wins arbitration");
      if (fmi_drv_master) m_drv_arb++;
      dc = '0; dc.op = OP_ADDR; dc.hold_as = 1; dc.hold_gk = 1; dc.ref_data = 32'h0000_0700;
      drv_run(dc, n);
      check(fmi_drv_cyc_addr && !fmi_drv_to_akdk && fmi_mdrv.as_, "FMI driver address cycle");
      if (fmi_drv_cyc_addr && !fmi_drv_to_akdk) m_drv_addr++;
      dc.op = OP_DATA; dc.ms = 3'd0; dc.eg_rd = 0; dc.ref_data = 32'h1357_2468;
      drv_run(dc, n);
      check(f_last_write == 32'h1357_2468 && !fmi_drv_to_akdk, "FMI driver write data cycle");
      if (f_last_write == 32'h1357_2468) m_drv_data++;
      dc.eg_rd = 1;
      drv_run(dc, n);
      check(fmi_drv_rdata == 32'h0BAD_F00D, "FMI driver read data latched at DK");
      if (fmi_drv_rdata == 32'h0BAD_F00D) m_drv_data++;
      dc.eg_rd = 0; dc.ms = 3'd1; fmi_drv_block_words = 2; f_nwrites = 0; f_widx = 0;
      drv_run(dc, n);
      check(f_nwrites == 2 && f_last_write == 32'hFEED_0001, "FMI driver block write");
      if (f_nwrites == 2) m_drv_block++;
      dc.ms = 3'd0; dc.hold_as = 0; dc.hold_gk = 0;
      drv_run(dc, n);
      repeat (3) @(negedge clk);
      check(!fmi_drv_master && !fmi_mdrv.as_ && !fmi_mdrv.gk, "FMI driver releases the bus");
    end

    // ================= mechanism coverage =================================
    check(m_arb_win > 0, "mechanism: arbitration won");
    check(m_arb_loss > 0, "mechanism: arbitration lost");
    check(m_comp_master > 0, "mechanism: other master served");
    check(m_addr > 0, "mechanism: address cycle");
    check(m_write > 0, "mechanism: write data cycle");
    check(m_read > 0, "mechanism: read data cycle");
    check(m_block > 0, "mechanism: block transfer");
    check(m_irq_ss > 0, "mechanism: SS interrupt");
    check(m_irq_sr > 0, "mechanism: SR interrupt");
    check(m_irq_akdk > 0, "mechanism: AK/DK interrupt");
    check(m_perr > 0, "mechanism: parity error");
    check(m_slave_id > 0, "mechanism: slave CSR0 read");
    check(m_slave_ss7 > 0, "mechanism: slave SS=7");
    check(m_slave_ss6 > 1, "mechanism: slave SS=6 (data and address)");
    check(m_srst > 0, "mechanism: slave reset");
    check(m_rb > 0, "mechanism: reset bus line");
    check(m_led_stretch > 0, "mechanism: LED stretch");
    check(m_proc_cmd > 0, "mechanism: processor command");
    check(m_reset_bus > 0, "mechanism: FMI reset bus");
    check(m_rcv_en > 0, "mechanism: receiver enable");
    check(m_param > 0, "mechanism: parameter write");
    check(m_illegal > 0, "mechanism: illegal command");
    check(m_exc_int > 0, "mechanism: exception interrupt");
    check(m_arb_to > 0, "mechanism: arbitration timeout");
    check(m_list > 0 && m_list_end > 0, "mechanism: list execution and end");
    check(m_hist > 0, "mechanism: status history");
    check(m_block_dma > 0, "mechanism: block DMA");
    check(m_filtered > 0, "mechanism: filtered exception ends list");
    check(m_overflow > 0, "mechanism: history overflow");
    check(m_csr0 > 0, "mechanism: FMI CSR0 load");
    check(m_sr_req > 0, "mechanism: FMI SR request");
    check(m_ss_wt > 0 && m_ss1 > 0, "mechanism: BUSY response");
    check(m_ss6 > 0 && m_ss7 > 0, "mechanism: NOT_VALID response");
    check(m_ss3 > 0 && m_ss2_eob > 0, "mechanism: SET_SS3 and EOB responses");
    check(m_fim > 0 && m_fim_busy > 0, "mechanism: FIM interrupt and busy block");
    check(m_sr_rcv > 0, "mechanism: SR receiver interrupt");
    check(m_param_reg > 0, "mechanism: FMI parameter registers");
    check(m_drv_arb > 0 && m_drv_addr > 0, "mechanism: FMI driver arbitration and address");
    check(m_drv_data > 1 && m_drv_block > 0, "mechanism: FMI driver data and block cycles");
    $display("mechanisms: arb win %0d loss %0d addr %0d wr %0d rd %0d block %0d ssirq %0d srirq %0d akdk %0d perr %0d",
             m_arb_win, m_arb_loss, m_addr, m_write, m_read, m_block, m_irq_ss, m_irq_sr, m_irq_akdk, m_perr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (srst) m_srst++;
endmodule
