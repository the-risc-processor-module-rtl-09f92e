// frpm_interface: the FRPM standard-logic FASTBUS interface, as seen from PBus
// port 1 of the host's SBus bridge.
//
// The interface works by primitive operations: the host program runs every
// arbitration, address and data cycle itself through six registers, and does
// all time-outs, block and pipeline sequencing in software. There are no list
// or buffer memories. The block joins:
//   frpm_pbus_regs   register file and read-back (registers 0..5)
//   frpm_arbiter     AR/AL/GK arbitration and mastership (register 1)
//   frpm_addr_cycle  address cycle (registers 2 and 3)
//   frpm_data_cycle  data cycles and the two-register data port (4 and 5)
//   frpm_irq         IRQ0 SS!=0, IRQ1 SR, IRQ2 AK=1/DK(t)
//   frpm_slave_port  the geographical CSR slave (CSR0, CSR8, CSR9)
//   frpm_led_driver  slave- and master-activity LEDs
// The segment is represented by `bus`, the levels on the backplane, and two
// drive bundles (master and slave side) which the backplane wire-ORs with every
// other module; the drivers and receivers themselves are not part of the RTL.
// The "current cycle" status fields (SS, WT) hold the values captured at the
// latest AK(u) or DK(t) of the FRPM's own cycles; AK and DK are the live lines.
module frpm_interface
  import frpm_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES  = 4,
  parameter int unsigned SKEW_CYCLES    = 2,
  parameter int unsigned CLK_HZ         = 25_000_000,
  parameter int unsigned STRETCH_CYCLES = (CLK_HZ / 1000) * 198 / 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       ga,
  input  logic             pb_sel,
  input  logic             pb_wr,
  input  logic [2:0]       pb_addr,
  input  logic [31:0]      pb_wdata,
  output logic [31:0]      pb_rdata,
  input  fb_bus_t          bus,
  output fb_master_drive_t mdrv,
  output fb_slave_drive_t  sdrv,
  output logic [2:0]       irq,
  output logic             led_slave,
  output logic             led_master,
  output logic             srst
);

  logic        status_wr, addr_ctl_wr, data_ctl_wr, data_wr;
  logic        arb_en, io_reset, rb, sbus_irq_en, pe_en;
  logic [7:0]  csr8, addr_ctl_rdata, data_ctl_rdata;
  logic [31:0] address, data_rdata;
  logic [3:0]  csr9_hi, csr0_bits;
  logic [2:0]  irq_enable, irq_pending;
  logic        master, arb_lost;
  logic [2:0]  cur_ss;
  logic        cur_wt;

  // address-cycle outputs
  logic        a_as, a_eg, a_ad_en, a_pa, ak_rise, a_wt, a_active;
  logic [2:0]  a_ms, a_ss;
  logic [31:0] a_ad;
  // data-cycle outputs
  logic        d_ds, d_rd, d_ad_en, d_pa, d_pe, dk_edge, d_wt, d_perr, d_busy;
  logic [2:0]  d_ms, d_ss;
  logic [31:0] d_ad;
  logic        slave_attached;

  frpm_pbus_regs u_regs (
    .clk, .rst_n, .pb_sel, .pb_wr, .pb_addr, .pb_wdata, .pb_rdata,
    .status_wr, .addr_ctl_wr, .data_ctl_wr, .data_wr,
    .arb_en, .csr8, .address, .csr9_hi, .io_reset, .rb, .irq_enable,
    .sbus_irq_en, .pe_en,
    .csr0_bits, .addr_ctl_rdata, .data_ctl_rdata, .data_rdata,
    .bus_rb(bus.rb), .bus_bh(bus.bh), .bus_sr(bus.sr),
    .cur_ss(cur_ss), .cur_wt(cur_wt), .cur_ak(bus.ak & master),
    .cur_dk(bus.dk & master), .parity_err(d_perr), .slave_active(slave_attached),
    .data_busy(d_busy), .master
  );

  frpm_arbiter #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_arb (
    .clk, .rst_n, .io_reset, .arb_en, .level(csr8[5:0]), .iai(csr8[7]),
    .rb_hold(rb), .bus_ag(bus.ag), .bus_ai(bus.ai), .bus_al(bus.al),
    .bus_gk(bus.gk), .ar(mdrv.ar), .al(mdrv.al), .gk(mdrv.gk), .master,
    .lost(arb_lost)
  );

  frpm_addr_cycle #(.SKEW_CYCLES(SKEW_CYCLES)) u_addr (
    .clk, .rst_n, .io_reset, .master, .ctl_wr(addr_ctl_wr),
    .ctl_wdata(pb_wdata[7:0]), .address, .bus_ak(bus.ak), .bus_ss(bus.ss),
    .bus_wt(bus.wt), .ctl_rdata(addr_ctl_rdata), .as_(a_as), .eg(a_eg),
    .ms(a_ms), .ad_en(a_ad_en), .ad(a_ad), .pa(a_pa), .ak_rise,
    .ss_at_ak(a_ss), .wt_at_ak(a_wt), .active(a_active)
  );

  frpm_data_cycle #(.SKEW_CYCLES(SKEW_CYCLES)) u_data (
    .clk, .rst_n, .io_reset, .master, .pe_en, .ctl_wr(data_ctl_wr),
    .ctl_wdata(pb_wdata[7:0]), .data_wr, .data_wdata(pb_wdata),
    .bus_dk(bus.dk), .bus_ad(bus.ad), .bus_pa(bus.pa), .bus_pe(bus.pe),
    .bus_ss(bus.ss), .bus_wt(bus.wt), .ctl_rdata(data_ctl_rdata), .data_rdata,
    .ds(d_ds), .rd(d_rd), .ms(d_ms), .ad_en(d_ad_en), .ad(d_ad), .pa(d_pa),
    .pe(d_pe), .dk_edge, .ss_at_dk(d_ss), .wt_at_dk(d_wt), .parity_err(d_perr),
    .busy(d_busy)
  );

  // SS / WT of the latest completed handshake of our own cycles
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ss <= '0;
      cur_wt <= 1'b0;
    end else if (ak_rise) begin
      cur_ss <= bus.ss;
      cur_wt <= bus.wt;
    end else if (dk_edge) begin
      cur_ss <= bus.ss;
      cur_wt <= bus.wt;
    end
  end

  frpm_irq u_irq (
    .clk, .rst_n,
    .ss_event((ak_rise || dk_edge) && bus.ss != 3'd0),
    .bus_sr(bus.sr), .akdk_event(ak_rise || dk_edge),
    .enable(irq_enable), .sbus_en(sbus_irq_en),
    .ctl_wr(status_wr), .ctl_wdata(pb_wdata[ST_IRQ2_CTL:ST_IRQ0_CTL]),
    .pending(irq_pending), .irq
  );

  frpm_slave_port u_slave (
    .clk, .rst_n, .ga, .bus, .csr8, .csr9_hi,
    .host_csr0_wr(status_wr), .host_csr0(pb_wdata[3:0]),
    .drv(sdrv), .csr0_bits, .attached(slave_attached), .srst
  );

  frpm_led_driver #(.CLK_HZ(CLK_HZ), .STRETCH_CYCLES(STRETCH_CYCLES)) u_led (
    .clk, .rst_n, .iak(sdrv.ak), .ick(mdrv.gk), .led_slave, .led_master
  );

  assign mdrv.as_   = a_as;
  assign mdrv.ds    = d_ds;
  assign mdrv.eg    = a_eg;
  assign mdrv.ms    = a_ms | d_ms;
  assign mdrv.rd    = d_rd;
  assign mdrv.pa    = a_pa | d_pa;
  assign mdrv.pe    = d_pe;
  assign mdrv.rb    = rb;
  assign mdrv.ad_en = a_ad_en | d_ad_en;
  assign mdrv.ad    = a_ad | d_ad;

endmodule
