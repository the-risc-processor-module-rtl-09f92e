// frpm_top: the RISC processor module's FASTBUS hardware.
//
// Two designs stand side by side with separate ports:
//   * frpm_interface - the standard-logic FASTBUS master interface of the
//     processor module, with its minimal geographical slave port and the
//     front-panel activity LEDs. The host reaches it through the six PBus
//     port-1 registers (pb_*). The FASTBUS segment is seen as the wired-OR
//     line levels `bus` and the module's own drives `mdrv` (master) and
//     `sdrv` (slave); the ECL transceivers that join them to the backplane are
//     outside this RTL.
//   * fmi_core - the FASTBUS Master Interface gate array's command sequencer,
//     exception logic, list DMA registers, CSR0 bits and slave status
//     generation, FIM/SR interrupt receivers and status register (fmi_*
//     ports). Its cycle command and report signals are brought out.
//   * fmi_segment_driver - the FMI's FASTBUS master cycle sequencer, placed
//     beside fmi_core with its own ports (fmi_drv_*) and its own segment
//     connection (fmi_bus in, fmi_mdrv out). Joining fmi_core's seg_*/cyc_*
//     signals to it is left to the level above; the driver also needs the
//     block length and block write words, which fmi_core does not give out.
// Both share one clock and an active-low reset. The interface and timing of
// each half are described in frpm_interface and fmi_core. Parameter defaults
// are this design's own choices (the document gives no clock-level timing),
// except the LED stretch, which follows the one-shot's resistor and capacitor.
module frpm_top
  import frpm_pkg::*;
  import fmi_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES  = 4,
  parameter int unsigned SKEW_CYCLES    = 2,
  parameter int unsigned CLK_HZ         = 25_000_000,
  parameter int unsigned STRETCH_CYCLES = (CLK_HZ / 1000) * 198 / 10,
  parameter int unsigned QDEPTH         = 4,
  parameter int unsigned ARB_TIMEOUT    = 1000,
  parameter int unsigned AK_TIMEOUT     = 200,
  parameter int unsigned DK_TIMEOUT     = 200,
  parameter int unsigned WT_TIMEOUT     = 2000,
  parameter int unsigned RETRY_COUNT    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- FRPM FASTBUS interface
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
  output logic             srst,
  // ---- FMI processor command port
  input  logic             fmi_cmd_valid,
  input  logic [63:0]      fmi_cmd_data,
  output logic             fmi_cmd_ready,
  input  logic             fmi_int_enable,
  input  logic             fmi_int_ack,
  output logic             fmi_interrupt,
  output logic [5:0]       fmi_exc_code,
  output logic             fmi_exc_lost,
  output logic             fmi_list_mode,
  // ---- FMI memory port
  output logic             fmi_mem_rd,
  output logic [31:0]      fmi_mem_addr,
  input  logic             fmi_mem_rvalid,
  input  logic [63:0]      fmi_mem_rdata,
  output logic             fmi_mem_wr,
  output logic [63:0]      fmi_mem_wdata,
  // ---- FMI segment driver port
  output logic             fmi_seg_start,
  output fmi_cmd_t         fmi_seg_cmd,
  output logic [31:0]      fmi_xfer_addr,
  input  logic             fmi_seg_word,
  input  logic             fmi_cyc_done,
  input  logic             fmi_cyc_addr,
  input  logic             fmi_cyc_arb,
  input  logic [2:0]       fmi_cyc_ss,
  input  logic             fmi_to_wt,
  input  logic             fmi_to_akdk,
  input  logic             fmi_to_arb,
  input  logic             fmi_par_err,
  // ---- FMI control command outputs
  output logic             fmi_reset_bus,
  output logic             fmi_irq_rcv_reset,
  output logic             fmi_irq_rcv_en,
  output logic             fmi_sr_rcv_reset,
  output logic             fmi_sr_rcv_en,
  output logic             fmi_param_wr,
  output logic             fmi_param_rd,
  output logic [7:0]       fmi_param_offset,
  output logic [31:0]      fmi_param_data,
  // ---- FMI slave side
  input  logic             fmi_power_up,
  input  logic             fmi_csr0_load,
  input  logic [31:0]      fmi_csr0_wdata,
  input  logic             fmi_set_error_flag,
  input  logic             fmi_set_halt,
  input  logic             fmi_set_sr,
  input  logic             fmi_slv_parity_err,
  input  logic             fmi_active,
  output logic [15:0]      fmi_csr0,
  output logic             fmi_clear_error,
  output logic             fmi_csr0_reset,
  output logic             fmi_clear_data,
  output logic             fmi_sr_request,
  input  logic             fmi_slv_address_cycle,
  input  logic             fmi_slv_block_mode,
  input  logic             fmi_slv_cycle_end,
  input  logic             fmi_busy,
  input  logic             fmi_wt_en,
  input  logic             fmi_not_valid,
  input  logic             fmi_reject,
  input  logic             fmi_eob,
  input  logic             fmi_set_ss3,
  output logic [2:0]       fmi_slv_ss,
  output logic             fmi_slv_wt,
  input  logic             fmi_irb_select,
  input  logic [3:0]       fmi_irb_block,
  input  logic             fmi_irb_write,
  input  logic             fmi_slv_as_fall,
  input  logic             fmi_fim_ack,
  output logic             fmi_fim_interrupt,
  output logic [3:0]       fmi_fim_block,
  input  logic             fmi_sr_line,
  input  logic             fmi_sr_ack,
  output logic             fmi_sr_interrupt,
  output logic [31:0]      fmi_status,
  input  logic [5:0]       fmi_reg_addr,
  output logic [31:0]      fmi_reg_rdata,
  output logic [31:0]      fmi_param_rdata,
  output logic [15:0]      fmi_retry_count,
  output logic [15:0]      fmi_arb_timeout,
  // FMI segment driver, with its own segment connection
  input  logic             fmi_drv_reset,
  input  logic             fmi_drv_start,
  input  fmi_cmd_t         fmi_drv_cmd,
  input  logic [31:0]      fmi_drv_block_words,
  input  logic [31:0]      fmi_drv_xfer_wdata,
  output logic             fmi_drv_seg_word,
  output logic [31:0]      fmi_drv_rdata,
  output logic             fmi_drv_rvalid,
  output logic             fmi_drv_cyc_done,
  output logic             fmi_drv_cyc_addr,
  output logic             fmi_drv_cyc_arb,
  output logic [2:0]       fmi_drv_cyc_ss,
  output logic             fmi_drv_to_wt,
  output logic             fmi_drv_to_akdk,
  output logic             fmi_drv_to_arb,
  output logic             fmi_drv_par_err,
  output logic             fmi_drv_master,
  input  fb_bus_t          fmi_bus,
  output fb_master_drive_t fmi_mdrv
);

  frpm_interface #(
    .SETTLE_CYCLES(SETTLE_CYCLES), .SKEW_CYCLES(SKEW_CYCLES),
    .CLK_HZ(CLK_HZ), .STRETCH_CYCLES(STRETCH_CYCLES)
  ) u_frpm (
    .clk, .rst_n, .ga, .pb_sel, .pb_wr, .pb_addr, .pb_wdata, .pb_rdata,
    .bus, .mdrv, .sdrv, .irq, .led_slave, .led_master, .srst
  );

  fmi_core #(.QDEPTH(QDEPTH)) u_fmi (
    .clk, .rst_n,
    .cmd_valid(fmi_cmd_valid), .cmd_data(fmi_cmd_data), .cmd_ready(fmi_cmd_ready),
    .int_enable(fmi_int_enable), .int_ack(fmi_int_ack), .exc_interrupt(fmi_interrupt),
    .exc_code(fmi_exc_code), .exc_lost(fmi_exc_lost), .list_mode(fmi_list_mode),
    .mem_rd(fmi_mem_rd), .mem_addr(fmi_mem_addr), .mem_rvalid(fmi_mem_rvalid),
    .mem_rdata(fmi_mem_rdata), .mem_wr(fmi_mem_wr), .mem_wdata(fmi_mem_wdata),
    .seg_start(fmi_seg_start), .seg_cmd(fmi_seg_cmd), .xfer_addr(fmi_xfer_addr),
    .seg_word(fmi_seg_word), .cyc_done(fmi_cyc_done), .cyc_addr(fmi_cyc_addr),
    .cyc_arb(fmi_cyc_arb), .cyc_ss(fmi_cyc_ss), .to_wt(fmi_to_wt), .to_akdk(fmi_to_akdk),
    .to_arb(fmi_to_arb), .par_err(fmi_par_err),
    .reset_bus(fmi_reset_bus), .irq_rcv_reset(fmi_irq_rcv_reset), .irq_rcv_en(fmi_irq_rcv_en),
    .sr_rcv_reset(fmi_sr_rcv_reset), .sr_rcv_en(fmi_sr_rcv_en),
    .param_wr(fmi_param_wr), .param_rd(fmi_param_rd), .param_offset(fmi_param_offset),
    .param_data(fmi_param_data),
    .power_up(fmi_power_up), .csr0_load(fmi_csr0_load), .csr0_wdata(fmi_csr0_wdata),
    .set_error_flag(fmi_set_error_flag), .set_halt(fmi_set_halt), .set_sr(fmi_set_sr),
    .slv_parity_err(fmi_slv_parity_err), .active(fmi_active), .csr0(fmi_csr0),
    .clear_error(fmi_clear_error), .csr0_reset(fmi_csr0_reset), .clear_data(fmi_clear_data),
    .sr_request(fmi_sr_request),
    .slv_address_cycle(fmi_slv_address_cycle), .slv_block_mode(fmi_slv_block_mode),
    .slv_cycle_end(fmi_slv_cycle_end), .busy(fmi_busy), .wt_en(fmi_wt_en),
    .not_valid(fmi_not_valid), .reject(fmi_reject), .eob(fmi_eob), .set_ss3(fmi_set_ss3),
    .slv_ss(fmi_slv_ss), .slv_wt(fmi_slv_wt),
    .irb_select(fmi_irb_select), .irb_block(fmi_irb_block), .irb_write(fmi_irb_write),
    .slv_as_fall(fmi_slv_as_fall), .fim_ack(fmi_fim_ack), .fim_interrupt(fmi_fim_interrupt),
    .fim_block(fmi_fim_block), .sr_line(fmi_sr_line), .sr_ack(fmi_sr_ack),
    .sr_interrupt(fmi_sr_interrupt), .status(fmi_status),
    .reg_addr(fmi_reg_addr), .reg_rdata(fmi_reg_rdata), .param_rdata(fmi_param_rdata),
    .retry_count(fmi_retry_count), .arb_timeout(fmi_arb_timeout)
  );

  fmi_segment_driver #(
    .SETTLE_CYCLES(SETTLE_CYCLES), .SKEW_CYCLES(SKEW_CYCLES), .ARB_TIMEOUT(ARB_TIMEOUT),
    .AK_TIMEOUT(AK_TIMEOUT), .DK_TIMEOUT(DK_TIMEOUT), .WT_TIMEOUT(WT_TIMEOUT),
    .RETRY_COUNT(RETRY_COUNT)
  ) u_drv (
    .clk, .rst_n, .seg_reset(fmi_drv_reset), .start(fmi_drv_start), .cmd(fmi_drv_cmd),
    .block_words(fmi_drv_block_words), .xfer_wdata(fmi_drv_xfer_wdata),
    .seg_word(fmi_drv_seg_word), .rdata(fmi_drv_rdata), .rvalid(fmi_drv_rvalid),
    .cyc_done(fmi_drv_cyc_done), .cyc_addr(fmi_drv_cyc_addr), .cyc_arb(fmi_drv_cyc_arb),
    .cyc_ss(fmi_drv_cyc_ss), .to_wt(fmi_drv_to_wt), .to_akdk(fmi_drv_to_akdk),
    .to_arb(fmi_drv_to_arb), .par_err(fmi_drv_par_err), .master(fmi_drv_master),
    .bus(fmi_bus), .mdrv(fmi_mdrv)
  );

endmodule
