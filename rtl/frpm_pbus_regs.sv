// frpm_pbus_regs: PBus port-1 register file of the FRPM master interface.
//
// The host reaches the interface through six 32-bit registers on PBus port 1:
//   0 status        R/W control bits and read-only FASTBUS state (below)
//   1 arbitration   bits 7:0 = CSR8 (AL(0:5), PRIA, IAI), bit 15 arbitrate
//   2 address-cycle control   (held in frpm_addr_cycle, read back from there)
//   3 address       FASTBUS address for the next address cycle
//   4 data-cycle control      (held in frpm_data_cycle)
//   5 data          write holding / read latch (held in frpm_data_cycle)
// This block stores registers 1 and 3 and the writable status bits, produces
// one write strobe per register and builds the read data.
//
// Status register layout (R/W unless noted):
//   3:0   CSR0 bits 0, 1, 2, 14 of the slave port (written through to it)
//   7:4   CSR9 bits 4-7
//   8     I/O reset: clears GK and the cycle state while set
//   9     RB: drives reset-bus and keeps GK held while set
//   10,11 RB and BH from the segment (read-only)
//   13,14,15  interrupt enables for SS!=0 (IRQ0), SR (IRQ1), AK=1/DK(t) (IRQ2)
//   16    SBus interrupt enable
//   19:17 IRQ2..IRQ0 control, write-only (0 clears, 1 sets), read as 0
//   20    drive PE=1 on data cycles
//   23:21 SS of the current cycle (read-only)
//   24,25,26  WT, AK, DK of the current cycle (read-only)
//   27    SR from the segment (read-only)
//   28    parity error on the current read cycle (read-only)
//   29    slave port active, 30 data cycle in progress, 31 current master
// Bit 12 is unused and reads 0. Register 1 bits 8-14 read 0. Register 1 is
// not cleared by the I/O reset bit; only a write (or power-up) clears it.
//
// PBus protocol: a single-clock access; pb_sel with pb_wr high writes pb_wdata
// at the clock edge, pb_rdata is combinational from pb_addr.
// What follows the document: register numbers, every bit position and its
// access type. This design's own choices: the PBus strobe protocol and the
// I/O reset acting as a level.
module frpm_pbus_regs
  import frpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PBus port 1
  input  logic        pb_sel,
  input  logic        pb_wr,
  input  logic [2:0]  pb_addr,
  input  logic [31:0] pb_wdata,
  output logic [31:0] pb_rdata,
  // write strobes
  output logic        status_wr,
  output logic        addr_ctl_wr,
  output logic        data_ctl_wr,
  output logic        data_wr,
  // stored controls
  output logic        arb_en,
  output logic [7:0]  csr8,
  output logic [31:0] address,
  output logic [3:0]  csr9_hi,
  output logic        io_reset,
  output logic        rb,
  output logic [2:0]  irq_enable,
  output logic        sbus_irq_en,
  output logic        pe_en,
  // read-back sources
  input  logic [3:0]  csr0_bits,
  input  logic [7:0]  addr_ctl_rdata,
  input  logic [7:0]  data_ctl_rdata,
  input  logic [31:0] data_rdata,
  input  logic        bus_rb,
  input  logic        bus_bh,
  input  logic        bus_sr,
  input  logic [2:0]  cur_ss,
  input  logic        cur_wt,
  input  logic        cur_ak,
  input  logic        cur_dk,
  input  logic        parity_err,
  input  logic        slave_active,
  input  logic        data_busy,
  input  logic        master
);

  logic wr;
  assign wr          = pb_sel && pb_wr;
  assign status_wr   = wr && pb_addr == REG_STATUS;
  assign addr_ctl_wr = wr && pb_addr == REG_ADDR_CTL;
  assign data_ctl_wr = wr && pb_addr == REG_DATA_CTL;
  assign data_wr     = wr && pb_addr == REG_DATA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arb_en <= 1'b0; csr8 <= '0; address <= '0; csr9_hi <= '0; io_reset <= 1'b0;
      rb <= 1'b0; irq_enable <= '0; sbus_irq_en <= 1'b0; pe_en <= 1'b0;
    end else if (wr) begin
      unique case (pb_addr)
        REG_STATUS: begin
          csr9_hi     <= pb_wdata[7:4];
          io_reset    <= pb_wdata[ST_IO_RESET];
          rb          <= pb_wdata[ST_RB];
          irq_enable  <= pb_wdata[ST_IE_AKDK:ST_IE_SS];
          sbus_irq_en <= pb_wdata[ST_IE_SBUS];
          pe_en       <= pb_wdata[ST_PE_EN];
        end
        REG_ARB: begin
          csr8   <= pb_wdata[7:0];
          arb_en <= pb_wdata[15];
        end
        REG_ADDRESS: address <= pb_wdata;
        default: ;
      endcase
    end
  end

  logic [31:0] status;
  always_comb begin
    status = '0;
    status[3:0]                 = csr0_bits;
    status[7:4]                 = csr9_hi;
    status[ST_IO_RESET]         = io_reset;
    status[ST_RB]               = rb;
    status[ST_RB_FB]            = bus_rb;
    status[ST_BH_FB]            = bus_bh;
    status[ST_IE_AKDK:ST_IE_SS] = irq_enable;
    status[ST_IE_SBUS]          = sbus_irq_en;
    status[ST_PE_EN]            = pe_en;
    status[ST_SS_LSB+:3]        = cur_ss;
    status[ST_WT]               = cur_wt;
    status[ST_AK]               = cur_ak;
    status[ST_DK]               = cur_dk;
    status[ST_SR]               = bus_sr;
    status[ST_PERR]             = parity_err;
    status[ST_SLV_ACT]          = slave_active;
    status[ST_DATA_BUSY]        = data_busy;
    status[ST_MASTER]           = master;
  end

  always_comb begin
    unique case (pb_addr)
      REG_STATUS:   pb_rdata = status;
      REG_ARB:      pb_rdata = {16'd0, arb_en, 7'd0, csr8};
      REG_ADDR_CTL: pb_rdata = {24'd0, addr_ctl_rdata};
      REG_ADDRESS:  pb_rdata = address;
      REG_DATA_CTL: pb_rdata = {24'd0, data_ctl_rdata};
      REG_DATA:     pb_rdata = data_rdata;
      default:      pb_rdata = 32'd0;
    endcase
  end

endmodule
