// frpm_pkg: types and constants shared by the FRPM standard-logic FASTBUS
// master interface. The FRPM couples a SPARC host, through an SBus-to-PBus
// bridge, to a FASTBUS crate segment. Port 1 of the PBus carries six 32-bit
// registers (status, arbitration control, address-cycle control, address,
// data-cycle control, data); their numbering and bit assignments follow the
// interface's operations manual. The FASTBUS lines are modelled as active-high
// logic levels, with a separate "drive" and "receive" side for each wired-OR
// line; the electrical backplane is outside this RTL.
package frpm_pkg;

  // Port 1 register numbers (PBus word addresses 0..5).
  typedef enum logic [2:0] {
    REG_STATUS   = 3'd0,
    REG_ARB      = 3'd1,
    REG_ADDR_CTL = 3'd2,
    REG_ADDRESS  = 3'd3,
    REG_DATA_CTL = 3'd4,
    REG_DATA     = 3'd5
  } frpm_reg_e;

  // Module identifier returned in the upper half of a CSR0 read.
  localparam logic [15:0] FRPM_MODULE_ID = 16'h10D6;

  // Status register (register 0) bit positions.
  localparam int ST_IO_RESET   = 8;
  localparam int ST_RB         = 9;
  localparam int ST_RB_FB      = 10;
  localparam int ST_BH_FB      = 11;
  localparam int ST_IE_SS      = 13;
  localparam int ST_IE_SR      = 14;
  localparam int ST_IE_AKDK    = 15;
  localparam int ST_IE_SBUS    = 16;
  localparam int ST_IRQ0_CTL   = 17;
  localparam int ST_IRQ1_CTL   = 18;
  localparam int ST_IRQ2_CTL   = 19;
  localparam int ST_PE_EN      = 20;
  localparam int ST_SS_LSB     = 21;
  localparam int ST_WT         = 24;
  localparam int ST_AK         = 25;
  localparam int ST_DK         = 26;
  localparam int ST_SR         = 27;
  localparam int ST_PERR       = 28;
  localparam int ST_SLV_ACT    = 29;
  localparam int ST_DATA_BUSY  = 30;
  localparam int ST_MASTER     = 31;

  // FASTBUS lines a master drives (the wired-OR backplane ORs all drivers).
  typedef struct packed {
    logic        ar;       // arbitration request
    logic [5:0]  al;       // arbitration level
    logic        gk;       // grant acknowledge (bus mastership)
    logic        as_;      // address sync
    logic        ds;       // data sync
    logic        eg;       // enable geographical
    logic [2:0]  ms;       // mode select
    logic        rd;       // read
    logic        pa;       // parity
    logic        pe;       // parity enable
    logic        rb;       // reset bus
    logic        ad_en;    // master drives AD
    logic [31:0] ad;       // address/data
  } fb_master_drive_t;

  // FASTBUS lines a slave drives.
  typedef struct packed {
    logic        ak;       // address acknowledge
    logic        dk;       // data acknowledge
    logic        wt;       // wait
    logic [2:0]  ss;       // slave status
    logic        pa;       // parity
    logic        pe;       // parity enable
    logic        ad_en;    // slave drives AD
    logic [31:0] ad;       // address/data
  } fb_slave_drive_t;

  // Levels seen on the segment (wired-OR of every module's drive).
  typedef struct packed {
    logic        ar;
    logic        ag;       // arbitration grant from the timing control
    logic        ai;       // arbitration inhibit
    logic [5:0]  al;
    logic        gk;
    logic        as_;
    logic        ak;
    logic        ds;
    logic        dk;
    logic        wt;
    logic        eg;
    logic [2:0]  ms;
    logic [2:0]  ss;
    logic        rd;
    logic        pa;
    logic        pe;
    logic        rb;
    logic        bh;       // bus halted
    logic        sr;       // service request
    logic [31:0] ad;
  } fb_bus_t;

  // Parity bit that makes the 32 AD bits plus PA odd (odd=1) or even (odd=0).
  function automatic logic fb_parity(input logic [31:0] ad, input logic odd);
    return (^ad) ^ odd;
  endfunction

endpackage
