// fmi_segment_driver: the FMI master cycle sequencer. It runs one FASTBUS
// primitive (arbitration, address or data cycle) per decoded command from the
// command sequencer and reports the end of the cycle.
//
// Arbitration (op 1): requests the bus through an frpm_arbiter with the level
// from command bits 5:0 and assured access from bit 7. It ends when this
// module becomes master, or, after ARB_TIMEOUT clocks without success, with
// to_arb and the request withdrawn.
// Address (op 2): puts the data reference on AD with MS and EG (and parity
// when bit 57 is set), raises AS SKEW_CYCLES clocks later and waits for AK.
// SS is sampled at AK. With no AK within AK_TIMEOUT clocks it ends with
// to_akdk and drops AS.
// Data (op 3): write data goes on AD before DS changes; DS toggles
// SKEW_CYCLES clocks later. The cycle ends when DK equals DS and WT is low.
// SS is sampled then, and read data (with a parity check when the slave drives
// PE) is latched into rdata. The data set-up is at least 2 clocks, so that a
// block write word read at the stepped transfer address is on AD in time.
// WT longer than WT_TIMEOUT gives to_wt; no DK within DK_TIMEOUT gives
// to_akdk. A block or pipeline command (MS 1 or 3)
// repeats the data cycle for block_words words. Write words come from
// xfer_wdata, and each moved word is reported on seg_word. The block stops
// early on a non-zero SS or a timeout.
// A cycle answered with SS=1 (slave busy) is tried again, up to RETRY_COUNT
// more times per command: an address cycle by dropping AS, waiting for AK to
// fall and raising AS again; a data cycle by toggling DS again with the same
// word. SS=1 is reported only once the retries are used up.
// After every address and data cycle, AS stays up only if command bit 56 is
// set ('hold AS'). Releasing AS also returns DS to 0. After every cycle GK
// stays only if bit 55 is set ('hold GK'). An address or data command issued
// without mastership (or, for data, without AS up) ends at once with to_akdk.
// seg_reset drops AS, DS and GK.
//
// Timing: all outputs are registered; cyc_done is a one-clock pulse with the
// cyc_*, to_* and par_err results valid in the same clock.
// What follows the specification: command fields, DS/DK toggling, latching
// read data at DK, hold-AS and hold-GK attributes, SS sampling and the three
// timeout kinds, and the SS=1 retry count. This design's own choices: timeouts and set-up time as
// clock-count parameters instead of the loadable FASTBUS parameters, only the
// immediate data reference, and no explicit or implicit bus cleanup cycles,
// protective buffer or pipeline clocking.
module fmi_segment_driver
  import frpm_pkg::*;
  import fmi_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned SKEW_CYCLES   = 2,
  parameter int unsigned ARB_TIMEOUT   = 1000,
  parameter int unsigned AK_TIMEOUT    = 200,
  parameter int unsigned DK_TIMEOUT    = 200,
  parameter int unsigned WT_TIMEOUT    = 2000,
  parameter int unsigned RETRY_COUNT   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seg_reset,
  input  logic             start,       // seg_start from the command sequencer
  input  fmi_cmd_t         cmd,
  input  logic [31:0]      block_words, // length of a block/pipeline transfer
  input  logic [31:0]      xfer_wdata,  // block write word at the transfer address
  output logic             seg_word,    // one block word moved
  output logic [31:0]      rdata,       // read data latched at DK
  output logic             rvalid,      // one-clock pulse with rdata
  output logic             cyc_done,
  output logic             cyc_addr,
  output logic             cyc_arb,
  output logic [2:0]       cyc_ss,
  output logic             to_wt,
  output logic             to_akdk,
  output logic             to_arb,
  output logic             par_err,
  output logic             master,
  input  fb_bus_t          bus,
  output fb_master_drive_t mdrv
);

  localparam int unsigned TMAX = (WT_TIMEOUT > ARB_TIMEOUT) ? WT_TIMEOUT : ARB_TIMEOUT;
  localparam int unsigned TW   = $clog2(TMAX + 2);
  localparam int unsigned DSETUP = (SKEW_CYCLES < 2) ? 2 : SKEW_CYCLES;

  typedef enum logic [3:0] {
    D_IDLE, D_ARB, D_ADDR_SETUP, D_ADDR_WAIT, D_ADDR_REL, D_DATA_SETUP, D_DATA_WAIT, D_WORD, D_END
  } drv_state_e;
  drv_state_e state;

  fmi_cmd_t    c;
  logic [TW-1:0] timer;
  logic [31:0] words_left;
  logic [15:0] retries;
  logic        want_gk, as_q, ds_q, ad_en_q, pe_q, ms_rd_q;
  logic [31:0] ad_q;
  logic [2:0]  ss_q;
  logic        to_wt_q, to_akdk_q, to_arb_q, par_q;
  logic        arb_gk, arb_ar;
  logic [5:0]  arb_al;
  logic        block;

  frpm_arbiter #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_arb (
    .clk, .rst_n, .io_reset(seg_reset), .arb_en(want_gk), .level(c.arb_level[5:0]),
    .iai(c.arb_level[7]), .rb_hold(1'b0), .bus_ag(bus.ag), .bus_ai(bus.ai),
    .bus_al(bus.al), .bus_gk(bus.gk), .ar(arb_ar), .al(arb_al), .gk(arb_gk),
    .master, .lost()
  );

  assign block = c.op == OP_DATA && c.ms[0];

  always_comb begin
    mdrv       = '0;
    mdrv.ar    = arb_ar;
    mdrv.al    = arb_al;
    mdrv.gk    = arb_gk;
    mdrv.as_   = as_q;
    mdrv.ds    = ds_q;
    mdrv.ms    = (as_q || state == D_ADDR_SETUP || state == D_ADDR_WAIT) ? c.ms : 3'd0;
    mdrv.eg    = (state == D_ADDR_SETUP || state == D_ADDR_WAIT) && c.eg_rd;
    mdrv.rd    = ms_rd_q;
    mdrv.ad_en = ad_en_q;
    mdrv.ad    = ad_en_q ? ad_q : 32'd0;
    mdrv.pe    = ad_en_q && pe_q;
    mdrv.pa    = ad_en_q && pe_q && fb_parity(ad_q, 1'b1);
  end

  // end a cycle: results out, AS/GK attributes applied
  task automatic finish(input logic addr_cycle, input logic arb_cycle);
    cyc_done <= 1'b1;
    cyc_addr <= addr_cycle;
    cyc_arb  <= arb_cycle;
    state    <= D_IDLE;
    ad_en_q  <= 1'b0;
    ms_rd_q  <= 1'b0;
    if (!arb_cycle) begin
      if (!c.hold_as) begin
        as_q <= 1'b0;
        ds_q <= 1'b0;
      end
    end
    want_gk <= want_gk && c.hold_gk;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; c <= '0; timer <= '0; words_left <= '0; want_gk <= 1'b0; retries <= '0;
      as_q <= 1'b0; ds_q <= 1'b0; ad_en_q <= 1'b0; pe_q <= 1'b0; ms_rd_q <= 1'b0;
      ad_q <= '0; ss_q <= '0; to_wt_q <= 1'b0; to_akdk_q <= 1'b0; to_arb_q <= 1'b0;
      par_q <= 1'b0; seg_word <= 1'b0; rdata <= '0; rvalid <= 1'b0;
      cyc_done <= 1'b0; cyc_addr <= 1'b0; cyc_arb <= 1'b0;
    end else begin
      seg_word <= 1'b0;
      rvalid   <= 1'b0;
      cyc_done <= 1'b0;
      if (seg_reset) begin
        state <= D_IDLE; want_gk <= 1'b0; as_q <= 1'b0; ds_q <= 1'b0; ad_en_q <= 1'b0;
        ms_rd_q <= 1'b0;
      end else unique case (state)
        D_IDLE: if (start) begin
          c <= cmd;
          ss_q <= '0; to_wt_q <= 1'b0; to_akdk_q <= 1'b0; to_arb_q <= 1'b0; par_q <= 1'b0;
          timer <= '0;
          retries <= '0;
          words_left <= (cmd.op == OP_DATA && cmd.ms[0]) ? block_words : 32'd1;
          unique case (cmd.op)
            OP_ARB: begin
              want_gk <= 1'b1;
              state   <= D_ARB;
            end
            OP_ADDR: if (master) begin
              ad_q    <= cmd.ref_data;
              ad_en_q <= 1'b1;
              pe_q    <= cmd.gen_parity;
              state   <= D_ADDR_SETUP;
            end else begin
              to_akdk_q <= 1'b1;
              state     <= D_END;
            end
            OP_DATA: if (master && as_q) begin
              ms_rd_q <= cmd.eg_rd;
              ad_q    <= (cmd.ms[0]) ? xfer_wdata : cmd.ref_data;
              ad_en_q <= !cmd.eg_rd;
              pe_q    <= cmd.gen_parity;
              state   <= (cmd.ms[0] && block_words == 32'd0) ? D_END : D_DATA_SETUP;
            end else begin
              to_akdk_q <= 1'b1;
              state     <= D_END;
            end
            default: state <= D_IDLE;
          endcase
        end
        D_ARB: begin
          timer <= timer + 1'b1;
          if (master) begin
            finish(1'b0, 1'b1);
          end else if (32'(timer) >= ARB_TIMEOUT) begin
            to_arb_q <= 1'b1;
            want_gk  <= 1'b0;
            cyc_done <= 1'b1; cyc_addr <= 1'b0; cyc_arb <= 1'b1;
            state    <= D_IDLE;
          end
        end
        D_ADDR_SETUP: begin
          timer <= timer + 1'b1;
          if (32'(timer) >= SKEW_CYCLES) begin
            as_q  <= 1'b1;
            timer <= '0;
            state <= D_ADDR_WAIT;
          end
        end
        D_ADDR_WAIT: begin
          timer <= timer + 1'b1;
          if (bus.ak && bus.ss == 3'd1 && 32'(retries) < RETRY_COUNT) begin
            // slave busy: release AS and try the address cycle again
            retries <= retries + 1'b1;
            as_q    <= 1'b0;
            state   <= D_ADDR_REL;
          end else if (bus.ak) begin
            ss_q <= bus.ss;
            finish(1'b1, 1'b0);
          end else if (32'(timer) >= AK_TIMEOUT) begin
            to_akdk_q <= 1'b1;
            as_q      <= 1'b0;
            ds_q      <= 1'b0;
            ad_en_q   <= 1'b0;
            cyc_done  <= 1'b1; cyc_addr <= 1'b1; cyc_arb <= 1'b0;
            want_gk   <= want_gk && c.hold_gk;
            state     <= D_IDLE;
          end
        end
        D_ADDR_REL: if (!bus.ak) begin
          timer <= '0;
          state <= D_ADDR_SETUP;
        end
        D_DATA_SETUP: begin
          timer <= timer + 1'b1;
          // block write word: the transfer address has stepped by clock 1
          if (block && !ms_rd_q && timer == TW'(1)) ad_q <= xfer_wdata;
          if (32'(timer) >= DSETUP) begin
            ds_q  <= !ds_q;
            timer <= '0;
            state <= D_DATA_WAIT;
          end
        end
        D_DATA_WAIT: begin
          timer <= timer + 1'b1;
          if (bus.dk == ds_q && !bus.wt) begin
            ss_q <= bus.ss;
            if (ms_rd_q) begin
              rdata  <= bus.ad;
              rvalid <= 1'b1;
              if (bus.pe && fb_parity(bus.ad, 1'b1) != bus.pa) par_q <= 1'b1;
            end
            state <= D_WORD;
          end else if (bus.wt && 32'(timer) >= WT_TIMEOUT) begin
            to_wt_q <= 1'b1;
            state   <= D_END;
          end else if (!bus.wt && 32'(timer) >= DK_TIMEOUT) begin
            to_akdk_q <= 1'b1;
            state     <= D_END;
          end
        end
        D_WORD: begin
          // SS=1: repeat the same word while retries are left
          if (ss_q == 3'd1 && 32'(retries) < RETRY_COUNT) begin
            retries <= retries + 1'b1;
            ss_q    <= 3'd0;
            timer   <= '0;
            state   <= D_DATA_SETUP;
          end else begin
          // one word done; a block goes on while SS=0 and words are left
          if (block) seg_word <= 1'b1;
          words_left <= words_left - 32'd1;
          if (block && ss_q == 3'd0 && words_left > 32'd1) begin
            timer <= '0;
            state <= D_DATA_SETUP;
          end else begin
            finish(1'b0, 1'b0);
          end
          end
        end
        D_END: finish(c.op == OP_ADDR, 1'b0);
        default: state <= D_IDLE;
      endcase
    end
  end

  assign cyc_ss  = ss_q;
  assign to_wt   = to_wt_q;
  assign to_akdk = to_akdk_q;
  assign to_arb  = to_arb_q;
  assign par_err = par_q;

endmodule
