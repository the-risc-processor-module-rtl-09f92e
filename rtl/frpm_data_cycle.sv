// frpm_data_cycle: FASTBUS data cycles of the FRPM master interface (port 1,
// register 4 "data cycle control" and register 5 "data").
//
// Register 4: bits 2:0 MS(0:2), bit 3 RD, bit 4 parity select (odd=1, even=0),
// bit 6 DK from the bus (read-only), bit 7 data-cycle bit. Writes are taken
// only while the FRPM is current master. DS simply follows bit 7: each change
// of bit 7 is one DS transition and therefore one data-cycle handshake, which
// finishes when DK equals DS again. With MS=0 or 2 the transfer happens on
// DS(u) and writing bit 7 back to 0 ends the cycle; with MS=1 or 3 (block or
// pipeline) every toggle of bit 7 moves one word, and a block is finished by
// writing MS=0 with bit 7 clear. Time-outs, block counting and pipelining are
// left to the host program.
//
// Register 5 is two physical registers: a write-holding register loaded by
// PBus writes and driven on AD during write cycles, and a read latch that
// captures AD at DK(t) of a read cycle. A PBus read returns the read latch
// after a FASTBUS read and the holding register after a PBus write of
// register 5. On write cycles PA is generated over the holding register; PE is
// driven when status bit 20 is set. On read cycles the parity of AD is checked
// against PA when the slave drives PE, giving the status parity-error bit.
// SS and WT are captured at DK(t); dk_edge pulses for the interrupt logic.
//
// Timing: for write cycles AD is put out at the register write and DS moves
// SKEW_CYCLES+1 clocks later; read cycles move DS one clock after the write.
// What follows the document: register layout, the MS-dependent use of bit 7
// and the two-register data port. This design's own choices: set-up time in
// clocks and driving AD from the moment bit 7 is written until DK(t).
module frpm_data_cycle
  import frpm_pkg::*;
#(
  parameter int unsigned SKEW_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_reset,
  input  logic        master,
  input  logic        pe_en,            // status bit 20
  input  logic        ctl_wr,
  input  logic [7:0]  ctl_wdata,
  input  logic        data_wr,          // PBus write of register 5
  input  logic [31:0] data_wdata,
  input  logic        bus_dk,
  input  logic [31:0] bus_ad,
  input  logic        bus_pa,
  input  logic        bus_pe,
  input  logic [2:0]  bus_ss,
  input  logic        bus_wt,
  output logic [7:0]  ctl_rdata,
  output logic [31:0] data_rdata,
  output logic        ds,
  output logic        rd,
  output logic [2:0]  ms,
  output logic        ad_en,
  output logic [31:0] ad,
  output logic        pa,
  output logic        pe,
  output logic        dk_edge,          // DK(t) ending one of our data cycles
  output logic [2:0]  ss_at_dk,
  output logic        wt_at_dk,
  output logic        parity_err,
  output logic        busy              // DS differs from DK
);

  logic [2:0]  ms_q;
  logic        rd_q, odd_q, bit7_q, dk_q, sel_read, active;
  logic [31:0] hold_q, read_q;
  logic [$clog2(SKEW_CYCLES+1)-1:0] skew;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms_q <= '0; rd_q <= 1'b0; odd_q <= 1'b0; bit7_q <= 1'b0; ds <= 1'b0;
      dk_q <= 1'b0; sel_read <= 1'b0; hold_q <= '0; read_q <= '0; skew <= '0;
      ss_at_dk <= '0; wt_at_dk <= 1'b0; parity_err <= 1'b0; active <= 1'b0;
    end else begin
      dk_q <= bus_dk;
      if (data_wr) begin
        hold_q   <= data_wdata;
        sel_read <= 1'b0;
      end
      if (io_reset || !master) begin
        bit7_q <= 1'b0; ds <= 1'b0; skew <= '0; active <= 1'b0;
      end else begin
        if (ctl_wr) begin
          ms_q   <= ctl_wdata[2:0];
          rd_q   <= ctl_wdata[3];
          odd_q  <= ctl_wdata[4];
          bit7_q <= ctl_wdata[7];
          skew   <= '0;
          active <= 1'b1;
        end else if (bit7_q != ds) begin
          // read cycles need no AD set-up; write cycles wait SKEW_CYCLES
          if (rd_q || skew == SKEW_CYCLES[$bits(skew)-1:0]) ds <= bit7_q;
          else skew <= skew + 1'b1;
        end
        if (ds == bus_dk && ds != dk_q && active) begin
          ss_at_dk <= bus_ss;
          wt_at_dk <= bus_wt;
          // MS=0/2 move data on DS(u) only; block and pipeline on both edges
          if (rd_q && (ms_q[0] || ds)) begin
            read_q     <= bus_ad;
            sel_read   <= 1'b1;
            parity_err <= bus_pe && (bus_pa != fb_parity(bus_ad, odd_q));
          end else if (!rd_q) begin
            parity_err <= 1'b0;
          end
          if (!bit7_q && (ms_q == 3'd0 || ms_q == 3'd2)) active <= 1'b0;
        end
      end
    end
  end

  assign dk_edge    = active && (ds == bus_dk) && (ds != dk_q);
  assign busy       = (ds != bus_dk);
  assign rd         = active & rd_q;
  assign ms         = active ? ms_q : 3'd0;
  assign ad_en      = active && !rd_q && ((bit7_q != ds) || (ds != bus_dk));
  assign ad         = ad_en ? hold_q : 32'd0;
  assign pa         = ad_en ? fb_parity(hold_q, odd_q) : 1'b0;
  assign pe         = ad_en & pe_en;
  assign data_rdata = sel_read ? read_q : hold_q;
  assign ctl_rdata  = {bit7_q, bus_dk, 1'b0, odd_q, rd_q, ms_q};

endmodule
