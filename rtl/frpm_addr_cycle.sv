// frpm_addr_cycle: FASTBUS primary-address cycle of the FRPM master interface
// (port 1, register 2 "address cycle control", with register 3 holding the
// address).
//
// A PBus write of register 2 with bit 7 set, accepted only while the FRPM is
// the current master, starts an address cycle: MS(0:2) from bits 2:0, EG from
// bit 3, and the contents of register 3 are placed on AD together with the
// parity bit PA (bit 4 selects odd=1 or even=0 parity, for testing). After
// SKEW_CYCLES+1 clocks of address set-up (counted from the write), AS is raised. The host then polls AK
// (bit 6 of register 2, or the status register) or waits for the AK
// interrupt; time-outs are left to software. A write with bit 7 clear drops AS
// and ends the connection. AD is released once AK has been seen or AS has
// dropped. The SS code and WT present at AK(u) are captured for the status
// register, and ak_rise pulses for one clock so the interrupt logic can use it.
// MS and EG are driven together with AD, so that the MS lines are free for the
// data cycles that follow.
//
// Register 2 read-back: bits 3:0 as written, bit 4 parity select, bit 6 AK
// from the bus, bit 7 the address-cycle bit. Bit 5 is unused and reads 0.
// What follows the document: the register layout and the master-only rule.
// This design's own choices: the set-up time in clocks and the release of AD.
module frpm_addr_cycle
  import frpm_pkg::*;
#(
  parameter int unsigned SKEW_CYCLES = 2   // AD/MS set-up before AS(u), clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_reset,
  input  logic        master,
  input  logic        ctl_wr,           // PBus write strobe for register 2
  input  logic [7:0]  ctl_wdata,
  input  logic [31:0] address,          // register 3
  input  logic        bus_ak,
  input  logic [2:0]  bus_ss,
  input  logic        bus_wt,
  output logic [7:0]  ctl_rdata,
  output logic        as_,
  output logic        eg,
  output logic [2:0]  ms,
  output logic        ad_en,
  output logic [31:0] ad,
  output logic        pa,
  output logic        ak_rise,          // AK(u) during our address cycle
  output logic [2:0]  ss_at_ak,
  output logic        wt_at_ak,
  output logic        active
);

  logic [2:0] ms_q;
  logic       eg_q, odd_q, go_q, ak_q, ad_hold;
  logic [$clog2(SKEW_CYCLES+1)-1:0] skew;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms_q <= '0; eg_q <= 1'b0; odd_q <= 1'b0; go_q <= 1'b0;
      as_ <= 1'b0; skew <= '0; ak_q <= 1'b0; ad_hold <= 1'b0;
      ss_at_ak <= '0; wt_at_ak <= 1'b0;
    end else if (io_reset || !master) begin
      go_q <= 1'b0; as_ <= 1'b0; skew <= '0; ad_hold <= 1'b0;
      ak_q <= bus_ak;
    end else begin
      ak_q <= bus_ak;
      if (ctl_wr) begin
        ms_q  <= ctl_wdata[2:0];
        eg_q  <= ctl_wdata[3];
        odd_q <= ctl_wdata[4];
        go_q  <= ctl_wdata[7];
        if (ctl_wdata[7] && !go_q) begin
          skew    <= '0;
          ad_hold <= 1'b1;
        end
        if (!ctl_wdata[7]) begin
          as_     <= 1'b0;
          ad_hold <= 1'b0;
        end
      end else if (go_q && !as_) begin
        if (skew == SKEW_CYCLES[$bits(skew)-1:0]) as_ <= 1'b1;
        else skew <= skew + 1'b1;
      end
      if (as_ && bus_ak && !ak_q) begin
        ss_at_ak <= bus_ss;
        wt_at_ak <= bus_wt;
        ad_hold  <= 1'b0;
      end
    end
  end

  assign ak_rise   = as_ && bus_ak && !ak_q;
  assign active    = go_q;
  assign eg        = ad_hold & eg_q;
  assign ms        = ad_hold ? ms_q : 3'd0;
  assign ad_en     = ad_hold;
  assign ad        = ad_hold ? address : 32'd0;
  assign pa        = ad_hold ? fb_parity(address, odd_q) : 1'b0;
  assign ctl_rdata = {go_q, bus_ak, 1'b0, odd_q, eg_q, ms_q};

endmodule
