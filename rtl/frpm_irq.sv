// frpm_irq: the three interrupt requests of the FRPM master interface.
//
// IRQ0 reports a non-zero slave status (SS != 0) at the end of an address or
// data cycle, IRQ1 a service request (SR rising on the segment) and IRQ2 an
// address acknowledge (AK=1) or a data acknowledge transition DK(t). Each
// source is latched only while its enable bit in the status register is set
// (bits 13, 14, 15); the request lines reach the host only while the SBus
// interrupt enable (bit 16) is set. Status-register writes carry three
// write-only control bits, 17, 18 and 19, one per request: writing 0 clears the
// request and writing 1 sets it, so that software can test the interrupt path.
// These control bits read back as 0.
//
// Timing: requests are registered; a source event in clock n shows on irq in
// clock n+1. An event that coincides with a status write is kept (set wins).
// What follows the document: the three sources, the enable and control bits.
// This design's own choice: latching requests until software clears them.
module frpm_irq (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ss_event,     // cycle ended with SS != 0
  input  logic       bus_sr,
  input  logic       akdk_event,   // AK(u) or DK(t) of our own cycle
  input  logic [2:0] enable,       // status bits 15:13 (IRQ2..IRQ0)
  input  logic       sbus_en,      // status bit 16
  input  logic       ctl_wr,       // status register written
  input  logic [2:0] ctl_wdata,    // status bits 19:17 (IRQ2..IRQ0)
  output logic [2:0] pending,
  output logic [2:0] irq
);

  logic sr_q;
  logic [2:0] events;

  assign events = {akdk_event, bus_sr & ~sr_q, ss_event} & enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      sr_q    <= 1'b0;
    end else begin
      sr_q <= bus_sr;
      for (int i = 0; i < 3; i++) begin
        if (events[i])   pending[i] <= 1'b1;
        else if (ctl_wr) pending[i] <= ctl_wdata[i];
      end
    end
  end

  assign irq = sbus_en ? pending : 3'b000;

endmodule
