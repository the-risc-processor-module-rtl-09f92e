// fmi_interrupt_receiver: the FMI's FASTBUS interrupt-message (FIM) receiver
// and service-request (SR) receiver.
//
// FIM: up to 16 interrupt receiver blocks live in CSR space 100h-1FFh, one
// block per 16 CSRs (block number = NTA bits 7:4). The slave side reports each
// write data cycle into that space (irb_write with irb_block). When AS goes
// down after such an access, the block is marked busy and a FIM interrupt is
// requested for it; the processor services it and clears it with fim_ack,
// which frees the block shown on fim_block. While a block is busy, any further
// slave access to it is answered with SS=1 (irb_busy_ss1, combinational from
// irb_select and irb_block). Several blocks may be pending: fim_block shows the
// lowest-numbered one.
//
// SR: SR(u) raises sr_interrupt; the processor clears it with sr_ack. The FMI
// does not service the request itself.
//
// Each receiver has an enable (from the enable/disable commands) and a reset
// (from the reset commands) that returns it to its power-up state. A disabled
// FIM receiver ignores messages; a disabled SR receiver ignores SR(u).
// Timing: all state changes at the clock.
// What follows the specification: block count and CSR range, busy/SS=1 rule,
// interrupt at AS(d), independent SR receiver, enable and reset commands.
// This design's own choices: the block number taken from NTA bits 7:4, the
// acknowledge inputs, and lowest-first reporting of pending blocks.
module fmi_interrupt_receiver #(
  parameter int unsigned NBLOCKS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // FIM receiver
  input  logic       fim_reset,
  input  logic       fim_enable,
  input  logic       irb_select,      // slave access addresses CSR 100h-1FFh
  input  logic [3:0] irb_block,       // NTA bits 7:4 of that access
  input  logic       irb_write,       // a write data cycle of that access
  input  logic       as_fall,         // AS(d) ends the slave connection
  input  logic       fim_ack,         // processor has serviced fim_block
  output logic       fim_interrupt,
  output logic [3:0] fim_block,
  output logic       irb_busy_ss1,
  // SR receiver
  input  logic       sr_reset,
  input  logic       sr_enable,
  input  logic       sr_line,
  input  logic       sr_ack,
  output logic       sr_interrupt
);

  logic [NBLOCKS-1:0] busy;
  logic               accessed;
  logic [3:0]         acc_block;
  logic               sr_q;

  assign irb_busy_ss1 = irb_select && 32'(irb_block) < NBLOCKS && busy[irb_block];
  assign fim_interrupt = |busy;

  always_comb begin
    fim_block = '0;
    for (int i = NBLOCKS - 1; i >= 0; i--) if (busy[i]) fim_block = 4'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0; accessed <= 1'b0; acc_block <= '0;
    end else if (fim_reset) begin
      busy <= '0; accessed <= 1'b0; acc_block <= '0;
    end else begin
      if (fim_ack && busy[fim_block]) busy[fim_block] <= 1'b0;
      if (fim_enable && irb_write && irb_select && !irb_busy_ss1 &&
          32'(irb_block) < NBLOCKS) begin
        accessed  <= 1'b1;
        acc_block <= irb_block;
      end
      if (as_fall) begin
        accessed <= 1'b0;
        if (accessed) busy[acc_block] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q <= 1'b0; sr_interrupt <= 1'b0;
    end else if (sr_reset) begin
      sr_q <= sr_line; sr_interrupt <= 1'b0;
    end else begin
      sr_q <= sr_line;
      if (sr_enable && sr_line && !sr_q) sr_interrupt <= 1'b1;
      else if (sr_ack) sr_interrupt <= 1'b0;
    end
  end

endmodule
