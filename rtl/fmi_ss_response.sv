// fmi_ss_response: slave status (SS) and WT generation of the FMI slave from
// the five user-application control lines.
//
// Address and data cycles: BUSY gives WT when WT_EN is set and SS=1 when it is
// clear; NOT_VALID gives SS=6 when REJECT is set and SS=7 when it is clear.
// Data cycles only: SET_SS3 gives SS=3, and an end-of-block seen on the
// immediately preceding block or pipeline data cycle gives SS=2 if the block
// or pipeline access goes on. EOB itself only arms that response; any other
// cycle (non-block data cycle or a new address cycle) disarms it.
// Priority, highest first: SET_SS3, BUSY, delayed EOB, NOT_VALID.
//
// `ss` and `wt` are combinational from the control lines and the armed flag;
// `cycle_end` (the internal DK(t) or AK(u)) updates the EOB arming at the clock.
// Everything here follows the specification except the exact moment the EOB
// arming is updated, which is this design's choice.
module fmi_ss_response (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       address_cycle,   // 1 during address cycles
  input  logic       block_mode,      // MS=1 or MS=3 data cycle
  input  logic       cycle_end,
  input  logic       busy,
  input  logic       wt_en,
  input  logic       not_valid,
  input  logic       reject,
  input  logic       eob,
  input  logic       set_ss3,
  output logic [2:0] ss,
  output logic       wt,
  output logic       eob_armed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eob_armed <= 1'b0;
    else if (cycle_end) eob_armed <= !address_cycle && block_mode && eob;
  end

  always_comb begin
    ss = 3'd0;
    wt = 1'b0;
    if (!address_cycle && set_ss3) begin
      ss = 3'd3;
    end else if (busy) begin
      if (wt_en) wt = 1'b1;
      else ss = 3'd1;
    end else if (!address_cycle && block_mode && eob_armed) begin
      ss = 3'd2;
    end else if (not_valid) begin
      ss = reject ? 3'd6 : 3'd7;
    end
  end

endmodule
