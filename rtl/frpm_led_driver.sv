// frpm_led_driver: front-panel activity indicators of the FRPM.
//
// Two identical channels. The yellow "slave activity" LED watches IAK, the
// slave port's address acknowledge; the green "master activity" LED watches
// ICK, the master's GK. On the board each channel is a retriggerable one-shot
// (74LS123, 20 kohm and 2.2 uF) whose output is combined with the raw input in
// a 74LS33 gate sinking the LED current, so the LED is lit while the input is
// high and for the one-shot period after each rising edge. Here the one-shot
// is a down-counter of STRETCH_CYCLES clocks, reloaded by every rising edge.
// The default is the 74LS123 pulse width of about 0.45*R*C = 19.8 ms at a
// CLK_HZ clock; the 0.45 factor is the usual data-sheet figure for large C.
// Outputs are active-high "LED on" levels; they follow a rising input at once.
module frpm_led_driver #(
  parameter int unsigned CLK_HZ         = 25_000_000,
  parameter int unsigned STRETCH_CYCLES = (CLK_HZ / 1000) * 198 / 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic iak,          // slave activity source
  input  logic ick,          // master activity source
  output logic led_slave,    // yellow
  output logic led_master    // green
);

  localparam int CW = $clog2(STRETCH_CYCLES + 1);

  logic [1:0]    in_q;
  logic [CW-1:0] cnt [2];
  logic [1:0]    src;

  assign src = {ick, iak};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q   <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
    end else begin
      in_q <= src;
      for (int i = 0; i < 2; i++) begin
        if (src[i] && !in_q[i]) cnt[i] <= CW'(STRETCH_CYCLES);
        else if (cnt[i] != '0)  cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  assign led_slave  = iak || (cnt[0] != '0);
  assign led_master = ick || (cnt[1] != '0);

endmodule
