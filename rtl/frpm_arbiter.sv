// frpm_arbiter: FASTBUS arbitration and bus-mastership holding for the FRPM
// master interface (port 1, register 1).
//
// Writing register 1 with bit 15 set asks for the bus; clearing bit 15 drops
// GK and gives up mastership. While requesting, the arbiter raises AR. When
// the arbitration timing control answers with AG, it places its 6-bit
// arbitration level on the wired-OR AL lines, withdrawing each lower-order
// bit as soon as a higher-order AL line carries a 1 that it is not driving
// itself (the usual FASTBUS priority resolution). After SETTLE_CYCLES clocks
// of AG the AL lines are compared with its own level: on a match it has won,
// and it takes GK as soon as the previous master has released GK. It then
// holds GK until bit 15 is cleared, while the reset-bus bit RB is set (status
// bit 9 "holds GK as long as RB=1"), and is dropped by an I/O reset.
// Register 1 also carries PRIA (bit 6) and IAI (bit 7). IAI gates the request:
// with assured access enabled a new request is held off while AI is asserted.
// PRIA is stored and read back only.
//
// Timing: all outputs are registered on clk; AR follows the request by one
// clock, GK is taken one clock after the bus GK is seen low after a win.
// What follows the document: the register bits, the GK hold rules, the use
// of AL/AR/AG/GK/AI. This design's own choices: the settle time in clocks,
// the synchronous state machine and the treatment of PRIA.
module frpm_arbiter
  import frpm_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4   // AL settle time, in clocks
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       io_reset,     // status bit 8: clears GK and cycle state
  input  logic       arb_en,       // register 1 bit 15
  input  logic [5:0] level,        // register 1 bits 5:0 (AL)
  input  logic       iai,          // register 1 bit 7, assured access
  input  logic       rb_hold,      // status bit 9
  input  logic       bus_ag,
  input  logic       bus_ai,
  input  logic [5:0] bus_al,
  input  logic       bus_gk,
  output logic       ar,
  output logic [5:0] al,
  output logic       gk,
  output logic       master,
  output logic       lost          // one-clock pulse: an arbitration was lost
);

  typedef enum logic [2:0] {A_IDLE, A_REQ, A_COMPETE, A_WAIT_GK, A_MASTER} arb_state_e;
  arb_state_e state;
  logic [$clog2(SETTLE_CYCLES+1)-1:0] settle;
  logic [5:0] al_drive;

  // Priority resolution: drive bit i only while no higher bit shows a 1 on the
  // bus where our own level has a 0.
  always_comb begin
    logic beaten;
    beaten = 1'b0;
    for (int i = 5; i >= 0; i--) begin
      al_drive[i] = level[i] & ~beaten;
      if (bus_al[i] & ~level[i]) beaten = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      settle <= '0;
      lost   <= 1'b0;
    end else if (io_reset) begin
      state  <= A_IDLE;
      settle <= '0;
      lost   <= 1'b0;
    end else begin
      lost <= 1'b0;
      unique case (state)
        A_IDLE:
          if (arb_en && level != 6'd0 && !(iai && bus_ai)) state <= A_REQ;
        A_REQ: begin
          settle <= '0;
          if (!arb_en) state <= A_IDLE;
          else if (bus_ag) state <= A_COMPETE;
        end
        A_COMPETE: begin
          if (!arb_en) state <= A_IDLE;
          else if (settle == SETTLE_CYCLES[$bits(settle)-1:0]) begin
            if (bus_al == level) state <= A_WAIT_GK;
            else begin
              state <= A_REQ;
              lost  <= 1'b1;
            end
          end else if (!bus_ag) begin
            state <= A_REQ;
          end else begin
            settle <= settle + 1'b1;
          end
        end
        A_WAIT_GK: begin
          if (!arb_en) state <= A_IDLE;
          else if (!bus_gk) state <= A_MASTER;
        end
        A_MASTER:
          if (!arb_en && !rb_hold) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  assign ar     = (state == A_REQ) || (state == A_COMPETE);
  assign al     = (state == A_COMPETE || state == A_WAIT_GK) ? al_drive : 6'd0;
  assign gk     = (state == A_MASTER);
  assign master = (state == A_MASTER);

endmodule
