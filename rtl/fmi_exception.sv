// fmi_exception: exception filtering, source encoding and the exception
// interrupt handshake of the FMI.
//
// At the end of every FASTBUS cycle the segment driver reports the cycle kind,
// the final SS code, which timeout (WT, AK, DK or arbitration) ended it and
// whether a read returned bad parity. Sequencer errors (overflow, insufficient
// stack space, illegal command) arrive as separate strobes and always raise an
// exception. During list-directed I/O the command's filters decide: SS=n is
// reported when filter bit n is set, WT/AK/DK timeouts through the timeout
// filter, slave parity errors through the parity filter and arbitration
// timeouts through the arbitration filter. During processor-directed I/O no
// error is masked. A raised exception is encoded as in the specification's
// table (address SS=n -> n, address timeout 8, data SS=n -> 8+n, data timeout
// 10h, parity 11h, arbitration timeout 12h, WT timeout 13h, overflow 14h, stack
// space 15h, illegal command 16h) and, in list mode, also ends the list.
//
// Separately, in list mode every non-zero SS or timeout, filtered or not,
// requests a status-history entry (hist_req with the SS code).
//
// Interrupt handshake: the FMI raises `interrupt` and latches the code in
// `last_code`; the processor answers with `int_ack`; the FMI drops `interrupt`;
// a further queued exception is signalled only after `int_ack` has been
// released. Up to QDEPTH exceptions wait in a queue; more are dropped
// (`lost` pulses). The queue depth is this design's own choice.
// Priority within one cycle: SS, then timeout, then parity (own choice).
module fmi_exception
  import fmi_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       list_mode,
  // end-of-cycle report
  input  logic       cyc_done,
  input  logic       cyc_addr,       // 1 address cycle, 0 data cycle
  input  logic       cyc_arb,        // arbitration cycle
  input  logic [2:0] ss,
  input  logic       to_wt,
  input  logic       to_akdk,        // AK (address) or DK (data) timeout
  input  logic       to_arb,
  input  logic       par_err,
  input  logic [6:0] ss_filter,
  input  logic [2:0] to_filter,      // {WT, AK, DK}
  input  logic       par_filter,
  input  logic       arb_filter,
  // sequencer errors
  input  logic       overflow,
  input  logic       stack_space,
  input  logic       illegal,
  // processor side
  input  logic       int_enable,
  input  logic       int_ack,
  output logic       exc_interrupt,
  output logic [5:0] last_code,
  output logic       raise,          // one-clock pulse: exception raised
  output logic       terminate_list,
  output logic       hist_req,
  output logic [2:0] hist_ss,
  output logic       lost
);

  logic [5:0] code;
  logic       take;

  always_comb begin
    code = EXC_NONE;
    take = 1'b0;
    if (illegal) begin
      code = EXC_ILLEGAL; take = 1'b1;
    end else if (stack_space) begin
      code = EXC_STACK_SPACE; take = 1'b1;
    end else if (overflow) begin
      code = EXC_OVERFLOW; take = 1'b1;
    end else if (cyc_done) begin
      if (cyc_arb) begin
        if (to_arb && (arb_filter || !list_mode)) begin
          code = EXC_ARB_TIMEOUT; take = 1'b1;
        end
      end else if (ss != 3'd0 && (ss_filter[ss-3'd1] || !list_mode)) begin
        code = (cyc_addr ? EXC_ADDR_SS_BASE : EXC_DATA_SS_BASE) + {3'd0, ss};
        take = 1'b1;
      end else if (to_wt && (to_filter[2] || !list_mode)) begin
        code = EXC_WT_TIMEOUT; take = 1'b1;
      end else if (to_akdk && ((cyc_addr ? to_filter[1] : to_filter[0]) || !list_mode)) begin
        code = cyc_addr ? EXC_ADDR_TIMEOUT : EXC_DATA_TIMEOUT; take = 1'b1;
      end else if (par_err && !cyc_addr && (par_filter || !list_mode)) begin
        code = EXC_PARITY; take = 1'b1;
      end
    end
  end

  assign raise          = take;
  assign terminate_list = take && list_mode;
  assign hist_req       = list_mode && cyc_done && !cyc_arb &&
                          (ss != 3'd0 || to_wt || to_akdk);
  assign hist_ss        = ss;

  // exception queue and interrupt handshake
  logic [5:0] q [QDEPTH];
  logic [$clog2(QDEPTH+1)-1:0] count;
  typedef enum logic [1:0] {I_IDLE, I_RAISED, I_WAIT_RELEASE} int_state_e;
  int_state_e istate;
  logic pop, push;

  assign push = take && (count < QDEPTH[$bits(count)-1:0] || pop);
  assign pop  = (istate == I_IDLE) && count != '0 && int_enable && !int_ack;
  assign lost = take && !push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      istate    <= I_IDLE;
      exc_interrupt <= 1'b0;
      last_code <= EXC_NONE;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      if (pop) begin
        for (int i = 0; i < QDEPTH - 1; i++) q[i] <= q[i+1];
        q[QDEPTH-1] <= '0;
      end
      if (push) begin
        q[32'(count) - (pop ? 1 : 0)] <= code;
      end
      count <= count + {{($bits(count)-1){1'b0}}, push} - {{($bits(count)-1){1'b0}}, pop};
      unique case (istate)
        I_IDLE: if (pop) begin
          exc_interrupt <= 1'b1;
          last_code <= q[0];
          istate    <= I_RAISED;
        end
        I_RAISED: if (int_ack) begin
          exc_interrupt <= 1'b0;
          istate    <= I_WAIT_RELEASE;
        end
        I_WAIT_RELEASE: if (!int_ack) istate <= I_IDLE;
        default: istate <= I_IDLE;
      endcase
    end
  end

endmodule
