// fmi_cmd_decode: splits a 64-bit FMI command word into its fields and
// classifies it.
//
// Bits 63:62 select a control operation (0), an arbitration cycle (1), an
// address cycle (2) or a data cycle (3). Cycle commands carry the MS code,
// EG/RD, parity generation, AS and GK hold attributes, the advanced-MS enable,
// the SS, timeout and slave-parity exception filters and a 32-bit data
// reference with its mechanism (immediate, address, stack). Control commands
// carry an 8-bit function code in bits 61:54.
//
// Classification outputs:
//   illegal    MS > 3 without advanced codes; a read data cycle or a read
//              parameter with an immediate reference; reference code 3; a
//              control function the specification does not define. Each of
//              these always raises the illegal-command exception.
//   two_word   block (MS=1) or pipeline (MS=3) data cycles and execute list,
//              which need a second 64-bit word before they run.
//   null_op    execute list met inside a list, or terminate list received
//              from the processor: both are ignored.
// Purely combinational.
// What follows the specification: every field position and the illegal
// cases it names. This design's own choices: reference code 3 and undefined
// function codes (including the undecided read/write-FASTBUS-lines codes 4
// and 5) are treated as illegal.
module fmi_cmd_decode
  import fmi_pkg::*;
(
  input  logic [63:0] cmd,
  input  logic        list_mode,     // command came from the list sequencer
  output fmi_cmd_t    dec,
  output logic        illegal,
  output logic        two_word,
  output logic        null_op
);

  always_comb begin
    dec.op           = fmi_op_e'(cmd[63:62]);
    dec.func         = cmd[61:54];
    dec.ms           = cmd[61:59];
    dec.eg_rd        = cmd[58];
    dec.gen_parity   = cmd[57];
    dec.hold_as      = cmd[56];
    dec.hold_gk      = cmd[55];
    dec.advanced     = cmd[54];
    dec.ss_filter    = cmd[53:47];
    dec.to_filter    = cmd[46:44];
    dec.par_filter   = cmd[43];
    dec.ref_mech     = fmi_ref_e'(cmd[33:32]);
    dec.ref_data     = cmd[31:0];
    dec.arb_level    = cmd[7:0];
    dec.param_offset = cmd[53:46];
    dec.enable       = cmd[53];
    dec.list_words   = cmd[53:32];
  end

  always_comb begin
    illegal  = 1'b0;
    two_word = 1'b0;
    null_op  = 1'b0;
    unique case (dec.op)
      OP_ARB: ;
      OP_ADDR: begin
        if (!dec.advanced && dec.ms > 3'd3) illegal = 1'b1;
        if (dec.ref_mech == REF_RESERVED) illegal = 1'b1;
      end
      OP_DATA: begin
        if (!dec.advanced && dec.ms > 3'd3) illegal = 1'b1;
        if (dec.eg_rd && dec.ref_mech == REF_IMMEDIATE) illegal = 1'b1;
        if (dec.ref_mech == REF_RESERVED) illegal = 1'b1;
        if (!illegal && (dec.ms == 3'd1 || dec.ms == 3'd3)) two_word = 1'b1;
      end
      OP_CONTROL: begin
        unique case (dec.func)
          FN_RESET_BUS, FN_RESET_SEGDRV, FN_RESET_IRQRCV, FN_ENABLE_IRQRCV,
          FN_RESET_SRRCV, FN_ENABLE_SRRCV: ;
          FN_WRITE_PARAM:
            if (dec.ref_mech == REF_RESERVED) illegal = 1'b1;
          FN_READ_PARAM:
            if (dec.ref_mech == REF_IMMEDIATE || dec.ref_mech == REF_RESERVED)
              illegal = 1'b1;
          FN_EXECUTE_LIST:
            if (list_mode) null_op = 1'b1;
            else two_word = 1'b1;
          FN_TERMINATE:
            if (!list_mode) null_op = 1'b1;
          default: illegal = 1'b1;
        endcase
      end
      default: ;
    endcase
  end

endmodule
