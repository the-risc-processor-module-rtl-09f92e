// fmi_pkg: command, exception and register encodings of the FASTBUS Master
// Interface (FMI), a single-chip master/slave FASTBUS interface controlled by
// 64-bit command words, written either by the processor (processor-directed
// I/O) or fetched from a list in shared memory by the built-in list sequencer
// (list-directed I/O). The encodings below are those of the FMI functional
// specification; where the specification leaves a value open the constant
// says so.
package fmi_pkg;

  // Bits 63:62 of a command word.
  typedef enum logic [1:0] {
    OP_CONTROL = 2'd0,
    OP_ARB     = 2'd1,
    OP_ADDR    = 2'd2,
    OP_DATA    = 2'd3
  } fmi_op_e;

  // Control function code, bits 61:54 of a control command.
  localparam logic [7:0] FN_RESET_BUS     = 8'd1;
  localparam logic [7:0] FN_WRITE_PARAM   = 8'd2;
  localparam logic [7:0] FN_READ_PARAM    = 8'd3;
  localparam logic [7:0] FN_EXECUTE_LIST  = 8'd8;
  localparam logic [7:0] FN_TERMINATE     = 8'd9;
  localparam logic [7:0] FN_RESET_SEGDRV  = 8'd10;
  localparam logic [7:0] FN_RESET_IRQRCV  = 8'd11;
  localparam logic [7:0] FN_ENABLE_IRQRCV = 8'd12;
  localparam logic [7:0] FN_RESET_SRRCV   = 8'd13;
  localparam logic [7:0] FN_ENABLE_SRRCV  = 8'd14;

  // Data reference mechanism, bits 33:32 (order as listed: immediate,
  // address reference, stack reference; code 3 is not defined).
  typedef enum logic [1:0] {
    REF_IMMEDIATE = 2'd0,
    REF_ADDRESS   = 2'd1,
    REF_STACK     = 2'd2,
    REF_RESERVED  = 2'd3
  } fmi_ref_e;

  // Encoded exception sources (status register bits 5:0).
  localparam logic [5:0] EXC_NONE          = 6'h00;
  localparam logic [5:0] EXC_ADDR_SS_BASE  = 6'h00;  // + SS (1..7)
  localparam logic [5:0] EXC_ADDR_TIMEOUT  = 6'h08;
  localparam logic [5:0] EXC_DATA_SS_BASE  = 6'h08;  // + SS (1..7)
  localparam logic [5:0] EXC_DATA_TIMEOUT  = 6'h10;
  localparam logic [5:0] EXC_PARITY        = 6'h11;
  localparam logic [5:0] EXC_ARB_TIMEOUT   = 6'h12;
  localparam logic [5:0] EXC_WT_TIMEOUT    = 6'h13;
  localparam logic [5:0] EXC_OVERFLOW      = 6'h14;
  localparam logic [5:0] EXC_STACK_SPACE   = 6'h15;
  localparam logic [5:0] EXC_ILLEGAL       = 6'h16;

  // Decoded command word.
  typedef struct packed {
    fmi_op_e     op;
    logic [7:0]  func;         // control function code
    logic [2:0]  ms;           // MS code (address/data cycles)
    logic        eg_rd;        // EG for address, RD for data cycles
    logic        gen_parity;   // bit 57
    logic        hold_as;      // bit 56
    logic        hold_gk;      // bit 55
    logic        advanced;     // bit 54 (address/data); arb timeout filter (arb)
    logic [6:0]  ss_filter;    // bits 53:47, SS=7..SS=1
    logic [2:0]  to_filter;    // bits 46:44, WT, AK, DK timeouts
    logic        par_filter;   // bit 43
    fmi_ref_e    ref_mech;     // bits 33:32
    logic [31:0] ref_data;     // bits 31:0
    logic [7:0]  arb_level;    // bits 7:0 (AI enable, PRI enable, level)
    logic [7:0]  param_offset; // bits 53:46 of read/write parameter
    logic        enable;       // bit 53 of the enable/disable commands
    logic [21:0] list_words;   // bits 53:32 of execute list
  } fmi_cmd_t;

endpackage
