// tb_fmi_cmd_decode: self-checking test of the FMI command decoder.
// Builds command words field by field in the bench and checks the decoded
// fields and the illegal / two-word / null-operation classification for every
// case the command set names, plus a sweep of all 256 control function codes
// against the list of defined ones.
module tb_fmi_cmd_decode;
  import fmi_pkg::*;
  logic [63:0] cmd = 0;
  logic        list_mode = 0, illegal, two_word, null_op;
  fmi_cmd_t    dec;
  int checks = 0, failures = 0;

  fmi_cmd_decode dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [63:0] cyc(input logic [1:0] op, input logic [2:0] ms,
      input logic eg_rd, input logic adv, input logic [6:0] ssf, input logic [2:0] tof,
      input logic parf, input logic [1:0] refm, input logic [31:0] data);
    return {op, ms, eg_rd, 1'b1, 1'b0, 1'b1, adv, ssf, tof, parf, 9'd0, refm, data};
  endfunction
  function automatic logic [63:0] ctl(input logic [7:0] fn, input logic [21:0] mid,
                                      input logic [1:0] refm, input logic [31:0] data);
    return {2'b00, fn, mid[21:2], mid[1:0] | refm, data};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // address cycle with all fields
    cmd = cyc(2'd2, 3'd1, 1'b1, 1'b0, 7'h55, 3'b101, 1'b1, 2'd0, 32'h0000_0007); #1;
    check(dec.op == OP_ADDR && dec.ms == 3'd1 && dec.eg_rd, "address op, MS, EG");
    check(dec.gen_parity && !dec.hold_as && dec.hold_gk && !dec.advanced, "attribute bits");
    check(dec.ss_filter == 7'h55 && dec.to_filter == 3'b101 && dec.par_filter, "filters");
    check(dec.ref_mech == REF_IMMEDIATE && dec.ref_data == 32'h7, "reference");
    check(!illegal && !two_word && !null_op, "legal single-word address cycle");
    // MS > 3 needs the advanced bit
    cmd = cyc(2'd2, 3'd5, 1'b0, 1'b0, 0, 0, 0, 2'd0, 0); #1;
    check(illegal, "MS=5 without advanced is illegal");
    cmd = cyc(2'd2, 3'd5, 1'b0, 1'b1, 0, 0, 0, 2'd0, 0); #1;
    check(!illegal, "MS=5 with advanced is legal");
    // data cycles
    cmd = cyc(2'd3, 3'd0, 1'b1, 1'b0, 0, 0, 0, 2'd0, 0); #1;
    check(illegal, "read data with immediate reference is illegal");
    cmd = cyc(2'd3, 3'd0, 1'b1, 1'b0, 0, 0, 0, 2'd1, 32'h100); #1;
    check(!illegal && !two_word, "read data with address reference");
    cmd = cyc(2'd3, 3'd1, 1'b1, 1'b0, 0, 0, 0, 2'd2, 0); #1;
    check(!illegal && two_word, "block read is a two-word command");
    cmd = cyc(2'd3, 3'd3, 1'b0, 1'b0, 0, 0, 0, 2'd0, 0); #1;
    check(!illegal && two_word, "pipeline write is a two-word command");
    cmd = cyc(2'd3, 3'd0, 1'b0, 1'b0, 0, 0, 0, 2'd3, 0); #1;
    check(illegal, "reference code 3 is illegal");
    // arbitration
    cmd = {2'd1, 54'd0, 8'hC5}; #1;
    check(dec.op == OP_ARB && dec.arb_level == 8'hC5 && !illegal, "arbitration level field");
    // control functions
    cmd = ctl(FN_EXECUTE_LIST, 22'h2ABCDE & 22'h3FFFFF, 2'd0, 32'h1000); #1;
    check(dec.func == FN_EXECUTE_LIST && dec.list_words == 22'h2ABCDE && two_word && !null_op,
          "execute list from the processor");
    list_mode = 1; #1;
    check(null_op && !two_word, "execute list inside a list is a null operation");
    cmd = ctl(FN_TERMINATE, 0, 0, 0); #1;
    check(!null_op && !illegal, "terminate inside a list");
    list_mode = 0; #1;
    check(null_op, "terminate from the processor is a null operation");
    cmd = ctl(FN_WRITE_PARAM, {8'h3C, 14'd0}, 2'd0, 32'h9); #1;
    check(dec.param_offset == 8'h3C && !illegal, "write parameter offset");
    cmd = ctl(FN_READ_PARAM, {8'h3C, 14'd0}, 2'd0, 32'h9); #1;
    check(illegal, "read parameter with immediate reference is illegal");
    cmd = ctl(FN_READ_PARAM, {8'h3C, 14'd0}, 2'd1, 32'h9); #1;
    check(!illegal, "read parameter with address reference");
    cmd = ctl(FN_ENABLE_IRQRCV, 22'h200000, 0, 0); #1;
    check(dec.enable, "enable bit 53");
    // sweep of control function codes
    for (int f = 0; f < 256; f++) begin
      bit defined;
      defined = f inside {1, 2, 8, 9, 10, 11, 12, 13, 14};
      cmd = ctl(8'(f), 0, 2'd0, 0); #1;
      check(illegal == !defined, $sformatf("function %0d legality", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
