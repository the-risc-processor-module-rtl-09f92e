// tb_fmi_interrupt_receiver: self-checking test of the FIM and SR receivers.
// Checks: a write to a receiver block followed by AS(d) raises a FIM interrupt
// naming the block; further access to the busy block answers SS=1 and other
// blocks stay free; acknowledge frees the block; two pending blocks are
// reported lowest first; a read access or a disabled receiver raises nothing;
// reset clears; SR(u) raises the SR interrupt only when enabled, and only on
// the edge; acknowledge and reset clear it.
module tb_fmi_interrupt_receiver;
  logic clk = 0, rst_n = 0;
  logic fim_reset = 0, fim_enable = 1, irb_select = 0, irb_write = 0, as_fall = 0, fim_ack = 0;
  logic [3:0] irb_block = 0, fim_block;
  logic fim_interrupt, irb_busy_ss1;
  logic sr_reset = 0, sr_enable = 0, sr_line = 0, sr_ack = 0, sr_interrupt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmi_interrupt_receiver dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  // one slave connection to a receiver block: optional write, then AS(d)
  task automatic message(input logic [3:0] blk, input logic wr);
    @(negedge clk); irb_select = 1; irb_block = blk; irb_write = wr;
    @(negedge clk); irb_write = 0; irb_select = 0;
    @(negedge clk); as_fall = 1;
    @(negedge clk); as_fall = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    message(4'd9, 1'b1);
    check(fim_interrupt && fim_block == 4'd9, "FIM interrupt for block 9 at AS(d)");
    irb_select = 1; irb_block = 4'd9; #1;
    check(irb_busy_ss1, "busy block answers SS=1");
    irb_block = 4'd3; #1;
    check(!irb_busy_ss1, "other block not busy");
    irb_select = 0;
    message(4'd3, 1'b1);
    check(fim_block == 4'd3, "two pending: lowest reported first");
    pulse(fim_ack);
    check(fim_interrupt && fim_block == 4'd9, "acknowledge frees block 3");
    pulse(fim_ack);
    check(!fim_interrupt, "acknowledge frees block 9");
    message(4'd5, 1'b0);
    check(!fim_interrupt, "read access raises nothing");
    fim_enable = 0;
    message(4'd5, 1'b1);
    check(!fim_interrupt, "disabled receiver ignores messages");
    fim_enable = 1;
    message(4'd15, 1'b1);
    check(fim_interrupt && fim_block == 4'd15, "block 15");
    pulse(fim_reset);
    check(!fim_interrupt, "reset clears");
    // SR receiver
    pulse(sr_line);
    check(!sr_interrupt, "SR ignored while disabled");
    sr_enable = 1;
    @(negedge clk); sr_line = 1;
    @(negedge clk);
    check(sr_interrupt, "SR(u) raises the SR interrupt");
    pulse(sr_ack);
    repeat (2) @(negedge clk);
    check(!sr_interrupt, "acknowledge clears; held SR does not re-raise");
    sr_line = 0;
    pulse(sr_line);
    check(sr_interrupt, "second SR(u)");
    pulse(sr_reset);
    check(!sr_interrupt, "reset clears the SR interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
