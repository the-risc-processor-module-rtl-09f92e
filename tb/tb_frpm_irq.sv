// tb_frpm_irq: self-checking test of the three interrupt request sources.
// Checks: each source sets its own request only when enabled; SR requests on
// the rising edge only; the SBus enable gates the outputs but not the pending
// bits; status writes set and clear requests (0 clears, 1 sets); a source event
// in the same clock as a clearing write is kept.
module tb_frpm_irq;
  logic clk = 0, rst_n = 0;
  logic ss_event = 0, bus_sr = 0, akdk_event = 0, sbus_en = 0, ctl_wr = 0;
  logic [2:0] enable = 0, ctl_wdata = 0, pending, irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frpm_irq dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic wr(input logic [2:0] v);
    @(negedge clk); ctl_wdata = v; ctl_wr = 1; @(negedge clk); ctl_wr = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pulse(ss_event); pulse(akdk_event); pulse(bus_sr);
    check(pending == 3'b000, "no requests while disabled");
    enable = 3'b111;
    pulse(ss_event);
    check(pending == 3'b001 && irq == 3'b000, "SS request pending, SBus disabled");
    sbus_en = 1; #1;
    check(irq == 3'b001, "SBus enable passes the request");
    pulse(akdk_event);
    check(pending == 3'b101, "AK/DK request");
    @(negedge clk); bus_sr = 1;
    @(negedge clk);
    check(pending[1], "SR rising edge requests");
    wr(3'b000);
    check(pending == 3'b000, "write of 0 clears");
    repeat (3) @(negedge clk);
    check(pending == 3'b000, "SR level held does not re-request");
    bus_sr = 0;
    wr(3'b110);
    check(pending == 3'b110 && irq == 3'b110, "write of 1 sets for testing");
    wr(3'b000);
    // event and clearing write in the same clock
    @(negedge clk); ss_event = 1; ctl_wdata = 3'b000; ctl_wr = 1;
    @(negedge clk); ss_event = 0; ctl_wr = 0;
    check(pending == 3'b001, "event wins over a clearing write");
    enable = 3'b001;
    pulse(akdk_event);
    check(pending == 3'b001, "disabled source ignored");
    sbus_en = 0; #1;
    check(irq == 3'b000, "SBus disable masks outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
