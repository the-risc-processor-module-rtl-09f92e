// tb_frpm_led_driver: self-checking test of the activity LED stretchers, with
// a short stretch time. Checks: LED follows a rising input at once; stays on
// for the stretch time after a one-clock pulse and then goes off; a new pulse
// during the stretch retriggers it; the two channels are independent.
module tb_frpm_led_driver;
  localparam int unsigned ST = 20;
  logic clk = 0, rst_n = 0, iak = 0, ick = 0, led_slave, led_master;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frpm_led_driver #(.CLK_HZ(1000), .STRETCH_CYCLES(ST)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!led_slave && !led_master, "LEDs off after reset");
    iak = 1; #1;
    check(led_slave && !led_master, "slave LED on at once");
    @(negedge clk); iak = 0;
    n = 0;
    while (led_slave && n < 100) begin @(negedge clk); n++; end
    check(n == ST, $sformatf("stretch of %0d clocks (got %0d)", ST, n));
    // retrigger
    @(negedge clk); ick = 1; @(negedge clk); ick = 0;
    repeat (ST / 2) @(negedge clk);
    ick = 1; @(negedge clk); ick = 0;
    repeat (ST - 2) @(negedge clk);
    check(led_master, "retriggered stretch still on");
    check(!led_slave, "slave channel independent");
    repeat (4) @(negedge clk);
    check(!led_master, "master LED off after stretch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
