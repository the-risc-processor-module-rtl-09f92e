// tb_frpm_arbiter: self-checking test of the FASTBUS arbitration block.
// A second competitor with its own level is modelled in the bench; the AL
// lines are the wired-OR of both. Checks: AR on request, AL priority
// resolution (the lower level withdraws its low bits), win and loss against
// the competitor, waiting for GK of the previous master, GK hold while RB is
// set, release when the arbitrate bit is cleared, assured-access hold-off and
// the settle time in clocks.
module tb_frpm_arbiter;
  localparam int SETTLE = 3;
  logic clk = 0, rst_n = 0;
  logic io_reset = 0, arb_en = 0, iai = 0, rb_hold = 0;
  logic [5:0] level = 0, comp_level = 0;
  logic bus_ag = 0, bus_ai = 0, bus_gk = 0, comp_on = 0;
  logic [5:0] bus_al, al, comp_al;
  logic ar, gk, master, lost;
  int checks = 0, failures = 0, lost_count = 0;

  always #5 clk = ~clk;

  // competitor's resolution logic, independent of the block under test
  always_comb begin
    logic b;
    b = 0;
    for (int i = 5; i >= 0; i--) begin
      comp_al[i] = comp_on & comp_level[i] & ~b;
      if (bus_al[i] & ~comp_level[i]) b = 1;
    end
  end
  assign bus_al = al | comp_al;

  frpm_arbiter #(.SETTLE_CYCLES(SETTLE)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (lost) lost_count++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // --- win against a lower competitor, previous master holding GK
    level = 6'd21; comp_level = 6'd13;
    arb_en = 1; bus_gk = 1;
    repeat (2) @(posedge clk); #1;
    check(ar && !master, "AR raised on request");
    bus_ag = 1; comp_on = 1;
    repeat (SETTLE + 3) @(posedge clk); #1;
    check(bus_al == 6'd21, "AL settles to the higher level");
    check(comp_al == 6'd0 || (comp_al & ~6'd21) == 0, "competitor withdrew its low bits");
    check(!master, "waits for previous master's GK");
    bus_ag = 0; comp_on = 0;
    repeat (3) @(posedge clk); #1;
    check(!master && !gk, "no GK while bus GK is held");
    bus_gk = 0;
    repeat (2) @(posedge clk); #1;
    check(master && gk, "takes GK after release");
    check(!ar && al == 0, "AR and AL dropped once master");
    // --- RB holds GK
    rb_hold = 1; arb_en = 0;
    repeat (3) @(posedge clk); #1;
    check(gk, "GK held while RB=1");
    rb_hold = 0;
    repeat (2) @(posedge clk); #1;
    check(!gk && !master, "GK dropped when arbitrate bit cleared");
    // --- lose against a higher competitor
    level = 6'd9; comp_level = 6'd40; arb_en = 1;
    repeat (2) @(posedge clk);
    bus_ag = 1; comp_on = 1;
    repeat (SETTLE + 3) @(posedge clk); #1;
    check(bus_al == 6'd40, "higher competitor wins the AL lines");
    check(lost_count >= 1, "loss reported");
    check(!master, "not master after losing");
    check(ar, "keeps requesting after a loss");
    bus_ag = 0; comp_on = 0;
    // next round without competitor: win
    repeat (2) @(posedge clk);
    bus_ag = 1;
    repeat (SETTLE + 2) @(posedge clk);
    bus_ag = 0;
    repeat (3) @(posedge clk); #1;
    check(master, "wins the next arbitration");
    arb_en = 0;
    repeat (2) @(posedge clk); #1;
    check(!master, "released");
    // --- settle time: count clocks from AG to GK
    begin
      int n;
      arb_en = 1; level = 6'd5;
      repeat (2) @(posedge clk); #1;
      bus_ag = 1; n = 0;
      while (!gk && n < 50) begin @(posedge clk); #1; n++; end
      check(n == SETTLE + 3, $sformatf("AG to GK takes SETTLE+3 clocks (%0d)", n));
      bus_ag = 0; arb_en = 0;
      repeat (2) @(posedge clk);
    end
    // --- assured access: no request while AI is asserted
    iai = 1; bus_ai = 1; arb_en = 1;
    repeat (4) @(posedge clk); #1;
    check(!ar, "assured access holds request while AI");
    bus_ai = 0;
    repeat (2) @(posedge clk); #1;
    check(ar, "requests once AI drops");
    // --- I/O reset
    io_reset = 1;
    @(posedge clk); #1;
    check(!ar && !gk, "I/O reset clears the arbiter");
    io_reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
