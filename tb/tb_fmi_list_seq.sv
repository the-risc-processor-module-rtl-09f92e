// tb_fmi_list_seq: self-checking test of the FMI list DMA registers.
// Checks: execute-list loading (lengths in 32-bit words kept in bytes), command
// fetch stepping +8/-8, block pair loading and stepping +4/-4, history stepping
// +8/-8, the addresses given out before each step, list_empty, overflow when a
// count is already zero (and no step then), the packed history word for block
// and non-block cycles, and the clear input.
module tb_fmi_list_seq;
  logic clk = 0, rst_n = 0, clear = 0;
  logic exec_list = 0, block_init = 0, fetch_cmd = 0, block_xfer = 0, hist_store = 0;
  logic hist_is_block = 0;
  logic [2:0] hist_ss = 0;
  logic [31:0] list_addr = 0, hist_addr = 0, hist_words = 0, block_addr = 0, block_words = 0;
  logic [21:0] list_words = 0;
  logic [31:0] nla, list_len, nba, block_len, nsha, hist_len;
  logic [31:0] cmd_addr, xfer_addr, hist_entry_addr, hist_word1;
  logic list_empty, overflow;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmi_list_seq dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic strobe(ref logic s);
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
    list_addr = 32'h0001_0000; list_words = 22'd6; hist_addr = 32'h0002_0000; hist_words = 32'd4;
    strobe(exec_list);
    check(nla == 32'h1_0000 && list_len == 32'd24, "list pair loaded, length in bytes");
    check(nsha == 32'h2_0000 && hist_len == 32'd16, "history pair loaded");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); fetch_cmd = 1; #1;
      check(cmd_addr == 32'h1_0000 + 8 * i && !overflow, $sformatf("fetch %0d address", i));
      @(negedge clk); fetch_cmd = 0;
    end
    check(list_len == 0 && list_empty && nla == 32'h1_0018, "list used up");
    @(negedge clk); fetch_cmd = 1; #1;
    check(overflow, "fetch with zero length overflows");
    @(negedge clk); fetch_cmd = 0;
    check(nla == 32'h1_0018, "no step on overflow");
    // block pair
    block_addr = 32'h0000_4000; block_words = 32'd3;
    strobe(block_init);
    check(nba == 32'h4000 && block_len == 32'd12, "block pair loaded");
    @(negedge clk); block_xfer = 1; #1;
    check(xfer_addr == 32'h4000, "first block word address");
    @(negedge clk); #1;
    check(xfer_addr == 32'h4004, "second block word address");
    @(negedge clk); block_xfer = 0;
    check(block_len == 32'd4, "block length counts down by 4");
    // history words
    hist_is_block = 1; hist_ss = 3'd2; #1;
    check(hist_word1 == {block_len[30:2], 3'd2}, "history word for a block cycle");
    hist_is_block = 0; #1;
    check(hist_word1 == 32'd2, "history word for a single cycle");
    @(negedge clk); hist_store = 1; #1;
    check(hist_entry_addr == 32'h2_0000, "history entry address");
    @(negedge clk); #1;
    check(hist_entry_addr == 32'h2_0008 && !overflow, "second history entry");
    @(negedge clk); #1;
    check(overflow, "history overflow after two entries");
    @(negedge clk); hist_store = 0;
    check(nsha == 32'h2_0010 && hist_len == 0, "history pair after overflow");
    // clear
    strobe(block_init);
    strobe(clear);
    check(list_len == 0 && block_len == 0 && hist_len == 0, "clear empties the counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
