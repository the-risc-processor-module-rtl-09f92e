// fmi_list_seq: the transfer-address / transfer-count register pairs of the
// FMI list sequencer (its DMA controller), and the status-history words.
//
// Three pairs are kept, each a 32-bit byte address and a 32-bit byte count:
//   NLA / list length      next command; +8 / -8 per 64-bit command fetch
//   NBA / block length     block or pipeline data; +4 / -4 per 32-bit word
//   NSHA / history length  status history; +8 / -8 per entry
// `exec_list` loads the list and history pairs from the execute-list command
// and its second word (lengths given in 32-bit words, kept in bytes).
// `block_init` loads the block pair from a block/pipeline command. Each
// `fetch_cmd`, `block_xfer` or `hist_store` strobe returns the address to use
// (combinational, the value before the step) and steps its pair, unless the
// count is already zero: that attempt instead raises `overflow` and leaves the
// pair unchanged. `list_empty` tells the sequencer the list has been used up,
// after which the list ends without an exception when the running command
// completes.
//
// A history entry is two 32-bit words: the address of the offending command,
// then the packed word {block length bits 30:2, SS code} (bits 31:3 zero when
// the offending cycle is not a block or pipeline cycle); `hist_word1` gives it.
// Registers update at the clock. All of this follows the specification; the
// strobe interface is this design's own.
module fmi_list_seq (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,            // reset segment driver
  input  logic        exec_list,
  input  logic [31:0] list_addr,
  input  logic [21:0] list_words,
  input  logic [31:0] hist_addr,
  input  logic [31:0] hist_words,
  input  logic        block_init,
  input  logic [31:0] block_addr,
  input  logic [31:0] block_words,
  input  logic        fetch_cmd,
  input  logic        block_xfer,
  input  logic        hist_store,
  input  logic        hist_is_block,
  input  logic [2:0]  hist_ss,
  output logic [31:0] nla,
  output logic [31:0] list_len,
  output logic [31:0] nba,
  output logic [31:0] block_len,
  output logic [31:0] nsha,
  output logic [31:0] hist_len,
  output logic [31:0] cmd_addr,         // address of the command being fetched
  output logic [31:0] xfer_addr,        // address of the block word moved
  output logic [31:0] hist_entry_addr,  // address of the history entry
  output logic [31:0] hist_word1,
  output logic        list_empty,
  output logic        overflow
);

  assign cmd_addr        = nla;
  assign xfer_addr       = nba;
  assign hist_entry_addr = nsha;
  assign hist_word1      = hist_is_block ? {block_len[30:2], hist_ss} : {29'd0, hist_ss};
  assign list_empty      = (list_len == 32'd0);
  assign overflow        = (fetch_cmd && list_len == 32'd0) ||
                           (block_xfer && block_len == 32'd0) ||
                           (hist_store && hist_len == 32'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nla <= '0; list_len <= '0; nba <= '0; block_len <= '0; nsha <= '0; hist_len <= '0;
    end else if (clear) begin
      list_len <= '0; block_len <= '0; hist_len <= '0;
    end else begin
      if (exec_list) begin
        nla      <= list_addr;
        list_len <= {8'd0, list_words, 2'b00};
        nsha     <= hist_addr;
        hist_len <= {hist_words[29:0], 2'b00};
      end else begin
        if (fetch_cmd && list_len != 32'd0) begin
          nla      <= nla + 32'd8;
          list_len <= (list_len < 32'd8) ? 32'd0 : list_len - 32'd8;
        end
        if (hist_store && hist_len != 32'd0) begin
          nsha     <= nsha + 32'd8;
          hist_len <= (hist_len < 32'd8) ? 32'd0 : hist_len - 32'd8;
        end
      end
      if (block_init) begin
        nba       <= block_addr;
        block_len <= {block_words[29:0], 2'b00};
      end else if (block_xfer && block_len != 32'd0) begin
        nba       <= nba + 32'd4;
        block_len <= block_len - 32'd4;
      end
    end
  end

endmodule
