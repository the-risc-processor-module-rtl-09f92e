// fmi_core: the command sequencer of the FASTBUS Master Interface (FMI) with
// its exception logic, list DMA registers, CSR0 bits and slave-status
// generation.
//
// Commands are 64-bit words. In processor-directed mode the processor hands
// one over on cmd_valid/cmd_ready; block and pipeline data cycles and execute
// list take a second word the same way. Execute list loads the list and
// status-history DMA registers and switches to list-directed mode: the core
// then fetches each command (and second word) from memory at the next list
// address on mem_rd/mem_rvalid, and the processor port stays closed until the
// list ends. A list ends at terminate list, when a command completes with the
// list length at zero, or on an exception. In list mode every cycle that ends
// with SS other than 0, or a timeout, writes a two-word history entry
// {packed SS/length word, command address} to the next history address
// (mem_wr, one clock).
//
// Arbitration, address and data commands are passed to the FASTBUS segment
// driver (seg_start with the decoded command; a block/pipeline command also
// loads the block DMA pair, which the driver steps with seg_word). The driver
// reports the end of every cycle on the cyc_* inputs; fmi_exception filters
// and encodes it and drives the interrupt/acknowledge handshake. Control
// commands act here: reset bus (reset_bus pulse, which also clears CSR0 bits 1
// and 2), reset segment driver (clears DMA counts and list mode), reset/enable
// of the interrupt and SR receivers (pulse and enable level outputs), and
// read/write parameter, which are handed out on param_* with the offset.
// Write parameter (immediate data) also loads the retry count (displacement
// 12), arbitration timeout (14) and the CSR8/9/1D/1E/1F bytes (40-45). The
// register map (status 8, retry/timeout 12, list, block and history
// address/length 16-36, CSR bytes 40-45) is read combinationally on
// reg_addr/reg_rdata; read parameter gives the same word on param_rdata.
//
// The slave half is fmi_csr0 and fmi_ss_response wired to the user lines,
// plus fmi_interrupt_receiver (FIM and SR interrupts to the processor; SS=1
// from a busy receiver block overrides the user-line response). `status` is
// the 32-bit status register: list in progress (31), slave access (30, the
// ACTIVE line), timeout (29), parity error (28) and SS (27:25) of the last
// processor-directed cycle, FIM/SR/exception requesting (24:22) and enabled
// (21:19), FIM block (15:12) and the last exception code (5:0).
//
// Timing: one command every few clocks; a cycle command waits for cyc_done.
// What follows the specification: command set and two-word formats, list
// behaviour, DMA increments, history contents, exception codes. This design's
// own choices: the handshakes on the processor, memory and driver ports, the
// second word of a block command holding the length in 32-bit words in bits
// 31:0, and stack references being passed to the driver like address
// references (no stack-space check is made, so that exception never occurs).
module fmi_core
  import fmi_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor command port
  input  logic        cmd_valid,
  input  logic [63:0] cmd_data,
  output logic        cmd_ready,
  input  logic        int_enable,
  input  logic        int_ack,
  output logic        exc_interrupt,
  output logic [5:0]  exc_code,
  output logic        exc_lost,       // exception dropped, queue full
  output logic        list_mode,
  // memory port (list fetch and status history)
  output logic        mem_rd,
  output logic [31:0] mem_addr,
  input  logic        mem_rvalid,
  input  logic [63:0] mem_rdata,
  output logic        mem_wr,
  output logic [63:0] mem_wdata,
  // segment driver port
  output logic        seg_start,
  output fmi_cmd_t    seg_cmd,
  output logic [31:0] xfer_addr,
  input  logic        seg_word,
  input  logic        cyc_done,
  input  logic        cyc_addr,
  input  logic        cyc_arb,
  input  logic [2:0]  cyc_ss,
  input  logic        to_wt,
  input  logic        to_akdk,
  input  logic        to_arb,
  input  logic        par_err,
  // control command outputs
  output logic        reset_bus,
  output logic        irq_rcv_reset,
  output logic        irq_rcv_en,
  output logic        sr_rcv_reset,
  output logic        sr_rcv_en,
  output logic        param_wr,
  output logic        param_rd,
  output logic [7:0]  param_offset,
  output logic [31:0] param_data,
  // FMI slave side (user application lines)
  input  logic        power_up,
  input  logic        csr0_load,
  input  logic [31:0] csr0_wdata,
  input  logic        set_error_flag,
  input  logic        set_halt,
  input  logic        set_sr,
  input  logic        slv_parity_err,
  input  logic        active,
  output logic [15:0] csr0,
  output logic        clear_error,
  output logic        csr0_reset,
  output logic        clear_data,
  output logic        sr_request,
  input  logic        slv_address_cycle,
  input  logic        slv_block_mode,
  input  logic        slv_cycle_end,
  input  logic        busy,
  input  logic        wt_en,
  input  logic        not_valid,
  input  logic        reject,
  input  logic        eob,
  input  logic        set_ss3,
  output logic [2:0]  slv_ss,
  output logic        slv_wt,
  // interrupt receivers and status register
  input  logic        irb_select,     // slave access addresses CSR 100h-1FFh
  input  logic [3:0]  irb_block,      // NTA bits 7:4 of that access
  input  logic        irb_write,      // write data cycle of that access
  input  logic        slv_as_fall,    // AS(d) ends the slave connection
  input  logic        fim_ack,
  output logic        fim_interrupt,
  output logic [3:0]  fim_block,
  input  logic        sr_line,        // SR line of the segment
  input  logic        sr_ack,
  output logic        sr_interrupt,
  output logic [31:0] status,
  // memory-mapped register read (byte displacement) and parameter values
  input  logic [5:0]  reg_addr,
  output logic [31:0] reg_rdata,
  output logic [31:0] param_rdata,    // register at param_offset, with param_rd
  output logic [15:0] retry_count,
  output logic [15:0] arb_timeout
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_W2, S_FETCH, S_FETCH_WAIT, S_FETCH2, S_FETCH2_WAIT,
    S_EXEC, S_CYCLE, S_HIST, S_NEXT
  } state_e;
  state_e state;

  logic [63:0] cmd_q, word2_q;
  logic [31:0] cmd_addr_q;
  logic        have_w2, need_w2;
  fmi_cmd_t    dec;
  logic        illegal, two_word, null_op;

  fmi_cmd_decode u_dec (
    .cmd(cmd_q), .list_mode(list_mode), .dec(dec), .illegal(illegal),
    .two_word(two_word), .null_op(null_op)
  );

  // list DMA registers
  logic        exec_list, block_init, fetch_cmd, hist_store, seq_clear;
  logic        list_empty, overflow;
  logic [31:0] nla, list_len, nba, block_len, nsha, hist_len, cmd_addr, hist_addr_o;
  logic [31:0] hist_word1;
  logic        is_block;
  logic [2:0]  hist_ss_q;
  logic [2:0]  ssr_ss, last_ss_q;
  logic        irb_busy_ss1, last_to_q, last_par_q;

  assign is_block = dec.op == OP_DATA && dec.ms[0];

  fmi_list_seq u_seq (
    .clk, .rst_n, .clear(seq_clear),
    .exec_list, .list_addr(cmd_q[31:0]), .list_words(dec.list_words),
    .hist_addr(word2_q[31:0]), .hist_words(word2_q[63:32]),
    .block_init, .block_addr(dec.ref_data), .block_words(word2_q[31:0]),
    .fetch_cmd, .block_xfer(seg_word), .hist_store,
    .hist_is_block(is_block), .hist_ss(hist_ss_q),
    .nla, .list_len, .nba, .block_len, .nsha, .hist_len,
    .cmd_addr, .xfer_addr, .hist_entry_addr(hist_addr_o), .hist_word1,
    .list_empty, .overflow
  );

  // exceptions
  logic       exc_illegal, exc_raise, exc_term, exc_hist_req;
  logic [2:0] exc_hist_ss;

  fmi_exception #(.QDEPTH(QDEPTH)) u_exc (
    .clk, .rst_n, .list_mode,
    .cyc_done, .cyc_addr, .cyc_arb, .ss(cyc_ss), .to_wt, .to_akdk, .to_arb, .par_err,
    .ss_filter(dec.ss_filter), .to_filter(dec.to_filter), .par_filter(dec.par_filter),
    .arb_filter(dec.advanced),
    .overflow, .stack_space(1'b0), .illegal(exc_illegal),
    .int_enable, .int_ack, .exc_interrupt, .last_code(exc_code), .raise(exc_raise),
    .terminate_list(exc_term), .hist_req(exc_hist_req), .hist_ss(exc_hist_ss),
    .lost(exc_lost)
  );

  // slave side
  fmi_csr0 u_csr0 (
    .clk, .rst_n, .load(csr0_load), .wdata(csr0_wdata), .power_up, .reset_bus,
    .set_error_flag, .set_halt, .set_sr, .parity_event(slv_parity_err), .active,
    .csr0, .clear_error, .reset(csr0_reset), .clear_data,
    .logical_addr_en(), .running(), .sr_flag(), .parity_error(), .sr_request
  );

  fmi_ss_response u_ssr (
    .clk, .rst_n, .address_cycle(slv_address_cycle), .block_mode(slv_block_mode),
    .cycle_end(slv_cycle_end), .busy, .wt_en, .not_valid, .reject, .eob, .set_ss3,
    .ss(ssr_ss), .wt(slv_wt), .eob_armed()
  );

  // FIM and SR receivers; a busy receiver block answers SS=1
  fmi_interrupt_receiver u_irr (
    .clk, .rst_n, .fim_reset(irq_rcv_reset), .fim_enable(irq_rcv_en), .irb_select,
    .irb_block, .irb_write, .as_fall(slv_as_fall), .fim_ack, .fim_interrupt, .fim_block,
    .irb_busy_ss1, .sr_reset(sr_rcv_reset), .sr_enable(sr_rcv_en), .sr_line, .sr_ack,
    .sr_interrupt
  );
  assign slv_ss = irb_busy_ss1 ? 3'd1 : ssr_ss;

  // parameter registers written by the write parameter command (immediate
  // data): retry count (12), arbitration timeout (14), CSR8/9/1D/1E/1F (40-45)
  logic [7:0] csr8, csr9, csr1d, csr1e, csr1f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      retry_count <= '0; arb_timeout <= '0;
      csr8 <= '0; csr9 <= '0; csr1d <= '0; csr1e <= '0; csr1f <= '0;
    end else if (param_wr) begin
      unique case (param_offset)
        8'd12: retry_count <= param_data[15:0];
        8'd14: arb_timeout <= param_data[15:0];
        8'd40: csr8        <= param_data[7:0];
        8'd41: csr9        <= param_data[7:0];
        8'd43: csr1d       <= param_data[7:0];
        8'd44: csr1e       <= param_data[7:0];
        8'd45: csr1f       <= param_data[7:0];
        default: ;
      endcase
    end
  end

  // register map by byte displacement (32-bit words, lowest byte first)
  function automatic logic [31:0] reg_word(input logic [7:0] a);
    unique case (a[7:2])
      6'd2:    return status;
      6'd3:    return {arb_timeout, retry_count};
      6'd4:    return nla;
      6'd5:    return list_len;
      6'd6:    return nba;
      6'd7:    return block_len;
      6'd8:    return nsha;
      6'd9:    return hist_len;
      6'd10:   return {csr1d, 8'd0, csr9, csr8};
      6'd11:   return {16'd0, csr1f, csr1e};
      default: return 32'd0;
    endcase
  endfunction
  assign reg_rdata   = reg_word({2'b00, reg_addr});
  assign param_rdata = reg_word(param_offset);

  // status register (read-only)
  always_comb begin
    status        = '0;
    status[31]    = list_mode;
    status[30]    = active;
    status[29]    = last_to_q;
    status[28]    = last_par_q;
    status[27:25] = last_ss_q;
    status[24]    = fim_interrupt;
    status[23]    = sr_interrupt;
    status[22]    = exc_interrupt;
    status[21]    = irq_rcv_en;
    status[20]    = sr_rcv_en;
    status[19]    = int_enable;
    status[15:12] = fim_block;
    status[5:0]   = exc_code;
  end

  assign need_w2   = two_word && !have_w2;
  assign cmd_ready = (state == S_IDLE && !list_mode) || state == S_WAIT_W2;
  assign seg_cmd   = dec;

  // combinational strobes
  always_comb begin
    exec_list = 1'b0; block_init = 1'b0; fetch_cmd = 1'b0; hist_store = 1'b0;
    seq_clear = 1'b0; exc_illegal = 1'b0; seg_start = 1'b0; reset_bus = 1'b0;
    irq_rcv_reset = 1'b0; sr_rcv_reset = 1'b0; param_wr = 1'b0; param_rd = 1'b0;
    mem_rd = 1'b0; mem_wr = 1'b0; mem_addr = 32'd0; mem_wdata = 64'd0;
    unique case (state)
      S_FETCH, S_FETCH2: begin
        mem_rd    = 1'b1;
        mem_addr  = cmd_addr;
        fetch_cmd = 1'b1;
      end
      S_EXEC: if (!need_w2) begin
        if (illegal) exc_illegal = 1'b1;
        else if (!null_op) begin
          unique case (dec.op)
            OP_CONTROL: unique case (dec.func)
              FN_RESET_BUS:     reset_bus     = 1'b1;
              FN_WRITE_PARAM:   param_wr      = 1'b1;
              FN_READ_PARAM:    param_rd      = 1'b1;
              FN_EXECUTE_LIST:  exec_list     = 1'b1;
              FN_RESET_SEGDRV:  seq_clear     = 1'b1;
              FN_RESET_IRQRCV:  irq_rcv_reset = 1'b1;
              FN_RESET_SRRCV:   sr_rcv_reset  = 1'b1;
              default: ;
            endcase
            default: begin
              seg_start  = 1'b1;
              block_init = is_block;
            end
          endcase
        end
      end
      S_HIST: begin
        mem_wr     = 1'b1;
        mem_addr   = hist_addr_o;
        mem_wdata  = {hist_word1, cmd_addr_q};
        hist_store = 1'b1;
      end
      default: ;
    endcase
  end

  assign param_offset = dec.param_offset;
  assign param_data   = dec.ref_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cmd_q <= '0; word2_q <= '0; cmd_addr_q <= '0; have_w2 <= 1'b0;
      list_mode <= 1'b0; irq_rcv_en <= 1'b0; sr_rcv_en <= 1'b0; hist_ss_q <= '0;
      last_ss_q <= '0; last_to_q <= 1'b0; last_par_q <= 1'b0;
    end else begin
      if (exc_term) list_mode <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid && cmd_ready) begin
          cmd_q   <= cmd_data;
          have_w2 <= 1'b0;
          state   <= S_EXEC;
        end
        S_WAIT_W2: if (cmd_valid) begin
          word2_q <= cmd_data;
          have_w2 <= 1'b1;
          state   <= S_EXEC;
        end
        S_FETCH: begin
          cmd_addr_q <= cmd_addr;
          state      <= S_FETCH_WAIT;
        end
        S_FETCH_WAIT: if (mem_rvalid) begin
          cmd_q   <= mem_rdata;
          have_w2 <= 1'b0;
          state   <= S_EXEC;
        end
        S_FETCH2: state <= S_FETCH2_WAIT;
        S_FETCH2_WAIT: if (mem_rvalid) begin
          word2_q <= mem_rdata;
          have_w2 <= 1'b1;
          state   <= S_EXEC;
        end
        S_EXEC: if (need_w2) begin
          state <= list_mode ? S_FETCH2 : S_WAIT_W2;
        end else begin
          state <= S_NEXT;
          if (!illegal && !null_op) begin
            unique case (dec.op)
              OP_CONTROL: unique case (dec.func)
                FN_EXECUTE_LIST:  list_mode  <= 1'b1;
                FN_TERMINATE:     list_mode  <= 1'b0;
                FN_RESET_SEGDRV:  list_mode  <= 1'b0;
                FN_ENABLE_IRQRCV: irq_rcv_en <= dec.enable;
                FN_ENABLE_SRRCV:  sr_rcv_en  <= dec.enable;
                default: ;
              endcase
              default: state <= S_CYCLE;
            endcase
          end
        end
        S_CYCLE: if (cyc_done) begin
          hist_ss_q <= cyc_ss;
          if (!list_mode) begin
            last_ss_q  <= cyc_ss;
            last_to_q  <= to_wt || to_akdk || to_arb;
            last_par_q <= par_err;
          end
          state     <= exc_hist_req ? S_HIST : S_NEXT;
        end
        S_HIST: state <= S_NEXT;
        S_NEXT: begin
          if (list_mode && !list_empty) state <= S_FETCH;
          else begin
            list_mode <= 1'b0;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
