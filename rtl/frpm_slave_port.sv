// frpm_slave_port: the minimal FASTBUS slave of the FRPM, addressable only
// geographically and only in CSR space, by another master or by the FRPM
// itself for testing.
//
// Address cycle: at AS(u) with EG=1 and AD<4:0> equal to the module's
// geographical address GA the port attaches and answers AK(u). MS=1 (CSR
// space) is the only address code accepted; any other MS still attaches but
// returns SS=6. A parity error on the address (PE=1 and PA wrong) returns
// SS=7. AS(d) detaches and AK falls.
//
// Data cycles while attached: every DS transition is one cycle, answered by
// DK following DS. MS=2 loads the secondary address (NTA) on a write and returns
// it on a read. MS=0 accesses CSR[NTA]; NTA values 0, 1, 8 and 9 are accepted,
// any other NTA gives SS=7, as does a write with bad parity (which also sets
// CSR0 bit 14). Other data MS codes return SS=6. Reads return:
//   CSR0: module ID 10D6 (hex) in bits 31:16, CSR0 bits 14, 2, 1, 0;
//   CSR8: the master's arbitration register (register 1 bits 7:0);
//   CSR9: status register bits 4-7 in CSR9 bits 4-7;
//   CSR1: zero.
// CSR0 writes: bits 0, 1, 2 and 14 set the corresponding CSR0 bit, bits 16,
// 17, 18 and 30 clear them (each clear bit sits 16 above its set bit). A
// write with bit 30 also pulses srst, the slave reset output. The host may load
// the same four CSR0 bits through status-register bits 3:0. Reset-bus (RB)
// seen with the bus halted (BH) clears CSR0 and detaches.
//
// Read data and SS stay on the bus until the next DS transition or AS(d).
// Timing: AK and DK are registered, one clock after the edge that caused them.
// What follows the document: geographical CSR-only addressing, the accepted
// NTA and MS codes and their SS responses, the CSR0 contents and module ID,
// the CSR8/CSR9 read paths. This design's own choices: odd parity, CSR1 read
// as zero, writes to NTA 1, 8, 9 ignored, and the RB/BH reset.
module frpm_slave_port
  import frpm_pkg::*;
#(
  parameter bit PARITY_ODD = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,
  input  fb_bus_t     bus,
  input  logic [7:0]  csr8,
  input  logic [3:0]  csr9_hi,          // CSR9 bits 7:4
  input  logic        host_csr0_wr,     // status register write
  input  logic [3:0]  host_csr0,        // status bits 3:0 = CSR0 14,2,1,0
  output fb_slave_drive_t drv,
  output logic [3:0]  csr0_bits,        // CSR0 bits 14,2,1,0
  output logic        attached,
  output logic        srst
);

  logic        as_q, ds_seen;
  logic [31:0] nta, rdata;
  logic [3:0]  csr0;                    // {14, 2, 1, 0}
  logic        ak_q, dk_q, rdv_q;
  logic [2:0]  ss_q;

  function automatic logic nta_ok(input logic [31:0] n);
    return n == 32'd0 || n == 32'd1 || n == 32'd8 || n == 32'd9;
  endfunction

  function automatic logic [31:0] csr_read(input logic [31:0] n, input logic [3:0] c0,
                                           input logic [7:0] c8, input logic [3:0] c9);
    unique case (n)
      32'd0:   return {FRPM_MODULE_ID, 1'b0, c0[3], 11'd0, c0[2:0]};
      32'd8:   return {24'd0, c8};
      32'd9:   return {24'd0, c9, 4'd0};
      default: return 32'd0;
    endcase
  endfunction

  logic par_bad;
  assign par_bad = bus.pe && (bus.pa != fb_parity(bus.ad, PARITY_ODD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_q <= 1'b0; ds_seen <= 1'b0; nta <= '0; rdata <= '0;
      csr0 <= '0; attached <= 1'b0; ak_q <= 1'b0; dk_q <= 1'b0; ss_q <= '0;
      rdv_q <= 1'b0; srst <= 1'b0;
    end else begin
      as_q <= bus.as_;
      srst <= 1'b0;
      if (host_csr0_wr) csr0 <= host_csr0;
      if (bus.rb && bus.bh) begin
        csr0 <= '0; attached <= 1'b0; ak_q <= 1'b0; dk_q <= 1'b0; ss_q <= '0;
        rdv_q <= 1'b0;
      end else if (bus.as_ && !as_q) begin
        // primary address cycle
        if (bus.eg && bus.ad[4:0] == ga) begin
          attached <= 1'b1;
          ak_q     <= 1'b1;
          dk_q     <= bus.ds;
          ds_seen  <= bus.ds;
          rdv_q    <= 1'b0;
          ss_q     <= (bus.ms != 3'd1) ? 3'd6 : par_bad ? 3'd7 : 3'd0;
        end
      end else if (!bus.as_ && as_q) begin
        attached <= 1'b0; ak_q <= 1'b0; dk_q <= 1'b0; ss_q <= '0; rdv_q <= 1'b0;
      end else if (attached && bus.ds != ds_seen) begin
        // one data cycle per DS transition
        ds_seen <= bus.ds;
        dk_q    <= bus.ds;
        rdv_q   <= bus.rd;
        ss_q    <= 3'd0;
        unique case (bus.ms)
          3'd2: begin
            if (bus.rd) rdata <= nta;
            else if (par_bad) begin ss_q <= 3'd7; csr0[3] <= 1'b1; end
            else nta <= bus.ad;
          end
          3'd0: begin
            if (!nta_ok(nta)) ss_q <= 3'd7;
            else if (bus.rd) rdata <= csr_read(nta, csr0, csr8, csr9_hi);
            else if (par_bad) begin ss_q <= 3'd7; csr0[3] <= 1'b1; end
            else if (nta == 32'd0) begin
              csr0 <= (csr0 | {bus.ad[14], bus.ad[2:0]})
                      & ~{bus.ad[30], bus.ad[18:16]};
              srst <= bus.ad[30];
            end
          end
          default: ss_q <= 3'd6;
        endcase
      end
    end
  end

  assign csr0_bits = csr0;
  assign drv.ak    = ak_q;
  assign drv.dk    = dk_q;
  assign drv.wt    = 1'b0;
  assign drv.ss    = attached ? ss_q : 3'd0;
  assign drv.ad_en = attached && rdv_q;
  assign drv.ad    = drv.ad_en ? rdata : 32'd0;
  assign drv.pa    = drv.ad_en ? fb_parity(rdata, PARITY_ODD) : 1'b0;
  assign drv.pe    = drv.ad_en;

endmodule
