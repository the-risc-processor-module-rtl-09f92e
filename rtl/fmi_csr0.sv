// fmi_csr0: the user-application independent bits of control/status register
// 0 held on board the FMI: error flag (bit 0), logical-address enable (1),
// run/halt (2), module allocated (3), SR enable (4), SR flag (5), parity error
// (14) and module active (15).
//
// A CSR0 load (`load` with the FASTBUS write data) sets a bit by writing 1 to
// its position and clears it by writing 1 sixteen positions higher, as in the
// FASTBUS standard; there is no toggle operation. Special cases from the
// specification:
//   bit 16: CLEAR_ERROR, clears the simulated-error latch (bit 0) and the
//           parity-error bit (14), and is given to the user;
//   bit 30: RESET (also asserted while POWER_UP is high); RESET returns all
//           internal bits to their power-up state;
//   bit 31: CLEAR_DATA, passed to the user only;
//   bit 21: clears the SR flag.
// Bit 0 reads as SET_ERROR_FLAG OR the simulated-error latch. SET_HALT clears
// run; SET_SR sets the SR flag; parity_event sets bit 14; bit 15 reflects
// ACTIVE. RESET_BUS clears bits 1 and 2. The SR line is requested while the SR
// flag and SR enable are both set.
// All state changes at the clock; RESET, CLEAR_ERROR and CLEAR_DATA are
// combinational from `load` and the data.
// This design's own choice: RESET also clears bits 3 and 4.
module fmi_csr0 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,            // CSR0_LOAD
  input  logic [31:0] wdata,
  input  logic        power_up,
  input  logic        reset_bus,
  input  logic        set_error_flag,
  input  logic        set_halt,
  input  logic        set_sr,
  input  logic        parity_event,
  input  logic        active,
  output logic [15:0] csr0,            // read value of the internal bits
  output logic        clear_error,
  output logic        reset,
  output logic        clear_data,
  output logic        logical_addr_en,
  output logic        running,
  output logic        sr_flag,
  output logic        parity_error,
  output logic        sr_request
);

  logic err_latch, allocated, sr_enable;

  assign clear_error = load && wdata[16];
  assign reset       = (load && wdata[30]) || power_up;
  assign clear_data  = load && wdata[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_latch <= 1'b0; logical_addr_en <= 1'b0; running <= 1'b0;
      allocated <= 1'b0; sr_enable <= 1'b0; sr_flag <= 1'b0; parity_error <= 1'b0;
    end else if (reset) begin
      err_latch <= 1'b0; logical_addr_en <= 1'b0; running <= 1'b0;
      allocated <= 1'b0; sr_enable <= 1'b0; sr_flag <= 1'b0; parity_error <= 1'b0;
    end else begin
      if (load) begin
        if (wdata[0])  err_latch       <= 1'b1;
        if (wdata[1])  logical_addr_en <= 1'b1;
        if (wdata[17]) logical_addr_en <= 1'b0;
        if (wdata[2])  running         <= 1'b1;
        if (wdata[18]) running         <= 1'b0;
        if (wdata[3])  allocated       <= 1'b1;
        if (wdata[19]) allocated       <= 1'b0;
        if (wdata[4])  sr_enable       <= 1'b1;
        if (wdata[20]) sr_enable       <= 1'b0;
        if (wdata[21]) sr_flag         <= 1'b0;
        if (wdata[14]) parity_error    <= 1'b1;
        if (wdata[16]) begin
          err_latch    <= 1'b0;
          parity_error <= 1'b0;
        end
      end
      if (set_halt)     running      <= 1'b0;
      if (set_sr)       sr_flag      <= 1'b1;
      if (parity_event) parity_error <= 1'b1;
      if (reset_bus) begin
        logical_addr_en <= 1'b0;
        running         <= 1'b0;
      end
    end
  end

  always_comb begin
    csr0     = '0;
    csr0[0]  = err_latch | set_error_flag;
    csr0[1]  = logical_addr_en;
    csr0[2]  = running;
    csr0[3]  = allocated;
    csr0[4]  = sr_enable;
    csr0[5]  = sr_flag;
    csr0[14] = parity_error;
    csr0[15] = active;
  end

  assign sr_request = sr_flag && sr_enable;

endmodule
