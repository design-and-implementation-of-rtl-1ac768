// csr_registers: control and status registers of the memory controller,
// written over an APB-style register port.
//
// Registers (byte addresses on i_paddr, REG_ADDR_WIDTH bits):
//   0x000 ECC_EN   bit 0 enables ECC checking and correction on reads
//                  (reset value 1).
//   0x004 ECC_INJ  32-bit error-injection mask; each set bit inverts that data
//                  bit of every word written from then on (reset value 0).
//   ECC_STATUS     read only, always visible on o_ecc_status:
//                  [0]     a single-bit error was corrected (sticky)
//                  [1]     an uncorrectable error was detected (sticky)
//                  [15:8]  number of corrected errors, saturating at 255
//                  [29:16] word address of the most recent error
// Writes take effect when i_psel, i_penable and i_pwrite are all high (no wait
// states); i_pstrb selects the bytes written. Other addresses are ignored.
// The register port has no read-data output, as on the controller's block
// diagram, so the status register is brought out as a signal instead.
// ECC_interrupt is high while either sticky flag is set; i_ecc_status_clear
// (or a software reset) clears the whole status register. Error events from
// the ECC decoder arrive as one-cycle pulses on ce_event / ue_event.
//
// The register names ECC enable, ECC injection and ECC status follow the
// synthesised design's net names; the addresses, reset values, field layout
// and the zero-wait-state write timing are this design's choices.
module csr_registers
  import zmc_pkg::*;
#(
  parameter int unsigned REG_ADDR_WIDTH = 10,
  parameter int unsigned ERR_ADDR_WIDTH = 14   // RAM word-address width
) (
  input  logic                      clk,
  input  logic                      rstn,               // asynchronous, active low
  input  logic                      sw_rst,             // synchronous software reset
  input  logic                      i_psel,
  input  logic                      i_penable,
  input  logic                      i_pwrite,
  input  word_t                     i_pwdata,
  input  logic [REG_ADDR_WIDTH-1:0] i_paddr,
  input  strb_t                     i_pstrb,
  input  logic                      i_ecc_status_clear,
  input  logic                      ce_event,           // corrected error seen
  input  logic                      ue_event,           // uncorrectable error seen
  input  logic [ERR_ADDR_WIDTH-1:0] err_addr,           // word address of that error
  output logic                      o_ecc_en,
  output word_t                     o_ecc_inj,
  output word_t                     o_ecc_status,
  output logic                      o_ecc_interrupt
);

  logic wr_access;
  assign wr_access = i_psel && i_penable && i_pwrite;

  function automatic word_t merge(input word_t old_w, input word_t new_w, input strb_t strb);
    word_t r;
    for (int unsigned b = 0; b < STRB_WIDTH; b++)
      r[8*b +: 8] = strb[b] ? new_w[8*b +: 8] : old_w[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      o_ecc_en  <= 1'b1;
      o_ecc_inj <= '0;
    end else if (sw_rst) begin
      o_ecc_en  <= 1'b1;
      o_ecc_inj <= '0;
    end else if (wr_access) begin
      if (i_paddr == REG_ADDR_WIDTH'(CSR_ECC_EN_ADDR) && i_pstrb[0])
        o_ecc_en <= i_pwdata[0];
      if (i_paddr == REG_ADDR_WIDTH'(CSR_ECC_INJ_ADDR))
        o_ecc_inj <= merge(o_ecc_inj, i_pwdata, i_pstrb);
    end
  end

  logic [7:0] ce_count;
  assign ce_count = o_ecc_status[ST_CNT_LSB +: 8];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      o_ecc_status <= '0;
    end else if (sw_rst || i_ecc_status_clear) begin
      o_ecc_status <= '0;
    end else if (ce_event || ue_event) begin
      if (ce_event) begin
        o_ecc_status[ST_CE_BIT] <= 1'b1;
        if (ce_count != 8'hFF) o_ecc_status[ST_CNT_LSB +: 8] <= ce_count + 8'd1;
      end
      if (ue_event) o_ecc_status[ST_UE_BIT] <= 1'b1;
      o_ecc_status[ST_ADDR_LSB +: ERR_ADDR_WIDTH] <= err_addr;
    end
  end

  assign o_ecc_interrupt = o_ecc_status[ST_CE_BIT] | o_ecc_status[ST_UE_BIT];

endmodule
