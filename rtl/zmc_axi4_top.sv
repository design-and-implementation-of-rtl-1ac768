// zmc_axi4_top: byte-access memory controller with an AXI4 slave port, an
// APB-style register port and an ECC-protected dual-port RAM.
//
// Structure (as in the synthesised design's hierarchy):
//   AXI bus -> axi4_slave_inst -> mem_ctrl_inst -> dual_port_ram_inst
//                                  |-- CSR_registers_inst (APB register port)
//                                  |-- ECC_encoding_inst / ECC_decoding_inst
// The AXI slave splits bursts into word requests; the memory controller
// performs each as a plain write, a read-modify-write (when wstrb is not
// 1111, which is what gives byte access) or a read, encoding 32-bit data into
// 39-bit SECDED codewords and correcting single-bit errors on the way back.
// A rising edge on zmc_top_mem_init clears the whole RAM; MEM_init_ACK
// reports completion. zmc_top_sw_rst is a synchronous software reset of all
// logic except the RAM contents; zmc_top_rstn is the asynchronous reset.
//
// The port list follows the controller's block diagram: no AXI IDs, 4-bit
// awlen/arlen (bursts of 1 to 16 beats), 32-bit addresses and data.
// Timing, counted in clock edges after the address handshake with wvalid and
// bready/rready already high: a single-beat full-word write raises bvalid
// after 4 edges, a byte write after 5 (the extra read of the
// read-modify-write), a single-beat read raises rvalid after 4. In bursts a
// write beat takes 4 edges and a read beat 5. The RAM
// holds 2**ADDR_WIDTH 39-bit words (16384 words = 64 KiB of data by default);
// byte addresses at or above that size answer SLVERR.
//
// The split into AXI slave, memory controller and dual-port RAM, the signal
// names and the 14-bit / 39-bit RAM widths follow the published design; the
// ECC code, the register map, the slave-to-controller handshake and all the
// cycle timing above are this implementation's own choices.
module zmc_axi4_top
  import zmc_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH     = 14,  // RAM word-address width
  parameter int unsigned REG_ADDR_WIDTH = 10,  // register-port address width
  parameter int unsigned LEN_WIDTH      = 4    // awlen / arlen width
) (
  input  logic                      zmc_top_clk,
  input  logic                      zmc_top_rstn,
  input  logic                      zmc_top_sw_rst,
  input  logic                      zmc_top_mem_init,
  // AXI write address / data / response
  input  logic [AXI_ADDR_WIDTH-1:0] awaddr,
  input  logic [LEN_WIDTH-1:0]      awlen,
  input  logic [1:0]                awburst,
  input  logic                      awvalid,
  output logic                      awready,
  input  word_t                     wdata,
  input  logic                      wlast,
  input  strb_t                     wstrb,
  input  logic                      wvalid,
  output logic                      wready,
  input  logic                      bready,
  output logic                      bvalid,
  output logic [1:0]                bresp,
  // AXI read address / data
  input  logic [AXI_ADDR_WIDTH-1:0] araddr,
  input  logic [LEN_WIDTH-1:0]      arlen,
  input  logic [1:0]                arburst,
  input  logic                      arvalid,
  output logic                      arready,
  input  logic                      rready,
  output word_t                     rdata,
  output logic                      rlast,
  output logic [1:0]                rresp,
  output logic                      rvalid,
  // register port and status
  input  logic                      i_psel,
  input  logic                      i_penable,
  input  logic                      i_pwrite,
  input  word_t                     i_pwdata,
  input  logic [REG_ADDR_WIDTH-1:0] i_paddr,
  input  strb_t                     i_pstrb,
  input  logic                      i_ECC_STAUS_REG_clear,
  output logic                      ECC_interrupt,
  output word_t                     O_ECC_STATUS_REG,
  output logic                      MEM_init_ACK
);

  logic                      slave_wr_en, slave_wr_done;
  logic [AXI_ADDR_WIDTH-1:0] slave_wr_addr, slave_rd_addr;
  word_t                     slave_wr_data, slave_rd_data;
  strb_t                     slave_wr_strb;
  logic [1:0]                slave_wr_resp, slave_rd_resp;
  logic                      slave_rd_en, slave_rd_done;

  logic                  bram_en, bram_wr_en, bram_rd_en;
  logic [ADDR_WIDTH-1:0] bram_wr_addr, bram_rd_addr;
  code_t                 bram_wr_data, bram_rd_data;

  logic [ID_WIDTH-1:0] unused_bid, unused_rid;

  axi4_slave axi4_slave_inst (
    .axi_aclk      (zmc_top_clk),
    .axi_areset_n  (zmc_top_rstn),
    .axi_sw_rst    (zmc_top_sw_rst),
    .axi_awid      ('0),
    .axi_awlen     (8'(awlen)),
    .axi_awburst   (awburst),
    .axi_awaddr    (awaddr),
    .axi_awvalid   (awvalid),
    .axi_awready   (awready),
    .axi_wid       ('0),
    .axi_wstrb     (wstrb),
    .axi_wdata     (wdata),
    .axi_wlast     (wlast),
    .axi_wvalid    (wvalid),
    .axi_wready    (wready),
    .axi_bid       (unused_bid),
    .axi_bresp     (bresp),
    .axi_bvalid    (bvalid),
    .axi_bready    (bready),
    .axi_arid      ('0),
    .axi_arlen     (8'(arlen)),
    .axi_arburst   (arburst),
    .axi_araddr    (araddr),
    .axi_arvalid   (arvalid),
    .axi_arready   (arready),
    .axi_rid       (unused_rid),
    .axi_rdata     (rdata),
    .axi_rlast     (rlast),
    .axi_rvalid    (rvalid),
    .axi_rresp     (rresp),
    .axi_rready    (rready),
    .slave_wr_en   (slave_wr_en),
    .slave_wr_addr (slave_wr_addr),
    .slave_wr_data (slave_wr_data),
    .slave_wr_strb (slave_wr_strb),
    .slave_wr_done (slave_wr_done),
    .slave_wr_resp (slave_wr_resp),
    .slave_rd_en   (slave_rd_en),
    .slave_rd_addr (slave_rd_addr),
    .slave_rd_done (slave_rd_done),
    .slave_rd_data (slave_rd_data),
    .slave_rd_resp (slave_rd_resp)
  );

  mem_ctrl #(
    .ADDR_WIDTH     (ADDR_WIDTH),
    .REG_ADDR_WIDTH (REG_ADDR_WIDTH)
  ) mem_ctrl_inst (
    .MEM_ctrl_clk            (zmc_top_clk),
    .MEM_ctrl_rstn           (zmc_top_rstn),
    .MEM_ctrl_sw_rst         (zmc_top_sw_rst),
    .MEM_ctrl_mem_init       (zmc_top_mem_init),
    .MEM_ctrl_wr_en          (slave_wr_en),
    .MEM_ctrl_wr_addr_bus    (slave_wr_addr),
    .MEM_ctrl_write_data_bus (slave_wr_data),
    .MEM_ctrl_wr_strobe      (slave_wr_strb),
    .MEM_ctrl_wr_done        (slave_wr_done),
    .wr_resp                 (slave_wr_resp),
    .MEM_ctrl_rd_en          (slave_rd_en),
    .MEM_ctrl_rd_addr_bus    (slave_rd_addr),
    .MEM_ctrl_rd_done        (slave_rd_done),
    .MEM_ctrl_data_out       (slave_rd_data),
    .rd_resp                 (slave_rd_resp),
    .BRAM_en                 (bram_en),
    .BRAM_wr_en              (bram_wr_en),
    .BRAM_wr_addr            (bram_wr_addr),
    .BRAM_wr_data            (bram_wr_data),
    .BRAM_rd_en              (bram_rd_en),
    .BRAM_rd_addr            (bram_rd_addr),
    .BRAM_rd_data            (bram_rd_data),
    .i_psel                  (i_psel),
    .i_penable               (i_penable),
    .i_pwrite                (i_pwrite),
    .i_pwdata                (i_pwdata),
    .i_paddr                 (i_paddr),
    .i_pstrb                 (i_pstrb),
    .i_ECC_STATUS_REG_clear  (i_ECC_STAUS_REG_clear),
    .o_ECC_STATUS_REG        (O_ECC_STATUS_REG),
    .ECC_interrupt           (ECC_interrupt),
    .MEM_init_ACK            (MEM_init_ACK)
  );

  dual_port_ram #(
    .ADDR_WIDTH        (ADDR_WIDTH),
    .MEMORY_DATA_WIDTH (CODE_WIDTH)
  ) dual_port_ram_inst (
    .RAM_clk     (zmc_top_clk),
    .RAM_rstn    (zmc_top_rstn),
    .RAM_en      (bram_en),
    .RAM_wr_en   (bram_wr_en),
    .RAM_wr_addr (bram_wr_addr),
    .RAM_wr_data (bram_wr_data),
    .RAM_rd_en   (bram_rd_en),
    .RAM_rd_addr (bram_rd_addr),
    .RAM_rd_data (bram_rd_data)
  );

endmodule
