// dual_port_ram: the controller's data memory, with one write port and one
// read port that work in the same cycle on independent addresses.
//
// Each word holds 39 bits (32 data bits and 7 ECC check bits) and there are
// 2**ADDR_WIDTH words; the 14-bit address and 39-bit data widths are the ones
// printed on the RAM instance of the synthesised design. All control inputs
// are active high and qualified by the global enable RAM_en.
//
// Timing: a write with RAM_en & RAM_wr_en lands at the rising clock edge. A
// read with RAM_en & RAM_rd_en returns the word on RAM_rd_data after that
// edge (one-cycle latency) and RAM_rd_data holds until the next read. A read
// and a write to the same address in the same cycle return the old word. The
// active-low RAM_rstn clears the read-data register only; the array has no
// reset (the memory controller's initialisation sequence clears it). Read
// latency, collision behaviour and reset scope are this design's choices.
module dual_port_ram #(
  parameter int unsigned ADDR_WIDTH        = 14,
  parameter int unsigned MEMORY_DATA_WIDTH = 39
) (
  input  logic                         RAM_clk,
  input  logic                         RAM_rstn,
  input  logic                         RAM_en,
  input  logic                         RAM_wr_en,
  input  logic [ADDR_WIDTH-1:0]        RAM_wr_addr,
  input  logic [MEMORY_DATA_WIDTH-1:0] RAM_wr_data,
  input  logic                         RAM_rd_en,
  input  logic [ADDR_WIDTH-1:0]        RAM_rd_addr,
  output logic [MEMORY_DATA_WIDTH-1:0] RAM_rd_data
);

  localparam int unsigned DEPTH = 1 << ADDR_WIDTH;

  logic [MEMORY_DATA_WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge RAM_clk) begin
    if (RAM_en && RAM_wr_en) mem[RAM_wr_addr] <= RAM_wr_data;
  end

  always_ff @(posedge RAM_clk or negedge RAM_rstn) begin
    if (!RAM_rstn)                RAM_rd_data <= '0;
    else if (RAM_en && RAM_rd_en) RAM_rd_data <= mem[RAM_rd_addr];
  end

endmodule
