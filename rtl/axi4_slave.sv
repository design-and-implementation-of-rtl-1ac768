// axi4_slave: the AXI slave port of the memory controller. It takes AXI
// bursts on the five independent channels (write address, write data, write
// response, read address, read data) and turns every beat into one
// single-word request to the memory controller.
//
// Write path: AW is accepted when the write side is idle; then each W beat is
// accepted (wready for one cycle), passed on as a held request on
// slave_wr_en / slave_wr_addr / slave_wr_data / slave_wr_strb, and the next
// beat is taken only after slave_wr_done. The write response (bid = awid) is
// the worst response of all beats, or SLVERR when wlast does not mark the
// beat that awlen says is the last. Read path: AR is accepted when the read
// side is idle; each beat is fetched with slave_rd_en / slave_rd_addr, and
// the word from slave_rd_data is held on rdata with rvalid until rready,
// rlast on the final beat, rid = arid. The read and write sides run at the
// same time; the memory controller serialises their requests.
//
// Bursts: lengths of awlen/arlen + 1 beats (up to 256), FIXED, INCR and WRAP
// types, 4-byte beats (there is no size signal on this port, so every beat is
// a full bus word with byte strobes). The port list and widths follow the AXI
// slave block diagram, including the AXI3-style write-data ID axi_wid, which
// is accepted and not used. The request/done handshake towards the memory
// controller, the one-beat-at-a-time timing (a write beat takes one cycle
// with wready high plus the cycles the controller holds the request; a read
// beat takes those request cycles plus one cycle with rvalid high, longer if
// rready is low) and the wlast check are this design's choices.
module axi4_slave
  import zmc_pkg::*;
(
  input  logic                      axi_aclk,
  input  logic                      axi_areset_n,   // asynchronous, active low
  input  logic                      axi_sw_rst,     // synchronous software reset
  // write address channel
  input  logic [ID_WIDTH-1:0]       axi_awid,
  input  logic [7:0]                axi_awlen,
  input  logic [1:0]                axi_awburst,
  input  logic [AXI_ADDR_WIDTH-1:0] axi_awaddr,
  input  logic                      axi_awvalid,
  output logic                      axi_awready,
  // write data channel
  input  logic [ID_WIDTH-1:0]       axi_wid,
  input  strb_t                     axi_wstrb,
  input  word_t                     axi_wdata,
  input  logic                      axi_wlast,
  input  logic                      axi_wvalid,
  output logic                      axi_wready,
  // write response channel
  output logic [ID_WIDTH-1:0]       axi_bid,
  output logic [1:0]                axi_bresp,
  output logic                      axi_bvalid,
  input  logic                      axi_bready,
  // read address channel
  input  logic [ID_WIDTH-1:0]       axi_arid,
  input  logic [7:0]                axi_arlen,
  input  logic [1:0]                axi_arburst,
  input  logic [AXI_ADDR_WIDTH-1:0] axi_araddr,
  input  logic                      axi_arvalid,
  output logic                      axi_arready,
  // read data channel
  output logic [ID_WIDTH-1:0]       axi_rid,
  output word_t                     axi_rdata,
  output logic                      axi_rlast,
  output logic                      axi_rvalid,
  output logic [1:0]                axi_rresp,
  input  logic                      axi_rready,
  // towards the memory controller
  output logic                      slave_wr_en,
  output logic [AXI_ADDR_WIDTH-1:0] slave_wr_addr,
  output word_t                     slave_wr_data,
  output strb_t                     slave_wr_strb,
  input  logic                      slave_wr_done,
  input  logic [1:0]                slave_wr_resp,
  output logic                      slave_rd_en,
  output logic [AXI_ADDR_WIDTH-1:0] slave_rd_addr,
  input  logic                      slave_rd_done,
  input  word_t                     slave_rd_data,
  input  logic [1:0]                slave_rd_resp
);

  // Address of the beat after addr in a burst of len+1 four-byte beats.
  function automatic logic [AXI_ADDR_WIDTH-1:0] next_addr(
      input logic [AXI_ADDR_WIDTH-1:0] addr, input logic [1:0] burst, input logic [7:0] len);
    logic [AXI_ADDR_WIDTH-1:0] wrap_mask;
    wrap_mask = ({{(AXI_ADDR_WIDTH-8){1'b0}}, len} << 2) | AXI_ADDR_WIDTH'(3);
    unique case (burst)
      BURST_FIXED: return addr;
      BURST_WRAP:  return (addr & ~wrap_mask) | ((addr + AXI_ADDR_WIDTH'(4)) & wrap_mask);
      default:     return addr + AXI_ADDR_WIDTH'(4);
    endcase
  endfunction

  // Keep the worse of two responses.
  function automatic logic [1:0] worst(input logic [1:0] a, input logic [1:0] b);
    return (a > b) ? a : b;
  endfunction

  // ------------------------------------------------------------ write side
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_MEM, W_RESP} wstate_e;
  wstate_e    wstate;
  logic [7:0] wlen_q, wcnt_q;
  logic [1:0] wburst_q;

  assign axi_awready = (wstate == W_IDLE);
  assign axi_wready  = (wstate == W_DATA);
  assign axi_bvalid  = (wstate == W_RESP);
  assign slave_wr_en = (wstate == W_MEM);

  always_ff @(posedge axi_aclk or negedge axi_areset_n) begin
    if (!axi_areset_n) begin
      wstate        <= W_IDLE;
      wlen_q        <= '0;
      wcnt_q        <= '0;
      wburst_q      <= '0;
      axi_bid       <= '0;
      axi_bresp     <= RESP_OKAY;
      slave_wr_addr <= '0;
      slave_wr_data <= '0;
      slave_wr_strb <= '0;
    end else if (axi_sw_rst) begin
      wstate <= W_IDLE;
    end else begin
      unique case (wstate)
        W_IDLE: if (axi_awvalid) begin
          slave_wr_addr <= axi_awaddr;
          wlen_q        <= axi_awlen;
          wburst_q      <= axi_awburst;
          axi_bid       <= axi_awid;
          wcnt_q        <= '0;
          axi_bresp     <= RESP_OKAY;
          wstate        <= W_DATA;
        end
        W_DATA: if (axi_wvalid) begin
          slave_wr_data <= axi_wdata;
          slave_wr_strb <= axi_wstrb;
          if (axi_wlast != (wcnt_q == wlen_q)) axi_bresp <= RESP_SLVERR;
          wstate        <= W_MEM;
        end
        W_MEM: if (slave_wr_done) begin
          axi_bresp <= worst(axi_bresp, slave_wr_resp);
          if (wcnt_q == wlen_q) begin
            wstate <= W_RESP;
          end else begin
            wcnt_q        <= wcnt_q + 8'd1;
            slave_wr_addr <= next_addr(slave_wr_addr, wburst_q, wlen_q);
            wstate        <= W_DATA;
          end
        end
        W_RESP: if (axi_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- read side
  typedef enum logic [1:0] {R_IDLE, R_MEM, R_DATA} rstate_e;
  rstate_e    rstate;
  logic [7:0] rlen_q, rcnt_q;
  logic [1:0] rburst_q;

  assign axi_arready = (rstate == R_IDLE);
  assign axi_rvalid  = (rstate == R_DATA);
  assign axi_rlast   = (rstate == R_DATA) && (rcnt_q == rlen_q);
  assign slave_rd_en = (rstate == R_MEM);

  always_ff @(posedge axi_aclk or negedge axi_areset_n) begin
    if (!axi_areset_n) begin
      rstate        <= R_IDLE;
      rlen_q        <= '0;
      rcnt_q        <= '0;
      rburst_q      <= '0;
      axi_rid       <= '0;
      axi_rdata     <= '0;
      axi_rresp     <= RESP_OKAY;
      slave_rd_addr <= '0;
    end else if (axi_sw_rst) begin
      rstate <= R_IDLE;
    end else begin
      unique case (rstate)
        R_IDLE: if (axi_arvalid) begin
          slave_rd_addr <= axi_araddr;
          rlen_q        <= axi_arlen;
          rburst_q      <= axi_arburst;
          axi_rid       <= axi_arid;
          rcnt_q        <= '0;
          rstate        <= R_MEM;
        end
        R_MEM: if (slave_rd_done) begin
          axi_rdata <= slave_rd_data;
          axi_rresp <= slave_rd_resp;
          rstate    <= R_DATA;
        end
        R_DATA: if (axi_rready) begin
          if (rcnt_q == rlen_q) begin
            rstate <= R_IDLE;
          end else begin
            rcnt_q        <= rcnt_q + 8'd1;
            slave_rd_addr <= next_addr(slave_rd_addr, rburst_q, rlen_q);
            rstate        <= R_MEM;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // --------------------------------------------------- AXI channel rules
  // A master must hold VALID and its payload until READY; this slave must do
  // the same on its own VALID outputs.
  default disable iff (!axi_areset_n || axi_sw_rst);

  a_aw_hold: assert property (@(posedge axi_aclk)
    axi_awvalid && !axi_awready |=> axi_awvalid && $stable(axi_awaddr))
    else $error("AXI: AW payload changed before awready");
  a_ar_hold: assert property (@(posedge axi_aclk)
    axi_arvalid && !axi_arready |=> axi_arvalid && $stable(axi_araddr))
    else $error("AXI: AR payload changed before arready");
  a_w_hold: assert property (@(posedge axi_aclk)
    axi_wvalid && !axi_wready |=> axi_wvalid && $stable(axi_wdata))
    else $error("AXI: W payload changed before wready");
  a_r_hold: assert property (@(posedge axi_aclk)
    axi_rvalid && !axi_rready |=> axi_rvalid && $stable(axi_rdata))
    else $error("AXI: R payload changed before rready");
  a_b_hold: assert property (@(posedge axi_aclk)
    axi_bvalid && !axi_bready |=> axi_bvalid && $stable(axi_bresp))
    else $error("AXI: B payload changed before bready");

endmodule
