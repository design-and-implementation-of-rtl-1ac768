// mem_ctrl: the memory controller. It serves single-word read and write
// requests from the AXI slave on the 39-bit dual-port RAM, adding ECC on the
// way in and checking it on the way out, and gives byte access through a
// read-modify-write whenever a write does not cover all four bytes.
//
// Request side (from the AXI slave): a request is a level. MEM_ctrl_wr_en
// with address, data and byte strobe, or MEM_ctrl_rd_en with address, is held
// until the matching one-cycle MEM_ctrl_wr_done / MEM_ctrl_rd_done pulse,
// which comes with wr_resp / rd_resp (and MEM_ctrl_data_out for a read). The
// slave drops the request in the cycle after the pulse (assertions below
// check both sides of this rule). When both requests wait, they are served
// alternately.
//
// Addresses are AXI byte addresses; bits [ADDR_WIDTH+1:2] select the word
// and any higher set bit makes the access an error (SLVERR, memory untouched).
//
// Sequences (cycle counts from the cycle the request is accepted):
//   full write  (strobe 1111): accept, write codeword, done           3 cycles
//   byte write  (other strobe): accept, read word, check/correct, merge the
//               new bytes, write codeword, done                       4 cycles
//               an uncorrectable error in the old word aborts the write
//               and answers SLVERR
//   read:       accept, read word, check/correct, done               4 cycles
//               an uncorrectable error answers SLVERR
// A rising edge on MEM_ctrl_mem_init (remembered if the controller is busy)
// starts initialisation: every word is written with the codeword of zero, one
// word per cycle, and MEM_init_ACK rises when the last one is written (2**ADDR_WIDTH
// + 2 clock edges after the edge that samples mem_init high, when idle) and
// stays high until the next initialisation or reset. Requests wait meanwhile.
//
// Inside are the CSR block (ECC enable, error-injection mask, ECC status and
// interrupt, written over the APB-style port) and the ECC encoder and
// decoder, as in the synthesised design's hierarchy. The document gives the
// controller's role, its port list and the read-modify-write operation; the
// request handshake, the sequences above, arbitration, address checking and
// the initialisation protocol are this design's choices.
module mem_ctrl
  import zmc_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH     = 14,
  parameter int unsigned REG_ADDR_WIDTH = 10
) (
  input  logic                      MEM_ctrl_clk,
  input  logic                      MEM_ctrl_rstn,     // asynchronous, active low
  input  logic                      MEM_ctrl_sw_rst,   // synchronous software reset
  input  logic                      MEM_ctrl_mem_init,
  // write request
  input  logic                      MEM_ctrl_wr_en,
  input  logic [AXI_ADDR_WIDTH-1:0] MEM_ctrl_wr_addr_bus,
  input  word_t                     MEM_ctrl_write_data_bus,
  input  strb_t                     MEM_ctrl_wr_strobe,
  output logic                      MEM_ctrl_wr_done,
  output logic [1:0]                wr_resp,
  // read request
  input  logic                      MEM_ctrl_rd_en,
  input  logic [AXI_ADDR_WIDTH-1:0] MEM_ctrl_rd_addr_bus,
  output logic                      MEM_ctrl_rd_done,
  output word_t                     MEM_ctrl_data_out,
  output logic [1:0]                rd_resp,
  // RAM side
  output logic                      BRAM_en,
  output logic                      BRAM_wr_en,
  output logic [ADDR_WIDTH-1:0] BRAM_wr_addr,
  output code_t                     BRAM_wr_data,
  output logic                      BRAM_rd_en,
  output logic [ADDR_WIDTH-1:0] BRAM_rd_addr,
  input  code_t                     BRAM_rd_data,
  // register port
  input  logic                      i_psel,
  input  logic                      i_penable,
  input  logic                      i_pwrite,
  input  word_t                     i_pwdata,
  input  logic [REG_ADDR_WIDTH-1:0] i_paddr,
  input  strb_t                     i_pstrb,
  input  logic                      i_ECC_STATUS_REG_clear,
  output word_t                     o_ECC_STATUS_REG,
  output logic                      ECC_interrupt,
  output logic                      MEM_init_ACK
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_INIT,
    S_WR_READ,   // read the old word of a byte write
    S_WRITE,     // write the (merged) codeword
    S_WR_RESP,
    S_RD_READ,
    S_RD_CHECK,
    S_RD_RESP
  } state_e;

  state_e                    state;
  logic [ADDR_WIDTH-1:0] addr_q;      // word address of the current access
  word_t                     wdata_q;
  strb_t                     strb_q;
  logic                      rmw_q;       // current write is a read-modify-write
  logic                      last_wr_q;   // last served request was a write
  logic                      init_req_q;
  logic                      mem_init_d;

  // ---------------------------------------------------------------- CSRs
  logic  ecc_en_w;
  word_t ecc_inj_w;
  logic  ce_event, ue_event;

  csr_registers #(.REG_ADDR_WIDTH(REG_ADDR_WIDTH), .ERR_ADDR_WIDTH(ADDR_WIDTH)) CSR_registers_inst (
    .clk                (MEM_ctrl_clk),
    .rstn               (MEM_ctrl_rstn),
    .sw_rst             (MEM_ctrl_sw_rst),
    .i_psel             (i_psel),
    .i_penable          (i_penable),
    .i_pwrite           (i_pwrite),
    .i_pwdata           (i_pwdata),
    .i_paddr            (i_paddr),
    .i_pstrb            (i_pstrb),
    .i_ecc_status_clear (i_ECC_STATUS_REG_clear),
    .ce_event           (ce_event),
    .ue_event           (ue_event),
    .err_addr           (addr_q),
    .o_ecc_en           (ecc_en_w),
    .o_ecc_inj          (ecc_inj_w),
    .o_ecc_status       (o_ECC_STATUS_REG),
    .o_ecc_interrupt    (ECC_interrupt)
  );

  // ----------------------------------------------------------------- ECC
  word_t dec_data;
  logic  dec_single, dec_double;

  ecc_decoder ECC_decoding_inst (
    .code_in    (BRAM_rd_data),
    .ecc_en     (ecc_en_w),
    .data_out   (dec_data),
    .single_err (dec_single),
    .double_err (dec_double)
  );

  word_t merged, enc_in, enc_inj;

  always_comb begin
    for (int unsigned b = 0; b < STRB_WIDTH; b++)
      merged[8*b +: 8] = (!rmw_q || strb_q[b]) ? wdata_q[8*b +: 8] : dec_data[8*b +: 8];
    enc_in  = (state == S_INIT) ? '0 : merged;
    enc_inj = (state == S_INIT) ? '0 : ecc_inj_w;
  end

  ecc_encoder ECC_encoding_inst (
    .data_in  (enc_in),
    .inj_mask (enc_inj),
    .code_out (BRAM_wr_data)
  );

  // --------------------------------------------------------- RAM signals
  logic checking;  // the RAM's read data is being checked this cycle
  assign checking   = (state == S_RD_CHECK) || (state == S_WRITE && rmw_q);

  assign BRAM_rd_en   = (state == S_WR_READ) || (state == S_RD_READ);
  assign BRAM_rd_addr = addr_q;
  assign BRAM_wr_en   = (state == S_INIT) || (state == S_WRITE && !(rmw_q && dec_double));
  assign BRAM_wr_addr = addr_q;
  assign BRAM_en      = BRAM_rd_en || BRAM_wr_en;

  assign ce_event = checking && dec_single;
  assign ue_event = checking && dec_double;

  assign MEM_ctrl_wr_done = (state == S_WR_RESP);
  assign MEM_ctrl_rd_done = (state == S_RD_RESP);

  // -------------------------------------------------------- request decode
  localparam int unsigned HI = AXI_ADDR_WIDTH - ADDR_WIDTH - 2;

  logic take_wr, take_rd, wr_oor, rd_oor;
  always_comb begin
    take_wr = MEM_ctrl_wr_en && (!MEM_ctrl_rd_en || !last_wr_q);
    take_rd = MEM_ctrl_rd_en && !take_wr;
    wr_oor  = MEM_ctrl_wr_addr_bus[AXI_ADDR_WIDTH-1 -: HI] != '0;
    rd_oor  = MEM_ctrl_rd_addr_bus[AXI_ADDR_WIDTH-1 -: HI] != '0;
  end

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge MEM_ctrl_clk or negedge MEM_ctrl_rstn) begin
    if (!MEM_ctrl_rstn) begin
      state             <= S_IDLE;
      addr_q            <= '0;
      wdata_q           <= '0;
      strb_q            <= '0;
      rmw_q             <= 1'b0;
      last_wr_q         <= 1'b0;
      init_req_q        <= 1'b0;
      mem_init_d        <= 1'b0;
      MEM_init_ACK      <= 1'b0;
      wr_resp           <= RESP_OKAY;
      rd_resp           <= RESP_OKAY;
      MEM_ctrl_data_out <= '0;
    end else if (MEM_ctrl_sw_rst) begin
      state        <= S_IDLE;
      rmw_q        <= 1'b0;
      last_wr_q    <= 1'b0;
      init_req_q   <= 1'b0;
      mem_init_d   <= MEM_ctrl_mem_init;
      MEM_init_ACK <= 1'b0;
    end else begin
      mem_init_d <= MEM_ctrl_mem_init;
      if (MEM_ctrl_mem_init && !mem_init_d) init_req_q <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (init_req_q) begin
            init_req_q   <= 1'b0;
            MEM_init_ACK <= 1'b0;
            addr_q       <= '0;
            state        <= S_INIT;
          end else if (take_wr) begin
            last_wr_q <= 1'b1;
            addr_q    <= MEM_ctrl_wr_addr_bus[2 +: ADDR_WIDTH];
            wdata_q   <= MEM_ctrl_write_data_bus;
            strb_q    <= MEM_ctrl_wr_strobe;
            rmw_q     <= MEM_ctrl_wr_strobe != '1;
            if (wr_oor) begin
              wr_resp <= RESP_SLVERR;
              state   <= S_WR_RESP;
            end else begin
              wr_resp <= RESP_OKAY;
              state   <= (MEM_ctrl_wr_strobe == '1) ? S_WRITE : S_WR_READ;
            end
          end else if (take_rd) begin
            last_wr_q <= 1'b0;
            addr_q    <= MEM_ctrl_rd_addr_bus[2 +: ADDR_WIDTH];
            if (rd_oor) begin
              rd_resp           <= RESP_SLVERR;
              MEM_ctrl_data_out <= '0;
              state             <= S_RD_RESP;
            end else begin
              state <= S_RD_READ;
            end
          end
        end
        S_INIT: begin
          addr_q <= addr_q + 1'b1;
          if (addr_q == '1) begin
            MEM_init_ACK <= 1'b1;
            state        <= S_IDLE;
          end
        end
        S_WR_READ: state <= S_WRITE;
        S_WRITE: begin
          if (rmw_q && dec_double) wr_resp <= RESP_SLVERR;
          state <= S_WR_RESP;
        end
        S_WR_RESP: state <= S_IDLE;
        S_RD_READ: state <= S_RD_CHECK;
        S_RD_CHECK: begin
          MEM_ctrl_data_out <= dec_data;
          rd_resp           <= dec_double ? RESP_SLVERR : RESP_OKAY;
          state             <= S_RD_RESP;
        end
        S_RD_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // --------------------------------------------------- handshake rules
  // A request stays up, with its address and data unchanged, until its done
  // pulse; a done pulse only answers a pending request.
  default disable iff (!MEM_ctrl_rstn || MEM_ctrl_sw_rst);

  a_wr_hold: assert property (@(posedge MEM_ctrl_clk)
    MEM_ctrl_wr_en && !MEM_ctrl_wr_done |=> MEM_ctrl_wr_en
      && $stable(MEM_ctrl_wr_addr_bus) && $stable(MEM_ctrl_write_data_bus)
      && $stable(MEM_ctrl_wr_strobe))
    else $error("write request changed before done");
  a_rd_hold: assert property (@(posedge MEM_ctrl_clk)
    MEM_ctrl_rd_en && !MEM_ctrl_rd_done |=> MEM_ctrl_rd_en && $stable(MEM_ctrl_rd_addr_bus))
    else $error("read request changed before done");
  a_wr_done: assert property (@(posedge MEM_ctrl_clk) MEM_ctrl_wr_done |-> MEM_ctrl_wr_en)
    else $error("write done without a request");
  a_rd_done: assert property (@(posedge MEM_ctrl_clk) MEM_ctrl_rd_done |-> MEM_ctrl_rd_en)
    else $error("read done without a request");

endmodule
