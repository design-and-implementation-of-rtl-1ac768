// zmc_pkg: types, constants and ECC functions shared by the byte-access
// memory controller (AXI4 slave, memory controller, CSR block, ECC encoder and
// decoder, dual-port RAM).
//
// Widths that appear on the controller's ports follow the block diagrams: a
// 32-bit data bus with a 4-bit byte strobe, 32-bit AXI addresses, 4-bit AXI
// IDs, 8-bit burst length at the AXI slave, 2-bit burst type and response and
// a 39-bit stored word at the RAM (the RAM's word-address width is a module
// parameter, 14 by default). The 39-bit word is
// 32 data bits plus 7 check bits; the code used here (an extended Hamming
// SECDED code) is this design's own choice, as are the CSR addresses and the
// status-register layout.
//
// Codeword layout (39 bits, index = position): bit 0 is the overall parity
// bit; bits 1..38 are Hamming positions, with check bits at the powers of two
// (1, 2, 4, 8, 16, 32) and the 32 data bits, lowest first, at the remaining
// positions 3, 5, 6, 7, 9, ... 38.
package zmc_pkg;

  localparam int unsigned DATA_WIDTH     = 32;
  localparam int unsigned STRB_WIDTH     = DATA_WIDTH / 8;
  localparam int unsigned AXI_ADDR_WIDTH = 32;
  localparam int unsigned ID_WIDTH       = 4;
  localparam int unsigned ECC_BITS       = 7;
  localparam int unsigned CODE_WIDTH     = DATA_WIDTH + ECC_BITS;  // 39

  typedef logic [DATA_WIDTH-1:0] word_t;
  typedef logic [CODE_WIDTH-1:0] code_t;
  typedef logic [STRB_WIDTH-1:0] strb_t;

  // AXI response and burst encodings (AMBA AXI).
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } axi_burst_e;

  // CSR map (byte addresses on the APB register port).
  localparam logic [9:0] CSR_ECC_EN_ADDR  = 10'h000;  // bit 0: ECC enable
  localparam logic [9:0] CSR_ECC_INJ_ADDR = 10'h004;  // 32-bit error-injection mask

  // ECC status register fields.
  localparam int unsigned ST_CE_BIT    = 0;   // single-bit error corrected (sticky)
  localparam int unsigned ST_UE_BIT    = 1;   // double-bit error detected (sticky)
  localparam int unsigned ST_CNT_LSB   = 8;   // [15:8] corrected-error count, saturating
  localparam int unsigned ST_ADDR_LSB  = 16;  // [29:16] word address of the last error

  // Codeword position of data bit i.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned p, n;
    n = 0;
    data_pos = 0;
    for (p = 1; p < CODE_WIDTH; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (n == i) data_pos = p;
        n++;
      end
    end
  endfunction

  // Spread a 32-bit data word over its codeword positions (check bits zero).
  function automatic code_t spread(input word_t d);
    code_t c;
    c = '0;
    for (int unsigned i = 0; i < DATA_WIDTH; i++) c[data_pos(i)] = d[i];
    return c;
  endfunction

  // Gather the 32 data bits out of a codeword.
  function automatic word_t gather(input code_t c);
    word_t d;
    for (int unsigned i = 0; i < DATA_WIDTH; i++) d[i] = c[data_pos(i)];
    return d;
  endfunction

  // Hamming syndrome: XOR of the positions of all set bits among 1..38.
  function automatic logic [5:0] syndrome(input code_t c);
    logic [5:0] s;
    s = '0;
    for (int unsigned p = 1; p < CODE_WIDTH; p++)
      if (c[p]) s ^= 6'(p);
    return s;
  endfunction

  // Full SECDED encode.
  function automatic code_t ecc_encode(input word_t d);
    code_t      c;
    logic [5:0] s;
    c = spread(d);
    s = syndrome(c);
    for (int unsigned k = 0; k < 6; k++) c[1 << k] = s[k];
    c[0] = ^c[CODE_WIDTH-1:1];
    return c;
  endfunction

endpackage
