// ecc_decoder: checks a 39-bit word read from the RAM, corrects a single-bit
// error and flags a double-bit error.
//
// The syndrome is the XOR of the positions of all set bits 1..38 and the
// overall parity is the XOR of all 39 bits (extended Hamming SECDED code, see
// zmc_pkg). Zero syndrome and even parity: no error. Odd parity: one bit is
// wrong, at the position named by the syndrome (syndrome 0 means the parity
// bit itself); it is inverted and single_err is raised. Even parity with a
// non-zero syndrome, or odd parity with a syndrome that points past bit 38:
// two or more bits are wrong, double_err is raised and the data is passed on
// uncorrected. With ecc_en low the data bits are passed through unchecked and
// neither flag is raised. The block diagram gives only the decoder's name and
// the 39-bit width; the code is this design's choice.
//
// Purely combinational; no clock.
module ecc_decoder
  import zmc_pkg::*;
(
  input  code_t code_in,     // codeword from the RAM
  input  logic  ecc_en,      // check and correct when high
  output word_t data_out,    // corrected data
  output logic  single_err,  // a single-bit error was corrected
  output logic  double_err   // an uncorrectable error was found
);

  logic [5:0] syn;
  logic       parity;
  code_t      fixed;

  always_comb begin
    syn        = syndrome(code_in);
    parity     = ^code_in;
    fixed      = code_in;
    single_err = 1'b0;
    double_err = 1'b0;
    if (ecc_en) begin
      if (parity) begin
        if (syn < 6'(CODE_WIDTH)) begin
          fixed[syn] = ~code_in[syn];
          single_err = 1'b1;
        end else begin
          double_err = 1'b1;
        end
      end else if (syn != '0) begin
        double_err = 1'b1;
      end
    end
    data_out = gather(fixed);
  end

endmodule
