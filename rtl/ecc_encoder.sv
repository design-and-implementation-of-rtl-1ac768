// ecc_encoder: turns a 32-bit data word into the 39-bit word stored in the
// RAM, and optionally corrupts it on purpose for testing the error path.
//
// The stored word is an extended Hamming (SECDED) codeword: six Hamming check
// bits at positions 1, 2, 4, 8, 16 and 32 plus one overall parity bit at
// position 0 (layout in zmc_pkg). The block diagram gives only the encoder's
// name and the 39-bit RAM data width; the code itself is this design's choice.
//
// Error injection: every data bit whose bit is set in inj_mask is inverted
// in the codeword after the check bits have been computed, so a mask with one
// bit set produces a correctable error and a mask with two bits set an
// uncorrectable one when the word is read back.
//
// Purely combinational; no clock.
module ecc_encoder
  import zmc_pkg::*;
(
  input  word_t data_in,   // data to be stored
  input  word_t inj_mask,  // data bits to invert after encoding
  output code_t code_out   // 39-bit codeword for the RAM
);

  always_comb code_out = ecc_encode(data_in) ^ spread(inj_mask);

endmodule
