// aes_sbox: one-byte AES S-box, purely combinational.
//
// out_byte = affine(in_byte^-1) over GF(2^8), using aes_pkg::sbox(). There is
// no table and no clock: the result is valid one combinational delay after
// in_byte changes. The function is the AES standard's; computing it instead
// of reading a stored table is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  always_comb out_byte = sbox(in_byte);
endmodule
