// aes_subword: Sub Bytes on a 32-bit word, the key path's substitution.
//
// Four aes_sbox instances, one per byte. Combinational.
module aes_subword
  import aes_pkg::*;
(
  input  word_t word_in,
  output word_t word_out
);
  for (genvar n = 0; n < 4; n++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(word_in[8*n +: 8]), .out_byte(word_out[8*n +: 8]));
  end
endmodule
