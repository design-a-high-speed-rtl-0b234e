// aes_keyexp_first: first block of one AES-128 key-expansion step.
//
// The round key is the four words w0..w3 (w0 in bits [127:96]). The next key
// is w0' = w0 ^ t, w1' = w0 ^ w1 ^ t, w2' = w0 ^ w1 ^ w2 ^ t and
// w3' = w0 ^ w1 ^ w2 ^ w3 ^ t, where t = SubWord(RotWord(w3)) ^ Rcon. This
// block does all the work that does not wait for the S-boxes: it outputs
// RotWord(w3), w3 rotated left by one byte, for the key path's Sub Bytes, and
// the running XORs {w0, w0^w1, w0^w1^w2, w0^w1^w2^w3} as a 128-bit word for
// the second block, which only has to add t to each word. Combinational.
//
// The split of key expansion into a first and a second block, with 32 bits
// going through Sub Bytes and 128 bits passing beside it, is the block
// diagram's; which operations sit in which block is this design's choice.
module aes_keyexp_first
  import aes_pkg::*;
(
  input  block_t key_in,
  output word_t  rot_word,
  output block_t prefix_xor
);
  always_comb begin
    word_t w0, w1, w2, w3;
    {w0, w1, w2, w3} = key_in;
    rot_word   = {w3[23:0], w3[31:24]};
    prefix_xor = {w0, w0 ^ w1, w0 ^ w1 ^ w2, w0 ^ w1 ^ w2 ^ w3};
  end
endmodule
