// aes_keyexp_second: second block of one AES-128 key-expansion step.
//
// prefix_xor holds {w0, w0^w1, w0^w1^w2, w0^w1^w2^w3} of the previous key
// (from the first block) and sub_word = SubWord(RotWord(w3)). With
// t = sub_word ^ {rcon(round), 24'h0} every word of the next key is the
// corresponding prefix word XOR t. round is the index (1..10) of the key being
// produced. Combinational.
module aes_keyexp_second
  import aes_pkg::*;
(
  input  block_t     prefix_xor,
  input  word_t      sub_word,
  input  logic [3:0] round,
  output block_t     key_out
);
  always_comb begin
    word_t t;
    t = sub_word ^ {rcon(round), 24'h000000};
    key_out = prefix_xor ^ {t, t, t, t};
  end
endmodule
