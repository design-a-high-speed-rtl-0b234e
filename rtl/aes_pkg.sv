// aes_pkg: types and GF(2^8) arithmetic shared by the AES-128 encryption core.
//
// The S-box is not stored as a table: sbox() computes the multiplicative
// inverse of its argument as x^254 in GF(2^8) (reduction polynomial
// x^8+x^4+x^3+x+1, inverse of 0 defined as 0) and then applies the FIPS-197
// affine transform. rcon() gives the key-schedule round constant for key
// index 1..10. All functions are pure combinational logic.
//
// The arithmetic is the AES standard's; computing the S-box rather than
// storing it is this design's choice.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  // Which value enters Add Round Key in the current round.
  typedef enum logic [1:0] {
    ARK_INITIAL = 2'd0,  // round 0: the Crypto FF content (plain text)
    ARK_MIDDLE  = 2'd1,  // rounds 1..NR-1: Mix Columns output
    ARK_FINAL   = 2'd2   // round NR: Sub Bytes/Shift Rows output, Mix Columns skipped
  } ark_sel_e;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t acc = 8'h00;
    byte_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ aa;
      aa = xtime(aa);
    end
    return acc;
  endfunction

  // x^254 = x^-1 for x != 0, built from the squares x^2, x^4, ..., x^128.
  function automatic byte_t ginv(byte_t x);
    byte_t sq = gmul(x, x);
    byte_t acc = sq;
    for (int i = 2; i < 8; i++) begin
      sq = gmul(sq, sq);
      acc = gmul(acc, sq);
    end
    return acc;
  endfunction

  function automatic byte_t sbox(byte_t x);
    byte_t b = ginv(x);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // Round constant for key index 1..10: x^(i-1) in GF(2^8).
  function automatic byte_t rcon(logic [3:0] i);
    byte_t r = 8'h01;
    for (int k = 1; k < 10; k++)
      if (k < int'(i)) r = xtime(r);
    return r;
  endfunction

  // Byte n of a block in FIPS-197 order: byte 0 is bits [127:120].
  function automatic byte_t get_byte(block_t s, int n);
    return s[127 - 8*n -: 8];
  endfunction

endpackage
