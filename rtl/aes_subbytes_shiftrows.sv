// aes_subbytes_shiftrows: the Sub Bytes and Shift Rows steps of one AES round
// merged into a single combinational module, as the core's block diagram does.
//
// Sixteen aes_sbox instances substitute every byte of state_in; the results are
// then rotated row by row: row r of the 4x4 state (bytes r, r+4, r+8, r+12) is
// rotated left by r columns. Byte n of a block is bits [127-8n -: 8] (FIPS-197
// order). No clock; output valid one S-box delay after the input.
module aes_subbytes_shiftrows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  byte_t sub [16];

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(state_in[127-8*n -: 8]), .out_byte(sub[n]));
  end

  // Output byte at (row r, column c) comes from column (c + r) mod 4.
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] = sub[4*((c + r) % 4) + r];
  end
endmodule
