// aes_mixcolumns: the Mix Columns step, combinational.
//
// Each 4-byte column (a0..a3) is multiplied over GF(2^8) by the fixed matrix
// with rows {02 03 01 01}, {01 02 03 01}, {01 01 02 03}, {03 01 01 02}.
// Multiplication by 02 is xtime(); by 03 is xtime(a) ^ a. No clock.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = state_in[127 - 32*c      -: 8];
      a1 = state_in[127 - 32*c - 8  -: 8];
      a2 = state_in[127 - 32*c - 16 -: 8];
      a3 = state_in[127 - 32*c - 24 -: 8];
      state_out[127 - 32*c      -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      state_out[127 - 32*c - 8  -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      state_out[127 - 32*c - 16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      state_out[127 - 32*c - 24 -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
  end
endmodule
