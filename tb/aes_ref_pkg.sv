// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL arithmetic: the S-box inverse is found by
// searching for the byte whose product is 1 (shift-and-add multiply), the
// affine map uses rotations, and the whole cipher runs on a byte array. Used
// only to compute expected values.
package aes_ref_pkg;

  function automatic logic [7:0] rmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] v, int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 8'h00;
    for (int c = 1; c < 256; c++) if (rmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  typedef logic [7:0] bytes_t [16];

  function automatic bytes_t to_bytes(logic [127:0] v);
    bytes_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_shift(logic [127:0] v);
    bytes_t b = to_bytes(v), o;
    for (int i = 0; i < 16; i++) begin
      // row i%4, column i/4 takes from column (i/4 + i%4) % 4
      o[i] = ref_sbox(b[((i/4 + i%4) % 4)*4 + i%4]);
    end
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] v);
    bytes_t b = to_bytes(v), o;
    logic [7:0] m [4][4] = '{'{8'h02,8'h03,8'h01,8'h01}, '{8'h01,8'h02,8'h03,8'h01},
                             '{8'h01,8'h01,8'h02,8'h03}, '{8'h03,8'h01,8'h01,8'h02}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 8'h00;
        for (int k = 0; k < 4; k++) o[4*c + r] ^= rmul(m[r][k], b[4*c + k]);
      end
    return from_bytes(o);
  endfunction

  // Next round key from key k; i is the index (1..10) of the produced key.
  function automatic logic [127:0] ref_next_key(logic [127:0] k, int i);
    logic [31:0] w [4];
    logic [31:0] t;
    logic [7:0] rc = 8'h01;
    for (int j = 1; j < i; j++) rc = rmul(rc, 8'h02);
    for (int j = 0; j < 4; j++) w[j] = k[127 - 32*j -: 32];
    t = {w[3][23:0], w[3][31:24]};
    t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
    t ^= {rc, 24'h0};
    w[0] ^= t; w[1] ^= w[0]; w[2] ^= w[1]; w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ key, k = key;
    for (int r = 1; r <= 10; r++) begin
      k = ref_next_key(k, r);
      s = ref_sub_shift(s);
      if (r != 10) s = ref_mix(s);
      s ^= k;
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
