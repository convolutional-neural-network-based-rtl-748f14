// aes_ref_pkg: plain software model of AES-128 for the testbenches.
//
// Written independently of the RTL's table builders: GF(2^8) products use
// shift-and-add, the inverse is found by search, and the S-box applies the
// affine map bit by bit. Provides the S-box, the key schedule, one
// encryption/decryption round and full block encryption/decryption, all
// on 128-bit blocks in FIPS-197 byte order (first byte in bits [127:120]).
package aes_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    if (a == 0) return 0;
    for (int i = 1; i < 256; i++)
      if (gmul(a, 8'(i)) == 8'h01) return 8'(i);
    return 0;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b = ginv(a);
    logic [7:0] r;
    logic [7:0] c = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return r;
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    for (int i = 0; i < 256; i++) if (sbox(8'(i)) == a) return 8'(i);
    return 0;
  endfunction

  // s[r][c] view of a block
  function automatic logic [7:0] at(input logic [127:0] s, input int r, input int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] put(input logic [127:0] s, input int r, input int c,
                                       input logic [7:0] v);
    logic [127:0] o = s;
    o[127 - 8*(4*c + r) -: 8] = v;
    return o;
  endfunction

  typedef logic [127:0] rk_arr_t [11];

  function automatic rk_arr_t expand(input logic [127:0] key);
    rk_arr_t    rk;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
    return rk;
  endfunction

  function automatic logic [127:0] enc_round(input logic [127:0] s, input logic [127:0] rk,
                                             input bit last);
    logic [127:0] a = 0, m = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        a = put(a, r, c, sbox(at(s, r, (c + r) % 4)));
    if (last) return a ^ rk;
    for (int c = 0; c < 4; c++) begin
      m = put(m, 0, c, gmul(at(a,0,c),2) ^ gmul(at(a,1,c),3) ^ at(a,2,c) ^ at(a,3,c));
      m = put(m, 1, c, at(a,0,c) ^ gmul(at(a,1,c),2) ^ gmul(at(a,2,c),3) ^ at(a,3,c));
      m = put(m, 2, c, at(a,0,c) ^ at(a,1,c) ^ gmul(at(a,2,c),2) ^ gmul(at(a,3,c),3));
      m = put(m, 3, c, gmul(at(a,0,c),3) ^ at(a,1,c) ^ at(a,2,c) ^ gmul(at(a,3,c),2));
    end
    return m ^ rk;
  endfunction

  function automatic logic [127:0] dec_round(input logic [127:0] s, input logic [127:0] rk,
                                             input bit last);
    logic [127:0] a = 0, m = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        a = put(a, r, (c + r) % 4, inv_sbox(at(s, r, c)));
    a ^= rk;
    if (last) return a;
    for (int c = 0; c < 4; c++) begin
      m = put(m, 0, c, gmul(at(a,0,c),14) ^ gmul(at(a,1,c),11) ^ gmul(at(a,2,c),13) ^ gmul(at(a,3,c),9));
      m = put(m, 1, c, gmul(at(a,0,c),9) ^ gmul(at(a,1,c),14) ^ gmul(at(a,2,c),11) ^ gmul(at(a,3,c),13));
      m = put(m, 2, c, gmul(at(a,0,c),13) ^ gmul(at(a,1,c),9) ^ gmul(at(a,2,c),14) ^ gmul(at(a,3,c),11));
      m = put(m, 3, c, gmul(at(a,0,c),11) ^ gmul(at(a,1,c),13) ^ gmul(at(a,2,c),9) ^ gmul(at(a,3,c),14));
    end
    return m;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    rk_arr_t rk = expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = enc_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [127:0] key);
    rk_arr_t rk = expand(key);
    logic [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) s = dec_round(s, rk[r], r == 0);
    return s;
  endfunction

endpackage
