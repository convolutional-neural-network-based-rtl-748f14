// cis_pkg: types, constants and table builders shared by the crypt-intelligent
// system (CIS), an AES-128 processor whose round keys come from a separate key
// generator and are kept in a block RAM.
//
// Byte order: a 128-bit block is the AES state with bits [127:120] as byte d15
// (row 0, column 0) down to bits [7:0] as byte d0 (row 3, column 3); column c
// holds bytes d(15-4c) .. d(12-4c), top to bottom. This is the usual FIPS-197
// order, so test vectors can be written as plain hex strings.
//
// The S-box, its inverse and the logarithm/antilogarithm tables of GF(2^8)
// are computed here by constant functions rather than typed in: the antilog
// table holds the powers of the generator {03}, the log table its inverse,
// the multiplicative inverse of a is alog[255 - log[a]], and the S-box is the
// AES affine map of that inverse. The functions run at elaboration only.
package cis_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef byte_t        table_t [256];

  // AES-128: Nb = 4 state words (columns), Nr = 10 rounds; the key is
  // Nk = 4 words.
  localparam int unsigned NB = 4;
  localparam int unsigned NR = 10;

  // Block RAMs of the memory unit: 512 words of 8 bits, dual ported.
  localparam int unsigned RAM_DEPTH = 512;
  localparam int unsigned RAM_WIDTH = 8;
  localparam int unsigned RAM_AW    = 9;

  // RAM0 map: S-box at 0..255, log table at 256..511.
  localparam logic [RAM_AW-1:0] RAM0_SBOX_BASE = 9'h000;
  localparam logic [RAM_AW-1:0] RAM0_LOG_BASE  = 9'h100;

  // What a RAM holds when configuration ends.
  typedef enum logic [0:0] {INIT_ZERO, INIT_SBOX_LOG} ram_init_e;

  // Cipher direction.
  typedef enum logic [0:0] {MODE_ENC = 1'b0, MODE_DEC = 1'b1} mode_e;

  // --------------------------------------------------------------------
  // Table builders (elaboration time)
  // --------------------------------------------------------------------
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic table_t build_alog();
    table_t t;
    byte_t  p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      t[i] = p;
      p    = p ^ xtime(p);          // multiply by {03}
    end
    t[255] = 8'h01;                 // 3^255 = 1
    return t;
  endfunction

  function automatic table_t build_log();
    table_t a = build_alog();
    table_t t;
    t[0] = 8'h00;                   // log(0) is undefined; never used
    for (int i = 0; i < 255; i++) t[a[i]] = byte_t'(i);
    return t;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic table_t build_sbox();
    table_t a = build_alog();
    table_t l = build_log();
    table_t t;
    byte_t  inv;
    for (int i = 0; i < 256; i++) begin
      inv  = (i == 0) ? 8'h00 : a[255 - int'(l[i])];
      t[i] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic table_t build_inv_sbox();
    table_t s = build_sbox();
    table_t t;
    for (int i = 0; i < 256; i++) t[s[i]] = byte_t'(i);
    return t;
  endfunction

  localparam table_t ALOG_TBL     = build_alog();
  localparam table_t LOG_TBL      = build_log();
  localparam table_t SBOX_TBL     = build_sbox();
  localparam table_t INV_SBOX_TBL = build_inv_sbox();

  // Byte k of the state (k = 15 is the first byte, bits [127:120]).
  function automatic byte_t get_d(input block_t s, input int k);
    return s[8*k +: 8];
  endfunction

  // State index of row r, column c.
  function automatic int d_idx(input int r, input int c);
    return 15 - (4 * c + r);
  endfunction

endpackage
