// g_table: the four combined SubBytes/MixColumns tables G0..G3 for one state
// byte.
//
// Each table maps a byte a to c * SB(a) in GF(2^8), with c = {01}, {01},
// {02}, {03} for G0, G1, G2, G3. As in the design this follows, the product
// is formed through logarithms rather than a multiplier:
//   Gk(a) = alog[(log[c] + log[SB(a)]) mod 255],  and Gk(a) = 0 if SB(a) = 0.
// The S-box, log and antilog tables are 256 x 8 ROMs whose contents are
// computed at elaboration (see cis_pkg). G0 and G1 are the same table (both
// multiply by {01}); both are kept as outputs so the round equations can name
// them as written.
//
// Interface: a (input byte), g0..g3 (table outputs). Purely combinational,
// no clock: one ROM lookup, an 8-bit modular add and an antilog lookup.
module g_table
  import cis_pkg::*;
(
  input  byte_t a,
  output byte_t g0,
  output byte_t g1,
  output byte_t g2,
  output byte_t g3
);

  localparam byte_t LOG_02 = LOG_TBL[8'h02];
  localparam byte_t LOG_03 = LOG_TBL[8'h03];

  byte_t      sb;
  byte_t      log_sb;
  logic [8:0] sum2, sum3;
  byte_t      idx2, idx3;

  // Adds two logarithms modulo 255.
  function automatic byte_t log_add(input logic [8:0] s);
    return (s >= 9'd255) ? byte_t'(s - 9'd255) : s[7:0];
  endfunction

  always_comb begin
    sb     = SBOX_TBL[a];
    log_sb = LOG_TBL[sb];
    sum2   = {1'b0, log_sb} + {1'b0, LOG_02};
    sum3   = {1'b0, log_sb} + {1'b0, LOG_03};
    idx2   = log_add(sum2);
    idx3   = log_add(sum3);
    g0     = sb;
    g1     = sb;
    g2     = (sb == 8'h00) ? 8'h00 : ALOG_TBL[idx2];
    g3     = (sb == 8'h00) ? 8'h00 : ALOG_TBL[idx3];
  end

endmodule
