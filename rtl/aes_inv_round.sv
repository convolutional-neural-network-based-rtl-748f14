// aes_inv_round: one AES-128 decryption round.
//
// The decryption steps run the encryption steps backwards: InvShiftRows
// (row r rotated right by r bytes), InvSubBytes (inverse S-box ROM), the
// round-key XOR, then InvMixColumns with the matrix rows (0e 0b 0d 09),
// (09 0e 0b 0d), (0d 09 0e 0b), (0b 0d 09 0e). The last round leaves out
// InvMixColumns. The constant products are built from xtime (multiply by
// {02}) chains; the inverse S-box contents come from cis_pkg.
// The original design names these inverse steps; their constants are those
// of the AES standard, and the xtime-based multipliers are this design's.
//
// Interface: state_i, rk_i (128-bit blocks), final_i (last-round form),
// state_o. Purely combinational. Round keys are applied in reverse order by
// aes_core: rk10 before the first round, rk9..rk1 in the inner rounds, rk0
// in the last.
module aes_inv_round
  import cis_pkg::*;
(
  input  block_t state_i,
  input  block_t rk_i,
  input  logic   final_i,
  output block_t state_o
);

  function automatic byte_t mul(input byte_t a, input logic [3:0] c);
    byte_t x2 = xtime(a);
    byte_t x4 = xtime(x2);
    byte_t x8 = xtime(x4);
    return (c[0] ? a : 8'h00) ^ (c[1] ? x2 : 8'h00) ^
           (c[2] ? x4 : 8'h00) ^ (c[3] ? x8 : 8'h00);
  endfunction

  function automatic logic [3:0] icoef(input int r, input int j);
    case ((j - r + 4) % 4)
      0:       return 4'he;
      1:       return 4'hb;
      2:       return 4'hd;
      default: return 4'h9;
    endcase
  endfunction

  block_t t;   // after InvShiftRows, InvSubBytes and the key XOR

  always_comb begin
    byte_t acc;
    acc = 8'h00;
    t = '0;
    for (int c = 0; c < int'(NB); c++)
      for (int r = 0; r < 4; r++)
        t[8*d_idx(r, c) +: 8] = INV_SBOX_TBL[state_i[8*d_idx(r, (c - r + 4) % 4) +: 8]]
                                ^ rk_i[8*d_idx(r, c) +: 8];
    if (final_i) begin
      state_o = t;
    end else begin
      state_o = '0;
      for (int c = 0; c < int'(NB); c++)
        for (int r = 0; r < 4; r++) begin
          acc = 8'h00;
          for (int j = 0; j < 4; j++)
            acc ^= mul(t[8*d_idx(j, c) +: 8], icoef(r, j));
          state_o[8*d_idx(r, c) +: 8] = acc;
        end
    end
  end

endmodule
