// aes_round: one AES-128 encryption round built from the G tables.
//
// Every state byte feeds one g_table instance, which yields SB(d), SB(d),
// {02}*SB(d) and {03}*SB(d). ShiftRows is only wiring: output column c reads
// the byte of row j from input column (c + j) mod 4. An ordinary round then
// forms each output byte as the XOR of four table outputs and the round-key
// byte, e.g. for the first byte
//   H15 = G2(d15) ^ G3(d10) ^ G1(d5) ^ G0(d0) ^ rk15,
// the MixColumns matrix rows being (02 03 01 01), (01 02 03 01),
// (01 01 02 03), (03 01 01 02). The last round leaves out MixColumns:
// each output byte is G0 of the shifted byte XOR the round-key byte.
// The table-based round equations are the original design's; the loop form
// that generates them is this design's.
//
// Interface: state_i and rk_i are 128-bit blocks (byte order as in cis_pkg),
// final_i selects the last-round form, state_o is the result. Purely
// combinational; the iterating register is in aes_core.
module aes_round
  import cis_pkg::*;
(
  input  block_t state_i,
  input  block_t rk_i,
  input  logic   final_i,
  output block_t state_o
);

  // g[k][m]: table Gm applied to state byte d_k.
  byte_t g [16][4];

  for (genvar k = 0; k < 16; k++) begin : g_byte
    g_table u_g (
      .a  (state_i[8*k +: 8]),
      .g0 (g[k][0]),
      .g1 (g[k][1]),
      .g2 (g[k][2]),
      .g3 (g[k][3])
    );
  end

  // Table used for input row j when producing output row r (MixColumns
  // coefficient 01 -> G0/G1, 02 -> G2, 03 -> G3).
  function automatic int tsel(input int r, input int j);
    case ((j - r + 4) % 4)
      0:       return 2;   // {02}
      1:       return 3;   // {03}
      2:       return 1;   // {01}
      default: return 0;   // {01}
    endcase
  endfunction

  always_comb begin
    state_o = '0;
    for (int c = 0; c < int'(NB); c++) begin
      for (int r = 0; r < 4; r++) begin
        byte_t acc;
        acc = rk_i[8*d_idx(r, c) +: 8];
        if (final_i) begin
          acc ^= g[d_idx(r, (c + r) % 4)][0];
        end else begin
          for (int j = 0; j < 4; j++)
            acc ^= g[d_idx(j, (c + j) % 4)][tsel(r, j)];
        end
        state_o[8*d_idx(r, c) +: 8] = acc;
      end
    end
  end

endmodule
