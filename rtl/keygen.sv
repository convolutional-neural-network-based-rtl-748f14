// keygen: round-key generator, taking the place of the AES key expansion.
//
// It takes the 128-bit cipher key as four 32-bit words and produces the ten
// round keys rk1..rk10 that AES-128 needs, writing them together with rk0
// (the cipher key itself) into RAM1 of the memory unit. In the design this
// follows, this function is carried out by a trained convolutional network
// whose target outputs are exactly these keys; the network's layers and
// weights are not available, so this block computes its target directly
// with the key-expansion recurrence
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ rcon,  w1' = w1 ^ w0',
//   w2' = w2 ^ w1',                          w3' = w3 ^ w2',
// with rcon = {01}, {02}, {04}, ... , {36} in the top byte.
//
// Operation, one key per pass: WRITE puts the current key into RAM1, two
// bytes per clock through both ports (8 clocks); LOOK0/LOOK1 send the four
// RotWord bytes to the S-box half of RAM0, two per clock; LOOK2 takes the
// last two S-box bytes and forms the next key. rk0..rk10 thus take
// 11*8 + 10*3 = 118 clocks after start_i, and done_o pulses on the next.
// Each key is also shown on rk_o with rk_valid_o/rk_idx_o when its write
// begins.
//
// Interface: start_i, key_i (sampled with start_i), busy_o, done_o; RAM0
// read ports (ram0_*), RAM1 write ports (ram1_*); rk_valid_o, rk_idx_o, rk_o.
module keygen
  import cis_pkg::*;
(
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 start_i,
  input  block_t               key_i,
  output logic                 busy_o,
  output logic                 done_o,
  // RAM0 (S-box) read ports
  output logic                 ram0_en_o,
  output logic [RAM_AW-1:0]    ram0_addr_a_o,
  output logic [RAM_AW-1:0]    ram0_addr_b_o,
  input  byte_t                ram0_rdata_a_i,
  input  byte_t                ram0_rdata_b_i,
  // RAM1 (round keys) write ports
  output logic                 ram1_we_o,
  output logic [RAM_AW-1:0]    ram1_addr_a_o,
  output logic [RAM_AW-1:0]    ram1_addr_b_o,
  output byte_t                ram1_wdata_a_o,
  output byte_t                ram1_wdata_b_o,
  // round-key stream
  output logic                 rk_valid_o,
  output logic [3:0]           rk_idx_o,
  output block_t               rk_o
);

  typedef enum logic [2:0] {K_IDLE, K_WRITE, K_LOOK0, K_LOOK1, K_LOOK2, K_DONE} kg_state_e;

  kg_state_e  state_q;
  block_t     key_q;       // round key being written / expanded
  logic [3:0] idx_q;       // its index, 0..10
  logic [2:0] wcnt_q;      // byte pair being written, 0..7
  byte_t      rcon_q;
  byte_t      sb0_q, sb1_q;

  word_t      w0, w1, w2, w3, t, n0, n1, n2, n3;

  assign w0 = key_q[127:96];
  assign w1 = key_q[95:64];
  assign w2 = key_q[63:32];
  assign w3 = key_q[31:0];

  // Next key, valid in LOOK2 when the last two S-box bytes arrive.
  // RotWord(w3) = {w3[23:16], w3[15:8], w3[7:0], w3[31:24]}.
  assign t  = {sb0_q ^ rcon_q, sb1_q, ram0_rdata_a_i, ram0_rdata_b_i};
  assign n0 = w0 ^ t;
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;

  // RAM0 addresses: S-box entries of the rotated word's bytes.
  always_comb begin
    ram0_en_o     = 1'b0;
    ram0_addr_a_o = RAM0_SBOX_BASE;
    ram0_addr_b_o = RAM0_SBOX_BASE;
    if (state_q == K_LOOK0) begin
      ram0_en_o     = 1'b1;
      ram0_addr_a_o = RAM0_SBOX_BASE | RAM_AW'(w3[23:16]);
      ram0_addr_b_o = RAM0_SBOX_BASE | RAM_AW'(w3[15:8]);
    end else if (state_q == K_LOOK1) begin
      ram0_en_o     = 1'b1;
      ram0_addr_a_o = RAM0_SBOX_BASE | RAM_AW'(w3[7:0]);
      ram0_addr_b_o = RAM0_SBOX_BASE | RAM_AW'(w3[31:24]);
    end
  end

  // RAM1 writes: bytes 2*wcnt and 2*wcnt+1 of the key (byte 0 = MSB).
  always_comb begin
    ram1_we_o      = (state_q == K_WRITE);
    ram1_addr_a_o  = RAM_AW'({idx_q, wcnt_q, 1'b0});
    ram1_addr_b_o  = RAM_AW'({idx_q, wcnt_q, 1'b1});
    ram1_wdata_a_o = key_q[127 - 16*wcnt_q -: 8];
    ram1_wdata_b_o = key_q[119 - 16*wcnt_q -: 8];
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= K_IDLE;
      key_q   <= '0;
      idx_q   <= '0;
      wcnt_q  <= '0;
      rcon_q  <= 8'h01;
      sb0_q   <= '0;
      sb1_q   <= '0;
    end else begin
      unique case (state_q)
        K_IDLE: if (start_i) begin
          key_q   <= key_i;
          idx_q   <= 4'd0;
          wcnt_q  <= 3'd0;
          rcon_q  <= 8'h01;
          state_q <= K_WRITE;
        end
        K_WRITE: begin
          wcnt_q <= wcnt_q + 3'd1;
          if (wcnt_q == 3'd7) state_q <= (idx_q == 4'(NR)) ? K_DONE : K_LOOK0;
        end
        K_LOOK0: state_q <= K_LOOK1;
        K_LOOK1: begin
          sb0_q   <= ram0_rdata_a_i;
          sb1_q   <= ram0_rdata_b_i;
          state_q <= K_LOOK2;
        end
        K_LOOK2: begin
          key_q   <= {n0, n1, n2, n3};
          idx_q   <= idx_q + 4'd1;
          rcon_q  <= xtime(rcon_q);
          state_q <= K_WRITE;
        end
        K_DONE:  state_q <= K_IDLE;
        default: state_q <= K_IDLE;
      endcase
    end
  end

  assign busy_o     = (state_q != K_IDLE);
  assign done_o     = (state_q == K_DONE);
  assign rk_valid_o = (state_q == K_WRITE) && (wcnt_q == 3'd0);
  assign rk_idx_o   = idx_q;
  assign rk_o       = key_q;

endmodule
