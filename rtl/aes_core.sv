// aes_core: iterative AES-128 cipher unit, one round per clock.
//
// A block is accepted while ready_o is high and start_i is asserted. The
// clock edge that accepts it stores din_i XOR the first round key (rk0 for
// encryption, rk10 for decryption). The next ten edges each apply one round
// through aes_round (encryption, G-table datapath) or aes_inv_round
// (decryption); the tenth is the last-round form. The result is then held on
// dout_o with dout_valid_o high for one cycle, after which the unit is ready
// again. One block therefore occupies the unit for 12 clock cycles, the
// per-block count the design this follows quotes for one round per clock.
//
// Round keys are not stored here: rk_idx_o names the key (0..10) that the
// current cycle needs and rk_i must return it in the same cycle (a
// combinational read of the key bank in control_unit).
//
// Interface: start_i/ready_o (accept handshake), mode_i (MODE_ENC or
// MODE_DEC, sampled with the block), din_i, dout_o, dout_valid_o, rk_idx_o,
// rk_i. Active-low synchronous reset rst_ni.
module aes_core
  import cis_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       start_i,
  input  mode_e      mode_i,
  input  block_t     din_i,
  output logic       ready_o,
  output block_t     dout_o,
  output logic       dout_valid_o,
  output logic [3:0] rk_idx_o,
  input  block_t     rk_i
);

  typedef enum logic [1:0] {C_IDLE, C_ROUND, C_DONE} core_state_e;

  core_state_e state_q;
  mode_e       mode_q;
  logic [3:0]  round_q;      // round being applied, 1..10
  block_t      data_q;
  block_t      enc_out, dec_out;
  logic        last_round;

  assign last_round = (round_q == 4'(NR));

  aes_round u_enc (
    .state_i (data_q),
    .rk_i    (rk_i),
    .final_i (last_round),
    .state_o (enc_out)
  );

  aes_inv_round u_dec (
    .state_i (data_q),
    .rk_i    (rk_i),
    .final_i (last_round),
    .state_o (dec_out)
  );

  // Key index: the initial key addition uses rk0 / rk10, round r uses
  // rk r (encryption) or rk 10-r (decryption).
  always_comb begin
    if (state_q == C_ROUND)
      rk_idx_o = (mode_q == MODE_ENC) ? round_q : 4'(NR) - round_q;
    else
      rk_idx_o = (mode_i == MODE_ENC) ? 4'd0 : 4'(NR);
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= C_IDLE;
      mode_q  <= MODE_ENC;
      round_q <= 4'd0;
      data_q  <= '0;
    end else begin
      unique case (state_q)
        C_IDLE: if (start_i) begin
          data_q  <= din_i ^ rk_i;
          mode_q  <= mode_i;
          round_q <= 4'd1;
          state_q <= C_ROUND;
        end
        C_ROUND: begin
          data_q  <= (mode_q == MODE_ENC) ? enc_out : dec_out;
          round_q <= round_q + 4'd1;
          if (last_round) state_q <= C_DONE;
        end
        C_DONE:  state_q <= C_IDLE;
        default: state_q <= C_IDLE;
      endcase
    end
  end

  assign ready_o      = (state_q == C_IDLE);
  assign dout_valid_o = (state_q == C_DONE);
  assign dout_o       = data_q;

  // The key index never leaves 0..10.
  a_rk_idx_range : assert property (@(posedge clk_i) disable iff (!rst_ni)
    rk_idx_o <= 4'(NR));

endmodule
