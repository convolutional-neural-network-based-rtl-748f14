// control_unit: the finite state machine that sequences the system.
//
// States:
//   CU_NOKEY  no key loaded yet; key_ready_o is high.
//   CU_KEYGEN a new cipher key was accepted; the key generator is filling
//             RAM1 with rk0..rk10 and owns RAM1's ports.
//   CU_FETCH  the eleven round keys are read back from RAM1, two bytes per
//             clock through both ports (88 read cycles plus one for the read
//             latency), into the round-key bank, so that the cipher unit can
//             take a whole 128-bit key every clock.
//   CU_READY  blocks are passed to the cipher unit; a new key may be loaded
//             whenever the cipher unit is idle.
// The RAM1 port multiplexers (key generator writes vs. control reads) and the
// bank read multiplexer (rk_idx -> 128-bit key) live here.
//
// Handshakes: key_valid_i/key_ready_o and din_valid_i/din_ready_o transfer
// on a clock edge where both are high. A block offered while keys are being
// made or fetched, or while the cipher unit is busy, waits (din_ready_o low).
// The original design gives the control unit's role (an FSM that drives the
// other units, the RAM addresses and the multiplexers) but not its states;
// the state sequence, the key bank and the key-over-block priority are this
// design's choice.
// Key loading takes 120 clocks (generation, plus one to see done) and 89
// (fetch): keys_loaded_o rises 209 clocks after the key is accepted.
module control_unit
  import cis_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  // host side
  input  logic               key_valid_i,
  input  block_t             key_i,
  output logic               key_ready_o,
  input  logic               din_valid_i,
  input  block_t             din_i,
  input  mode_e              mode_i,
  output logic               din_ready_o,
  output logic               keys_loaded_o,
  // key generator
  output logic               kg_start_o,
  output block_t             kg_key_o,
  input  logic               kg_done_i,
  input  logic               kg_we_i,
  input  logic [RAM_AW-1:0]  kg_addr_a_i,
  input  logic [RAM_AW-1:0]  kg_addr_b_i,
  input  byte_t              kg_wdata_a_i,
  input  byte_t              kg_wdata_b_i,
  // RAM1 ports
  output logic               r1_en_o,
  output logic               r1_we_o,
  output logic [RAM_AW-1:0]  r1_addr_a_o,
  output logic [RAM_AW-1:0]  r1_addr_b_o,
  output byte_t              r1_wdata_a_o,
  output byte_t              r1_wdata_b_o,
  input  byte_t              r1_rdata_a_i,
  input  byte_t              r1_rdata_b_i,
  // cipher unit
  output logic               core_start_o,
  output mode_e              core_mode_o,
  output block_t             core_din_o,
  input  logic               core_ready_i,
  input  logic [3:0]         core_rk_idx_i,
  output block_t             core_rk_o
);

  typedef enum logic [1:0] {CU_NOKEY, CU_KEYGEN, CU_FETCH, CU_READY} cu_state_e;

  localparam int unsigned NPAIRS = (NR + 1) * 8;   // byte pairs in rk0..rk10

  cu_state_e  state_q;
  logic [6:0] fcnt_q;                   // fetch cycle, 0..NPAIRS
  block_t     rk_bank_q [NR+1];
  logic [6:0] pair;                     // pair whose data arrive this cycle

  assign pair = fcnt_q - 7'd1;

  // Host handshakes.
  assign key_ready_o   = (state_q == CU_NOKEY) || (state_q == CU_READY && core_ready_i);
  // A new key has priority over a block offered in the same cycle.
  assign din_ready_o   = (state_q == CU_READY) && core_ready_i && !key_valid_i;
  assign keys_loaded_o = (state_q == CU_READY);
  assign kg_start_o    = key_valid_i && key_ready_o;
  assign kg_key_o      = key_i;
  assign core_start_o  = din_valid_i && din_ready_o;
  assign core_mode_o   = mode_i;
  assign core_din_o    = din_i;
  assign core_rk_o     = rk_bank_q[core_rk_idx_i];

  // RAM1 port multiplexers.
  always_comb begin
    if (state_q == CU_KEYGEN) begin
      r1_en_o      = kg_we_i;
      r1_we_o      = kg_we_i;
      r1_addr_a_o  = kg_addr_a_i;
      r1_addr_b_o  = kg_addr_b_i;
      r1_wdata_a_o = kg_wdata_a_i;
      r1_wdata_b_o = kg_wdata_b_i;
    end else begin
      r1_en_o      = (state_q == CU_FETCH) && (fcnt_q < 7'(NPAIRS));
      r1_we_o      = 1'b0;
      r1_addr_a_o  = RAM_AW'({fcnt_q, 1'b0});
      r1_addr_b_o  = RAM_AW'({fcnt_q, 1'b1});
      r1_wdata_a_o = '0;
      r1_wdata_b_o = '0;
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= CU_NOKEY;
      fcnt_q  <= '0;
      for (int k = 0; k <= int'(NR); k++) rk_bank_q[k] <= '0;
    end else begin
      unique case (state_q)
        CU_NOKEY, CU_READY: if (kg_start_o) state_q <= CU_KEYGEN;
        CU_KEYGEN: if (kg_done_i) begin
          fcnt_q  <= '0;
          state_q <= CU_FETCH;
        end
        CU_FETCH: begin
          fcnt_q <= fcnt_q + 7'd1;
          if (fcnt_q != 7'd0)
            rk_bank_q[pair[6:3]][127 - 16*pair[2:0] -: 16] <= {r1_rdata_a_i, r1_rdata_b_i};
          if (fcnt_q == 7'(NPAIRS)) state_q <= CU_READY;
        end
        default: state_q <= CU_NOKEY;
      endcase
    end
  end

  // A block is only started on the cipher unit when it is idle and the
  // round keys are all in the bank.
  a_start_ready : assert property (@(posedge clk_i) disable iff (!rst_ni)
    core_start_o |-> (core_ready_i && state_q == CU_READY));

endmodule
