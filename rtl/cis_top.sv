// cis_top: crypt-intelligent system (CIS), an AES-128 encryption/decryption
// processor whose key-expansion unit is replaced by a separate round-key
// generator that fills a block RAM with all round keys at once.
//
// Blocks: keygen (makes rk0..rk10 from the cipher key, using the S-box held
// in RAM0), memory_unit (RAM0: S-box and log tables, RAM1: round keys, both
// 512 x 8 dual ported), control_unit (FSM, RAM1 port multiplexers, round-key
// bank) and aes_core (one AES round per clock, G-table datapath).
//
// Use: offer a 128-bit key on key_i with key_valid_i; it is taken when
// key_ready_o is high. 209 clocks later keys_loaded_o rises and blocks can be
// offered on din_i/din_valid_i with mode_i (0 encrypt, 1 decrypt); each is
// taken when din_ready_o is high, and its result appears on dout_o with
// dout_valid_o high 11 clocks after it was taken. A new block can be taken
// every 12 clocks. A new key can be loaded between blocks. Synchronous
// active-low reset rst_ni.
// The four units and their roles follow the original design; the trained
// network that generates keys there is replaced by the exact key schedule
// it was trained on, and the handshakes are this design's choice.
module cis_top
  import cis_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   key_valid_i,
  input  block_t key_i,
  output logic   key_ready_o,
  output logic   keys_loaded_o,
  input  logic   din_valid_i,
  input  block_t din_i,
  input  mode_e  mode_i,
  output logic   din_ready_o,
  output logic   dout_valid_o,
  output block_t dout_o
);

  // key generator <-> memory / control
  logic              kg_start, kg_busy, kg_done;
  block_t            kg_key;
  logic              kg_r0_en;
  logic [RAM_AW-1:0] kg_r0_addr_a, kg_r0_addr_b;
  byte_t             r0_rdata_a, r0_rdata_b;
  logic              kg_we;
  logic [RAM_AW-1:0] kg_addr_a, kg_addr_b;
  byte_t             kg_wdata_a, kg_wdata_b;

  // RAM1 ports
  logic              r1_en, r1_we;
  logic [RAM_AW-1:0] r1_addr_a, r1_addr_b;
  byte_t             r1_wdata_a, r1_wdata_b, r1_rdata_a, r1_rdata_b;

  // cipher unit
  logic              core_start, core_ready;
  mode_e             core_mode;
  block_t            core_din, core_rk;
  logic [3:0]        core_rk_idx;

  keygen u_keygen (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .start_i        (kg_start),
    .key_i          (kg_key),
    .busy_o         (kg_busy),
    .done_o         (kg_done),
    .ram0_en_o      (kg_r0_en),
    .ram0_addr_a_o  (kg_r0_addr_a),
    .ram0_addr_b_o  (kg_r0_addr_b),
    .ram0_rdata_a_i (r0_rdata_a),
    .ram0_rdata_b_i (r0_rdata_b),
    .ram1_we_o      (kg_we),
    .ram1_addr_a_o  (kg_addr_a),
    .ram1_addr_b_o  (kg_addr_b),
    .ram1_wdata_a_o (kg_wdata_a),
    .ram1_wdata_b_o (kg_wdata_b),
    // the key stream is a test/observation port; keys leave only via RAM1
    .rk_valid_o     (),
    .rk_idx_o       (),
    .rk_o           ()
  );

  memory_unit u_mem (
    .clk_i        (clk_i),
    .r0_en_a_i    (kg_r0_en),
    .r0_addr_a_i  (kg_r0_addr_a),
    .r0_rdata_a_o (r0_rdata_a),
    .r0_en_b_i    (kg_r0_en),
    .r0_addr_b_i  (kg_r0_addr_b),
    .r0_rdata_b_o (r0_rdata_b),
    .r1_en_a_i    (r1_en),
    .r1_we_a_i    (r1_we),
    .r1_addr_a_i  (r1_addr_a),
    .r1_wdata_a_i (r1_wdata_a),
    .r1_rdata_a_o (r1_rdata_a),
    .r1_en_b_i    (r1_en),
    .r1_we_b_i    (r1_we),
    .r1_addr_b_i  (r1_addr_b),
    .r1_wdata_b_i (r1_wdata_b),
    .r1_rdata_b_o (r1_rdata_b)
  );

  control_unit u_ctrl (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .key_valid_i   (key_valid_i),
    .key_i         (key_i),
    .key_ready_o   (key_ready_o),
    .din_valid_i   (din_valid_i),
    .din_i         (din_i),
    .mode_i        (mode_i),
    .din_ready_o   (din_ready_o),
    .keys_loaded_o (keys_loaded_o),
    .kg_start_o    (kg_start),
    .kg_key_o      (kg_key),
    .kg_done_i     (kg_done),
    .kg_we_i       (kg_we),
    .kg_addr_a_i   (kg_addr_a),
    .kg_addr_b_i   (kg_addr_b),
    .kg_wdata_a_i  (kg_wdata_a),
    .kg_wdata_b_i  (kg_wdata_b),
    .r1_en_o       (r1_en),
    .r1_we_o       (r1_we),
    .r1_addr_a_o   (r1_addr_a),
    .r1_addr_b_o   (r1_addr_b),
    .r1_wdata_a_o  (r1_wdata_a),
    .r1_wdata_b_o  (r1_wdata_b),
    .r1_rdata_a_i  (r1_rdata_a),
    .r1_rdata_b_i  (r1_rdata_b),
    .core_start_o  (core_start),
    .core_mode_o   (core_mode),
    .core_din_o    (core_din),
    .core_ready_i  (core_ready),
    .core_rk_idx_i (core_rk_idx),
    .core_rk_o     (core_rk)
  );

  aes_core u_core (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .start_i      (core_start),
    .mode_i       (core_mode),
    .din_i        (core_din),
    .ready_o      (core_ready),
    .dout_o       (dout_o),
    .dout_valid_o (dout_valid_o),
    .rk_idx_o     (core_rk_idx),
    .rk_i         (core_rk)
  );

  // The key generator only runs while the control unit waits for it.
  a_kg_owned : assert property (@(posedge clk_i) disable iff (!rst_ni)
    kg_busy |-> !core_start);

endmodule
