// memory_unit: the two block RAMs of the system, working in parallel.
//
// RAM0 (512 x 8, dual ported) holds the lookup tables: the AES S-box at
// addresses 0..255 and the GF(2^8) logarithm table at 256..511. Its image is
// fixed when the device is configured, so both of its ports are read-only
// here; the key generator uses them for the SubWord lookups.
// RAM1 (512 x 8, dual ported) holds the eleven 128-bit round keys rk0..rk10,
// key i in bytes 16*i .. 16*i+15, most significant byte first. The key
// generator writes it and the control unit reads the keys back out.
//
// Timing: reads on either RAM return data one clock after the address.
// Two 512 x 8 dual-port RAMs and what each holds follow the original design;
// the address maps and the read-only use of RAM0 are this design's choice.
module memory_unit
  import cis_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_DEPTH,
  parameter int unsigned WIDTH = RAM_WIDTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_i,
  // RAM0: two read ports
  input  logic             r0_en_a_i,
  input  logic [AW-1:0]    r0_addr_a_i,
  output logic [WIDTH-1:0] r0_rdata_a_o,
  input  logic             r0_en_b_i,
  input  logic [AW-1:0]    r0_addr_b_i,
  output logic [WIDTH-1:0] r0_rdata_b_o,
  // RAM1: two read/write ports
  input  logic             r1_en_a_i,
  input  logic             r1_we_a_i,
  input  logic [AW-1:0]    r1_addr_a_i,
  input  logic [WIDTH-1:0] r1_wdata_a_i,
  output logic [WIDTH-1:0] r1_rdata_a_o,
  input  logic             r1_en_b_i,
  input  logic             r1_we_b_i,
  input  logic [AW-1:0]    r1_addr_b_i,
  input  logic [WIDTH-1:0] r1_wdata_b_i,
  output logic [WIDTH-1:0] r1_rdata_b_o
);

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .INIT(INIT_SBOX_LOG)) u_ram0 (
    .clk_i     (clk_i),
    .en_a_i    (r0_en_a_i),
    .we_a_i    (1'b0),
    .addr_a_i  (r0_addr_a_i),
    .wdata_a_i ('0),
    .rdata_a_o (r0_rdata_a_o),
    .en_b_i    (r0_en_b_i),
    .we_b_i    (1'b0),
    .addr_b_i  (r0_addr_b_i),
    .wdata_b_i ('0),
    .rdata_b_o (r0_rdata_b_o)
  );

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .INIT(INIT_ZERO)) u_ram1 (
    .clk_i     (clk_i),
    .en_a_i    (r1_en_a_i),
    .we_a_i    (r1_we_a_i),
    .addr_a_i  (r1_addr_a_i),
    .wdata_a_i (r1_wdata_a_i),
    .rdata_a_o (r1_rdata_a_o),
    .en_b_i    (r1_en_b_i),
    .we_b_i    (r1_we_b_i),
    .addr_b_i  (r1_addr_b_i),
    .wdata_b_i (r1_wdata_b_i),
    .rdata_b_o (r1_rdata_b_o)
  );

endmodule
