// dp_ram: true dual-port block RAM, DEPTH words of WIDTH bits (512 x 8 by
// default, the size of each RAM of the memory unit).
//
// Both ports share one clock. Each port has an enable, a write enable, an
// address and write data; reads are synchronous, so read data appear the
// cycle after the address (read-before-write on the same port). If both
// ports write the same address in one cycle, port B's data are kept. The
// array can start either cleared or holding the S-box (addresses 0..255)
// and the GF(2^8) log table (256..511), chosen by INIT; the contents are
// computed at elaboration, as an FPGA block RAM's initial image would be.
// The 512 x 8 dual-port organisation is the original design's; the read
// latency, read-before-write and collision rule are this design's choice.
module dp_ram
  import cis_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_DEPTH,
  parameter int unsigned WIDTH = RAM_WIDTH,
  parameter ram_init_e   INIT  = INIT_ZERO,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_i,
  // port A
  input  logic             en_a_i,
  input  logic             we_a_i,
  input  logic [AW-1:0]    addr_a_i,
  input  logic [WIDTH-1:0] wdata_a_i,
  output logic [WIDTH-1:0] rdata_a_o,
  // port B
  input  logic             en_b_i,
  input  logic             we_b_i,
  input  logic [AW-1:0]    addr_b_i,
  input  logic [WIDTH-1:0] wdata_b_i,
  output logic [WIDTH-1:0] rdata_b_o
);

  typedef logic [WIDTH-1:0] mem_t [DEPTH];

  function automatic mem_t init_image();
    mem_t m;
    for (int i = 0; i < int'(DEPTH); i++) begin
      m[i] = '0;
      if (INIT == INIT_SBOX_LOG) begin
        if (i < int'(RAM0_LOG_BASE))  m[i] = WIDTH'(SBOX_TBL[i - int'(RAM0_SBOX_BASE)]);
        else if (i < 512)             m[i] = WIDTH'(LOG_TBL[i - int'(RAM0_LOG_BASE)]);
      end
    end
    return m;
  endfunction

  mem_t mem;

  initial mem = init_image();

  always_ff @(posedge clk_i) begin
    if (en_a_i) rdata_a_o <= mem[addr_a_i];
    if (en_b_i) rdata_b_o <= mem[addr_b_i];
    if (en_a_i && we_a_i) mem[addr_a_i] <= wdata_a_i;
    if (en_b_i && we_b_i) mem[addr_b_i] <= wdata_b_i;
  end

endmodule
