// tb_memory_unit: RAM0 must hold the S-box at 0..255 and the log table
// (base {03}) at 256..511, readable on both ports at once; RAM1 must store
// and return bytes through either port, independently of RAM0.
module tb_memory_unit;
  import aes_ref_pkg::*;

  logic       clk = 0;
  logic       r0_en;
  logic [8:0] r0_aa, r0_ab;
  logic [7:0] r0_qa, r0_qb;
  logic       r1_en, r1_we;
  logic [8:0] r1_aa, r1_ab;
  logic [7:0] r1_wa, r1_wb, r1_qa, r1_qb;
  logic [7:0] model [512];
  int         checks = 0, failures = 0;

  memory_unit dut (
    .clk_i(clk),
    .r0_en_a_i(r0_en), .r0_addr_a_i(r0_aa), .r0_rdata_a_o(r0_qa),
    .r0_en_b_i(r0_en), .r0_addr_b_i(r0_ab), .r0_rdata_b_o(r0_qb),
    .r1_en_a_i(r1_en), .r1_we_a_i(r1_we), .r1_addr_a_i(r1_aa), .r1_wdata_a_i(r1_wa), .r1_rdata_a_o(r1_qa),
    .r1_en_b_i(r1_en), .r1_we_b_i(r1_we), .r1_addr_b_i(r1_ab), .r1_wdata_b_i(r1_wb), .r1_rdata_b_o(r1_qb)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] p;
    r0_en = 1; r0_aa = 0; r0_ab = 0;
    r1_en = 0; r1_we = 0; r1_aa = 0; r1_ab = 0; r1_wa = 0; r1_wb = 0;
    // RAM0: S-box on port A, log table on port B (log(3^i) = i)
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      @(negedge clk); r0_aa = 9'(i); r0_ab = 9'(256) + 9'(p);
      @(negedge clk);
      chk(r0_qa, sbox(8'(i)), "RAM0 S-box");
      chk(r0_qb, 8'(i), "RAM0 log");
      p = gmul(p, 8'h03);
    end
    // RAM1: write 176 bytes (eleven keys) and read them back
    for (int i = 0; i < 88; i++) begin
      @(negedge clk);
      r1_en = 1; r1_we = 1; r1_aa = 9'(2*i); r1_ab = 9'(2*i + 1);
      r1_wa = 8'($urandom); r1_wb = 8'($urandom);
      model[2*i] = r1_wa; model[2*i+1] = r1_wb;
    end
    @(negedge clk); r1_we = 0;
    for (int i = 0; i < 88; i++) begin
      @(negedge clk); r1_aa = 9'(2*i); r1_ab = 9'(2*i + 1); r0_aa = 9'(i);
      @(negedge clk);
      chk(r1_qa, model[2*i], "RAM1 port A");
      chk(r1_qb, model[2*i+1], "RAM1 port B");
      chk(r0_qa, sbox(8'(i)), "RAM0 untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
