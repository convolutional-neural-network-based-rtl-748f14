// tb_keygen: the round-key generator with the real memory unit. For the
// FIPS-197 key and random keys it checks every key on the rk stream and
// every byte written into RAM1 against the reference key schedule, and that
// done arrives 119 clocks after start (11 writes of 8 clocks, 10 S-box
// lookups of 3 clocks, one done clock).
module tb_keygen;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         start, busy, done;
  logic [127:0] key;
  logic         r0_en;
  logic [8:0]   r0_aa, r0_ab;
  logic [7:0]   r0_qa, r0_qb;
  logic         kg_we;
  logic [8:0]   kg_aa, kg_ab;
  logic [7:0]   kg_wa, kg_wb;
  logic         rk_valid;
  logic [3:0]   rk_idx;
  logic [127:0] rk;
  // RAM1 ports: keygen while busy, testbench afterwards
  logic         tb_rd;
  logic [8:0]   tb_aa, tb_ab;
  logic         r1_en, r1_we;
  logic [8:0]   r1_aa, r1_ab;
  logic [7:0]   r1_qa, r1_qb;
  int           checks = 0, failures = 0, cyc = 0;
  int           seen;

  keygen dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .busy_o(busy), .done_o(done),
    .ram0_en_o(r0_en), .ram0_addr_a_o(r0_aa), .ram0_addr_b_o(r0_ab),
    .ram0_rdata_a_i(r0_qa), .ram0_rdata_b_i(r0_qb),
    .ram1_we_o(kg_we), .ram1_addr_a_o(kg_aa), .ram1_addr_b_o(kg_ab),
    .ram1_wdata_a_o(kg_wa), .ram1_wdata_b_o(kg_wb),
    .rk_valid_o(rk_valid), .rk_idx_o(rk_idx), .rk_o(rk)
  );

  assign r1_en = kg_we | tb_rd;
  assign r1_we = kg_we;
  assign r1_aa = kg_we ? kg_aa : tb_aa;
  assign r1_ab = kg_we ? kg_ab : tb_ab;

  memory_unit u_mem (
    .clk_i(clk),
    .r0_en_a_i(r0_en), .r0_addr_a_i(r0_aa), .r0_rdata_a_o(r0_qa),
    .r0_en_b_i(r0_en), .r0_addr_b_i(r0_ab), .r0_rdata_b_o(r0_qb),
    .r1_en_a_i(r1_en), .r1_we_a_i(r1_we), .r1_addr_a_i(r1_aa), .r1_wdata_a_i(kg_wa), .r1_rdata_a_o(r1_qa),
    .r1_en_b_i(r1_en), .r1_we_b_i(r1_we), .r1_addr_b_i(r1_ab), .r1_wdata_b_i(kg_wb), .r1_rdata_b_o(r1_qb)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rk_arr_t exp_rk;

  // rk stream monitor
  always @(posedge clk) if (rst_n && rk_valid) begin
    checks++;
    seen++;
    if (rk !== exp_rk[rk_idx]) begin
      failures++;
      $display("rk%0d got %h exp %h", rk_idx, rk, exp_rk[rk_idx]);
    end
  end

  task automatic gen(input logic [127:0] k);
    int t0;
    exp_rk = expand(k);
    seen = 0;
    @(negedge clk); start = 1; key = k;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0; key = '0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != 119 || seen != 11) begin
      failures++;
      $display("done after %0d clocks with %0d keys, expected 119 and 11", cyc - t0, seen);
    end
    // read RAM1 back
    for (int i = 0; i < 88; i++) begin
      @(negedge clk); tb_rd = 1; tb_aa = 9'(2*i); tb_ab = 9'(2*i + 1);
      @(negedge clk); tb_rd = 0;
      checks++;
      if ({r1_qa, r1_qb} !== exp_rk[i/8][127 - 16*(i%8) -: 16]) begin
        failures++;
        $display("RAM1 bytes %0d,%0d got %h%h", 2*i, 2*i + 1, r1_qa, r1_qb);
      end
    end
  endtask

  initial begin
    start = 0; key = '0; tb_rd = 0; tb_aa = 0; tb_ab = 0;
    exp_rk = expand('0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (exp_rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("reference rk10 wrong");
    end
    for (int n = 0; n < 5; n++) gen({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
