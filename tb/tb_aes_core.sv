// tb_aes_core: the iterative cipher unit with a testbench-held key bank.
// Checks the FIPS-197 Appendix B and C.1 encryptions, their decryptions,
// random blocks in both directions, the 11-clock latency from acceptance to
// dout_valid and the 12-clock spacing of back-to-back blocks. For the
// Appendix B block it also looks at the state register one clock after
// acceptance, which must hold plaintext XOR key (193de3be...).
module tb_aes_core;
  import aes_ref_pkg::*;
  import cis_pkg::mode_e, cis_pkg::MODE_ENC, cis_pkg::MODE_DEC;

  logic         clk = 0, rst_n = 0;
  logic         start, ready, dvalid;
  mode_e        mode;
  logic [127:0] din, dout, rk;
  logic [3:0]   rk_idx;
  rk_arr_t      bank;
  int           checks = 0, failures = 0;
  int           cyc = 0;

  aes_core dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .mode_i(mode), .din_i(din),
    .ready_o(ready), .dout_o(dout), .dout_valid_o(dvalid), .rk_idx_o(rk_idx), .rk_i(rk)
  );

  assign rk = bank[rk_idx];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one block; returns the result and the clocks from the accepting
  // edge to the edge at which dout_valid is first seen.
  task automatic run(input logic [127:0] blk, input mode_e m, output logic [127:0] res,
                     output int lat);
    int t0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; din = blk; mode = m;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0; din = '0;
    while (!dvalid) @(negedge clk);
    lat = cyc - t0;
    res = dout;
  endtask

  // state after the first key addition, sampled right after acceptance
  logic [127:0] first_state;
  always @(posedge clk) if (start && ready) #1 first_state = dut.data_q;

  task automatic one(input logic [127:0] key, input logic [127:0] blk, input mode_e m,
                     input logic [127:0] exp);
    logic [127:0] res;
    int lat;
    bank = expand(key);
    run(blk, m, res, lat);
    checks++;
    if (res !== exp) begin
      failures++;
      $display("mode=%0d blk=%h got %h exp %h", m, blk, res, exp);
    end
    checks++;
    if (lat != 11) begin
      failures++;
      $display("latency %0d, expected 11", lat);
    end
  endtask

  initial begin
    logic [127:0] k, p;
    int t_first, t_second;
    start = 0; din = '0; mode = MODE_ENC;
    bank = expand('0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, MODE_ENC,
        128'h3925841d02dc09fbdc118597196a0b32);
    checks++;
    if (first_state !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin
      failures++;
      $display("state after first key addition %h", first_state);
    end
    one(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, MODE_ENC,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    one(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, MODE_DEC,
        128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      one(k, p, n[0] ? MODE_DEC : MODE_ENC, n[0] ? decrypt(p, k) : encrypt(p, k));
    end
    // back-to-back: start held high, results 12 clocks apart
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; din = 128'h3243f6a8885a308d313198a2e0370734; mode = MODE_ENC;
    bank = expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    while (!dvalid) @(negedge clk);
    t_first = cyc;
    @(negedge clk);
    while (!dvalid) @(negedge clk);
    t_second = cyc;
    start = 0;
    checks++;
    if (t_second - t_first != 12) begin
      failures++;
      $display("block spacing %0d, expected 12", t_second - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
