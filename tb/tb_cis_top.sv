// tb_cis_top: the whole system end to end, at its only configuration.
//
// Loads the FIPS-197 Appendix B key and encrypts its plaintext, streams
// random blocks in both directions, changes to the Appendix C.1 key and runs
// its vector both ways, then repeats with random keys. Every result is
// compared with the reference model. Also checked: 11 clocks from block
// acceptance to result, 12 clocks between blocks when they are offered back
// to back, 209 clocks from key acceptance to keys_loaded. Counted, and a
// failure if never seen: key loads, blocks held off while keys load, blocks
// held off by a busy cipher unit, a key winning over a block offered in the
// same clock, encryptions, decryptions and switches between the two.
module tb_cis_top;
  import aes_ref_pkg::*;
  import cis_pkg::mode_e, cis_pkg::MODE_ENC, cis_pkg::MODE_DEC;

  logic         clk = 0, rst_n = 0;
  logic         key_valid, key_ready, loaded, din_valid, din_ready, dout_valid;
  logic [127:0] key, din, dout;
  mode_e        mode;
  int           checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int n_keyload = 0, n_stall_load = 0, n_stall_busy = 0, n_key_prio = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0;

  cis_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .key_valid_i(key_valid), .key_i(key), .key_ready_o(key_ready), .keys_loaded_o(loaded),
    .din_valid_i(din_valid), .din_i(din), .mode_i(mode), .din_ready_o(din_ready),
    .dout_valid_o(dout_valid), .dout_o(dout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cyc, what);
    end
  endtask

  // scoreboard
  logic [127:0] exp_q [$];
  int           t_acc_q [$];
  int           last_accept = -1000;
  int           last_out = -1000;
  logic [127:0] cur_key;
  mode_e        last_mode = MODE_ENC;
  bit           any_block = 0;

  always @(posedge clk) if (rst_n) begin
    if (din_valid && !din_ready) begin
      if (!loaded) n_stall_load++;
      else if (!key_valid) n_stall_busy++;
    end
    if (key_valid && key_ready && din_valid) n_key_prio++;
    if (key_valid && key_ready) n_keyload++;
    if (din_valid && din_ready && !key_valid) begin
      exp_q.push_back(mode == MODE_ENC ? encrypt(din, cur_key) : decrypt(din, cur_key));
      t_acc_q.push_back(cyc);
      if (mode == MODE_ENC) n_enc++; else n_dec++;
      if (any_block && mode != last_mode) n_switch++;
      last_mode = mode;
      any_block = 1;
    end
  end

  // result monitor; cyc is sampled before its own increment at this edge
  always @(posedge clk) if (rst_n && dout_valid) begin
    logic [127:0] e;
    int ta;
    if (exp_q.size() == 0) begin
      chk(0, "result with no block outstanding");
    end else begin
      e = exp_q.pop_front();
      ta = t_acc_q.pop_front();
      chk(dout === e, $sformatf("dout %h, expected %h", dout, e));
      chk(cyc - ta == 11, $sformatf("latency %0d clocks, expected 11", cyc - ta));
    end
  end

  task automatic load_key(input logic [127:0] k, input bit with_block);
    int t0;
    @(negedge clk);
    while (!key_ready) @(negedge clk);
    key_valid = 1; key = k;
    if (with_block) begin
      din_valid = 1; din = {$urandom, $urandom, $urandom, $urandom}; mode = MODE_ENC;
    end
    @(posedge clk); t0 = cyc; cur_key = k;
    @(negedge clk); key_valid = 0;
    while (!loaded) @(negedge clk);
    chk(cyc - t0 == 209, $sformatf("keys loaded after %0d clocks", cyc - t0));
  endtask

  // Offers one block and holds it until it is taken (din_valid may already
  // carry a block that waited through a key load).
  task automatic send(input logic [127:0] b, input mode_e m);
    if (!din_valid) @(negedge clk);
    din_valid = 1; din = b; mode = m;
    @(posedge clk);
    while (!din_ready) @(posedge clk);
    @(negedge clk); din_valid = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  // Back-to-back blocks: acceptances must be 12 clocks apart.
  task automatic stream(input int n);
    int prev = -1;
    for (int i = 0; i < n; i++) begin
      mode_e m;
      m = ($urandom % 2 != 0) ? MODE_DEC : MODE_ENC;
      din_valid = 1; din = {$urandom, $urandom, $urandom, $urandom}; mode = m;
      @(posedge clk);
      while (!din_ready) @(posedge clk);
      if (prev >= 0) chk(cyc - prev == 12, $sformatf("block spacing %0d, expected 12", cyc - prev));
      prev = cyc;
      @(negedge clk);
    end
    din_valid = 0;
  endtask

  initial begin
    logic [127:0] k;
    key_valid = 0; key = '0; din_valid = 0; din = '0; mode = MODE_ENC; cur_key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // FIPS-197 Appendix B, with a block already waiting at key time
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1);
    send(din, MODE_ENC);  // the waiting block, released once keys are in
    drain();
    send(128'h3243f6a8885a308d313198a2e0370734, MODE_ENC);
    drain();
    chk(dout === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");
    @(negedge clk);
    stream(16);
    drain();

    // FIPS-197 Appendix C.1 both ways
    load_key(128'h000102030405060708090a0b0c0d0e0f, 1'b0);
    send(128'h00112233445566778899aabbccddeeff, MODE_ENC);
    drain();
    chk(dout === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    send(128'h69c4e0d86a7b0430d8cdb78070b4c55a, MODE_DEC);
    drain();
    chk(dout === 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 plaintext");

    // random keys
    for (int n = 0; n < 4; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k, n[0]);
      if (n[0]) send(din, MODE_ENC);
      stream(8);
      drain();
    end

    chk(n_keyload >= 6, $sformatf("key loads: %0d", n_keyload));
    chk(n_stall_load > 0, "no block was held off by a key load");
    chk(n_stall_busy > 0, "no block was held off by a busy cipher unit");
    chk(n_key_prio > 0, "no key won over a block");
    chk(n_enc > 0 && n_dec > 0, "both directions used");
    chk(n_switch > 0, "no switch between encryption and decryption");
    $display("key loads %0d, load stalls %0d, busy stalls %0d, key-over-block %0d, enc %0d, dec %0d, switches %0d",
             n_keyload, n_stall_load, n_stall_busy, n_key_prio, n_enc, n_dec, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
