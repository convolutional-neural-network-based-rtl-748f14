// tb_control_unit: the control FSM with the real key generator and memory
// unit; the cipher unit is played by the testbench. Checks the key and block
// handshakes in every state (blocks wait while keys are made and fetched or
// while the cipher unit is busy, a key wins over a block offered in the
// same clock), the clocks from key acceptance to keys_loaded, and that the
// round-key bank returns rk0..rk10 of the reference schedule on every index.
module tb_control_unit;
  import aes_ref_pkg::*;
  import cis_pkg::mode_e, cis_pkg::MODE_ENC, cis_pkg::MODE_DEC;

  localparam int LOAD_CLOCKS = 209;

  logic         clk = 0, rst_n = 0;
  logic         key_valid, key_ready, din_valid, din_ready, loaded;
  logic [127:0] key, din;
  mode_e        mode;
  logic         kg_start, kg_done, kg_busy, kg_we;
  logic [127:0] kg_key;
  logic [8:0]   kg_aa, kg_ab;
  logic [7:0]   kg_wa, kg_wb;
  logic         r0_en;
  logic [8:0]   r0_aa, r0_ab;
  logic [7:0]   r0_qa, r0_qb;
  logic         r1_en, r1_we;
  logic [8:0]   r1_aa, r1_ab;
  logic [7:0]   r1_wa, r1_wb, r1_qa, r1_qb;
  logic         core_start, core_ready;
  mode_e        core_mode;
  logic [127:0] core_din, core_rk;
  logic [3:0]   core_idx;
  int           checks = 0, failures = 0, cyc = 0;

  control_unit dut (
    .clk_i(clk), .rst_ni(rst_n),
    .key_valid_i(key_valid), .key_i(key), .key_ready_o(key_ready),
    .din_valid_i(din_valid), .din_i(din), .mode_i(mode), .din_ready_o(din_ready),
    .keys_loaded_o(loaded),
    .kg_start_o(kg_start), .kg_key_o(kg_key), .kg_done_i(kg_done), .kg_we_i(kg_we),
    .kg_addr_a_i(kg_aa), .kg_addr_b_i(kg_ab), .kg_wdata_a_i(kg_wa), .kg_wdata_b_i(kg_wb),
    .r1_en_o(r1_en), .r1_we_o(r1_we), .r1_addr_a_o(r1_aa), .r1_addr_b_o(r1_ab),
    .r1_wdata_a_o(r1_wa), .r1_wdata_b_o(r1_wb), .r1_rdata_a_i(r1_qa), .r1_rdata_b_i(r1_qb),
    .core_start_o(core_start), .core_mode_o(core_mode), .core_din_o(core_din),
    .core_ready_i(core_ready), .core_rk_idx_i(core_idx), .core_rk_o(core_rk)
  );

  keygen u_kg (
    .clk_i(clk), .rst_ni(rst_n), .start_i(kg_start), .key_i(kg_key), .busy_o(kg_busy), .done_o(kg_done),
    .ram0_en_o(r0_en), .ram0_addr_a_o(r0_aa), .ram0_addr_b_o(r0_ab),
    .ram0_rdata_a_i(r0_qa), .ram0_rdata_b_i(r0_qb),
    .ram1_we_o(kg_we), .ram1_addr_a_o(kg_aa), .ram1_addr_b_o(kg_ab),
    .ram1_wdata_a_o(kg_wa), .ram1_wdata_b_o(kg_wb),
    .rk_valid_o(), .rk_idx_o(), .rk_o()
  );

  memory_unit u_mem (
    .clk_i(clk),
    .r0_en_a_i(r0_en), .r0_addr_a_i(r0_aa), .r0_rdata_a_o(r0_qa),
    .r0_en_b_i(r0_en), .r0_addr_b_i(r0_ab), .r0_rdata_b_o(r0_qb),
    .r1_en_a_i(r1_en), .r1_we_a_i(r1_we), .r1_addr_a_i(r1_aa), .r1_wdata_a_i(r1_wa), .r1_rdata_a_o(r1_qa),
    .r1_en_b_i(r1_en), .r1_we_b_i(r1_we), .r1_addr_b_i(r1_ab), .r1_wdata_b_i(r1_wb), .r1_rdata_b_o(r1_qb)
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

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("cycle %0d: %s", cyc, what);
    end
  endtask

  // Loads a key; a block is offered all the time and must not be taken.
  task automatic load(input logic [127:0] k);
    rk_arr_t exp;
    int t0;
    exp = expand(k);
    @(negedge clk);
    chk(key_ready, "key_ready before load");
    key_valid = 1; key = k; din_valid = 1; din = 128'h1; mode = MODE_ENC;
    #1 chk(kg_start && !core_start, "key wins over block");
    @(posedge clk); t0 = cyc;
    @(negedge clk); key_valid = 0;
    while (!loaded) begin
      chk(!din_ready && !core_start && !key_ready, "block/key refused while loading");
      @(negedge clk);
    end
    din_valid = 0;
    chk(cyc - t0 == LOAD_CLOCKS, $sformatf("keys loaded after %0d clocks", cyc - t0));
    for (int i = 0; i <= 10; i++) begin
      core_idx = 4'(i);
      #1;
      chk(core_rk === exp[i], $sformatf("bank rk%0d = %h, expected %h", i, core_rk, exp[i]));
    end
  endtask

  initial begin
    key_valid = 0; key = '0; din_valid = 0; din = '0; mode = MODE_ENC; core_ready = 1; core_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    din_valid = 1;
    #1 chk(!din_ready && !core_start && !loaded, "no block before a key");
    din_valid = 0;
    load(128'h2b7e151628aed2a6abf7158809cf4f3c);
    // a block is passed on with its mode when the cipher unit is idle
    @(negedge clk); din_valid = 1; din = 128'hfeed; mode = MODE_DEC;
    #1 chk(din_ready && core_start && core_din == 128'hfeed && core_mode == MODE_DEC, "block passed");
    // cipher unit busy: neither blocks nor keys taken
    core_ready = 0;
    #1 chk(!din_ready && !core_start && !key_ready, "busy cipher unit holds requests");
    @(negedge clk); din_valid = 0; core_ready = 1;
    // a second key replaces the first
    load(128'h000102030405060708090a0b0c0d0e0f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
