// tb_dp_ram: the dual-port RAM. A cleared instance is written through both
// ports and read back through the other port (one-clock read latency,
// read-before-write, port B winning a same-address write); a second
// instance is checked for the S-box/log-table initial image.
module tb_dp_ram;
  import aes_ref_pkg::*;
  import cis_pkg::INIT_SBOX_LOG;

  logic       clk = 0;
  logic       en_a, we_a, en_b, we_b;
  logic [8:0] addr_a, addr_b;
  logic [7:0] wd_a, wd_b, rd_a, rd_b;
  logic [7:0] t_rd_a, t_rd_b;
  logic [7:0] model [512];
  int         checks = 0, failures = 0;

  dp_ram dut (
    .clk_i(clk), .en_a_i(en_a), .we_a_i(we_a), .addr_a_i(addr_a), .wdata_a_i(wd_a), .rdata_a_o(rd_a),
    .en_b_i(en_b), .we_b_i(we_b), .addr_b_i(addr_b), .wdata_b_i(wd_b), .rdata_b_o(rd_b)
  );

  dp_ram #(.INIT(INIT_SBOX_LOG)) dut_t (
    .clk_i(clk), .en_a_i(1'b1), .we_a_i(1'b0), .addr_a_i(addr_a), .wdata_a_i(8'h00), .rdata_a_o(t_rd_a),
    .en_b_i(1'b1), .we_b_i(1'b0), .addr_b_i(addr_b), .wdata_b_i(8'h00), .rdata_b_o(t_rd_b)
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

  // log base {03}
  function automatic logic [7:0] glog(input logic [7:0] a);
    logic [7:0] p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      if (p == a) return 8'(i);
      p = gmul(p, 8'h03);
    end
    return 8'h00;
  endfunction

  initial begin
    en_a = 0; we_a = 0; en_b = 0; we_b = 0; addr_a = 0; addr_b = 0; wd_a = 0; wd_b = 0;
    // initial image
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr_a = 9'(i); addr_b = 9'(256 + i);
      @(negedge clk);
      chk(t_rd_a, sbox(8'(i)), "sbox image");
      if (i != 0) chk(t_rd_b, glog(8'(i)), "log image");
    end
    // fill through both ports
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = 9'(2*i);     wd_a = 8'($urandom);
      en_b = 1; we_b = 1; addr_b = 9'(2*i + 1); wd_b = 8'($urandom);
      model[2*i] = wd_a; model[2*i+1] = wd_b;
    end
    // read back crosswise
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we_a = 0; we_b = 0; addr_a = 9'(2*i + 1); addr_b = 9'(2*i);
      @(negedge clk);
      chk(rd_a, model[2*i+1], "port A read");
      chk(rd_b, model[2*i],   "port B read");
    end
    // read-before-write on port A, then same-address write collision
    @(negedge clk); addr_a = 9'd7; we_a = 1; wd_a = ~model[7];
    @(negedge clk); we_a = 0; chk(rd_a, model[7], "read-before-write");
    model[7] = ~model[7];
    @(negedge clk); chk(rd_a, model[7], "written value");
    @(negedge clk); addr_a = 9'd9; addr_b = 9'd9; we_a = 1; we_b = 1; wd_a = 8'haa; wd_b = 8'h55;
    @(negedge clk); we_a = 0; we_b = 0;
    @(negedge clk); chk(rd_a, 8'h55, "collision, port B wins");
    // disabled port keeps its output
    @(negedge clk); en_a = 0; addr_a = 9'd0;
    @(negedge clk); chk(rd_a, 8'h55, "disabled port holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
