// tb_g_table: checks all 256 inputs of the G tables against a shift-and-add
// GF(2^8) model: G0 = G1 = S(a), G2 = {02}*S(a), G3 = {03}*S(a).
module tb_g_table;
  import aes_ref_pkg::*;

  logic       clk = 0;
  logic [7:0] a;
  logic [7:0] g0, g1, g2, g3;
  int         checks = 0, failures = 0;

  g_table dut (.a(a), .g0(g0), .g1(g1), .g2(g2), .g3(g3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      s = sbox(a);
      checks++;
      if (g0 !== s || g1 !== s || g2 !== gmul(s, 8'h02) || g3 !== gmul(s, 8'h03)) begin
        failures++;
        $display("a=%h got %h %h %h %h exp S=%h", a, g0, g1, g2, g3, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
