// tb_aes_inv_round: one encryption round against the reference model: the
// FIPS-197 Appendix B round-1 and last-round values, then random states and
// keys in both the ordinary and the last-round form.
module tb_aes_inv_round;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] st, rk, q;
  logic         fin;
  int           checks = 0, failures = 0;

  aes_inv_round dut (.state_i(st), .rk_i(rk), .final_i(fin), .state_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] exp);
    @(posedge clk);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("state=%h rk=%h final=%0b got %h exp %h", st, rk, fin, q, exp);
    end
  endtask

  initial begin
    // FIPS-197 Appendix B, undone: ciphertext ^ rk10 -> InvSR/InvSB -> start
    // of round 10 ^ rk9 ... checked in the last-round form with a zero key
    st = 128'h3925841d02dc09fbdc118597196a0b32 ^ 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    rk = '0; fin = 1;
    check(128'heb40f21e592e38848ba113e71bc342d2);
    // start of round 2 ^ rk1, inverted with the key already removed
    st = 128'ha49c7ff2689f352b6b5bea43026a5049; rk = 128'ha0fafe1788542cb123a339392a6c7605; fin = 0;
    check(dec_round(st, rk, 1'b0));
    for (int n = 0; n < 200; n++) begin
      st  = {$urandom, $urandom, $urandom, $urandom};
      rk  = {$urandom, $urandom, $urandom, $urandom};
      fin = n[0];
      check(dec_round(st, rk, fin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
