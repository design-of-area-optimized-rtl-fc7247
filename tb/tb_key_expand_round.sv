// tb_key_expand_round: checks one KeyExpansion step against the word-based
// reference expansion for random keys and every round constant, and against
// the first two round keys of the FIPS-197 Appendix A.1 example.
// Self-checking; prints TB_RESULT.
module tb_key_expand_round;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] key_in, key_out;
  logic [7:0]   rc;
  key_expand_round dut (.key_in(key_in), .rc(rc), .key_out(key_out));

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (key_out !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, key_out, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    logic [7:0]   c;
    key_in = FIPS_B_KEY; rc = 8'h01;
    @(posedge clk);
    check(128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 RoundKey[1]");
    key_in = 128'ha0fafe1788542cb123a339392a6c7605; rc = 8'h02;
    @(posedge clk);
    check(128'hf2c295f27a96b9435935807a7359f67f, "FIPS-197 RoundKey[2]");
    for (int n = 0; n < 40; n++) begin
      ref_expand(rand128(), rk);
      c = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        key_in = rk[r-1];
        rc     = c;
        @(posedge clk);
        check(rk[r], $sformatf("random key, step %0d", r));
        c = gmul(c, 8'h02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
