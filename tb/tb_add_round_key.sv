// tb_add_round_key: checks the state/round-key XOR on random operands and on
// the FIPS-197 Appendix B round 1 values. Self-checking; prints TB_RESULT.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] d, k, q, exp;
  add_round_key dut (.d(d), .k(k), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d   = 128'h046681e5e0cb199a48f8d37a2806264c;
    k   = 128'ha0fafe1788542cb123a339392a6c7605;
    exp = 128'ha49c7ff2689f352b6b5bea43026a5049;
    @(posedge clk);
    check("FIPS-197 round 1");
    for (int n = 0; n < 300; n++) begin
      d = rand128();
      k = rand128();
      for (int b = 0; b < 128; b++) exp[b] = (d[b] != k[b]);
      @(posedge clk);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
