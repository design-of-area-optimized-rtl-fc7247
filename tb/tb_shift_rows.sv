// tb_shift_rows: checks shift_rows on random states against the behavioural reference
// (ShiftRows) and on the FIPS-197 Appendix B example state. Self-checking; prints
// TB_RESULT.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] d, q;
  shift_rows dut (.d(d), .q(q));

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: in %032h got %032h expected %032h", what, d, q, exp);
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
    d = 128'hd42711aee0bf98f1b8b45de51e415230;
    @(posedge clk);
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 example");
    for (int n = 0; n < 500; n++) begin
      d = rand128();
      @(posedge clk);
      check(ref_shift_rows(d, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
