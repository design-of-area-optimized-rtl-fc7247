// tb_gf_mul_const: exhaustive check of the fixed-coefficient multiplier for
// the four InvMixColumns coefficients {0D} (default), {0B}, {09} and {0E}
// against a general GF(2^8) multiply. Self-checking; prints TB_RESULT.
module tb_gf_mul_const;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a;
  logic [7:0] y0d, y0b, y09, y0e;
  gf_mul_const                 dut_0d (.a(a), .y(y0d));
  gf_mul_const #(.COEF(8'h0B)) dut_0b (.a(a), .y(y0b));
  gf_mul_const #(.COEF(8'h09)) dut_09 (.a(a), .y(y09));
  gf_mul_const #(.COEF(8'h0E)) dut_0e (.a(a), .y(y0e));

  task automatic check(logic [7:0] got, logic [7:0] coef);
    checks++;
    if (got !== gmul(a, coef)) begin
      failures++;
      $display("FAIL {%02h}*%02h = %02h, expected %02h", coef, a, got, gmul(a, coef));
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
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      check(y0d, 8'h0d);
      check(y0b, 8'h0b);
      check(y09, 8'h09);
      check(y0e, 8'h0e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
