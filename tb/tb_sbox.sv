// tb_sbox: exhaustive check of the forward S-box against the reference
// model, plus FIPS-197 spot values. Self-checking; prints TB_RESULT.
module tb_sbox;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, y;
  sbox dut (.a(a), .y(y));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      check(y, ref_sbox(a), $sformatf("sbox(%02h)", a));
    end
    a = 8'h00; @(posedge clk); check(y, 8'h63, "sbox(00) FIPS");
    a = 8'h53; @(posedge clk); check(y, 8'hed, "sbox(53) FIPS");
    a = 8'hff; @(posedge clk); check(y, 8'h16, "sbox(ff) FIPS");
    a = 8'h19; @(posedge clk); check(y, 8'hd4, "sbox(19) FIPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
