// tb_xtime: exhaustive check of the {02} multiplier against a general
// shift-and-add GF(2^8) multiply. Self-checking; prints TB_RESULT.
module tb_xtime;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, y;
  xtime dut (.a(a), .y(y));

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
      checks++;
      if (y !== gmul(a, 8'h02)) begin
        failures++;
        $display("FAIL xtime(%02h) = %02h, expected %02h", a, y, gmul(a, 8'h02));
      end
    end
    // FIPS-197 section 4.2.1 example: {57} * {02} = {ae}, {ae} * {02} = {47}.
    a = 8'h57; @(posedge clk); checks++; if (y !== 8'hae) failures++;
    a = 8'hae; @(posedge clk); checks++; if (y !== 8'h47) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
