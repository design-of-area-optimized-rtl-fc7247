// tb_inv_sbox: exhaustive check of the inverse S-box against the reference
// model, that it undoes the forward reference S-box, and against entries of
// the published inverse S-box table. Self-checking; prints TB_RESULT.
module tb_inv_sbox;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, y;
  inv_sbox dut (.a(a), .y(y));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  // A few published entries: {address, value}.
  localparam logic [15:0] KNOWN [8] = '{16'h0052, 16'h0109, 16'h026a, 16'h107c,
                                        16'h6300, 16'h803a, 16'hf017, 16'hff7d};

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
      check(y, ref_inv_sbox(a), $sformatf("inv_sbox(%02h)", a));
      a = ref_sbox(8'(i));
      @(posedge clk);
      check(y, 8'(i), $sformatf("inv_sbox(sbox(%02h))", i));
    end
    foreach (KNOWN[k]) begin
      a = KNOWN[k][15:8];
      @(posedge clk);
      check(y, KNOWN[k][7:0], $sformatf("table entry %02h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
