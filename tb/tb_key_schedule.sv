// tb_key_schedule: loads keys into the key scheduler, checks that ready rises
// exactly 10 cycles after the load edge, and reads back all eleven round keys
// against the reference expansion (FIPS-197 Appendix A.1 key and random
// keys). Also restarts an expansion half-way through with a new key.
// Self-checking; prints TB_RESULT.
module tb_key_schedule;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, load, busy, ready;
  logic [127:0] key, rd_key;
  logic [3:0]   rd_addr;

  key_schedule dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .busy(busy),
                    .ready(ready), .rd_addr(rd_addr), .rd_key(rd_key));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic expand_and_check(logic [127:0] k);
    logic [127:0] rk [11];
    int cycles = 0;
    ref_expand(k, rk);
    key  = k;
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    check(!ready && busy, "busy, not ready, after load");
    while (!ready && cycles < 50) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == 10, $sformatf("ready %0d cycles after the load edge, expected 10", cycles));
    check(!busy, "not busy when ready");
    for (int r = 0; r <= 10; r++) begin
      rd_addr = 4'(r);
      #1;
      check(rd_key === rk[r], $sformatf("RoundKey[%0d] = %032h, expected %032h", r, rd_key, rk[r]));
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; key = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!ready && !busy, "idle after reset");
    expand_and_check(FIPS_B_KEY);
    rd_addr = 4'd10; #1;
    check(rd_key === FIPS_A_RK10, "FIPS-197 RoundKey[10]");
    // restart in the middle of an expansion
    key = rand128(); load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    expand_and_check(rand128());
    for (int n = 0; n < 20; n++) expand_and_check(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
