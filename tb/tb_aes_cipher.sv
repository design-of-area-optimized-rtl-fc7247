// tb_aes_cipher: drives the iterative encryption/decryption module with round
// keys served from a testbench array (filled by the reference expansion) and
// checks: the FIPS-197 Appendix B and C.1 known answers in both directions,
// random blocks and keys against the reference cipher, the 10-cycle latency
// from the start edge to done, the round-key addresses (ascending when
// encrypting, descending when decrypting) and that a start during a running
// block is ignored. Self-checking; prints TB_RESULT.
module tb_aes_cipher;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, start, busy, done;
  aes_mode_e    mode;
  logic [127:0] din, dout, rk;
  logic [3:0]   rk_addr;
  logic [127:0] rk_arr [11];

  assign rk = (rk_addr <= 4'd10) ? rk_arr[rk_addr] : '0;

  aes_cipher dut (.clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .din(din),
                  .rk_addr(rk_addr), .rk(rk), .busy(busy), .done(done), .dout(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(aes_mode_e m, logic [127:0] k, logic [127:0] blk,
                     logic [127:0] exp, bit poke_start, string what);
    int cycles = 0;
    int addr_seq [$];
    ref_expand(k, rk_arr);
    mode  = m;
    din   = blk;
    start = 1'b1;
    #1;
    addr_seq.push_back(int'(rk_addr));
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cycles < 40) begin
      addr_seq.push_back(int'(rk_addr));
      if (poke_start && cycles == 3) begin
        start = 1'b1; din = ~blk; mode = (m == MODE_ENC) ? MODE_DEC : MODE_ENC;
      end
      @(posedge clk); #1;
      start = 1'b0;
      cycles++;
    end
    check(cycles == 10, $sformatf("%s: done %0d cycles after start, expected 10", what, cycles));
    check(dout === exp, $sformatf("%s: dout %032h expected %032h", what, dout, exp));
    check(addr_seq.size() == 11, $sformatf("%s: %0d round keys used", what, addr_seq.size()));
    foreach (addr_seq[i])
      if (addr_seq[i] != ((m == MODE_ENC) ? i : 10 - i)) begin
        check(1'b0, $sformatf("%s: step %0d read round key %0d", what, i, addr_seq[i]));
        break;
      end
    @(posedge clk); #1;
    check(!done && !busy, $sformatf("%s: done is a single pulse", what));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    rst_n = 1'b0; start = 1'b0; mode = MODE_ENC; din = '0;
    foreach (rk_arr[i]) rk_arr[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(ref_encrypt(FIPS_B_KEY, FIPS_B_PT) === FIPS_B_CT, "reference model, FIPS-197 B");
    check(ref_encrypt(FIPS_C_KEY, FIPS_C_PT) === FIPS_C_CT, "reference model, FIPS-197 C.1");
    run(MODE_ENC, FIPS_B_KEY, FIPS_B_PT, FIPS_B_CT, 0, "encrypt FIPS-197 B");
    run(MODE_DEC, FIPS_B_KEY, FIPS_B_CT, FIPS_B_PT, 0, "decrypt FIPS-197 B");
    run(MODE_ENC, FIPS_C_KEY, FIPS_C_PT, FIPS_C_CT, 0, "encrypt FIPS-197 C.1");
    run(MODE_DEC, FIPS_C_KEY, FIPS_C_CT, FIPS_C_PT, 1, "decrypt FIPS-197 C.1, start while busy");
    for (int n = 0; n < 30; n++) begin
      k = rand128();
      p = rand128();
      run(MODE_ENC, k, p, ref_encrypt(k, p), n % 5 == 0, "encrypt random");
      run(MODE_DEC, k, p, ref_decrypt(k, p), n % 7 == 0, "decrypt random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
