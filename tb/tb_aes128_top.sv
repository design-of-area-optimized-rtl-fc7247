// tb_aes128_top: end-to-end test of the AES-128 core at its default (and
// only) configuration. It expands keys, encrypts and decrypts the FIPS-197
// Appendix B and C.1 examples and random blocks under random keys, checking
// every result against the reference cipher and every latency (10 cycles for
// a key expansion, 10 cycles from start to done). It also exercises, and
// counts, each mechanism of the core: key expansion, encryption, decryption
// (with reverse round-key order), reuse of an expanded key for further
// blocks, a block started in the cycle the previous one finishes, a start
// ignored because no key is expanded, a start ignored during a running
// block, and a key_load ignored during a running block. A mechanism that
// never occurs is a failure. Self-checking; prints TB_RESULT.
module tb_aes128_top;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, key_load, key_ready, start, ready, done;
  aes_mode_e    mode;
  logic [127:0] key, din, dout;

  aes128_top dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key),
                  .key_ready(key_ready), .start(start), .mode(mode), .din(din),
                  .ready(ready), .dout(dout), .done(done));

  typedef enum int {
    EV_KEY_EXPAND, EV_ENCRYPT, EV_DECRYPT, EV_KEY_REUSE, EV_BACK_TO_BACK,
    EV_START_NO_KEY, EV_START_BUSY, EV_KEYLOAD_BUSY, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  logic [127:0] cur_key;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load_key(logic [127:0] k);
    int cycles = 0;
    key = k;
    key_load = 1'b1;
    @(posedge clk); #1;
    key_load = 1'b0;
    while (!key_ready && cycles < 40) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == 10, $sformatf("key ready %0d cycles after key_load, expected 10", cycles));
    cur_key = k;
    events[EV_KEY_EXPAND]++;
  endtask

  // One block. chain: raise start for the next block in the cycle done is
  // high. poke: try a start and a key_load while the block runs.
  task automatic block(aes_mode_e m, logic [127:0] blk, logic [127:0] exp,
                       bit poke, bit first_with_key, string what);
    int cycles = 0;
    check(ready, $sformatf("%s: ready before start", what));
    mode = m; din = blk; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cycles < 40) begin
      if (poke && cycles == 2) begin
        check(!ready, "ready low while a block runs");
        start = 1'b1; din = rand128(); key_load = 1'b1; key = rand128();
        events[EV_START_BUSY]++;
        events[EV_KEYLOAD_BUSY]++;
      end
      @(posedge clk); #1;
      start = 1'b0; key_load = 1'b0;
      cycles++;
    end
    check(cycles == 10, $sformatf("%s: done %0d cycles after start, expected 10", what, cycles));
    check(dout === exp, $sformatf("%s: dout %032h expected %032h", what, dout, exp));
    check(key_ready, $sformatf("%s: round keys kept", what));
    events[(m == MODE_ENC) ? EV_ENCRYPT : EV_DECRYPT]++;
    if (!first_with_key) events[EV_KEY_REUSE]++;
  endtask

  // Two blocks back to back: the second start is raised while done of the
  // first is high.
  task automatic chained(logic [127:0] p1, logic [127:0] p2);
    int cycles = 0;
    logic [127:0] c1, c2;
    c1 = ref_encrypt(cur_key, p1);
    c2 = ref_decrypt(cur_key, p2);
    mode = MODE_ENC; din = p1; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cycles < 40) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(dout === c1, "chained block 1");
    check(ready, "ready in the cycle done is high");
    mode = MODE_DEC; din = p2; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 40) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == 10, $sformatf("chained block 2: done after %0d cycles", cycles));
    check(dout === c2, "chained block 2");
    events[EV_ENCRYPT]++;
    events[EV_DECRYPT]++;
    events[EV_KEY_REUSE] += 2;
    events[EV_BACK_TO_BACK]++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    foreach (events[i]) events[i] = 0;
    rst_n = 1'b0; key_load = 1'b0; start = 1'b0; mode = MODE_ENC; key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // A start before any key has been expanded does nothing.
    check(!ready && !key_ready, "not ready after reset");
    start = 1'b1; din = FIPS_B_PT;
    @(posedge clk); #1;
    start = 1'b0;
    repeat (12) begin
      check(!done, "no result without a key");
      @(posedge clk); #1;
    end
    events[EV_START_NO_KEY]++;

    load_key(FIPS_B_KEY);
    block(MODE_ENC, FIPS_B_PT, FIPS_B_CT, 0, 1, "encrypt FIPS-197 B");
    block(MODE_DEC, FIPS_B_CT, FIPS_B_PT, 1, 0, "decrypt FIPS-197 B");
    load_key(FIPS_C_KEY);
    block(MODE_DEC, FIPS_C_CT, FIPS_C_PT, 0, 1, "decrypt FIPS-197 C.1");
    block(MODE_ENC, FIPS_C_PT, FIPS_C_CT, 1, 0, "encrypt FIPS-197 C.1");
    chained(FIPS_C_PT, FIPS_C_CT);

    for (int n = 0; n < 25; n++) begin
      load_key(rand128());
      for (int b = 0; b < 4; b++) begin
        p = rand128();
        if ($urandom_range(1))
          block(MODE_ENC, p, ref_encrypt(cur_key, p), b == 2, b == 0, "encrypt random");
        else
          block(MODE_DEC, p, ref_decrypt(cur_key, p), b == 2, b == 0, "decrypt random");
      end
      // round trip through the core
      p = rand128();
      block(MODE_ENC, p, ref_encrypt(cur_key, p), 0, 0, "round trip, encrypt");
      block(MODE_DEC, dout, p, 0, 0, "round trip, decrypt");
      if (n % 5 == 0) chained(rand128(), rand128());
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %s: %0d", event_e'(e), events[e]);
      check(events[e] > 0, $sformatf("mechanism %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
