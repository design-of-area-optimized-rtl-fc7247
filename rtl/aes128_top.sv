// aes128_top: AES-128 encryption/decryption core.
//
// Two modules make up the core: key_schedule expands the cipher key into the
// eleven round keys and keeps them in a small memory, and aes_cipher runs the
// ten rounds of encryption or decryption on one state register, one round per
// clock, reading the round key it needs from that memory each cycle.
//
// Use: pulse key_load with key; key_ready rises 10 cycles later. Then, while
// ready is high, pulse start with mode (0 encrypt, 1 decrypt) and din; done
// pulses 10 cycles after the start edge with the result on dout. The expanded
// key stays valid for any number of blocks until the next key_load.
// start is ignored while ready is low (no key yet, or a block in flight), and
// key_load is ignored while a block is in flight, so the round keys never
// change under a running block. These handshake rules are this
// implementation's choice; the split into a key-scheduling module and an
// encryption/decryption module follows the design.
module aes128_top
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      key_load,
  input  block_t    key,
  output logic      key_ready,
  input  logic      start,
  input  aes_mode_e mode,
  input  block_t    din,
  output logic      ready,
  output block_t    dout,
  output logic      done
);
  logic       ks_busy;
  logic       cph_busy;
  logic [3:0] rk_addr;
  block_t     rk;

  key_schedule u_key_schedule (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (key_load && !cph_busy),
    .key     (key),
    .busy    (ks_busy),
    .ready   (key_ready),
    .rd_addr (rk_addr),
    .rd_key  (rk)
  );

  aes_cipher u_cipher (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start && ready),
    .mode    (mode),
    .din     (din),
    .rk_addr (rk_addr),
    .rk      (rk),
    .busy    (cph_busy),
    .done    (done),
    .dout    (dout)
  );

  assign ready = key_ready && !ks_busy && !cph_busy;

  assert property (@(posedge clk) disable iff (!rst_n) cph_busy |-> key_ready);
endmodule
