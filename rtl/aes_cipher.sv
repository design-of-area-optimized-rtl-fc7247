// aes_cipher: iterative AES-128 encryption/decryption module.
//
// One 128-bit state register is reused for all rounds (the iterative
// architecture), and one full round is computed per clock:
//   encryption, round r = 1..10:  s <= MixColumns(ShiftRows(SubBytes(s))) ^ RK[r]
//   decryption, round r = 1..10:  s <= InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ RK[10-r])
// MixColumns / InvMixColumns are left out in round 10. The extra AddRoundKey
// before the first round (with RK[0], or RK[10] when decrypting) is applied as
// the block is loaded. The round keys come from outside through rk_addr/rk,
// an asynchronous read port, and are taken in reverse order for decryption.
//
// Timing: start (with mode and din) is taken on a rising edge when busy is
// low and ignored otherwise. Ten edges later dout holds the result and done is
// high for one cycle; busy is high from the edge after start up to that edge,
// so a new block can start in the cycle done is high. Latency is 10 cycles
// after the start edge, throughput one block per 10 cycles.
// The round structure follows FIPS-197 as the design describes it; the
// start/done handshake and the one-round-per-clock schedule are this
// implementation's choice.
module aes_cipher
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  aes_mode_e mode,
  input  block_t    din,
  output logic [3:0] rk_addr,
  input  block_t    rk,
  output logic      busy,
  output logic      done,
  output block_t    dout
);
  block_t     state;
  logic [3:0] round;        // round being computed while busy, 1..NR
  aes_mode_e  mode_q;
  logic       last;

  // ---- round-key address -------------------------------------------------
  always_comb begin
    if (!busy) rk_addr = (mode == MODE_DEC) ? 4'(NR) : 4'd0;
    else       rk_addr = (mode_q == MODE_DEC) ? 4'(NR) - round : round;
  end

  assign last = (round == 4'(NR));

  // ---- encryption round --------------------------------------------------
  block_t e_sb, e_sr, e_mc, e_out;
  sub_bytes     u_sb  (.d(state), .q(e_sb));
  shift_rows    u_sr  (.d(e_sb),  .q(e_sr));
  mix_columns   u_mc  (.d(e_sr),  .q(e_mc));
  add_round_key u_ark_e (.d(last ? e_sr : e_mc), .k(rk), .q(e_out));

  // ---- decryption round --------------------------------------------------
  block_t d_sr, d_sb, d_ark, d_mc, d_out;
  inv_shift_rows  u_isr (.d(state), .q(d_sr));
  inv_sub_bytes   u_isb (.d(d_sr),  .q(d_sb));
  add_round_key   u_ark_d (.d(d_sb), .k(rk), .q(d_ark));
  inv_mix_columns u_imc (.d(d_ark), .q(d_mc));
  assign d_out = last ? d_ark : d_mc;

  // ---- initial AddRoundKey -----------------------------------------------
  block_t init;
  add_round_key u_ark_0 (.d(din), .k(rk), .q(init));

  // ---- round controller and state register -------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= '0;
      round  <= '0;
      mode_q <= MODE_ENC;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state  <= init;
          mode_q <= mode;
          round  <= 4'd1;
          busy   <= 1'b1;
        end
      end else begin
        state <= (mode_q == MODE_DEC) ? d_out : e_out;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign dout = state;

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> round inside {[1:NR]});
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
