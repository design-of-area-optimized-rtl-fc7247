// key_schedule: the key-scheduling module of the AES-128 core.
//
// On a load pulse it stores the cipher key as RoundKey[0] and then produces
// RoundKey[1] .. RoundKey[10], one per clock, with a key_expand_round step
// whose round constant is doubled in GF(2^8) after every step. All eleven
// 128-bit round keys are written to an 11-entry memory, so once expanded a
// key serves any number of blocks in either direction: encryption reads the
// memory from address 0 up, decryption from address 10 down.
//
// Timing: load is sampled on a rising edge; 10 edges later every round key is
// stored and ready goes high (busy is high in between). A new load restarts
// the expansion at any time and drops ready. The read port is asynchronous:
// rd_key follows rd_addr in the same cycle.
// The separate scheduler and the eleven stored keys follow the design; the
// one-step-per-clock sequencing and the load/ready handshake are this
// implementation's choice.
module key_schedule
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  block_t     key,
  output logic       busy,
  output logic       ready,
  input  logic [3:0] rd_addr,
  output block_t     rd_key
);
  block_t     rk_mem [NR+1];
  block_t     cur;
  block_t     nxt;
  byte_t      rc;
  byte_t      rc_nxt;
  logic [3:0] idx;

  key_expand_round u_step (.key_in(cur), .rc(rc), .key_out(nxt));
  xtime            u_rc   (.a(rc), .y(rc_nxt));

  // Round-key memory: one write port, one asynchronous read port.
  always_ff @(posedge clk) begin
    if (load)      rk_mem[0]   <= key;
    else if (busy) rk_mem[idx] <= nxt;
  end

  assign rd_key = (rd_addr <= 4'(NR)) ? rk_mem[rd_addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= '0;
      rc    <= 8'h01;
      cur   <= '0;
    end else if (load) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      idx   <= 4'd1;
      rc    <= 8'h01;
      cur   <= key;
    end else if (busy) begin
      cur <= nxt;
      rc  <= rc_nxt;
      idx <= idx + 4'd1;
      if (idx == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // The write address never leaves the memory.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> idx inside {[1:NR]});
endmodule
