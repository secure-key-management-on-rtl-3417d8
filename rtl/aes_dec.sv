// aes_dec: iterative AES-128 decipher core of the security module's cipher
// zone.
//
// The document asks for separate cipher and decipher cores with a 128-bit
// datapath; the round structure is the FIPS-197 inverse cipher. One inverse
// round (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns) is computed per
// clock cycle, with the round keys produced backwards by the inverse key
// schedule. Decryption starts from the last round key, so for a new key the
// core first runs the key schedule forwards for 10 cycles. The last round key
// and the key it came from are kept, and a block that uses the same key again
// skips the expansion (this cache is a choice of this design).
//
// Interface: `key` (cipher key bus) and `din` are sampled on the cycle `start`
// is high while `busy` is low. `dout` holds the plaintext from the `done`
// pulse until the next start.
// Timing: `done` is high 21 cycles after the start cycle for a new key (10
// expansion cycles, 10 round cycles) and 11 cycles after it when the key
// equals the previous one; a new block may be started in the done cycle. Asynchronous active-low
// reset.
module aes_dec
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t din,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  typedef enum logic [1:0] {S_IDLE, S_EXPAND, S_ROUNDS} state_e;

  state_e     fsm_q;
  block_t     state_q, rk_q, din_q;
  block_t     cache_key_q, cache_last_q;
  logic       cache_vld_q;
  byte_t      rcon_q;
  logic [3:0] cnt_q;

  block_t rk_fwd, rk_bwd, round_out;
  logic   cache_hit;

  assign cache_hit = cache_vld_q && (cache_key_q == key);

  always_comb begin
    rk_fwd    = next_round_key(rk_q, rcon_q);
    rk_bwd    = prev_round_key(rk_q, rcon_q);
    round_out = inv_sub_bytes(inv_shift_rows(state_q)) ^ rk_bwd;
    if (cnt_q != 4'd1) round_out = inv_mix_columns(round_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q        <= S_IDLE;
      state_q      <= '0;
      rk_q         <= '0;
      din_q        <= '0;
      cache_key_q  <= '0;
      cache_last_q <= '0;
      cache_vld_q  <= 1'b0;
      rcon_q       <= 8'h01;
      cnt_q        <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fsm_q)
        S_IDLE: if (start) begin
          if (cache_hit) begin
            state_q <= din ^ cache_last_q;
            rk_q    <= cache_last_q;
            rcon_q  <= 8'h36;
            cnt_q   <= 4'd10;
            fsm_q   <= S_ROUNDS;
          end else begin
            din_q       <= din;
            rk_q        <= key;
            rcon_q      <= 8'h01;
            cnt_q       <= 4'd1;
            cache_key_q <= key;
            cache_vld_q <= 1'b0;
            fsm_q       <= S_EXPAND;
          end
        end
        S_EXPAND: begin
          rk_q  <= rk_fwd;
          cnt_q <= cnt_q + 4'd1;
          if (cnt_q == 4'd10) begin
            // rcon_q is 0x36 here: the constant of the last round key
            state_q      <= din_q ^ rk_fwd;
            cache_last_q <= rk_fwd;
            cache_vld_q  <= 1'b1;
            cnt_q        <= 4'd10;
            fsm_q        <= S_ROUNDS;
          end else begin
            rcon_q <= xtime(rcon_q);
          end
        end
        S_ROUNDS: begin
          state_q <= round_out;
          rk_q    <= rk_bwd;
          rcon_q  <= xtime_inv(rcon_q);
          cnt_q   <= cnt_q - 4'd1;
          if (cnt_q == 4'd1) begin
            done  <= 1'b1;
            fsm_q <= S_IDLE;
          end
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (fsm_q != S_IDLE);
  assign dout = state_q;

endmodule
