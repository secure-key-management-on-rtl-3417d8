// aes_enc: iterative AES-128 cipher core of the security module's cipher zone.
//
// The document asks for AES with a 128-bit datapath; the round structure is
// FIPS-197. One full round (SubBytes, ShiftRows, MixColumns, AddRoundKey) is
// computed per clock cycle on a 128-bit state register, and the round keys are
// expanded on the fly next to it, so no round-key memory is needed.
//
// Interface: `key` arrives over the cipher key bus and `din` over the data or
// key data bus; both are sampled on the cycle `start` is high while `busy` is
// low. `dout` holds the ciphertext from the cycle `done` pulses until the next
// start.
// Timing: the ten rounds take the ten cycles after the start cycle and `done`
// is high in the cycle after those (11 cycles after the start cycle); a new
// block may be started in the done cycle. Reset is asynchronous, active low
// (a choice of this design).
module aes_enc
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

  block_t     state_q, rk_q;
  byte_t      rcon_q;
  logic [3:0] round_q;

  block_t rk_next, round_out;

  always_comb begin
    rk_next   = next_round_key(rk_q, rcon_q);
    round_out = shift_rows(sub_bytes(state_q));
    if (round_q != 4'd10) round_out = mix_columns(round_out);
    round_out = round_out ^ rk_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= din ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;

endmodule
