// sec_core: the security module shared by all three processor extensions.
//
// It is split into the three zones of the separation principle:
//   processor zone  - the 128-bit data input and data output registers, filled
//                     and emptied one 32-bit word at a time over the data bus,
//                     and the command decoder driven by the control bus;
//   cipher zone     - an AES-128 cipher core (aes_enc) and decipher core
//                     (aes_dec);
//   key storage zone- master-key and session-key registers (key_store).
// Three internal buses join them, as in the document: the data bus (data and
// enciphered session keys, data registers <-> cipher data I/O), the key data
// bus (keys between the key registers and the cipher data I/O) and the cipher
// key bus (key register -> cipher key inputs). The processor only names keys by
// address. A deciphered session key travels over the key data bus into a
// session-key register and never reaches the data output register; a master
// key only ever drives a cipher key input.
//
// Key-use policy (this design's reading of the two-level key hierarchy):
// data operations (OP_ENC_DATA, OP_DEC_DATA) may use session keys only;
// OP_LOAD_SKEY and OP_EXPORT_SKEY use a master key. A command naming an empty
// or absent key register, or an unknown operation, is refused with the error
// flag and changes nothing. The document also says a received session key is
// "authenticated"; it does not say how, so no check is made here.
//
// Interface: a command is taken when cmd_valid and cmd_ready are both high;
// wdata travels with it. Exactly one response follows as a one-cycle rsp_valid
// pulse with rdata (the data word for OP_RD_DATA, key-valid flags for
// OP_STATUS, otherwise RSP_OK/RSP_ERR) and rsp_err. cmd_ready is low from
// acceptance until the response. The master-key channel mk_init_* is separate
// from the processor buses.
// Timing: rsp_valid is high N cycles after the cycle in which the command is
// accepted: N = 1 for OP_WR_DATA/RD_DATA/STATUS/NOP and refused commands, 12
// for OP_ENC_DATA and OP_EXPORT_SKEY, 22 for OP_DEC_DATA and OP_LOAD_SKEY (12
// when the decipher core already holds that key).
module sec_core
  import sec_pkg::*;
  import aes_pkg::block_t;
#(
  parameter int unsigned N_MK = 1,
  parameter int unsigned N_SK = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // control bus + data bus from the processor side
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  cmd_t               cmd,
  input  logic [WORD_W-1:0]  wdata,
  output logic               rsp_valid,
  output logic [WORD_W-1:0]  rdata,
  output logic               rsp_err,
  // separate master-key initialisation channel
  input  logic               mk_init_valid,
  input  logic [KADDR_W-1:0] mk_init_addr,
  input  logic [BLOCK_W-1:0] mk_init_key,
  output logic               busy
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ENC, S_WAIT_DEC} state_e;

  state_e             fsm_q;
  op_e                pend_op_q;
  logic [KADDR_W-1:0] pend_sk_q;
  block_t             din_q, dout_q;

  // key storage zone
  logic               ck_master, ck_valid, kd_valid, sk_wr_en;
  logic [KADDR_W-1:0] ck_addr;
  block_t             ck_key, kd_key;
  logic [MAX_KEYS-1:0] mk_valid, sk_valid;

  // cipher zone
  logic   enc_start, enc_busy, enc_done;
  logic   dec_start, dec_busy, dec_done;
  block_t enc_din, enc_dout, dec_dout;

  logic accept, legal, sk_in_range;

  assign cmd_ready = (fsm_q == S_IDLE);
  assign accept    = cmd_valid && cmd_ready;
  assign busy      = (fsm_q != S_IDLE);

  // Cipher key bus selection is decoded from the command being accepted; the
  // cores sample the key on their start cycle.
  always_comb begin
    ck_master   = (cmd.op == OP_LOAD_SKEY) || (cmd.op == OP_EXPORT_SKEY);
    ck_addr     = ck_master ? cmd.mk_addr : cmd.sk_addr;
    sk_in_range = 32'(cmd.sk_addr) < N_SK;
    unique case (cmd.op)
      OP_ENC_DATA, OP_DEC_DATA: legal = ck_valid;
      OP_LOAD_SKEY:             legal = ck_valid && sk_in_range;
      OP_EXPORT_SKEY:           legal = ck_valid && kd_valid;
      OP_NOP, OP_WR_DATA, OP_RD_DATA, OP_STATUS: legal = 1'b1;
      default:                  legal = 1'b0;
    endcase
    enc_start = accept && legal && (cmd.op == OP_ENC_DATA || cmd.op == OP_EXPORT_SKEY);
    dec_start = accept && legal && (cmd.op == OP_DEC_DATA || cmd.op == OP_LOAD_SKEY);
    // cipher data input: key data bus for key export, data bus otherwise
    enc_din   = (cmd.op == OP_EXPORT_SKEY) ? kd_key : din_q;
  end

  // key data bus from the decipher output into a session-key register
  assign sk_wr_en = dec_done && (fsm_q == S_WAIT_DEC) && (pend_op_q == OP_LOAD_SKEY);

  key_store #(.N_MK(N_MK), .N_SK(N_SK)) u_keys (
    .clk, .rst_n,
    .mk_wr_en   (mk_init_valid),
    .mk_wr_addr (mk_init_addr),
    .mk_wr_key  (mk_init_key),
    .sk_wr_en,
    .sk_wr_addr (pend_sk_q),
    .sk_wr_key  (dec_dout),
    .ck_master, .ck_addr, .ck_key, .ck_valid,
    .kd_addr    (cmd.sk_addr),
    .kd_key, .kd_valid,
    .mk_valid, .sk_valid
  );

  aes_enc u_enc (
    .clk, .rst_n, .start(enc_start), .key(ck_key), .din(enc_din),
    .busy(enc_busy), .done(enc_done), .dout(enc_dout)
  );

  aes_dec u_dec (
    .clk, .rst_n, .start(dec_start), .key(ck_key), .din(din_q),
    .busy(dec_busy), .done(dec_done), .dout(dec_dout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q     <= S_IDLE;
      pend_op_q <= OP_NOP;
      pend_sk_q <= '0;
      din_q     <= '0;
      dout_q    <= '0;
      rsp_valid <= 1'b0;
      rdata     <= '0;
      rsp_err   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (fsm_q)
        S_IDLE: if (accept) begin
          pend_op_q <= cmd.op;
          pend_sk_q <= cmd.sk_addr;
          rdata     <= RSP_OK;
          rsp_err   <= 1'b0;
          if (!legal) begin
            rsp_valid <= 1'b1;
            rdata     <= RSP_ERR;
            rsp_err   <= 1'b1;
          end else if (enc_start) begin
            fsm_q <= S_WAIT_ENC;
          end else if (dec_start) begin
            fsm_q <= S_WAIT_DEC;
          end else begin
            rsp_valid <= 1'b1;
            unique case (cmd.op)
              OP_WR_DATA: din_q[BLOCK_W-1-WORD_W*cmd.widx -: WORD_W] <= wdata;
              OP_RD_DATA: rdata <= dout_q[BLOCK_W-1-WORD_W*cmd.widx -: WORD_W];
              OP_STATUS:  rdata <= {20'h0, mk_valid, 4'h0, sk_valid};
              default:    rdata <= RSP_OK;
            endcase
          end
        end
        S_WAIT_ENC: if (enc_done) begin
          dout_q    <= enc_dout;
          rsp_valid <= 1'b1;
          fsm_q     <= S_IDLE;
        end
        S_WAIT_DEC: if (dec_done) begin
          if (pend_op_q != OP_LOAD_SKEY) dout_q <= dec_dout;
          rsp_valid <= 1'b1;
          fsm_q     <= S_IDLE;
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  // A deciphered session key must never reach the processor-side output.
  a_skey_hidden: assert property (@(posedge clk) disable iff (!rst_n)
    sk_wr_en |=> $stable(dout_q));
  // Commands are only taken while idle, and the cores are never restarted busy.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    !(enc_start && enc_busy) && !(dec_start && dec_busy));

endmodule
