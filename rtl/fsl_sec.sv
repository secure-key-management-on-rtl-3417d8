// fsl_sec: security module attached through a coprocessor-dedicated bus, as
// on a MicroBlaze-class processor with Fast Simplex Link (FSL) channels.
//
// Two FSL channels, each a dual-clock fsl_fifo, carry everything: the
// processor writes 33-bit words (32 data bits + control bit) into the "to
// module" channel (s_*), and reads words from the "to processor" channel
// (m_*). Both channel ends on the processor side run on proc_clk; the
// security module runs on clk, so the processor is not slowed by the cipher. As the
// document notes, the instructions themselves must pass through the FIFOs,
// so this wrapper parses a word stream:
//   control = 0  data word: written to the data input register at an
//                auto-incrementing word index (0,1,2,3,0,...); no reply.
//   control = 1  command word (sec_pkg layout): resets the word index and is
//                executed by sec_core. When it finishes, an OP_ENC_DATA,
//                OP_DEC_DATA or OP_EXPORT_SKEY that succeeded returns the four
//                words of the data output register (control = 0) first; every
//                command then returns its response word with control = 1.
// A command word OP_WR_DATA writes 0 to word widx. The stream format and
// the FIFO depth are this design's choices; the document only names FSL.
// Timing: with four data words already written and both clocks equal, the
// first result word of an encryption is readable 22 cycles after the clock
// edge that writes the command word (two FIFO crossings, 12-cycle core
// latency, one core read per word); the other three follow three module
// cycles apart and the status word one cycle after the last. Asynchronous
// active-low reset of both domains.
module fsl_sec
  import sec_pkg::*;
#(
  parameter int unsigned N_MK       = 1,
  parameter int unsigned N_SK       = 1,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               proc_clk,
  // FSL channel processor -> module
  input  logic [WORD_W-1:0]  s_data,
  input  logic               s_control,
  input  logic               s_write,
  output logic               s_full,
  // FSL channel module -> processor
  output logic [WORD_W-1:0]  m_data,
  output logic               m_control,
  output logic               m_exists,
  input  logic               m_read,
  // master key initialisation channel
  input  logic               mk_init_valid,
  input  logic [KADDR_W-1:0] mk_init_addr,
  input  logic [BLOCK_W-1:0] mk_init_key
);

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_WR, S_WAIT_CMD, S_RD, S_RD_WAIT, S_PUSH_WORD, S_PUSH_STAT
  } state_e;

  state_e            fsm_q;
  op_e               op_q;
  logic [1:0]        ptr_q, k_q;
  logic [WORD_W-1:0] stat_q, word_q;

  logic              in_exists, in_read, in_ctrl;
  logic [WORD_W-1:0] in_data;
  logic              out_write, out_full, out_ctrl;
  logic [WORD_W-1:0] out_data;

  logic              cmd_valid, cmd_ready, rsp_valid, rsp_err, busy;
  cmd_t              cmd;
  logic [WORD_W-1:0] wdata, rdata;

  fsl_fifo #(.WIDTH(WORD_W + 1), .DEPTH(FIFO_DEPTH)) u_to_module (
    .rst_n, .wr_clk(proc_clk), .rd_clk(clk),
    .wr_en(s_write), .wr_data({s_control, s_data}), .full(s_full),
    .rd_en(in_read), .rd_data({in_ctrl, in_data}), .exists(in_exists)
  );

  fsl_fifo #(.WIDTH(WORD_W + 1), .DEPTH(FIFO_DEPTH)) u_to_proc (
    .rst_n, .wr_clk(clk), .rd_clk(proc_clk),
    .wr_en(out_write), .wr_data({out_ctrl, out_data}), .full(out_full),
    .rd_en(m_read), .rd_data({m_control, m_data}), .exists(m_exists)
  );

  sec_core #(.N_MK(N_MK), .N_SK(N_SK)) u_core (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .wdata,
    .rsp_valid, .rdata, .rsp_err,
    .mk_init_valid, .mk_init_addr, .mk_init_key,
    .busy
  );

  logic returns_block;
  assign returns_block = (op_q == OP_ENC_DATA) || (op_q == OP_DEC_DATA) ||
                         (op_q == OP_EXPORT_SKEY);

  always_comb begin
    cmd_valid = 1'b0;
    cmd       = '0;
    wdata     = '0;
    in_read   = 1'b0;
    out_write = 1'b0;
    out_ctrl  = 1'b0;
    out_data  = word_q;
    unique case (fsm_q)
      S_IDLE: if (in_exists) begin
        cmd_valid = 1'b1;
        if (in_ctrl) begin
          cmd = cmd_t'(in_data);
        end else begin
          cmd   = make_cmd(OP_WR_DATA, ptr_q, '0, '0);
          wdata = in_data;
        end
        in_read = cmd_ready;
      end
      S_RD: begin
        cmd_valid = 1'b1;
        cmd       = make_cmd(OP_RD_DATA, k_q, '0, '0);
      end
      S_PUSH_WORD: out_write = !out_full;
      S_PUSH_STAT: begin
        out_write = !out_full;
        out_ctrl  = 1'b1;
        out_data  = stat_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q  <= S_IDLE;
      op_q   <= OP_NOP;
      ptr_q  <= '0;
      k_q    <= '0;
      stat_q <= '0;
      word_q <= '0;
    end else begin
      unique case (fsm_q)
        S_IDLE: if (in_exists && cmd_ready) begin
          if (in_ctrl) begin
            op_q  <= cmd.op;
            ptr_q <= '0;
            fsm_q <= S_WAIT_CMD;
          end else begin
            ptr_q <= ptr_q + 2'd1;
            fsm_q <= S_WAIT_WR;
          end
        end
        S_WAIT_WR: if (rsp_valid) fsm_q <= S_IDLE;
        S_WAIT_CMD: if (rsp_valid) begin
          stat_q <= rdata;
          k_q    <= '0;
          fsm_q  <= (returns_block && !rsp_err) ? S_RD : S_PUSH_STAT;
        end
        S_RD: if (cmd_ready) fsm_q <= S_RD_WAIT;
        S_RD_WAIT: if (rsp_valid) begin
          word_q <= rdata;
          fsm_q  <= S_PUSH_WORD;
        end
        S_PUSH_WORD: if (!out_full) begin
          k_q   <= k_q + 2'd1;
          fsm_q <= (k_q == 2'd3) ? S_PUSH_STAT : S_RD;
        end
        S_PUSH_STAT: if (!out_full) fsm_q <= S_IDLE;
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

endmodule
