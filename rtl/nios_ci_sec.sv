// nios_ci_sec: security module attached through the internal processor bus,
// as a multi-cycle custom instruction of a NIOS II-class processor.
//
// The module sits in the processor datapath as a point-to-point extension:
// the custom-instruction selector `n` is the dedicated control bus straight
// from the processor's control unit and carries the operation, operand `datab`
// carries the rest of the command word (word index and key addresses, see
// sec_pkg) and operand `dataa` the 32-bit data word. The instruction's
// `result` is the response word. One instruction = one sec_core command.
//
// Interface: the usual multi-cycle custom-instruction handshake. `start` is
// high for one cycle (qualified by clk_en) and the processor stalls until
// `done` is high for one cycle, with `result` valid in that cycle. The master
// key enters over mk_init_*, a channel that does not pass through the
// processor. `reset` is active high, as on that processor's custom-instruction
// port; the core below is reset from it.
// Timing: done follows start by the sec_core latency (1 cycle for data
// transfers, 12 for encryption, 22 or 12 for decryption). The mapping of
// fields onto n/dataa/datab is this design's choice; the document only says
// the extension is controlled by custom instructions.
module nios_ci_sec
  import sec_pkg::*;
#(
  parameter int unsigned N_MK = 1,
  parameter int unsigned N_SK = 1
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               clk_en,
  input  logic               start,
  input  logic [7:0]         n,
  input  logic [WORD_W-1:0]  dataa,
  input  logic [WORD_W-1:0]  datab,
  output logic               done,
  output logic [WORD_W-1:0]  result,
  // master key initialisation channel
  input  logic               mk_init_valid,
  input  logic [KADDR_W-1:0] mk_init_addr,
  input  logic [BLOCK_W-1:0] mk_init_key
);

  logic rst_n, cmd_valid, cmd_ready, rsp_valid, rsp_err, busy;
  cmd_t cmd;
  logic [WORD_W-1:0] rdata;

  assign rst_n     = !reset;
  assign cmd_valid = start && clk_en;

  always_comb begin
    cmd    = cmd_t'(datab);
    cmd.op = op_e'(n[3:0]);
  end

  sec_core #(.N_MK(N_MK), .N_SK(N_SK)) u_core (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .wdata(dataa),
    .rsp_valid, .rdata, .rsp_err,
    .mk_init_valid, .mk_init_addr, .mk_init_key,
    .busy
  );

  assign done   = rsp_valid;
  assign result = rdata;

  // The processor issues a new instruction only after the previous one is done,
  // so the core is always ready when start arrives.
  a_ready_on_start: assert property (@(posedge clk) disable iff (reset)
    cmd_valid |-> cmd_ready);

endmodule
