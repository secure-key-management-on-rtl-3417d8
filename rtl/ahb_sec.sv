// ahb_sec: security module attached through the peripheral bus, as an
// AHB-Lite slave on a Cortex-M1-class system.
//
// The bus is shared (point-to-multipoint), so every transfer into and out of
// the module is a memory-mapped access, and the slave inserts wait states
// (HREADYOUT low) while the security module is busy. Register map (word
// offsets, HADDR[4:2]):
//   0x00-0x0C  write: data input word 0..3    read: data output word 0..3
//   0x10       write: command word (sec_pkg layout), posted: the write ends
//              as soon as sec_core takes the command, and the result is
//              collected in the status register
//              read: last command word written
//   0x14       read: status {30'b0, last_error, busy}; never waits
//   0x18       read: key-valid flags (OP_STATUS of sec_core)
// A data-word access or a flag read issued while a command runs is held with
// wait states until the core is free. Unmapped offsets read 0 and ignore
// writes; HRESP is always OKAY and HSIZE is taken as a word. The register map
// is this design's choice; the document only says the extension sits on the
// AHB system bus.
// Timing: a data-word write takes one wait-free data phase when the core is
// idle; a data-word read takes one wait state; after a command write, the
// next data-word access waits for the command (about 11 or 21 cycles).
// HRESETn is the asynchronous active-low reset.
module ahb_sec
  import sec_pkg::*;
#(
  parameter int unsigned N_MK = 1,
  parameter int unsigned N_SK = 1
) (
  input  logic               HCLK,
  input  logic               HRESETn,
  input  logic               HSEL,
  input  logic [31:0]        HADDR,
  input  logic [1:0]         HTRANS,
  input  logic               HWRITE,
  input  logic [2:0]         HSIZE,
  input  logic [31:0]        HWDATA,
  input  logic               HREADY,
  output logic [31:0]        HRDATA,
  output logic               HREADYOUT,
  output logic               HRESP,
  // master key initialisation channel
  input  logic               mk_init_valid,
  input  logic [KADDR_W-1:0] mk_init_addr,
  input  logic [BLOCK_W-1:0] mk_init_key
);

  localparam logic [2:0] A_CMD = 3'd4, A_STAT = 3'd5, A_FLAGS = 3'd6;

  logic              dp_q, dp_write_q, rd_issued_q, posted_q, posted_cmd_q, last_err_q;
  logic [2:0]        dp_addr_q;
  logic [WORD_W-1:0] last_cmd_q;

  logic              cmd_valid, cmd_ready, rsp_valid, rsp_err, busy;
  cmd_t              cmd;
  logic [WORD_W-1:0] wdata, rdata;
  logic              addr_phase, core_access, cmd_accept;

  sec_core #(.N_MK(N_MK), .N_SK(N_SK)) u_core (
    .clk(HCLK), .rst_n(HRESETn),
    .cmd_valid, .cmd_ready, .cmd, .wdata,
    .rsp_valid, .rdata, .rsp_err,
    .mk_init_valid, .mk_init_addr, .mk_init_key,
    .busy
  );

  assign addr_phase = HSEL && HTRANS[1] && HREADY;
  assign HRESP      = 1'b0;
  assign cmd_accept = cmd_valid && cmd_ready;

  // data-phase accesses that become sec_core commands
  always_comb begin
    core_access = dp_q && (dp_addr_q[2] == 1'b0 ||
                           (dp_write_q && dp_addr_q == A_CMD) ||
                           (!dp_write_q && dp_addr_q == A_FLAGS));
    cmd   = '0;
    wdata = HWDATA;
    if (dp_addr_q[2] == 1'b0)
      cmd = make_cmd(dp_write_q ? OP_WR_DATA : OP_RD_DATA, dp_addr_q[1:0], '0, '0);
    else if (dp_addr_q == A_CMD)
      cmd = cmd_t'(HWDATA);
    else
      cmd = make_cmd(OP_STATUS, '0, '0, '0);
    // a posted command must have answered before the next one is sent
    cmd_valid = core_access && !rd_issued_q && !posted_q;
  end

  always_comb begin
    HREADYOUT = 1'b1;
    HRDATA    = '0;
    if (dp_q) begin
      if (core_access) begin
        if (dp_write_q) HREADYOUT = cmd_accept;
        else            HREADYOUT = rd_issued_q && rsp_valid;
      end
      if (!dp_write_q) begin
        unique case (dp_addr_q)
          A_CMD:   HRDATA = last_cmd_q;
          A_STAT:  HRDATA = {30'h0, last_err_q, posted_q};
          A_FLAGS, 3'd0, 3'd1, 3'd2, 3'd3: HRDATA = rdata;
          default: HRDATA = '0;
        endcase
      end
    end
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_q        <= 1'b0;
      dp_write_q  <= 1'b0;
      dp_addr_q   <= '0;
      rd_issued_q <= 1'b0;
      posted_q    <= 1'b0;
      posted_cmd_q <= 1'b0;
      last_err_q  <= 1'b0;
      last_cmd_q  <= '0;
    end else begin
      if (HREADYOUT) begin
        dp_q       <= addr_phase;
        dp_write_q <= HWRITE;
        dp_addr_q  <= HADDR[4:2];
      end
      // reads wait for their own response
      if (cmd_accept && !dp_write_q) rd_issued_q <= 1'b1;
      if (rd_issued_q && rsp_valid)  rd_issued_q <= 1'b0;
      // writes are posted; their response is absorbed here
      if (cmd_accept && dp_write_q) begin
        posted_q     <= 1'b1;
        posted_cmd_q <= (dp_addr_q == A_CMD);
      end
      if (posted_q && rsp_valid) begin
        posted_q <= 1'b0;
        if (posted_cmd_q) last_err_q <= rsp_err;
      end
      if (cmd_accept && dp_write_q && dp_addr_q == A_CMD) last_cmd_q <= HWDATA;
    end
  end

  a_one_outstanding: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !(rd_issued_q && posted_q));

endmodule
