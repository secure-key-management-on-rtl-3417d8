// key_store: the key storage zone of the security module.
//
// Holds N_MK master-key registers and N_SK session-key registers of 128 bits,
// each with a valid flag, as the document's "master key register" and "session
// key register". Separation is enforced by the ports alone:
//   * master keys are written only through the initialisation channel
//     (mk_wr_*), which in the system comes from outside the processor, and are
//     read only onto the cipher key bus (ck_*), i.e. into a cipher key input;
//   * session keys are written only from the key data bus (sk_wr_*), i.e. from
//     the decipher output, and are read onto the cipher key bus or onto the key
//     data bus towards the cipher data input (kd_*) for re-encryption;
//   * nothing here connects to the processor data bus.
// Reads are combinational; writes take effect at the next clock edge. Reset
// (asynchronous, active low) clears every key and flag. An address past the
// last register reads as invalid. The register counts are parameters of this
// design; the document names one register of each kind.
module key_store
  import sec_pkg::*;
#(
  parameter int unsigned N_MK = 1,
  parameter int unsigned N_SK = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // master key initialisation channel
  input  logic                 mk_wr_en,
  input  logic [KADDR_W-1:0]   mk_wr_addr,
  input  logic [BLOCK_W-1:0]   mk_wr_key,
  // key data bus, decipher output -> session key register
  input  logic                 sk_wr_en,
  input  logic [KADDR_W-1:0]   sk_wr_addr,
  input  logic [BLOCK_W-1:0]   sk_wr_key,
  // cipher key bus: selected key -> cipher key inputs
  input  logic                 ck_master,
  input  logic [KADDR_W-1:0]   ck_addr,
  output logic [BLOCK_W-1:0]   ck_key,
  output logic                 ck_valid,
  // key data bus: session key -> cipher data input
  input  logic [KADDR_W-1:0]   kd_addr,
  output logic [BLOCK_W-1:0]   kd_key,
  output logic                 kd_valid,
  // key-valid flags for the status word
  output logic [MAX_KEYS-1:0]  mk_valid,
  output logic [MAX_KEYS-1:0]  sk_valid
);

  initial begin
    assert (N_MK >= 1 && N_MK <= MAX_KEYS) else $error("N_MK out of range");
    assert (N_SK >= 1 && N_SK <= MAX_KEYS) else $error("N_SK out of range");
  end

  logic [BLOCK_W-1:0] mk_q [N_MK];
  logic [BLOCK_W-1:0] sk_q [N_SK];
  logic [N_MK-1:0]    mk_v_q;
  logic [N_SK-1:0]    sk_v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MK; i++) mk_q[i] <= '0;
      for (int i = 0; i < N_SK; i++) sk_q[i] <= '0;
      mk_v_q <= '0;
      sk_v_q <= '0;
    end else begin
      for (int i = 0; i < N_MK; i++)
        if (mk_wr_en && mk_wr_addr == KADDR_W'(i)) begin
          mk_q[i]   <= mk_wr_key;
          mk_v_q[i] <= 1'b1;
        end
      for (int i = 0; i < N_SK; i++)
        if (sk_wr_en && sk_wr_addr == KADDR_W'(i)) begin
          sk_q[i]   <= sk_wr_key;
          sk_v_q[i] <= 1'b1;
        end
    end
  end

  // Unselected or out-of-range addresses read as zero and invalid.
  always_comb begin
    ck_key   = '0;
    ck_valid = 1'b0;
    kd_key   = '0;
    kd_valid = 1'b0;
    mk_valid = '0;
    sk_valid = '0;
    for (int i = 0; i < N_MK; i++) begin
      mk_valid[i] = mk_v_q[i];
      if (ck_master && ck_addr == KADDR_W'(i)) begin
        ck_key   = mk_q[i];
        ck_valid = mk_v_q[i];
      end
    end
    for (int i = 0; i < N_SK; i++) begin
      sk_valid[i] = sk_v_q[i];
      if (!ck_master && ck_addr == KADDR_W'(i)) begin
        ck_key   = sk_q[i];
        ck_valid = sk_v_q[i];
      end
      if (kd_addr == KADDR_W'(i)) begin
        kd_key   = sk_q[i];
        kd_valid = sk_v_q[i];
      end
    end
  end

endmodule
