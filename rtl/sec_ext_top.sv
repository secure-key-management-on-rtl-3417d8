// sec_ext_top: the security-module extension in its three processor
// attachments, side by side.
//
// The same security module (sec_core: AES-128 cipher and decipher cores,
// master/session key registers, data/key-data/cipher-key buses) is attached
// to a general-purpose processor in the three ways the design is built for:
//   nios_*  internal processor bus: multi-cycle custom instruction
//           (nios_ci_sec), fastest and point-to-point;
//   mb_*    coprocessor-dedicated bus: two FSL FIFO channels (fsl_sec),
//           point-to-point, higher latency;
//   ahb_*   peripheral bus: memory-mapped AHB-Lite slave (ahb_sec), shared
//           bus, wait states.
// The processors themselves are outside this RTL; their buses are the ports.
// Each extension has its own key registers and its own master-key
// initialisation channel (*_mk_init_*), which in a system is driven from a
// separate key-loading path and never from the processor. The security
// modules run on clk; the FSL channels' processor side runs on mb_clk, which
// may differ. One asynchronous active-low reset serves all three (the
// custom-instruction port gets the active-high reset it expects).
module sec_ext_top
  import sec_pkg::*;
#(
  parameter int unsigned N_MK       = 1,
  parameter int unsigned N_SK       = 1,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // --- NIOS II custom instruction ---
  input  logic               nios_clk_en,
  input  logic               nios_start,
  input  logic [7:0]         nios_n,
  input  logic [WORD_W-1:0]  nios_dataa,
  input  logic [WORD_W-1:0]  nios_datab,
  output logic               nios_done,
  output logic [WORD_W-1:0]  nios_result,
  input  logic               nios_mk_init_valid,
  input  logic [KADDR_W-1:0] nios_mk_init_addr,
  input  logic [BLOCK_W-1:0] nios_mk_init_key,
  // --- MicroBlaze FSL channels (processor side on mb_clk) ---
  input  logic               mb_clk,
  input  logic [WORD_W-1:0]  mb_s_data,
  input  logic               mb_s_control,
  input  logic               mb_s_write,
  output logic               mb_s_full,
  output logic [WORD_W-1:0]  mb_m_data,
  output logic               mb_m_control,
  output logic               mb_m_exists,
  input  logic               mb_m_read,
  input  logic               mb_mk_init_valid,
  input  logic [KADDR_W-1:0] mb_mk_init_addr,
  input  logic [BLOCK_W-1:0] mb_mk_init_key,
  // --- Cortex-M1 AHB-Lite slave ---
  input  logic               ahb_hsel,
  input  logic [31:0]        ahb_haddr,
  input  logic [1:0]         ahb_htrans,
  input  logic               ahb_hwrite,
  input  logic [2:0]         ahb_hsize,
  input  logic [31:0]        ahb_hwdata,
  input  logic               ahb_hready,
  output logic [31:0]        ahb_hrdata,
  output logic               ahb_hreadyout,
  output logic               ahb_hresp,
  input  logic               ahb_mk_init_valid,
  input  logic [KADDR_W-1:0] ahb_mk_init_addr,
  input  logic [BLOCK_W-1:0] ahb_mk_init_key
);

  nios_ci_sec #(.N_MK(N_MK), .N_SK(N_SK)) u_nios (
    .clk, .reset(!rst_n), .clk_en(nios_clk_en), .start(nios_start), .n(nios_n),
    .dataa(nios_dataa), .datab(nios_datab), .done(nios_done), .result(nios_result),
    .mk_init_valid(nios_mk_init_valid), .mk_init_addr(nios_mk_init_addr),
    .mk_init_key(nios_mk_init_key)
  );

  fsl_sec #(.N_MK(N_MK), .N_SK(N_SK), .FIFO_DEPTH(FIFO_DEPTH)) u_fsl (
    .clk, .rst_n, .proc_clk(mb_clk),
    .s_data(mb_s_data), .s_control(mb_s_control), .s_write(mb_s_write), .s_full(mb_s_full),
    .m_data(mb_m_data), .m_control(mb_m_control), .m_exists(mb_m_exists), .m_read(mb_m_read),
    .mk_init_valid(mb_mk_init_valid), .mk_init_addr(mb_mk_init_addr),
    .mk_init_key(mb_mk_init_key)
  );

  ahb_sec #(.N_MK(N_MK), .N_SK(N_SK)) u_ahb (
    .HCLK(clk), .HRESETn(rst_n),
    .HSEL(ahb_hsel), .HADDR(ahb_haddr), .HTRANS(ahb_htrans), .HWRITE(ahb_hwrite),
    .HSIZE(ahb_hsize), .HWDATA(ahb_hwdata), .HREADY(ahb_hready),
    .HRDATA(ahb_hrdata), .HREADYOUT(ahb_hreadyout), .HRESP(ahb_hresp),
    .mk_init_valid(ahb_mk_init_valid), .mk_init_addr(ahb_mk_init_addr),
    .mk_init_key(ahb_mk_init_key)
  );

endmodule
