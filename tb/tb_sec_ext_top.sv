// tb_sec_ext_top: end-to-end test of the three security-module extensions at
// their default parameters.
//
// Follows the hardware test flow the design is built for. The master key is
// loaded into each extension over its own key channel. Then, per extension,
// packets are built by the "PC" side: a header with a control word and the
// session key enciphered under the master key, followed by payload blocks.
// The processor model reads the header, has the module decipher the session
// key into its session-key register, and runs CFB-128 over the payload, doing
// the XOR itself while the module ciphers. Every packet uses a new session key.
// The result is compared with the AES reference model, the first packet's
// ciphertext is decrypted back, and the session key is re-exported.
// The same flow runs through the custom instruction, the FSL channels and the
// AHB-Lite slave. Mechanisms counted (each must happen): session-key imports,
// session-key changes, refused key uses, CFB blocks, decipher key-cache hits,
// key exports, FSL FIFO full stalls, AHB wait states. Cycles per payload block
// are printed for each attachment. A last FSL test runs the processor side of
// the FSL channels on its own, faster clock.
module tb_sec_ext_top;
  import sec_pkg::*;
  import aes_ref_pkg::*;

  localparam int NPKT = 3, NBLK = 6;

  logic clk = 0, rst_n = 0, mb_pclk = 0, mb_clk, mb_same_clk = 1;
  // custom instruction
  logic nios_clk_en = 1, nios_start = 0, nios_done;
  logic [7:0] nios_n = 0;
  logic [31:0] nios_dataa = 0, nios_datab = 0, nios_result;
  // FSL
  logic [31:0] mb_s_data = 0, mb_m_data;
  logic mb_s_control = 0, mb_s_write = 0, mb_s_full, mb_m_control, mb_m_exists, mb_m_read = 0;
  // AHB
  logic ahb_hsel = 0, ahb_hwrite = 0, ahb_hreadyout, ahb_hresp;
  logic [31:0] ahb_haddr = 0, ahb_hwdata = 0, ahb_hrdata;
  logic [1:0] ahb_htrans = 0;
  logic [2:0] ahb_hsize = 3'b010;
  // master key channels
  logic nios_mk_init_valid = 0, mb_mk_init_valid = 0, ahb_mk_init_valid = 0;
  logic [KADDR_W-1:0] nios_mk_init_addr = 0, mb_mk_init_addr = 0, ahb_mk_init_addr = 0;
  logic [127:0] nios_mk_init_key = 0, mb_mk_init_key = 0, ahb_mk_init_key = 0;

  int checks = 0, failures = 0;
  int n_skey_load = 0, n_skey_change = 0, n_refused = 0, n_cfb = 0, n_cache_hit = 0;
  int n_export = 0, n_fsl_full = 0, n_fsl_sfull = 0, n_ahb_wait = 0, n_dual_clock = 0;
  longint cyc_per_blk [3];

  sec_ext_top dut (.ahb_hready(ahb_hreadyout), .*);

  always #10 clk = ~clk;   // 50 MHz, the module clock of all three extensions
  always #7 mb_pclk = ~mb_pclk;
  // FSL processor side: 50 MHz like the rest for the throughput comparison,
  // then its own ~71 MHz clock for the streaming test
  assign mb_clk = mb_same_clk ? clk : mb_pclk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge mb_clk) if (mb_s_full) n_fsl_sfull <= n_fsl_sfull + 1;
  always @(posedge clk) begin
    if (dut.u_fsl.out_full) n_fsl_full <= n_fsl_full + 1;
    if (ahb_htrans == 2'b00 && !ahb_hreadyout) n_ahb_wait <= n_ahb_wait + 1;
    if (dut.u_nios.u_core.u_dec.start && dut.u_nios.u_core.u_dec.cache_hit) n_cache_hit <= n_cache_hit + 1;
    if (dut.u_fsl.u_core.u_dec.start && dut.u_fsl.u_core.u_dec.cache_hit) n_cache_hit <= n_cache_hit + 1;
    if (dut.u_ahb.u_core.u_dec.start && dut.u_ahb.u_core.u_dec.cache_hit) n_cache_hit <= n_cache_hit + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- generic operation layer ----------------
  // port: 0 = custom instruction, 1 = FSL, 2 = AHB
  logic [127:0] blk_out;   // block returned by the last cipher operation

  // ---- custom instruction ----
  task automatic ci(input op_e op, input logic [31:0] a, input cmd_t b, output logic [31:0] r);
    @(negedge clk);
    nios_n = {4'h0, op}; nios_dataa = a; nios_datab = b; nios_start = 1;
    @(negedge clk);
    nios_start = 0;
    while (!nios_done) @(negedge clk);
    r = nios_result;
  endtask

  // ---- FSL ----
  task automatic fsl_put(input logic [31:0] w, input logic ctl);
    @(negedge mb_clk);
    while (mb_s_full) @(negedge mb_clk);
    mb_s_data = w; mb_s_control = ctl; mb_s_write = 1;
    @(negedge mb_clk);
    mb_s_write = 0;
  endtask

  task automatic fsl_get(output logic [31:0] w, output logic ctl);
    @(negedge mb_clk);
    while (!mb_m_exists) @(negedge mb_clk);
    w = mb_m_data; ctl = mb_m_control; mb_m_read = 1;
    @(negedge mb_clk);
    mb_m_read = 0;
  endtask

  // ---- AHB ----
  task automatic ahb_xfer(input logic [31:0] a, input logic w, input logic [31:0] d,
                          output logic [31:0] r);
    @(negedge clk);
    ahb_hsel = 1; ahb_htrans = 2'b10; ahb_haddr = 32'h4000_0000 + a; ahb_hwrite = w;
    @(negedge clk);
    ahb_hsel = 0; ahb_htrans = 2'b00; ahb_hwdata = d;
    while (!ahb_hreadyout) @(negedge clk);
    r = ahb_hrdata;
    @(negedge clk);
  endtask

  task automatic put_block(input int port, input logic [127:0] v);
    logic [31:0] r;
    for (int i = 0; i < 4; i++)
      unique case (port)
        0: ci(OP_WR_DATA, v[127-32*i -: 32], make_cmd(OP_NOP, 2'(i), 0, 0), r);
        1: fsl_put(v[127-32*i -: 32], 1'b0);
        default: ahb_xfer(32'(4*i), 1, v[127-32*i -: 32], r);
      endcase
  endtask

  // run a command on the block in the data input register; returns the
  // response word and, for block-returning commands, the output block
  task automatic run_cmd(input int port, input cmd_t c, output logic [31:0] rsp);
    logic [31:0] r; logic ctl;
    bit returns;
    returns = (c.op == OP_ENC_DATA || c.op == OP_DEC_DATA || c.op == OP_EXPORT_SKEY);
    unique case (port)
      0: begin
        ci(c.op, 0, c, rsp);
        if (returns && rsp == RSP_OK)
          for (int i = 0; i < 4; i++) begin
            ci(OP_RD_DATA, 0, make_cmd(OP_NOP, 2'(i), 0, 0), r);
            blk_out[127-32*i -: 32] = r;
          end
      end
      1: begin
        fsl_put(c, 1'b1);
        fsl_get(r, ctl);
        if (!ctl) begin
          blk_out[127:96] = r;
          for (int i = 1; i < 4; i++) begin
            fsl_get(r, ctl);
            blk_out[127-32*i -: 32] = r;
          end
          fsl_get(r, ctl);
        end
        check(ctl == 1'b1, "FSL status word last");
        rsp = r;
      end
      default: begin
        ahb_xfer(32'h10, 1, c, r);
        ahb_xfer(32'h18, 0, 0, r);          // waits for the command to end
        ahb_xfer(32'h14, 0, 0, r);
        rsp = r[1] ? RSP_ERR : RSP_OK;
        if (returns && rsp == RSP_OK)
          for (int i = 0; i < 4; i++) begin
            ahb_xfer(32'(4*i), 0, 0, r);
            blk_out[127-32*i -: 32] = r;
          end
      end
    endcase
  endtask

  task automatic load_mk(input int port, input logic [127:0] k);
    @(negedge clk);
    unique case (port)
      0: begin nios_mk_init_valid = 1; nios_mk_init_key = k; end
      1: begin mb_mk_init_valid = 1; mb_mk_init_key = k; end
      default: begin ahb_mk_init_valid = 1; ahb_mk_init_key = k; end
    endcase
    @(negedge clk);
    nios_mk_init_valid = 0; mb_mk_init_valid = 0; ahb_mk_init_valid = 0;
    nios_mk_init_key = '0; mb_mk_init_key = '0; ahb_mk_init_key = '0;
  endtask

  // ---------------- packet flow ----------------
  typedef struct {
    logic [31:0]  ctrl;        // header control word
    logic [127:0] esk;         // session key enciphered under the master key
    logic [127:0] iv;
    logic [127:0] data [NBLK];
  } packet_t;

  task automatic run_port(input int port, input string name);
    logic [127:0] mk, sk, prev_sk, c, first_ct [NBLK];
    logic [31:0] rsp;
    packet_t pkt;
    longint t0, t1, blk_cycles;
    blk_cycles = 0;
    prev_sk = '0;

    // a data operation before any session key is refused
    put_block(port, '0);
    run_cmd(port, make_cmd(OP_ENC_DATA, 0, 0, 0), rsp);
    check(rsp == RSP_ERR, {name, ": data encryption refused without session key"});
    if (rsp == RSP_ERR) n_refused++;

    mk = {$urandom, $urandom, $urandom, $urandom};
    load_mk(port, mk);

    for (int p = 0; p < NPKT; p++) begin
      // PC side: build the packet
      sk = {$urandom, $urandom, $urandom, $urandom};
      pkt.ctrl = 32'hC0DE_0000 | 32'(p);
      pkt.esk  = encrypt(mk, sk);
      pkt.iv   = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < NBLK; b++) pkt.data[b] = {$urandom, $urandom, $urandom, $urandom};

      // processor: header -> session key into the module
      check(pkt.ctrl[31:16] == 16'hC0DE, "header control word recognised");
      put_block(port, pkt.esk);
      run_cmd(port, make_cmd(OP_LOAD_SKEY, 0, 0, 0), rsp);
      check(rsp == RSP_OK, {name, ": session key import"});
      n_skey_load++;
      if (p > 0 && sk != prev_sk) n_skey_change++;
      prev_sk = sk;

      // processor: CFB-128 over the payload
      c = pkt.iv;
      t0 = $time / 20;
      for (int b = 0; b < NBLK; b++) begin
        put_block(port, c);
        run_cmd(port, make_cmd(OP_ENC_DATA, 0, 0, 0), rsp);
        c = blk_out ^ pkt.data[b];              // XOR done by the processor
        check(c == (encrypt(sk, (b == 0) ? pkt.iv : first_ct[b-1]) ^ pkt.data[b]),
              {name, ": CFB ciphertext block"});
        first_ct[b] = c;
        n_cfb++;
      end
      t1 = $time / 20;
      blk_cycles += t1 - t0;

      // result packet decrypted back (CFB decryption also uses the cipher)
      c = pkt.iv;
      for (int b = 0; b < NBLK; b++) begin
        put_block(port, c);
        run_cmd(port, make_cmd(OP_ENC_DATA, 0, 0, 0), rsp);
        check((blk_out ^ first_ct[b]) == pkt.data[b], {name, ": CFB decryption"});
        c = first_ct[b];
      end
      // direct decipher of one block, twice: the second hits the key cache
      for (int k = 0; k < 2; k++) begin
        put_block(port, first_ct[0]);
        run_cmd(port, make_cmd(OP_DEC_DATA, 0, 0, 0), rsp);
        check(blk_out == decrypt(sk, first_ct[0]), {name, ": DEC_DATA"});
      end
    end

    // key export and a refused key use (absent register)
    run_cmd(port, make_cmd(OP_EXPORT_SKEY, 0, 0, 0), rsp);
    check(rsp == RSP_OK && blk_out == encrypt(mk, sk), {name, ": session key export"});
    if (rsp == RSP_OK) n_export++;
    run_cmd(port, make_cmd(OP_LOAD_SKEY, 0, 1, 0), rsp);
    check(rsp == RSP_ERR, {name, ": absent key register refused"});
    if (rsp == RSP_ERR) n_refused++;

    cyc_per_blk[port] = blk_cycles / (NPKT * NBLK);
    $display("%s: %0d cycles per 128-bit CFB block, %0.1f Mb/s at 50 MHz", name,
             blk_cycles / (NPKT * NBLK), 128.0 * 50.0 / (real'(blk_cycles) / (NPKT * NBLK)));
  endtask

  // FSL: stream blocks without reading the answers, so the FIFOs fill up
  task automatic fsl_stream();
    logic [127:0] sk, mk, pt [20];
    logic [31:0] r, w; logic ctl;
    mk = {$urandom, $urandom, $urandom, $urandom};
    sk = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    mb_same_clk = 0;
    load_mk(1, mk);
    put_block(1, encrypt(mk, sk));
    run_cmd(1, make_cmd(OP_LOAD_SKEY, 0, 0, 0), r);
    // the reader starts late, so both FIFOs fill and the module stalls
    fork
      for (int i = 0; i < 20; i++) begin
        pt[i] = {$urandom, $urandom, $urandom, $urandom};
        put_block(1, pt[i]);
        fsl_put(make_cmd(OP_ENC_DATA, 0, 0, 0), 1'b1);
      end
      begin
        repeat (500) @(negedge clk);
        for (int i = 0; i < 20; i++) begin
          logic [127:0] got;
          for (int k = 0; k < 4; k++) begin
            fsl_get(w, ctl);
            got[127-32*k -: 32] = w;
          end
          fsl_get(w, ctl);
          check(ctl && w == RSP_OK && got == encrypt(sk, pt[i]), "FSL streamed block");
          if (!mb_same_clk) n_dual_clock++;
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_port(0, "custom instruction");
    run_port(1, "FSL");
    run_port(2, "AHB");
    fsl_stream();

    $display("mechanisms: skey_load=%0d skey_change=%0d refused=%0d cfb_blocks=%0d cache_hits=%0d export=%0d fsl_out_full=%0d fsl_in_full=%0d fsl_dual_clock_blocks=%0d ahb_wait=%0d",
             n_skey_load, n_skey_change, n_refused, n_cfb, n_cache_hit, n_export, n_fsl_full,
             n_fsl_sfull, n_dual_clock, n_ahb_wait);
    // the attachments rank as in the measured throughputs: custom instruction
    // fastest, then FSL, then the AHB peripheral bus
    check(cyc_per_blk[0] < cyc_per_blk[1] && cyc_per_blk[1] < cyc_per_blk[2],
          "custom instruction < FSL < AHB in cycles per block");
    check(n_skey_load > 0, "session key import happened");
    check(n_skey_change > 0, "session key change happened");
    check(n_refused > 0, "refused key use happened");
    check(n_cfb > 0, "CFB processing happened");
    check(n_cache_hit > 0, "decipher key cache hit happened");
    check(n_export > 0, "key export happened");
    check(n_fsl_full > 0, "FSL module-to-processor FIFO full happened");
    check(n_fsl_sfull > 0, "FSL processor-to-module FIFO full happened");
    check(n_dual_clock > 0, "FSL transfers across two clock domains happened");
    check(n_ahb_wait > 0, "AHB wait states happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
