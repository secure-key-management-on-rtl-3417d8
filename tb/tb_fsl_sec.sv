// tb_fsl_sec: self-checking testbench of the FSL attachment.
// Acts as the processor on the two FSL channels: loads an enciphered session
// key, encrypts blocks one at a time with the processor clock equal to the
// module clock (measuring the latency from command word to first result word),
// then switches the processor side to a faster, unrelated clock and streams
// many blocks without reading so that both FIFOs fill up and the module has to
// stall. Every returned word is checked against the AES reference model.
module tb_fsl_sec;
  import sec_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, pclk = 0, proc_clk, same_clk = 1;
  logic [31:0] s_data = 0, m_data;
  logic s_control = 0, s_write = 0, s_full, m_control, m_exists, m_read = 0;
  logic mk_init_valid = 0;
  logic [KADDR_W-1:0] mk_init_addr = 0;
  logic [127:0] mk_init_key = 0;
  int checks = 0, failures = 0;
  int s_full_cycles = 0, out_full_cycles = 0;

  fsl_sec dut (.*);

  always #5 clk = ~clk;
  always #3 pclk = ~pclk;
  assign proc_clk = same_clk ? clk : pclk;

  always @(posedge proc_clk) if (s_full) s_full_cycles <= s_full_cycles + 1;
  always @(posedge clk) if (dut.out_full) out_full_cycles <= out_full_cycles + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input logic [31:0] w, input logic ctl);
    @(negedge proc_clk);
    while (s_full) @(negedge proc_clk);
    s_data = w; s_control = ctl; s_write = 1;
    @(negedge proc_clk);
    s_write = 0;
  endtask

  task automatic get(output logic [31:0] w, output logic ctl);
    @(negedge proc_clk);
    while (!m_exists) @(negedge proc_clk);
    w = m_data; ctl = m_control; m_read = 1;
    @(negedge proc_clk);
    m_read = 0;
  endtask

  task automatic put_block(input logic [127:0] v);
    for (int i = 0; i < 4; i++) put(v[127-32*i -: 32], 1'b0);
  endtask

  task automatic get_block(output logic [127:0] v);
    logic [31:0] w; logic ctl;
    for (int i = 0; i < 4; i++) begin
      get(w, ctl);
      check(ctl == 1'b0, "result word has control = 0");
      v[127-32*i -: 32] = w;
    end
  endtask

  task automatic get_status(input logic [31:0] exp);
    logic [31:0] w; logic ctl;
    get(w, ctl);
    check(ctl == 1'b1 && w == exp, $sformatf("status word %h ctl %b, expected %h", w, ctl, exp));
  endtask

  initial begin
    logic [127:0] mk, sk, got;
    logic [127:0] pt [24];
    longint t0, lat;
    repeat (3) @(negedge clk);
    rst_n = 1;

    mk = {$urandom, $urandom, $urandom, $urandom};
    sk = {$urandom, $urandom, $urandom, $urandom};
    // command refused before any key exists: status only
    put_block('0);
    put(make_cmd(OP_ENC_DATA, 0, 0, 0), 1'b1);
    get_status(RSP_ERR);

    @(negedge clk); mk_init_valid = 1; mk_init_key = mk;
    @(negedge clk); mk_init_valid = 0; mk_init_key = '0;
    put_block(encrypt(mk, sk));
    put(make_cmd(OP_LOAD_SKEY, 0, 0, 0), 1'b1);
    get_status(RSP_OK);
    check(!m_exists, "no key words returned by LOAD_SKEY");

    // single blocks with latency measurement
    for (int i = 0; i < 4; i++) begin
      pt[i] = {$urandom, $urandom, $urandom, $urandom};
      put_block(pt[i]);
      put(make_cmd(OP_ENC_DATA, 0, 0, 0), 1'b1);
      t0 = $time / 10;
      while (!m_exists) @(negedge clk);
      lat = $time / 10 - t0;
      check(lat == 22, $sformatf("first result word after %0d cycles, expected 22", lat));
      get_block(got);
      check(got == encrypt(sk, pt[i]), "ENC_DATA block");
      get_status(RSP_OK);
    end

    // processor side on its own, faster clock from here on
    @(negedge clk);
    same_clk = 0;
    // stream 24 blocks without reading: both FIFOs fill and the module stalls
    fork
      for (int i = 0; i < 24; i++) begin
        pt[i] = {$urandom, $urandom, $urandom, $urandom};
        put_block(pt[i]);
        put(make_cmd(OP_ENC_DATA, 0, 0, 0), 1'b1);
      end
      begin
        repeat (600) @(negedge clk);
        for (int i = 0; i < 24; i++) begin
          get_block(got);
          check(got == encrypt(sk, pt[i]), "streamed ENC_DATA block");
          get_status(RSP_OK);
        end
      end
    join
    check(s_full_cycles > 0, "processor-to-module FIFO became full");
    check(out_full_cycles > 0, "module-to-processor FIFO became full");

    // decrypt and export
    put_block(encrypt(sk, pt[0]));
    put(make_cmd(OP_DEC_DATA, 0, 0, 0), 1'b1);
    get_block(got);
    check(got == pt[0], "DEC_DATA block");
    get_status(RSP_OK);
    put(make_cmd(OP_EXPORT_SKEY, 0, 0, 0), 1'b1);
    get_block(got);
    check(got == encrypt(mk, sk), "EXPORT_SKEY block");
    get_status(RSP_OK);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
