// tb_sec_core: self-checking testbench of the security module core.
// Drives the control and data buses as a processor would: loads a master key
// over the separate channel, imports an enciphered session key, encrypts and
// decrypts data, re-exports the session key, and checks that refused key
// uses return the error flag. Results are compared with the AES reference
// model and response latencies with the documented cycle counts.
module tb_sec_core;
  import sec_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  cmd_t cmd;
  logic [31:0] wdata, rdata;
  logic rsp_valid, rsp_err, busy;
  logic mk_init_valid = 0;
  logic [KADDR_W-1:0] mk_init_addr;
  logic [127:0] mk_init_key;
  int checks = 0, failures = 0;

  sec_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue one command, wait for its response, return data, error, latency
  task automatic issue(input cmd_t c, input logic [31:0] w, output logic [31:0] r,
                       output logic e, output int lat);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; wdata = w; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = '0; wdata = '1;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    r = rdata; e = rsp_err;
  endtask

  task automatic write_block(input logic [127:0] b);
    logic [31:0] r; logic e; int lat;
    for (int i = 0; i < 4; i++) begin
      issue(make_cmd(OP_WR_DATA, 2'(i), 0, 0), b[127-32*i -: 32], r, e, lat);
      check(!e && lat == 1, "write word");
    end
  endtask

  task automatic read_block(output logic [127:0] b);
    logic [31:0] r; logic e; int lat;
    for (int i = 0; i < 4; i++) begin
      issue(make_cmd(OP_RD_DATA, 2'(i), 0, 0), 0, r, e, lat);
      check(!e && lat == 1, "read word");
      b[127-32*i -: 32] = r;
    end
  endtask

  task automatic crypt(input op_e op, input int exp_lat, input bit exp_err, input int sk = 0,
                       input int mk = 0);
    logic [31:0] r; logic e; int lat;
    issue(make_cmd(op, 0, KADDR_W'(sk), KADDR_W'(mk)), 0, r, e, lat);
    check(e == exp_err && r == (exp_err ? RSP_ERR : RSP_OK), $sformatf("%s error flag", op.name()));
    check(lat == exp_lat, $sformatf("%s latency %0d, expected %0d", op.name(), lat, exp_lat));
  endtask

  initial begin
    logic [127:0] mk, sk, p, c, got, iv;
    logic [31:0] r; logic e; int lat;
    cmd = '0; wdata = '0; mk_init_addr = '0; mk_init_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    issue(make_cmd(OP_STATUS, 0, 0, 0), 0, r, e, lat);
    check(r == 32'h0 && !e, "status after reset");
    // no session key yet: data encryption refused
    crypt(OP_ENC_DATA, 1, 1);
    crypt(OP_LOAD_SKEY, 1, 1);
    issue(cmd_t'(32'h0000_000f), 0, r, e, lat);
    check(e, "unknown operation refused");

    // master key over the separate channel
    mk = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    mk_init_valid = 1; mk_init_addr = 0; mk_init_key = mk;
    @(negedge clk);
    mk_init_valid = 0; mk_init_key = '0;
    issue(make_cmd(OP_STATUS, 0, 0, 0), 0, r, e, lat);
    check(r == 32'h100, "status after master key load");

    // import an enciphered session key; the plain key must not appear outside
    sk = {$urandom, $urandom, $urandom, $urandom};
    write_block(encrypt(mk, sk));
    crypt(OP_LOAD_SKEY, 22, 0);
    read_block(got);
    check(got == 0, "deciphered session key not visible on the data bus");
    crypt(OP_LOAD_SKEY, 1, 1, 1, 0);   // session key register 1 does not exist
    crypt(OP_LOAD_SKEY, 1, 1, 0, 1);   // master key register 1 does not exist
    issue(make_cmd(OP_STATUS, 0, 0, 0), 0, r, e, lat);
    check(r == 32'h101, "status after session key load");

    // data encryption / decryption with the hidden session key
    for (int i = 0; i < 8; i++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      write_block(p);
      crypt(OP_ENC_DATA, 12, 0);
      read_block(got);
      check(got == encrypt(sk, p), "ENC_DATA result");
      write_block(got);
      crypt(OP_DEC_DATA, (i == 0) ? 22 : 12, 0);
      read_block(got);
      check(got == p, "DEC_DATA result");
    end

    // CFB-128 over four blocks, XOR done on the processor side
    iv = {$urandom, $urandom, $urandom, $urandom};
    c = iv;
    for (int i = 0; i < 4; i++) begin
      logic [127:0] prev;
      prev = c;
      p = {$urandom, $urandom, $urandom, $urandom};
      write_block(prev);
      crypt(OP_ENC_DATA, 12, 0);
      read_block(got);
      c = got ^ p;
      check(c == (encrypt(sk, prev) ^ p), "CFB ciphertext block");
    end

    // export the session key enciphered under the master key
    crypt(OP_EXPORT_SKEY, 12, 0);
    read_block(got);
    check(got == encrypt(mk, sk), "EXPORT_SKEY result");
    crypt(OP_EXPORT_SKEY, 1, 1, 1, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
