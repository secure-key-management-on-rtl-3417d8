// tb_nios_ci_sec: self-checking testbench of the custom-instruction
// attachment. Acts as the processor: loads the master key over the separate
// channel, imports an enciphered session key, runs CFB-128 encryption and
// decryption over a packet (XOR in "software", AES in the module), exports the
// session key, checks refused key uses and the instruction latencies.
module tb_nios_ci_sec;
  import sec_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, reset = 1, clk_en = 1, start = 0, done;
  logic [7:0] n = 0;
  logic [31:0] dataa = 0, datab = 0, result;
  logic mk_init_valid = 0;
  logic [KADDR_W-1:0] mk_init_addr = 0;
  logic [127:0] mk_init_key = 0;
  int checks = 0, failures = 0;

  nios_ci_sec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one custom instruction; returns result and cycles from start to done
  task automatic ci(input op_e op, input logic [31:0] a, input cmd_t b,
                    output logic [31:0] r, output int lat);
    @(negedge clk);
    n = {4'h0, op}; dataa = a; datab = b; start = 1;
    @(negedge clk);
    start = 0; dataa = '1; datab = '1;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r = result;
  endtask

  task automatic put_block(input logic [127:0] v);
    logic [31:0] r; int lat;
    for (int i = 0; i < 4; i++) begin
      ci(OP_WR_DATA, v[127-32*i -: 32], make_cmd(OP_NOP, 2'(i), 0, 0), r, lat);
      check(lat == 1 && r == RSP_OK, "write word: 1-cycle instruction");
    end
  endtask

  task automatic get_block(output logic [127:0] v);
    logic [31:0] r; int lat;
    for (int i = 0; i < 4; i++) begin
      ci(OP_RD_DATA, 0, make_cmd(OP_NOP, 2'(i), 0, 0), r, lat);
      check(lat == 1, "read word: 1-cycle instruction");
      v[127-32*i -: 32] = r;
    end
  endtask

  task automatic crypto(input op_e op, input int exp_lat, input logic [31:0] exp_r);
    logic [31:0] r; int lat;
    ci(op, 0, make_cmd(OP_NOP, 0, 0, 0), r, lat);
    check(r == exp_r, $sformatf("%s response", op.name()));
    check(lat == exp_lat, $sformatf("%s latency %0d expected %0d", op.name(), lat, exp_lat));
  endtask

  initial begin
    logic [127:0] mk, sk, iv, c, p, got;
    logic [127:0] pkt [8], enc [8];
    logic [31:0] r; int lat;
    repeat (3) @(negedge clk);
    reset = 0;

    crypto(OP_ENC_DATA, 1, RSP_ERR);        // no session key yet
    mk = {$urandom, $urandom, $urandom, $urandom};
    sk = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); mk_init_valid = 1; mk_init_key = mk;
    @(negedge clk); mk_init_valid = 0; mk_init_key = '0;

    put_block(encrypt(mk, sk));
    crypto(OP_LOAD_SKEY, 22, RSP_OK);
    ci(OP_STATUS, 0, '0, r, lat);
    check(r == 32'h101, "status flags");
    get_block(got);
    check(got != sk, "session key not readable");

    // CFB-128 encryption of an 8-block packet
    iv = {$urandom, $urandom, $urandom, $urandom};
    c = iv;
    for (int i = 0; i < 8; i++) begin
      pkt[i] = {$urandom, $urandom, $urandom, $urandom};
      put_block(c);
      crypto(OP_ENC_DATA, 12, RSP_OK);
      get_block(got);
      c = got ^ pkt[i];
      enc[i] = c;
    end
    c = iv;
    for (int i = 0; i < 8; i++) begin
      check(enc[i] == (encrypt(sk, c) ^ pkt[i]), "CFB ciphertext");
      c = enc[i];
    end
    // CFB decryption also uses the cipher direction
    c = iv;
    for (int i = 0; i < 8; i++) begin
      put_block(c);
      crypto(OP_ENC_DATA, 12, RSP_OK);
      get_block(got);
      check((got ^ enc[i]) == pkt[i], "CFB plaintext recovered");
      c = enc[i];
    end
    // ECB decrypt with the hidden key
    put_block(enc[0]);
    crypto(OP_DEC_DATA, 22, RSP_OK);
    get_block(got);
    check(got == decrypt(sk, enc[0]), "DEC_DATA");
    // export
    crypto(OP_EXPORT_SKEY, 12, RSP_OK);
    get_block(got);
    check(got == encrypt(mk, sk), "EXPORT_SKEY");
    // clk_en low: start ignored
    @(negedge clk); clk_en = 0; start = 1; n = {4'h0, OP_NOP};
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      check(!done, "start ignored without clk_en");
    end
    start = 0; clk_en = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
