// tb_ahb_sec: self-checking testbench of the AHB-Lite attachment.
// An AHB-Lite master model (single slave, HREADY tied to HREADYOUT) loads an
// enciphered session key, encrypts and decrypts blocks, exports the key and
// provokes a refused command, using both single transfers and back-to-back
// pipelined writes. Checks read data against the AES reference model, the
// status register, and that the slave inserts wait states while busy.
module tb_ahb_sec;
  import sec_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic HSEL = 0, HWRITE = 0, HREADYOUT, HRESP;
  logic [31:0] HADDR = 0, HWDATA = 0, HRDATA;
  logic [1:0] HTRANS = 0;
  logic [2:0] HSIZE = 3'b010;
  logic mk_init_valid = 0;
  logic [KADDR_W-1:0] mk_init_addr = 0;
  logic [127:0] mk_init_key = 0;
  int checks = 0, failures = 0, waits = 0;

  localparam logic [31:0] BASE = 32'h4000_0000;

  ahb_sec dut (.HCLK(clk), .HRESETn(rst_n), .HREADY(HREADYOUT), .*);

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

  task automatic addr_phase(input logic [31:0] a, input logic w);
    HSEL = 1; HTRANS = 2'b10; HADDR = BASE + a; HWRITE = w;
  endtask

  task automatic idle_phase();
    HSEL = 0; HTRANS = 2'b00;
  endtask

  // wait out the data phase; returns at the negedge after it completes
  task automatic finish_data(output logic [31:0] r);
    while (!HREADYOUT) begin @(negedge clk); waits++; end
    r = HRDATA;
    check(HRESP == 1'b0, "HRESP OKAY");
    @(negedge clk);
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r;
    @(negedge clk);
    addr_phase(a, 1);
    @(negedge clk);
    idle_phase();
    HWDATA = d;
    finish_data(r);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] r, output int nwait);
    int w0;
    @(negedge clk);
    addr_phase(a, 0);
    @(negedge clk);
    idle_phase();
    w0 = waits;
    finish_data(r);
    nwait = waits - w0;
  endtask

  // four back-to-back writes to the data input words
  task automatic wr_block(input logic [127:0] v);
    logic [31:0] r;
    @(negedge clk);
    addr_phase(0, 1);
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      HWDATA = v[127-32*k -: 32];
      if (k < 3) addr_phase(32'(4*(k+1)), 1); else idle_phase();
      while (!HREADYOUT) begin @(negedge clk); waits++; end
      @(negedge clk);
    end
    r = '0;
  endtask

  task automatic rd_block(output logic [127:0] v, output int nwait);
    logic [31:0] r; int w;
    nwait = 0;
    for (int k = 0; k < 4; k++) begin
      rd(32'(4*k), r, w);
      v[127-32*k -: 32] = r;
      nwait += w;
    end
  endtask

  initial begin
    logic [127:0] mk, sk, p, got;
    logic [31:0] r; int w;
    repeat (3) @(negedge clk);
    rst_n = 1;

    mk = {$urandom, $urandom, $urandom, $urandom};
    sk = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); mk_init_valid = 1; mk_init_key = mk;
    @(negedge clk); mk_init_valid = 0; mk_init_key = '0;

    wr_block(encrypt(mk, sk));
    wr(32'h10, make_cmd(OP_LOAD_SKEY, 0, 0, 0));
    rd(32'h14, r, w);
    check(r == 32'h1 && w == 0, "status shows busy, no wait state");
    rd(32'h18, r, w);
    check(r == 32'h101, "key flags after load");
    check(w > 10, $sformatf("flag read waited %0d cycles for the running command", w));
    rd(32'h14, r, w);
    check(r == 32'h0, "status idle, no error");
    rd(32'h10, r, w);
    check(r == make_cmd(OP_LOAD_SKEY, 0, 0, 0), "command register read back");

    for (int i = 0; i < 6; i++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      wr_block(p);
      wr(32'h10, make_cmd(OP_ENC_DATA, 0, 0, 0));
      rd_block(got, w);
      check(got == encrypt(sk, p), "ENC_DATA over AHB");
      check(w >= 10, "data read held by wait states during encryption");
      wr_block(got);
      wr(32'h10, make_cmd(OP_DEC_DATA, 0, 0, 0));
      rd_block(got, w);
      check(got == p, "DEC_DATA over AHB");
    end

    // data writes issued while a command runs are held, not lost
    begin
      logic [127:0] p2;
      int w0;
      p  = {$urandom, $urandom, $urandom, $urandom};
      p2 = {$urandom, $urandom, $urandom, $urandom};
      wr_block(p);
      wr(32'h10, make_cmd(OP_ENC_DATA, 0, 0, 0));
      w0 = waits;
      wr_block(p2);
      check(waits - w0 >= 10, "data write held by wait states during encryption");
      rd_block(got, w);
      check(got == encrypt(sk, p), "result of the running command");
      wr(32'h10, make_cmd(OP_ENC_DATA, 0, 0, 0));
      rd_block(got, w);
      check(got == encrypt(sk, p2), "block written during the command");
    end

    wr(32'h10, make_cmd(OP_EXPORT_SKEY, 0, 0, 0));
    rd_block(got, w);
    check(got == encrypt(mk, sk), "EXPORT_SKEY over AHB");

    // refused: session register 1 does not exist
    wr(32'h10, make_cmd(OP_ENC_DATA, 0, 1, 0));
    rd(32'h18, r, w);
    rd(32'h14, r, w);
    check(r == 32'h2, "status shows last error");
    wr(32'h10, make_cmd(OP_NOP, 0, 0, 0));
    rd(32'h18, r, w);
    rd(32'h14, r, w);
    check(r == 32'h0, "error cleared by next command");
    rd(32'h1c, r, w);
    check(r == 32'h0, "unmapped offset reads zero");
    check(waits > 0, "wait states were inserted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
