// tb_key_store: self-checking testbench of the key registers.
// Uses two master and two session registers: checks reset state, writes over
// the initialisation channel and the key data bus, cipher key bus and key data
// bus reads, valid flags, out-of-range addresses, and that a master key can
// never be read on the key data bus.
module tb_key_store;
  import sec_pkg::*;

  logic clk = 0, rst_n = 0;
  logic mk_wr_en = 0, sk_wr_en = 0, ck_master = 0;
  logic [KADDR_W-1:0] mk_wr_addr = 0, sk_wr_addr = 0, ck_addr = 0, kd_addr = 0;
  logic [127:0] mk_wr_key = 0, sk_wr_key = 0, ck_key, kd_key;
  logic ck_valid, kd_valid;
  logic [MAX_KEYS-1:0] mk_valid, sk_valid;
  int checks = 0, failures = 0;
  logic [127:0] mk [2], sk [2];

  key_store #(.N_MK(2), .N_SK(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      mk[i] = {$urandom, $urandom, $urandom, $urandom};
      sk[i] = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    check(mk_valid == 0 && sk_valid == 0, "no key valid after reset");
    ck_master = 1; ck_addr = 0; #1;
    check(!ck_valid && ck_key == 0, "empty master register");

    // load master keys over the initialisation channel
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); mk_wr_en = 1; mk_wr_addr = KADDR_W'(i); mk_wr_key = mk[i];
    end
    @(negedge clk); mk_wr_en = 1; mk_wr_addr = 3; mk_wr_key = '1;  // absent register
    @(negedge clk); mk_wr_en = 0;
    check(mk_valid == 4'b0011, "master valid flags");
    for (int i = 0; i < 4; i++) begin
      ck_master = 1; ck_addr = KADDR_W'(i); #1;
      check(ck_valid == (i < 2) && ck_key == ((i < 2) ? mk[i] : 0), $sformatf("cipher key bus master %0d", i));
      kd_addr = KADDR_W'(i); #1;
      check(!kd_valid && kd_key == 0, "key data bus never shows a master key");
    end

    // session keys arrive from the decipher output
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); sk_wr_en = 1; sk_wr_addr = KADDR_W'(i); sk_wr_key = sk[i];
    end
    @(negedge clk); sk_wr_en = 0;
    check(sk_valid == 4'b0011, "session valid flags");
    for (int i = 0; i < 4; i++) begin
      ck_master = 0; ck_addr = KADDR_W'(i); kd_addr = KADDR_W'(i); #1;
      check(ck_valid == (i < 2) && ck_key == ((i < 2) ? sk[i] : 0), $sformatf("cipher key bus session %0d", i));
      check(kd_valid == (i < 2) && kd_key == ((i < 2) ? sk[i] : 0), $sformatf("key data bus session %0d", i));
    end
    // overwrite session key 1 (frequent session key change)
    @(negedge clk); sk_wr_en = 1; sk_wr_addr = 1; sk_wr_key = ~sk[1];
    @(negedge clk); sk_wr_en = 0; kd_addr = 1; #1;
    check(kd_key == ~sk[1], "session key replaced");
    ck_master = 1; ck_addr = 1; #1;
    check(ck_key == mk[1], "master key untouched by session write");

    // reset clears everything
    rst_n = 0; #1; rst_n = 1; #1;
    check(mk_valid == 0 && sk_valid == 0 && ck_key == 0, "reset clears keys");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
