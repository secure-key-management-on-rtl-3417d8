// tb_aes_enc: self-checking testbench of the AES-128 cipher core.
// Checks the two FIPS-197 example vectors, then random key/plaintext pairs
// against the reference model, and that every block takes exactly 10 cycles
// from start to done.
module tb_aes_enc;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc = 0;
    @(negedge clk);
    key = k; din = p; start = 1;
    @(negedge clk);
    start = 0;
    key = '1; din = '1;  // inputs must have been sampled at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL key=%h pt=%h got %h exp %h", k, p, dout, exp);
    end
    if (cyc != 11) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 11", cyc);
    end
  endtask

  initial begin
    key = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
