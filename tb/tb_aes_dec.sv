// tb_aes_dec: self-checking testbench of the AES-128 decipher core.
// Checks the FIPS-197 example vectors, random blocks against the reference
// model, and the latency: 21 cycles for a new key, 11 cycles when the key is
// the same as for the previous block.
module tb_aes_dec;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_dec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] c, input logic [127:0] exp,
                     input int lat);
    int cyc = 0;
    @(negedge clk);
    key = k; din = c; start = 1;
    @(negedge clk);
    start = 0;
    key = '1; din = '1;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL key=%h ct=%h got %h exp %h", k, c, dout, exp);
    end
    if (cyc != lat) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, lat);
    end
  endtask

  initial begin
    key = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff, 21);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734, 21);
    for (int i = 0; i < 20; i++) begin
      logic [127:0] k, p, c;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      c = encrypt(k, p);
      if (decrypt(k, c) !== p) begin
        failures++;
        $display("FAIL reference model round trip");
      end
      run(k, c, p, 21);
      // same key again: the cached last round key is used
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, encrypt(k, p), p, 11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
