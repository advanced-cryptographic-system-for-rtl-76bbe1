// tb_aes_core: self-checking test of the iterative AES-128 engine.
//
// Encrypts and decrypts the two worked examples of FIPS-197 (Appendix B and
// Appendix C.1) and compares with their published results, then checks that
// decryption inverts encryption for random keys and blocks. Every operation
// must complete in exactly 22 clocks from the ds pulse to ready.
module tb_aes_core;
  import aes_pkg::*;

  localparam int LATENCY = 22;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   ds  = 1'b0;
  logic   dec = 1'b0;
  block_t key = '0, din = '0, dout;
  logic   ready;
  int     checks = 0, failures = 0;

  aes_core dut (.clk(clk), .rst(rst), .ds(ds), .dec(dec), .key(key),
                .data_in(din), .data_out(dout), .ready(ready));

  always #5 clk = ~clk;

  task automatic run(input logic d, input block_t k, input block_t x, output block_t y);
    int cyc = 0;
    @(negedge clk);
    dec = d; key = k; din = x; ds = 1'b1;
    @(negedge clk);
    ds = 1'b0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    y = dout;
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LATENCY);
    end
  endtask

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t y, z, k, x;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // FIPS-197 Appendix C.1
    run(1'b0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, y);
    check("C.1 encrypt", y, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1'b1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, y);
    check("C.1 decrypt", y, 128'h00112233445566778899aabbccddeeff);
    // FIPS-197 Appendix B
    run(1'b0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, y);
    check("B encrypt", y, 128'h3925841d02dc09fbdc118597196a0b32);
    run(1'b1, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, y);
    check("B decrypt", y, 128'h3243f6a8885a308d313198a2e0370734);
    // random round trips
    for (int i = 0; i < 20; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      x = {$urandom, $urandom, $urandom, $urandom};
      run(1'b0, k, x, y);
      checks++;
      if (y == x) begin failures++; $display("FAIL ciphertext equals plaintext"); end
      run(1'b1, k, y, z);
      check("round trip", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
