// tb_crypto_system: end-to-end test of the hybrid AES/RSA link at its
// default size (128-bit RSA).
//
// Runs whole messages through the link: the sender encrypts a block with the
// session key and wraps the key with the public exponent; the receiver
// unwraps the key with the private exponent and decrypts the block. Checks:
// the ciphertext against FIPS-197 (Appendix C.1) for the first message, the
// wrapped key against a value worked out beforehand, the recovered key and
// data against the originals, and the done1/done2 latencies. A second
// message uses the block 00112233...eeff as both session key and data, with
// public exponent 65537; its AES ciphertext is the one published for this
// example. Further messages use random keys and data. Each mechanism of the design is counted
// and must occur at least once: AES encryption, AES decryption with
// transformed round keys, RSA key wrapping and unwrapping, exponent bits 0
// and 1 taken in the exponentiation loop, and the receiver's automatic
// hand-over from RSA to AES.
module tb_crypto_system;
  import aes_pkg::*;

  localparam int N = 128;
  localparam int RSA_LAT = 2*N + 5 + (N + 2)*(N + 5);
  localparam int AES_LAT = 22;
  localparam logic [N-1:0] MOD  = 128'h9db14bc6742d9b7d513760f19566ef55;
  localparam logic [N-1:0] PUB  = 128'h10001;
  localparam logic [N-1:0] PRIV = 128'h8969397291423cbeaab769d6846d3201;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         ds1 = 1'b0, ds2 = 1'b0;
  block_t       aes_key = '0, data_in = '0;
  logic [N-1:0] public_key = PUB, private_key = PRIV, modulus = MOD;
  block_t       cypher_text, original_data;
  logic [N-1:0] cypher_key;
  logic         done1, done2;
  int           checks = 0, failures = 0;
  int           n_enc = 0, n_dec = 0, n_wrap = 0, n_unwrap = 0, n_bit0 = 0, n_bit1 = 0,
                n_handover = 0;

  crypto_system dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, observed on the engines' internal events.
  always @(posedge clk) if (!rst) begin
    if (dut.u_aes_enc.ds) n_enc++;
    if (dut.u_aes_dec.ds) begin n_dec++; n_handover++; end
    if (dut.u_rsa_enc.ds) n_wrap++;
    if (dut.u_rsa_dec.ds) n_unwrap++;
    if (dut.u_rsa_dec.st == dut.u_rsa_dec.S_WAIT && dut.u_rsa_dec.after_wait == dut.u_rsa_dec.S_LOOP_GO
        && dut.u_rsa_dec.bothrdy) begin
      if (dut.u_rsa_dec.expreg[0]) n_bit1++; else n_bit0++;
    end
  end

  task automatic check(input string what, input logic [127:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send_receive(input block_t k, input block_t x,
                              output block_t ct, output logic [N-1:0] ck, output block_t y);
    int cyc;
    @(negedge clk);
    aes_key = k; data_in = x; ds1 = 1'b1;
    @(negedge clk);
    ds1 = 1'b0;
    cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    check("done1 latency", 128'(cyc), 128'(RSA_LAT));
    ct = cypher_text;
    ck = cypher_key;
    ds2 = 1'b1;
    @(negedge clk);
    ds2 = 1'b0;
    cyc = 1;
    while (!done2) begin @(negedge clk); cyc++; end
    check("done2 latency", 128'(cyc), 128'(RSA_LAT + AES_LAT));
    check("recovered key", 128'(dut.key_rx), k);
    y = original_data;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t ct, y, k, x;
    logic [N-1:0] ck;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send_receive(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
                 ct, ck, y);
    check("cypher_text", ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("cypher_key", ck, 128'h0a34738f9a27b51e36e74a8223c5173d);
    check("original_data", y, 128'h00112233445566778899aabbccddeeff);
    // Session key and message both 00112233...eeff, public exponent 65537.
    send_receive(128'h00112233445566778899aabbccddeeff, 128'h00112233445566778899aabbccddeeff,
                 ct, ck, y);
    check("cypher_text", ct, 128'h62f679be2bf0d931641e039ca3401bb2);
    check("cypher_key", ck, 128'h765e46fd6405261cb3d2640531b96cf5);
    check("original_data", y, 128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 3; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom} % MOD;
      x = {$urandom, $urandom, $urandom, $urandom};
      send_receive(k, x, ct, ck, y);
      checks++;
      if (ct == x || ck == k) begin failures++; $display("FAIL output equals input"); end
      check("original_data", y, x);
    end
    $display("mechanisms: aes_enc=%0d aes_dec=%0d rsa_wrap=%0d rsa_unwrap=%0d exp_bit0=%0d exp_bit1=%0d handover=%0d",
             n_enc, n_dec, n_wrap, n_unwrap, n_bit0, n_bit1, n_handover);
    checks++; if (n_enc == 0)      begin failures++; $display("FAIL no AES encryption"); end
    checks++; if (n_dec == 0)      begin failures++; $display("FAIL no AES decryption"); end
    checks++; if (n_wrap == 0)     begin failures++; $display("FAIL no RSA key wrap"); end
    checks++; if (n_unwrap == 0)   begin failures++; $display("FAIL no RSA key unwrap"); end
    checks++; if (n_bit0 == 0)     begin failures++; $display("FAIL no exponent bit 0"); end
    checks++; if (n_bit1 == 0)     begin failures++; $display("FAIL no exponent bit 1"); end
    checks++; if (n_handover == 0) begin failures++; $display("FAIL no RSA-to-AES hand-over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
