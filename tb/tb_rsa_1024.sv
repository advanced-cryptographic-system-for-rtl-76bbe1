// tb_rsa_1024: the RSA exponentiation unit at a 1024-bit key length.
//
// Encrypts a 128-bit session key (00112233...eeff) with a 1024-bit public key
// (E = 65537) and decrypts it again with the 1024-bit private exponent. The
// ciphertext is compared with a value worked out beforehand, the decryption
// with the original key, and each run's length with the closed-form latency
// 2N + 5 + (N+2)(N+5) clocks (1,057,944 clocks at N = 1024).
module tb_rsa_1024;
  localparam int N = 1024;
  localparam int LATENCY = 2*N + 5 + (N + 2)*(N + 5);
  localparam logic [N-1:0] MOD  = N'('h8078e5f4d6748e853627555791e054d76fac1d69649da5102aa36fd5935e35990d69988f7887ed3ea420fe2d6c8fb4fb111972df191bc1ad27582c763a312e586b96eaea45e816050d68f0265a0c44a4453926ec7b79e30f94ce5bb95c92d49fe9ffed3ef41b0d04e3a7f2b4ad7b1df325e70dd1e358eb2e0f97d38a4ad1f9ed);
  localparam logic [N-1:0] PRIV = N'('h4f8b8bc656ea803c16d5afcfb2b0d59736bbb8d242cc2121ab64da9fc0c93a2273dd87ea7d549c1e86fd2ea3ed6de53ef6cd6d0499c547dbf05a75dd1616d17c693d5c877903ad5a3b83eef57a19d8ef78e0f54b8b90e1b5add02e7b3802c9455ebbf9598cfb79f6a793c09d3b3efada52756d10d6f4517ccd40255e677670c1);
  localparam logic [N-1:0] CT   = N'('h6aaeed8b5d092e5e86a2d038a54b920cf239c5ba323a611f48ab8c03010d48261d1ae08d313aa6105b6adfa16f6cdd2e9d72d4d4533cf85cea468e0632fc06b30b6b9a8f9be2341f11d55cc7cb5577deba4764241cb294461b82178a406a3cd4abd122eb654540715f8fb7e528639767cbde253d22e3bbc34782e8c56ef190a5);
  localparam logic [N-1:0] PUB  = N'('h10001);
  localparam logic [N-1:0] MSG  = N'('h00112233445566778899aabbccddeeff);

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         ds  = 1'b0;
  logic [N-1:0] indata = '0, inexp = '0, inmod = '0, cypher;
  logic         ready;
  int           checks = 0, failures = 0;

  rsa_modexp #(.N(N)) dut (.clk(clk), .rst(rst), .ds(ds), .indata(indata),
    .inexp(inexp), .inmod(inmod), .cypher(cypher), .ready(ready));

  always #5 clk = ~clk;

  task automatic run(input logic [N-1:0] x, e, output logic [N-1:0] y);
    int cyc;
    @(negedge clk);
    indata = x; inexp = e; inmod = MOD; ds = 1'b1;
    @(negedge clk);
    ds = 1'b0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    y = cypher;
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, LATENCY);
    end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] y, z;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(MSG, PUB, y);
    checks++;
    if (y !== CT) begin failures++; $display("FAIL encrypt: got %h", y); end
    run(y, PRIV, z);
    checks++;
    if (z !== MSG) begin failures++; $display("FAIL decrypt: got %h", z); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
