// tb_rsa_modexp: self-checking test of the RSA modular exponentiation unit.
//
// Uses a 128-bit RSA key pair (M = p*q, E = 65537, D = E^-1 mod (p-1)(q-1)).
// Results are compared with a square-and-multiply reference written here
// with plain 256-bit multiplication and the % operator, with a ciphertext
// worked out beforehand for the block 00112233...eeff, and with the message
// itself after a decryption (X^(E*D) mod M = X). Random exponents, including
// 0 and 1, exercise both outcomes of each exponent bit. Every run must take
// exactly 2N + 5 + (N+2)(N+5) clocks.
module tb_rsa_modexp;
  localparam int N = 128;
  localparam int LATENCY = 2*N + 5 + (N + 2)*(N + 5);
  localparam logic [N-1:0] MOD  = 128'h9db14bc6742d9b7d513760f19566ef55;
  localparam logic [N-1:0] PUB  = 128'h10001;
  localparam logic [N-1:0] PRIV = 128'h8969397291423cbeaab769d6846d3201;
  localparam logic [N-1:0] MSG  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [N-1:0] CT   = 128'h765e46fd6405261cb3d2640531b96cf5;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         ds  = 1'b0;
  logic [N-1:0] indata = '0, inexp = '0, inmod = '0, cypher;
  logic         ready;
  int           checks = 0, failures = 0;

  rsa_modexp dut (.clk(clk), .rst(rst), .ds(ds), .indata(indata),
    .inexp(inexp), .inmod(inmod), .cypher(cypher), .ready(ready));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_modexp(input logic [N-1:0] x, e, m);
    logic [2*N-1:0] r = 1, b = {{N{1'b0}}, x} % {{N{1'b0}}, m};
    for (int i = 0; i < N; i++) begin
      if (e[i]) r = (r * b) % {{N{1'b0}}, m};
      b = (b * b) % {{N{1'b0}}, m};
    end
    return r[N-1:0];
  endfunction

  task automatic run(input logic [N-1:0] x, e, m, output logic [N-1:0] y);
    int cyc;
    @(negedge clk);
    indata = x; inexp = e; inmod = m; ds = 1'b1;
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

  task automatic check(input string what, input logic [N-1:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] y, z, x, e;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check("reference model", ref_modexp(MSG, PUB, MOD), CT);
    run(MSG, PUB, MOD, y);
    check("encrypt", y, CT);
    run(y, PRIV, MOD, z);
    check("decrypt", z, MSG);
    run(MSG, '0, MOD, y);
    check("exponent 0", y, 1);
    run(MSG, 1, MOD, y);
    check("exponent 1", y, MSG);
    for (int i = 0; i < 6; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom} % MOD;
      e = {$urandom, $urandom, $urandom, $urandom};
      run(x, e, MOD, y);
      check("random exponent", y, ref_modexp(x, e, MOD));
      run(x, PUB, MOD, y);
      run(y, PRIV, MOD, z);
      check("round trip", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
