// tb_mont_mult: self-checking test of the bit-serial Montgomery multiplier.
//
// For random odd 128-bit moduli and random operands below 2M it checks the
// defining property P * 2^(N+2) = A * B (mod M) with plain 512-bit
// arithmetic, the output bound P < 2M, and that rdy rises exactly N+4 clocks
// after go is raised (the clock that loads the operands, then one clock per
// iteration of the N+3 iteration loop). Edge cases:
// operand 0, operand 1, operands 2M-1.
module tb_mont_mult;
  localparam int N = 128;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         go = 1'b0;
  logic [N:0]   a = '0, b = '0;
  logic [N-1:0] m = 1;
  logic [N:0]   p;
  logic         rdy;
  int           checks = 0, failures = 0;

  mont_mult dut (.clk(clk), .rst(rst), .go(go), .mpand(a), .mplier(b),
                          .modulus(m), .product(p), .rdy(rdy));

  always #5 clk = ~clk;

  task automatic one(input logic [N:0] x, y, input logic [N-1:0] mod);
    int cyc;
    logic [4*N-1:0] lhs, rhs, mm;
    @(negedge clk);
    a = x; b = y; m = mod; go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    cyc = 1;
    while (!rdy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N + 4) begin failures++; $display("FAIL latency %0d", cyc); end
    mm  = (4*N)'(mod);
    lhs = ((4*N)'(p) << (N + 2)) % mm;
    rhs = ((4*N)'(x) * (4*N)'(y)) % mm;
    checks++;
    if (lhs != rhs) begin failures++; $display("FAIL congruence a=%h b=%h m=%h p=%h", x, y, mod, p); end
    checks++;
    if ((4*N)'(p) >= 2*mm) begin failures++; $display("FAIL range p=%h m=%h", p, mod); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] mod;
    logic [N+1:0] two_m;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      mod = {$urandom, $urandom, $urandom, $urandom} | 1;
      if (i % 2 == 0) mod[N-1] = 1'b1;
      two_m = {1'b0, mod, 1'b0};
      case (i % 8)
        0: one('0, (N+1)'({$urandom, $urandom, $urandom, $urandom}) % two_m[N:0], mod);
        1: one(1, (N+1)'(mod) - 1, mod);
        2: one(two_m[N:0] - 1, two_m[N:0] - 1, mod);
        default: one({1'b0, {$urandom, $urandom, $urandom, $urandom}} % two_m[N:0],
                     {1'b0, {$urandom, $urandom, $urandom, $urandom}} % two_m[N:0], mod);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
