// tb_aes_round: self-checking test of one AES round in both directions.
//
// Forward: the FIPS-197 Appendix B round 1 (state after the initial
// AddRoundKey, round key 1) must give the published state at the start of
// round 2; a final round (no MixColumns) with a zero key must give the
// published SubBytes+ShiftRows result. Inverse: for random states X, a
// forward final round with a zero key gives Y = ShiftRows(SubBytes(X)); an
// inverse final round must map Y back to X, and an inverse middle round with
// key K must give InvMixColumns(X) ^ K, checked by applying this
// testbench's own MixColumns to (result ^ K).
module tb_aes_round;
  logic         inv = 1'b0, last = 1'b0;
  logic [127:0] din = '0, key = '0, dout;
  int           checks = 0, failures = 0;

  aes_round dut (.inv(inv), .last(last), .state_i(din), .round_key(key), .state_o(dout));

  function automatic logic [7:0] x2(input logic [7:0] a);
    return a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
  endfunction

  function automatic logic [127:0] ref_mix(input logic [127:0] x);
    logic [127:0] y;
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = x[127 - 32*c - 8*r -: 8];
      for (int r = 0; r < 4; r++)
        y[127 - 32*c - 8*r -: 8] = x2(a[r]) ^ x2(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return y;
  endfunction

  task automatic check(input string what, input logic [127:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] x, y, k;
    inv = 1'b0; last = 1'b0;
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    key = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    check("FIPS B round 1", dout, 128'ha49c7ff2689f352b6b5bea43026a5049);
    last = 1'b1; key = '0; #1;
    check("final round", dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 40; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'b0; last = 1'b1; key = '0; din = x; #1;
      y = dout;
      inv = 1'b1; last = 1'b1; key = k; din = y; #1;
      check("inverse final round", dout, x ^ k);
      inv = 1'b1; last = 1'b0; key = k; din = y; #1;
      check("inverse middle round", ref_mix(dout ^ k), x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
