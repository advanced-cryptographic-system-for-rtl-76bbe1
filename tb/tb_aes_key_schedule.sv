// tb_aes_key_schedule: self-checking test of the AES-128 key expansion.
//
// Expands the FIPS-197 Appendix A.1 key and compares round keys 0, 1, 2 and
// 10 with the published words, and checks that ready is seen exactly 11
// clocks after start is raised (the clock that takes the key, then one
// clock per round key). In decryption mode round keys 0 and 10 must be stored
// unchanged and round keys 1..9 after InvMixColumns, which is checked by
// applying this testbench's own MixColumns and comparing with the
// encryption-mode key. Random keys repeat the mode comparison.
module tb_aes_key_schedule;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         start = 1'b0, dec = 1'b0;
  logic [127:0] key = '0, rd_key;
  logic         ready;
  logic [3:0]   rd_idx = '0;
  int           checks = 0, failures = 0;
  logic [127:0] enc_keys [11];

  aes_key_schedule dut (.clk(clk), .rst(rst), .start(start), .dec(dec), .key(key),
                        .ready(ready), .rd_idx(rd_idx), .rd_key(rd_key));

  always #5 clk = ~clk;

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

  task automatic expand(input logic [127:0] k, input logic d);
    int cyc;
    @(negedge clk);
    key = k; dec = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    check("latency", 128'(cyc), 128'(11));
  endtask

  task automatic read(input int i, output logic [127:0] v);
    rd_idx = 4'(i); #1;
    v = rd_key;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v, k;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 6; t++) begin
      k = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      expand(k, 1'b0);
      for (int i = 0; i <= 10; i++) read(i, enc_keys[i]);
      if (t == 0) begin
        check("w[0..3]",   enc_keys[0],  128'h2b7e151628aed2a6abf7158809cf4f3c);
        check("w[4..7]",   enc_keys[1],  128'ha0fafe1788542cb123a339392a6c7605);
        check("w[8..11]",  enc_keys[2],  128'hf2c295f27a96b9435935807a7359f67f);
        check("w[40..43]", enc_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      end
      expand(k, 1'b1);
      for (int i = 0; i <= 10; i++) begin
        read(i, v);
        if (i == 0 || i == 10) check("dec key unchanged", v, enc_keys[i]);
        else                   check("dec key InvMixColumns", ref_mix(v), enc_keys[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
