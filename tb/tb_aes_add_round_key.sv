// tb_aes_add_round_key: self-checking test of AddRoundKey.
//
// Checks the FIPS-197 Appendix B round-1 AddRoundKey step, then random
// states and keys bit by bit, and that applying the same key twice gives the
// state back (the transformation is its own inverse).
module tb_aes_add_round_key;
  logic [127:0] s = '0, k = '0, y, y2;
  int           checks = 0, failures = 0;

  aes_add_round_key dut  (.state_i(s), .round_key(k), .state_o(y));
  aes_add_round_key dut2 (.state_i(y), .round_key(k), .state_o(y2));

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
    logic [127:0] e;
    s = 128'h046681e5e0cb199a48f8d37a2806264c;
    k = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    check("FIPS B round 1", y, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 50; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int b = 0; b < 128; b++) e[b] = (s[b] != k[b]);
      check("xor", y, e);
      check("self inverse", y2, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
