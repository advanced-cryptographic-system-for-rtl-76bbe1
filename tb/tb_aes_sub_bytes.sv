// tb_aes_sub_bytes: self-checking test of SubBytes / InvSubBytes.
//
// Checks published S-box entries (FIPS-197 Fig. 7 and the Appendix B
// round-1 SubBytes step), then drives all 256 byte values through the
// forward S-box and checks that the results form a permutation, that the
// inverse S-box undoes it, and that no byte maps to itself or to its
// complement (a property of the AES S-box).
module tb_aes_sub_bytes;
  logic         inv = 1'b0;
  logic [127:0] din = '0, dout;
  int           checks = 0, failures = 0;
  bit           seen [256];

  aes_sub_bytes dut (.inv(inv), .state_i(din), .state_o(dout));

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
    logic [7:0] s;
    inv = 1'b0;
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check("FIPS B round 1", dout, 128'hd42711aee0bf98f1b8b45de51e415230);
    din = 128'h00_01_53_ff_10_c9_20_9a_00_00_00_00_00_00_00_00; #1;
    check("table entries", dout[127:64], 64'h63_7c_ed_16_ca_dd_b7_b8);
    inv = 1'b1;
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check("FIPS B inverse", dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int v = 0; v < 256; v++) begin
      inv = 1'b0;
      din = {16{8'(v)}}; #1;
      s = dout[7:0];
      checks++;
      if (dout != {16{s}}) begin failures++; $display("FAIL position dependence at %h", v); end
      checks++;
      if (seen[s] || s == 8'(v) || s == ~8'(v)) begin failures++; $display("FAIL S(%h)=%h", v, s); end
      seen[s] = 1'b1;
      inv = 1'b1;
      din = {16{s}}; #1;
      check("inverse", dout, {16{8'(v)}});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
