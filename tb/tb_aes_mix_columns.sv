// tb_aes_mix_columns: self-checking test of MixColumns / InvMixColumns.
//
// Checks published single-column results and the FIPS-197 Appendix B
// round-1 MixColumns step, and for random states compares with a reference
// that multiplies by {02} and {03} with its own shift-and-reduce; the
// inverse must undo the forward transformation.
module tb_aes_mix_columns;
  logic         inv = 1'b0;
  logic [127:0] din = '0, dout;
  int           checks = 0, failures = 0;

  aes_mix_columns dut (.inv(inv), .state_i(din), .state_o(dout));

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
    logic [127:0] x, y;
    inv = 1'b0;
    din = 128'hdb135345_f20a225c_01010101_2d26314c; #1;
    check("known columns", dout, 128'h8e4da1bc_9fdc589d_01010101_4d7ebdf8);
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check("FIPS B round 1", dout, 128'h046681e5e0cb199a48f8d37a2806264c);
    inv = 1'b1;
    din = 128'h8e4da1bc_9fdc589d_01010101_4d7ebdf8; #1;
    check("known columns inverse", dout, 128'hdb135345_f20a225c_01010101_2d26314c);
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'b0; din = x; #1;
      y = dout;
      check("forward", y, ref_mix(x));
      inv = 1'b1; din = y; #1;
      check("inverse", dout, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
