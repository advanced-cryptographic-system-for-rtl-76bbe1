// tb_aes_shift_rows: self-checking test of ShiftRows / InvShiftRows.
//
// Checks the FIPS-197 Appendix B round-1 ShiftRows step and, for random
// states, compares with a reference that holds the state as a 4x4 byte
// matrix and rotates row r left by r places; the inverse must undo it.
module tb_aes_shift_rows;
  logic         inv = 1'b0;
  logic [127:0] din = '0, dout;
  int           checks = 0, failures = 0;

  aes_shift_rows dut (.inv(inv), .state_i(din), .state_o(dout));

  function automatic logic [127:0] ref_shift(input logic [127:0] x);
    logic [7:0] m [4][4];
    logic [7:0] row [4];
    logic [127:0] y;
    for (int k = 0; k < 16; k++) m[k % 4][k / 4] = x[127 - 8*k -: 8];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) row[c] = m[r][(c + r) % 4];
      for (int c = 0; c < 4; c++) m[r][c] = row[c];
    end
    for (int k = 0; k < 16; k++) y[127 - 8*k -: 8] = m[k % 4][k / 4];
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
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check("FIPS B round 1", dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'b0; din = x; #1;
      y = dout;
      check("forward", y, ref_shift(x));
      inv = 1'b1; din = y; #1;
      check("inverse", dout, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
