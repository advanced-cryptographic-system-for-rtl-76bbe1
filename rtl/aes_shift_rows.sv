// aes_shift_rows: the ShiftRows transformation and its inverse.
//
// Row r of the state is rotated cyclically left by r byte positions
// (s'[r,c] = s[r,(c+r) mod 4]); with inv = 1 it is rotated right by the same
// amount, which undoes it. Row 0 is left alone. Only wiring and a 2:1 mux;
// purely combinational. Byte k of the block is s[k mod 4, k div 4].
// The shift amounts are those of the AES specification and of the system
// description; the byte order of the 128-bit vector is this design's
// choice (the FIPS-197 order).
module aes_shift_rows
  import aes_pkg::*;
(
  input  logic   inv,      // 0: ShiftRows, 1: InvShiftRows
  input  block_t state_i,
  output block_t state_o
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_o[127 - 8*(4*c + r) -: 8] = inv
          ? state_i[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8]
          : state_i[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end
endmodule
