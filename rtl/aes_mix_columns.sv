// aes_mix_columns: the MixColumns transformation and its inverse.
//
// Each state column is read as a polynomial with the four bytes as
// coefficients and multiplied modulo x^4+1 by c(x) = {03}x^3+{01}x^2+{01}x+{02}
// (inv = 0) or by its inverse d(x) = {0b}x^3+{0d}x^2+{09}x+{0e} (inv = 1).
// The four columns are independent. Purely combinational. The system
// description names c(x) and d(x) without their coefficients; the values
// used are those of the AES specification.
module aes_mix_columns
  import aes_pkg::*;
(
  input  logic   inv,      // 0: MixColumns, 1: InvMixColumns
  input  block_t state_i,
  output block_t state_o
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      state_o[127 - 32*c -: 32] = inv ? inv_mix_col(state_i[127 - 32*c -: 32])
                                      : mix_col(state_i[127 - 32*c -: 32]);
    end
  end
endmodule
