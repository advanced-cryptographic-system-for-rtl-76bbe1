// aes_sub_bytes: the SubBytes transformation and its inverse.
//
// Each of the 16 state bytes goes through its own S-box, independently of
// its position. With inv = 0 the forward S-box is used (encryption), with
// inv = 1 the inverse S-box (decryption). The S-box is computed from its
// definition (GF(2^8) inverse plus affine map, see aes_pkg) rather than read
// from a table; that is a choice of this design. Purely combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  logic   inv,      // 0: SubBytes, 1: InvSubBytes
  input  block_t state_i,
  output block_t state_o
);
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      state_o[127 - 8*k -: 8] = inv ? inv_sbox(state_i[127 - 8*k -: 8])
                                    : sbox(state_i[127 - 8*k -: 8]);
    end
  end
endmodule
