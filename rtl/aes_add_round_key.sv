// aes_add_round_key: the AddRoundKey transformation.
//
// The 128-bit state is XORed with the 128-bit round key; column c of the
// state meets key word w[round*4 + c]. XOR is its own inverse, so the same
// block serves encryption and decryption. Purely combinational. This is the
// transformation exactly as the system description defines it.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key,
  output block_t state_o
);
  assign state_o = state_i ^ round_key;
endmodule
