// aes_round: one AES round, forward or inverse, as combinational logic.
//
// Encryption (inv = 0):  SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.
// Decryption (inv = 1):  InvSubBytes -> InvShiftRows -> InvMixColumns ->
//                        AddRoundKey.
// The decryption order is the rearranged ("equivalent") inverse cipher:
// because InvSubBytes and InvShiftRows commute and InvMixColumns is linear,
// decryption can use the same sequence of steps as encryption provided its
// middle round keys have been passed through InvMixColumns beforehand (the
// key schedule does that). The byte substitution and the row shift are
// therefore one combined stage in both directions. With last = 1 the
// (Inv)MixColumns step is skipped, as in the final round.
module aes_round
  import aes_pkg::*;
(
  input  logic   inv,       // 0: encryption round, 1: decryption round
  input  logic   last,      // 1: final round, no (Inv)MixColumns
  input  block_t state_i,
  input  block_t round_key,
  output block_t state_o
);
  block_t sb, sr, mc, pre_ark;

  aes_sub_bytes     u_sub (.inv(inv), .state_i(state_i), .state_o(sb));
  aes_shift_rows    u_shr (.inv(inv), .state_i(sb),      .state_o(sr));
  aes_mix_columns   u_mix (.inv(inv), .state_i(sr),      .state_o(mc));

  assign pre_ark = last ? sr : mc;

  aes_add_round_key u_ark (.state_i(pre_ark), .round_key(round_key), .state_o(state_o));
endmodule
