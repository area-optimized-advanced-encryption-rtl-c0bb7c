// aes_enc_round: one AES encryption round, combinational.
//
// state_o = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_i))), round_key_i). When
// final_i is 1 (round Nr) MixColumns is bypassed, as the standard and the source design
// prescribe for the last round. The core applies this once per clock cycle to its state
// register.
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  input  logic   final_i,
  output block_t state_o
);
  block_t sb, sr, mc, pre_key;

  aes_sub_bytes     u_sub   (.state_i(state_i), .state_o(sb));
  aes_shift_rows    u_shift (.state_i(sb),      .state_o(sr));
  aes_mix_columns   u_mix   (.state_i(sr),      .state_o(mc));

  assign pre_key = final_i ? sr : mc;

  aes_add_round_key u_ark   (.state_i(pre_key), .key_i(round_key_i), .state_o(state_o));
endmodule
