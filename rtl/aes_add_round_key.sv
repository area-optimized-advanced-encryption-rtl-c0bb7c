// aes_add_round_key: AddRoundKey, the bytewise XOR of the state with a round key.
//
// Used for the initial key addition (plaintext xor cipher key) and at the end of every
// round. Combinational: state_o = state_i ^ key_i.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t key_i,
  output block_t state_o
);
  assign state_o = state_i ^ key_i;
endmodule
