// aes_inv_sub_bytes: InvSubBytes over the whole 128-bit state.
//
// Sixteen aes_inv_sbox look-up tables in parallel, one per byte. Interface: state_i in,
// state_o = InvSubBytes(state_i) out, combinational.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .a_i (state_i[127 - 8*i -: 8]),
      .y_o (state_o[127 - 8*i -: 8])
    );
  end
endmodule
