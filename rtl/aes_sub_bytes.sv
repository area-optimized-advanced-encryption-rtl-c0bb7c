// aes_sub_bytes: SubBytes over the whole 128-bit state.
//
// Sixteen aes_sbox look-up tables, one per state byte, work in parallel, so a full
// round's substitution takes one combinational pass. Interface: state_i in,
// state_o = SubBytes(state_i) out, no clock.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .a_i (state_i[127 - 8*i -: 8]),
      .y_o (state_o[127 - 8*i -: 8])
    );
  end
endmodule
