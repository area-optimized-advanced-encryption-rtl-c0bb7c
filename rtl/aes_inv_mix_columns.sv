// aes_inv_mix_columns: InvMixColumns over the four columns of a 128-bit word.
//
// Each column is multiplied by the circulant matrix {0E,0B,0D,09} over GF(2^8). The
// products are built from xtime chains: with x2 = 2a, x4 = 4a, x8 = 8a,
// 9a = x8^a, 0Ba = x8^x2^a, 0Da = x8^x4^a, 0Ea = x8^x4^x2. In the core this unit is used
// twice: on the state, and on the round key, which the equivalent inverse cipher needs
// (InvMixColumns(state ^ k) = InvMixColumns(state) ^ InvMixColumns(k)). Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t m9 [4];
    byte_t mb [4];
    byte_t md [4];
    byte_t me [4];
    for (genvar i = 0; i < 4; i++) begin : g_in
      byte_t x2, x4, x8;
      assign a[i]  = state_i[127 - 8*(i + 4*c) -: 8];
      assign x2    = xtime(a[i]);
      assign x4    = xtime(x2);
      assign x8    = xtime(x4);
      assign m9[i] = x8 ^ a[i];
      assign mb[i] = x8 ^ x2 ^ a[i];
      assign md[i] = x8 ^ x4 ^ a[i];
      assign me[i] = x8 ^ x4 ^ x2;
    end
    for (genvar i = 0; i < 4; i++) begin : g_out
      assign state_o[127 - 8*(i + 4*c) -: 8] =
        me[i] ^ mb[(i+1)%4] ^ md[(i+2)%4] ^ m9[(i+3)%4];
    end
  end
endmodule
