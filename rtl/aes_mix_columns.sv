// aes_mix_columns: MixColumns over the four columns of the state.
//
// Each 32-bit column (a0,a1,a2,a3) is multiplied by the circulant matrix
// {02,03,01,01} over GF(2^8): b_i = 2*a_i ^ 3*a_(i+1) ^ a_(i+2) ^ a_(i+3). Multiplication
// by 02 is xtime, by 03 is xtime(a) ^ a, so each column costs four xtime units and XORs.
// The matrix is the AES standard's. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t x [4];
    for (genvar i = 0; i < 4; i++) begin : g_in
      assign a[i] = state_i[127 - 8*(i + 4*c) -: 8];
      assign x[i] = xtime(a[i]);
    end
    for (genvar i = 0; i < 4; i++) begin : g_out
      assign state_o[127 - 8*(i + 4*c) -: 8] =
        x[i] ^ x[(i+1)%4] ^ a[(i+1)%4] ^ a[(i+2)%4] ^ a[(i+3)%4];
    end
  end
endmodule
