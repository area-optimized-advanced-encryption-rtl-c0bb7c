// aes_inv_shift_rows: InvShiftRows, pure wiring.
//
// Row r of the state is rotated right by r bytes: out[r][(c+r) mod 4] = in[r][c], the
// inverse of aes_shift_rows. Byte convention as in aes_pkg. Combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign state_o[127 - 8*(r + 4*((c + r) % 4)) -: 8] = state_i[127 - 8*(r + 4*c) -: 8];
    end
  end
endmodule
