// aes_shift_rows: ShiftRows, pure wiring.
//
// Row r of the 4x4 state is rotated left by r bytes: out[r][c] = in[r][(c+r) mod 4],
// with state[r][c] being byte r + 4c of the block (byte 0 = bits [127:120]). The row
// offsets 0..3 are those of the AES standard. Combinational, no clock.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign state_o[127 - 8*(r + 4*c) -: 8] = state_i[127 - 8*(r + 4*((c + r) % 4)) -: 8];
    end
  end
endmodule
