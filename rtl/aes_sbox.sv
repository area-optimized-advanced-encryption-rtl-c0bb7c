// aes_sbox: AES S-box (SubBytes) for one byte, built as a 256-entry look-up table.
//
// The table is a constant ROM computed at elaboration by aes_pkg::gen_sbox (inverse in
// GF(2^8) followed by the affine map); in hardware it is a pure combinational look-up,
// as the look-up-table S-box of the source design. Interface: a_i in, y_o = S(a_i) out,
// no clock, no latency.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a_i,
  output byte_t y_o
);
  localparam sbox_table_t TABLE = gen_sbox();

  assign y_o = TABLE[a_i];
endmodule
