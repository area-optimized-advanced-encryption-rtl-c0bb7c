// aes_inv_sbox: AES inverse S-box (InvSubBytes) for one byte, a 256-entry look-up table.
//
// The constant table is computed at elaboration by inverting the forward S-box
// (aes_pkg::gen_inv_sbox). Using a look-up table mirrors the forward S-box of the source
// design; the inverse table itself is this design's construction. Interface: a_i in,
// y_o = S^-1(a_i) out, combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t a_i,
  output byte_t y_o
);
  localparam sbox_table_t TABLE = gen_inv_sbox();

  assign y_o = TABLE[a_i];
endmodule
