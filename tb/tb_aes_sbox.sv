// tb_aes_sbox: exhaustive check of the S-box look-up table against the reference
// (exhaustive-search inverse plus rotation-form affine map) and against entries of the
// published AES S-box.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 10000;
  `include "tb_common.svh"

  logic [7:0] a, y;
  aes_sbox dut (.a_i(a), .y_o(y));

  initial begin
    init();
    for (int x = 0; x < 256; x++) begin
      a = 8'(x);
      #1;
      `CHECK(y == sb[x], $sformatf("S(%02h) = %02h, expected %02h", a, y, sb[x]))
    end
    a = 8'h00; #1; `CHECK(y == 8'h63, "S(00) != 63")
    a = 8'h01; #1; `CHECK(y == 8'h7c, "S(01) != 7c")
    a = 8'h53; #1; `CHECK(y == 8'hed, "S(53) != ed")
    a = 8'hff; #1; `CHECK(y == 8'h16, "S(ff) != 16")
    finish_tb();
  end
endmodule
